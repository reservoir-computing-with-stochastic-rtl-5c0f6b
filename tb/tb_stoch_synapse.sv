// Test of the LUT-RAM synapse against the published LUT layout: for random
// weights, every combination of input bit I and address A must give w_(7-A)
// when I = 1, and 0 (unipolar) or the inverted bit (bipolar) when I = 0.
// The weight code carries w0 (the bit read at A = 111) in bit 7.
// A second phase drives real address streams and checks the product value.
module tb_stoch_synapse;
  logic clk = 0, rst_n = 0, we = 0, i_bit = 0;
  logic [7:0] weight = '0;
  logic [2:0] a = '0, ag;
  logic ob, ou, og;
  int checks = 0, failures = 0;

  stoch_synapse #(.BIPOLAR(1'b1)) dut_b (.clk(clk), .rst_n(rst_n), .we(we), .weight(weight),
                                         .a(a), .i_bit(i_bit), .o_bit(ob));
  stoch_synapse #(.BIPOLAR(1'b0)) dut_u (.clk(clk), .rst_n(rst_n), .we(we), .weight(weight),
                                         .a(a), .i_bit(i_bit), .o_bit(ou));
  addr_gen #(.NLINES(3), .SEED(9)) u_ag (.clk(clk), .rst_n(rst_n), .a(ag));
  stoch_synapse #(.BIPOLAR(1'b1)) dut_g (.clk(clk), .rst_n(rst_n), .we(we), .weight(weight),
                                         .a(ag), .i_bit(i_bit), .o_bit(og));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] w;
    logic wj, eb, eu;
    int ones;
    real pw, pe, f;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 100; t++) begin
      w = (t == 0) ? 8'hFF : (t == 1) ? 8'h00 : 8'($urandom);
      @(negedge clk) begin we = 1; weight = w; end
      @(negedge clk) begin we = 0; weight = 8'($urandom); end
      for (int ib = 0; ib < 2; ib++) begin
        for (int ad = 0; ad < 8; ad++) begin
          i_bit = ib[0]; a = 3'(ad); #1;
          wj = w[7 - (7 - ad)];          // w_j with j = 7 - A, w_j stored at bit 7-j
          eb = ib[0] ? wj : ~wj;
          eu = ib[0] ? wj : 1'b0;
          checks += 2;
          if (ob !== eb) begin failures++; $display("bipolar w=%h I=%0d A=%0d", w, ib, ad); end
          if (ou !== eu) begin failures++; $display("unipolar w=%h I=%0d A=%0d", w, ib, ad); end
        end
      end
    end
    // Product with real address streams: I = 1 gives P = value of w, I = 0 gives 1 - P.
    for (int t = 0; t < 4; t++) begin
      w = 8'(32 + 64 * t);
      @(negedge clk) begin we = 1; weight = w; end
      @(negedge clk) we = 0;
      pw = real'(w) / 256.0;
      for (int ib = 0; ib < 2; ib++) begin
        i_bit = ib[0];
        ones = 0;
        for (int c = 0; c < 16384; c++) begin
          @(negedge clk);
          ones += int'(og);
        end
        f = real'(ones) / 16384.0;
        pe = ib[0] ? pw : 1.0 - pw;
        checks++;
        if (f > pe + 0.03 || f < pe - 0.03) begin
          failures++;
          $display("product w=%h I=%0d freq %f expected %f", w, ib, f, pe);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
