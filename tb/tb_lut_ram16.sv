// Self-checking test of the 16x1 LUT-RAM: reset content, then random whole-word
// writes, each followed by a read of all sixteen addresses against the word.
module tb_lut_ram16;
  logic clk = 0, rst_n = 0, we = 0, q;
  logic [15:0] wdata = '0;
  logic [3:0] addr = '0;
  int checks = 0, failures = 0;

  lut_ram16 dut (.clk(clk), .rst_n(rst_n), .we(we), .wdata(wdata), .addr(addr), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] word;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 16; k++) begin
      addr = 4'(k); #1;
      checks++; if (q !== 1'b0) failures++;
    end
    for (int t = 0; t < 200; t++) begin
      word = 16'($urandom);
      @(negedge clk) begin we = 1; wdata = word; end
      @(negedge clk) begin we = 0; wdata = ~word; end
      for (int k = 0; k < 16; k++) begin
        addr = 4'(k); #1;
        checks++;
        if (q !== word[k]) begin
          failures++;
          $display("mismatch word %h addr %0d q %b", word, k, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
