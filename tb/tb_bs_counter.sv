// Test of the bitstream-to-value converter with 64-bit windows: random
// bitstreams of random density, random idle (en = 0) cycles inside the
// window; count must equal the ones counted by the testbench after every
// window, and total must include the current bit.
module tb_bs_counter;
  localparam int unsigned WL = 6, W = 1 << WL;
  logic clk = 0, rst_n = 0, en = 0, last = 0, in_bit = 0;
  logic [WL:0] total, count;
  int checks = 0, failures = 0;

  bs_counter #(.WIN_LOG2(WL)) dut (.clk(clk), .rst_n(rst_n), .en(en), .last(last),
                                   .in_bit(in_bit), .total(total), .count(count));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ref_cnt, dens;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++; if (count !== '0) failures++;
    for (int w = 0; w < 300; w++) begin
      dens = (w == 0) ? 100 : (w == 1) ? 0 : int'($urandom % 101);
      ref_cnt = 0;
      for (int c = 0; c < W; c++) begin
        // idle cycles only in the middle of a window
        while (c > 0 && ($urandom % 8) == 0) begin
          en = 0; last = 0; in_bit = 1;
          @(negedge clk);
        end
        en = 1;
        last = (c == W - 1);
        in_bit = ($urandom % 100) < dens;
        ref_cnt += int'(in_bit);
        #1;
        checks++;
        if (total !== (WL+1)'(ref_cnt)) failures++;
        @(negedge clk);
      end
      en = 0; last = 0;
      checks++;
      if (count !== (WL+1)'(ref_cnt)) begin
        failures++;
        $display("window %0d: count %0d expected %0d", w, count, ref_cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
