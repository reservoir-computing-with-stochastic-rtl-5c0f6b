// Test of the saturating-counter non-linearity (16 states). A reference
// counter in the testbench follows a random input; the output must match it
// on every cycle. Then the transfer curve is checked at a few input
// probabilities: output frequency near 0 for p = 0.3, 0.5 for p = 0.5 and
// near 1 for p = 0.7, monotonic in between.
module tb_stoch_tanh;
  localparam int unsigned S = 16;
  logic clk = 0, rst_n = 0, in_bit = 0, o;
  int checks = 0, failures = 0;
  int ref_state;

  stoch_tanh #(.STATES(S)) dut (.clk(clk), .rst_n(rst_n), .in_bit(in_bit), .o_bit(o));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  initial begin
    int ones;
    real f [5];
    real ps [5] = '{0.3, 0.45, 0.5, 0.55, 0.7};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    ref_state = S / 2;
    for (int c = 0; c < 5000; c++) begin
      checks++;
      if (o !== (ref_state >= S / 2)) begin
        failures++;
        if (failures < 5) $display("cycle %0d: o=%b ref state %0d", c, o, ref_state);
      end
      in_bit = ($urandom % 100) < ((c / 500) % 2 == 0 ? 60 : 40);
      @(negedge clk);
      if (in_bit && ref_state < S - 1) ref_state++;
      else if (!in_bit && ref_state > 0) ref_state--;
    end
    for (int i = 0; i < 5; i++) begin
      ones = 0;
      for (int c = 0; c < 40000; c++) begin
        in_bit = real'($urandom % 65536) < ps[i] * 65536.0;
        @(negedge clk);
        ones += int'(o);
      end
      f[i] = real'(ones) / 40000.0;
    end
    checks += 4;
    if (f[0] > 0.05) begin failures++; $display("p=0.3 gives %f", f[0]); end
    if (f[4] < 0.95) begin failures++; $display("p=0.7 gives %f", f[4]); end
    if (f[2] < 0.40 || f[2] > 0.60) begin failures++; $display("p=0.5 gives %f", f[2]); end
    if (!(f[0] < f[1] && f[1] < f[2] && f[2] < f[3] && f[3] < f[4])) begin
      failures++; $display("not monotonic");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
