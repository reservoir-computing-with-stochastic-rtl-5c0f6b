// Test of the winner-take-all with 5 values: random and tied inputs against
// a reference scan (first maximum wins).
module tb_wta;
  localparam int unsigned NO = 5, W = 17;
  logic [NO-1:0][W-1:0] vals;
  logic [2:0] winner;
  int checks = 0, failures = 0;
  logic clk = 0;

  wta #(.NOUT(NO), .W(W)) dut (.vals(vals), .winner(winner));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int best;
    for (int t = 0; t < 5000; t++) begin
      for (int i = 0; i < NO; i++)
        vals[i] = (t % 3 == 0) ? W'($urandom % 4) : W'($urandom);
      #1;
      best = 0;
      for (int i = 1; i < NO; i++) if (vals[i] > vals[best]) best = i;
      checks++;
      if (int'(winner) != best) begin
        failures++;
        if (failures < 5) $display("vals %p winner %0d expected %0d", vals, winner, best);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
