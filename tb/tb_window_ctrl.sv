// Test of the window controller with 8-cycle windows: with run held high,
// last must come every 8 cycles, load on the edge before the first window and
// on every last, first only before the first window; after run drops the
// current window completes and the controller goes idle.
module tb_window_ctrl;
  localparam int unsigned WL = 3;
  logic clk = 0, rst_n = 0, run = 0;
  logic active, last, load, first;
  int checks = 0, failures = 0;

  window_ctrl #(.WIN_LOG2(WL)) dut (.clk(clk), .rst_n(rst_n), .run(run), .active(active),
                                    .last(last), .load(load), .first(first));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("%s at %0t", what, $time); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) begin @(negedge clk); chk(!active && !load && !last, "idle"); end
    for (int rep = 0; rep < 3; rep++) begin
      run = 1; #1;
      chk(load && first && !active, "load before first window");
      for (int w = 0; w < 5; w++) begin
        for (int c = 0; c < (1 << WL); c++) begin
          @(negedge clk);
          if (w == 4 && c == 0) run = 0;
          #1;
          chk(active, "active in window");
          chk(!first, "first inside window");
          chk(last == (c == (1 << WL) - 1), "last position");
          chk(load == (last && run), "load position");
        end
      end
      @(negedge clk); #1;
      chk(!active && !load, "idle after run drops");
      repeat (4) begin @(negedge clk); chk(!active, "stays idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
