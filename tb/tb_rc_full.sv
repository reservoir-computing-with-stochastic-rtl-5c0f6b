// Full-size run of the reservoir computer at its default parameters
// (25 neurons, 4 recurrent synapses each, 2 readout outputs, 2^16-cycle
// windows). Input weights are random with magnitude >= 0.5 and recurrent
// weights small; readout output 0 weights all neurons +1, output 1 all -1.
// The input is held high for four windows and low for two. Each window is
// checked for its length of 65536 cycles and for readout counts matching
// (1/N) * sum_n w_n * x_n from the reported states; in windows 2 and 3 the
// neurons must follow the sign of their input weight.
module tb_rc_full;
  localparam int unsigned N = 25, K = 4, NO = 2, WL = 16;
  localparam int unsigned M = K + 1, W = 1 << WL;
  localparam int unsigned NSTEP = 6;

  logic clk = 0, rst_n = 0, cfg_we = 0, run = 0;
  logic [7:0] cfg_addr = '0;
  logic [7:0] cfg_weight = '0;
  logic [15:0] u_in = 16'h8000;
  logic u_take, step_valid;
  logic [N-1:0][15:0] state;
  logic [NO-1:0][WL:0] y;
  logic winner;

  int checks = 0, failures = 0, n_step = 0, n_take = 0;
  logic [7:0] w_in [N];
  logic [7:0] w_ro [NO][N];

  rc_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_weight(cfg_weight),
    .run(run), .u_in(u_in), .u_take(u_take), .step_valid(step_valid),
    .state(state), .y(y), .winner(winner));

  always #5 clk = ~clk;

  initial begin
    repeat ((NSTEP + 2) * W) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (step %0d)", what, n_step); end
  endtask

  task automatic wr(input int addr, input logic [7:0] w);
    @(negedge clk) begin cfg_we = 1; cfg_addr = 8'(addr); cfg_weight = w; end
  endtask

  always @(posedge clk) begin
    if (u_take) begin
      n_take <= n_take + 1;
      u_in <= (n_take + 1 < 4) ? 16'hF000 : 16'h1000;
    end
  end

  longint last_t = -1;
  always @(posedge clk) begin
    if (rst_n && step_valid) begin
      automatic real v, pe, f;
      automatic int agree = 0;
      n_step++;
      if (last_t >= 0) chk(($time - last_t) == 10 * W, "window length");
      last_t = $time;
      for (int o = 0; o < NO; o++) begin
        v = 0.0;
        for (int n = 0; n < N; n++)
          v += (2.0 * real'(w_ro[o][n]) / 256.0 - 1.0) * (2.0 * real'(state[n]) / 65536.0 - 1.0);
        pe = (v / real'(N) + 1.0) / 2.0;
        f = real'(y[o]) / real'(W);
        chk(f < pe + 0.03 && f > pe - 0.03, $sformatf("readout %0d: %f vs %f", o, f, pe));
      end
      chk(int'(winner) == ((y[1] > y[0]) ? 1 : 0), "winner");
      if (n_step == 3 || n_step == 4) begin
        for (int n = 0; n < N; n++)
          if ((state[n] > 16'h8000) == w_in[n][7]) agree++;
        chk(agree >= N - 2, $sformatf("neurons follow input sign (%0d of %0d)", agree, N));
      end
      $display("step %0d: y0=%0d y1=%0d winner=%0d state0=%h", n_step, y[0], y[1], winner, state[0]);
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      w_in[n] = (($urandom % 2) != 0) ? 8'(192 + $urandom % 64) : 8'($urandom % 64);
      wr(n * M, w_in[n]);
      for (int s = 1; s < M; s++) wr(n * M + s, 8'(112 + $urandom % 32));
    end
    for (int n = 0; n < N; n++) begin
      w_ro[0][n] = 8'hFF; wr(N * M + n, w_ro[0][n]);
      w_ro[1][n] = 8'h00; wr(N * M + N + n, w_ro[1][n]);
    end
    @(negedge clk) cfg_we = 0;
    u_in = 16'hF000;
    run = 1;
    wait (n_step == NSTEP - 1);
    @(negedge clk) run = 0;
    wait (n_step == NSTEP);
    repeat (10) @(negedge clk);
    chk(n_take == NSTEP, "samples taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
