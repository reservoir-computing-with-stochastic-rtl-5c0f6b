// End-to-end test of the reservoir computer (25 neurons, 1024-cycle windows).
//
// Weights: input synapses random with magnitude >= 0.5, recurrent synapses
// small; readout output 0 weights every neuron +1, output 1 weights every
// neuron -1. The input runs through a high phase, a low phase and a sine,
// then run is dropped and raised again. After every window the testbench
// checks: the window length in cycles; that each readout count matches
// (1/N) * sum_n w_n * x_n computed from the reported states; that the winner
// is the larger readout; and, in the steady high and low phases, that the
// neurons follow the sign of their input weight. It counts the mechanisms
// (weight writes, windows, input samples, first-window restart, each winner,
// idle gap) and fails if one never happened.
module tb_rc_top;
  localparam int unsigned N = 25, K = 4, NO = 2, WL = 10;
  localparam int unsigned M = K + 1, W = 1 << WL;
  localparam int unsigned AW = $clog2(N * M + N * NO);
  localparam int unsigned NSTEP = 40;

  logic clk = 0, rst_n = 0, cfg_we = 0, run = 0;
  logic [AW-1:0] cfg_addr = '0;
  logic [7:0] cfg_weight = '0;
  logic [15:0] u_in = 16'h8000;
  logic u_take, step_valid;
  logic [N-1:0][15:0] state;
  logic [NO-1:0][WL:0] y;
  logic winner;

  int checks = 0, failures = 0;
  int n_cfg = 0, n_step = 0, n_take = 0, n_first = 0, n_win0 = 0, n_win1 = 0, n_idle = 0;
  logic [7:0] w_in [N];
  logic [7:0] w_ro [NO][N];

  rc_top #(.N(N), .K_REC(K), .NOUT(NO), .WIN_LOG2(WL), .FSM_STATES(16)) dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_weight(cfg_weight),
    .run(run), .u_in(u_in), .u_take(u_take), .step_valid(step_valid),
    .state(state), .y(y), .winner(winner));

  always #5 clk = ~clk;

  initial begin
    repeat ((NSTEP + 10) * W) @(posedge clk);
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
    @(negedge clk) begin cfg_we = 1; cfg_addr = AW'(addr); cfg_weight = w; end
    n_cfg++;
  endtask

  // Input schedule: sample index -> code
  function automatic logic [15:0] sample(input int k);
    real v;
    if (k < 8)       v = 0.875;
    else if (k < 16) v = -0.875;
    else             v = 0.9 * $sin(2.0 * 3.14159265 * real'(k) / 21.0);
    return 16'(int'((v + 1.0) / 2.0 * 65535.0));
  endfunction

  // Input sample feeding: present the next sample after each u_take
  // A sample taken on a cycle that is not the end of a window (no step_valid
  // on the following cycle) starts a fresh run from the zero state.
  logic took = 0;
  int idle_run = 0;
  always @(posedge clk) begin
    took <= u_take;
    if (took && !step_valid) n_first++;
    if (rst_n && run === 1'b0 && !u_take) idle_run++;
    if (u_take) begin
      n_take <= n_take + 1;
      u_in <= sample(n_take + 1);
    end
  end

  // Per-window checks
  longint last_t = -1;
  always @(posedge clk) begin
    if (rst_n && step_valid) begin
      automatic real v, pe, f, xs;
      automatic int in_phase;
      n_step++;
      if (last_t >= 0 && n_step != 31) chk(($time - last_t) == 10 * W, "window length");
      last_t = $time;
      for (int o = 0; o < NO; o++) begin
        v = 0.0;
        for (int n = 0; n < N; n++) begin
          xs = real'(state[n]) / 65536.0;
          v += (2.0 * real'(w_ro[o][n]) / 256.0 - 1.0) * (2.0 * xs - 1.0);
        end
        pe = (v / real'(N) + 1.0) / 2.0;
        f = real'(y[o]) / real'(W);
        chk(f < pe + 0.08 && f > pe - 0.08, $sformatf("readout %0d: %f vs %f", o, f, pe));
      end
      chk(int'(winner) == ((y[1] > y[0]) ? 1 : 0), "winner");
      if (winner) n_win1++; else n_win0++;
      // steady phases: sample index of this window is n_step-1 (first run)
      in_phase = n_step - 1;
      if ((in_phase >= 4 && in_phase < 8) || (in_phase >= 12 && in_phase < 16)) begin
        automatic int agree = 0;
        for (int n = 0; n < N; n++) begin
          automatic bit pos_w = w_in[n][7];
          automatic bit hi_u  = (in_phase < 8);
          automatic bit hi_x  = state[n] > 16'h8000;
          if (hi_x == (pos_w == hi_u)) agree++;
        end
        chk(agree >= N - 2, $sformatf("neurons follow input sign (%0d of %0d)", agree, N));
      end
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
    u_in = sample(0);
    run = 1;
    wait (n_step == 29);
    @(negedge clk) run = 0;
    wait (n_step == 30);
    repeat (W / 2) @(negedge clk);
    n_idle = idle_run;
    run = 1;
    wait (n_step == NSTEP);
    run = 0;
    repeat (10) @(negedge clk);
    chk(n_cfg == N * M + N * NO, "weight writes");
    chk(n_first == 2, "first-window restarts");
    chk(n_take >= NSTEP, "input samples taken");
    chk(n_win0 > 0, "winner 0 seen");
    chk(n_win1 > 0, "winner 1 seen");
    chk(n_idle > 0, "idle gap");
    $display("mechanisms: cfg=%0d steps=%0d takes=%0d first=%0d win0=%0d win1=%0d idle=%0d",
             n_cfg, n_step, n_take, n_first, n_win0, n_win1, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
