// Sine workload at full size: a sine of period 21 timesteps (as in the
// published experiments, where a single sine is fed to a 25-neuron reservoir)
// runs for 42 windows of 2^16 cycles. Output 0 of the readout is given the
// input weights of the neurons (a hand-set readout that reproduces the input
// up to scale); output 1 the negated ones. Checks: every window has the
// readout consistent with the states, the neuron states swing with the
// input, and the readout output 0 is strongly correlated with the input
// (correlation over the last 21 windows above 0.9), output 1 anti-correlated.
module tb_rc_sine;
  localparam int unsigned N = 25, K = 4, NO = 2, WL = 16;
  localparam int unsigned M = K + 1, W = 1 << WL;
  localparam int unsigned NSTEP = 42, PERIOD = 21;

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
  real u_hist [NSTEP + 2];
  real y_hist [NO][NSTEP + 1];
  real x0_min = 1.0, x0_max = 0.0;

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

  function automatic real u_val(input int k);
    return 0.9 * $sin(2.0 * 3.14159265358979 * real'(k) / real'(PERIOD));
  endfunction

  function automatic logic [15:0] code(input real v);
    return 16'(int'((v + 1.0) / 2.0 * 65535.0));
  endfunction

  function automatic real corr(input int o);
    real su = 0, sy = 0, suu = 0, syy = 0, suy = 0, nn;
    nn = real'(PERIOD);
    for (int k = NSTEP - PERIOD; k < NSTEP; k++) begin
      su += u_hist[k]; sy += y_hist[o][k];
      suu += u_hist[k] * u_hist[k]; syy += y_hist[o][k] * y_hist[o][k];
      suy += u_hist[k] * y_hist[o][k];
    end
    return (suy - su * sy / nn) / $sqrt((suu - su * su / nn) * (syy - sy * sy / nn));
  endfunction

  always @(posedge clk) begin
    if (u_take) begin
      n_take <= n_take + 1;
      u_in <= code(u_val(n_take + 1));
    end
  end

  always @(posedge clk) begin
    if (rst_n && step_valid) begin
      automatic real v, pe, f, x0;
      for (int o = 0; o < NO; o++) begin
        v = 0.0;
        for (int n = 0; n < N; n++)
          v += (2.0 * real'(w_ro[o][n]) / 256.0 - 1.0) * (2.0 * real'(state[n]) / 65536.0 - 1.0);
        pe = (v / real'(N) + 1.0) / 2.0;
        f = real'(y[o]) / real'(W);
        chk(f < pe + 0.03 && f > pe - 0.03, $sformatf("readout %0d: %f vs %f", o, f, pe));
        y_hist[o][n_step] = 2.0 * f - 1.0;
      end
      u_hist[n_step] = u_val(n_step);
      x0 = real'(state[0]) / 65536.0;
      if (n_step >= PERIOD) begin
        if (x0 < x0_min) x0_min = x0;
        if (x0 > x0_max) x0_max = x0;
      end
      n_step++;
    end
  end

  initial begin
    real c0, c1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      w_in[n] = (($urandom % 2) != 0) ? 8'(192 + $urandom % 64) : 8'($urandom % 64);
      wr(n * M, w_in[n]);
      for (int s = 1; s < M; s++) wr(n * M + s, 8'(96 + $urandom % 64));
    end
    for (int n = 0; n < N; n++) begin
      w_ro[0][n] = w_in[n];  wr(N * M + n, w_ro[0][n]);
      w_ro[1][n] = ~w_in[n]; wr(N * M + N + n, w_ro[1][n]);
    end
    @(negedge clk) cfg_we = 0;
    u_in = code(u_val(0));
    run = 1;
    wait (n_step == NSTEP - 1);
    @(negedge clk) run = 0;
    wait (n_step == NSTEP);
    repeat (10) @(negedge clk);
    c0 = corr(0);
    c1 = corr(1);
    $display("correlation with input: output0 %f output1 %f; neuron 0 swing %f..%f", c0, c1, x0_min, x0_max);
    chk(c0 > 0.9, "output 0 follows the sine");
    chk(c1 < -0.9, "output 1 follows the negated sine");
    chk(x0_max - x0_min > 0.3, "neuron 0 swings with the input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
