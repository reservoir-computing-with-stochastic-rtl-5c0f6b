// Trained-readout workload at full size: from the reservoir states, produce
// the input sine shifted by phi = k*pi/4, k = 0..7, as in the published
// phase-shift sweep over [0, 2*pi] (k = 0 reproduces the input, k = 6 is the
// -pi/2 shift).
//
// Pass 1 runs the sine (period 21 timesteps) through the reservoir with
// random input and recurrent weights and records the neuron states. The
// testbench fits one readout per phase by ridge regression on the bipolar
// states, scales the weights into [-1, 1] (gain g = 1 / max |w|) and
// quantises them to 8-bit codes. Four more passes follow, each with two
// phases loaded into the two readout outputs through the configuration port;
// each restarts the network on the same input. The hardware output value y
// (bipolar, = sum(w x) / N) times N / g is compared with the target and the
// normalised RMS error is reported per phase. Checks: readout counts
// consistent with states on every window, NRMSE below 0.35 for every phase.
module tb_rc_phase;
  localparam int unsigned N = 25, K = 4, NO = 2, WL = 16;
  localparam int unsigned M = K + 1, W = 1 << WL;
  localparam int unsigned PERIOD = 21, WASH = 21, NTRAIN = 84;
  localparam int unsigned NSTEP = WASH + NTRAIN;
  localparam real PI = 3.14159265358979;
  localparam int unsigned NPH = 8;

  logic clk = 0, rst_n = 0, cfg_we = 0, run = 0;
  logic [7:0] cfg_addr = '0;
  logic [7:0] cfg_weight = '0;
  logic [15:0] u_in = 16'h8000;
  logic u_take, step_valid;
  logic [N-1:0][15:0] state;
  logic [NO-1:0][WL:0] y;
  logic winner;

  int checks = 0, failures = 0, n_step = 0, n_take = 0;
  logic [7:0] w_ro [NO][N];
  real xs [NSTEP][N];
  real yv [NO][NSTEP];
  int ph [NO];

  rc_top dut (
    .clk(clk), .rst_n(rst_n), .cfg_we(cfg_we), .cfg_addr(cfg_addr), .cfg_weight(cfg_weight),
    .run(run), .u_in(u_in), .u_take(u_take), .step_valid(step_valid),
    .state(state), .y(y), .winner(winner));

  always #5 clk = ~clk;

  initial begin
    repeat ((5 * NSTEP + 10) * W + 100000) @(posedge clk);
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

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic real u_val(input int k);
    return 0.9 * $sin(2.0 * PI * real'(k) / real'(PERIOD));
  endfunction

  function automatic real target(input int p, input int k);
    return $sin(2.0 * PI * real'(k) / real'(PERIOD) + real'(p) * PI / 4.0);
  endfunction

  function automatic logic [15:0] code(input real v);
    return 16'(int'((v + 1.0) / 2.0 * 65535.0));
  endfunction

  always @(posedge clk) begin
    if (u_take) begin
      n_take <= n_take + 1;
      u_in <= code(u_val(n_take + 1));
    end
  end

  always @(posedge clk) begin
    if (rst_n && step_valid && n_step < NSTEP) begin
      automatic real v, pe, f;
      for (int n = 0; n < N; n++) xs[n_step][n] = 2.0 * real'(state[n]) / 65536.0 - 1.0;
      for (int o = 0; o < NO; o++) begin
        v = 0.0;
        for (int n = 0; n < N; n++)
          v += (2.0 * real'(w_ro[o][n]) / 256.0 - 1.0) * xs[n_step][n];
        pe = (v / real'(N) + 1.0) / 2.0;
        f = real'(y[o]) / real'(W);
        chk(f < pe + 0.03 && f > pe - 0.03, $sformatf("readout %0d: %f vs %f", o, f, pe));
        yv[o][n_step] = 2.0 * f - 1.0;
      end
      n_step++;
    end
  end

  task automatic run_pass();
    n_step = 0;
    @(negedge clk) begin n_take = 0; u_in = code(u_val(0)); end
    run = 1;
    wait (n_step == NSTEP - 1);
    @(negedge clk) run = 0;
    wait (n_step == NSTEP);
    repeat (10) @(negedge clk);
  endtask

  // Ridge regression: beta = (X'X + lambda I)^-1 X' t over the training steps.
  task automatic fit(input int p, output real beta [N]);
    real a [N][N+1];
    real piv, fac, tmp;
    int pv;
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        a[i][j] = (i == j) ? 1.0e-3 : 0.0;
        for (int k = WASH; k < NSTEP; k++) a[i][j] += xs[k][i] * xs[k][j];
      end
      a[i][N] = 0.0;
      for (int k = WASH; k < NSTEP; k++) a[i][N] += xs[k][i] * target(p, k);
    end
    for (int c = 0; c < N; c++) begin
      pv = c;
      for (int r = c + 1; r < N; r++) if (fabs(a[r][c]) > fabs(a[pv][c])) pv = r;
      for (int j = 0; j <= N; j++) begin tmp = a[c][j]; a[c][j] = a[pv][j]; a[pv][j] = tmp; end
      piv = a[c][c];
      for (int r = 0; r < N; r++) begin
        if (r != c) begin
          fac = a[r][c] / piv;
          for (int j = c; j <= N; j++) a[r][j] -= fac * a[c][j];
        end
      end
    end
    for (int i = 0; i < N; i++) beta[i] = a[i][N] / a[i][i];
  endtask

  initial begin
    real beta [N];
    real g [NPH];
    logic [7:0] wq [NPH][N];
    real mx, e, se, st, nrmse_sw, sse;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin
      wr(n * M, (($urandom % 2) != 0) ? 8'(176 + $urandom % 80) : 8'($urandom % 80));
      for (int s = 1; s < M; s++) wr(n * M + s, 8'(64 + $urandom % 128));
    end
    for (int o = 0; o < NO; o++)
      for (int n = 0; n < N; n++) begin w_ro[o][n] = 8'h80; wr(N * M + o * N + n, 8'h80); end
    @(negedge clk) cfg_we = 0;
    run_pass();
    // Train one readout per phase on the recorded states.
    for (int p = 0; p < NPH; p++) begin
      fit(p, beta);
      sse = 0.0; st = 0.0;
      for (int k = WASH; k < NSTEP; k++) begin
        e = -target(p, k);
        for (int n = 0; n < N; n++) e += beta[n] * xs[k][n];
        sse += e * e; st += target(p, k) * target(p, k);
      end
      nrmse_sw = $sqrt(sse / st);
      mx = 0.0;
      for (int n = 0; n < N; n++) if (fabs(beta[n]) > mx) mx = fabs(beta[n]);
      g[p] = 1.0 / mx;
      for (int n = 0; n < N; n++) begin
        int c;
        c = int'((beta[n] * g[p] + 1.0) / 2.0 * 256.0);
        if (c > 255) c = 255;
        if (c < 0) c = 0;
        wq[p][n] = 8'(c);
      end
      $display("phase %0d*pi/4: fit NRMSE on states %f, weight gain %f", p, nrmse_sw, g[p]);
    end
    // Hardware readout, two phases per pass.
    for (int pp = 0; pp < NPH / NO; pp++) begin
      for (int o = 0; o < NO; o++) begin
        ph[o] = pp * NO + o;
        for (int n = 0; n < N; n++) begin
          w_ro[o][n] = wq[ph[o]][n];
          wr(N * M + o * N + n, w_ro[o][n]);
        end
      end
      @(negedge clk) cfg_we = 0;
      run_pass();
      for (int o = 0; o < NO; o++) begin
        se = 0.0; st = 0.0;
        for (int k = WASH; k < NSTEP; k++) begin
          e = yv[o][k] * real'(N) / g[ph[o]] - target(ph[o], k);
          se += e * e; st += target(ph[o], k) * target(ph[o], k);
        end
        $display("phase %0d*pi/4: hardware NRMSE %f", ph[o], $sqrt(se / st));
        chk($sqrt(se / st) < 0.35, $sformatf("phase %0d NRMSE", ph[o]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
