// Test of the readout (4 neurons, 2 outputs). Output o's bitstream must encode
// (1/N) * sum_n w[o][n] * x[n] in bipolar coding; the testbench computes that
// value from the weight codes (value 2*code/256 - 1) and from constant or
// random neuron streams of known density, and compares the measured density
// of each output.
module tb_readout;
  localparam int unsigned N = 4, NO = 2;
  localparam int unsigned IW = $clog2(N * NO);
  localparam int unsigned NCYC = 40000;
  logic clk = 0, rst_n = 0, w_we = 0;
  logic [IW-1:0] w_idx = '0;
  logic [7:0] w_data = '0;
  logic [N-1:0] x_bits = '0;
  logic [NO-1:0] y_bits;
  int checks = 0, failures = 0;
  logic [7:0] wc [NO][N];

  readout #(.N(N), .NOUT(NO)) dut (.clk(clk), .rst_n(rst_n), .w_we(w_we), .w_idx(w_idx),
                                   .w_data(w_data), .x_bits(x_bits), .y_bits(y_bits));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_all();
    for (int o = 0; o < NO; o++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk) begin w_we = 1; w_idx = IW'(o * N + n); w_data = wc[o][n]; end
      end
    @(negedge clk) w_we = 0;
  endtask

  // px[n]: probability of a 1 on neuron n's stream
  task automatic run_case(input real px [N]);
    int ones [NO];
    real v, f, pe;
    for (int o = 0; o < NO; o++) ones[o] = 0;
    for (int c = 0; c < NCYC; c++) begin
      for (int n = 0; n < N; n++) x_bits[n] = real'($urandom % 65536) < px[n] * 65536.0;
      @(negedge clk);
      for (int o = 0; o < NO; o++) ones[o] += int'(y_bits[o]);
    end
    for (int o = 0; o < NO; o++) begin
      v = 0.0;
      for (int n = 0; n < N; n++)
        v += (2.0 * real'(wc[o][n]) / 256.0 - 1.0) * (2.0 * px[n] - 1.0);
      pe = (v / real'(N) + 1.0) / 2.0;
      f = real'(ones[o]) / real'(NCYC);
      checks++;
      if (f > pe + 0.03 || f < pe - 0.03) begin
        failures++;
        $display("output %0d: freq %f expected %f", o, f, pe);
      end
    end
  endtask

  initial begin
    real px [N];
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < N; n++) begin wc[0][n] = 8'hFF; wc[1][n] = 8'h00; end
    load_all();
    px = '{1.0, 1.0, 1.0, 1.0};  run_case(px);
    px = '{0.0, 0.0, 1.0, 1.0};  run_case(px);
    px = '{0.0, 0.0, 0.0, 0.0};  run_case(px);
    wc[0] = '{8'hFF, 8'h00, 8'hC0, 8'h40};
    wc[1] = '{8'h80, 8'hE0, 8'h20, 8'hFF};
    load_all();
    px = '{0.9, 0.2, 0.7, 0.5};  run_case(px);
    px = '{0.1, 0.8, 0.3, 0.6};  run_case(px);
    for (int t = 0; t < 3; t++) begin
      for (int o = 0; o < NO; o++) for (int n = 0; n < N; n++) wc[o][n] = 8'($urandom);
      load_all();
      for (int n = 0; n < N; n++) px[n] = real'($urandom % 1000) / 1000.0;
      run_case(px);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
