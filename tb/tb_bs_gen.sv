// Test of the probability encoder. Each cycle the output must be stored bit
// p_(15-A), the published layout (p0, the most significant bit, at A = 1111).
// Over 2^16 cycles with real address streams the frequency of ones must
// match sum_k P(A = k) * p[k], P from the published a_i.
module tb_bs_gen;
  localparam int unsigned NCYC = 65536;
  logic clk = 0, rst_n = 0, load = 0;
  logic [15:0] p = '0;
  logic [3:0] a;
  logic o;
  int checks = 0, failures = 0;
  real av [4] = '{0.6665, 0.7998, 0.9468, 0.9907};

  addr_gen #(.NLINES(4), .SEED(11)) u_ag (.clk(clk), .rst_n(rst_n), .a(a));
  bs_gen dut (.clk(clk), .rst_n(rst_n), .load(load), .p(p), .a(a), .o_bit(o));

  always #5 clk = ~clk;

  initial begin
    repeat (6 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] v;
    int ones;
    real pe, pa, f, tol;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      v = (t == 0) ? 16'h8000 : (t == 1) ? 16'h4000 : (t == 2) ? 16'hFFFF : 16'($urandom);
      @(negedge clk) begin load = 1; p = v; end
      @(negedge clk) begin load = 0; p = ~v; end
      pe = 0.0;
      for (int k = 0; k < 16; k++) begin
        pa = 1.0;
        for (int i = 0; i < 4; i++) pa = pa * (k[i] ? av[i] : 1.0 - av[i]);
        if (v[15 - (15 - k)]) pe = pe + pa;   // p_j, j = 15 - A, stored at bit 15-j
      end
      ones = 0;
      for (int c = 0; c < NCYC; c++) begin
        @(negedge clk);
        ones += int'(o);
        if (c < 256) begin
          checks++;
          if (o !== v[a]) failures++;
        end
      end
      f = real'(ones) / real'(NCYC);
      tol = 5.0 * $sqrt(pe * (1.0 - pe) / real'(NCYC)) + 1.0e-3;
      checks++;
      if (f > pe + tol || f < pe - tol) begin
        failures++;
        $display("value %h: freq %f expected %f", v, f, pe);
      end
      // The encoded value approximates the word as a binary fraction.
      checks++;
      if (f > real'(v) / 65536.0 + 0.02 || f < real'(v) / 65536.0 - 0.02) begin
        failures++;
        $display("value %h: freq %f far from %f", v, f, real'(v) / 65536.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
