// Statistical test of the address bitstream generators. Over 2^16 cycles the
// frequency of each line and of each full address value must match the
// published address probabilities (a_i and products of a_i / (1 - a_i))
// within five standard deviations plus the 16-bit threshold rounding.
module tb_addr_gen;
  localparam int unsigned NCYC = 65536;
  logic clk = 0, rst_n = 0;
  logic [2:0] a3;
  logic [3:0] a4;
  int checks = 0, failures = 0;
  int ones3 [3], ones4 [4], hist3 [8], hist4 [16];
  real p3 [3] = '{0.6665, 0.7993, 0.9385};
  real p4 [4] = '{0.6665, 0.7998, 0.9468, 0.9907};

  addr_gen #(.NLINES(3), .SEED(3)) dut3 (.clk(clk), .rst_n(rst_n), .a(a3));
  addr_gen #(.NLINES(4), .SEED(4)) dut4 (.clk(clk), .rst_n(rst_n), .a(a4));

  always #5 clk = ~clk;

  initial begin
    repeat (NCYC + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pk(input int k, input int nl, input bit four);
    real r = 1.0;
    for (int i = 0; i < nl; i++) begin
      real ai = four ? p4[i] : p3[i];
      r = r * (k[i] ? ai : 1.0 - ai);
    end
    return r;
  endfunction

  task automatic check_freq(input string what, input int cnt, input real p);
    real f = real'(cnt) / real'(NCYC);
    real tol = 5.0 * $sqrt(p * (1.0 - p) / real'(NCYC)) + 2.0e-5;
    checks++;
    if (f > p + tol || f < p - tol) begin
      failures++;
      $display("%s: freq %f expected %f", what, f, p);
    end
  endtask

  initial begin
    foreach (ones3[i]) ones3[i] = 0;
    foreach (ones4[i]) ones4[i] = 0;
    foreach (hist3[i]) hist3[i] = 0;
    foreach (hist4[i]) hist4[i] = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      for (int i = 0; i < 3; i++) ones3[i] += int'(a3[i]);
      for (int i = 0; i < 4; i++) ones4[i] += int'(a4[i]);
      hist3[a3]++;
      hist4[a4]++;
    end
    for (int i = 0; i < 3; i++) check_freq($sformatf("3-line a%0d", i), ones3[i], p3[i]);
    for (int i = 0; i < 4; i++) check_freq($sformatf("4-line a%0d", i), ones4[i], p4[i]);
    for (int k = 0; k < 8; k++)  check_freq($sformatf("3-line A=%0d", k), hist3[k], pk(k, 3, 0));
    for (int k = 0; k < 16; k++) check_freq($sformatf("4-line A=%0d", k), hist4[k], pk(k, 4, 1));
    // The top address must come up about half of the time.
    checks++; if (hist3[7] < 31000 || hist3[7] > 34500) failures++;
    checks++; if (hist4[15] < 31000 || hist4[15] > 34500) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
