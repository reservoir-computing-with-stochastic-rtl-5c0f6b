// Test of the random-multiplexer adder (M = 5). With equal inputs the output
// must equal them every cycle; with a one-hot input each input must be passed
// on about 1/5 of the time; with k ones among the inputs the output frequency
// must be about k/5.
module tb_stoch_adder;
  localparam int unsigned M = 5;
  localparam int unsigned NCYC = 20000;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] in_bits = '0;
  logic o;
  int checks = 0, failures = 0;

  stoch_adder #(.M(M), .SEED(3)) dut (.clk(clk), .rst_n(rst_n), .in_bits(in_bits), .o_bit(o));

  always #5 clk = ~clk;

  initial begin
    repeat (20 * NCYC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input logic [M-1:0] pat);
    int ones = 0;
    real f, pe, tol;
    in_bits = pat;
    for (int c = 0; c < NCYC; c++) begin
      @(negedge clk);
      ones += int'(o);
    end
    f  = real'(ones) / real'(NCYC);
    pe = real'($countones(pat)) / real'(M);
    tol = 5.0 * $sqrt(pe * (1.0 - pe) / real'(NCYC)) + 1.0e-3;
    checks++;
    if (f > pe + tol || f < pe - tol) begin
      failures++;
      $display("pattern %b: freq %f expected %f", pat, f, pe);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 1000; c++) begin
      @(negedge clk) in_bits = (c % 2 == 0) ? '0 : '1;
      #1;
      checks++;
      if (o !== in_bits[0]) failures++;
    end
    for (int i = 0; i < M; i++) measure(M'(1) << i);
    measure(5'b00011);
    measure(5'b10110);
    measure(5'b01111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
