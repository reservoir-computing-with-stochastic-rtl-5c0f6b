// Test of one stochastic neuron (3 synapses). Weights near +1 with all-one
// inputs drive the output to 1; weights near -1 drive it to 0; weights near
// 0 leave it near 1/2; mixed signs that cancel leave it near 1/2; and a single
// positive synapse whose input is 0 drives the output low (sign of the
// product of input and weight).
module tb_stoch_neuron;
  localparam int unsigned M = 3;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] w_we = '0, in_bits = '0;
  logic [7:0] w_data = '0;
  logic o;
  int checks = 0, failures = 0;

  stoch_neuron #(.M(M), .STATES(16), .SEED(5)) dut (
    .clk(clk), .rst_n(rst_n), .w_we(w_we), .w_data(w_data), .in_bits(in_bits), .o_bit(o));

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_w(input int i, input logic [7:0] w);
    @(negedge clk) begin w_we = '0; w_we[i] = 1'b1; w_data = w; end
    @(negedge clk) w_we = '0;
  endtask

  task automatic expect_freq(input string what, input real lo, input real hi);
    int ones = 0;
    real f;
    repeat (200) @(negedge clk);
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      ones += int'(o);
    end
    f = real'(ones) / 20000.0;
    checks++;
    if (f < lo || f > hi) begin
      failures++;
      $display("%s: freq %f outside [%f, %f]", what, f, lo, hi);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < M; i++) set_w(i, 8'hFF);
    in_bits = '1;
    expect_freq("w=+1, x=+1", 0.97, 1.0);
    in_bits = '0;
    expect_freq("w=+1, x=-1", 0.0, 0.03);
    for (int i = 0; i < M; i++) set_w(i, 8'h00);
    in_bits = '1;
    expect_freq("w=-1, x=+1", 0.0, 0.03);
    for (int i = 0; i < M; i++) set_w(i, 8'h80);
    expect_freq("w=0", 0.3, 0.7);
    set_w(0, 8'hFF); set_w(1, 8'h00); set_w(2, 8'h80);
    expect_freq("w=+1,-1,0 cancel", 0.3, 0.7);
    set_w(1, 8'h80);
    expect_freq("w=+1,0,0", 0.8, 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
