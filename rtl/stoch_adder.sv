// Scaled adder for stochastic bitstreams.
//
// Each clock cycle one of the M inputs, chosen uniformly at random, is passed
// to the output, so the output's probability of a 1 is the mean of the input
// probabilities: the sum scaled by 1/M, in unipolar and bipolar coding alike.
// The random choice uses a 32-bit xorshift generator: select =
// (rand16 * M) >> 16. The multiplexer form is this design's choice.
//
// Timing: the select is registered; o_bit is combinational in in_bits.
module stoch_adder #(
  parameter int unsigned M    = 5,
  parameter int unsigned SEED = 7
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] in_bits,
  output logic         o_bit
);
  import rc_pkg::*;

  localparam int unsigned SW = (M > 1) ? $clog2(M) : 1;

  logic [31:0] st;
  logic [SW-1:0] sel;
  logic [15:0]  r;
  logic [SW+15:0] prod;

  assign r    = st[31:16];
  assign prod = r * (SW+16)'(M);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st  <= seed_of(SEED * 8 + 5);
      sel <= '0;
    end else begin
      st  <= xorshift32(st);
      sel <= prod[SW+15:16];
    end
  end

  assign o_bit = in_bits[sel];
endmodule
