// Sigmoid-type non-linearity for a bipolar bitstream.
//
// A saturating up/down counter with STATES states counts up on a 1 and down
// on a 0; the output is 1 while the counter is in its upper half. For a
// stationary input of bipolar value x the output approximates
// tanh(STATES/2 * x). The counter form is this design's choice; the neuron
// needs a non-linearity of this kind.
//
// Timing: o_bit is a register output (decided from the state after the last
// edge). Reset puts the counter in the middle, output value 0 (probability
// 1/2 on average afterwards).
module stoch_tanh #(
  parameter int unsigned STATES = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_bit,
  output logic o_bit
);
  localparam int unsigned CW = $clog2(STATES);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) cnt <= CW'(STATES / 2);
    else if (in_bit && cnt != CW'(STATES - 1)) cnt <= cnt + 1'b1;
    else if (!in_bit && cnt != '0)              cnt <= cnt - 1'b1;
  end

  assign o_bit = (cnt >= CW'(STATES / 2));
endmodule
