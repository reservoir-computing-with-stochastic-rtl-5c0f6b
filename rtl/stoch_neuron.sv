// Stochastic bitstream neuron: weighted sum followed by a non-linearity.
//
// Each of the M input bitstreams is multiplied by its own weight in a LUT-RAM
// synapse (bipolar XNOR coding); a random multiplexer forms the scaled sum
// (1/M) * sum(w_i * x_i); a saturating-counter non-linearity turns the sum
// into the output bitstream, about tanh(STATES/2 * sum/M) in bipolar coding.
// The neuron owns its address generator and its multiplexer generator, both
// seeded from SEED, so that neurons do not share random sequences.
//
// Interface: w_we[i] loads w_data into synapse i. o_bit is a registered
// bitstream, one bit per clock cycle.
module stoch_neuron #(
  parameter int unsigned M      = 5,
  parameter int unsigned STATES = 16,
  parameter int unsigned SEED   = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] w_we,
  input  logic [7:0]   w_data,
  input  logic [M-1:0] in_bits,
  output logic         o_bit
);
  logic [2:0]   a;
  logic [M-1:0] prod;
  logic         sum_bit;

  addr_gen #(.NLINES(3), .SEED(SEED)) u_addr (
    .clk(clk), .rst_n(rst_n), .a(a)
  );

  for (genvar i = 0; i < M; i++) begin : g_syn
    stoch_synapse #(.BIPOLAR(1'b1)) u_syn (
      .clk(clk), .rst_n(rst_n), .we(w_we[i]), .weight(w_data),
      .a(a), .i_bit(in_bits[i]), .o_bit(prod[i])
    );
  end

  stoch_adder #(.M(M), .SEED(SEED)) u_sum (
    .clk(clk), .rst_n(rst_n), .in_bits(prod), .o_bit(sum_bit)
  );

  stoch_tanh #(.STATES(STATES)) u_act (
    .clk(clk), .rst_n(rst_n), .in_bit(sum_bit), .o_bit(o_bit)
  );
endmodule
