// The reservoir: N stochastic neurons in a sparse small-world network.
//
// Neuron n has K_REC + 1 synapses. Synapse 0 takes the external input
// bitstream u_bit; synapse k + 1 takes fb_bits[sw_src(n, k)], the bitstream of
// a neighbouring neuron's state from the previous timestep (re-encoded outside
// this module). sw_src is a ring lattice with a few rewired long-range links;
// the exact graph is this design's choice, the size (25 neurons) and the
// small-world character are the published ones.
//
// Interface: a weight write (w_we, w_idx = n*(K_REC+1) + s, w_data) loads one
// synapse. x_bits[n] is neuron n's output bitstream, one bit per cycle.
module reservoir #(
  parameter int unsigned N      = 25,
  parameter int unsigned K_REC  = 4,
  parameter int unsigned STATES = 16,
  localparam int unsigned M     = K_REC + 1,
  localparam int unsigned IW    = $clog2(N * M)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          w_we,
  input  logic [IW-1:0] w_idx,
  input  logic [7:0]    w_data,
  input  logic          u_bit,
  input  logic [N-1:0]  fb_bits,
  output logic [N-1:0]  x_bits
);
  import rc_pkg::*;

  for (genvar n = 0; n < N; n++) begin : g_neu
    logic [M-1:0] ins;
    logic [M-1:0] we;

    assign ins[0] = u_bit;
    for (genvar k = 0; k < K_REC; k++) begin : g_in
      localparam int unsigned SRC = sw_src(n, k, N, K_REC);
      assign ins[k+1] = fb_bits[SRC];
    end

    for (genvar s = 0; s < M; s++) begin : g_we
      assign we[s] = w_we && (w_idx == IW'(n * M + s));
    end

    stoch_neuron #(.M(M), .STATES(STATES), .SEED(n + 1)) u_neu (
      .clk(clk), .rst_n(rst_n), .w_we(we), .w_data(w_data),
      .in_bits(ins), .o_bit(x_bits[n])
    );
  end
endmodule
