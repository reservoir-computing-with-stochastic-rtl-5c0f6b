// Linear readout built from the same LUT-RAM multipliers as the neurons.
//
// For each of the NOUT outputs, N bipolar LUT-RAM synapses weight the neuron
// bitstreams and a random multiplexer forms their scaled sum, so output o's
// bitstream encodes (1/N) * sum_n w[o][n] * x[n] in bipolar coding. The sum
// is converted to a value downstream, by counting over the window. The use of
// LUT-RAM multipliers follows the published readout; the multiplexer sum and
// the absence of a bias term are this design's choices.
//
// Interface: a weight write (w_we, w_idx = o*N + n, w_data) loads one synapse.
// y_bits is combinational in x_bits.
module readout #(
  parameter int unsigned N    = 25,
  parameter int unsigned NOUT = 2,
  localparam int unsigned IW  = (N * NOUT > 1) ? $clog2(N * NOUT) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            w_we,
  input  logic [IW-1:0]   w_idx,
  input  logic [7:0]      w_data,
  input  logic [N-1:0]    x_bits,
  output logic [NOUT-1:0] y_bits
);
  for (genvar o = 0; o < NOUT; o++) begin : g_out
    logic [2:0]   a;
    logic [N-1:0] prod;

    addr_gen #(.NLINES(3), .SEED(1000 + o)) u_addr (
      .clk(clk), .rst_n(rst_n), .a(a)
    );

    for (genvar n = 0; n < N; n++) begin : g_syn
      stoch_synapse #(.BIPOLAR(1'b1)) u_syn (
        .clk(clk), .rst_n(rst_n),
        .we(w_we && (w_idx == IW'(o * N + n))), .weight(w_data),
        .a(a), .i_bit(x_bits[n]), .o_bit(prod[n])
      );
    end

    stoch_adder #(.M(N), .SEED(2000 + o)) u_sum (
      .clk(clk), .rst_n(rst_n), .in_bits(prod), .o_bit(y_bits[o])
    );
  end
endmodule
