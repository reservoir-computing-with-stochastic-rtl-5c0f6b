// LUT-RAM synapse: stochastic multiplication of an input bitstream by a weight.
//
// The 8-bit weight code is stored in a 16x1 LUT-RAM whose address is
// {I, A2, A1, A0}. With I = 1 the LUT returns weight bit A; the address
// bitstreams pick bit k with probability close to 2^-(8-k), so the output is
// a bitstream whose probability of a 1 is the weight read as a binary
// fraction (bit 7 carries 1/2). With I = 0 the LUT returns 0 (unipolar coding,
// an AND) or the inverted weight bit (bipolar coding, an XNOR), so that the
// output encodes the product of I and W. This is the published LUT layout.
//
// Interface: load the weight with we (content is rebuilt from it); o_bit is
// combinational in i_bit and a. BIPOLAR selects the coding.
module stoch_synapse #(
  parameter bit BIPOLAR = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we,
  input  logic [7:0] weight,
  input  logic [2:0] a,
  input  logic       i_bit,
  output logic       o_bit
);
  logic [15:0] content;

  always_comb begin
    content[15:8] = weight;                    // I = 1: w
    content[7:0]  = BIPOLAR ? ~weight : 8'h00; // I = 0: not w, or 0
  end

  lut_ram16 u_lut (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (we),
    .wdata(content),
    .addr ({i_bit, a}),
    .q    (o_bit)
  );
endmodule
