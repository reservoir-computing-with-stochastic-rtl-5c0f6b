// Bitstream generator (probability encoder) built from one LUT-RAM.
//
// The 16-bit value code is stored in a 16x1 LUT-RAM that is read through four
// address bitstreams A3..A0. Address k is chosen with probability close to
// 2^-(16-k), so the LUT emits a bitstream whose probability of a 1 is the
// stored word read as a binary fraction (bit 15 carries 1/2). This follows the
// published encoder layout: address 1111 holds the most significant bit.
//
// Interface: load/p write a new value on the rising edge; o_bit is
// combinational in a.
module bs_gen (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  logic [15:0] p,
  input  logic [3:0]  a,
  output logic        o_bit
);
  lut_ram16 u_lut (
    .clk  (clk),
    .rst_n(rst_n),
    .we   (load),
    .wdata(p),
    .addr (a),
    .q    (o_bit)
  );
endmodule
