// 16x1 LUT-RAM, the storage element behind every multiplier and encoder.
//
// Four address bits select one of sixteen stored bits; the read is
// combinational, as in an FPGA distributed-RAM LUT. Writing replaces the whole
// 16-bit content in one clock edge (this design's choice; an FPGA LUT-RAM
// would take one bit per cycle). The content resets to all zeros.
//
// Interface: we/wdata write on the rising edge of clk; q = mem[addr] at once.
module lut_ram16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [15:0] wdata,
  input  logic [3:0]  addr,
  output logic        q
);
  logic [15:0] mem;

  always_ff @(posedge clk) begin
    if (!rst_n)  mem <= '0;
    else if (we) mem <= wdata;
  end

  assign q = mem[addr];
endmodule
