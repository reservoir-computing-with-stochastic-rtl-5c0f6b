// Bitstream-to-value converter: counts the ones of a bitstream over a window.
//
// A window is 2^WIN_LOG2 bits long (2^16 in the published experiments). While
// en is high each 1 adds to the running count. On the cycle marked last, the
// total including that cycle's bit is stored in count and the running count
// restarts from zero. total is the combinational sum up to and including the
// current bit, for a consumer that needs the result on the same edge.
// The counter form is this design's choice.
//
// Timing: count changes on the edge that ends the window.
module bs_counter #(
  parameter int unsigned WIN_LOG2 = 16,
  localparam int unsigned CW      = WIN_LOG2 + 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          last,
  input  logic          in_bit,
  output logic [CW-1:0] total,
  output logic [CW-1:0] count
);
  logic [CW-1:0] cur;

  assign total = cur + CW'(en && in_bit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cur   <= '0;
      count <= '0;
    end else if (en && last) begin
      count <= total;
      cur   <= '0;
    end else begin
      cur   <= total;
    end
  end
endmodule
