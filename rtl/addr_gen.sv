// Address bitstream generator for the LUT-RAM multipliers and encoders.
//
// Produces NLINES bitstreams; line i is 1 with probability a_i, where the a_i
// are the address probabilities of the three-line synapse (NLINES = 3) or of
// the four-line probability encoder (NLINES = 4). Each line has its own 32-bit
// xorshift generator; its upper 16 bits are compared with round(a_i * 65536).
// How the streams are generated is this design's choice; the probabilities
// themselves are the published ones.
//
// Timing: a new address word every clock cycle, registered (a changes right
// after the rising edge). SEED selects the generators' start states.
module addr_gen #(
  parameter int unsigned NLINES = 3,
  parameter int unsigned SEED   = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic [NLINES-1:0] a
);
  import rc_pkg::*;

  logic [31:0] st [NLINES];

  function automatic logic [15:0] thr(input int unsigned i);
    return (NLINES == 4) ? A4_THR[i] : A3_THR[i];
  endfunction

  initial begin
    assert (NLINES == 3 || NLINES == 4)
      else $error("addr_gen: NLINES must be 3 or 4");
  end

  for (genvar i = 0; i < NLINES; i++) begin : g_line
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        st[i] <= seed_of(SEED * 8 + i);
        a[i]  <= 1'b0;
      end else begin
        st[i] <= xorshift32(st[i]);
        a[i]  <= (st[i][31:16] < thr(i));
      end
    end
  end
endmodule
