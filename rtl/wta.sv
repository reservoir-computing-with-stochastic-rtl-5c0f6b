// Winner-take-all: reports which of NOUT values is the largest.
//
// Used on the readout values when the readout acts as a discriminant. A
// linear scan keeps the first maximum, so ties go to the lowest index (this
// design's choice).
//
// Interface: purely combinational, vals in, winner out.
module wta #(
  parameter int unsigned NOUT = 2,
  parameter int unsigned W    = 17,
  localparam int unsigned XW  = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic [NOUT-1:0][W-1:0] vals,
  output logic [XW-1:0]          winner
);
  always_comb begin
    logic [W-1:0] best;
    best   = vals[0];
    winner = '0;
    for (int i = 1; i < NOUT; i++) begin
      if (vals[i] > best) begin
        best   = vals[i];
        winner = XW'(i);
      end
    end
  end
endmodule
