// Window (timestep) controller.
//
// One timestep of the network lasts one window of 2^WIN_LOG2 clock cycles,
// the window over which values are converted to and from bitstreams. While
// run is high the controller starts windows back to back; a window that has
// begun always completes. load marks the edge on which the encoders must take
// their values for the window that begins on the next cycle: the edge before
// the first window, and the last edge of every window that is followed by
// another. first is high on the load edge before the very first window after
// reset or idle.
//
// Timing: last is high on the final cycle of a window, active on all of its
// cycles.
module window_ctrl #(
  parameter int unsigned WIN_LOG2 = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic active,
  output logic last,
  output logic load,
  output logic first
);
  logic [WIN_LOG2-1:0] ctr;

  assign last  = active && (ctr == '1);
  assign first = !active && run;
  assign load  = run && (!active || last);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      ctr    <= '0;
    end else if (!active) begin
      active <= run;
      ctr    <= '0;
    end else begin
      ctr <= ctr + 1'b1;
      if (last) active <= run;
    end
  end
endmodule
