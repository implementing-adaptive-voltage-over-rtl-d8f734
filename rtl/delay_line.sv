`timescale 1ps/1ps
// delay_line: behavioural model (not synthesizable) of the tunable delay line
// used twice in the AED-C scheme: as the Tunable Detection Window (TDW) that
// delays the clock of a TunED sensor's shadow element, and as the Tunable Delay
// Line (TDL) inserted in front of each monitored end-point to pad short paths.
//
// The real part is analog: two inverters with a transmission gate between
// them whose on-resistance is set by a control voltage V_delay (a higher
// V_delay gives a shorter delay). Here the control is a digital word,
// delay_ps, that gives the resulting delay directly in picoseconds; the
// conversion from V_delay to delay is left to the circuit that drives it.
//
// Each bit is delayed independently with inertial semantics, as a chain of
// gates would: an edge of din[i] reappears on dout[i] delay_ps later, and a
// pulse shorter than the delay is absorbed.
module delay_line #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] din,
  input  logic [15:0]  delay_ps,
  output logic [W-1:0] dout
);

  // Every output bit is first driven at 1 ps, so that a line whose input never
  // changes still settles to it: the expression below changes for all bits
  // when start rises.
  logic start = 1'b0;
  initial #1 start = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign #(delay_ps) dout[i] = start ? din[i] : !din[i];
  end

endmodule
