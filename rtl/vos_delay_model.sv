`timescale 1ps/1ps
// vos_delay_model: behavioural model (not synthesizable) of the arrival times
// of a logic cone's outputs under voltage over-scaling.
//
// It stands for the timing that a gate-level simulation with supply-dependent
// back-annotated delays would show: every output bit of a combinational block
// reaches its end-point some time after the clock edge that launched it, and
// that time grows as the supply drops. Bit i of a W-bit arithmetic result is
// given a nominal arrival time rising linearly from AT_MIN_PS (bit 0) to
// AT_MAX_PS (bit W-1), modelling the carry chain that ends at the MSBs, and
// that time is scaled by the alpha-power law
//     s(V) = (V / (V - VTH)^ALPHA) / (VNOM / (VNOM - VTH)^ALPHA).
// A bit that does not change produces no event, so rarely-toggling MSBs (the
// long paths) are rarely exercised, which is what timing speculation relies on.
//
// Interface: din is the zero-delay combinational output, vdd_mv the present
// supply in millivolts (held to the 0.60-1.10 V range), dout the same bits as they arrive at the end-point
// (inertial delay, per bit: a glitch shorter than the path delay is absorbed). All numbers here are modelling assumptions, not
// properties of a real library: VTH = 0.35 V, ALPHA = 1.3, VNOM = 1.10 V.
module vos_delay_model
  import avos_pkg::*;
#(
  parameter int unsigned W         = 24,
  parameter int unsigned AT_MIN_PS = 150,
  parameter int unsigned AT_MAX_PS = 880
) (
  input  logic [W-1:0] din,
  input  vdd_mv_t      vdd_mv,
  output logic [W-1:0] dout
);

  localparam real VTH   = 0.35;
  localparam real ALPHA = 1.3;
  localparam real VNOM  = 1.10;

  function automatic real scale(input vdd_mv_t mv);
    real v;
    // Outside the modelled supply range the delay of its nearest end is used
    // (this also keeps an unreset supply register at power-up harmless).
    v = real'(mv) / 1000.0;
    if (mv < VDD_MIN_MV) v = real'(VDD_MIN_MV) / 1000.0;
    if (mv > VDD_MAX_MV) v = real'(VDD_MAX_MV) / 1000.0;
    return (v / ((v - VTH) ** ALPHA)) / (VNOM / ((VNOM - VTH) ** ALPHA));
  endfunction

  // Every output bit is first driven at 1 ps, so that a line whose input never
  // changes still settles to it: the expression below changes for all bits
  // when start rises.
  logic start = 1'b0;
  initial #1 start = 1'b1;

  for (genvar i = 0; i < W; i++) begin : g_bit
    localparam real AT_NOM = real'(AT_MIN_PS)
                           + real'(AT_MAX_PS - AT_MIN_PS) * real'(i) / real'((W > 1) ? W - 1 : 1);
    real dly;
    always_comb dly = AT_NOM * scale(vdd_mv);
    assign #(dly) dout[i] = start ? din[i] : !din[i];
  end

endmodule
