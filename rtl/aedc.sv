`timescale 1ps/1ps
// aedc: a benchmark filter run under Approximate Error Detection-Correction
// (AED-C), the adaptive voltage over-scaling scheme built on tunable timing
// sensors.
//
// The filter (FIR when IS_IIR = 0, IIR when IS_IIR = 1) has its output
// end-point register replaced by a bank of TunED sensors. In front of every
// sensor a tunable delay line (TDL) pads the short paths: its delay follows
// TDL = TDW - AT_min, so that even the fastest path arrives after the detection
// window and cannot raise a false error. The sensors' shadow elements are
// clocked by the circuit clock delayed by the tunable detection window (TDW).
// A narrow window misses more late arrivals, reports a lower error rate and so
// lets the supply fall further, trading output quality for energy; a window of
// half the clock period behaves like classic Razor.
// The sensor flags are OR-ed into err_any; the error management unit withholds
// one clock edge per error (one lost cycle) and counts errors per monitoring
// period; the power management unit turns that count into a supply target,
// vdd_mv. The IIR filter feeds back the corrected sensor outputs.
//
// Interface: x is taken on every rising ref_clk edge at which in_take = 1 and
// must be held otherwise. tdw_ps is the detection window in picoseconds (the
// delay-line setting). y_next/y_arrive: the filter's combinational output leaves
// and comes back; in silicon the same wire, in simulation a supply-dependent
// delay model driven by vdd_mv sits between them. y is valid one window after
// each circuit clock edge. The delay lines are behavioural models, so this
// module as a whole is for simulation; the rest is synthesizable.
//
// Structure follows the AED-C description; AT_MIN_PS (the shortest arrival the
// TDL must pad, taken from the delay model) and the HOLD_MARGIN_PS added to
// the TDL are this design's choices.
module aedc
  import avos_pkg::*;
#(
  parameter bit          IS_IIR         = 1'b0,
  parameter int unsigned IN_W           = IS_IIR ? IIR_IN_W : FIR_IN_W,
  parameter int unsigned YW             = IN_W + (IS_IIR ? IIR_GAIN_W : FIR_COEF_W),
  parameter int unsigned N              = MON_PERIOD,
  parameter int unsigned AT_MIN_PS      = 150,
  parameter int unsigned HOLD_MARGIN_PS = 20,
  parameter int unsigned CW             = $clog2(N + 1)
) (
  input  logic                   ref_clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] x,
  output logic                   in_take,
  input  logic [15:0]            tdw_ps,
  output logic signed [YW-1:0]   y_next,
  input  logic signed [YW-1:0]   y_arrive,
  output logic signed [YW-1:0]   y,
  output logic                   err_any,
  output logic [CW-1:0]          ne,
  output logic                   ne_valid,
  output vdd_mv_t                vdd_mv
);

  logic          gclk;
  logic          clk_tdw;
  logic [15:0]   tdl_ps;
  logic [YW-1:0] d_pad;
  logic [YW-1:0] err;

  // Dynamic short-path padding, TDL = TDW - AT_min (never negative).
  assign tdl_ps = (32'(tdw_ps) + HOLD_MARGIN_PS > AT_MIN_PS)
                ? 16'(32'(tdw_ps) + HOLD_MARGIN_PS - AT_MIN_PS) : 16'd0;

  if (IS_IIR) begin : g_iir
    iir_filter #(.IN_W(IN_W), .OUT_W(YW)) u_filter (
      .clk(gclk), .rst_n, .x, .y_q(y), .y_next);
  end else begin : g_fir
    fir_filter #(.IN_W(IN_W), .OUT_W(YW)) u_filter (
      .clk(gclk), .rst_n, .x, .y_next);
  end

  delay_line #(.W(YW)) u_tdl (.din(y_arrive), .delay_ps(tdl_ps), .dout(d_pad));
  delay_line #(.W(1))  u_tdw (.din(gclk),     .delay_ps(tdw_ps), .dout(clk_tdw));

  tuned_sensor #(.W(YW)) u_sensors (
    .clk(gclk), .clk_tdw, .rst_n, .d(d_pad), .q(y), .err);

  assign err_any = |err;

  emu #(.N(N), .CW(CW)) u_emu (
    .ref_clk, .rst_n, .err_any, .gclk, .clk_en(in_take), .ne, .ne_valid);

  pmu #(.N(N), .CW(CW)) u_pmu (
    .clk(ref_clk), .rst_n, .ne, .ne_valid, .vdd_mv);

endmodule
