`timescale 1ps/1ps
// avos_top: the two benchmark filters, each under both energy-quality scaling
// schemes, side by side for comparison under voltage over-scaling.
//
//   FIR + RPR-ANT   fir_ant_*    16th-order FIR, reduced-precision replica
//   IIR + RPR-ANT   iir_ant_*    8th-order IIR, reduced-precision replica
//   FIR + AED-C     fir_aedc_*   FIR with TunED sensors, EMU and PMU
//   IIR + AED-C     iir_aedc_*   IIR with TunED sensors, EMU and PMU
//
// ANT runs at a fixed supply, ant_vdd_mv, applied to both ANT filters: each
// input is taken on every clock and the output comes two cycles later, with the
// replica's value substituted where main and replica differ by more than the
// e_th threshold. AED-C closes its own loop: each AED-C filter has its own
// supply target (fir_aedc_vdd_mv, iir_aedc_vdd_mv) set every 1000 cycles from
// its error count, and its input is taken only on clock edges where
// *_aedc_take = 1 (one edge is withheld per detected error).
//
// For simulation, each filter's main datapath output passes through a
// vos_delay_model that delays every bit according to the supply it runs at, so
// that lowering the supply produces real late arrivals. Without it (tie each
// *_next to its *_arrive) the four blocks are plain synchronous logic apart
// from the AED-C delay lines. The delay model's numbers are assumptions.
module avos_top
  import avos_pkg::*;
#(
  parameter int unsigned FIR_BR = FIR_BR_DEFAULT,
  parameter int unsigned IIR_BR = IIR_BR_DEFAULT,
  parameter int unsigned N      = MON_PERIOD,
  parameter int unsigned CW     = $clog2(N + 1),
  parameter int unsigned AT_MIN_PS = 150,
  parameter int unsigned AT_MAX_PS = 880
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // ANT side
  input  vdd_mv_t                      ant_vdd_mv,
  input  logic signed [FIR_IN_W-1:0]   fir_ant_x,
  input  logic        [FIR_OUT_W-1:0]  fir_ant_e_th,
  output logic signed [FIR_OUT_W-1:0]  fir_ant_y,
  output logic                         fir_ant_err,
  input  logic signed [IIR_IN_W-1:0]   iir_ant_x,
  input  logic        [IIR_OUT_W-1:0]  iir_ant_e_th,
  output logic signed [IIR_OUT_W-1:0]  iir_ant_y,
  output logic                         iir_ant_err,
  // AED-C side
  input  logic signed [FIR_IN_W-1:0]   fir_aedc_x,
  output logic                         fir_aedc_take,
  input  logic [15:0]                  fir_aedc_tdw_ps,
  output logic signed [FIR_OUT_W-1:0]  fir_aedc_y,
  output logic                         fir_aedc_err,
  output logic [CW-1:0]                fir_aedc_ne,
  output logic                         fir_aedc_ne_valid,
  output vdd_mv_t                      fir_aedc_vdd_mv,
  input  logic signed [IIR_IN_W-1:0]   iir_aedc_x,
  output logic                         iir_aedc_take,
  input  logic [15:0]                  iir_aedc_tdw_ps,
  output logic signed [IIR_OUT_W-1:0]  iir_aedc_y,
  output logic                         iir_aedc_err,
  output logic [CW-1:0]                iir_aedc_ne,
  output logic                         iir_aedc_ne_valid,
  output vdd_mv_t                      iir_aedc_vdd_mv
);

  // ---------------- RPR-ANT ----------------
  logic signed [FIR_OUT_W-1:0] fir_ant_next, fir_ant_arrive;
  logic signed [IIR_OUT_W-1:0] iir_ant_next, iir_ant_arrive;

  rpr_ant #(.IS_IIR(1'b0), .BR(FIR_BR)) u_fir_ant (
    .clk, .rst_n, .x(fir_ant_x), .e_th(fir_ant_e_th),
    .ym_next(fir_ant_next), .ym_arrive(fir_ant_arrive),
    .y(fir_ant_y), .ant_err(fir_ant_err));

  vos_delay_model #(.W(FIR_OUT_W), .AT_MIN_PS(AT_MIN_PS), .AT_MAX_PS(AT_MAX_PS)) u_fir_ant_vos (
    .din(fir_ant_next), .vdd_mv(ant_vdd_mv), .dout(fir_ant_arrive));

  rpr_ant #(.IS_IIR(1'b1), .BR(IIR_BR)) u_iir_ant (
    .clk, .rst_n, .x(iir_ant_x), .e_th(iir_ant_e_th),
    .ym_next(iir_ant_next), .ym_arrive(iir_ant_arrive),
    .y(iir_ant_y), .ant_err(iir_ant_err));

  vos_delay_model #(.W(IIR_OUT_W), .AT_MIN_PS(AT_MIN_PS), .AT_MAX_PS(AT_MAX_PS)) u_iir_ant_vos (
    .din(iir_ant_next), .vdd_mv(ant_vdd_mv), .dout(iir_ant_arrive));

  // ---------------- AED-C ----------------
  logic signed [FIR_OUT_W-1:0] fir_aedc_next, fir_aedc_arrive;
  logic signed [IIR_OUT_W-1:0] iir_aedc_next, iir_aedc_arrive;

  aedc #(.IS_IIR(1'b0), .N(N), .CW(CW), .AT_MIN_PS(AT_MIN_PS)) u_fir_aedc (
    .ref_clk(clk), .rst_n, .x(fir_aedc_x), .in_take(fir_aedc_take),
    .tdw_ps(fir_aedc_tdw_ps), .y_next(fir_aedc_next), .y_arrive(fir_aedc_arrive),
    .y(fir_aedc_y), .err_any(fir_aedc_err), .ne(fir_aedc_ne),
    .ne_valid(fir_aedc_ne_valid), .vdd_mv(fir_aedc_vdd_mv));

  vos_delay_model #(.W(FIR_OUT_W), .AT_MIN_PS(AT_MIN_PS), .AT_MAX_PS(AT_MAX_PS)) u_fir_aedc_vos (
    .din(fir_aedc_next), .vdd_mv(fir_aedc_vdd_mv), .dout(fir_aedc_arrive));

  aedc #(.IS_IIR(1'b1), .N(N), .CW(CW), .AT_MIN_PS(AT_MIN_PS)) u_iir_aedc (
    .ref_clk(clk), .rst_n, .x(iir_aedc_x), .in_take(iir_aedc_take),
    .tdw_ps(iir_aedc_tdw_ps), .y_next(iir_aedc_next), .y_arrive(iir_aedc_arrive),
    .y(iir_aedc_y), .err_any(iir_aedc_err), .ne(iir_aedc_ne),
    .ne_valid(iir_aedc_ne_valid), .vdd_mv(iir_aedc_vdd_mv));

  vos_delay_model #(.W(IIR_OUT_W), .AT_MIN_PS(AT_MIN_PS), .AT_MAX_PS(AT_MAX_PS)) u_iir_aedc_vos (
    .din(iir_aedc_next), .vdd_mv(iir_aedc_vdd_mv), .dout(iir_aedc_arrive));

endmodule
