`timescale 1ps/1ps
// pmu: Power Management Unit closing the adaptive voltage over-scaling loop.
//
// At the end of each monitoring period the error management unit reports N_e,
// the number of error events in the last N cycles. If N_e is below the error
// threshold ER_th * N, timing slack is assumed and the supply target drops by
// one step; otherwise it rises by one step. The target stays within
// [VDD_MIN_MV, VDD_MAX_MV] and starts at VDD_MAX_MV after reset.
//
// Interface: ne/ne_valid from emu; vdd_mv is the supply target in millivolts
// for the regulator (the regulator itself is outside this design). It changes
// on the rising clock edge after ne_valid.
//
// The decision rule, the 0.60-1.10 V range, the 20 mV step, N = 1000 and
// ER_th = 2 % follow the design description; starting from the top of the
// range and moving by a single step per period are this design's choices.
module pmu
  import avos_pkg::*;
#(
  parameter int unsigned N         = MON_PERIOD,
  parameter int unsigned ER_TH_PCT_P = ER_TH_PCT,
  parameter int unsigned CW        = $clog2(N + 1),
  parameter vdd_mv_t     MIN_MV    = VDD_MIN_MV,
  parameter vdd_mv_t     MAX_MV    = VDD_MAX_MV,
  parameter vdd_mv_t     STEP_MV   = VDD_STEP_MV
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] ne,
  input  logic          ne_valid,
  output vdd_mv_t       vdd_mv
);

  localparam int unsigned NE_TH = N * ER_TH_PCT_P / 100;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd_mv <= MAX_MV;
    end else if (ne_valid) begin
      if (32'(ne) < NE_TH) vdd_mv <= (vdd_mv >= MIN_MV + STEP_MV) ? vdd_mv - STEP_MV : MIN_MV;
      else                 vdd_mv <= (vdd_mv + STEP_MV <= MAX_MV) ? vdd_mv + STEP_MV : MAX_MV;
    end
  end

endmodule
