`timescale 1ps/1ps
// tb_avos_top: end-to-end run of all four filter/scheme pairs at the design's
// default parameters (650 MHz, 1000-cycle monitoring period, 2 % error-rate
// threshold, 5-bit replicas, 150..880 ps nominal arrival times).
//
// RPR-ANT (both filters, shared fixed supply):
//   first third at 1.10 V: no timing errors, the output must equal the
//   reference filter exactly; e_th is the largest main/replica gap of this
//   stream (formula (1) of the ANT method), computed here beforehand;
//   then 0.64 V: the long paths fail, the replica must be substituted, and the
//   output must always stay within e_th of the fault-free replica.
// AED-C (FIR with a 25 % window, IIR with 35 %, each with its own loop):
//   the supply must fall from 1.10 V, timing errors must be detected and
//   corrected with one withheld edge each, the supply must also rise at least
//   once (error count at or above threshold), and the throughput (inputs taken
//   per cycle) must stay at or above 0.95. Output samples that differ from the
//   reference are errors the narrowed window let through; they are counted and
//   reported as quality (NRMSE), not failed.
// Every mechanism is counted and a mechanism that never happened is a failure.
module tb_avos_top;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int T = TCLK_PS;
  localparam int CYCLES = 36000;
  localparam int LOW_AT = CYCLES / 3;
  localparam int BR = FIR_BR_DEFAULT;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #(T/2) clk = ~clk;

  vdd_mv_t ant_vdd_mv = 11'd1100;
  logic signed [11:0] fa_x = '0, fc_x = '0;
  logic signed [15:0] ia_x = '0, ic_x = '0;
  logic        [23:0] fa_th;
  logic        [31:0] ia_th;
  logic signed [23:0] fa_y, fc_y;
  logic signed [31:0] ia_y, ic_y;
  logic fa_err, ia_err, fc_take, ic_take, fc_err, ic_err, fc_nev, ic_nev;
  logic [9:0] fc_ne, ic_ne;
  vdd_mv_t fc_vdd, ic_vdd;

  avos_top dut (
    .clk, .rst_n, .ant_vdd_mv,
    .fir_ant_x(fa_x), .fir_ant_e_th(fa_th), .fir_ant_y(fa_y), .fir_ant_err(fa_err),
    .iir_ant_x(ia_x), .iir_ant_e_th(ia_th), .iir_ant_y(ia_y), .iir_ant_err(ia_err),
    .fir_aedc_x(fc_x), .fir_aedc_take(fc_take), .fir_aedc_tdw_ps(16'(T * 25 / 100)),
    .fir_aedc_y(fc_y), .fir_aedc_err(fc_err), .fir_aedc_ne(fc_ne),
    .fir_aedc_ne_valid(fc_nev), .fir_aedc_vdd_mv(fc_vdd),
    .iir_aedc_x(ic_x), .iir_aedc_take(ic_take), .iir_aedc_tdw_ps(16'(T * 35 / 100)),
    .iir_aedc_y(ic_y), .iir_aedc_err(ic_err), .iir_aedc_ne(ic_ne),
    .iir_aedc_ne_valid(ic_nev), .iir_aedc_vdd_mv(ic_vdd));

  // ANT streams and references, built before the run.
  longint fa_xs[$], fa_xr[$], ia_xs[$], ia_xr[$], ia_ys[$], ia_yr[$];
  longint fa_main[CYCLES], fa_rep[CYCLES], ia_main[CYCLES], ia_rep[CYCLES];
  // AED-C histories.
  longint fc_xs[$], ic_xs[$], ic_ys[$];

  int walk_fa = 0, walk_ia = 0, walk_fc = 0, walk_ic = 0;
  int n_ant_sub_fir = 0, n_ant_sub_iir = 0;
  int fc_taken = 0, ic_taken = 0, fc_errs = 0, ic_errs = 0, fc_halts = 0, ic_halts = 0;
  int fc_down = 0, fc_up = 0, ic_down = 0, ic_up = 0, fc_periods = 0, ic_periods = 0;
  int fc_prev = 1100, ic_prev = 1100, fc_min = 1100, ic_min = 1100;
  longint fc_vsum = 0, ic_vsum = 0;
  int fc_bad = 0, ic_bad = 0;
  real fc_se = 0.0, ic_se = 0.0;
  longint fc_ymax = 0, fc_ymin = 0, ic_ymax = 0, ic_ymin = 0;

  function automatic int step_walk(int w, int span, int lim);
    w += int'($urandom_range(0, 2 * span)) - span;
    if (w > lim - 1) w = lim - 1;
    if (w < -lim) w = -lim;
    return w;
  endfunction

  function automatic longint absl(longint v);
    return (v < 0) ? -v : v;
  endfunction

  initial begin
    longint gap_f = 0, gap_i = 0;
    for (int n = 0; n < CYCLES; n++) begin
      walk_fa = step_walk(walk_fa, 150, 2048);
      walk_ia = step_walk(walk_ia, 1500, 32768);
      fa_xs.push_back(walk_fa); fa_xr.push_back(walk_fa >>> (12 - BR));
      ia_xs.push_back(walk_ia); ia_xr.push_back(walk_ia >>> (16 - BR));
      fa_main[n] = fir_ref(fa_xs, n);
      fa_rep[n]  = fir_ref(fa_xr, n) <<< (12 - BR);
      ia_ys.push_back(iir_ref(ia_xs, ia_ys, n, 32));
      ia_yr.push_back(iir_ref(ia_xr, ia_yr, n, BR + 16));
      ia_main[n] = ia_ys[n];
      ia_rep[n]  = ia_yr[n] <<< (16 - BR);
      if (absl(fa_main[n] - fa_rep[n]) > gap_f) gap_f = absl(fa_main[n] - fa_rep[n]);
      if (absl(ia_main[n] - ia_rep[n]) > gap_i) gap_i = absl(ia_main[n] - ia_rep[n]);
    end
    fa_th = 24'(gap_f);
    ia_th = 32'(gap_i);
    $display("ANT thresholds: FIR e_th %0d, IIR e_th %0d", gap_f, gap_i);

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES + 3; c++) begin
      fa_x = (c < CYCLES) ? 12'(fa_xs[c]) : '0;
      ia_x = (c < CYCLES) ? 16'(ia_xs[c]) : '0;
      ant_vdd_mv = (c < LOW_AT) ? 11'd1100 : 11'd640;
      @(posedge clk);
      // ---- ANT outputs: the value before edge c belongs to input c-3 ----
      if (c >= 3 && c - 3 < CYCLES) begin
        automatic int n = c - 3;
        checks += 2;
        if (n < LOW_AT - 3) begin
          if (longint'(fa_y) != fa_main[n] || fa_err) begin
            failures++;
            if (failures < 10) $display("ANT FIR %0d: %0d exp %0d", n, fa_y, fa_main[n]);
          end
          if (longint'(ia_y) != ia_main[n] || ia_err) begin
            failures++;
            if (failures < 10) $display("ANT IIR %0d: %0d exp %0d", n, ia_y, ia_main[n]);
          end
        end else begin
          if (absl(longint'(fa_y) - fa_rep[n]) > gap_f) begin
            failures++;
            if (failures < 10) $display("ANT FIR %0d: %0d beyond e_th of replica %0d", n, fa_y, fa_rep[n]);
          end
          if (absl(longint'(ia_y) - ia_rep[n]) > gap_i) begin
            failures++;
            if (failures < 10) $display("ANT IIR %0d: %0d beyond e_th of replica %0d", n, ia_y, ia_rep[n]);
          end
        end
        n_ant_sub_fir += int'(fa_err);
        n_ant_sub_iir += int'(ia_err);
      end
      // ---- AED-C ----
      if (fc_take) begin
        fc_xs.push_back(longint'(fc_x));
        if (fc_taken >= 3) begin
          longint e, d;
          e = fir_ref(fc_xs, fc_taken - 3);
          d = longint'(fc_y) - e;
          if (d != 0) fc_bad++;
          fc_se += real'(d) * real'(d);
          if (e > fc_ymax) fc_ymax = e;
          if (e < fc_ymin) fc_ymin = e;
        end
        fc_taken++;
      end else fc_halts++;
      if (ic_take) begin
        ic_xs.push_back(longint'(ic_x));
        if (ic_taken >= 3) begin
          longint e, d;
          e = iir_ref(ic_xs, ic_ys, ic_taken - 3, 32);
          ic_ys.push_back(e);
          d = longint'(ic_y) - e;
          if (d != 0) ic_bad++;
          ic_se += real'(d) * real'(d);
          if (e > ic_ymax) ic_ymax = e;
          if (e < ic_ymin) ic_ymin = e;
        end
        ic_taken++;
      end else ic_halts++;
      if (fc_nev) begin fc_errs += int'(fc_ne); fc_periods++; end
      if (ic_nev) begin ic_errs += int'(ic_ne); ic_periods++; end
      #1;
      if (fc_take) begin walk_fc = step_walk(walk_fc, 150, 2048); fc_x = 12'(walk_fc); end
      if (ic_take) begin walk_ic = step_walk(walk_ic, 1500, 32768); ic_x = 16'(walk_ic); end
      if (int'(fc_vdd) < fc_prev) fc_down++;
      if (int'(fc_vdd) > fc_prev) fc_up++;
      if (int'(ic_vdd) < ic_prev) ic_down++;
      if (int'(ic_vdd) > ic_prev) ic_up++;
      fc_prev = int'(fc_vdd); ic_prev = int'(ic_vdd);
      if (fc_prev < fc_min) fc_min = fc_prev;
      if (ic_prev < ic_min) ic_min = ic_prev;
      fc_vsum += fc_prev; ic_vsum += ic_prev;
    end

    $display("ANT: replica substituted FIR %0d, IIR %0d times (at 0.64 V)", n_ant_sub_fir, n_ant_sub_iir);
    $display("AED-C FIR (25%% window): OPC %0.4f, errors %0d, halts %0d, periods %0d, vdd avg %0d min %0d mV, steps down %0d up %0d, outputs off %0d, NRMSE %0.4f%%",
             real'(fc_taken) / real'(CYCLES + 3), fc_errs, fc_halts, fc_periods, int'(fc_vsum / (CYCLES + 3)),
             fc_min, fc_down, fc_up, fc_bad,
             100.0 * $sqrt(fc_se / real'(fc_taken)) / real'(fc_ymax - fc_ymin));
    $display("AED-C IIR (35%% window): OPC %0.4f, errors %0d, halts %0d, periods %0d, vdd avg %0d min %0d mV, steps down %0d up %0d, outputs off %0d, NRMSE %0.4f%%",
             real'(ic_taken) / real'(CYCLES + 3), ic_errs, ic_halts, ic_periods, int'(ic_vsum / (CYCLES + 3)),
             ic_min, ic_down, ic_up, ic_bad,
             100.0 * $sqrt(ic_se / real'(ic_taken)) / real'(ic_ymax - ic_ymin));

    // Mechanisms: each must have happened.
    checks += 12;
    if (n_ant_sub_fir == 0) begin failures++; $display("FIR ANT never substituted"); end
    if (n_ant_sub_iir == 0) begin failures++; $display("IIR ANT never substituted"); end
    if (fc_errs == 0 || fc_halts == 0) begin failures++; $display("FIR AED-C never corrected"); end
    if (ic_errs == 0 || ic_halts == 0) begin failures++; $display("IIR AED-C never corrected"); end
    if (fc_down == 0) begin failures++; $display("FIR AED-C supply never lowered"); end
    if (ic_down == 0) begin failures++; $display("IIR AED-C supply never lowered"); end
    if (fc_up == 0) begin failures++; $display("FIR AED-C supply never raised"); end
    if (ic_up == 0) begin failures++; $display("IIR AED-C supply never raised"); end
    if (fc_periods < CYCLES / 1000 - 1) failures++;
    if (ic_periods < CYCLES / 1000 - 1) failures++;
    if (real'(fc_taken) / real'(CYCLES + 3) < 0.95) begin failures++; $display("FIR AED-C OPC too low"); end
    if (real'(ic_taken) / real'(CYCLES + 3) < 0.95) begin failures++; $display("IIR AED-C OPC too low"); end
    // Each withheld edge is one reported error (up to the unfinished period).
    checks += 2;
    if (fc_halts < fc_errs || fc_halts > fc_errs + 1000) failures++;
    if (ic_halts < ic_errs || ic_halts > ic_errs + 1000) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(T) * (CYCLES + 2000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
