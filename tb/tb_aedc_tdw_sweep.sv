`timescale 1ps/1ps
// tb_aedc_tdw_sweep: the AED-C detection-window workload. Both filters run
// under AED-C at eight windows, 15 % to 50 % of the clock period in 5 % steps,
// all at the default loop settings (N = 1000 cycles, ER_th = 2 %, 20 mV
// steps, start at 1.10 V). Sixteen aedc instances, each with its own
// supply-dependent delay model, run side by side on the same synthetic
// three-class audio stream (tb_models_pkg::make_audio, 12-bit for the FIR, the
// same shape scaled by 16 for the IIR).
//
// For each point it reports the figures the scheme is judged by: average and
// lowest supply, OPC (inputs taken per reference cycle), detected errors,
// output samples that differ from the reference filter (missed errors),
// NRMSE (RMS error over the reference's dynamic range) and MAE (log2 of the
// largest error, minus 1).
//
// Checks, from the behaviour the scheme is expected to show:
//   every point lowers the supply below 1.10 V and keeps OPC >= 0.975
//   (2 % threshold, plus the period that detects the overshoot);
//   every withheld edge is a counted error (up to one unfinished period);
//   for each filter the average supply does not rise as the window narrows
//   (10 mV tolerance between neighbours) and is strictly lower at 15 % than
//   at 50 %; NRMSE at 15 % is at least that at 50 %;
//   the FIR at the 50 % window (the Razor-like setting) makes no output error.
// The stream is this design's stand-in for recorded audio; the numbers depend
// on the delay model and are not silicon figures.
module tb_aedc_tdw_sweep;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int T      = TCLK_PS;
  localparam int NP     = 8;
  localparam int CYCLES = 24000;

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #(T/2) clk = ~clk;

  longint sf[$], si[$], gf[$], gi[$];
  longint f_rng = 0, i_rng = 0;

  // Per point p and filter f (0 FIR, 1 IIR).
  int     taken [2][NP];
  int     halts [2][NP];
  int     errs  [2][NP];
  int     bad   [2][NP];
  int     vmin  [2][NP];
  longint vsum  [2][NP];
  longint maxe  [2][NP];
  real    se    [2][NP];

  function automatic longint absl(longint v);
    return (v < 0) ? -v : v;
  endfunction

  logic signed [FIR_IN_W-1:0]  fx   [NP];
  logic signed [IIR_IN_W-1:0]  ix   [NP];
  logic signed [FIR_OUT_W-1:0] fy   [NP];
  logic signed [IIR_OUT_W-1:0] iy   [NP];
  logic                        ftake[NP], itake[NP], fnev[NP], inev[NP];
  logic [9:0]                  fne  [NP], ine[NP];
  vdd_mv_t                     fvdd [NP], ivdd[NP];

  for (genvar p = 0; p < NP; p++) begin : g_pt
    localparam int TDW = T * (15 + 5 * p) / 100;

    logic signed [FIR_OUT_W-1:0] fnext, farr;
    logic signed [IIR_OUT_W-1:0] inext, iarr;
    logic                        ferr, ierr;

    aedc #(.IS_IIR(1'b0)) u_f (
      .ref_clk(clk), .rst_n, .x(fx[p]), .in_take(ftake[p]), .tdw_ps(16'(TDW)),
      .y_next(fnext), .y_arrive(farr), .y(fy[p]), .err_any(ferr), .ne(fne[p]),
      .ne_valid(fnev[p]), .vdd_mv(fvdd[p]));
    vos_delay_model #(.W(FIR_OUT_W)) u_fv (.din(fnext), .vdd_mv(fvdd[p]), .dout(farr));

    aedc #(.IS_IIR(1'b1)) u_i (
      .ref_clk(clk), .rst_n, .x(ix[p]), .in_take(itake[p]), .tdw_ps(16'(TDW)),
      .y_next(inext), .y_arrive(iarr), .y(iy[p]), .err_any(ierr), .ne(ine[p]),
      .ne_valid(inev[p]), .vdd_mv(ivdd[p]));
    vos_delay_model #(.W(IIR_OUT_W)) u_iv (.din(inext), .vdd_mv(ivdd[p]), .dout(iarr));
  end

  // One reference cycle for all points: outputs and in_take are read 2 ps
  // before the edge (in_take then says whether the edge will take x), the
  // next input is presented 1 ps after it where the edge took one.
  task automatic sample_edge();
    for (int p = 0; p < NP; p++) begin
      if (ftake[p]) begin
        if (taken[0][p] >= 3) begin
          longint d = longint'(fy[p]) - gf[taken[0][p] - 3];
          if (d != 0) bad[0][p]++;
          se[0][p] += real'(d) * real'(d);
          if (absl(d) > maxe[0][p]) maxe[0][p] = absl(d);
        end
        taken[0][p]++;
      end else halts[0][p]++;
      if (itake[p]) begin
        if (taken[1][p] >= 3) begin
          longint d = longint'(iy[p]) - gi[taken[1][p] - 3];
          if (d != 0) bad[1][p]++;
          se[1][p] += real'(d) * real'(d);
          if (absl(d) > maxe[1][p]) maxe[1][p] = absl(d);
        end
        taken[1][p]++;
      end else halts[1][p]++;
      if (fnev[p]) errs[0][p] += int'(fne[p]);
      if (inev[p]) errs[1][p] += int'(ine[p]);
    end
  endtask

  task automatic present_inputs();
    for (int p = 0; p < NP; p++) begin
      fx[p] = 12'(sf[taken[0][p]]);
      ix[p] = 16'(si[taken[1][p]]);
      vsum[0][p] += longint'(fvdd[p]);
      vsum[1][p] += longint'(ivdd[p]);
      if (int'(fvdd[p]) < vmin[0][p]) vmin[0][p] = int'(fvdd[p]);
      if (int'(ivdd[p]) < vmin[1][p]) vmin[1][p] = int'(ivdd[p]);
    end
  endtask

  real vavg [2][NP];
  real nrmse[2][NP];

  initial begin
    longint mx;
    longint mn;
    make_audio(sf, CYCLES + 8, 1800);
    foreach (sf[n]) si.push_back(sf[n] * 16);
    for (int n = 0; n < CYCLES + 8; n++) begin
      gf.push_back(fir_ref(sf, n));
      gi.push_back(iir_ref(si, gi, n, IIR_OUT_W));
    end
    mx = 0; mn = 0;
    foreach (gf[n]) begin if (gf[n] > mx) mx = gf[n]; if (gf[n] < mn) mn = gf[n]; end
    f_rng = mx - mn;
    mx = 0; mn = 0;
    foreach (gi[n]) begin if (gi[n] > mx) mx = gi[n]; if (gi[n] < mn) mn = gi[n]; end
    i_rng = mx - mn;
    for (int f = 0; f < 2; f++)
      for (int p = 0; p < NP; p++) begin
        taken[f][p] = 0; halts[f][p] = 0; errs[f][p] = 0; bad[f][p] = 0;
        vmin[f][p] = 1100; vsum[f][p] = 0; maxe[f][p] = 0; se[f][p] = 0.0;
      end

    for (int p = 0; p < NP; p++) begin
      fx[p] = 12'(sf[0]);
      ix[p] = 16'(si[0]);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #(T/2 - 2);
    for (int c = 0; c < CYCLES; c++) begin
      sample_edge();          // 2 ps before the edge: what the edge will take
      #3;
      present_inputs();       // 1 ps after it
      #(T - 3);
    end

    for (int f = 0; f < 2; f++) begin
      $display("%s: window  Vdd avg  Vdd min  OPC     detected  missed  NRMSE %%   MAE",
               f == 0 ? "FIR" : "IIR");
      for (int p = 0; p < NP; p++) begin
        real opc;
        opc = real'(taken[f][p]) / real'(CYCLES);
        vavg[f][p]  = real'(vsum[f][p]) / real'(CYCLES);
        nrmse[f][p] = 100.0 * $sqrt(se[f][p] / real'(taken[f][p]))
                      / real'(f == 0 ? f_rng : i_rng);
        $display("     %3d %%   %4.0f mV  %4d mV  %0.4f  %7d  %6d   %0.4f  %0d",
                 15 + 5 * p, vavg[f][p], vmin[f][p], opc, errs[f][p], bad[f][p], nrmse[f][p],
                 maxe[f][p] == 0 ? 0 : $clog2(maxe[f][p] + 1) - 2);
        checks += 3;
        if (vmin[f][p] >= 1100) begin
          failures++; $display("  supply never lowered");
        end
        if (opc < 0.975) begin
          failures++; $display("  OPC below 0.975");
        end
        if (halts[f][p] < errs[f][p] || halts[f][p] > errs[f][p] + int'(MON_PERIOD)) begin
          failures++; $display("  withheld edges %0d do not match errors %0d", halts[f][p], errs[f][p]);
        end
      end
      for (int p = 0; p + 1 < NP; p++) begin
        checks++;
        if (vavg[f][p] > vavg[f][p+1] + 10.0) begin
          failures++;
          $display("  supply at %0d %% above that at %0d %%", 15 + 5 * p, 20 + 5 * p);
        end
      end
      checks += 2;
      if (!(vavg[f][0] < vavg[f][NP-1])) begin
        failures++; $display("  narrowest window did not lower the supply");
      end
      if (nrmse[f][0] < nrmse[f][NP-1]) begin
        failures++; $display("  narrowest window gave better quality than the widest");
      end
    end
    checks++;
    if (bad[0][NP-1] != 0) begin
      failures++; $display("FIR output errors at the 50 %% window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(T) * (longint'(CYCLES) + 3000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
