`timescale 1ps/1ps
// tb_ant_br_sweep: the RPR-ANT workload. Both filters run under RPR-ANT with
// three replica precisions each (B_r = 4, 5, 6 for the FIR; 4, 5, 8 for the
// IIR) at four fixed supplies (1.10, 0.82, 0.78 and 0.68 V), 24 rpr_ant
// instances side by side, each main filter behind its own supply-dependent
// delay model, all on the same synthetic three-class audio stream
// (tb_models_pkg::make_audio; 12-bit for the FIR, scaled by 16 for the IIR).
//
// E_th for each precision is the largest gap between the fault-free main
// output and the replica output over this stream, worked out beforehand from
// the reference models. For each point it reports the replica substitutions,
// the output samples that differ from the reference filter, NRMSE (RMS error
// over the reference's dynamic range) and MAE (log2 of the largest error,
// minus 1).
//
// Checks:
//   at 1.10 V no substitution and an exact output, for every precision;
//   at every supply the output stays within E_th of the fault-free replica;
//   at 0.68 V the replica is substituted, and the least precise replica gives
//   no better NRMSE than the most precise one.
// Outputs are read 2 ps before each clock edge and inputs change 1 ps after
// it; an input presented before edge c is seen at the output before edge c+3.
// The stream is this design's stand-in for recorded audio; the numbers depend
// on the delay model and are not silicon figures.
module tb_ant_br_sweep;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int T      = TCLK_PS;
  localparam int NB     = 3;
  localparam int NV     = 4;
  localparam int CYCLES = 15000;
  localparam int VDD_LIST [NV] = '{1100, 820, 780, 680};
  localparam int FIR_BR_LIST [NB] = '{4, 5, 6};
  localparam int IIR_BR_LIST [NB] = '{4, 5, 8};

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #(T/2) clk = ~clk;

  logic signed [FIR_IN_W-1:0]  fx = '0;
  logic signed [IIR_IN_W-1:0]  ix = '0;
  logic        [FIR_OUT_W-1:0] f_th [NB];
  logic        [IIR_OUT_W-1:0] i_th [NB];
  logic signed [FIR_OUT_W-1:0] fy   [NB][NV];
  logic signed [IIR_OUT_W-1:0] iy   [NB][NV];
  logic                        ferr [NB][NV];
  logic                        ierr [NB][NV];

  for (genvar b = 0; b < NB; b++) begin : g_br
    for (genvar v = 0; v < NV; v++) begin : g_vdd
      logic signed [FIR_OUT_W-1:0] fnext, farr;
      logic signed [IIR_OUT_W-1:0] inext, iarr;

      rpr_ant #(.IS_IIR(1'b0), .BR(FIR_BR_LIST[b])) u_f (
        .clk, .rst_n, .x(fx), .e_th(f_th[b]), .ym_next(fnext), .ym_arrive(farr),
        .y(fy[b][v]), .ant_err(ferr[b][v]));
      vos_delay_model #(.W(FIR_OUT_W)) u_fv (
        .din(fnext), .vdd_mv(vdd_mv_t'(VDD_LIST[v])), .dout(farr));

      rpr_ant #(.IS_IIR(1'b1), .BR(IIR_BR_LIST[b])) u_i (
        .clk, .rst_n, .x(ix), .e_th(i_th[b]), .ym_next(inext), .ym_arrive(iarr),
        .y(iy[b][v]), .ant_err(ierr[b][v]));
      vos_delay_model #(.W(IIR_OUT_W)) u_iv (
        .din(inext), .vdd_mv(vdd_mv_t'(VDD_LIST[v])), .dout(iarr));
    end
  end

  longint sf[$], si[$], gf[$], gi[$];
  longint rf[NB][$], ri[NB][$];
  longint gap[2][NB];
  longint rng[2];
  int     subs[2][NB][NV];
  int     bad [2][NB][NV];
  longint maxe[2][NB][NV];
  real    se  [2][NB][NV];
  real    nrmse[2][NB][NV];

  function automatic longint absl(longint v);
    return (v < 0) ? -v : v;
  endfunction

  task automatic score(int f, int b, int v, longint y, longint ref_y, longint rep_y, logic sub);
    longint d = y - ref_y;
    subs[f][b][v] += int'(sub);
    if (d != 0) bad[f][b][v]++;
    se[f][b][v] += real'(d) * real'(d);
    if (absl(d) > maxe[f][b][v]) maxe[f][b][v] = absl(d);
    checks++;
    if (VDD_LIST[v] == 1100 && (d != 0 || sub)) begin
      failures++;
      if (failures < 10) $display("%s B_r %0d at 1.10 V: %0d exp %0d", f == 0 ? "FIR" : "IIR",
                                  f == 0 ? FIR_BR_LIST[b] : IIR_BR_LIST[b], y, ref_y);
    end else if (absl(y - rep_y) > gap[f][b]) begin
      failures++;
      if (failures < 10) $display("%s B_r %0d: %0d beyond E_th of replica %0d", f == 0 ? "FIR" : "IIR",
                                  f == 0 ? FIR_BR_LIST[b] : IIR_BR_LIST[b], y, rep_y);
    end
  endtask

  initial begin
    longint mx;
    longint mn;
    make_audio(sf, CYCLES, 1800);
    foreach (sf[n]) si.push_back(sf[n] * 16);
    for (int n = 0; n < CYCLES; n++) begin
      gf.push_back(fir_ref(sf, n));
      gi.push_back(iir_ref(si, gi, n, IIR_OUT_W));
    end
    for (int f = 0; f < 2; f++) begin
      mx = 0; mn = 0;
      for (int n = 0; n < CYCLES; n++) begin
        automatic longint g = (f == 0) ? gf[n] : gi[n];
        if (g > mx) mx = g;
        if (g < mn) mn = g;
      end
      rng[f] = mx - mn;
    end
    for (int b = 0; b < NB; b++) begin
      longint xr[$], yr[$];
      automatic int sh_f = int'(FIR_IN_W) - FIR_BR_LIST[b];
      automatic int sh_i = int'(IIR_IN_W) - IIR_BR_LIST[b];
      xr.delete();
      yr.delete();
      gap[0][b] = 0; gap[1][b] = 0;
      foreach (sf[n]) xr.push_back(sf[n] >>> sh_f);
      for (int n = 0; n < CYCLES; n++) begin
        rf[b].push_back(fir_ref(xr, n) <<< sh_f);
        if (absl(gf[n] - rf[b][n]) > gap[0][b]) gap[0][b] = absl(gf[n] - rf[b][n]);
      end
      xr.delete();
      foreach (si[n]) xr.push_back(si[n] >>> sh_i);
      for (int n = 0; n < CYCLES; n++) begin
        yr.push_back(iir_ref(xr, yr, n, IIR_BR_LIST[b] + int'(IIR_GAIN_W)));
        ri[b].push_back(yr[n] <<< sh_i);
        if (absl(gi[n] - ri[b][n]) > gap[1][b]) gap[1][b] = absl(gi[n] - ri[b][n]);
      end
      f_th[b] = FIR_OUT_W'(gap[0][b]);
      i_th[b] = IIR_OUT_W'(gap[1][b]);
      for (int v = 0; v < NV; v++)
        for (int f = 0; f < 2; f++) begin
          subs[f][b][v] = 0; bad[f][b][v] = 0; maxe[f][b][v] = 0; se[f][b][v] = 0.0;
        end
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    #(T/2 + 1);                       // 1 ps after an edge
    for (int c = 0; c < CYCLES + 3; c++) begin
      fx = (c < CYCLES) ? FIR_IN_W'(sf[c]) : '0;
      ix = (c < CYCLES) ? IIR_IN_W'(si[c]) : '0;
      #(T - 3);                       // 2 ps before edge c
      if (c >= 3) begin
        automatic int n = c - 3;
        for (int b = 0; b < NB; b++)
          for (int v = 0; v < NV; v++) begin
            score(0, b, v, longint'(fy[b][v]), gf[n], rf[b][n], ferr[b][v]);
            score(1, b, v, longint'(iy[b][v]), gi[n], ri[b][n], ierr[b][v]);
          end
      end
      #3;
    end

    for (int f = 0; f < 2; f++) begin
      $display("%s: B_r  E_th         Vdd   substituted  wrong   NRMSE %%   MAE",
               f == 0 ? "FIR" : "IIR");
      for (int b = 0; b < NB; b++)
        for (int v = 0; v < NV; v++) begin
          nrmse[f][b][v] = 100.0 * $sqrt(se[f][b][v] / real'(CYCLES)) / real'(rng[f]);
          $display("     %3d  %-11d  %4d  %11d  %5d   %0.4f  %0d",
                   f == 0 ? FIR_BR_LIST[b] : IIR_BR_LIST[b], gap[f][b], VDD_LIST[v],
                   subs[f][b][v], bad[f][b][v], nrmse[f][b][v],
                   maxe[f][b][v] == 0 ? 0 : $clog2(maxe[f][b][v] + 1) - 2);
        end
      checks += 2;
      if (subs[f][0][NV-1] == 0 || subs[f][NB-1][NV-1] == 0) begin
        failures++; $display("  no substitution at %0d mV", VDD_LIST[NV-1]);
      end
      if (nrmse[f][0][NV-1] < nrmse[f][NB-1][NV-1]) begin
        failures++; $display("  the least precise replica gave the better quality");
      end
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
