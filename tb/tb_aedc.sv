`timescale 1ps/1ps
// tb_aedc: closed-loop test of AED-C on both filters at 650 MHz (1538 ps),
// with a 100-cycle monitoring period (threshold 2 errors per period).
// Each filter's output reaches its sensors through vos_delay_model driven by
// the filter's own supply target. The delay model is set (150..700 ps at
// 1.10 V) so that every late arrival falls inside the detection window at any
// supply in range: all timing errors are then caught and corrected, and the
// output stream must equal the reference filter exactly, even while the supply
// is being lowered into the region where errors occur. Checked besides:
//  - the supply falls from 1100 mV and then also rises at least once (the
//    error count crossed the threshold), and stays within 600..1100 mV;
//  - errors were detected, and each cost exactly one withheld clock edge: the
//    number of inputs taken plus the error events reported equals the cycles
//    elapsed over whole periods;
// FIR runs with a 50 % window, IIR with 35 %. Inputs are random walks.
module tb_aedc;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int T = 1538;
  localparam int N = 100;
  localparam int CW = $clog2(N + 1);
  localparam int CYCLES = 8000;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #(T/2) clk = ~clk;

  // FIR
  logic signed [11:0] fx = '0;
  logic signed [23:0] f_next, f_arr, f_y;
  logic f_take, f_err, f_nev;
  logic [CW-1:0] f_ne;
  vdd_mv_t f_vdd;
  // IIR
  logic signed [15:0] ix = '0;
  logic signed [31:0] i_next, i_arr, i_y;
  logic i_take, i_err, i_nev;
  logic [CW-1:0] i_ne;
  vdd_mv_t i_vdd;

  aedc #(.IS_IIR(1'b0), .N(N)) dut_f (
    .ref_clk(clk), .rst_n, .x(fx), .in_take(f_take), .tdw_ps(16'(T * 50 / 100)),
    .y_next(f_next), .y_arrive(f_arr), .y(f_y), .err_any(f_err),
    .ne(f_ne), .ne_valid(f_nev), .vdd_mv(f_vdd));
  vos_delay_model #(.W(24), .AT_MIN_PS(150), .AT_MAX_PS(700)) vos_f (
    .din(f_next), .vdd_mv(f_vdd), .dout(f_arr));

  aedc #(.IS_IIR(1'b1), .N(N)) dut_i (
    .ref_clk(clk), .rst_n, .x(ix), .in_take(i_take), .tdw_ps(16'(T * 35 / 100)),
    .y_next(i_next), .y_arrive(i_arr), .y(i_y), .err_any(i_err),
    .ne(i_ne), .ne_valid(i_nev), .vdd_mv(i_vdd));
  vos_delay_model #(.W(32), .AT_MIN_PS(150), .AT_MAX_PS(700)) vos_i (
    .din(i_next), .vdd_mv(i_vdd), .dout(i_arr));

  longint fxs[$], ixs[$], iys[$];
  int f_taken = 0, i_taken = 0, f_ne_sum = 0, i_ne_sum = 0;
  int f_min = 1100, i_min = 1100, f_ups = 0, i_ups = 0, f_prev = 1100, i_prev = 1100;
  int f_periods = 0, i_periods = 0, f_taken_at_end = 0, i_taken_at_end = 0;
  int f_walk = 0, i_walk = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < CYCLES; c++) begin
      @(posedge clk);
      // Output checks: the value sampled before taken edge m belongs to
      // input m-3.
      if (f_take) begin
        fxs.push_back(longint'(fx));
        if (f_taken >= 3) begin
          longint e;
          e = fir_ref(fxs, f_taken - 3);
          checks++;
          if (longint'(f_y) != e) begin
            failures++;
            if (failures < 10) $display("FIR out %0d: %0d exp %0d (vdd %0d)", f_taken - 3, f_y, e, f_vdd);
          end
        end
        f_taken++;
      end
      if (i_take) begin
        ixs.push_back(longint'(ix));
        if (i_taken >= 3) begin
          longint e;
          e = iir_ref(ixs, iys, i_taken - 3, 32);
          iys.push_back(e);
          checks++;
          if (longint'(i_y) != e) begin
            failures++;
            if (failures < 10) $display("IIR out %0d: %0d exp %0d (vdd %0d)", i_taken - 3, i_y, e, i_vdd);
          end
        end
        i_taken++;
      end
      if (f_nev) begin f_ne_sum += int'(f_ne); f_periods++; f_taken_at_end = f_taken; end
      if (i_nev) begin i_ne_sum += int'(i_ne); i_periods++; i_taken_at_end = i_taken; end
      #1;
      // New inputs after each taken edge.
      if (f_take) begin
        f_walk += int'($urandom_range(0, 600)) - 300;
        if (f_walk > 2047) f_walk = 2047;
        if (f_walk < -2048) f_walk = -2048;
        fx = 12'(f_walk);
      end
      if (i_take) begin
        i_walk += int'($urandom_range(0, 6000)) - 3000;
        if (i_walk > 32767) i_walk = 32767;
        if (i_walk < -32768) i_walk = -32768;
        ix = 16'(i_walk);
      end
      if (int'(f_vdd) < f_min) f_min = int'(f_vdd);
      if (int'(i_vdd) < i_min) i_min = int'(i_vdd);
      if (int'(f_vdd) > f_prev) f_ups++;
      if (int'(i_vdd) > i_prev) i_ups++;
      f_prev = int'(f_vdd); i_prev = int'(i_vdd);
      checks += 2;
      if (f_vdd < 600 || f_vdd > 1100) failures++;
      if (i_vdd < 600 || i_vdd > 1100) failures++;
    end
    $display("FIR: taken %0d, errors %0d in %0d periods, min vdd %0d mV, rises %0d, final %0d mV",
             f_taken, f_ne_sum, f_periods, f_min, f_ups, f_vdd);
    $display("IIR: taken %0d, errors %0d in %0d periods, min vdd %0d mV, rises %0d, final %0d mV",
             i_taken, i_ne_sum, i_periods, i_min, i_ups, i_vdd);
    // Every cycle of a whole period either takes an input or is withheld.
    checks += 2;
    if (f_taken_at_end + f_ne_sum != f_periods * N + 1) begin
      failures++;
      $display("FIR cycle accounting: taken %0d + errors %0d != %0d", f_taken_at_end, f_ne_sum, f_periods * N);
    end
    if (i_taken_at_end + i_ne_sum != i_periods * N + 1) begin
      failures++;
      $display("IIR cycle accounting: taken %0d + errors %0d != %0d", i_taken_at_end, i_ne_sum, i_periods * N);
    end
    checks += 6;
    if (f_ne_sum == 0) failures++;
    if (i_ne_sum == 0) failures++;
    if (f_min >= 1100 || i_min >= 1100) failures++;
    if (f_ups == 0) failures++;
    if (i_ups == 0) failures++;
    if (f_taken < CYCLES / 2 || i_taken < CYCLES / 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(longint'(T) * (CYCLES + 1000));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
