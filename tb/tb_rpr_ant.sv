`timescale 1ps/1ps
// tb_rpr_ant: checks the RPR-ANT arrangement for both filters (BR = 5).
// The main circuit's output reaches its end-point through a corruption hook in
// this testbench that, on chosen cycles, flips one output bit as a late
// arrival would. Expected values come from the reference filters:
//  - clean cycles: y equals the full-precision filter output and ant_err = 0
//    (the threshold is set to the largest main/replica gap, computed from the
//    reference models for this stream, as formula (1) prescribes);
//  - cycles with a flipped high-order bit: ant_err = 1 and y equals the
//    replica's reference output, shifted to full scale.
// The FIR is corrupted every 7th output. The IIR, whose main circuit feeds its
// own output back, is corrupted once; after that its output is only required
// to stay within e_th of the fault-free replica.
// Latency: input before edge m, output after edge m+2.
module tb_rpr_ant;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int BR = 5;
  localparam int NS = 600;
  int checks = 0, failures = 0, n_sub = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // FIR
  logic signed [11:0] fx;
  logic signed [23:0] f_next, f_arr, f_y;
  logic        [23:0] f_th;
  logic               f_err;
  logic        [23:0] f_flip;
  // IIR
  logic signed [15:0] ix;
  logic signed [31:0] i_next, i_arr, i_y;
  logic        [31:0] i_th;
  logic               i_err;
  logic        [31:0] i_flip;

  assign f_arr = f_next ^ f_flip;
  assign i_arr = i_next ^ i_flip;

  rpr_ant #(.IS_IIR(1'b0), .BR(BR)) dut_f (
    .clk, .rst_n, .x(fx), .e_th(f_th), .ym_next(f_next), .ym_arrive(f_arr),
    .y(f_y), .ant_err(f_err));
  rpr_ant #(.IS_IIR(1'b1), .BR(BR)) dut_i (
    .clk, .rst_n, .x(ix), .e_th(i_th), .ym_next(i_next), .ym_arrive(i_arr),
    .y(i_y), .ant_err(i_err));

  longint fxs[$], fxr[$], ixs[$], ixr[$], iys[$], iyr[$];
  longint f_main[NS], f_rep[NS], i_main[NS], i_rep[NS];
  bit     f_bad[NS], i_bad[NS];

  initial begin
    int walk_f = 0, walk_i = 0;
    longint gap_f = 0, gap_i = 0;
    // Build the stimulus and the reference outputs first.
    for (int n = 0; n < NS; n++) begin
      walk_f += int'($urandom_range(0, 400)) - 200;
      if (walk_f > 2047) walk_f = 2047;
      if (walk_f < -2048) walk_f = -2048;
      walk_i += int'($urandom_range(0, 2000)) - 1000;
      if (walk_i > 32767) walk_i = 32767;
      if (walk_i < -32768) walk_i = -32768;
      fxs.push_back(walk_f); fxr.push_back(walk_f >>> (12 - BR));
      ixs.push_back(walk_i); ixr.push_back(walk_i >>> (16 - BR));
      f_main[n] = fir_ref(fxs, n);
      f_rep[n]  = fir_ref(fxr, n) <<< (12 - BR);
      iys.push_back(iir_ref(ixs, iys, n, 32));
      iyr.push_back(iir_ref(ixr, iyr, n, BR + 16));
      i_main[n] = iys[n];
      i_rep[n]  = iyr[n] <<< (16 - BR);
      if ((f_main[n] - f_rep[n]) > gap_f) gap_f = f_main[n] - f_rep[n];
      if ((f_rep[n] - f_main[n]) > gap_f) gap_f = f_rep[n] - f_main[n];
      if ((i_main[n] - i_rep[n]) > gap_i) gap_i = i_main[n] - i_rep[n];
      if ((i_rep[n] - i_main[n]) > gap_i) gap_i = i_rep[n] - i_main[n];
      f_bad[n] = (n % 7 == 3);
      i_bad[n] = (n == 300);
    end
    f_th = 24'(gap_f); i_th = 32'(gap_i);
    fx = '0; ix = '0; f_flip = '0; i_flip = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < NS + 3; m++) begin
      fx = (m < NS) ? 12'(fxs[m]) : '0;
      ix = (m < NS) ? 16'(ixs[m]) : '0;
      // The value in flight to the end-point during this cycle belongs to
      // input m-2; it is captured at this cycle's closing edge.
      f_flip = (m >= 2 && m - 2 < NS && f_bad[m-2]) ? (24'd1 << 21) : '0;
      i_flip = (m >= 2 && m - 2 < NS && i_bad[m-2]) ? (32'd1 << 29) : '0;
      @(posedge clk); #1;
      if (m >= 2 && m - 2 < NS) begin
        automatic int n = m - 2;
        checks += 4;
        if (f_err !== f_bad[n]) begin
          failures++;
          if (failures < 10) $display("FIR n=%0d err %b exp %b", n, f_err, f_bad[n]);
        end
        if (longint'(f_y) != (f_bad[n] ? f_rep[n] : f_main[n])) begin
          failures++;
          if (failures < 10) $display("FIR n=%0d y %0d exp %0d", n, f_y, f_bad[n] ? f_rep[n] : f_main[n]);
        end
        // The IIR feeds its own (here corrupted) output back, so after the
        // single fault the main circuit stays wrong for a while; up to the
        // fault the output is exact, and at all times it stays within e_th of
        // the fault-free replica.
        if (n <= 300) begin
          if (i_err !== i_bad[n]) begin
            failures++;
            if (failures < 10) $display("IIR n=%0d err %b exp %b", n, i_err, i_bad[n]);
          end
          if (longint'(i_y) != (i_bad[n] ? i_rep[n] : i_main[n])) begin
            failures++;
            if (failures < 10) $display("IIR n=%0d y %0d exp %0d", n, i_y, i_bad[n] ? i_rep[n] : i_main[n]);
          end
        end else begin
          longint dd;
          dd = longint'(i_y) - i_rep[n];
          if (dd < 0) dd = -dd;
          if (dd > gap_i) begin
            failures++;
            if (failures < 10) $display("IIR n=%0d y %0d off replica %0d by more than e_th", n, i_y, i_rep[n]);
          end
        end
        n_sub += int'(f_err) + int'(i_err);
      end
    end
    $display("replica substitutions %0d", n_sub);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
