`timescale 1ps/1ps
// tb_fir_filter: checks the pipelined FIR filter, full precision (12-bit input)
// and as a 5-bit reduced-precision replica, against the reference convolution.
// Each instance gets an end-point register as in the real circuits. An input
// applied before clock edge m must appear on the registered output after edge
// m+2; the test checks every output of a random stream, an impulse (which
// reads out the 17 taps in order) and full-scale steps that reach the largest
// output magnitude.
module tb_fir_filter;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int BR = 5;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [11:0] x;
  logic signed [23:0] y_next, y_q;
  logic signed [BR-1:0] xr;
  logic signed [BR+11:0] yr_next, yr_q;

  fir_filter dut (.clk, .rst_n, .x, .y_next);
  fir_filter #(.IN_W(BR)) dut_r (.clk, .rst_n, .x(xr), .y_next(yr_next));

  always_ff @(posedge clk) begin
    y_q  <= y_next;
    yr_q <= yr_next;
  end

  longint xs[$], xrs[$];

  task automatic run(int n_samples, int mode);
    xs.delete(); xrs.delete();
    rst_n = 1'b0; x = '0; xr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < n_samples + 3; m++) begin
      logic signed [11:0] v;
      case (mode)
        0: v = 12'($urandom);
        1: v = (m == 0) ? 12'sd1 : 12'sd0;
        2: v = ((m / 20) % 2) ? 12'sh800 : 12'sh7ff;
        default: v = 12'sd0;
      endcase
      x = v; xr = v[11 -: BR];
      xs.push_back(longint'(v));
      xrs.push_back(longint'(xr));
      @(posedge clk); #1;
      // After edge m, y_q holds the output for the input of edge m-2.
      if (m >= 2) begin
        longint exp_y, exp_r;
        exp_y = fir_ref(xs, m - 2);
        exp_r = fir_ref(xrs, m - 2);
        checks += 2;
        if (longint'(y_q) != exp_y) begin
          failures++;
          if (failures < 10) $display("FIR mode %0d n=%0d: got %0d exp %0d", mode, m - 2, y_q, exp_y);
        end
        if (longint'(yr_q) != exp_r) begin
          failures++;
          if (failures < 10) $display("replica mode %0d n=%0d: got %0d exp %0d", mode, m - 2, yr_q, exp_r);
        end
      end
    end
  endtask

  initial begin
    run(400, 0);
    run(20, 1);
    run(100, 2);
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
