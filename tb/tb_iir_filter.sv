`timescale 1ps/1ps
// tb_iir_filter: checks the direct-form-I IIR filter, full precision (16-bit
// input) and as a 5-bit reduced-precision replica, against a bit-exact
// reference recursion whose taps come from the binomial formula. The output
// end-point register is placed here and fed back on y_q, as in the real
// circuits. An input applied before edge m appears on the registered output
// after edge m+2. Stimuli: a random walk (band-limited, like audio), an impulse
// and full-scale steps that reach the DC gain of 2^16.
module tb_iir_filter;
  import avos_pkg::*;
  import tb_models_pkg::*;

  localparam int BR = 5;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] x;
  logic signed [31:0] y_next, y_q;
  logic signed [BR-1:0] xr;
  logic signed [BR+15:0] yr_next, yr_q;

  iir_filter dut (.clk, .rst_n, .x, .y_q, .y_next);
  iir_filter #(.IN_W(BR)) dut_r (.clk, .rst_n, .x(xr), .y_q(yr_q), .y_next(yr_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q  <= '0;
      yr_q <= '0;
    end else begin
      y_q  <= y_next;
      yr_q <= yr_next;
    end
  end

  longint xs[$], ys[$], xrs[$], yrs[$];

  task automatic run(int n_samples, int mode);
    int walk = 0;
    xs.delete(); ys.delete(); xrs.delete(); yrs.delete();
    rst_n = 1'b0; x = '0; xr = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int m = 0; m < n_samples + 3; m++) begin
      logic signed [15:0] v;
      case (mode)
        0: begin
          walk += int'($urandom_range(0, 4000)) - 2000;
          if (walk > 32767) walk = 32767;
          if (walk < -32768) walk = -32768;
          v = 16'(walk);
        end
        1: v = (m == 0) ? 16'sd1000 : 16'sd0;
        2: v = ((m / 60) % 2) ? 16'sh8000 : 16'sh7fff;
        default: v = 16'sd0;
      endcase
      x = v; xr = v[15 -: BR];
      xs.push_back(longint'(v));
      xrs.push_back(longint'(xr));
      @(posedge clk); #1;
      if (m >= 2) begin
        longint exp_y, exp_r;
        exp_y = iir_ref(xs, ys, m - 2, 32);
        exp_r = iir_ref(xrs, yrs, m - 2, BR + 16);
        ys.push_back(exp_y);
        yrs.push_back(exp_r);
        checks += 2;
        if (longint'(y_q) != exp_y) begin
          failures++;
          if (failures < 10) $display("IIR mode %0d n=%0d: got %0d exp %0d", mode, m - 2, y_q, exp_y);
        end
        if (longint'(yr_q) != exp_r) begin
          failures++;
          if (failures < 10) $display("replica mode %0d n=%0d: got %0d exp %0d", mode, m - 2, yr_q, exp_r);
        end
      end
    end
  endtask

  initial begin
    run(600, 0);
    run(60, 1);
    run(300, 2);
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
