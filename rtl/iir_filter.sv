`timescale 1ps/1ps
// iir_filter: pipelined 8th-order low-pass IIR filter in direct form I, the
// recursive benchmark circuit of the voltage over-scaling study.
//
//   y[n] = ( 2^8 * sum_{k=0..8} b_k x[n-k] + sum_{k=1..8} A_k y[n-k] ) >>> 8
//
// with b_k and A_k from avos_pkg (A_k = -a_k * 2^8, exact integers). The right
// shift truncates toward minus infinity and the result saturates to OUT_W bits.
// IN_W is 16 for the full-precision filter; a smaller IN_W gives the
// reduced-precision replica, fed the IN_W most significant input bits.
//
// Pipeline: input delay line (stage 1), registered feed-forward sum (stage 2),
// then the recursive part, which must close within one cycle, is combinational
// and delivered on y_next. The output register is outside the module (it is the
// timing end-point: a plain register for ANT, TunED sensors for AED-C) and its
// value comes back on y_q as y[n-1]; the module keeps y[n-2..n-8] itself. An
// input sampled at edge k reaches the registered output after edge k+2.
//
// Order, direct form I and word widths follow the architecture; coefficients,
// the feedback precision and the pipeline split are this design's choice.
module iir_filter
  import avos_pkg::*;
#(
  parameter int unsigned IN_W  = IIR_IN_W,
  parameter int unsigned OUT_W = IN_W + IIR_GAIN_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  input  logic signed [OUT_W-1:0] y_q,     // registered output, y[n-1]
  output logic signed [OUT_W-1:0] y_next   // y[n], to the end-point register
);

  localparam int unsigned FF_W  = IN_W + 9;           // sum of b_k is 256
  localparam int unsigned ACC_W = OUT_W + 16;         // sum of |A_k| < 2^13, plus 2^8 scale

  logic signed [IN_W-1:0]  taps [IIR_ORDER+1];
  logic signed [FF_W-1:0]  ff_q;
  logic signed [OUT_W-1:0] yh   [2:IIR_ORDER];        // y[n-2] .. y[n-8]

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k <= IIR_ORDER; k++) taps[k] <= '0;
      for (int k = 2; k <= IIR_ORDER; k++) yh[k]   <= '0;
      ff_q <= '0;
    end else begin
      logic signed [FF_W-1:0] ff;
      ff = '0;
      for (int k = 0; k <= IIR_ORDER; k++) ff += FF_W'(taps[k]) * FF_W'(IIR_B[k]);
      ff_q    <= ff;
      taps[0] <= x;
      for (int k = 1; k <= IIR_ORDER; k++) taps[k] <= taps[k-1];
      yh[2] <= y_q;
      for (int k = 3; k <= IIR_ORDER; k++) yh[k] <= yh[k-1];
    end
  end

  localparam logic signed [ACC_W-1:0] Y_MAX = ACC_W'({1'b0, {(OUT_W-1){1'b1}}});
  localparam logic signed [ACC_W-1:0] Y_MIN = ~Y_MAX;

  always_comb begin
    logic signed [ACC_W-1:0] acc;
    logic signed [ACC_W-1:0] y_full;
    acc = ACC_W'(ff_q) <<< IIR_FRAC;
    acc += ACC_W'(y_q) * ACC_W'(IIR_A[1]);
    for (int k = 2; k <= IIR_ORDER; k++) acc += ACC_W'(yh[k]) * ACC_W'(IIR_A[k]);
    y_full = acc >>> IIR_FRAC;
    if (y_full > Y_MAX)      y_next = OUT_W'(Y_MAX);
    else if (y_full < Y_MIN) y_next = OUT_W'(Y_MIN);
    else                     y_next = OUT_W'(y_full);
  end

endmodule
