`timescale 1ps/1ps
// fir_filter: pipelined 16th-order low-pass FIR filter in direct form, the
// feed-forward benchmark circuit of the voltage over-scaling study.
//
// y[n] = sum_{k=0..16} c_k * x[n-k], with the 17 coefficients of avos_pkg.
// The input word is IN_W bits wide (12 for the full-precision filter); the same
// module with a smaller IN_W is the reduced-precision replica, which is fed the
// IN_W most significant bits of the input and keeps the full coefficients.
//
// Pipeline: the input is registered into the tap delay line (stage 1), the 17
// products are registered (stage 2), and the adder tree that sums them is left
// combinational and delivered on y_next. The register that captures y_next is
// not inside this module: it is the circuit's timing end-point, a plain
// register in the ANT arrangement and a bank of TunED timing sensors in the
// AED-C arrangement. Counting that end-point register, an input sampled at
// clock edge k appears on the registered output after edge k+2.
//
// Word widths (12 in, 24 out) and order follow the architecture; the two-stage
// pipeline split and the coefficients are this design's choice.
module fir_filter
  import avos_pkg::*;
#(
  parameter int unsigned IN_W  = FIR_IN_W,
  parameter int unsigned OUT_W = IN_W + FIR_COEF_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [IN_W-1:0]  x,
  output logic signed [OUT_W-1:0] y_next
);

  localparam int unsigned PROD_W = IN_W + FIR_COEF_W;

  logic signed [IN_W-1:0]   taps [FIR_TAPS];
  logic signed [PROD_W-1:0] prod [FIR_TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < FIR_TAPS; k++) begin
        taps[k] <= '0;
        prod[k] <= '0;
      end
    end else begin
      taps[0] <= x;
      for (int k = 1; k < FIR_TAPS; k++) taps[k] <= taps[k-1];
      for (int k = 0; k < FIR_TAPS; k++) prod[k] <= PROD_W'(taps[k]) * PROD_W'(FIR_COEF[k]);
    end
  end

  // Sum of |c_k| is below 2^11, so the sum fits PROD_W bits without overflow.
  always_comb begin
    logic signed [PROD_W-1:0] acc;
    acc = '0;
    for (int k = 0; k < FIR_TAPS; k++) acc += prod[k];
    y_next = OUT_W'(acc);
  end

endmodule
