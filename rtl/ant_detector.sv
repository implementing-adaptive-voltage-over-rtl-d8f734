`timescale 1ps/1ps
// ant_detector: decision unit of Algorithmic Noise Tolerance (ANT) with a
// reduced-precision replica.
//
// The outputs of the main circuit (ym_d) and of its reduced-precision replica
// (yr_d, already shifted to the main circuit's scale) are each captured in a
// register. The unit forms ym_q - yr_q; when the magnitude of that difference
// exceeds the threshold e_th, the main output is taken to be corrupted by a
// timing error and the replica's output is forwarded instead. The output error
// is therefore bounded by the replica's precision plus e_th.
//
// Interface: e_th is a run-time input, an unsigned magnitude in output LSBs;
// setting it to the largest |y_main - y_replica| seen without timing errors
// makes y equal the main output whenever the main circuit is error-free.
// Timing: inputs are registered on the rising clock edge; y and ant_err are
// combinational from the two registers, so they are valid one cycle after the
// inputs. ym_q and yr_q are brought out because a recursive filter feeds its
// own registered output back.
//
// The two registers, subtractor, magnitude comparison and output multiplexer
// follow the architecture; the reset value (zero) and the strictly-greater
// comparison are this design's choice.
module ant_detector #(
  parameter int unsigned YW = 24
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [YW-1:0] ym_d,      // main circuit output, at the end-point
  input  logic signed [YW-1:0] yr_d,      // replica output, full-scale aligned
  input  logic        [YW-1:0] e_th,      // decision threshold, output LSBs
  output logic signed [YW-1:0] ym_q,
  output logic signed [YW-1:0] yr_q,
  output logic signed [YW-1:0] y,
  output logic                 ant_err    // replica output selected this cycle
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ym_q <= '0;
      yr_q <= '0;
    end else begin
      ym_q <= ym_d;
      yr_q <= yr_d;
    end
  end

  logic signed [YW:0] diff;
  logic        [YW:0] mag;

  always_comb begin
    diff    = (YW+1)'(ym_q) - (YW+1)'(yr_q);
    mag     = diff[YW] ? (YW+1)'(-diff) : (YW+1)'(diff);
    ant_err = mag > {1'b0, e_th};
    y       = ant_err ? yr_q : ym_q;
  end

endmodule
