`timescale 1ps/1ps
// rpr_ant: a benchmark filter protected by Algorithmic Noise Tolerance with a
// Reduced-Precision Replica (RPR-ANT).
//
// The main circuit is the full-precision filter (FIR when IS_IIR = 0, IIR when
// IS_IIR = 1). Next to it runs a replica of the same filter that sees only the
// BR most significant input bits; being shorter, it keeps meeting timing when
// the supply is lowered and the main circuit starts to fail. Both outputs go to
// ant_detector, which forwards the replica's output whenever the two differ by
// more than e_th.
//
// The main circuit's combinational output leaves on ym_next and its value as it
// reaches the end-point register comes back on ym_arrive. In silicon the two are
// the same wire; in simulation a supply-dependent delay model can sit between
// them to produce the timing errors that voltage over-scaling causes. The
// replica is taken to be fault-free and has no such loop.
//
// Timing: one output per clock (no stall). An input sampled at edge k gives y
// after edge k+2, the same latency as the plain filter. The IIR main circuit
// feeds back its own registered output, the replica its own.
//
// The structure follows the ANT architecture; the BR default (5 bits, the
// knee of the quality/energy trade-off for both filters) and the alignment of
// the replica output by a left shift are this design's choices.
module rpr_ant
  import avos_pkg::*;
#(
  parameter bit          IS_IIR = 1'b0,
  parameter int unsigned IN_W   = IS_IIR ? IIR_IN_W : FIR_IN_W,
  parameter int unsigned EXT_W  = IS_IIR ? IIR_GAIN_W : FIR_COEF_W,
  parameter int unsigned BR     = IS_IIR ? IIR_BR_DEFAULT : FIR_BR_DEFAULT,
  parameter int unsigned YW     = IN_W + EXT_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [IN_W-1:0] x,
  input  logic        [YW-1:0] e_th,
  output logic signed [YW-1:0] ym_next,    // main circuit, before its end-point
  input  logic signed [YW-1:0] ym_arrive,  // same signal as seen by the end-point
  output logic signed [YW-1:0] y,
  output logic                 ant_err
);

  localparam int unsigned RW = BR + EXT_W;   // replica output width

  logic signed [YW-1:0] ym_q;                // main circuit registered output
  logic signed [YW-1:0] yr_q;                // replica registered output

  logic signed [BR-1:0] xr;
  logic signed [RW-1:0] yr_next;
  logic signed [YW-1:0] yr_full;

  assign xr      = x[IN_W-1 -: BR];
  assign yr_full = YW'(yr_next) <<< (IN_W - BR);

  if (IS_IIR) begin : g_iir
    // The replica's registered output, back in its own scale, for its feedback.
    logic signed [RW-1:0] yr_fb;
    assign yr_fb = RW'(yr_q >>> (IN_W - BR));
    iir_filter #(.IN_W(IN_W), .OUT_W(YW)) u_main (
      .clk, .rst_n, .x(x), .y_q(ym_q), .y_next(ym_next));
    iir_filter #(.IN_W(BR), .OUT_W(RW)) u_replica (
      .clk, .rst_n, .x(xr), .y_q(yr_fb), .y_next(yr_next));
  end else begin : g_fir
    fir_filter #(.IN_W(IN_W), .OUT_W(YW)) u_main (
      .clk, .rst_n, .x(x), .y_next(ym_next));
    fir_filter #(.IN_W(BR), .OUT_W(RW)) u_replica (
      .clk, .rst_n, .x(xr), .y_next(yr_next));
  end

  ant_detector #(.YW(YW)) u_det (
    .clk, .rst_n,
    .ym_d(ym_arrive), .yr_d(yr_full), .e_th,
    .ym_q, .yr_q, .y, .ant_err);

endmodule
