`timescale 1ps/1ps
// avos_pkg: constants shared by the adaptive voltage over-scaling (AVOS) design.
//
// It holds the filter sizes (16th-order FIR, 12-bit in / 24-bit out; 8th-order
// direct-form-I IIR, 16-bit in / 32-bit out), the supply range the power
// management unit moves in (0.60 V to 1.10 V in 20 mV steps), the error-rate
// monitoring period (1000 clock cycles) and threshold (2 %), and the clock
// period the delay models are scaled to (650 MHz, 1538 ps).
//
// The filter coefficients are this design's own choice; only the filter type,
// order and word widths are fixed by the architecture:
//   FIR: 17-tap Hamming-windowed sinc, cut-off 0.25 fs, 12-bit signed, scaled so
//        that the sum of |c| stays below 2^11; a 12-bit input then never
//        overflows a 24-bit output.
//   IIR: H(z) = (1 + z^-1)^8 / (1 - 0.5 z^-1)^8, a low-pass with all eight zeros
//        at z = -1 and all eight poles at z = 0.5. Feed-forward taps are the
//        binomial numbers C(8,k); the feedback taps are C(8,k) * 0.5^k, which are
//        exact in 8 fractional bits, so quantisation does not move the poles.
//        DC gain is 2^16, so a 16-bit input fits a 32-bit output.
package avos_pkg;

  // ---------------- FIR (feed-forward benchmark) ----------------
  localparam int unsigned FIR_ORDER  = 16;
  localparam int unsigned FIR_TAPS   = FIR_ORDER + 1;
  localparam int unsigned FIR_IN_W   = 12;
  localparam int unsigned FIR_COEF_W = 12;
  localparam int unsigned FIR_OUT_W  = FIR_IN_W + FIR_COEF_W;   // 24

  typedef logic signed [FIR_COEF_W-1:0] fir_coef_t;
  localparam fir_coef_t FIR_COEF [FIR_TAPS] = '{
    12'sd0, -12'sd8, 12'sd0, 12'sd36, 12'sd0, -12'sd117, 12'sd0, 12'sd474,
    12'sd771,
    12'sd474, 12'sd0, -12'sd117, 12'sd0, 12'sd36, 12'sd0, -12'sd8, 12'sd0
  };

  // ---------------- IIR (recursive benchmark) ----------------
  localparam int unsigned IIR_ORDER  = 8;
  localparam int unsigned IIR_IN_W   = 16;
  localparam int unsigned IIR_GAIN_W = 16;                     // log2 of DC gain
  localparam int unsigned IIR_OUT_W  = IIR_IN_W + IIR_GAIN_W;  // 32
  localparam int unsigned IIR_FRAC   = 8;                      // feedback fraction bits

  // Feed-forward taps b_k = C(8,k), k = 0..8.
  localparam int IIR_B [IIR_ORDER+1] = '{1, 8, 28, 56, 70, 56, 28, 8, 1};
  // Feedback taps for y[n-k], k = 1..8 (index 0 unused), times 2^IIR_FRAC:
  // -a_k = -C(8,k) * (-0.5)^k  ->  4, -7, 7, -4.375, 1.75, -0.4375, 0.0625, -0.00390625
  localparam int IIR_A [IIR_ORDER+1] = '{0, 1024, -1792, 1792, -1120, 448, -112, 16, -1};

  // ---------------- Reduced-precision replica ----------------
  localparam int unsigned FIR_BR_DEFAULT = 5;   // replica input bits, FIR knee point
  localparam int unsigned IIR_BR_DEFAULT = 5;   // replica input bits, IIR knee point

  // ---------------- Supply and error-rate control ----------------
  typedef logic [10:0] vdd_mv_t;                // supply voltage in millivolts
  localparam vdd_mv_t VDD_MIN_MV  = 11'd600;
  localparam vdd_mv_t VDD_MAX_MV  = 11'd1100;
  localparam vdd_mv_t VDD_STEP_MV = 11'd20;
  localparam int unsigned MON_PERIOD = 1000;    // monitoring period N, clock cycles
  localparam int unsigned ER_TH_PCT  = 2;       // error-rate threshold ER_th, percent

  // ---------------- Timing ----------------
  localparam int unsigned TCLK_PS = 1538;       // 650 MHz

endpackage
