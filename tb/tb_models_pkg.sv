`timescale 1ps/1ps
// tb_models_pkg: bit-exact reference models of the two benchmark filters, used
// by the testbenches to compute expected outputs independently of the RTL.
//   FIR: y[n] = sum_k c_k x[n-k] with the coefficient table of avos_pkg.
//   IIR: y[n] = floor((256 * sum_k C(8,k) x[n-k]
//                      + sum_{k>=1} -C(8,k) (-1)^k 2^(8-k) y[n-k]) / 256),
//        saturated to the output width; the taps are computed here from the
//        binomial formula, not read from avos_pkg.
// make_audio builds the synthetic three-class test stream used by the workload
// sweeps (this design's stand-in for the audio recordings, which are not
// available).
package tb_models_pkg;
  import avos_pkg::*;

  function automatic longint binom8(int k);
    longint r = 1;
    for (longint i = 0; i < longint'(k); i++) r = r * (8 - i) / (i + 1);
    return r;
  endfunction

  // x history: xs[n] is the n-th input; missing (negative index) samples are 0.
  function automatic longint fir_ref(const ref longint xs[$], input int n);
    longint acc = 0;
    for (int k = 0; k < int'(FIR_TAPS); k++)
      if (n - k >= 0) acc += longint'(FIR_COEF[k]) * xs[n-k];
    return acc;
  endfunction

  function automatic longint iir_ref(const ref longint xs[$], const ref longint ys[$],
                                     input int n, input int out_w);
    longint acc = 0;
    longint y, ymax, ymin;
    for (int k = 0; k <= 8; k++)
      if (n - k >= 0) acc += 256 * binom8(k) * xs[n-k];
    for (int k = 1; k <= 8; k++)
      if (n - k >= 0) acc += -binom8(k) * ((k % 2 != 0) ? -1 : 1) * (longint'(1) <<< (8 - k)) * ys[n-k];
    y = acc >>> 8;
    ymax = (longint'(1) <<< (out_w - 1)) - 1;
    ymin = -(longint'(1) <<< (out_w - 1));
    if (y > ymax) y = ymax;
    if (y < ymin) y = ymin;
    return y;
  endfunction

  // Sign-extend the low w bits of v.
  function automatic longint sext(longint v, int w);
    return (v <<< (64 - w)) >>> (64 - w);
  endfunction

  // Synthetic stand-in for three classes of baseband audio, total samples,
  // peak amplitude amp, one third each:
  //   class 1, quiet voice: tone bursts of slowly varying loudness separated by
  //     silence, so the low bits stay still for long stretches;
  //   class 2, office speech: two tones plus low noise, steady activity;
  //   class 3, noisy outdoor speech: a random walk with large steps and abrupt
  //     jumps to a new level.
  function automatic void make_audio(ref longint s[$], input int total, input int amp);
    int third = total / 3;
    int walk = 0;
    real pi2 = 6.283185307179586;
    s.delete();
    for (int n = 0; n < total; n++) begin
      real v;
      if (n < third) begin
        int ph = n % 2000;
        v = (ph < 700) ? 0.8 * $sin(pi2 * n / 37.0) * $sin(3.1415926 * ph / 700.0) : 0.0;
      end else if (n < 2 * third) begin
        v = 0.5 * $sin(pi2 * n / 53.0) + 0.3 * $sin(pi2 * n / 11.3)
            + (real'($urandom_range(0, 32)) - 16.0) / real'(amp);
      end else begin
        int step = amp / 6;
        if ($urandom_range(0, 149) == 0) walk = int'($urandom_range(0, 2 * amp)) - amp;
        else walk += int'($urandom_range(0, 2 * step)) - step;
        if (walk > amp) walk = amp;
        if (walk < -amp) walk = -amp;
        v = real'(walk) / real'(amp);
      end
      s.push_back(longint'($rtoi(v * amp)));
    end
  endfunction

endpackage
