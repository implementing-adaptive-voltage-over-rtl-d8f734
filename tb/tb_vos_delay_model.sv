`timescale 1ps/1ps
// tb_vos_delay_model: checks the supply-dependent arrival model on a 24-bit
// word. At 1.10 V bit 0 must arrive 150 ps and bit 23 1300 ps after it
// changes; at lower supplies every arrival must be scaled by the alpha-power
// law (threshold 0.35 V, alpha 1.3), recomputed here; a bit that does not
// change must not move.
module tb_vos_delay_model;
  import avos_pkg::*;
  localparam int W = 24;
  int checks = 0, failures = 0;

  logic [W-1:0] din = '0, dout;
  vdd_mv_t vdd_mv = 11'd1100;

  vos_delay_model #(.W(W), .AT_MIN_PS(150), .AT_MAX_PS(1300)) dut (.din, .vdd_mv, .dout);

  function automatic real s_of(int mv);
    real v = real'(mv) / 1000.0;
    return (v / ((v - 0.35) ** 1.3)) / (1.1 / ((1.1 - 0.35) ** 1.3));
  endfunction

  task automatic measure(int bit_i, int mv);
    real exp_t;
    realtime t0;
    int dt;
    vdd_mv = 11'(mv);
    #10;
    t0 = $realtime;
    din[bit_i] = ~din[bit_i];
    exp_t = (150.0 + (1300.0 - 150.0) * real'(bit_i) / 23.0) * s_of(mv);
    wait (dout[bit_i] == din[bit_i]);
    dt = int'($realtime - t0);
    checks++;
    if (dt < int'(exp_t) - 1 || dt > int'(exp_t) + 1) begin
      failures++;
      $display("bit %0d at %0d mV: arrived after %0d ps, expected %0.1f", bit_i, mv, dt, exp_t);
    end
    checks++;
    if (dout !== din) begin
      failures++;
      $display("bit %0d at %0d mV: other bits moved, dout %h din %h", bit_i, mv, dout, din);
    end
    #3000;
  endtask

  initial begin
    #5000;
    measure(0, 1100);
    measure(23, 1100);
    measure(11, 1100);
    for (int i = 0; i < 40; i++)
      measure(int'($urandom_range(0, W - 1)), 600 + 20 * int'($urandom_range(0, 25)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
