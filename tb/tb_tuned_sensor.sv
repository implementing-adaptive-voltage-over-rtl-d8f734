`timescale 1ps/1ps
// tb_tuned_sensor: checks a 4-bit TunED sensor bank with a 1000 ps clock and a
// 300 ps detection window (the shadow clock is the main clock delayed here).
// Each cycle, a new random data word is applied at a chosen time relative to
// the rising edge it is meant for:
//   on time   (200 ps before the edge): no flag, q = new word;
//   in window (100 ps after the edge):  flag on every changed bit, and q must
//             still equal the new word thanks to the inverting correction;
//   too late  (400 ps after the edge, beyond the window): no flag, q keeps the
//             stale word (a missed detection).
// q and err are checked 450 ps after each edge, when the window has closed,
// and, in the on-time cycle that follows a flagged one, also 100 ps after the
// edge: the old flag must be cleared by the edge itself.
module tb_tuned_sensor;
  localparam int W = 4;
  localparam int T = 1000;
  localparam int TDW = 300;
  int checks = 0, failures = 0;
  int n_on = 0, n_win = 0, n_late = 0;

  logic clk = 1'b0, clk_tdw = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0, q, err;

  always #(T/2) clk = ~clk;
  always @(clk) clk_tdw <= #(TDW) clk;

  tuned_sensor #(.W(W)) dut (.clk, .clk_tdw, .rst_n, .d, .q, .err);

  initial begin
    logic [W-1:0] old_v, new_v, exp_q, exp_err;
    int mode;
    @(negedge clk); rst_n = 1'b1;
    old_v = d;
    for (int i = 0; i < 600; i++) begin
      // Now at a falling edge, T/2 before the next rising edge.
      new_v = W'($urandom);
      // In-window, then on-time (checks that a flag is cleared by the next
      // edge), then too late.
      mode  = (i % 3 == 0) ? 1 : (i % 3 == 1) ? 0 : 2;
      case (mode)
        0: begin
          #(T/2 - 200); d = new_v; #200;
          // 100 ps after the edge, inside the window: the previous cycle's
          // flag must already be gone and q must show the new word.
          #100;
          checks += 2;
          if (err !== '0) begin
            failures++;
            if (failures < 10) $display("i=%0d stale flag %b", i, err);
          end
          if (q !== new_v) begin
            failures++;
            if (failures < 10) $display("i=%0d q %h right after edge, exp %h", i, q, new_v);
          end
        end
        1: begin #(T/2 + 100); d = new_v; end
        default: begin #(T/2 + 400); d = new_v; end
      endcase
      // Align to 450 ps after the edge.
      case (mode)
        0: #350;
        1: #350;
        default: #50;
      endcase
      if (mode == 0) begin exp_q = new_v; exp_err = '0; n_on++; end
      else if (mode == 1) begin exp_q = new_v; exp_err = new_v ^ old_v; n_win++; end
      else begin exp_q = old_v; exp_err = '0; n_late++; end
      checks += 2;
      if (err !== exp_err) begin
        failures++;
        if (failures < 10) $display("i=%0d mode %0d err %b exp %b", i, mode, err, exp_err);
      end
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("i=%0d mode %0d q %h exp %h", i, mode, q, exp_q);
      end
      // The main flip-flop now holds the value it sampled; a late word is seen
      // as already present at the next edge.
      old_v = (mode == 2) ? old_v : new_v;
      if (mode == 2) begin
        // Let the next edge sample the late word properly, with no flag.
        @(posedge clk); #450;
        checks += 2;
        if (err !== '0) failures++;
        if (q !== new_v) failures++;
        old_v = new_v;
      end
      @(negedge clk);
    end
    $display("on time %0d, caught in window %0d, missed %0d", n_on, n_win, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
