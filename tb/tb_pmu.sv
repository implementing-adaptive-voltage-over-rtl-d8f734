`timescale 1ps/1ps
// tb_pmu: checks the Power Management Unit at its default settings (N = 1000,
// ER_th = 2 %, so the threshold is 20 errors per period). Random error counts
// around the threshold, including 19 and 20 exactly, are reported; after each
// report the supply target must have moved 20 mV down (count < 20) or up
// (count >= 20), staying within 600..1100 mV. It starts at 1100 mV, must not
// move without ne_valid, and is driven to both rails.
module tb_pmu;
  import avos_pkg::*;
  int checks = 0, failures = 0, n_down = 0, n_up = 0, n_floor = 0, n_ceil = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [9:0] ne = '0;
  logic ne_valid = 1'b0;
  vdd_mv_t vdd_mv;

  pmu dut (.clk, .rst_n, .ne, .ne_valid, .vdd_mv);

  initial begin
    int model = 1100;
    @(negedge clk); rst_n = 1'b1;
    checks++;
    if (vdd_mv != 11'd1100) failures++;
    for (int i = 0; i < 600; i++) begin
      int v;
      // Phases: mostly low counts (supply falls to the floor), then mostly
      // high (rises to the ceiling), then mixed around the threshold.
      if (i < 40)        v = int'($urandom_range(0, 19));
      else if (i < 80)   v = int'($urandom_range(20, 500));
      else               v = 19 + int'($urandom_range(0, 1)) + ((i % 5 == 0) ? int'($urandom_range(0, 50)) : 0) - ((i % 7 == 0) ? 19 : 0);
      ne = 10'(v);
      ne_valid = 1'b1;
      @(negedge clk);
      ne_valid = 1'b0;
      if (v < 20) begin model = (model - 20 < 600) ? 600 : model - 20; n_down++; end
      else        begin model = (model + 20 > 1100) ? 1100 : model + 20; n_up++; end
      if (model == 600) n_floor++;
      if (model == 1100) n_ceil++;
      checks++;
      if (int'(vdd_mv) != model) begin
        failures++;
        if (failures < 10) $display("report %0d (ne=%0d): vdd %0d exp %0d", i, v, vdd_mv, model);
      end
      // Idle cycles with a changing count but no strobe must not move it.
      ne = 10'($urandom_range(0, 999));
      repeat (3) @(negedge clk);
      checks++;
      if (int'(vdd_mv) != model) failures++;
    end
    checks++;
    if (n_floor == 0 || n_ceil == 0) failures++;
    $display("down %0d up %0d, at floor %0d, at ceiling %0d", n_down, n_up, n_floor, n_ceil);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
