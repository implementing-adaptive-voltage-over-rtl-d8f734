`timescale 1ps/1ps
// tb_emu: checks the Error Management Unit with a 10-cycle monitoring period.
// The testbench behaves like a bank of TunED sensors: 300 ps after a clock
// edge that reached the circuit it raises or clears the OR-ed flag at random
// (about one cycle in four raised), and after a withheld edge it leaves the
// flag as it was, as the halted sensors would. Checked on every reference
// edge: an edge following a flagged cycle is withheld, exactly one edge in a row
// (never two), clk_en predicts it, and gclk rises exactly when clk_en = 1. At the
// end of every period, ne must equal the number of withheld edges in it, with
// ne_valid high for one cycle only.
module tb_emu;
  localparam int N = 10;
  localparam int CW = $clog2(N + 1);
  localparam int T = 1000;
  int checks = 0, failures = 0, n_halt = 0, n_period = 0;

  logic ref_clk = 1'b0, rst_n = 1'b0, err_any = 1'b0;
  logic gclk, clk_en, ne_valid;
  logic [CW-1:0] ne;

  always #(T/2) ref_clk = ~ref_clk;

  emu #(.N(N)) dut (.ref_clk, .rst_n, .err_any, .gclk, .clk_en, .ne, .ne_valid);

  int gclk_edges = 0;
  always @(posedge gclk) gclk_edges++;

  initial begin
    int k = 0, win = 0, edges_before;
    bit prev_halt = 1'b0, exp_en, flagged;
    @(negedge ref_clk); #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      flagged = err_any;
      exp_en = !(flagged && !prev_halt);
      edges_before = gclk_edges;
      @(posedge ref_clk);
      checks++;
      if (clk_en !== exp_en) begin
        failures++;
        if (failures < 10) $display("edge %0d: clk_en %b exp %b", k, clk_en, exp_en);
      end
      #1;
      checks++;
      if ((gclk_edges - edges_before) != int'(exp_en)) begin
        failures++;
        if (failures < 10) $display("edge %0d: gclk edges %0d exp %b", k, gclk_edges - edges_before, exp_en);
      end
      if (!exp_en) begin n_halt++; win++; end
      prev_halt = !exp_en;
      checks++;
      if (k % N == N - 1) begin
        if (!ne_valid || int'(ne) != win) begin
          failures++;
          if (failures < 10) $display("period end at edge %0d: ne %0d valid %b exp %0d", k, ne, ne_valid, win);
        end
        win = 0;
        n_period++;
      end else if (ne_valid) begin
        failures++;
        if (failures < 10) $display("edge %0d: stray ne_valid", k);
      end
      k++;
      // Sensor flags settle one window after an edge the circuit saw.
      if (exp_en) begin
        #299;
        err_any = ($urandom_range(0, 3) == 0);
      end
      @(negedge ref_clk);
    end
    checks++;
    if (n_halt == 0) failures++;
    $display("withheld edges %0d over %0d periods", n_halt, n_period);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
