`timescale 1ps/1ps
// tb_ant_detector: checks the ANT decision unit. Random main/replica pairs are
// applied with random thresholds, including differences just at and just above
// the threshold, differences of both signs and full-scale values. One cycle
// after the inputs, y must be the main value when |ym - yr| <= e_th and the
// replica value otherwise, with ant_err set exactly in the second case.
module tb_ant_detector;
  localparam int YW = 24;
  int checks = 0, failures = 0, n_sub = 0, n_keep = 0;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic signed [YW-1:0] ym_d, yr_d, y;
  logic        [YW-1:0] e_th;
  logic                 ant_err;

  ant_detector #(.YW(YW)) dut (.clk, .rst_n, .ym_d, .yr_d, .e_th, .y, .ant_err);

  initial begin
    ym_d = '0; yr_d = '0; e_th = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      longint a, b, d, th;
      bit exp_err;
      th = longint'($urandom_range(0, 1 << 12));
      a  = longint'($signed(YW'($urandom)));
      case (i % 5)
        0: b = a + th;                          // exactly at threshold: keep
        1: b = a - th - 1;                      // just above: substitute
        2: b = a + longint'($urandom_range(0, 1 << 14)) - (1 << 13);
        3: b = (i % 2) ? -(longint'(1) << (YW - 1)) : (longint'(1) << (YW - 1)) - 1;
        default: b = longint'($signed(YW'($urandom)));
      endcase
      if (b >  (longint'(1) << (YW - 1)) - 1) b = (longint'(1) << (YW - 1)) - 1;
      if (b < -(longint'(1) << (YW - 1)))     b = -(longint'(1) << (YW - 1));
      ym_d = YW'(a); yr_d = YW'(b); e_th = YW'(th);
      @(posedge clk); #1;
      d = a - b;
      if (d < 0) d = -d;
      exp_err = d > th;
      checks += 2;
      if (ant_err !== exp_err) begin
        failures++;
        if (failures < 10) $display("err flag: ym=%0d yr=%0d th=%0d got %b", a, b, th, ant_err);
      end
      if (longint'(y) != (exp_err ? b : a)) begin
        failures++;
        if (failures < 10) $display("output: ym=%0d yr=%0d th=%0d got %0d", a, b, th, y);
      end
      if (exp_err) n_sub++; else n_keep++;
    end
    checks++;
    if (n_sub == 0 || n_keep == 0) failures++;
    $display("substitutions %0d, main kept %0d", n_sub, n_keep);
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
