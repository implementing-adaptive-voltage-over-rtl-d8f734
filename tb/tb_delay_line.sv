`timescale 1ps/1ps
// tb_delay_line: checks the tunable delay line model. For random delay
// settings, each edge of each bit must reappear exactly delay_ps later and not
// before; a pulse shorter than the delay must be absorbed (inertial delay),
// while a pulse longer than the delay passes with its width kept; bits are
// delayed independently.
module tb_delay_line;
  localparam int W = 3;
  int checks = 0, failures = 0;

  logic [W-1:0] din = '0, dout;
  logic [15:0]  delay_ps = 16'd100;

  delay_line #(.W(W)) dut (.din, .delay_ps, .dout);

  initial begin
    #1000;
    for (int i = 0; i < 200; i++) begin
      logic [W-1:0] v, prev;
      int dly;
      dly = int'($urandom_range(20, 700));
      delay_ps = 16'(dly);
      prev = din;
      v = W'($urandom);
      if (v == prev) v = ~prev;
      din = v;
      #(dly - 1);
      checks++;
      if (dout !== prev) begin
        failures++;
        if (failures < 10) $display("early: delay %0d dout %b exp %b", dly, dout, prev);
      end
      #2;
      checks++;
      if (dout !== v) begin
        failures++;
        if (failures < 10) $display("late: delay %0d dout %b exp %b", dly, dout, v);
      end
      #(dly + 10);
    end
    // A 50 ps pulse through a 300 ps line is absorbed ...
    delay_ps = 16'd300;
    din = '0;
    #1000;
    din[1] = 1'b1; #50; din[1] = 1'b0;
    for (int t = 0; t < 400; t += 10) begin
      #10;
      checks++;
      if (dout !== '0) begin failures++; $display("short pulse passed: %b", dout); end
    end
    // ... a 400 ps pulse on bit 2 passes, 300 ps late, 400 ps wide.
    #1000;
    din[2] = 1'b1; #400; din[2] = 1'b0;
    #(300 - 400 - 1 + 400);
    checks++;
    if (dout !== 3'b100) begin failures++; $display("long pulse missing: %b", dout); end
    #2;
    checks++;
    if (dout !== 3'b000) begin failures++; $display("long pulse too long: %b", dout); end
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
