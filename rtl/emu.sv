`timescale 1ps/1ps
// emu: Error Management Unit of the AED-C scheme.
//
// It takes the OR of all timing-sensor flags (err_any) and does two things.
// Adaptive clock: when a sensor flags an error, the next rising edge of the
// circuit clock is withheld, halting the circuit for exactly one cycle so that
// the value corrected inside the sensor propagates; the edge after that is
// always let through, whatever the flags still show. The gate is the usual
// latch-and-AND clock gate: a latch, open while ref_clk is low, holds the
// enable, and gclk = ref_clk AND enable. clk_en is that enable: it is stable
// while ref_clk is high, and a rising edge of ref_clk with clk_en = 1 is an edge
// the circuit saw (the input source may then present its next sample).
// Event counter: over each monitoring period of N reference-clock cycles it
// counts the halted cycles, i.e. the error events N_e, and presents the count
// on ne with a one-cycle ne_valid strobe at the end of the period, for the
// power management unit.
//
// The clock-enable latch is intended: it is the storage element of the clock
// gate. Withholding one edge per error and counting errors over N = 1000 cycles
// follow the EMU description; the latch-based gate, the forced release after
// one halted cycle and the count/strobe interface are this design's choices.
module emu
  import avos_pkg::*;
#(
  parameter int unsigned N    = MON_PERIOD,
  parameter int unsigned CW   = $clog2(N + 1)
) (
  input  logic          ref_clk,
  input  logic          rst_n,
  input  logic          err_any,    // OR of all sensor error flags
  output logic          gclk,       // gated circuit clock
  output logic          clk_en,     // enable of the coming ref_clk edge
  output logic [CW-1:0] ne,         // error events in the last period
  output logic          ne_valid    // one ref_clk cycle, at end of a period
);

  logic          halted_q;          // the present cycle follows a withheld edge
  logic          en_d;
  logic [CW-1:0] cyc;
  logic [CW-1:0] cnt;

  assign en_d = !(err_any && !halted_q);

  always_latch begin
    if (!rst_n)        clk_en = 1'b1;
    else if (!ref_clk) clk_en = en_d;
  end

  assign gclk = ref_clk & clk_en;

  always_ff @(posedge ref_clk or negedge rst_n) begin
    if (!rst_n) begin
      halted_q <= 1'b0;
      cyc      <= '0;
      cnt      <= '0;
      ne       <= '0;
      ne_valid <= 1'b0;
    end else begin
      halted_q <= !clk_en;
      ne_valid <= 1'b0;
      if (cyc == CW'(N - 1)) begin
        cyc      <= '0;
        cnt      <= '0;
        ne       <= cnt + CW'(!clk_en);
        ne_valid <= 1'b1;
      end else begin
        cyc <= cyc + 1'b1;
        cnt <= cnt + CW'(!clk_en);
      end
    end
  end

endmodule
