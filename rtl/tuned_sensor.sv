`timescale 1ps/1ps
// tuned_sensor: a bank of W TunED timing sensors (Tunable Error Detection), one
// per monitored end-point bit, replacing the plain flip-flops there.
//
// Each bit has a main flip-flop clocked by clk. At the end of the detection
// window, the rising edge of clk_tdw (clk delayed by the tunable window TDW),
// the shadow element captures D xor Q_FF: a 1 means D changed after the main
// flip-flop had sampled it, i.e. a set-up violation that arrived inside the
// window. A change later than the window is not seen (a missed, "approximate"
// detection). When the flag is set the bit corrects itself by logic masking:
// q shows the inverse of the sampled value, which for a single bit is the value
// that arrived late. err carries each bit's flag to the error OR-tree.
//
// Timing: q follows the main flip-flop right after each clock edge and, where a
// flag is raised, is corrected at the end of the window. The flag then holds
// until the next clk edge and is cleared by it, so the following cycle starts
// from the plain flip-flop value. The clock must be withheld for one cycle
// after a flag (see emu) so that the corrected value reaches the next stage;
// the flag stays set through that halted cycle because no clk edge arrives.
//
// The main flip-flop, XOR detector and inverting output multiplexer follow the
// TunED circuit. The shadow element is a latch with a reset pin in the
// original; here it is a register that samples at the end of the window, and
// the reset is done by comparing two phase bits (one toggled by clk, one
// copied at the end of the window), so a flag is void from the next clk edge
// on. Both are this design's choices.
module tuned_sensor #(
  parameter int unsigned W = 24
) (
  input  logic         clk,       // (gated) circuit clock
  input  logic         clk_tdw,   // clk delayed by the detection window
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [W-1:0] err
);

  logic [W-1:0] q_ff;
  logic [W-1:0] flag;        // shadow capture of D xor Q_FF
  logic         phase_main;  // toggles on every clk edge
  logic         phase_tdw;   // phase_main as seen at the end of the window

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_ff       <= '0;
      phase_main <= 1'b0;
    end else begin
      q_ff       <= d;
      phase_main <= !phase_main;
    end
  end

  always_ff @(posedge clk_tdw or negedge rst_n) begin
    if (!rst_n) begin
      flag      <= '0;
      phase_tdw <= 1'b0;
    end else begin
      flag      <= d ^ q_ff;
      phase_tdw <= phase_main;
    end
  end

  // A flag counts from the end of its window until the next clk edge, which
  // clears it (the phases then differ) without waiting for the next window.
  assign err = (phase_tdw == phase_main) ? flag : '0;

  // Logic masking: select Q_FF (flag 0) or its complement (flag 1), per bit.
  assign q = q_ff ^ err;

endmodule
