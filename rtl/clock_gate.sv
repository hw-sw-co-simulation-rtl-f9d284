// clock_gate: glitch-free clock enable for the emulated digital controller,
// the function of an FPGA clock buffer with enable.
//
// The enable is sampled on the falling edge of clk and ANDed with clk. Since
// the sampled enable can only change while clk is low, gclk never carries a
// shortened pulse. Timing: an enable that is high at a rising edge of clk
// (set up by the preceding rising edge, like any register output) lets that
// rising edge through as a rising edge of gclk; the number of gclk pulses thus
// equals the number of clk cycles at whose start en is high.
//
// Gating the controller clock rather than adding an enable to the controller
// follows the original proposal, which keeps the emulated controller unmodified. The
// falling-edge register in place of a latch is this design's choice; on an
// FPGA the module stands for the vendor's enabled clock buffer.
module clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,      // let the next rising edge through
  output logic gclk     // gated clock
);

  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b0;
    else        en_q <= en;
  end

  assign gclk = clk & en_q;

endmodule
