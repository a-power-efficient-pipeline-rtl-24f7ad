// clock_gate: latch-free AND-gate clock gating cell.
//
// The gated clock is the free-running clock ANDed with an enable, so the
// registers behind it see a rising edge only in cycles where they have
// work to do; in idle cycles their clock net does not toggle at all.
//
// The AND gate is the gating element the design calls for. A bare AND gate
// glitches if its enable moves while the clock is high, and in a
// rising-edge design every register-driven enable moves just then. So the
// enable is first sampled by a falling-edge flip-flop (this cell's own
// choice, not a latch): it can only change while the clock is low, and the
// AND output is a clean copy of every clock pulse whose cycle had `en` set.
//
// Interface and timing:
//   clk   free-running clock
//   rst   asynchronous, active-high reset; clears the held enable
//   en    request for a clock pulse at the next rising edge; must be
//         settled by the falling edge before that rising edge
//   gclk  gated clock = clk & (en sampled at the last falling edge)
module clock_gate (
  input  logic clk,
  input  logic rst,
  input  logic en,
  output logic gclk
);
  logic en_hold;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) en_hold <= 1'b0;
    else     en_hold <= en;
  end

  assign gclk = clk & en_hold;
endmodule
