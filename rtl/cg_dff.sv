// cg_dff: latch-free clock gating D flip-flop.
//
// An XOR gate compares the flip-flop's input D with its output Q. Only when
// they differ does the XOR enable an AND gate that passes the clock on to
// the flip-flop as its gated clock. A flip-flop whose value would not
// change therefore receives no clock edge, and the gated clock has fewer
// pulses than the system clock: one per change of D, none otherwise.
//
// The XOR/AND structure is the design's. As in clock_gate, the XOR result
// is sampled on the falling clock edge before it reaches the AND gate, so
// a D that changes during the high phase (as it does when driven by other
// rising-edge registers) cannot create an extra edge. This is this cell's
// own choice; the price is that D must be settled by the falling edge.
//
// Interface and timing:
//   clk   free-running clock; Q takes D at a rising edge if D != Q was
//         seen at the preceding falling edge
//   rst   asynchronous, active-high; loads RESET_VAL
//   d, q  data in and out
//   gclk  the flip-flop's gated clock, brought out for observation
module cg_dff #(
  parameter logic RESET_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst,
  input  logic d,
  output logic q,
  output logic gclk
);
  logic differ;       // XOR of D and Q
  logic differ_hold;  // XOR result held over the high clock phase

  assign differ = d ^ q;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) differ_hold <= 1'b0;
    else     differ_hold <= differ;
  end

  assign gclk = clk & differ_hold;

  always_ff @(posedge gclk or posedge rst) begin
    if (rst) q <= RESET_VAL;
    else     q <= d;
  end
endmodule
