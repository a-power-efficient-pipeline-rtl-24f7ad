// cg_reg: a WIDTH-bit register built from cg_dff clock gating flip-flops.
//
// Every bit has its own XOR/AND clock gate, so only the bits that change
// are clocked. Used for the FIFO's pipelined flag and counter registers.
// Timing as for cg_dff: D must be settled by the falling clock edge, Q
// follows at the next rising edge.
module cg_reg #(
  parameter int unsigned      WIDTH     = 1,
  parameter logic [WIDTH-1:0] RESET_VAL = '0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic gclk_unused;
    cg_dff #(.RESET_VAL(RESET_VAL[i])) u_ff (
      .clk  (clk),
      .rst  (rst),
      .d    (d[i]),
      .q    (q[i]),
      .gclk (gclk_unused)
    );
  end
endmodule
