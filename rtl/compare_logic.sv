// compare_logic: FULL/EMPTY flags and occupancy counter, pipelined.
//
// The flags come from comparing the write and read pointers. Both pointers
// are {lap, address}; the buffer is empty when they are equal, and full
// when the addresses are equal but the laps differ (the writer is one whole
// lap ahead of the reader). The count is the distance between them.
//
// Instead of comparing the registered pointers, which would put the
// comparator after the pointer registers on the flag path, this block
// compares the pointers' look-ahead values one cycle early and stores the
// predicted flags and count in flip-flops. At the rising edge where the
// pointers move, the flags move with them, straight out of a register.
// Those registers are clock gating flip-flops (cg_dff): a flag bit is
// clocked only in the cycles where it changes.
//
// Interface and timing:
//   clk          free-running clock
//   rst          asynchronous, active-high: empty=1, full=0, count=0
//   wr_ptr_nxt   write pointer after the next rising edge
//   rd_ptr_nxt   read pointer after the next rising edge
//   buf_full, buf_empty, fifo_counter   registered, valid for the current
//                pointers; must see their look-ahead inputs settled by
//                the falling clock edge
module compare_logic #(
  parameter int unsigned DEPTH = fifo_pkg::FIFO_DEPTH,
  parameter int unsigned AW    = fifo_pkg::addr_bits(DEPTH),
  parameter int unsigned CW    = fifo_pkg::count_bits(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [AW:0]   wr_ptr_nxt,
  input  logic [AW:0]   rd_ptr_nxt,
  output logic          buf_full,
  output logic          buf_empty,
  output logic [CW-1:0] fifo_counter
);
  logic          full_nxt, empty_nxt;
  logic [CW-1:0] count_nxt;
  logic          same_addr, same_lap;

  always_comb begin
    same_addr = (wr_ptr_nxt[AW-1:0] == rd_ptr_nxt[AW-1:0]);
    same_lap  = (wr_ptr_nxt[AW] == rd_ptr_nxt[AW]);
    empty_nxt = same_addr &  same_lap;
    full_nxt  = same_addr & ~same_lap;
    if (same_lap)
      count_nxt = CW'(wr_ptr_nxt[AW-1:0]) - CW'(rd_ptr_nxt[AW-1:0]);
    else
      count_nxt = CW'(DEPTH) - CW'(rd_ptr_nxt[AW-1:0]) + CW'(wr_ptr_nxt[AW-1:0]);
  end

  // Flag and counter pipeline registers: {full, empty, count}.
  cg_reg #(
    .WIDTH     (CW + 2),
    .RESET_VAL ({1'b0, 1'b1, {CW{1'b0}}})
  ) u_flags (
    .clk (clk),
    .rst (rst),
    .d   ({full_nxt, empty_nxt, count_nxt}),
    .q   ({buf_full, buf_empty, fifo_counter})
  );
endmodule
