// fifo_pointer: circular write or read pointer of the FIFO.
//
// The pointer walks the buffer's words in order, 0, 1, ..., DEPTH-1, and
// wraps back to 0, so the memory is used as a ring. Besides the word
// address it keeps a lap bit that toggles at every wrap; comparing the lap
// bits of the write and read pointers tells a full buffer from an empty one.
// The same module serves as write pointer (advanced by accepted writes) and
// read pointer (advanced by accepted reads).
//
// The pointer register is meant to sit on a gated clock that pulses only
// when `inc` is set, so it is not clocked in idle cycles; it also works on
// a free-running clock, since it adds `inc` to itself.
//
// Interface and timing:
//   clk      (gated) clock, rising edge
//   rst      asynchronous, active-high; pointer to word 0, lap 0
//   inc      advance by one word at the next rising edge
//   ptr      {lap, address}, registered
//   ptr_nxt  {lap, address} after the next rising edge (look-ahead),
//            used by the compare logic to predict the flags
module fifo_pointer #(
  parameter int unsigned DEPTH = fifo_pkg::FIFO_DEPTH,
  parameter int unsigned AW    = fifo_pkg::addr_bits(DEPTH)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        inc,
  output logic [AW:0] ptr,
  output logic [AW:0] ptr_nxt
);
  logic [AW-1:0] addr;
  logic          lap;

  assign addr = ptr[AW-1:0];
  assign lap  = ptr[AW];

  always_comb begin
    ptr_nxt = ptr;
    if (inc) begin
      if (addr == AW'(DEPTH - 1)) ptr_nxt = {~lap, AW'(0)};
      else                        ptr_nxt = {lap, addr + AW'(1)};
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) ptr <= '0;
    else     ptr <= ptr_nxt;
  end
endmodule
