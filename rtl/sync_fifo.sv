// sync_fifo: power-efficient synchronous FIFO on a dual-port memory array,
// with clock gating and pipelined status flags.
//
// The buffer is a ring of DEPTH words of WIDTH bits (128 x 128 by
// default) held in a dual-port memory: one port writes, the other reads,
// both in the same clock domain. A write pointer and a read pointer chase
// each other round the ring; compare logic turns them into FULL, EMPTY and
// a word count. Writes while FULL and reads while EMPTY are refused.
//
// Power is saved in two ways. (1) Clock gating: the write side (memory
// write port, write pointer) runs on a gated clock that pulses only for
// accepted writes, the read side (read pointer, output register) on one
// that pulses only for accepted reads, and every flag/count bit sits in a
// flip-flop whose clock is gated by an XOR of its D and Q. (2) Pipelining:
// the flags are predicted from the pointers' next values a cycle ahead and
// stored in flip-flops, so they leave the FIFO straight from registers and
// change at the same edge as the pointers, with no comparator delay.
//
// Interface and timing (all on the rising edge of clk):
//   rst            asynchronous, active-high: FIFO empty, buf_out = 0
//   wr_en, buf_in  a write is accepted at a rising edge when wr_en is set
//                  and buf_full is clear
//   rd_en          a read is accepted at a rising edge when rd_en is set
//                  and buf_empty is clear; buf_out shows the word from
//                  that edge on
//   buf_full, buf_empty, fifo_counter  registered; they describe the FIFO
//                  after the last rising edge, so a word written at one
//                  edge can be read at the next, and one write and one
//                  read can be accepted in every cycle.
// wr_en and rd_en must be settled by the falling edge of clk, because the
// clock gates sample their enables there; drive them from rising-edge
// logic. buf_in needs only the usual setup time to the rising edge.
//
// The structure (write/read interface, two pointers, compare logic, dual
// port memory), the sizes, AND-gate and XOR/AND clock gating and the
// registered flags follow the design; the lap-bit pointer comparison, the
// falling-edge enable sampling, the asynchronous reset and the
// combinational memory read are this implementation's choices.
//
// Lint notes: the lap bits of the registered pointers are not used here
// (the memory needs only the addresses, the compare logic works on the
// look-ahead pointers), and rst is both the flops' asynchronous reset and
// the disable condition of the assertions below; both are intended.
module sync_fifo #(
  parameter int unsigned DEPTH = fifo_pkg::FIFO_DEPTH,
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  localparam int unsigned AW   = fifo_pkg::addr_bits(DEPTH),
  localparam int unsigned CW   = fifo_pkg::count_bits(DEPTH)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] buf_in,
  input  logic             rd_en,
  output logic [WIDTH-1:0] buf_out,
  output logic             buf_full,
  output logic             buf_empty,
  output logic [CW-1:0]    fifo_counter
);
  logic             push, pop;
  logic             wclk, rclk;         // gated write and read clocks
  logic [WIDTH-1:0] wdata, rdata;
  logic [AW:0]      wr_ptr, wr_ptr_nxt;
  logic [AW:0]      rd_ptr, rd_ptr_nxt;

  write_interface #(.WIDTH(WIDTH)) u_wr_if (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (wr_en),
    .buf_in   (buf_in),
    .buf_full (buf_full),
    .push     (push),
    .wclk     (wclk),
    .wdata    (wdata)
  );

  fifo_pointer #(.DEPTH(DEPTH)) u_wr_ptr (
    .clk     (wclk),
    .rst     (rst),
    .inc     (push),
    .ptr     (wr_ptr),
    .ptr_nxt (wr_ptr_nxt)
  );

  dp_mem #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_mem (
    .wclk  (wclk),
    .we    (push),
    .waddr (wr_ptr[AW-1:0]),
    .wdata (wdata),
    .raddr (rd_ptr[AW-1:0]),
    .rdata (rdata)
  );

  fifo_pointer #(.DEPTH(DEPTH)) u_rd_ptr (
    .clk     (rclk),
    .rst     (rst),
    .inc     (pop),
    .ptr     (rd_ptr),
    .ptr_nxt (rd_ptr_nxt)
  );

  compare_logic #(.DEPTH(DEPTH)) u_cmp (
    .clk          (clk),
    .rst          (rst),
    .wr_ptr_nxt   (wr_ptr_nxt),
    .rd_ptr_nxt   (rd_ptr_nxt),
    .buf_full     (buf_full),
    .buf_empty    (buf_empty),
    .fifo_counter (fifo_counter)
  );

  read_interface #(.WIDTH(WIDTH)) u_rd_if (
    .clk       (clk),
    .rst       (rst),
    .rd_en     (rd_en),
    .buf_empty (buf_empty),
    .rdata     (rdata),
    .pop       (pop),
    .rclk      (rclk),
    .buf_out   (buf_out)
  );

  // The flags must agree with the count and never both be set.
  a_flags_exclusive: assert property (@(posedge clk) disable iff (rst)
    !(buf_full && buf_empty));
  a_empty_means_zero: assert property (@(posedge clk) disable iff (rst)
    buf_empty == (fifo_counter == '0));
  a_full_means_depth: assert property (@(posedge clk) disable iff (rst)
    buf_full == (fifo_counter == CW'(DEPTH)));
endmodule
