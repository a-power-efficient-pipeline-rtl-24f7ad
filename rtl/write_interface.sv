// write_interface: write side of the FIFO.
//
// A write request is accepted only while the FIFO is not FULL; a request
// made while FULL is dropped, so the buffer never overflows. The accepted
// write (push) drives the write pointer's increment and the memory's write
// enable, and it gates the write-side clock: the memory write port and the
// write pointer are clocked by wclk, which pulses only in cycles that
// carry a write. Write data passes straight to the memory's write port.
//
// Interface and timing:
//   clk, rst   free-running clock, asynchronous active-high reset
//   wr_en      write request; must be settled by the falling clock edge
//              (drive it from rising-edge logic)
//   buf_in     write data; usual setup time to the rising edge
//   buf_full   FULL flag from the compare logic
//   push       write accepted this cycle (wr_en and not FULL)
//   wclk       gated write clock
//   wdata      data to the memory write port
module write_interface #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] buf_in,
  input  logic             buf_full,
  output logic             push,
  output logic             wclk,
  output logic [WIDTH-1:0] wdata
);
  assign push  = wr_en & ~buf_full;
  assign wdata = buf_in;

  clock_gate u_wr_gate (
    .clk  (clk),
    .rst  (rst),
    .en   (push),
    .gclk (wclk)
  );
endmodule
