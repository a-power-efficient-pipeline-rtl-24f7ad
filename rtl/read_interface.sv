// read_interface: read side of the FIFO.
//
// A read request is accepted only while the FIFO is not EMPTY; a request
// made while EMPTY is ignored, so the buffer never underflows. The
// accepted read (pop) advances the read pointer and gates the read-side
// clock: the read pointer and the output data register are clocked by
// rclk, which pulses only in cycles that carry a read. At that edge the
// output register takes the word the read pointer addresses, so buf_out
// shows the popped word from the rising edge that accepts the read and
// holds it until the next accepted read.
//
// Interface and timing:
//   clk, rst   free-running clock, asynchronous active-high reset
//              (clears buf_out)
//   rd_en      read request; must be settled by the falling clock edge
//   buf_empty  EMPTY flag from the compare logic
//   rdata      word at the read pointer, from the memory's read port
//   pop        read accepted this cycle (rd_en and not EMPTY)
//   rclk       gated read clock
//   buf_out    registered read data
module read_interface #(
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             rd_en,
  input  logic             buf_empty,
  input  logic [WIDTH-1:0] rdata,
  output logic             pop,
  output logic             rclk,
  output logic [WIDTH-1:0] buf_out
);
  assign pop = rd_en & ~buf_empty;

  clock_gate u_rd_gate (
    .clk  (clk),
    .rst  (rst),
    .en   (pop),
    .gclk (rclk)
  );

  always_ff @(posedge rclk or posedge rst) begin
    if (rst) buf_out <= '0;
    else     buf_out <= rdata;
  end
endmodule
