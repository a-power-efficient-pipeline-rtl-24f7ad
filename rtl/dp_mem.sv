// dp_mem: dual-port memory cell array, DEPTH words of WIDTH bits.
//
// One port only writes and the other only reads, each with its own address
// and data bus, so a write and a read can happen in the same cycle. The
// write port is synchronous: on a rising edge of wclk with `we` set, wdata
// is stored at waddr. In the FIFO wclk is the gated write clock, which
// pulses only for accepted writes. The read port is combinational: rdata
// shows the word at raddr, and the read interface registers it.
//
// The memory has no reset (its words are only read after being written).
// It is written as an array so that synthesis may map it to a RAM macro.
module dp_mem #(
  parameter int unsigned DEPTH = fifo_pkg::FIFO_DEPTH,
  parameter int unsigned WIDTH = fifo_pkg::FIFO_WIDTH,
  parameter int unsigned AW    = fifo_pkg::addr_bits(DEPTH)
) (
  // write port
  input  logic             wclk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  // read port
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
