// tb_dp_mem: self-checking test of the 128 x 128-bit dual-port memory.
//
// Every word is written once with random data and read back; then random
// writes and reads on both ports in the same cycle are compared with an
// array kept by the testbench, including cycles with the write enable low
// (nothing may change) and reads of the word being written (the read port
// shows the old word until the edge, the new one after it).
module tb_dp_mem;
  import fifo_pkg::*;
  localparam int unsigned DEPTH = FIFO_DEPTH;
  localparam int unsigned WIDTH = FIFO_WIDTH;
  localparam int unsigned AW    = addr_bits(DEPTH);

  logic             wclk = 1'b0;
  logic             we = 1'b0;
  logic [AW-1:0]    waddr = '0, raddr = '0;
  logic [WIDTH-1:0] wdata = '0, rdata;

  dp_mem dut (.*);

  always #5 wclk = ~wclk;

  int checks = 0, failures = 0;
  logic [WIDTH-1:0] ref_mem [DEPTH];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [WIDTH-1:0] rand_word();
    logic [WIDTH-1:0] w;
    for (int i = 0; i < WIDTH; i += 32) w[i +: 32] = $urandom;
    return w;
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge wclk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    @(posedge wclk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      we = 1'b1; waddr = AW'(a); wdata = rand_word();
      ref_mem[a] = wdata;
      @(posedge wclk); #1;
    end
    we = 1'b0;
    for (int a = 0; a < DEPTH; a++) begin
      raddr = AW'(a); #1;
      check(rdata == ref_mem[a], $sformatf("read back word %0d", a));
    end
    for (int i = 0; i < 4000; i++) begin
      we    = 1'($urandom % 3 != 0);
      waddr = AW'($urandom % DEPTH);
      raddr = (i % 8 == 0) ? waddr : AW'($urandom % DEPTH);
      wdata = rand_word();
      #1;
      check(rdata == ref_mem[raddr], "read port before the edge");
      @(posedge wclk); #1;
      if (we) ref_mem[waddr] = wdata;
      check(rdata == ref_mem[raddr], "read port after the edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
