// tb_write_interface: self-checking test of the FIFO's write side.
//
// wr_en, buf_full and buf_in are changed at random 1 time unit after each
// rising edge. The push strobe must be wr_en AND NOT buf_full, the data
// must reach the memory port unchanged, and the gated write clock must
// pulse at the next rising edge exactly when push was set, and be low in
// every other cycle.
module tb_write_interface;
  localparam int unsigned WIDTH = 128;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic wr_en = 1'b0, buf_full = 1'b0;
  logic [WIDTH-1:0] buf_in = '0, wdata;
  logic push, wclk;

  write_interface dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pulses = 0, pushes = 0, refused = 0;

  always @(posedge wclk) if (!rst) pulses++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    bit exp_push;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      wr_en    = 1'($urandom % 2);
      buf_full = 1'($urandom % 4 == 0);
      for (int b = 0; b < WIDTH; b += 32) buf_in[b +: 32] = $urandom;
      exp_push = wr_en && !buf_full;
      if (exp_push) pushes++;
      if (wr_en && buf_full) refused++;
      #1;
      check(push == exp_push, "push = wr_en and not FULL");
      check(wdata == buf_in,  "write data to the memory port");
      @(posedge clk); #1;
      check(wclk == exp_push, $sformatf("cycle %0d: write clock %0b, push %0b", i, wclk, exp_push));
    end
    check(pulses == pushes, $sformatf("write clock pulses %0d, pushes %0d", pulses, pushes));
    check(refused > 0, "writes refused while FULL");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
