// tb_read_interface: self-checking test of the FIFO's read side.
//
// rd_en, buf_empty and the memory's read word are changed at random 1 time
// unit after each rising edge. The pop strobe must be rd_en AND NOT
// buf_empty; the gated read clock must pulse at the next rising edge
// exactly when pop was set; and buf_out must then take the read word and
// hold it through every cycle without a pop.
module tb_read_interface;
  localparam int unsigned WIDTH = 128;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic rd_en = 1'b0, buf_empty = 1'b1;
  logic [WIDTH-1:0] rdata = '0, buf_out;
  logic pop, rclk;

  read_interface dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pulses = 0, pops = 0, refused = 0;
  logic [WIDTH-1:0] exp_out = '0;

  always @(posedge rclk) if (!rst) pulses++;

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
    bit exp_pop;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1;
    check(buf_out == '0, "output cleared by reset");
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      rd_en     = 1'($urandom % 2);
      buf_empty = 1'($urandom % 4 == 0);
      for (int b = 0; b < WIDTH; b += 32) rdata[b +: 32] = $urandom;
      exp_pop = rd_en && !buf_empty;
      if (exp_pop) begin
        pops++;
        exp_out = rdata;
      end
      if (rd_en && buf_empty) refused++;
      #1;
      check(pop == exp_pop, "pop = rd_en and not EMPTY");
      @(posedge clk); #1;
      check(rclk == exp_pop, $sformatf("cycle %0d: read clock %0b, pop %0b", i, rclk, exp_pop));
      check(buf_out == exp_out, "registered read data");
    end
    check(pulses == pops, $sformatf("read clock pulses %0d, pops %0d", pulses, pops));
    check(refused > 0, "reads refused while EMPTY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
