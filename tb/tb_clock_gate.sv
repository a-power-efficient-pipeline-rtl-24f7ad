// tb_clock_gate: self-checking test of the AND-gate clock gating cell.
//
// The enable is changed at random 1 time unit after each rising edge, as
// rising-edge logic would change it. The testbench checks that the gated
// clock is high during a clock-high phase exactly when the enable was set
// in the cycle before, that it is low in every low phase, that an enable
// change during a high phase does not reach the gated clock before the
// next edge, and that the number of gated pulses equals the number of enabled cycles.
module tb_clock_gate;
  logic clk = 1'b0;
  logic rst = 1'b0;
  logic en  = 1'b0;
  logic gclk;

  clock_gate dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pulses = 0, enabled = 0;

  always @(posedge gclk) if (!rst) pulses++;

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
    bit e, e_prev;
    e_prev = 1'b0;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      e  = (i < 10) ? 1'b0 : (i < 20) ? 1'b1 : 1'($urandom % 2);
      en = e;
      if (e) enabled++;
      #1;                          // still in the high phase
      check(gclk == e_prev, "enable change leaked into the high phase");
      e_prev = e;
      @(negedge clk); #1;
      check(gclk == 1'b0, "gated clock high in a low phase");
      @(posedge clk); #1;
      check(gclk == e, $sformatf("cycle %0d: gclk=%0b, enable was %0b", i, gclk, e));
    end
    check(pulses == enabled, $sformatf("pulses %0d, enabled cycles %0d", pulses, enabled));
    check(pulses < 2000, "fewer gated pulses than clock cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
