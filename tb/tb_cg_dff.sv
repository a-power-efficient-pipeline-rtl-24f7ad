// tb_cg_dff: self-checking test of the XOR/AND clock gating D flip-flop.
//
// D is changed 1 time unit after rising edges: first a fixed pattern with
// runs of equal values, then random values. After each rising edge Q must
// equal the D of the cycle before. The gated clock must pulse once for each
// change of D and never otherwise, so it has fewer pulses than the clock,
// as in the flip-flop's reference waveform. Both reset values are tested.
module tb_cg_dff;
  logic clk = 1'b0;
  logic rst = 1'b0;
  logic d = 1'b0, d1 = 1'b0;
  logic q, q1, gclk, gclk1;

  cg_dff dut (.clk, .rst, .d, .q, .gclk);
  cg_dff #(.RESET_VAL(1'b1)) dut1 (.clk, .rst, .d(d1), .q(q1), .gclk(gclk1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int pulses = 0, changes = 0, cycles = 0;

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
    logic prev_q;
    logic [15:0] pattern = 16'b0011_1000_1101_0110;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1;
    check(q == 1'b0 && q1 == 1'b1, "reset values");
    d1 = 1'b1;
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      prev_q = q;
      d  = (i < 16) ? pattern[i] : 1'($urandom % 2);
      d1 = ~d;
      if (d != prev_q) changes++;
      @(posedge clk); #1;
      cycles++;
      check(q == d,   $sformatf("cycle %0d: q=%0b d=%0b", i, q, d));
      check(q1 == d1, $sformatf("cycle %0d: q1=%0b d1=%0b", i, q1, d1));
    end
    check(pulses == changes, $sformatf("gated pulses %0d, changes of D %0d", pulses, changes));
    check(pulses < cycles, "gated clock has fewer pulses than the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
