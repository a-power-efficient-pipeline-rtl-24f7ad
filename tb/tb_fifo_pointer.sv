// tb_fifo_pointer: self-checking test of the circular pointer.
//
// Two pointers are tested: one of the default 128 words and one of 5 words
// (not a power of two, so the wrap must be explicit). Each is advanced at
// random; a software count of the advances gives the expected word address
// (count mod DEPTH) and lap bit ((count / DEPTH) mod 2). The look-ahead
// output must always equal what the register holds after the next edge.
module tb_fifo_pointer;
  localparam int unsigned D0 = 128, D1 = 5;
  localparam int unsigned A0 = 7,   A1 = 3;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic inc0 = 1'b0, inc1 = 1'b0;
  logic [A0:0] ptr0, nxt0;
  logic [A1:0] ptr1, nxt1;

  fifo_pointer                 u0 (.clk, .rst, .inc(inc0), .ptr(ptr0), .ptr_nxt(nxt0));
  fifo_pointer #(.DEPTH(D1))   u1 (.clk, .rst, .inc(inc1), .ptr(ptr1), .ptr_nxt(nxt1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt0 = 0, cnt1 = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [A0:0] exp0(int n);
    return {1'((n / D0) % 2), A0'(n % D0)};
  endfunction
  function automatic logic [A1:0] exp1(int n);
    return {1'((n / D1) % 2), A1'(n % D1)};
  endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(ptr0 == 0 && ptr1 == 0, "reset to word 0, lap 0");
    for (int i = 0; i < 3000; i++) begin
      inc0 = (i < 600) ? 1'b1 : 1'($urandom % 4 != 0);
      inc1 = 1'($urandom % 3 != 0);
      #1;
      check(nxt0 == exp0(cnt0 + int'(inc0)), "look-ahead of 128-word pointer");
      check(nxt1 == exp1(cnt1 + int'(inc1)), "look-ahead of 5-word pointer");
      @(posedge clk); #1;
      cnt0 += int'(inc0);
      cnt1 += int'(inc1);
      check(ptr0 == exp0(cnt0), $sformatf("128-word pointer %h after %0d advances", ptr0, cnt0));
      check(ptr1 == exp1(cnt1), $sformatf("5-word pointer %h after %0d advances", ptr1, cnt1));
    end
    check(cnt0 > 2 * D0, "128-word pointer wrapped twice");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
