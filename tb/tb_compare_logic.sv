// tb_compare_logic: self-checking test of the pipelined flag logic.
//
// The testbench plays both pointers: it keeps a write count and a read
// count, advances them at random (the read count never passes the write
// count, the write count never gets DEPTH ahead), and presents the
// pointers' next values {lap, address} during each cycle. One time unit
// after the rising edge, FULL, EMPTY and the count must describe the new
// pointers: empty when the counts are equal, full when they are DEPTH
// apart. Run at the default depth and at a depth of 6.
module tb_compare_logic;
  localparam int unsigned D0 = 128, A0 = 7, C0 = 8;
  localparam int unsigned D1 = 6,   A1 = 3, C1 = 3;

  logic clk = 1'b0;
  logic rst = 1'b0;
  logic [A0:0] w0 = '0, r0 = '0;
  logic [A1:0] w1 = '0, r1 = '0;
  logic full0, empty0, full1, empty1;
  logic [C0-1:0] cnt0;
  logic [C1-1:0] cnt1;

  compare_logic u0 (.clk, .rst, .wr_ptr_nxt(w0), .rd_ptr_nxt(r0),
                    .buf_full(full0), .buf_empty(empty0), .fifo_counter(cnt0));
  compare_logic #(.DEPTH(D1)) u1 (.clk, .rst, .wr_ptr_nxt(w1), .rd_ptr_nxt(r1),
                    .buf_full(full1), .buf_empty(empty1), .fifo_counter(cnt1));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int wc0 = 0, rc0 = 0, wc1 = 0, rc1 = 0;
  int n_full = 0, n_empty = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [A0:0] p0(int n);
    return {1'((n / D0) % 2), A0'(n % D0)};
  endfunction
  function automatic logic [A1:0] p1(int n);
    return {1'((n / D1) % 2), A1'(n % D1)};
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int bias;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (2) @(posedge clk);
    #1;
    check(empty0 && !full0 && cnt0 == 0 && empty1 && !full1 && cnt1 == 0, "reset state");
    rst = 1'b0;
    for (int i = 0; i < 6000; i++) begin
      bias = ((i / 400) % 2 == 0) ? 75 : 25;   // alternate filling and draining
      if (($urandom % 100) < bias && wc0 - rc0 < D0) wc0++;
      if (($urandom % 100) >= bias && rc0 < wc0)     rc0++;
      if (($urandom % 100) < bias && wc1 - rc1 < D1) wc1++;
      if (($urandom % 100) >= bias && rc1 < wc1)     rc1++;
      w0 = p0(wc0); r0 = p0(rc0); w1 = p1(wc1); r1 = p1(rc1);
      @(posedge clk); #1;
      check(full0  == (wc0 - rc0 == D0), "FULL, depth 128");
      check(empty0 == (wc0 == rc0),      "EMPTY, depth 128");
      check(cnt0   == C0'(wc0 - rc0),    $sformatf("count %0d expected %0d", cnt0, wc0 - rc0));
      check(full1  == (wc1 - rc1 == D1), "FULL, depth 6");
      check(empty1 == (wc1 == rc1),      "EMPTY, depth 6");
      check(cnt1   == C1'(wc1 - rc1),    "count, depth 6");
      if (full0)  n_full++;
      if (empty0) n_empty++;
    end
    check(n_full > 0 && n_empty > 0, "depth-128 flags both reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
