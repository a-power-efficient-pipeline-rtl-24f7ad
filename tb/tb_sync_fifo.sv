// tb_sync_fifo: end-to-end, self-checking test of the 128 x 128 FIFO at its
// default size.
//
// A queue in the testbench is the reference: a write is expected to be
// accepted when the queue holds fewer than DEPTH words, a read when it is
// not empty. Inputs change 1 time unit after each rising edge; one time
// unit after the following edge the testbench checks buf_out (the word
// popped at that edge), buf_full, buf_empty and fifo_counter, so the flags
// are checked to move at the very edge that moves the pointers. It also
// counts the pulses of the gated write and read clocks, which must equal
// the accepted writes and reads exactly.
//
// Phases: reads on the empty FIFO (underflow refused), a fill past full
// (overflow refused), read+write while full, a drain, write-then-read on
// the next cycle, a stream of one write and one read per cycle (throughput
// one word per cycle in each direction), idle cycles, and random traffic.
// Every mechanism must occur at least once or a failure is counted.
module tb_sync_fifo;
  import fifo_pkg::*;

  localparam int unsigned DEPTH = FIFO_DEPTH;
  localparam int unsigned WIDTH = FIFO_WIDTH;
  localparam int unsigned CW    = count_bits(DEPTH);

  logic             clk = 1'b0;
  logic             rst = 1'b0;
  logic             wr_en = 1'b0;
  logic             rd_en = 1'b0;
  logic [WIDTH-1:0] buf_in = '0;
  logic [WIDTH-1:0] buf_out;
  logic             buf_full, buf_empty;
  logic [CW-1:0]    fifo_counter;

  sync_fifo dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  logic [WIDTH-1:0] model[$];
  logic [WIDTH-1:0] exp_out = '0;

  // mechanism counters
  int n_push = 0, n_pop = 0, n_full = 0, n_empty = 0;
  int n_overflow_refused = 0, n_underflow_refused = 0;
  int n_both = 0, n_wrap = 0, n_idle = 0, n_pop_after_full = 0;
  int n_wclk = 0, n_rclk = 0, n_cycles = 0;

  always @(posedge dut.wclk) if (!rst) n_wclk++;
  always @(posedge dut.rclk) if (!rst) n_rclk++;

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

  // One clock cycle with the given requests. Called 1 time unit after a
  // rising edge; returns 1 time unit after the next one.
  task automatic cycle(input bit w, input bit r);
    bit exp_push, exp_pop;
    wr_en  = w;
    rd_en  = r;
    if (w) buf_in = rand_word();
    exp_push = w && (model.size() < DEPTH);
    exp_pop  = r && (model.size() > 0);
    if (w && !exp_push) n_overflow_refused++;
    if (r && !exp_pop)  n_underflow_refused++;
    if (exp_push && exp_pop) n_both++;
    if (exp_pop && model.size() == DEPTH) n_pop_after_full++;
    if (!w && !r) n_idle++;
    @(posedge clk);
    #1;
    n_cycles++;
    if (exp_pop) begin
      exp_out = model.pop_front();
      n_pop++;
    end
    if (exp_push) begin
      model.push_back(buf_in);
      n_push++;
      if (n_push % DEPTH == 0) n_wrap++;
    end
    if (model.size() == DEPTH) n_full++;
    if (model.size() == 0)     n_empty++;
    check(buf_out == exp_out, $sformatf("buf_out %h expected %h", buf_out, exp_out));
    check(buf_full == (model.size() == DEPTH),
          $sformatf("buf_full=%0b with %0d words", buf_full, model.size()));
    check(buf_empty == (model.size() == 0),
          $sformatf("buf_empty=%0b with %0d words", buf_empty, model.size()));
    check(fifo_counter == CW'(model.size()),
          $sformatf("fifo_counter=%0d expected %0d", fifo_counter, model.size()));
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    int wclk_before, rclk_before, pushes;
    #1 rst = 1'b1;               // asynchronous reset, from a rising edge
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(buf_empty && !buf_full && fifo_counter == 0, "state after reset");

    // underflow: reads on the empty FIFO are refused
    repeat (3) cycle(1'b0, 1'b1);

    // fill past full: the last writes are refused
    repeat (DEPTH + 3) cycle(1'b1, 1'b0);
    check(buf_full, "full after DEPTH writes");

    // read and write together while full: only the read is accepted
    cycle(1'b1, 1'b1);
    // and now the freed word can be written again
    cycle(1'b1, 1'b0);

    // drain past empty
    repeat (DEPTH + 2) cycle(1'b0, 1'b1);
    check(buf_empty, "empty after drain");

    // a word written at one edge is readable at the next
    cycle(1'b1, 1'b0);
    check(!buf_empty, "EMPTY clears at the write edge");
    cycle(1'b0, 1'b1);
    check(buf_empty, "EMPTY sets at the read edge");

    // streaming: one write and one read accepted in every cycle
    repeat (10) cycle(1'b1, 1'b0);
    pushes = n_push;
    for (int i = 0; i < 300; i++) cycle(1'b1, 1'b1);
    check(n_push - pushes == 300, "one write per cycle while streaming");
    check(fifo_counter == 10, "level held while streaming");

    // idle cycles: no gated clock pulses at all
    wclk_before = n_wclk;
    rclk_before = n_rclk;
    repeat (20) cycle(1'b0, 1'b0);
    check(n_wclk == wclk_before && n_rclk == rclk_before,
          "gated clocks silent while idle");

    // random traffic with varying bias
    for (int phase = 0; phase < 6; phase++) begin
      int pw, pr;
      pw = (phase % 3 == 0) ? 80 : (phase % 3 == 1) ? 50 : 20;
      pr = 100 - pw;
      repeat (1500) cycle(($urandom % 100) < pw, ($urandom % 100) < pr);
    end

    // every accepted write/read and nothing else clocked its side
    check(n_wclk == n_push, $sformatf("write clock pulses %0d vs writes %0d", n_wclk, n_push));
    check(n_rclk == n_pop,  $sformatf("read clock pulses %0d vs reads %0d", n_rclk, n_pop));
    check(n_wclk < n_cycles && n_rclk < n_cycles, "gated clocks have fewer pulses than clk");

    // every mechanism happened
    check(n_full > 0,              "FULL reached");
    check(n_empty > 0,             "EMPTY reached");
    check(n_overflow_refused > 0,  "write refused while FULL");
    check(n_underflow_refused > 0, "read refused while EMPTY");
    check(n_both > 0,              "simultaneous read and write");
    check(n_pop_after_full > 0,    "read accepted while FULL");
    check(n_wrap > 1,              "pointers wrapped around the ring");
    check(n_idle > 0,              "idle cycles");

    $display("mechanisms: cycles=%0d writes=%0d reads=%0d full=%0d empty=%0d overflow_refused=%0d underflow_refused=%0d both=%0d wraps=%0d idle=%0d wclk=%0d rclk=%0d",
             n_cycles, n_push, n_pop, n_full, n_empty, n_overflow_refused,
             n_underflow_refused, n_both, n_wrap, n_idle, n_wclk, n_rclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
