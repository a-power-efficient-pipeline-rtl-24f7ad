// tb_ring_sequence: replays the textbook eight-slot ring-buffer sequence
// on an 8-word FIFO and checks where both pointers stand after each step.
//
// Steps (write pointer / read pointer word address after each, and flag):
//   initial            0 / 0  empty
//   1 write            1 / 0
//   3 more writes      4 / 0
//   1 read             4 / 1
//   4 more writes      0 / 1
//   1 more write       1 / 1  full
//   2 reads            1 / 3
//   5 more reads       1 / 0
//   1 more read        1 / 1  empty
// The words read must be the words written, in order.
module tb_ring_sequence;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned WIDTH = 16;

  logic             clk = 1'b0;
  logic             rst = 1'b0;
  logic             wr_en = 1'b0, rd_en = 1'b0;
  logic [WIDTH-1:0] buf_in = '0, buf_out;
  logic             buf_full, buf_empty;
  logic [3:0]       fifo_counter;

  sync_fifo #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int next_wr_word = 0, next_rd_word = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // n writes (w=1) or n reads (w=0), one per cycle
  task automatic step(input bit w, input int n);
    for (int i = 0; i < n; i++) begin
      wr_en  = w;
      rd_en  = !w;
      buf_in = WIDTH'(16'hA000 + next_wr_word);
      @(posedge clk); #1;
      if (w) next_wr_word++;
      else begin
        check(buf_out == WIDTH'(16'hA000 + next_rd_word),
              $sformatf("read word %h, expected %h", buf_out, 16'hA000 + next_rd_word));
        next_rd_word++;
      end
    end
    wr_en = 1'b0;
    rd_en = 1'b0;
  endtask

  task automatic expect_state(input int wp, input int rp, input bit full, input bit empty,
                              input string name);
    check(dut.wr_ptr[2:0] == 3'(wp), $sformatf("%s: write pointer %0d, expected %0d", name, dut.wr_ptr[2:0], wp));
    check(dut.rd_ptr[2:0] == 3'(rp), $sformatf("%s: read pointer %0d, expected %0d", name, dut.rd_ptr[2:0], rp));
    check(buf_full == full,   $sformatf("%s: FULL", name));
    check(buf_empty == empty, $sformatf("%s: EMPTY", name));
    check(fifo_counter == 4'(next_wr_word - next_rd_word), $sformatf("%s: count", name));
  endtask

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    #1 rst = 1'b1;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expect_state(0, 0, 1'b0, 1'b1, "initial");
    step(1'b1, 1); expect_state(1, 0, 1'b0, 1'b0, "after a write");
    step(1'b1, 3); expect_state(4, 0, 1'b0, 1'b0, "3 more writes");
    step(1'b0, 1); expect_state(4, 1, 1'b0, 1'b0, "after a read");
    step(1'b1, 4); expect_state(0, 1, 1'b0, 1'b0, "4 more writes");
    step(1'b1, 1); expect_state(1, 1, 1'b1, 1'b0, "1 more write (full)");
    step(1'b0, 2); expect_state(1, 3, 1'b0, 1'b0, "2 reads");
    step(1'b0, 5); expect_state(1, 0, 1'b0, 1'b0, "5 more reads");
    step(1'b0, 1); expect_state(1, 1, 1'b0, 1'b1, "1 more read (empty)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
