// tb_bf_queue: self-checking test of the search's process queue.
//
// Drives random pushes and pops (never a pop when empty nor a push when full)
// into a 16-entry queue of 5-bit words and compares the popped words, the
// empty flag and the full flag against a SystemVerilog queue used as the
// reference. Also checks that the queue fills to exactly DEPTH entries and
// that `clear` empties it.
module tb_bf_queue;
  localparam int unsigned ADDR_W = 5;
  localparam int unsigned DEPTH  = 16;

  logic              clk = 0, reset = 1, clear = 0, push = 0, pop = 0;
  logic [ADDR_W-1:0] din = '0, dout;
  logic              empty, full;
  int                checks = 0, failures = 0;
  logic [ADDR_W-1:0] model [$];
  logic [ADDR_W-1:0] expect_q;
  logic              expect_valid = 0;
  int                fills = 0;

  bf_queue #(.ADDR_W(ADDR_W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int i = 0; i < 4000; i++) begin
      // phases: mostly push, mostly pop, balanced
      automatic int  bias    = (i / 500) % 3;
      automatic bit  do_push = ($urandom_range(99) < (bias == 0 ? 80 : bias == 1 ? 20 : 50));
      automatic bit  do_pop  = ($urandom_range(99) < (bias == 0 ? 20 : bias == 1 ? 80 : 50));
      #1;
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() == DEPTH) fills++;
      if (model.size() == 0) do_pop = 0;
      if (model.size() == DEPTH && !do_pop) do_push = 0;
      push = do_push;
      pop  = do_pop;
      din  = ADDR_W'($urandom);
      if (do_pop) expect_q = model.pop_front();
      if (do_push) model.push_back(din);
      @(posedge clk);
      #1;
      if (do_pop) check(dout == expect_q, "popped word");
      push = 0;
      pop  = 0;
    end
    check(fills > 0, "queue reached full at least once");
    // clear empties the queue
    push = 1; din = 5'd3;
    @(posedge clk); #1;
    check(!empty, "not empty after a push");
    push = 0; clear = 1;
    @(posedge clk); #1;
    clear = 0;
    check(empty, "clear empties");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
