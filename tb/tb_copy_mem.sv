// tb_copy_mem: self-checking test of the map copier.
//
// A read-only memory model with random contents (synchronous read) feeds the
// copier, whose writes go into a second memory model filled beforehand with a
// marker pattern. Three copies run back to back with fresh source contents.
// After each the testbench checks that words 0 .. CELLS-1 equal the source,
// that the words beyond CELLS were not written, that `done` falls on the
// start pulse and rises CELLS + 2 cycles after it, and that nothing is
// written after `done`.
module tb_copy_mem;
  localparam int unsigned ADDR_W = 8;
  localparam int unsigned CELLS  = 200;

  logic              clk = 0, reset = 1, start = 0;
  logic [1:0]        inval, outval;
  logic [ADDR_W-1:0] inaddr, outaddr;
  logic              outwe, done;
  int                checks = 0, failures = 0;

  logic [1:0] src [2 ** ADDR_W];
  logic [1:0] dst [2 ** ADDR_W];
  int         writes_after_done = 0;

  copy_mem #(.ADDR_W(ADDR_W), .CELLS(CELLS)) dut (.*);

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    inval <= src[inaddr];
    if (outwe) dst[outaddr] <= outval;
    if (!reset && outwe && done) writes_after_done++;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cycles;
    repeat (3) @(posedge clk);
    reset <= 0;
    @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      for (int a = 0; a < 2 ** ADDR_W; a++) begin
        src[a] = 2'($urandom);
        dst[a] = 2'(a + run);
      end
      #1;
      start = 1;
      @(posedge clk);
      #1;
      start = 0;
      cycles = 1;
      check(!done, "done falls after start");
      while (!done) begin
        @(posedge clk);
        cycles++;
        #1;
      end
      check(cycles == CELLS + 2, $sformatf("copy took %0d cycles", cycles));
      repeat (3) @(posedge clk);
      for (int a = 0; a < 2 ** ADDR_W; a++)
        check(dst[a] == (a < CELLS ? src[a] : 2'(a + run)), $sformatf("word %0d", a));
    end
    check(writes_after_done == 0, "no write after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
