// tb_comp_mare: self-checking test of the sequencer with its units and memories.
//
// Two planners on 12 x 10 maps share clock, reset and button: planner A has
// a map with 25 % obstacles, planner B one with 100 % (start walled in, so
// its search must fail). Each button press runs one operation. After it,
// the testbench reads every cell of the working map and the direction map
// through the display ports and compares them with the reference model
// (bf_ref_pkg) applied to the initial map; it checks `found`, and that
// `ready` arrives CELLS + 10E + 2L + 10 cycles after the button edge when the
// goal is found and CELLS + 10E + 8 when it is not (E expanded cells, L path
// cells). Three operations run, so the copier is shown to restore the map
// that the previous operation marked. It counts the mechanisms seen: map
// restored by the copier, search with path, search without path, path
// marking.
module tb_comp_mare;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned COLS   = 12;
  localparam int unsigned ROWS   = 10;
  localparam int unsigned CELLS  = COLS * ROWS;
  localparam int unsigned S_CELL = COLS + 1;
  localparam int unsigned G_CELL = (ROWS - 2) * COLS + COLS - 2;
  localparam int unsigned SEED_A = 3;

  logic              clock = 0, reset = 1, btn = 0;
  logic              ready_a, found_a, ready_b, found_b;
  logic [ADDR_W-1:0] raddr = '0;
  logic [1:0]        map_a, tmp_a, map_b, tmp_b;
  int                checks = 0, failures = 0;
  int                n_copy = 0, n_path = 0, n_nopath = 0, n_mark = 0;

  comp_mare #(.ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(25), .SEED(SEED_A)) dut_a (
    .clock, .reset, .start_btn(btn), .ready(ready_a), .found(found_a),
    .addr_map2(raddr), .val_map2(map_a), .addr_tmp2(raddr), .val_tmp2(tmp_a));

  comp_mare #(.ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(100), .SEED(SEED_A)) dut_b (
    .clock, .reset, .start_btn(btn), .ready(ready_b), .found(found_b),
    .addr_map2(raddr), .val_map2(map_b), .addr_tmp2(raddr), .val_tmp2(tmp_b));

  always #5 clock = ~clock;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic result_t reference(input int pct);
    word_t init [] = new[CELLS];
    for (int a = 0; a < CELLS; a++) init[a] = init_cell(a, COLS, ROWS, pct, SEED_A, S_CELL, G_CELL);
    return plan(init, COLS, S_CELL, G_CELL);
  endfunction

  // Returns the number of mismatching cells and the number of path cells seen.
  task automatic compare(input result_t r, input bit is_a, output int bad, output int marks);
    bad = 0;
    marks = 0;
    for (int a = 0; a < CELLS; a++) begin
      #1 raddr = ADDR_W'(a);
      @(posedge clock);
      #1;
      check((is_a ? map_a : map_b) == r.map[a], $sformatf("%s map cell %0d", is_a ? "A" : "B", a));
      if ((is_a ? map_a : map_b) != r.map[a]) bad++;
      if ((is_a ? map_a : map_b) == CELL_PATH) marks++;
      if (r.reached[a] && a != S_CELL)
        check((is_a ? tmp_a : tmp_b) == r.dir[a], $sformatf("%s direction of cell %0d", is_a ? "A" : "B", a));
    end
  endtask

  initial begin
    result_t ra, rb;
    int cyc, cyc_a, cyc_b, exp_a, exp_b, bad_a, bad_b, marks_a, marks_b;
    ra = reference(25);
    rb = reference(100);
    exp_a = ra.found ? CELLS + 10 * ra.expanded + 2 * ra.path_len + 10 : CELLS + 10 * ra.expanded + 8;
    exp_b = rb.found ? CELLS + 10 * rb.expanded + 2 * rb.path_len + 10 : CELLS + 10 * rb.expanded + 8;
    repeat (3) @(posedge clock);
    #1 reset = 0;
    repeat (2) @(posedge clock);
    for (int op = 0; op < 3; op++) begin
      #1 btn = 1;
      cyc = 0; cyc_a = -1; cyc_b = -1;
      while (cyc_a < 0 || cyc_b < 0) begin
        @(posedge clock);
        cyc++;
        #1;
        if (cyc == 5) btn = 0;
        if (cyc == 1) check(!ready_a && !ready_b, "ready falls after the button");
        if (ready_a && cyc_a < 0) cyc_a = cyc;
        if (ready_b && cyc_b < 0) cyc_b = cyc;
      end
      check(found_a == ra.found, "A found flag");
      check(found_b == rb.found, "B found flag");
      check(cyc_a == exp_a, $sformatf("A ready after %0d cycles, expected %0d", cyc_a, exp_a));
      check(cyc_b == exp_b, $sformatf("B ready after %0d cycles, expected %0d", cyc_b, exp_b));
      if (found_a) n_path++; else n_nopath++;
      if (found_b) n_path++; else n_nopath++;
      compare(ra, 1, bad_a, marks_a);
      compare(rb, 0, bad_b, marks_b);
      // a later operation that matches the reference again shows that the
      // copier restored the map the previous operation had marked
      if (op > 0 && bad_a == 0 && bad_b == 0) n_copy++;
      if (marks_a > 0 && marks_a == ra.path_len) n_mark++;
      repeat (4) @(posedge clock);
    end
    check(n_copy == 2, "copier restored the map before each later operation");
    check(n_path > 0, "a search found its goal");
    check(n_nopath > 0, "a search found no path");
    check(n_mark > 0, "path marking ran");
    $display("A: found=%0d expanded=%0d path=%0d cycles=%0d; B: found=%0d expanded=%0d",
             ra.found, ra.expanded, ra.path_len, exp_a, rb.found, rb.expanded);
    $display("copies=%0d with-path=%0d without=%0d markings=%0d", n_copy, n_path, n_nopath, n_mark);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
