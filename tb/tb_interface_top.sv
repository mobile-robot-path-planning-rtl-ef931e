// tb_interface_top: end-to-end test of the whole planner with its display.
//
// Two complete systems on 12 x 10 maps run side by side from one clock,
// reset and Start button: system A (25 % obstacles, a path exists) and
// system B (100 % obstacles, the start is walled in). Two operations are
// run. For each, the testbench predicts with the reference model (bf_ref_pkg)
// the Found flag and the cycle count to Ready (C + 10E + 2L + 10 with a path,
// C + 10E + 8 without, for C cells, E expanded cells and L path cells). Then
// it watches one whole video frame of each system and checks every clock:
// HSYNC and VSYNC timing, and the RGB colour of every pixel, which must show
// the reference working map on the left picture, the reference directions of
// reached cells on the right picture, blue elsewhere in the 800 x 600 area
// and black outside it. Mechanisms counted: map restored for a second
// operation, search with path, search without path, path marking seen on
// the screen, video frames.
module tb_interface_top;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int COLS  = 12;
  localparam int ROWS  = 10;
  localparam int CELLS = COLS * ROWS;
  localparam int S_CELL = COLS + 1;
  localparam int G_CELL = (ROWS - 2) * COLS + COLS - 2;
  localparam int H_TOTAL = 1344;
  localparam int V_TOTAL = 806;
  localparam int RIGHT_X = 400;
  localparam logic [2:0] PALETTE [8] = '{3'b111, 3'b001, 3'b010, 3'b100,
                                         3'b110, 3'b011, 3'b101, 3'b000};

  logic       Reset = 1, Clock = 0, Start = 0;
  logic       hs_a, vs_a, ready_a, found_a, hs_b, vs_b, ready_b, found_b;
  logic [2:0] rgb_a, rgb_b;
  int         checks = 0, failures = 0;
  int         n_restore = 0, n_path = 0, n_nopath = 0, n_mark = 0, n_frames = 0;

  interface_top #(.ADDR_W(7), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(25), .SEED(3)) dut_a (
    .Reset, .Clock, .Start, .HSync(hs_a), .VSync(vs_a), .RGB(rgb_a), .Ready(ready_a), .Found(found_a));

  interface_top #(.ADDR_W(7), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(100), .SEED(3)) dut_b (
    .Reset, .Clock, .Start, .HSync(hs_b), .VSync(vs_b), .RGB(rgb_b), .Ready(ready_b), .Found(found_b));

  always #5 Clock = ~Clock;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (8_000_000) @(posedge Clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic result_t reference(input int pct);
    word_t init [] = new[CELLS];
    for (int a = 0; a < CELLS; a++) init[a] = init_cell(a, COLS, ROWS, pct, 3, S_CELL, G_CELL);
    return plan(init, COLS, S_CELL, G_CELL);
  endfunction

  // Expected colour of pixel (x, y); -1 where it cannot be known (the start
  // cell on the right picture shows an unwritten direction word).
  function automatic int expected_rgb(input result_t r, input int x, input int y);
    int pic_w = COLS * 8, pic_h = ROWS * 8, code, c;
    if (x >= 800 || y >= 600) return 0;
    if (y < pic_h && x < pic_w) begin
      code = r.map[(y / 8) * COLS + x / 8];
    end else if (y < pic_h && x >= RIGHT_X && x < RIGHT_X + pic_w) begin
      c = (y / 8) * COLS + (x - RIGHT_X) / 8;
      if (r.map[c] == CELL_VISITED || r.map[c] == CELL_PATH) begin
        if (c == S_CELL) return -1;
        code = 4 + r.dir[c];
      end else begin
        code = r.map[c];
      end
    end else begin
      code = CELL_OBST;
    end
    return PALETTE[code];
  endfunction

  int cyc_since_reset = 0;   // clock edges since Reset was released
  always @(posedge Clock) if (!Reset) cyc_since_reset++;

  initial begin
    result_t ra, rb;
    int cyc, cyc_a, cyc_b, exp_a, exp_b, x, y, e, bad, marks, vs_prev;
    ra = reference(25);
    rb = reference(100);
    exp_a = ra.found ? CELLS + 10 * ra.expanded + 2 * ra.path_len + 10 : CELLS + 10 * ra.expanded + 8;
    exp_b = rb.found ? CELLS + 10 * rb.expanded + 2 * rb.path_len + 10 : CELLS + 10 * rb.expanded + 8;
    repeat (3) @(posedge Clock);
    #1 Reset = 0;
    repeat (2) @(posedge Clock);
    for (int op = 0; op < 2; op++) begin
      #1 Start = 1;
      cyc = 0; cyc_a = -1; cyc_b = -1;
      while (cyc_a < 0 || cyc_b < 0) begin
        @(posedge Clock);
        cyc++;
        #1;
        if (cyc == 3) Start = 0;
        if (ready_a && cyc_a < 0) cyc_a = cyc;
        if (ready_b && cyc_b < 0) cyc_b = cyc;
      end
      check(found_a == ra.found && found_b == rb.found, "Found flags");
      check(cyc_a == exp_a, $sformatf("A ready after %0d cycles, expected %0d", cyc_a, exp_a));
      check(cyc_b == exp_b, $sformatf("B ready after %0d cycles, expected %0d", cyc_b, exp_b));
      if (found_a) n_path++; else n_nopath++;
      if (found_b) n_path++; else n_nopath++;
      // wait for the start of a frame: the counters at pixel (0, 0)
      while ((cyc_since_reset % (H_TOTAL * V_TOTAL)) != 0) begin
        @(posedge Clock);
        #1;
      end
      // now ADDR shows pixel 0; RGB/HSYNC/VSYNC show the previous pixel
      bad = 0; marks = 0; vs_prev = 1;
      for (int n = 1; n <= H_TOTAL * V_TOTAL; n++) begin
        @(posedge Clock);
        #1;
        x = (n - 1) % H_TOTAL;
        y = (n - 1) / H_TOTAL;
        check(hs_a == !(x >= 1048 && x < 1184) && hs_b == hs_a, "HSync");
        check(vs_a == !(y >= 771 && y < 777) && vs_b == vs_a, "VSync");
        if (vs_prev && !vs_a) n_frames++;
        vs_prev = vs_a;
        e = expected_rgb(ra, x, y);
        if (e >= 0) begin
          check(rgb_a == 3'(e), $sformatf("A colour at (%0d, %0d)", x, y));
          if (rgb_a != 3'(e)) bad++;
          if (x < COLS * 8 && y < ROWS * 8 && rgb_a == PALETTE[CELL_PATH]) marks++;
        end
        e = expected_rgb(rb, x, y);
        if (e >= 0) begin
          check(rgb_b == 3'(e), $sformatf("B colour at (%0d, %0d)", x, y));
          if (rgb_b != 3'(e)) bad++;
        end
      end
      if (op > 0 && bad == 0) n_restore++;
      if (marks == ra.path_len * 64) n_mark++;
    end
    check(n_restore == 1, "map restored for the second operation");
    check(n_path > 0, "a search found its goal");
    check(n_nopath > 0, "a search found no path");
    check(n_mark > 0, "the marked path was displayed");
    check(n_frames == 2, "a vertical sync pulse in each observed frame");
    $display("A: found=%0d expanded=%0d path=%0d ready after %0d cycles", ra.found, ra.expanded,
             ra.path_len, exp_a);
    $display("restores=%0d with-path=%0d without=%0d markings=%0d frames=%0d",
             n_restore, n_path, n_nopath, n_mark, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
