// tb_interface_full: one complete planning operation of the whole system at
// its default size (40 x 40 map, 11-bit cell addresses, 25 % obstacles,
// start at cell (1, 1), goal at cell (38, 38)).
//
// The testbench presses Start twice. For each operation it predicts with
// the reference model (bf_ref_pkg) the Found flag and the cycle count to
// Ready (C + 10E + 2L + 10 with a path, C + 10E + 8 without, for C cells, E
// expanded cells and L path cells) and then checks one whole video frame
// clock by clock: HSYNC and VSYNC timing and the colour of every pixel of the
// working map picture, the direction picture, the blue surround and the black
// border. It reports the search time at 120 MHz and 150 MHz clocks.
module tb_interface_full;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int COLS  = 40;
  localparam int ROWS  = 40;
  localparam int CELLS = COLS * ROWS;
  localparam int S_CELL = COLS + 1;
  localparam int G_CELL = (ROWS - 2) * COLS + COLS - 2;
  localparam int H_TOTAL = 1344;
  localparam int V_TOTAL = 806;
  localparam int RIGHT_X = 400;
  localparam logic [2:0] PALETTE [8] = '{3'b111, 3'b001, 3'b010, 3'b100,
                                         3'b110, 3'b011, 3'b101, 3'b000};

  logic       Reset = 1, Clock = 0, Start = 0;
  logic       hs_a, vs_a, ready_a, found_a;
  logic [2:0] rgb_a;
  int         checks = 0, failures = 0;
  int         n_restore = 0, n_path = 0, n_nopath = 0, n_mark = 0, n_frames = 0;

  interface_top dut (
    .Reset, .Clock, .Start, .HSync(hs_a), .VSync(vs_a), .RGB(rgb_a), .Ready(ready_a), .Found(found_a));

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
    for (int a = 0; a < CELLS; a++) init[a] = init_cell(a, COLS, ROWS, pct, 1, S_CELL, G_CELL);
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
    result_t ra;
    int cyc, cyc_a, exp_a, x, y, e, bad, marks, vs_prev, search;
    ra = reference(25);
    exp_a = ra.found ? CELLS + 10 * ra.expanded + 2 * ra.path_len + 10 : CELLS + 10 * ra.expanded + 8;
    repeat (3) @(posedge Clock);
    #1 Reset = 0;
    repeat (2) @(posedge Clock);
    for (int op = 0; op < 2; op++) begin
      #1 Start = 1;
      cyc = 0; cyc_a = -1;
      while (cyc_a < 0) begin
        @(posedge Clock);
        cyc++;
        #1;
        if (cyc == 3) Start = 0;
        if (ready_a && cyc_a < 0) cyc_a = cyc;
      end
      check(found_a == ra.found, "Found flag");
      check(cyc_a == exp_a, $sformatf("A ready after %0d cycles, expected %0d", cyc_a, exp_a));
      if (found_a) n_path++; else n_nopath++;
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
        check(hs_a == !(x >= 1048 && x < 1184), "HSync");
        check(vs_a == !(y >= 771 && y < 777), "VSync");
        if (vs_prev && !vs_a) n_frames++;
        vs_prev = vs_a;
        e = expected_rgb(ra, x, y);
        if (e >= 0) begin
          check(rgb_a == 3'(e), $sformatf("A colour at (%0d, %0d)", x, y));
          if (rgb_a != 3'(e)) bad++;
          if (x < COLS * 8 && y < ROWS * 8 && rgb_a == PALETTE[CELL_PATH]) marks++;
        end
      end
      if (op > 0 && bad == 0) n_restore++;
      if (marks == ra.path_len * 64) n_mark++;
    end
    check(n_restore == 1, "map restored for the second operation");
    check(n_mark == n_path, "every marked path was displayed");
    check(n_frames == 2, "a vertical sync pulse in each observed frame");
    search = ra.found ? 10 * ra.expanded + 4 : 10 * ra.expanded + 3;
    $display("found=%0d expanded=%0d path=%0d ready after %0d cycles", ra.found, ra.expanded,
             ra.path_len, exp_a);
    $display("search alone: %0d cycles = %0d.%02d us at 120 MHz, %0d.%02d us at 150 MHz", search,
             search / 120, (search % 120) * 100 / 120, search / 150, (search % 150) * 100 / 150);
    $display("restores=%0d with-path=%0d without=%0d markings=%0d frames=%0d",
             n_restore, n_path, n_nopath, n_mark, n_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
