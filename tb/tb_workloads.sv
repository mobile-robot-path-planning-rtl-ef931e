// tb_workloads: the planner on the map sizes of the hardware measurements.
//
// Eight planners (comp_mare: memories, copier, search, path marker and
// sequencer) are built side by side for square maps of 10, 30, 40, 50 and
// 100 cells a side, with obstacle fills of 25, 25, 50, 50 and 50 percent as in
// the measurements, and with cell addresses just wide enough for each map
// (7, 10, 11, 12 and 14 bits). The maps are generated, since the measured
// maps themselves are not available, so only the sizes and fills match. A
// uniformly random fill of 50 % almost always walls the start in (it is
// below the percolation threshold of the square grid), while the measured
// 50 % maps let the search spread widely; so the 40, 50 and 100 maps are also
// run at 25 % to give search times that can be set beside the measured
// ones. One Start press runs all eight. For each, the testbench checks the
// Found flag, the exact cycle count to Ready and every word of the working
// and direction maps against the reference model (bf_ref_pkg), and prints
// the search time at 120 MHz and 150 MHz beside the measured times:
//   size      10      30      40      50      100
//   120 MHz   2.78    34.95   73.81   112.15  475.38 us
//   150 MHz   2.35    28.2    59.54   90.14   380.3  us
module tb_workloads;
  import bf_pkg::*;
  import bf_ref_pkg::*;

  localparam int N = 8;
  localparam int SIDE   [N] = '{10, 30, 40, 50, 100, 40, 50, 100};
  localparam int FILL   [N] = '{25, 25, 50, 50, 50, 25, 25, 25};
  localparam int AW     [N] = '{7, 10, 11, 12, 14, 11, 12, 14};
  localparam real T120  [N] = '{2.78, 34.95, 73.81, 112.15, 475.38, 73.81, 112.15, 475.38};
  localparam real T150  [N] = '{2.35, 28.2, 59.54, 90.14, 380.3, 59.54, 90.14, 380.3};

  logic clock = 0, reset = 1, btn = 0;
  int   checks = 0, failures = 0, finished = 0, n_path = 0, n_nopath = 0;

  always #5 clock = ~clock;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clock);
    #1 reset = 0;
    repeat (2) @(posedge clock);
    #1 btn = 1;
    repeat (3) @(posedge clock);
    #1 btn = 0;
  end

  for (genvar i = 0; i < N; i++) begin : g_map
    localparam int C  = SIDE[i];
    localparam int A  = AW[i];
    localparam int CELLS = C * C;
    localparam int S_CELL = C + 1;
    localparam int G_CELL = (C - 2) * C + C - 2;

    logic         ready, found;
    logic [A-1:0] raddr = '0;
    logic [1:0]   map_v, tmp_v;

    comp_mare #(.ADDR_W(A), .COLS(C), .ROWS(C), .OBST_PCT(FILL[i]), .SEED(7)) dut (
      .clock, .reset, .start_btn(btn), .ready, .found,
      .addr_map2(raddr), .val_map2(map_v), .addr_tmp2(raddr), .val_tmp2(tmp_v));

    initial begin
      result_t r;
      word_t init [];
      int cyc, expected, search;
      init = new[CELLS];
      for (int a = 0; a < CELLS; a++) init[a] = init_cell(a, C, C, FILL[i], 7, S_CELL, G_CELL);
      r = plan(init, C, S_CELL, G_CELL);
      expected = r.found ? CELLS + 10 * r.expanded + 2 * r.path_len + 10
                         : CELLS + 10 * r.expanded + 8;
      wait (reset == 0);
      wait (btn == 1);
      cyc = 0;
      do begin
        @(posedge clock);
        cyc++;
        #1;
      end while (!ready);
      check(found == r.found, $sformatf("%0dx%0d found flag", C, C));
      check(cyc == expected, $sformatf("%0dx%0d ready after %0d cycles, expected %0d", C, C, cyc, expected));
      for (int a = 0; a < CELLS; a++) begin
        raddr = A'(a);
        @(posedge clock);
        #1;
        check(map_v == r.map[a], $sformatf("%0dx%0d map cell %0d", C, C, a));
        if (r.reached[a] && a != S_CELL)
          check(tmp_v == r.dir[a], $sformatf("%0dx%0d direction of cell %0d", C, C, a));
      end
      if (found) n_path++; else n_nopath++;
      search = r.found ? 10 * r.expanded + 4 : 10 * r.expanded + 3;
      $display("%0dx%0d fill %0d%%: found=%0d expanded=%0d path=%0d search=%0d cycles: %.2f us at 120 MHz (measured %.2f), %.2f us at 150 MHz (measured %.2f)",
               C, C, FILL[i], r.found, r.expanded, r.path_len, search, search / 120.0, T120[i],
               search / 150.0, T150[i]);
      finished++;
    end
  end

  initial begin
    wait (finished == N);
    check(n_path > 0, "at least one map had a path");
    $display("maps with a path: %0d, without: %0d", n_path, n_nopath);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
