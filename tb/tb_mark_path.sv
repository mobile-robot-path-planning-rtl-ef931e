// tb_mark_path: self-checking test of the path reconstruction unit.
//
// For each of 30 random closed maps (12 x 10 cells) with a reachable goal, the
// testbench runs its own breadth-first search to fill a direction map and a
// working map (visited cells), then lets mark_path walk back from the goal.
// It checks that exactly the cells of the reference shortest path (goal and
// start included) change to the path code, that no other cell changes, that
// the direction map is never written, and that `ready` comes 2L cycles
// after the solve pulse for a path of L cells.
module tb_mark_path;
  import bf_pkg::*;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned COLS   = 12;
  localparam int unsigned ROWS   = 10;
  localparam int unsigned CELLS  = COLS * ROWS;

  logic              clock = 0, reset = 1, solve_req = 0;
  logic [ADDR_W-1:0] start, target, addr, addrPrec;
  logic [1:0]        valPrec, modify;
  logic              write, ready;
  int                checks = 0, failures = 0, runs = 0;

  logic [1:0] map_mem [2 ** ADDR_W];
  logic [1:0] tmp_mem [2 ** ADDR_W];
  logic [1:0] map_before  [CELLS];
  bit         on_path [CELLS];

  mark_path #(.ADDR_W(ADDR_W), .COLS(COLS)) dut (.*);

  always #5 clock = ~clock;

  always_ff @(posedge clock) begin
    if (write) map_mem[addr] <= modify;
    valPrec <= tmp_mem[addrPrec];
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Builds a map and its direction map; returns 0 if the goal is unreachable.
  function automatic bit build(output int s, output int g, output int len);
    int q[$];
    int prev [CELLS];
    int c, n;
    bit fnd = 0;
    for (int a = 0; a < CELLS; a++) begin
      int r = a / COLS, cc = a % COLS;
      map_mem[a] = (r == 0 || cc == 0 || r == ROWS - 1 || cc == COLS - 1 ||
                    $urandom_range(99) < 25) ? CELL_OBST : CELL_FREE;
      tmp_mem[a] = 2'($urandom);
      prev[a] = -1;
      on_path[a] = 0;
    end
    do s = $urandom_range(CELLS - 1); while (map_mem[s] != CELL_FREE);
    do g = $urandom_range(CELLS - 1); while (map_mem[g] != CELL_FREE || g == s);
    map_mem[s] = CELL_VISITED;
    q.push_back(s);
    while (q.size() > 0 && !fnd) begin
      c = q.pop_front();
      if (c == g) fnd = 1;
      else for (int d = 0; d < 4; d++) begin
        n = (d == 0) ? c - COLS : (d == 1) ? c + COLS : (d == 2) ? c - 1 : c + 1;
        if (map_mem[n] == CELL_FREE) begin
          map_mem[n] = CELL_VISITED;
          tmp_mem[n] = 2'(d ^ 1);
          prev[n] = c;
          q.push_back(n);
        end
      end
    end
    len = 0;
    if (fnd) begin
      c = g;
      while (c != -1) begin
        on_path[c] = 1;
        len++;
        c = prev[c];
      end
    end
    return fnd;
  endfunction

  initial begin
    int s, g, len, cycles;
    logic [1:0] tmp_before [CELLS];
    repeat (3) @(posedge clock);
    reset <= 0;
    @(posedge clock);
    while (runs < 30) begin
      if (!build(s, g, len)) continue;
      runs++;
      for (int a = 0; a < CELLS; a++) begin
        map_before[a] = map_mem[a];
        tmp_before[a] = tmp_mem[a];
      end
      start  <= ADDR_W'(s);
      target <= ADDR_W'(g);
      @(posedge clock);
      solve_req <= 1;
      @(posedge clock);
      solve_req <= 0;
      cycles = 1;
      #1;
      while (!ready) begin
        @(posedge clock);
        cycles++;
        #1;
      end
      check(cycles == 2 * len, $sformatf("cycles %0d for %0d path cells", cycles, len));
      for (int a = 0; a < CELLS; a++) begin
        check(map_mem[a] == (on_path[a] ? CELL_PATH : map_before[a]), $sformatf("map cell %0d", a));
        check(tmp_mem[a] == tmp_before[a], "direction map untouched");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
