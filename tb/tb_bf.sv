// tb_bf: self-checking test of the breadth-first search engine.
//
// The engine runs against two synchronous one-port memories modelled here:
// the working map and the direction map. For each of 40 random closed maps
// (12 x 10 cells, border of obstacles, about 30 % obstacles inside, random
// free start and goal) plus one map whose goal is walled in, a reference
// breadth-first search written in the testbench (same N, S, W, E order)
// predicts the found flag, the number of expanded cells E, every cell's final
// map code, and every reached cell's direction. The test checks all of them,
// checks that the directions lead from the goal back to the start in the
// shortest distance, and checks the cycle count: 10E + 4 cycles from the
// solve pulse to ready when the goal is found, 10E + 3 when it is not.
module tb_bf;
  import bf_pkg::*;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned COLS   = 12;
  localparam int unsigned ROWS   = 10;
  localparam int unsigned CELLS  = COLS * ROWS;

  logic              clock = 0, reset = 1, solve_req = 0;
  logic [ADDR_W-1:0] start, target, addr, addrPrec;
  logic [1:0]        val, modify, modifyPrec;
  logic              write, writePrec, ready, found;
  int                checks = 0, failures = 0;
  int                n_found = 0, n_nopath = 0;

  logic [1:0] map_mem [2 ** ADDR_W];
  logic [1:0] tmp_mem [2 ** ADDR_W];

  bf #(.ADDR_W(ADDR_W), .COLS(COLS)) dut (.*);

  always #5 clock = ~clock;

  // memory models: synchronous read, write on the same port
  always_ff @(posedge clock) begin
    if (write) map_mem[addr] <= modify;
    val <= map_mem[addr];
    if (writePrec) tmp_mem[addrPrec] <= modifyPrec;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (500000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [1:0] ref_map [CELLS];
  logic [1:0] ref_dir [CELLS];
  int         ref_dist [CELLS];

  // Reference search: returns found, fills ref_map/ref_dir/ref_dist, counts
  // expanded (popped, non-goal) cells.
  task automatic reference(input int s, input int g, output bit fnd, output int expanded);
    int q[$];
    int c, n;
    fnd = 0;
    expanded = 0;
    ref_map[s] = CELL_VISITED;
    ref_dist[s] = 0;
    q.push_back(s);
    while (q.size() > 0) begin
      c = q.pop_front();
      if (c == g) begin
        fnd = 1;
        break;
      end
      expanded++;
      for (int d = 0; d < 4; d++) begin
        n = (d == 0) ? c - COLS : (d == 1) ? c + COLS : (d == 2) ? c - 1 : c + 1;
        if (ref_map[n] == CELL_FREE) begin
          ref_map[n] = CELL_VISITED;
          ref_dir[n] = 2'(d ^ 1);
          ref_dist[n] = ref_dist[c] + 1;
          q.push_back(n);
        end
      end
    end
  endtask

  task automatic run_case(input int pct, input bit wall_goal);
    int s, g, expanded, cycles, steps, cur;
    bit fnd;
    for (int a = 0; a < CELLS; a++) begin
      int r = a / COLS, c = a % COLS;
      if (r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1) map_mem[a] = CELL_OBST;
      else map_mem[a] = ($urandom_range(99) < pct) ? CELL_OBST : CELL_FREE;
      tmp_mem[a] = 2'($urandom);
    end
    do g = $urandom_range(CELLS - 1); while (map_mem[g] != CELL_FREE);
    if (wall_goal) begin
      // the goal is interior, so its four neighbours exist
      map_mem[g - COLS] = CELL_OBST;
      map_mem[g + COLS] = CELL_OBST;
      map_mem[g - 1]    = CELL_OBST;
      map_mem[g + 1]    = CELL_OBST;
    end
    do s = $urandom_range(CELLS - 1); while (map_mem[s] != CELL_FREE || s == g);
    for (int a = 0; a < CELLS; a++) begin
      ref_map[a] = map_mem[a];
      ref_dir[a] = 2'd0;
      ref_dist[a] = -1;
    end
    reference(s, g, fnd, expanded);

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
    check(found == fnd, "found flag");
    if (fnd) begin
      n_found++;
      check(cycles == 10 * expanded + 4, $sformatf("cycles %0d, expected %0d", cycles, 10 * expanded + 4));
    end else begin
      n_nopath++;
      check(cycles == 10 * expanded + 3, $sformatf("cycles %0d, expected %0d", cycles, 10 * expanded + 3));
    end
    for (int a = 0; a < CELLS; a++) begin
      check(map_mem[a] == ref_map[a], $sformatf("map cell %0d", a));
      if (ref_map[a] == CELL_VISITED && a != s)
        check(tmp_mem[a] == ref_dir[a], $sformatf("direction of cell %0d", a));
    end
    if (fnd) begin
      // follow the directions from the goal back to the start
      cur = g;
      steps = 0;
      while (cur != s && steps <= CELLS) begin
        case (tmp_mem[cur])
          2'd0: cur = cur - COLS;
          2'd1: cur = cur + COLS;
          2'd2: cur = cur - 1;
          default: cur = cur + 1;
        endcase
        steps++;
      end
      check(cur == s && steps == ref_dist[g], "back-walk length is the shortest distance");
    end
  endtask

  initial begin
    repeat (3) @(posedge clock);
    reset <= 0;
    @(posedge clock);
    for (int i = 0; i < 40; i++) run_case(30, 0);
    run_case(20, 1);
    check(n_found > 0, "a search reached its goal");
    check(n_nopath > 0, "a search ran its queue empty");
    $display("searches with a path: %0d, without: %0d", n_found, n_nopath);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
