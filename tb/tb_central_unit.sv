// tb_central_unit: self-checking test of the block memories.
//
// Uses a 12 x 10 map in a 128-word memory. Checks that the initial map equals
// the generator's formula (border obstacles, free start and goal, hash-chosen
// obstacles inside) with one cycle of read latency; that random writes
// through port 1 of the working map and of the direction map are read back
// on port 1 and on the display port 2 one cycle later; that a port-1 read of
// the word being written returns the old word; and that the two working
// memories are independent.
module tb_central_unit;
  import bf_pkg::*;

  localparam int unsigned ADDR_W = 7;
  localparam int unsigned COLS   = 12;
  localparam int unsigned ROWS   = 10;
  localparam int unsigned PCT    = 30;
  localparam int unsigned SEED   = 5;
  localparam int unsigned S_CELL = 13;
  localparam int unsigned G_CELL = 106;

  logic              CLK = 0;
  logic [ADDR_W-1:0] ADDRalgMap = '0, ADDRalgMap2 = '0, ADDRalgTmp = '0, ADDRalgTmp2 = '0;
  logic [ADDR_W-1:0] ADDRinitMap = '0;
  logic [1:0]        DINalgMap = '0, DINalgTmp = '0;
  logic              WEalgMap = 0, WEalgTmp = 0;
  logic [1:0]        VALalgMap, VALalgMap2, VALalgTmp, VALalgTmp2, VALinitMap;
  int                checks = 0, failures = 0, obstacles = 0;

  logic [1:0] map_ref [2 ** ADDR_W];
  logic [1:0] tmp_ref [2 ** ADDR_W];

  central_unit #(
    .ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(PCT), .SEED(SEED),
    .START_CELL(S_CELL), .GOAL_CELL(G_CELL)
  ) dut (.*);

  always #5 CLK = ~CLK;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge CLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Independent statement of the initial map rule for an in-map cell.
  function automatic logic [1:0] expected_init(int a);
    int r = a / COLS, c = a % COLS;
    logic [31:0] h;
    if (a >= COLS * ROWS) return CELL_OBST;
    if (r == 0 || c == 0 || r == ROWS - 1 || c == COLS - 1) return CELL_OBST;
    if (a == S_CELL || a == G_CELL) return CELL_FREE;
    h = 32'(a) * 32'h9E37_79B1 ^ SEED;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return ((h % 100) < PCT) ? CELL_OBST : CELL_FREE;
  endfunction

  initial begin
    @(posedge CLK);
    // initial map, one cycle latency
    for (int a = 0; a < 2 ** ADDR_W; a++) begin
      #1 ADDRinitMap = ADDR_W'(a);
      @(posedge CLK);
      #1 check(VALinitMap == expected_init(a), $sformatf("initial map word %0d", a));
      if (a < COLS * ROWS && VALinitMap == CELL_OBST) obstacles++;
    end
    check(obstacles > 2 * (COLS + ROWS) && obstacles < COLS * ROWS, "map has inner obstacles and free cells");
    // fill both working memories through port 1
    for (int a = 0; a < 2 ** ADDR_W; a++) begin
      map_ref[a] = 2'($urandom);
      tmp_ref[a] = 2'($urandom);
      #1;
      ADDRalgMap = ADDR_W'(a); DINalgMap = map_ref[a]; WEalgMap = 1;
      ADDRalgTmp = ADDR_W'(a); DINalgTmp = tmp_ref[a]; WEalgTmp = 1;
      @(posedge CLK);
    end
    #1 WEalgMap = 0; WEalgTmp = 0;
    // random reads on all four ports, with writes mixed in
    for (int i = 0; i < 2000; i++) begin
      logic [ADDR_W-1:0] a1, a2, t1, t2;
      logic [1:0] e_m1, e_m2, e_t1, e_t2;
      logic wm, wt;
      a1 = ADDR_W'($urandom); a2 = ADDR_W'($urandom);
      t1 = ADDR_W'($urandom); t2 = ADDR_W'($urandom);
      wm = $urandom_range(1); wt = $urandom_range(1);
      ADDRalgMap = a1; ADDRalgMap2 = a2; ADDRalgTmp = t1; ADDRalgTmp2 = t2;
      DINalgMap = 2'($urandom); DINalgTmp = 2'($urandom);
      WEalgMap = wm; WEalgTmp = wt;
      e_m1 = map_ref[a1]; e_m2 = map_ref[a2]; e_t1 = tmp_ref[t1]; e_t2 = tmp_ref[t2];
      if (wm) map_ref[a1] = DINalgMap;
      if (wt) tmp_ref[t1] = DINalgTmp;
      @(posedge CLK);
      #1;
      check(VALalgMap == e_m1, "map port 1 (old word on write)");
      check(VALalgMap2 == e_m2 || (wm && a1 == a2), "map port 2");
      check(VALalgTmp == e_t1, "direction port 1 (old word on write)");
      check(VALalgTmp2 == e_t2 || (wt && t1 == t2), "direction port 2");
      WEalgMap = 0; WEalgTmp = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
