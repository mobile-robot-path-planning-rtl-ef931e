// init_rom: read-only block memory holding the initial map.
//
// One synchronous read port: the cell code at `addr` appears on `dout` after
// the next clock edge. The contents are set when the device is configured.
// With INIT_FILE empty they come from bf_pkg::init_cell: a closed map of ROWS
// x COLS cells with an outer ring of obstacles, a free start and goal cell,
// and obstacles inside with probability OBST_PCT percent, chosen by a hash of
// the address and SEED. With INIT_FILE set, the file is read with $readmemh,
// one hexadecimal cell code (0 free, 1 obstacle) per address.
module init_rom
  import bf_pkg::*;
#(
  parameter int unsigned ADDR_W     = 11,
  parameter int unsigned COLS       = 40,
  parameter int unsigned ROWS       = 40,
  parameter int unsigned OBST_PCT   = 25,
  parameter int unsigned SEED       = 1,
  parameter int unsigned START_CELL = 41,
  parameter int unsigned GOAL_CELL  = 1558,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [1:0]        dout
);
  logic [1:0] mem [2 ** ADDR_W];

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int unsigned a = 0; a < 2 ** ADDR_W; a++)
        mem[a] = init_cell(a, COLS, ROWS, OBST_PCT, SEED, START_CELL, GOAL_CELL);
    end
  end

  always_ff @(posedge clk) dout <= mem[addr];
endmodule
