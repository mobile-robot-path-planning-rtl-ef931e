// central_unit: the block memories of the path planner.
//
// Three memories of 2^ADDR_W two-bit words, one word per map cell:
//   initMap - read-only initial map (init_rom), the source the copier
//             restores the working map from before every search;
//   algMap  - working map (dp_ram): port 1 is read and written by the
//             copier, the search and the path marker; port 2 is read by the
//             display;
//   algTmp  - direction map (dp_ram): port 1 is written by the search and
//             read by the path marker; port 2 is read by the display.
// All reads are synchronous: VAL* shows the word addressed by ADDR* on the
// previous clock edge. The port names and widths are those of the design's
// CentralUnit; the map generator parameters (OBST_PCT, SEED, START_CELL,
// GOAL_CELL, INIT_FILE) only select the initial map contents.
module central_unit #(
  parameter int unsigned ADDR_W     = 11,
  parameter int unsigned COLS       = 40,
  parameter int unsigned ROWS       = 40,
  parameter int unsigned OBST_PCT   = 25,
  parameter int unsigned SEED       = 1,
  parameter int unsigned START_CELL = 41,
  parameter int unsigned GOAL_CELL  = 1558,
  parameter string       INIT_FILE  = ""
) (
  input  logic              CLK,
  input  logic [ADDR_W-1:0] ADDRalgMap,
  input  logic [ADDR_W-1:0] ADDRalgMap2,
  input  logic [ADDR_W-1:0] ADDRalgTmp,
  input  logic [ADDR_W-1:0] ADDRalgTmp2,
  input  logic [ADDR_W-1:0] ADDRinitMap,
  input  logic [1:0]        DINalgMap,
  input  logic [1:0]        DINalgTmp,
  input  logic              WEalgMap,
  input  logic              WEalgTmp,
  output logic [1:0]        VALalgMap,
  output logic [1:0]        VALalgMap2,
  output logic [1:0]        VALalgTmp,
  output logic [1:0]        VALalgTmp2,
  output logic [1:0]        VALinitMap
);
  init_rom #(
    .ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(OBST_PCT), .SEED(SEED),
    .START_CELL(START_CELL), .GOAL_CELL(GOAL_CELL), .INIT_FILE(INIT_FILE)
  ) u_init_map (
    .clk  (CLK),
    .addr (ADDRinitMap),
    .dout (VALinitMap)
  );

  dp_ram #(.ADDR_W(ADDR_W), .DATA_W(2)) u_alg_map (
    .clk    (CLK),
    .addr_a (ADDRalgMap),
    .din_a  (DINalgMap),
    .we_a   (WEalgMap),
    .dout_a (VALalgMap),
    .addr_b (ADDRalgMap2),
    .dout_b (VALalgMap2)
  );

  dp_ram #(.ADDR_W(ADDR_W), .DATA_W(2)) u_alg_tmp (
    .clk    (CLK),
    .addr_a (ADDRalgTmp),
    .din_a  (DINalgTmp),
    .we_a   (WEalgTmp),
    .dout_a (VALalgTmp),
    .addr_b (ADDRalgTmp2),
    .dout_b (VALalgTmp2)
  );
endmodule
