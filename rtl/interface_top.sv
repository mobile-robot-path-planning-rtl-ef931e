// interface_top: the complete mobile-robot path planner with its display.
//
// A rising edge on `Start` makes the planner (comp_mare) restore the working
// map from the initial map, run a breadth-first search from START_CELL to
// GOAL_CELL over a ROWS x COLS grid, and, if the goal was reached, mark the
// path. `Ready` then rises and `Found` tells whether a path exists.
//
// At all times the display (vga) shows two pictures of the grid side by side,
// each cell a square of 2^CELL_SHIFT pixels: on the left the working map
// (free, obstacle, visited, path), starting at pixel column 0; on the right,
// starting at pixel column RIGHT_X, the direction each reached cell was
// discovered from, with unreached cells shown as in the working map. The
// glue here turns the pixel position the display publishes into a cell
// address (row * COLS + column), reads both memories through their display
// ports, and forms the display's 3-bit code one clock later; pixels outside
// both pictures show as obstacle colour (blue).
//
// Interface: Clock is the single system clock, which is also the pixel
// clock; Reset is synchronous and active high and brings every unit to its
// idle state (the memory contents are not cleared; the map is rebuilt at the
// start of every run). Start is a level (button) input sampled on Clock.
// The system partition, the two pictures and the port names follow the
// design; the `Found` output, the single clock, the cell size and the
// picture placement are this implementation's own.
module interface_top
  import bf_pkg::*;
#(
  parameter int unsigned ADDR_W     = 11,
  parameter int unsigned COLS       = 40,
  parameter int unsigned ROWS       = 40,
  parameter int unsigned OBST_PCT   = 25,
  parameter int unsigned SEED       = 1,
  parameter int unsigned START_CELL = COLS + 1,
  parameter int unsigned GOAL_CELL  = (ROWS - 2) * COLS + COLS - 2,
  parameter string       INIT_FILE  = "",
  parameter int unsigned CELL_SHIFT = 3,
  parameter int unsigned RIGHT_X    = 400
) (
  input  logic       Reset,
  input  logic       Clock,
  input  logic       Start,
  output logic       HSync,
  output logic       VSync,
  output logic [2:0] RGB,
  output logic       Ready,
  output logic       Found
);
  localparam int unsigned PIC_W = COLS << CELL_SHIFT;
  localparam int unsigned PIC_H = ROWS << CELL_SHIFT;

  typedef enum logic [1:0] {PIC_NONE, PIC_LEFT, PIC_RIGHT} pic_e;

  logic [21:0]       vga_addr;
  logic [2:0]        vga_data;
  logic [10:0]       px, py, col_px;
  logic [ADDR_W-1:0] cell_addr;
  pic_e              pic, pic_q;
  logic [1:0]        map_val, dir_val;

  assign px = vga_addr[10:0];
  assign py = vga_addr[21:11];

  // Pixel position -> picture and cell address.
  always_comb begin
    pic    = PIC_NONE;
    col_px = px;
    if (py < 11'(PIC_H)) begin
      if (px < 11'(PIC_W)) begin
        pic = PIC_LEFT;
      end else if (px >= 11'(RIGHT_X) && px < 11'(RIGHT_X + PIC_W)) begin
        pic    = PIC_RIGHT;
        col_px = px - 11'(RIGHT_X);
      end
    end
    cell_addr = ADDR_W'(32'(py >> CELL_SHIFT) * COLS + 32'(col_px >> CELL_SHIFT));
  end

  always_ff @(posedge Clock) begin
    if (Reset) pic_q <= PIC_NONE;
    else       pic_q <= pic;
  end

  // Memory words -> display code, aligned with the memories' read latency.
  always_comb begin
    case (pic_q)
      PIC_LEFT:  vga_data = {1'b0, map_val};
      PIC_RIGHT: vga_data = (map_val == CELL_VISITED || map_val == CELL_PATH)
                            ? {1'b1, dir_val} : {1'b0, map_val};
      default:   vga_data = {1'b0, CELL_OBST};
    endcase
  end

  vga #(.DATA_LAT(1)) u_vga (
    .RESET (Reset),
    .CLOCK (Clock),
    .DATA  (vga_data),
    .ADDR  (vga_addr),
    .HSYNC (HSync),
    .VSYNC (VSync),
    .RGB   (RGB)
  );

  comp_mare #(
    .ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(OBST_PCT), .SEED(SEED),
    .START_CELL(START_CELL), .GOAL_CELL(GOAL_CELL), .INIT_FILE(INIT_FILE)
  ) u_comp_mare (
    .clock     (Clock),
    .reset     (Reset),
    .start_btn (Start),
    .ready     (Ready),
    .found     (Found),
    .addr_map2 (cell_addr),
    .val_map2  (map_val),
    .addr_tmp2 (cell_addr),
    .val_tmp2  (dir_val)
  );
endmodule
