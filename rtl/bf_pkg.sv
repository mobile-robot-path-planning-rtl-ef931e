// bf_pkg: types and helper functions shared by the breadth-first path planner.
//
// The map is a ROWS x COLS grid of cells stored row by row, so cell (r, c) has
// address r*COLS + c and its four neighbours are addr-COLS (N), addr+COLS (S),
// addr-1 (W) and addr+1 (E); there are no diagonal moves. Every cell of the
// working map holds a 2-bit code (free, obstacle, visited, path). The direction
// map holds, for every cell the search reached, the 2-bit direction in which
// the cell that discovered it lies, so the path can be walked back from the
// goal. The four directions and the four neighbours follow the design; the
// numeric codes and the built-in test map generator are this implementation's
// own choices.
package bf_pkg;

  // Working-map cell codes.
  typedef enum logic [1:0] {
    CELL_FREE    = 2'd0,
    CELL_OBST    = 2'd1,
    CELL_VISITED = 2'd2,
    CELL_PATH    = 2'd3
  } cell_e;

  // Direction codes, in the order the neighbours are examined.
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_S = 2'd1,
    DIR_W = 2'd2,
    DIR_E = 2'd3
  } dir_e;

  // Address of the neighbour of `a` in direction `d` on a map COLS cells wide.
  function automatic logic [31:0] neighbour(input logic [31:0] a, input logic [1:0] d,
                                            input int unsigned cols);
    case (d)
      DIR_N:   return a - cols;
      DIR_S:   return a + cols;
      DIR_W:   return a - 1;
      default: return a + 1;
    endcase
  endfunction

  // Direction that points back along direction `d` (N<->S, W<->E).
  function automatic logic [1:0] opposite(input logic [1:0] d);
    return d ^ 2'b01;
  endfunction

  // Content of the built-in initial map at address `a`: the outer ring of the
  // grid is obstacle, the start and goal cells are free, and the inside is
  // obstacle with probability pct/100 according to an integer hash of the
  // address and the seed. Addresses beyond ROWS*COLS are obstacle.
  function automatic logic [1:0] init_cell(input int unsigned a, input int unsigned cols,
                                           input int unsigned rows, input int unsigned pct,
                                           input int unsigned seed,
                                           input int unsigned start_cell,
                                           input int unsigned goal_cell);
    int unsigned r, c;
    logic [31:0] h;
    if (a >= rows * cols) return CELL_OBST;
    r = a / cols;
    c = a % cols;
    if (r == 0 || c == 0 || r == rows - 1 || c == cols - 1) return CELL_OBST;
    if (a == start_cell || a == goal_cell) return CELL_FREE;
    h = a * 32'h9E37_79B1 ^ seed;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    h = h ^ (h >> 13);
    return ((h % 100) < pct) ? CELL_OBST : CELL_FREE;
  endfunction

endpackage
