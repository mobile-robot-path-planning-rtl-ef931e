// mark_path: reconstruction of the path after the breadth-first search.
//
// On a `solve_req` pulse the walk begins at `target`. Each step writes the path
// code into the map at the current cell and, in the same cycle, reads the
// direction map at that cell; the next cycle the current cell moves one step
// in the direction read. The walk ends after the start cell has been marked,
// so start, goal and every cell between them carry the path code.
//
// Interface: `addr`/`modify`/`write` drive the map's algorithm port,
// `addrPrec`/`valPrec` the direction map's (read data one cycle after the
// address). `ready` rises when the walk ends and stays high until the next
// `solve_req`; it is low after reset. As a guard against a corrupted direction
// map, the walk also stops after 2^ADDR_W steps. The unit only ever writes
// the path code, so `modify` is a constant, kept as a port of the shared map
// port.
//
// Timing: 1 cycle to accept `solve_req`, then 2 cycles per path cell except the
// start cell, which takes 1: a path of L cells takes 2L cycles to `ready`.
// The walk from goal to start and the ports follow the design; the reset,
// the step guard and the two-cycle step are this implementation's own.
module mark_path
  import bf_pkg::*;
#(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned COLS   = 40
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              solve_req,
  input  logic [ADDR_W-1:0] start,
  input  logic [ADDR_W-1:0] target,
  input  logic [1:0]        valPrec,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] addrPrec,
  output logic [1:0]        modify,
  output logic              write,
  output logic              ready
);
  typedef enum logic [1:0] {S_IDLE, S_MARK, S_STEP} state_e;

  state_e            state;
  logic [ADDR_W-1:0] cur;
  logic [ADDR_W:0]   steps;

  assign addr     = cur;
  assign addrPrec = cur;
  assign modify   = CELL_PATH;
  assign write    = (state == S_MARK);

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= S_IDLE;
      ready <= 1'b0;
      cur   <= '0;
      steps <= '0;
    end else begin
      case (state)
        S_IDLE: if (solve_req) begin
          ready <= 1'b0;
          cur   <= target;
          steps <= '0;
          state <= S_MARK;
        end
        S_MARK: begin
          if (cur == start || steps[ADDR_W]) begin
            ready <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_STEP;
          end
        end
        S_STEP: begin
          cur   <= ADDR_W'(neighbour(32'(cur), valPrec, COLS));
          steps <= steps + 1'b1;
          state <= S_MARK;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
