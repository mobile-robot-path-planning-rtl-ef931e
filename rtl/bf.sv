// bf: breadth-first search engine over the map memory.
//
// On a `solve_req` pulse (the design's `solve`, renamed because `solve` is a
// SystemVerilog keyword) the engine marks the start cell visited and enqueues it.
// It then repeats: pop a cell from the process queue (bf_queue); if it is the
// target, stop with `found` set; otherwise look at its four neighbours in the
// order N, S, W, E. A neighbour whose map code is free is marked visited in the
// map (`addr`/`modify`/`write`), gets the direction back to the popped cell
// written into the direction map (`addrPrec`/`modifyPrec`/`writePrec`) and is
// enqueued. When the queue runs empty the search stops with `found` clear.
// The map is treated as the visited list, so no separate visited memory is
// needed; the map must be closed by a ring of obstacles, which keeps every
// neighbour address inside it.
//
// Interface: `addr` serves both the read and the write of the single map
// port; `val` is the map content of `addr` one cycle after `addr` is driven
// (synchronous block RAM). `ready` rises when a search ends and stays high
// until the next `solve_req`; it is low after reset. The engine only ever
// writes the visited code into the map, so `modify` is a constant; it stays a
// port because the map port it drives is shared with the other units.
//
// Timing: 1 cycle to accept `solve_req`, 1 cycle to seed the queue, then 2 cycles
// per pop (pop, compare with target) plus 2 cycles per neighbour (address,
// test and write), so 10 cycles per expanded cell.
// The algorithm, the port names and widths follow the design; the cell and
// direction codes, the reset, the `found` output and the cycle schedule are
// this implementation's own.
module bf
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
  input  logic [1:0]        val,
  output logic [ADDR_W-1:0] addr,
  output logic [ADDR_W-1:0] addrPrec,
  output logic [1:0]        modify,
  output logic [1:0]        modifyPrec,
  output logic              write,
  output logic              writePrec,
  output logic              ready,
  output logic              found
);
  typedef enum logic [2:0] {
    S_IDLE, S_SEED, S_POP, S_GOAL, S_NB_ADDR, S_NB_TEST
  } state_e;

  state_e            state;
  logic [ADDR_W-1:0] crt;      // cell being expanded
  logic [1:0]        dir;      // neighbour being examined
  logic [ADDR_W-1:0] nb;       // its address
  logic              q_push, q_pop, q_empty, q_full;
  logic [ADDR_W-1:0] q_din, q_dout;
  logic              nb_free;

  assign nb      = ADDR_W'(neighbour(32'(crt), dir, COLS));
  assign nb_free = (val == CELL_FREE);

  bf_queue #(.ADDR_W(ADDR_W)) u_queue (
    .clk   (clock),
    .reset (reset),
    .clear (state == S_IDLE && solve_req),
    .push  (q_push),
    .din   (q_din),
    .pop   (q_pop),
    .dout  (q_dout),
    .empty (q_empty),
    .full  (q_full)
  );

  // Memory and queue controls, decoded from the state.
  always_comb begin
    addr       = nb;
    modify     = CELL_VISITED;
    write      = 1'b0;
    addrPrec   = nb;
    modifyPrec = opposite(dir);
    writePrec  = 1'b0;
    q_push     = 1'b0;
    q_din      = nb;
    q_pop      = 1'b0;
    case (state)
      S_SEED: begin
        addr   = start;
        write  = 1'b1;
        q_push = 1'b1;
        q_din  = start;
      end
      S_POP:     q_pop = !q_empty;
      S_NB_TEST: begin
        write     = nb_free;
        writePrec = nb_free;
        q_push    = nb_free;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state <= S_IDLE;
      ready <= 1'b0;
      found <= 1'b0;
      crt   <= '0;
      dir   <= DIR_N;
    end else begin
      case (state)
        S_IDLE: if (solve_req) begin
          ready <= 1'b0;
          found <= 1'b0;
          state <= S_SEED;
        end
        S_SEED: state <= S_POP;
        S_POP: begin
          if (q_empty) begin
            ready <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_GOAL;
          end
        end
        S_GOAL: begin
          crt <= q_dout;
          dir <= DIR_N;
          if (q_dout == target) begin
            found <= 1'b1;
            ready <= 1'b1;
            state <= S_IDLE;
          end else begin
            state <= S_NB_ADDR;
          end
        end
        S_NB_ADDR: state <= S_NB_TEST;
        S_NB_TEST: begin
          dir   <= dir + 1'b1;
          state <= (dir == DIR_E) ? S_POP : S_NB_ADDR;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  queue_never_overflows: assert property (@(posedge clock) disable iff (reset)
                                          q_push |-> !q_full);
endmodule
