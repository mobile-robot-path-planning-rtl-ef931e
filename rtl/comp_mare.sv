// comp_mare: sequencer and memory multiplexers of the path planner.
//
// A four-state machine runs one planning operation per rising edge of
// `start_btn`:
//   STANDBY - idle, waiting for the button;
//   INIT    - copy_mem restores the working map from the initial map;
//   BF      - bf searches from START_CELL to GOAL_CELL;
//   PATH    - mark_path marks the path (entered only if the goal was found);
// and then returns to STANDBY. In each working state the machine sends the
// unit a one-cycle start pulse, waits for its finished flag, and meanwhile
// routes the algorithm ports of the memories (central_unit) to that unit
// only. The display ports of the memories are brought out unchanged.
//
// Interface: `ready` is high in STANDBY once an operation has completed and
// low from the button press until the next completion; `found` tells whether
// that operation reached the goal. Both are low after reset.
//
// Timing, with C = ROWS*COLS cells, E cells expanded by the search and L
// cells on the path, counting the clock edge that sees the button as 1:
// STANDBY 1 + INIT C + 3 + BF 10E + 5 + PATH 2L + 1, so `ready` is high
// C + 10E + 2L + 10 cycles after the button edge when the goal is found and
// C + 10E + 8 cycles after it when it is not.
// The four states, the units and the shared memories follow the design; the
// handshake and the start/goal cells as parameters are this
// implementation's own.
module comp_mare
  import bf_pkg::*;
#(
  parameter int unsigned ADDR_W     = 11,
  parameter int unsigned COLS       = 40,
  parameter int unsigned ROWS       = 40,
  parameter int unsigned OBST_PCT   = 25,
  parameter int unsigned SEED       = 1,
  parameter int unsigned START_CELL = COLS + 1,
  parameter int unsigned GOAL_CELL  = (ROWS - 2) * COLS + COLS - 2,
  parameter string       INIT_FILE  = ""
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              start_btn,
  output logic              ready,
  output logic              found,
  // display read ports
  input  logic [ADDR_W-1:0] addr_map2,
  output logic [1:0]        val_map2,
  input  logic [ADDR_W-1:0] addr_tmp2,
  output logic [1:0]        val_tmp2
);
  typedef enum logic [1:0] {ST_STANDBY, ST_INIT, ST_BF, ST_PATH} state_e;

  localparam logic [ADDR_W-1:0] START_A = ADDR_W'(START_CELL);
  localparam logic [ADDR_W-1:0] GOAL_A  = ADDR_W'(GOAL_CELL);

  state_e state;
  logic   launched;     // the current state's unit has been sent its pulse
  logic   btn_q;
  logic   go;           // start pulse to the current state's unit

  // memory ports
  logic [ADDR_W-1:0] map_addr, tmp_addr, init_addr;
  logic [1:0]        map_din, tmp_din, map_val, tmp_val, init_val;
  logic              map_we, tmp_we;

  // unit signals
  logic [ADDR_W-1:0] cp_inaddr, cp_outaddr;
  logic [1:0]        cp_outval;
  logic              cp_outwe, cp_done;
  logic [ADDR_W-1:0] bf_addr, bf_addr_prec;
  logic [1:0]        bf_modify, bf_modify_prec;
  logic              bf_write, bf_write_prec, bf_ready, bf_found;
  logic [ADDR_W-1:0] mp_addr, mp_addr_prec;
  logic [1:0]        mp_modify;
  logic              mp_write, mp_ready;

  assign go = !launched && state != ST_STANDBY;

  central_unit #(
    .ADDR_W(ADDR_W), .COLS(COLS), .ROWS(ROWS), .OBST_PCT(OBST_PCT), .SEED(SEED),
    .START_CELL(START_CELL), .GOAL_CELL(GOAL_CELL), .INIT_FILE(INIT_FILE)
  ) u_central (
    .CLK         (clock),
    .ADDRalgMap  (map_addr),
    .ADDRalgMap2 (addr_map2),
    .ADDRalgTmp  (tmp_addr),
    .ADDRalgTmp2 (addr_tmp2),
    .ADDRinitMap (init_addr),
    .DINalgMap   (map_din),
    .DINalgTmp   (tmp_din),
    .WEalgMap    (map_we),
    .WEalgTmp    (tmp_we),
    .VALalgMap   (map_val),
    .VALalgMap2  (val_map2),
    .VALalgTmp   (tmp_val),
    .VALalgTmp2  (val_tmp2),
    .VALinitMap  (init_val)
  );

  copy_mem #(.ADDR_W(ADDR_W), .CELLS(ROWS * COLS)) u_copy (
    .clk     (clock),
    .reset   (reset),
    .start   (go && state == ST_INIT),
    .inval   (init_val),
    .inaddr  (cp_inaddr),
    .outaddr (cp_outaddr),
    .outval  (cp_outval),
    .outwe   (cp_outwe),
    .done    (cp_done)
  );

  bf #(.ADDR_W(ADDR_W), .COLS(COLS)) u_bf (
    .clock      (clock),
    .reset      (reset),
    .solve_req  (go && state == ST_BF),
    .start      (START_A),
    .target     (GOAL_A),
    .val        (map_val),
    .addr       (bf_addr),
    .addrPrec   (bf_addr_prec),
    .modify     (bf_modify),
    .modifyPrec (bf_modify_prec),
    .write      (bf_write),
    .writePrec  (bf_write_prec),
    .ready      (bf_ready),
    .found      (bf_found)
  );

  mark_path #(.ADDR_W(ADDR_W), .COLS(COLS)) u_mark (
    .clock    (clock),
    .reset    (reset),
    .solve_req(go && state == ST_PATH),
    .start    (START_A),
    .target   (GOAL_A),
    .valPrec  (tmp_val),
    .addr     (mp_addr),
    .addrPrec (mp_addr_prec),
    .modify   (mp_modify),
    .write    (mp_write),
    .ready    (mp_ready)
  );

  // Memory multiplexers: only the unit of the current state reaches port 1.
  assign init_addr = cp_inaddr;
  always_comb begin
    map_addr = '0;
    map_din  = CELL_FREE;
    map_we   = 1'b0;
    tmp_addr = '0;
    tmp_din  = DIR_N;
    tmp_we   = 1'b0;
    case (state)
      ST_INIT: begin
        map_addr = cp_outaddr;
        map_din  = cp_outval;
        map_we   = cp_outwe;
      end
      ST_BF: begin
        map_addr = bf_addr;
        map_din  = bf_modify;
        map_we   = bf_write;
        tmp_addr = bf_addr_prec;
        tmp_din  = bf_modify_prec;
        tmp_we   = bf_write_prec;
      end
      ST_PATH: begin
        map_addr = mp_addr;
        map_din  = mp_modify;
        map_we   = mp_write;
        tmp_addr = mp_addr_prec;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clock) begin
    if (reset) begin
      state    <= ST_STANDBY;
      launched <= 1'b0;
      btn_q    <= 1'b0;
      ready    <= 1'b0;
      found    <= 1'b0;
    end else begin
      btn_q <= start_btn;
      if (go) launched <= 1'b1;
      case (state)
        ST_STANDBY: if (start_btn && !btn_q) begin
          ready    <= 1'b0;
          found    <= 1'b0;
          launched <= 1'b0;
          state    <= ST_INIT;
        end
        ST_INIT: if (launched && cp_done) begin
          launched <= 1'b0;
          state    <= ST_BF;
        end
        ST_BF: if (launched && bf_ready) begin
          launched <= 1'b0;
          found    <= bf_found;
          if (bf_found) begin
            state <= ST_PATH;
          end else begin
            ready <= 1'b1;
            state <= ST_STANDBY;
          end
        end
        ST_PATH: if (launched && mp_ready) begin
          launched <= 1'b0;
          ready    <= 1'b1;
          state    <= ST_STANDBY;
        end
        default: state <= ST_STANDBY;
      endcase
    end
  end

  // A unit's finished flag is cleared by its start pulse, so it must be low
  // the cycle after the pulse.
  flag_cleared_by_pulse: assert property (@(posedge clock) disable iff (reset)
    go |=> !((state == ST_INIT && cp_done) || (state == ST_BF && bf_ready) ||
             (state == ST_PATH && mp_ready)));
endmodule
