// copy_mem: restores the working map from the initial map.
//
// On a `start` pulse the copier walks `inaddr` over the CELLS addresses
// 0 .. CELLS-1 of the initial map, one per cycle. The memory returns each word
// on `inval` one cycle later; the copier then writes it through `outaddr`,
// `outval` and `outwe` into the working map, so the write address trails the
// read address by one cycle. `done` rises after the last write and stays high
// until the next `start`; it is low after reset. `outval` is `inval` passed
// straight through: the read data arrives exactly when its write is due.
//
// Timing: CELLS + 2 cycles from the `start` pulse to `done`.
// The ports inval, inaddr, outaddr, outval, start and done are the design's;
// the write strobe `outwe`, the reset and the one-word-per-cycle schedule
// are this implementation's own.
module copy_mem #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned CELLS  = 1600
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              start,
  input  logic [1:0]        inval,
  output logic [ADDR_W-1:0] inaddr,
  output logic [ADDR_W-1:0] outaddr,
  output logic [1:0]        outval,
  output logic              outwe,
  output logic              done
);
  logic reading;   // a read is issued this cycle

  assign outval = inval;

  always_ff @(posedge clk) begin
    if (reset) begin
      reading <= 1'b0;
      inaddr  <= '0;
      outaddr <= '0;
      outwe   <= 1'b0;
      done    <= 1'b0;
    end else begin
      outaddr <= inaddr;
      outwe   <= reading;
      if (start && !reading) begin
        reading <= 1'b1;
        inaddr  <= '0;
        done    <= 1'b0;
      end else if (reading) begin
        if (inaddr == ADDR_W'(CELLS - 1)) reading <= 1'b0;
        else                              inaddr  <= inaddr + 1'b1;
      end
      if (outwe && !reading) done <= 1'b1;
    end
  end
endmodule
