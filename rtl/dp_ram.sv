// dp_ram: dual-port block memory used for the working map and the direction map.
//
// Port A reads and writes (`we_a` writes `din_a` at `addr_a`); port B only
// reads. Both reads are synchronous: the word at the address presented in
// one cycle appears on the data output after the next clock edge. A read on
// port A of the address being written returns the old word (read-first), as
// a Virtex block RAM in its READ_FIRST mode does. Contents are not
// initialised; the system fills the map with its copier before use.
module dp_ram #(
  parameter int unsigned ADDR_W = 11,
  parameter int unsigned DATA_W = 2
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic [DATA_W-1:0] din_a,
  input  logic              we_a,
  output logic [DATA_W-1:0] dout_a,
  input  logic [ADDR_W-1:0] addr_b,
  output logic [DATA_W-1:0] dout_b
);
  logic [DATA_W-1:0] mem [2 ** ADDR_W];

  always_ff @(posedge clk) begin
    if (we_a) mem[addr_a] <= din_a;
    dout_a <= mem[addr_a];
  end

  always_ff @(posedge clk) begin
    dout_b <= mem[addr_b];
  end
endmodule
