// Node memory (RAM1 MAX / RAM2 MIN) of the MIN/MAX core.
//
// Holds one n-bit value per node: the absolute maximum in one instance, the
// absolute minimum in the other. A single-port array with synchronous write
// (we) and registered read (re), the shape of an FPGA embedded memory block.
// A read and a write in the same cycle return the old contents. Contents are
// not reset; the core's CLEAR sequence initialises them.
module node_ram #(
  parameter int unsigned N_BITS = 8,
  parameter int unsigned DEPTH  = 512,
  parameter int unsigned A_BITS = 9
) (
  input  logic              clk,
  input  logic              re,
  input  logic              we,
  input  logic [A_BITS-1:0] addr,
  input  logic [N_BITS-1:0] wdata,
  output logic [N_BITS-1:0] rdata
);
  logic [N_BITS-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
