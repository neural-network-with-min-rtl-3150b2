// Address generator (ADDR GEN) of the MIN/MAX core.
//
// A counter that gives the address of the node being processed. clr sets it to
// 0 (start of a pattern or of clearing), inc advances it by one and wraps after
// U_NODES-1. last is high while the address is the last node. Sequential order
// is this design's choice. One cycle from clr/inc to the new address.
module addr_gen #(
  parameter int unsigned A_BITS  = 9,
  parameter int unsigned U_NODES = 512
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  output logic [A_BITS-1:0] addr,
  output logic              last
);
  localparam logic [A_BITS-1:0] LAST = A_BITS'(U_NODES - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (clr) addr <= '0;
    else if (inc) addr <= last ? '0 : addr + 1'b1;
  end

  assign last = (addr == LAST);
endmodule
