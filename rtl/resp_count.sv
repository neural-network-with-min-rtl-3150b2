// Response counter (RESP COUNT) of the MIN/MAX core.
//
// Counts the nodes that responded 1 while a pattern is read; its value is the
// network's response, the sum of the node responses (no threshold). clr sets it
// to 0, inc adds one. It saturates at 2^M_BITS-1, a guard of this design that a
// 10-bit counter with 512 nodes never reaches. One cycle from inc to the count.
module resp_count #(
  parameter int unsigned M_BITS = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              inc,
  output logic [M_BITS-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     count <= '0;
    else if (clr)                   count <= '0;
    else if (inc && (count != '1))  count <= count + 1'b1;
  end
endmodule
