// 'Trixel' MIN/MAX node for colour images.
//
// Three MIN/MAX nodes, one per colour component of an RGB pixel, whose
// responses are combined by a logical AND: the trixel responds 1 only when all
// three components lie within their trained ranges. pix carries R in bits
// [3n-1:2n], G in [2n-1:n] and B in [n-1:0] (the packing is this design's
// choice). clear/train act on all three nodes at the next clock edge; o is
// combinational.
module trixel_node #(
  parameter int unsigned N_BITS = 8,
  parameter int unsigned TOL    = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                train,
  input  logic [3*N_BITS-1:0] pix,
  output logic                o
);
  logic [2:0] comp_o;

  for (genvar c = 0; c < 3; c++) begin : g_comp
    minmax_node #(.N_BITS(N_BITS), .TOL(TOL)) u_node (
      .clk, .rst_n, .clear, .train,
      .x(pix[c*N_BITS +: N_BITS]), .o(comp_o[c]));
  end

  assign o = &comp_o;
endmodule
