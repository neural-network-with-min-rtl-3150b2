// One group of trixel nodes for colour image recognition with grouping.
//
// G trixel nodes, each fed with one (pseudo-randomly chosen) pixel of the
// image; their 0/1 responses are summed and the sum is thresholded with the
// group's preset value thresh, giving the group response r. The group size
// (default 3, as drawn in the grouping scheme) is not fixed by the method.
// Training and clearing act on all nodes together at the next clock edge;
// sum and r are combinational from pix.
module trixel_group #(
  parameter int unsigned G      = 3,
  parameter int unsigned N_BITS = 8,
  parameter int unsigned TOL    = 0,
  localparam int unsigned SW    = $clog2(G + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  train,
  input  logic [3*N_BITS-1:0]   pix [G],
  input  logic [SW-1:0]         thresh,
  output logic [SW-1:0]         sum,
  output logic                  r
);
  logic [G-1:0] node_o;

  for (genvar i = 0; i < G; i++) begin : g_node
    trixel_node #(.N_BITS(N_BITS), .TOL(TOL)) u_trixel (
      .clk, .rst_n, .clear, .train, .pix(pix[i]), .o(node_o[i]));
  end

  always_comb begin
    sum = '0;
    for (int i = 0; i < G; i++) sum += SW'(node_o[i]);
  end

  threshold_unit #(.W(SW)) u_thresh (.x(sum), .t(thresh), .r);
endmodule
