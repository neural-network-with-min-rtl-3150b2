// Colour image recognition network of grouped trixel MIN/MAX nodes.
//
// K groups of G trixel nodes. The image pixels, already mapped to the nodes,
// arrive in parallel on pix (group k, node i at pix[k][i]). Each group sums and
// thresholds its node responses; the network response is the number of groups
// that responded 1. train (or clear) updates (initialises) every node at the
// next clock edge. eval registers the response of the pixels present: resp and
// valid (a one-cycle pulse) appear one cycle after eval. K and G are not fixed
// by the method; the defaults (4 groups of 3) are this design's choice.
module trixel_net #(
  parameter int unsigned K      = 4,
  parameter int unsigned G      = 3,
  parameter int unsigned N_BITS = 8,
  parameter int unsigned TOL    = 0,
  localparam int unsigned SW    = $clog2(G + 1),
  localparam int unsigned RW    = $clog2(K + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                train,
  input  logic                eval,
  input  logic [3*N_BITS-1:0] pix    [K][G],
  input  logic [SW-1:0]       thresh [K],
  output logic [RW-1:0]       resp,
  output logic                valid
);
  logic [K-1:0]  grp_r;
  logic [RW-1:0] total;

  for (genvar k = 0; k < K; k++) begin : g_group
    trixel_group #(.G(G), .N_BITS(N_BITS), .TOL(TOL)) u_group (
      .clk, .rst_n, .clear, .train, .pix(pix[k]), .thresh(thresh[k]),
      .sum(), .r(grp_r[k]));
  end

  always_comb begin
    total = '0;
    for (int k = 0; k < K; k++) total += RW'(grp_r[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp  <= '0;
      valid <= 1'b0;
    end else begin
      valid <= eval;
      if (eval) resp <= total;
    end
  end
endmodule
