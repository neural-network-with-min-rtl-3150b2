// Top level: MIN/MAX node networks for image recognition.
//
// Two networks stand side by side, each with its own ports:
//  * the single-layer network unit (MIN_MAX CORE) with U = 512 nodes of n = 8
//    bits and a 10-bit response, evaluated serially from memories, together
//    with its three-phase clock source (phase_gen). Values enter on in_port,
//    one per 3-cycle phase period, in the cycles where sample (the CLK1 phase)
//    is high; synchr, clear and train are sampled at the same time. See
//    min_max_core for the command timing;
//  * the colour network of K groups of G trixel nodes (trixel_net), evaluated
//    in parallel from already mapped RGB pixels. The pseudo-random choice of
//    pixels from the image is left to the user of the top.
// One clock and an asynchronous active-low reset serve both.
module minmax_top
  import minmax_pkg::*;
#(
  parameter int unsigned N_BITS  = DEF_N_BITS,
  parameter int unsigned U_NODES = DEF_U_NODES,
  parameter int unsigned M_BITS  = DEF_M_BITS,
  parameter int unsigned A_BITS  = DEF_A_BITS,
  parameter int unsigned K       = 4,
  parameter int unsigned G       = 3,
  parameter int unsigned TOL     = 0,
  localparam int unsigned SW     = $clog2(G + 1),
  localparam int unsigned RW     = $clog2(K + 1)
) (
  input  logic                clk,
  input  logic                rst_n,
  // single-layer network unit
  input  logic [N_BITS-1:0]   in_port,
  input  logic                train,
  input  logic                clear,
  input  logic                synchr,
  output logic                sample,
  output logic                busy,
  output logic                done,
  output logic [M_BITS-1:0]   response,
  // colour network
  input  logic [3*N_BITS-1:0] tx_pix    [K][G],
  input  logic                tx_train,
  input  logic                tx_clear,
  input  logic                tx_eval,
  input  logic [SW-1:0]       tx_thresh [K],
  output logic [RW-1:0]       tx_resp,
  output logic                tx_valid
);
  logic ph1, ph2, ph3;

  phase_gen u_clock_source (.clk, .rst_n, .ph1, .ph2, .ph3);

  min_max_core #(.N_BITS(N_BITS), .U_NODES(U_NODES), .M_BITS(M_BITS), .A_BITS(A_BITS))
    u_core (.clk, .rst_n, .ph1, .ph2, .ph3, .in_port, .train, .clear, .synchr,
            .busy, .done, .response);

  assign sample = ph1;

  trixel_net #(.K(K), .G(G), .N_BITS(N_BITS), .TOL(TOL)) u_colour_net (
    .clk, .rst_n, .clear(tx_clear), .train(tx_train), .eval(tx_eval),
    .pix(tx_pix), .thresh(tx_thresh), .resp(tx_resp), .valid(tx_valid));
endmodule
