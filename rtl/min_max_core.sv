// MIN_MAX CORE: a single-layer network of MIN/MAX nodes, evaluated serially.
//
// Each node stores the absolute minimum and maximum of the values seen at its
// input during training and responds 1 to a value within them, both ends
// included. Instead of U parallel nodes the core keeps the U minima and maxima
// in two memories and processes one input value per phase period, the node
// address being the position of the value in the pattern. The response is the
// number of nodes that responded 1 (no threshold is applied).
//
// Units (as in the block scheme): input register, MUX MAX / MUX MIN choosing
// the captured value or the initial constants 00000000 / 11111111, RAM1 MAX and
// RAM2 MIN, COMPAR MAX / COMPAR MIN, address generator, response counter and
// the controller. Sizes default to n = 8, U = 512, m = 10, address 9 bits.
//
// Interface and timing: ph1/ph2/ph3 are the CLK1/CLK2/CLK3 phase strobes from
// phase_gen (one master clock instead of three clocks is this design's choice).
// in_port, synchr and clear are sampled at ph1. CLEAR initialises all nodes
// (3*U cycles). A pattern is U values, one per ph1, the first together with
// synchr; train, sampled with synchr, selects training or recognition. done
// pulses when the pattern ends, and response then holds the count. busy is high
// while clearing or reading. busy/done are additions of this design.
module min_max_core
  import minmax_pkg::*;
#(
  parameter int unsigned N_BITS  = DEF_N_BITS,
  parameter int unsigned U_NODES = DEF_U_NODES,
  parameter int unsigned M_BITS  = DEF_M_BITS,
  parameter int unsigned A_BITS  = DEF_A_BITS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ph1,
  input  logic              ph2,
  input  logic              ph3,
  input  logic [N_BITS-1:0] in_port,
  input  logic              train,
  input  logic              clear,
  input  logic              synchr,
  output logic              busy,
  output logic              done,
  output logic [M_BITS-1:0] response
);
  logic [N_BITS-1:0] indata, mem1in, mem2in, max_q, min_q;
  logic [A_BITS-1:0] address;
  logic cap_en, addr_clr, addr_inc, init_sel, we_max, we_min, cnt_clr, cnt_inc;
  logic gt_max, lt_min, last_addr;

  inp_reg #(.N_BITS(N_BITS)) u_inp_reg (
    .clk, .rst_n, .en(cap_en), .d(in_port), .q(indata));

  init_mux #(.N_BITS(N_BITS), .INIT_VAL({N_BITS{1'b0}})) u_mux_max (
    .init_sel, .indata, .memin(mem1in));
  init_mux #(.N_BITS(N_BITS), .INIT_VAL({N_BITS{1'b1}})) u_mux_min (
    .init_sel, .indata, .memin(mem2in));

  node_ram #(.N_BITS(N_BITS), .DEPTH(U_NODES), .A_BITS(A_BITS)) u_ram1_max (
    .clk, .re(ph2), .we(we_max), .addr(address), .wdata(mem1in), .rdata(max_q));
  node_ram #(.N_BITS(N_BITS), .DEPTH(U_NODES), .A_BITS(A_BITS)) u_ram2_min (
    .clk, .re(ph2), .we(we_min), .addr(address), .wdata(mem2in), .rdata(min_q));

  minmax_compar #(.N_BITS(N_BITS), .IS_MAX(1'b1)) u_compar_max (
    .a(mem1in), .stored(max_q), .outside(gt_max));
  minmax_compar #(.N_BITS(N_BITS), .IS_MAX(1'b0)) u_compar_min (
    .a(mem2in), .stored(min_q), .outside(lt_min));

  addr_gen #(.A_BITS(A_BITS), .U_NODES(U_NODES)) u_addr_gen (
    .clk, .rst_n, .clr(addr_clr), .inc(addr_inc), .addr(address), .last(last_addr));

  resp_count #(.M_BITS(M_BITS)) u_resp_count (
    .clk, .rst_n, .clr(cnt_clr), .inc(cnt_inc), .count(response));

  minmax_ctrl u_controller (
    .clk, .rst_n, .ph1, .ph3, .train, .clear, .synchr, .gt_max, .lt_min,
    .last_addr, .cap_en, .addr_clr, .addr_inc, .init_sel, .we_max, .we_min,
    .cnt_clr, .cnt_inc, .busy, .done);

  initial begin
    assert (2**A_BITS >= U_NODES) else $error("address too narrow for U_NODES");
    assert (2**M_BITS >  U_NODES) else $error("response too narrow for U_NODES");
  end
endmodule
