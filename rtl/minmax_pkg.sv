// Shared constants and types of the MIN/MAX node network.
//
// The single-layer network unit evaluates U = 512 MIN/MAX nodes with n = 8 bit
// input values and an m = 10 bit response; these are the sizes of the reference
// FPGA implementation. The node address is 9 bits wide. The controller state
// type is shared by the controller and its testbench.
package minmax_pkg;
  localparam int unsigned DEF_N_BITS  = 8;    // depth of input values (n)
  localparam int unsigned DEF_U_NODES = 512;  // number of nodes (U)
  localparam int unsigned DEF_M_BITS  = 10;   // depth of the response (m)
  localparam int unsigned DEF_A_BITS  = 9;    // width of the node address

  // Controller states: waiting, sweeping the memories with the initial
  // constants, or reading the values of one pattern.
  typedef enum logic [1:0] {
    ST_IDLE  = 2'd0,
    ST_CLEAR = 2'd1,
    ST_RUN   = 2'd2
  } ctrl_state_e;
endpackage
