// Memory input multiplexer (MUX MAX / MUX MIN) of the MIN/MAX core.
//
// Passes the captured input value INDATA to the memory data input for training
// and recognition, or a constant for initialising the memory: 00000000 for the
// MAX memory and 11111111 for the MIN memory, so that the first training value
// becomes both minimum and maximum. INIT_VAL selects the constant, so one module
// serves both multiplexers. Combinational.
module init_mux #(
  parameter int unsigned        N_BITS   = 8,
  parameter logic [N_BITS-1:0]  INIT_VAL = '0
) (
  input  logic              init_sel,  // 1: initialisation constant
  input  logic [N_BITS-1:0] indata,
  output logic [N_BITS-1:0] memin
);
  always_comb memin = init_sel ? INIT_VAL : indata;
endmodule
