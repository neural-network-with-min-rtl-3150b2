// Comparator (COMPAR MAX / COMPAR MIN) of the MIN/MAX core.
//
// Compares the input value with the value stored for the node. With IS_MAX = 1
// it flags an input above the stored maximum, with IS_MAX = 0 an input below the
// stored minimum. The node responds 1 when neither flag is set, which makes the
// range inclusive at both ends; in training a set flag asks for the memory to be
// written. Combinational.
module minmax_compar #(
  parameter int unsigned N_BITS = 8,
  parameter bit          IS_MAX = 1'b1
) (
  input  logic [N_BITS-1:0] a,       // input value
  input  logic [N_BITS-1:0] stored,  // stored MAX or MIN
  output logic              outside  // a > MAX, or a < MIN
);
  always_comb outside = IS_MAX ? (a > stored) : (a < stored);
endmodule
