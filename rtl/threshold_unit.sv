// Threshold unit: R = G(x), 1 when the summed response x reaches the preset
// value t (x >= t), else 0. Combinational; W is the width of sum and threshold.
module threshold_unit #(
  parameter int unsigned W = 10
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] t,
  output logic         r
);
  always_comb r = (x >= t);
endmodule
