// Input register (INP REG) of the MIN/MAX core.
//
// Captures the value on the input bus when en (the CLK1 phase, gated by the
// controller) is high and holds it as INDATA for the rest of the phase period.
// One cycle latency from d to q. Reset clears it (reset is this design's choice).
module inp_reg #(
  parameter int unsigned N_BITS = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  logic [N_BITS-1:0] d,
  output logic [N_BITS-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end
endmodule
