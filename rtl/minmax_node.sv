// MIN/MAX node with its own registers, for networks evaluated in parallel.
//
// The node keeps the absolute minimum and maximum of the values x presented
// while train is high, and its response o is 1 when x lies between them, both
// ends included: O = F(I), F(x) = 1 for MIN <= x <= MAX, else 0. clear sets
// MIN = 2^n-1 and MAX = 0, so the first trained value becomes both and a node
// never trained responds 0. TOL widens the band by TOL below MIN and above MAX
// (saturating at 0 and 2^n-1), the optional tolerance band for illumination
// changes; its value (default 0, no band) is this design's choice.
// Timing: clear and train take effect at the next clock edge (clear wins);
// o is combinational from x and the stored values.
module minmax_node #(
  parameter int unsigned N_BITS = 8,
  parameter int unsigned TOL    = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              train,
  input  logic [N_BITS-1:0] x,
  output logic              o
);
  logic [N_BITS-1:0] mn, mx;
  logic [N_BITS:0]   lo, hi;   // band limits with one extra bit for saturation
  logic signed [N_BITS+1:0] lo_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mn <= '1;
      mx <= '0;
    end else if (clear) begin
      mn <= '1;
      mx <= '0;
    end else if (train) begin
      if (x < mn) mn <= x;
      if (x > mx) mx <= x;
    end
  end

  always_comb begin
    lo_s = $signed({2'b00, mn}) - $signed((N_BITS+2)'(TOL));
    lo   = lo_s[N_BITS+1] ? '0 : lo_s[N_BITS:0];
    hi = {1'b0, mx} + (N_BITS+1)'(TOL);
    o  = ({1'b0, x} >= lo) && ({1'b0, x} <= hi);
  end
endmodule
