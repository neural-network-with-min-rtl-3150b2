// Three-phase clock source for the MIN/MAX core.
//
// The core is sequenced by three clocking signals CLK1, CLK2 and CLK3 served by
// a stand-alone block. Here they are one-cycle enable strobes in a single clock
// domain (this design's choice, instead of three separate clocks): a one-hot
// ring of three flip-flops that rotates every clock cycle, so ph1, ph2 and ph3
// each are high for one cycle out of three, in that order. After reset ph1 is
// high in the first cycle.
module phase_gen (
  input  logic clk,
  input  logic rst_n,
  output logic ph1,   // CLK1: input capture and address update
  output logic ph2,   // CLK2: memory read
  output logic ph3    // CLK3: compare, write, count
);
  logic [2:0] ring;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ring <= 3'b001;
    else        ring <= {ring[1:0], ring[2]};
  end

  assign ph1 = ring[0];
  assign ph2 = ring[1];
  assign ph3 = ring[2];

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(ring));
endmodule
