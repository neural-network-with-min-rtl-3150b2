// Self-checking test of phase_gen: after reset the strobes run ph1, ph2, ph3,
// ph1, ... with exactly one high in every cycle.
module tb_phase_gen;
  logic clk = 0, rst_n = 0, ph1, ph2, ph3;
  int checks = 0, failures = 0;
  phase_gen dut (.clk, .rst_n, .ph1, .ph2, .ph3);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      checks++;
      if ({ph3, ph2, ph1} !== (3'b001 << (i % 3))) begin failures++; $display("cycle %0d: %b", i, {ph3, ph2, ph1}); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
