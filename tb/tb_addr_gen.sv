// Self-checking test of addr_gen with 512 nodes: clear, counting through all
// addresses with last on 511 only, wrap to 0, hold without inc, and a reduced
// node count (300) to check the wrap point follows U_NODES.
module tb_addr_gen;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [8:0] addr, addr_s;
  logic last, last_s;
  int checks = 0, failures = 0;
  addr_gen #(.A_BITS(9), .U_NODES(512)) dut (.clk, .rst_n, .clr, .inc, .addr, .last);
  addr_gen #(.A_BITS(9), .U_NODES(300)) dut_s (.clk, .rst_n, .clr, .inc, .addr(addr_s), .last(last_s));
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    clr = 1; @(negedge clk); clr = 0;
    checks++; if (addr !== 0) failures++;
    for (int i = 0; i < 1030; i++) begin
      checks += 4;
      if (addr !== 9'(i % 512)) failures++;
      if (last !== ((i % 512) == 511)) failures++;
      if (addr_s !== 9'(i % 300)) failures++;
      if (last_s !== ((i % 300) == 299)) failures++;
      inc = 1; @(negedge clk); inc = 0;
      if (i == 100) begin
        repeat (3) @(negedge clk);       // hold
        checks++; if (addr !== 101) failures++;
      end
    end
    clr = 1; inc = 1; @(negedge clk); clr = 0; inc = 0;
    checks++; if (addr !== 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
