// Self-checking test of resp_count (10 bits): random increments against a
// model, clear, and saturation at 1023.
module tb_resp_count;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [9:0] count;
  int model = 0, checks = 0, failures = 0;
  resp_count #(.M_BITS(10)) dut (.clk, .rst_n, .clr, .inc, .count);
  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk);
    checks++; if (count !== 0) failures++;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      clr = ($urandom % 1500) == 0; inc = 1'($urandom);
      @(negedge clk);
      if (clr) model = 0; else if (inc && model < 1023) model++;
      checks++; if (count !== 10'(model)) begin failures++; $display("count %0d exp %0d", count, model); end
    end
    clr = 1; @(negedge clk); clr = 0; inc = 1;
    repeat (1100) @(negedge clk);
    checks++; if (count !== 10'd1023) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
