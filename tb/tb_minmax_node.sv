// Self-checking test of minmax_node without and with a tolerance band (TOL=5):
// after clear no value is accepted; after random training the response to
// every input value 0..255 is compared with MIN-TOL <= x <= MAX+TOL.
module tb_minmax_node;
  logic clk = 0, rst_n = 0, clear = 0, train = 0;
  logic [7:0] x = 0;
  logic o0, o5;
  int mn, mx, checks = 0, failures = 0;
  minmax_node #(.N_BITS(8), .TOL(0)) u0 (.clk, .rst_n, .clear, .train, .x, .o(o0));
  minmax_node #(.N_BITS(8), .TOL(5)) u5 (.clk, .rst_n, .clear, .train, .x, .o(o5));
  always #5 clk = ~clk;

  task automatic sweep();
    for (int v = 0; v < 256; v++) begin
      x = 8'(v); #1;
      checks += 2;
      if (o0 !== (v >= mn && v <= mx)) begin failures++; $display("TOL0 x=%0d min=%0d max=%0d o=%b", v, mn, mx, o0); end
      if (o5 !== (v >= mn - 5 && v <= mx + 5)) begin failures++; $display("TOL5 x=%0d o=%b", v, o5); end
    end
  endtask

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 20; round++) begin
      @(negedge clk);
      clear = 1; @(negedge clk); clear = 0;
      mn = 255; mx = 0;
      // nothing accepted by an untrained node (band of TOL 5 still empty)
      for (int v = 0; v < 256; v++) begin
        x = 8'(v); #1; checks++;
        if (o0) failures++;
      end
      repeat (1 + $urandom % 6) begin
        @(negedge clk);
        x = (round < 2) ? 8'(round * 255) : 8'($urandom);   // also the extremes 0 and 255
        train = 1;
        @(negedge clk); train = 0;
        if (x < mn) mn = x;
        if (x > mx) mx = x;
      end
      sweep();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
