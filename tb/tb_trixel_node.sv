// Self-checking test of trixel_node: trains a few RGB pixels, then checks
// that the response is the AND of the three per-component range tests for
// random pixels and for pixels with exactly one component pushed outside.
module tb_trixel_node;
  logic clk = 0, rst_n = 0, clear = 0, train = 0;
  logic [23:0] pix = 0;
  logic o;
  int mn [3], mx [3], checks = 0, failures = 0;
  trixel_node #(.N_BITS(8)) dut (.clk, .rst_n, .clear, .train, .pix, .o);
  always #5 clk = ~clk;

  function automatic bit model(input logic [23:0] p);
    bit r = 1;
    for (int c = 0; c < 3; c++) r &= (int'(p[c*8 +: 8]) >= mn[c]) && (int'(p[c*8 +: 8]) <= mx[c]);
    return r;
  endfunction

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    static int n1 = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int round = 0; round < 30; round++) begin
      @(negedge clk);
      clear = 1; @(negedge clk); clear = 0;
      for (int c = 0; c < 3; c++) begin mn[c] = 255; mx[c] = 0; end
      repeat (2 + $urandom % 4) begin
        pix = {8'(100 + $urandom % 50), 8'(30 + $urandom % 80), 8'(150 + $urandom % 60)};
        train = 1; @(negedge clk); train = 0;
        for (int c = 0; c < 3; c++) begin
          if (int'(pix[c*8 +: 8]) < mn[c]) mn[c] = pix[c*8 +: 8];
          if (int'(pix[c*8 +: 8]) > mx[c]) mx[c] = pix[c*8 +: 8];
        end
      end
      for (int t = 0; t < 200; t++) begin
        for (int c = 0; c < 3; c++)
          pix[c*8 +: 8] = 8'(mn[c] + int'($urandom % (mx[c] - mn[c] + 1)));
        if (t % 2) pix[($urandom % 3)*8 +: 8] = 8'($urandom);   // one component anywhere
        #1; checks++; n1 += int'(o);
        if (o !== model(pix)) begin failures++; $display("pix %h o=%b", pix, o); end
      end
    end
    checks++; if (n1 == 0 || n1 == checks - 1) failures++;   // both responses seen
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
