// Self-checking test of trixel_group with G = 5 nodes: trains each node on its
// own pixel, then checks the summed node responses and the thresholded group
// response for every threshold 0..5 on inputs where a random subset of the
// nodes sees a trained pixel and the rest an out-of-range one.
module tb_trixel_group;
  localparam int G = 5;
  logic clk = 0, rst_n = 0, clear = 0, train = 0;
  logic [23:0] pix [G], trained [G];
  logic [2:0] thresh = 0, sum;
  logic r;
  int checks = 0, failures = 0;
  trixel_group #(.G(G), .N_BITS(8)) dut (.clk, .rst_n, .clear, .train, .pix, .thresh, .sum, .r);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int i = 0; i < G; i++) begin
      trained[i] = {8'(64 + $urandom % 128), 8'(64 + $urandom % 128), 8'(64 + $urandom % 128)};
      pix[i] = trained[i];
    end
    train = 1; @(negedge clk); train = 0;
    for (int t = 0; t < 400; t++) begin
      logic [G-1:0] sel;
      int n;
      sel = G'($urandom);
      n = 0;
      for (int i = 0; i < G; i++) begin
        pix[i] = sel[i] ? trained[i] : trained[i] ^ 24'h800000;  // red moves by 128
        n += int'(sel[i]);
      end
      for (int th = 0; th <= G; th++) begin
        thresh = 3'(th); #1;
        checks += 2;
        if (sum !== 3'(n)) begin failures++; $display("sum %0d exp %0d", sum, n); end
        if (r !== (n >= th)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
