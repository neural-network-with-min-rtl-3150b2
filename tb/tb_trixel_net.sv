// Self-checking test of trixel_net (K = 4 groups of G = 3 trixels): trains
// every node on a reference image, then evaluates images in which a random
// set of nodes sees trained pixels, with random group thresholds, and checks
// the registered response (number of groups whose count reaches their
// threshold) one cycle after eval, together with the valid pulse.
module tb_trixel_net;
  localparam int K = 4, G = 3;
  logic clk = 0, rst_n = 0, clear = 0, train = 0, eval = 0;
  logic [23:0] pix [K][G], ref_img [K][G];
  logic [1:0] thresh [K];
  logic [2:0] resp;
  logic valid;
  int checks = 0, failures = 0;
  trixel_net #(.K(K), .G(G), .N_BITS(8)) dut (.clk, .rst_n, .clear, .train, .eval, .pix, .thresh, .resp, .valid);
  always #5 clk = ~clk;
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < K; k++) begin
      thresh[k] = 2'd0;
      for (int i = 0; i < G; i++) begin
        ref_img[k][i] = {8'(40 + $urandom % 100), 8'(40 + $urandom % 100), 8'(40 + $urandom % 100)};
        pix[k][i] = ref_img[k][i];
      end
    end
    train = 1; @(negedge clk); train = 0;
    for (int t = 0; t < 500; t++) begin
      int exp_resp, n;
      bit hit;
      exp_resp = 0;
      for (int k = 0; k < K; k++) begin
        n = 0;
        thresh[k] = 2'($urandom % 4);
        for (int i = 0; i < G; i++) begin
          hit = 1'($urandom);
          pix[k][i] = hit ? ref_img[k][i] : ref_img[k][i] + 24'h000090;  // blue off by 144
          n += int'(hit);
        end
        exp_resp += int'(n >= int'(thresh[k]));
      end
      eval = 1; @(negedge clk); eval = 0;
      checks += 2;
      if (!valid) failures++;
      if (resp !== 3'(exp_resp)) begin failures++; $display("resp %0d exp %0d", resp, exp_resp); end
      @(negedge clk); checks++; if (valid) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
