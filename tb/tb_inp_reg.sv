// Self-checking test of inp_reg: random data with random enable; q must follow
// d one cycle after an enabled edge and hold otherwise.
module tb_inp_reg;
  logic clk = 0, rst_n = 0, en = 0;
  logic [7:0] d = 0, q, model;
  int checks = 0, failures = 0;
  inp_reg #(.N_BITS(8)) dut (.clk, .rst_n, .en, .d, .q);
  always #5 clk = ~clk;
  initial begin #20000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    model = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 8'h00) failures++;
    rst_n = 1;
    repeat (200) begin
      @(negedge clk); en = 1'($urandom); d = 8'($urandom);
      @(posedge clk); if (en) model = d;
      #1 checks++;
      if (q !== model) begin failures++; $display("q=%h exp %h", q, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
