// Self-checking test of node_ram at its full 512 x 8 size: fills every word,
// reads them back through the registered port in random order, and checks that
// data only changes with re and that a write-with-read returns the old word.
module tb_node_ram;
  logic clk = 0, re = 0, we = 0;
  logic [8:0] addr = 0;
  logic [7:0] wdata = 0, rdata, model [512], last;
  int checks = 0, failures = 0;
  node_ram #(.N_BITS(8), .DEPTH(512), .A_BITS(9)) dut (.clk, .re, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); we = 1; addr = 9'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    repeat (600) begin
      @(negedge clk); re = 1; addr = 9'($urandom);
      @(negedge clk); re = 0; checks++;
      if (rdata !== model[addr]) begin failures++; $display("addr %0d got %h exp %h", addr, rdata, model[addr]); end
      last = rdata; addr = 9'($urandom);
      @(negedge clk); checks++;
      if (rdata !== last) failures++;   // no read enable: output holds
    end
    // write and read the same word in one cycle: old contents come out
    @(negedge clk); re = 1; we = 1; addr = 9'd77; wdata = ~model[77];
    @(negedge clk); re = 0; we = 0; checks++;
    if (rdata !== model[77]) failures++;
    model[77] = ~model[77];
    re = 1; @(negedge clk); re = 0; checks++;
    if (rdata !== model[77]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
