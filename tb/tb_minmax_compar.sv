// Self-checking test of minmax_compar: all 65536 pairs for the MAX comparator
// (a > stored) and the MIN comparator (a < stored); equality is inside.
module tb_minmax_compar;
  logic [7:0] a, s;
  logic o_max, o_min;
  int checks = 0, failures = 0;
  minmax_compar #(.N_BITS(8), .IS_MAX(1'b1)) u_max (.a, .stored(s), .outside(o_max));
  minmax_compar #(.N_BITS(8), .IS_MAX(1'b0)) u_min (.a, .stored(s), .outside(o_min));
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); s = 8'(j); #1;
        checks += 2;
        if (o_max !== (i > j)) failures++;
        if (o_min !== (i < j)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
