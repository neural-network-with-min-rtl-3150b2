// Self-checking test of threshold_unit (10 bits): random and boundary pairs
// against r = (x >= t).
module tb_threshold_unit;
  logic [9:0] x, t;
  logic r;
  int checks = 0, failures = 0;
  threshold_unit #(.W(10)) dut (.x, .t, .r);
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 5000; i++) begin
      t = 10'($urandom);
      case (i % 4)
        0: x = t;
        1: x = t - 1;
        2: x = t + 1;
        default: x = 10'($urandom);
      endcase
      #1; checks++;
      if (r !== (int'(x) >= int'(t))) begin failures++; $display("x=%0d t=%0d r=%b", x, t, r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
