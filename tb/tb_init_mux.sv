// Self-checking test of init_mux as used for both memories: with init_sel the
// MAX mux gives 00000000 and the MIN mux 11111111, else both pass the data.
module tb_init_mux;
  logic init_sel;
  logic [7:0] indata, m_max, m_min;
  int checks = 0, failures = 0;
  init_mux #(.N_BITS(8), .INIT_VAL(8'h00)) u_max (.init_sel, .indata, .memin(m_max));
  init_mux #(.N_BITS(8), .INIT_VAL(8'hFF)) u_min (.init_sel, .indata, .memin(m_min));
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    for (int i = 0; i < 512; i++) begin
      indata = 8'(i); init_sel = i[8];
      #1;
      checks += 2;
      if (m_max !== (init_sel ? 8'h00 : indata)) failures++;
      if (m_min !== (init_sel ? 8'hFF : indata)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
