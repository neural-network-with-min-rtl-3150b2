// Self-checking test of min_max_core at its full size (U = 512, n = 8, m = 10),
// driven by phase_gen. It clears the memories, trains three patterns, then
// recognises several patterns and compares RESPONSE with a model that keeps
// per-node MIN/MAX and counts MIN <= value <= MAX. Test patterns mix values
// inside, outside and exactly on the trained bounds. It also checks that a
// pattern and a clear each take 3*U cycles from the command to done.
module tb_min_max_core;
  localparam int U = 512;
  logic clk = 0, rst_n = 0, ph1, ph2, ph3;
  logic [7:0] in_port = 0;
  logic train = 0, clear = 0, synchr = 0, busy, done;
  logic [9:0] response;
  int mn [U], mx [U], base [U];
  int checks = 0, failures = 0, cyc;
  byte unsigned pat [U];

  phase_gen u_ph (.clk, .rst_n, .ph1, .ph2, .ph3);
  min_max_core dut (.clk, .rst_n, .ph1, .ph2, .ph3, .in_port, .train, .clear, .synchr,
    .busy, .done, .response);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_ph1(); while (!ph1) @(negedge clk); endtask

  task automatic do_clear();
    wait_ph1(); clear = 1; @(negedge clk); clear = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3*U, $sformatf("clear took %0d cycles", cyc));
    for (int i = 0; i < U; i++) begin mn[i] = 255; mx[i] = 0; end
  endtask

  // present one pattern; returns the response at done
  task automatic do_pattern(input bit tr, output int resp);
    wait_ph1();
    synchr = 1; train = tr; in_port = pat[0];
    @(negedge clk); synchr = 0; cyc = 1;
    for (int i = 1; i < U; i++) begin
      wait_ph1(); in_port = 8'($urandom);   // garbage outside ph1 is ignored
      in_port = pat[i];
      @(negedge clk); in_port = 8'($urandom);
    end
    while (!done) begin @(negedge clk); end
    resp = int'(response);
    if (tr) for (int i = 0; i < U; i++) begin
      if (pat[i] < mn[i]) mn[i] = pat[i];
      if (pat[i] > mx[i]) mx[i] = pat[i];
    end
  endtask

  function automatic int expected();
    int n = 0;
    for (int i = 0; i < U; i++) if (pat[i] >= mn[i] && pat[i] <= mx[i]) n++;
    return n;
  endfunction

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    int r, t0;
    repeat (3) @(negedge clk); rst_n = 1;
    do_clear();
    // untrained network answers 0
    for (int i = 0; i < U; i++) pat[i] = 8'($urandom);
    do_pattern(1'b0, r); check(r == 0, $sformatf("untrained response %0d", r));
    // training: a base image plus noise of +-20
    for (int i = 0; i < U; i++) base[i] = 20 + ($urandom % 216);
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < U; i++) pat[i] = 8'(base[i] + int'($urandom % 41) - 20);
      t0 = 0;
      do_pattern(1'b1, r);
    end
    // recognition: trained bounds, near bounds, random
    for (int k = 0; k < 6; k++) begin
      for (int i = 0; i < U; i++) begin
        case (k)
          0: pat[i] = 8'(mn[i]);
          1: pat[i] = 8'(mx[i]);
          2: pat[i] = 8'((mn[i] + mx[i]) / 2);
          3: pat[i] = 8'(($urandom % 2) ? mx[i] + 1 : mn[i] - 1);
          4: pat[i] = 8'(base[i] + int'($urandom % 61) - 30);
          default: pat[i] = 8'($urandom);
        endcase
      end
      do_pattern(1'b0, r);
      $display("recognition pattern %0d: response %0d (model %0d)", k, r, expected());
      check(r == expected(), $sformatf("pattern %0d: response %0d expected %0d", k, r, expected()));
    end
    // the three full-range patterns must give U, the just-outside one 0
    check(expected() < U, "random pattern is not all inside");
    // timing of one recognition pattern
    wait_ph1(); synchr = 1; train = 0; @(negedge clk); synchr = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3*U, $sformatf("pattern took %0d cycles", cyc));
    // a new clear resets every node
    do_clear();
    for (int i = 0; i < U; i++) pat[i] = 8'(base[i]);
    do_pattern(1'b0, r); check(r == 0, "response after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
