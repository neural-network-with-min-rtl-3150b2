// End-to-end test of minmax_top at its default sizes (512-node single-layer
// unit with 8-bit inputs and a 10-bit response; colour network of 4 groups of
// 3 trixels).
//
// Single-layer unit: clear, train on three noisy versions of a reference
// pattern, recognise several patterns (the reference, noisy versions, bounds,
// random data) and compare RESPONSE with a MIN/MAX model; one pattern starts
// back to back at the ph1 of the previous done, and one command asserts clear
// and synchr together (clear must win). Each pattern must take 3*512 cycles.
// Colour network: clear, train on two images, evaluate images with random
// hits and thresholds against a model.
// Mechanisms counted (each must occur): memory clear writes, MAX writes, MIN
// writes, counted nodes, rejected nodes, back-to-back start, clear-over-synchr,
// group threshold met and missed, colour train/clear/eval.
module tb_minmax_top;
  import minmax_pkg::*;
  localparam int U = DEF_U_NODES, K = 4, G = 3;
  logic clk = 0, rst_n = 0;
  logic [7:0] in_port = 0;
  logic train = 0, clear = 0, synchr = 0, sample, busy, done;
  logic [9:0] response;
  logic [23:0] tx_pix [K][G];
  logic [1:0] tx_thresh [K];
  logic tx_train = 0, tx_clear = 0, tx_eval = 0, tx_valid;
  logic [2:0] tx_resp;

  int checks = 0, failures = 0, cyc;
  int mn [U], mx [U], base [U];
  byte unsigned pat [U];
  int tmn [K][G][3], tmx [K][G][3];
  int n_clrwr = 0, n_wmax = 0, n_wmin = 0, n_cnt = 0, n_rej = 0, n_b2b = 0, n_prio = 0;
  int n_gpass = 0, n_gfail = 0, n_txtrain = 0, n_txclear = 0, n_txeval = 0;

  minmax_top dut (.clk, .rst_n, .in_port, .train, .clear, .synchr, .sample, .busy, .done,
    .response, .tx_pix, .tx_train, .tx_clear, .tx_eval, .tx_thresh, .tx_resp, .tx_valid);

  always #5 clk = ~clk;

  // event counters from inside the unit
  always @(posedge clk) if (rst_n) begin
    if (dut.u_core.init_sel && dut.u_core.we_max) n_clrwr++;
    if (!dut.u_core.init_sel && dut.u_core.we_max) n_wmax++;
    if (!dut.u_core.init_sel && dut.u_core.we_min) n_wmin++;
    if (dut.u_core.cnt_inc) n_cnt++;
    if (dut.u_core.u_controller.state == ST_RUN && !dut.u_core.u_controller.train_q &&
        dut.sample == 1'b0 && dut.u_core.ph3 && !dut.u_core.cnt_inc) n_rej++;
    if (tx_train) n_txtrain++;
    if (tx_clear) n_txclear++;
    if (tx_eval) n_txeval++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_sample(); while (!sample) @(negedge clk); endtask

  task automatic model_clear();
    for (int i = 0; i < U; i++) begin mn[i] = 255; mx[i] = 0; end
  endtask

  task automatic do_clear(input bit with_synchr);
    wait_sample(); clear = 1; synchr = with_synchr; @(negedge clk); clear = 0; synchr = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3*U, $sformatf("clear took %0d cycles", cyc));
    if (with_synchr) n_prio++;
    model_clear();
  endtask

  // feed pattern pat; starts at the current sample cycle; leaves at done
  task automatic feed(input bit tr, output int resp);
    wait_sample();
    synchr = 1; train = tr; in_port = pat[0];
    @(negedge clk); synchr = 0; train = 1'($urandom); cyc = 1;
    for (int i = 1; i < U; i++) begin
      while (!sample) begin in_port = 8'($urandom); @(negedge clk); cyc++; end
      in_port = pat[i];
      @(negedge clk); cyc++;
    end
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc == 3*U, $sformatf("pattern took %0d cycles", cyc));
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

  task automatic make(input int kind);
    for (int i = 0; i < U; i++)
      case (kind)
        0: pat[i] = 8'(base[i]);
        1: pat[i] = 8'(base[i] + int'($urandom % 41) - 20);
        2: pat[i] = 8'(base[i] + int'($urandom % 81) - 40);
        3: pat[i] = 8'(mx[i]);
        4: pat[i] = 8'(mn[i]);
        default: pat[i] = 8'($urandom);
      endcase
  endtask

  // colour network: one evaluation against the model
  task automatic colour_eval();
    int exp_resp, n, v;
    bit hit;
    exp_resp = 0;
    for (int k = 0; k < K; k++) begin
      n = 0;
      tx_thresh[k] = 2'($urandom % 4);
      for (int i = 0; i < G; i++) begin
        hit = 1;
        for (int c = 0; c < 3; c++) begin
          v = ($urandom % 4 == 0) ? int'($urandom % 256)
                                  : tmn[k][i][c] + int'($urandom % (tmx[k][i][c] - tmn[k][i][c] + 1));
          tx_pix[k][i][c*8 +: 8] = 8'(v);
          hit &= (v >= tmn[k][i][c] && v <= tmx[k][i][c]);
        end
        n += int'(hit);
      end
      if (n >= int'(tx_thresh[k])) begin exp_resp++; n_gpass++; end else n_gfail++;
    end
    tx_eval = 1; @(negedge clk); tx_eval = 0;
    check(tx_valid && tx_resp == 3'(exp_resp), $sformatf("colour resp %0d exp %0d", tx_resp, exp_resp));
  endtask

  initial begin
    #5000000;
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int r;
    for (int k = 0; k < K; k++) begin
      tx_thresh[k] = 0;
      for (int i = 0; i < G; i++) tx_pix[k][i] = 0;
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // ---- single-layer unit ----
    do_clear(1'b1);                       // clear and synchr together: clear wins
    @(negedge clk);
    check(!busy, "idle after clear");
    for (int i = 0; i < U; i++) base[i] = 40 + ($urandom % 176);
    make(0); feed(1'b1, r);              // first training pattern sets MIN = MAX
    for (int k = 0; k < 2; k++) begin make(1); feed(1'b1, r); end
    for (int k = 0; k < 6; k++) begin
      make(k); feed(1'b0, r);
      $display("unit: recognition pattern kind %0d -> RESPONSE %0d (model %0d)", k, r, expected());
      check(r == expected(), $sformatf("kind %0d response %0d expected %0d", k, r, expected()));
      if (k == 0 || k == 3 || k == 4) check(r == U, "trained pattern or bound gives U");
    end
    // back-to-back: the next synchr at the ph1 in which done is high
    make(1);
    wait_sample(); synchr = 1; train = 0; in_port = pat[0];
    @(negedge clk); synchr = 0; cyc = 1;
    for (int i = 1; i < U; i++) begin
      while (!sample) @(negedge clk);
      in_port = pat[i]; @(negedge clk);
    end
    while (!sample) @(negedge clk);
    check(done, "done at sample");
    r = int'(response);
    check(r == expected(), "response before back-to-back start");
    make(2);
    n_b2b++;
    feed(1'b0, r);                        // feed starts right in the done cycle
    check(r == expected(), $sformatf("back-to-back response %0d expected %0d", r, expected()));
    do_clear(1'b0);
    make(0); feed(1'b0, r);
    check(r == 0, "cleared unit responds 0");

    // ---- colour network ----
    @(negedge clk); tx_clear = 1; @(negedge clk); tx_clear = 0;
    for (int k = 0; k < K; k++) for (int i = 0; i < G; i++) for (int c = 0; c < 3; c++) begin
      tmn[k][i][c] = 255; tmx[k][i][c] = 0;
    end
    for (int img = 0; img < 2; img++) begin
      for (int k = 0; k < K; k++) for (int i = 0; i < G; i++) for (int c = 0; c < 3; c++) begin
        r = 60 + int'($urandom % 120);
        tx_pix[k][i][c*8 +: 8] = 8'(r);
        if (r < tmn[k][i][c]) tmn[k][i][c] = r;
        if (r > tmx[k][i][c]) tmx[k][i][c] = r;
      end
      tx_train = 1; @(negedge clk); tx_train = 0;
    end
    repeat (300) colour_eval();

    // ---- mechanisms ----
    $display("clear writes %0d, MAX writes %0d, MIN writes %0d, counted %0d, rejected %0d",
             n_clrwr, n_wmax, n_wmin, n_cnt, n_rej);
    $display("back-to-back %0d, clear-over-synchr %0d, group pass %0d, group fail %0d",
             n_b2b, n_prio, n_gpass, n_gfail);
    $display("colour train %0d, clear %0d, eval %0d", n_txtrain, n_txclear, n_txeval);
    check(n_clrwr == 2*U, "two clear sweeps");
    check(n_wmax > 0, "MAX writes happened");
    check(n_wmin > 0, "MIN writes happened");
    check(n_cnt > 0, "counting happened");
    check(n_rej > 0, "rejections happened");
    check(n_b2b > 0 && n_prio > 0, "back-to-back and clear priority");
    check(n_gpass > 0 && n_gfail > 0, "group threshold met and missed");
    check(n_txtrain > 0 && n_txclear > 0 && n_txeval > 0, "colour network commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
