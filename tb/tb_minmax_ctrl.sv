// Self-checking test of minmax_ctrl. The testbench supplies the phase strobes,
// a model address counter driven by addr_clr/addr_inc, and random comparator
// results. It checks the clear sweep (512 writes of the initial constants,
// done after 3*512 cycles), a training pattern (writes follow the comparator
// flags, no counting) and a recognition pattern (counting follows the
// in-range condition, no writes), and that clear wins over synchr.
module tb_minmax_ctrl;
  import minmax_pkg::*;
  localparam int U = 512;
  logic clk = 0, rst_n = 0;
  logic ph1, ph2, ph3;
  logic train = 0, clear = 0, synchr = 0, gt_max = 0, lt_min = 0, last_addr;
  logic cap_en, addr_clr, addr_inc, init_sel, we_max, we_min, cnt_clr, cnt_inc, busy, done;
  logic [2:0] ring;
  int addr, checks = 0, failures = 0;
  int n_we, n_cnt, n_cap, cyc, n_exp;

  minmax_ctrl dut (.clk, .rst_n, .ph1, .ph3, .train, .clear, .synchr, .gt_max, .lt_min,
    .last_addr, .cap_en, .addr_clr, .addr_inc, .init_sel, .we_max, .we_min,
    .cnt_clr, .cnt_inc, .busy, .done);

  always #5 clk = ~clk;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ring <= 3'b001; else ring <= {ring[1:0], ring[2]};
  assign {ph3, ph2, ph1} = ring;
  always_ff @(posedge clk)
    if (addr_clr) addr <= 0; else if (addr_inc) addr <= (addr == U-1) ? 0 : addr + 1;
  assign last_addr = (addr == U-1);
  // random comparator flags, never both (the stored MIN never exceeds MAX here)
  always @(negedge clk) begin
    gt_max = 1'($urandom);
    lt_min = gt_max ? 1'b0 : 1'($urandom);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // run one command from idle; count events until done
  task automatic run(input bit do_clear, input bit do_synchr, input bit tr, input bit chk_train);
    n_we = 0; n_cnt = 0; n_cap = 0; cyc = 0; n_exp = 0;
    while (!ph1) @(negedge clk);
    clear = do_clear; synchr = do_synchr; train = tr;
    @(negedge clk); clear = 0; synchr = 0; train = ~tr;   // train is latched with synchr
    cyc = 1;
    while (!done) begin
      if (we_max || we_min || cnt_inc) check(ph3, "action outside ph3");
      if (cap_en) n_cap++;
      if (do_clear) begin
        check(init_sel, "init_sel during clear");
        if (ph3) begin check(we_max && we_min, "clear writes both"); n_we++; end
      end else begin
        check(!init_sel, "no init_sel in run");
        if (ph3 && chk_train) begin
          check(we_max == gt_max && we_min == lt_min && !cnt_inc, "train writes");
          n_we += int'(we_max) + int'(we_min);
          n_exp += int'(gt_max) + int'(lt_min);
        end
        if (ph3 && !chk_train) begin
          check(!we_max && !we_min && cnt_inc == (!gt_max && !lt_min), "recognise count");
          n_cnt += int'(cnt_inc);
          n_exp += int'(!gt_max && !lt_min);
        end
      end
      @(negedge clk); cyc++;
      if (cyc > 4*U) break;
    end
    check(ph1 && done, "done at ph1");
    check(cyc == 3*U, $sformatf("latency %0d cycles, expected %0d", cyc, 3*U));
    @(negedge clk);
    check(!busy, "idle after done");
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (4) @(negedge clk);
    check(!busy && !we_max && !we_min && !cnt_inc, "idle does nothing");
    // clear wins over synchr
    run(1'b1, 1'b1, 1'b0, 1'b0);
    check(n_we == U, $sformatf("clear wrote %0d addresses", n_we));
    run(1'b0, 1'b1, 1'b1, 1'b1);
    check(n_cap == U - 1, "captures after the first");
    check(n_we == n_exp, "training write count");
    run(1'b0, 1'b1, 1'b0, 1'b0);
    check(n_cnt == n_exp && n_cnt > 0, "recognition count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
