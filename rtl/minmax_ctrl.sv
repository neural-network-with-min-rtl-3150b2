// Controller (CONTROLLER) of the MIN/MAX core.
//
// Sequences the core in phase periods of three cycles (ph1, ph2, ph3):
//   ph1  the input register captures a value and the address is set,
//   ph2  both node memories are read at that address,
//   ph3  the comparators decide; in training the MAX (MIN) memory is written
//        when the value is above (below) the stored value, in recognition the
//        response counter counts the node if the value is within MIN..MAX.
// Commands are sampled at ph1 while idle (or at the ph1 that ends a run):
//   clear   sweeps all U node addresses, writing the initial constants
//           (init_sel) to both memories, one address per phase period;
//   synchr  marks the first of U consecutive input values of a pattern,
//           clears the response counter and latches train for the pattern.
// clear wins over synchr. done pulses for one cycle (a ph1) when a pattern or a
// clear sweep ends; the response counter then holds the final count. A pattern
// takes 3*U cycles from the synchr ph1 to done, clearing the same.
// The three-phase split and the command timing are this design's reading of
// the block scheme; the signal names and the roles of the units follow it.
module minmax_ctrl
  import minmax_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic ph1,
  input  logic ph3,
  input  logic train,
  input  logic clear,
  input  logic synchr,
  input  logic gt_max,     // COMPAR MAX: value above stored MAX
  input  logic lt_min,     // COMPAR MIN: value below stored MIN
  input  logic last_addr,  // address generator is at the last node (U-1)
  output logic cap_en,     // load the input register
  output logic addr_clr,
  output logic addr_inc,
  output logic init_sel,   // multiplexers select the initial constants
  output logic we_max,
  output logic we_min,
  output logic cnt_clr,
  output logic cnt_inc,
  output logic busy,
  output logic done
);
  ctrl_state_e state, state_nx;
  logic        train_q, train_nx;
  logic        may_start;  // a ph1 at which a new command is accepted

  always_comb begin
    state_nx = state;
    train_nx = train_q;
    cap_en   = 1'b0;
    addr_clr = 1'b0;
    addr_inc = 1'b0;
    cnt_clr  = 1'b0;
    cnt_inc  = 1'b0;
    we_max   = 1'b0;
    we_min   = 1'b0;
    done     = 1'b0;
    init_sel = (state == ST_CLEAR);
    may_start = 1'b0;

    unique case (state)
      ST_IDLE:  may_start = ph1;
      ST_CLEAR: begin
        if (ph3) begin
          we_max = 1'b1;
          we_min = 1'b1;
        end
        if (ph1) begin
          if (last_addr) begin
            done      = 1'b1;
            state_nx  = ST_IDLE;
            may_start = 1'b1;
          end else begin
            addr_inc = 1'b1;
          end
        end
      end
      ST_RUN: begin
        if (ph3) begin
          if (train_q) begin
            we_max = gt_max;
            we_min = lt_min;
          end else begin
            cnt_inc = !gt_max && !lt_min;
          end
        end
        if (ph1) begin
          if (last_addr) begin
            done      = 1'b1;
            state_nx  = ST_IDLE;
            may_start = 1'b1;
          end else begin
            cap_en   = 1'b1;
            addr_inc = 1'b1;
          end
        end
      end
      default: state_nx = ST_IDLE;
    endcase

    if (may_start) begin
      if (clear) begin
        state_nx = ST_CLEAR;
        addr_clr = 1'b1;
      end else if (synchr) begin
        state_nx = ST_RUN;
        train_nx = train;
        cap_en   = 1'b1;
        addr_clr = 1'b1;
        cnt_clr  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= ST_IDLE;
      train_q <= 1'b0;
    end else begin
      state   <= state_nx;
      train_q <= train_nx;
    end
  end

  assign busy = (state != ST_IDLE);

  // Memories are written only in phase 3, and never while idle.
  a_write_ph3: assert property (@(posedge clk) disable iff (!rst_n)
    (we_max || we_min) |-> (ph3 && state != ST_IDLE));
  // The counter never counts during training or clearing.
  a_count_rec: assert property (@(posedge clk) disable iff (!rst_n)
    cnt_inc |-> (state == ST_RUN && !train_q));
endmodule
