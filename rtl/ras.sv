// ras: return address stack for predicting the targets of RETURN exits.
//
// A circular stack of DEPTH return addresses. When the sequencer predicts a
// CALL or INDIRECT_CALL exit it pushes the return address from the task
// header; when it predicts a RETURN exit it pops, and the popped top (top,
// shown combinationally before the pop) is the predicted next task. On
// overflow the oldest entry is overwritten; popping an empty stack returns
// whatever the circular buffer holds and wraps the pointer.
//
// Two copies are kept: the speculative stack, changed at prediction time, and
// a committed stack changed by cmt_push/cmt_pop when a task commits with a
// call or return exit. restore overwrites the speculative stack with the
// committed one (including a commit in the same cycle), which fully repairs
// the stack after a squash. A push and a pop never come together on one side.
//
// Timing: all updates at the next rising edge; top is combinational. Reset
// empties both stacks (pointer and entries cleared).
//
// From the document: a RAS predicts return-exit addresses, fed by the return
// address field of the header. This design's choices: the depth (the
// document only asks for a "reasonably deep" stack), circular overflow and
// repair from a committed copy.
module ras
  import task_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  spec_push,
  input  logic  spec_pop,
  input  addr_t spec_addr,
  input  logic  cmt_push,
  input  logic  cmt_pop,
  input  addr_t cmt_addr,
  input  logic  restore,
  output addr_t top
);

  addr_t            spec_stk [DEPTH];
  addr_t            cmt_stk  [DEPTH];
  logic [PTR_W-1:0] spec_tos, cmt_tos;   // index of the next free slot

  addr_t            cmt_stk_d [DEPTH];
  logic [PTR_W-1:0] cmt_tos_d;

  initial assert (DEPTH == (1 << PTR_W)) else $error("ras: DEPTH must be a power of two");

  always_comb begin
    cmt_stk_d = cmt_stk;
    cmt_tos_d = cmt_tos;
    if (cmt_push) begin
      cmt_stk_d[cmt_tos] = cmt_addr;
      cmt_tos_d          = cmt_tos + 1'b1;
    end else if (cmt_pop) begin
      cmt_tos_d          = cmt_tos - 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      spec_tos <= '0;
      cmt_tos  <= '0;
      for (int i = 0; i < DEPTH; i++) begin
        spec_stk[i] <= '0;
        cmt_stk[i]  <= '0;
      end
    end else begin
      cmt_stk <= cmt_stk_d;
      cmt_tos <= cmt_tos_d;
      if (restore) begin
        spec_stk <= cmt_stk_d;
        spec_tos <= cmt_tos_d;
      end else if (spec_push) begin
        spec_stk[spec_tos] <= spec_addr;
        spec_tos           <= spec_tos + 1'b1;
      end else if (spec_pop) begin
        spec_tos           <= spec_tos - 1'b1;
      end
    end
  end

  assign top = spec_stk[spec_tos - 1'b1];

  a_spec_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(spec_push && spec_pop))
    else $error("ras: push and pop together");
  a_cmt_one_op: assert property (@(posedge clk) disable iff (!rst_n) !(cmt_push && cmt_pop))
    else $error("ras: commit push and pop together");

endmodule
