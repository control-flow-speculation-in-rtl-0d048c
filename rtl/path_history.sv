// path_history: path history register of the task predictor.
//
// Holds, for each of the last DEPTH tasks, the HBITS low-order bits of its
// start address (from bit ADDR_LSB upward). hist[0] is the most recent task.
// Two copies are kept. The speculative copy is shifted whenever the
// sequencer moves from a task to its predicted successor (spec_push with the
// address of the task being left) and feeds the index generators. The
// committed copy is shifted only when a task commits (commit_push). On a
// squash (restore) the speculative copy is overwritten with the committed
// copy, including a commit made in the same cycle, so wrong-path tasks leave
// no trace in the history.
//
// Timing: all updates take effect at the next rising clock edge; restore has
// priority over spec_push. Reset clears both copies.
//
// From the document: the path history is made of low-order start-address
// bits of preceding tasks, shifted in speculatively. The committed copy used
// to repair the history after a squash is this design's own choice; the
// document only assumes the history is fully repaired after a misprediction.
module path_history
  import task_pkg::*;
#(
  parameter int unsigned DEPTH    = 7,
  parameter int unsigned HBITS    = 9,
  parameter int unsigned ADDR_LSB = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             spec_push,
  input  addr_t            spec_addr,
  input  logic             commit_push,
  input  addr_t            commit_addr,
  input  logic             restore,
  output logic [HBITS-1:0] hist [DEPTH]
);

  logic [HBITS-1:0] spec_q [DEPTH];
  logic [HBITS-1:0] cmt_q  [DEPTH];
  logic [HBITS-1:0] cmt_d  [DEPTH];

  always_comb begin
    cmt_d = cmt_q;
    if (commit_push) begin
      for (int i = DEPTH - 1; i > 0; i--) cmt_d[i] = cmt_q[i-1];
      cmt_d[0] = commit_addr[ADDR_LSB +: HBITS];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) begin
        spec_q[i] <= '0;
        cmt_q[i]  <= '0;
      end
    end else begin
      cmt_q <= cmt_d;
      if (restore) begin
        spec_q <= cmt_d;
      end else if (spec_push) begin
        for (int i = DEPTH - 1; i > 0; i--) spec_q[i] <= spec_q[i-1];
        spec_q[0] <= spec_addr[ADDR_LSB +: HBITS];
      end
    end
  end

  assign hist = spec_q;

endmodule
