// bimodal_predictor: intra-task branch predictor of one processing unit.
//
// A table of 2**IDX_W two-bit saturating counters indexed by the low-order
// bits of the branch address (from bit ADDR_LSB upward). The upper counter
// bit is the prediction (1 = taken); the two bits together give direction
// and strength, so one wrong outcome does not flip a strongly biased branch.
// Update: increment on a taken branch, decrement on a not-taken one,
// saturating at 0 and 3.
//
// Interface and timing: lookup is combinational (pc -> taken); the update
// port (upd_en, upd_pc, upd_taken) writes at the next rising edge. Reset sets
// every counter to 1 (weakly not taken).
//
// From the document: each processing unit predicts the branches inside its
// task with a bimodal predictor, built from 2-bit saturating counters. The
// table size, the indexing and the reset value are this design's own choice.
module bimodal_predictor
  import task_pkg::*;
#(
  parameter int unsigned IDX_W    = 10,
  parameter int unsigned ADDR_LSB = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t pc,
  output logic  taken,
  input  logic  upd_en,
  input  addr_t upd_pc,
  input  logic  upd_taken
);

  localparam int unsigned ENTRIES = 1 << IDX_W;

  logic [1:0] ctr_q [ENTRIES];
  logic [IDX_W-1:0] rd_i, wr_i;

  assign rd_i  = pc[ADDR_LSB +: IDX_W];
  assign wr_i  = upd_pc[ADDR_LSB +: IDX_W];
  assign taken = ctr_q[rd_i][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'b01;
    end else if (upd_en) begin
      if (upd_taken && ctr_q[wr_i] != 2'b11)       ctr_q[wr_i] <= ctr_q[wr_i] + 2'b01;
      else if (!upd_taken && ctr_q[wr_i] != 2'b00) ctr_q[wr_i] <= ctr_q[wr_i] - 2'b01;
    end
  end

endmodule
