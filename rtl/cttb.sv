// cttb: Correlated Task Target Buffer.
//
// Predicts the target address of indirect-branch and indirect-call task
// exits. Each of the 2**IDX_W entries holds a target address and an HYST_W-bit
// saturating hysteresis counter. The entry is selected by the same kind of
// path-based index as the exit predictor (folded path history plus current
// task address), so the same task can get different targets depending on the
// path that led to it.
//
// The target is stored as a word address (ADDR_W-ADDR_LSB bits): with a 2-bit
// counter an entry is exactly 32 bits. Update rule, with the actual target
// known at commit: a matching target increments the counter (saturating); a
// different target replaces the stored one when the counter is zero and
// otherwise decrements the counter.
//
// Interface and timing: synchronous read (rd_en/rd_idx, rd_target valid the
// next cycle), one read-modify-write update port (upd_en/upd_idx/upd_target),
// and a reset sweep that clears every entry, one per cycle, while busy is
// high. There are no tags: an entry is always used.
//
// From the document: indexing with the path-based index, the target plus
// 2-bit hysteresis counter per entry, the 11-bit index and 4 bytes per entry
// (8 kB). This design's choices: word-address storage (so the two low bits
// of rd_target are always zero), the replacement rule copied from the exit
// automaton, no tags, reset sweep.
module cttb
  import task_pkg::*;
#(
  parameter int unsigned IDX_W    = 11,
  parameter int unsigned HYST_W   = 2,
  parameter int unsigned ADDR_LSB = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             busy,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output addr_t            rd_target,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  addr_t            upd_target
);

  localparam int unsigned ENTRIES = 1 << IDX_W;
  localparam int unsigned TGT_W   = ADDR_W - ADDR_LSB;

  typedef struct packed {
    logic [TGT_W-1:0]  tgt;
    logic [HYST_W-1:0] hyst;
  } ttb_entry_t;

  ttb_entry_t        table_q [ENTRIES];
  logic [IDX_W-1:0]  sweep_q;
  logic              busy_q;
  logic [TGT_W-1:0]  rd_tgt_q;

  ttb_entry_t cur_e, new_e;
  logic [TGT_W-1:0] upd_word;
  assign upd_word = upd_target[ADDR_W-1:ADDR_LSB];

  always_comb begin
    cur_e = table_q[upd_idx];
    new_e = cur_e;
    if (cur_e.tgt == upd_word) begin
      if (cur_e.hyst != '1) new_e.hyst = cur_e.hyst + 1'b1;
    end else if (cur_e.hyst == '0) begin
      new_e.tgt = upd_word;
    end else begin
      new_e.hyst = cur_e.hyst - 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (busy_q) begin
      table_q[sweep_q] <= '0;
    end else if (upd_en) begin
      table_q[upd_idx] <= new_e;
    end
    if (!busy_q && rd_en) rd_tgt_q <= table_q[rd_idx].tgt;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_q <= '0;
      busy_q  <= 1'b1;
    end else if (busy_q) begin
      sweep_q <= sweep_q + 1'b1;
      if (sweep_q == IDX_W'(ENTRIES - 1)) busy_q <= 1'b0;
    end
  end

  assign busy      = busy_q;
  assign rd_target = {rd_tgt_q, {ADDR_LSB{1'b0}}};

endmodule
