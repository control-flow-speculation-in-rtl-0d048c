// leh_pht: pattern history table of "last exit with hysteresis" automata.
//
// Each of the 2**IDX_W entries holds the exit taken last (EXIT_W bits, one of
// four exits) and an HYST_W-bit saturating counter. The prediction is the
// stored exit. At update time, with the actual exit known: if it equals the
// stored exit the counter is incremented (saturating); otherwise, if the
// counter is zero the stored exit is replaced by the actual one, else the
// counter is decremented. A proven prediction thus survives HYST_W..2**HYST_W-1
// wrong outcomes before it is replaced.
//
// Interface and timing: one read port and one write port.
//  - rd_en/rd_idx: the entry is returned on rd_exit one cycle later
//    (synchronous read, as from an SRAM array).
//  - upd_en/upd_idx/upd_exit: read-modify-write of one entry, written at the
//    next edge. A read of the same index in the same cycle returns the old
//    value.
//  - After reset the table sweeps itself to all-zero (exit 0, counter 0), one
//    entry per cycle; busy is high until the sweep ends and rd_en/upd_en are
//    ignored meanwhile.
//
// From the document: the automaton, the 2-bit counter, the 14-bit index and
// the 4 bits per entry (8 kB). This design's choices: the counter value after
// a replacement (left at zero), the reset state and the reset sweep.
module leh_pht
  import task_pkg::*;
#(
  parameter int unsigned IDX_W  = 14,
  parameter int unsigned HYST_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             busy,
  input  logic             rd_en,
  input  logic [IDX_W-1:0] rd_idx,
  output exit_t            rd_exit,
  input  logic             upd_en,
  input  logic [IDX_W-1:0] upd_idx,
  input  exit_t            upd_exit
);

  localparam int unsigned ENTRIES = 1 << IDX_W;

  typedef struct packed {
    exit_t             exit_no;
    logic [HYST_W-1:0] hyst;
  } leh_entry_t;

  leh_entry_t        table_q [ENTRIES];
  logic [IDX_W-1:0]  sweep_q;
  logic              busy_q;

  // Update path: read-modify-write.
  leh_entry_t cur_e, new_e;
  always_comb begin
    cur_e = table_q[upd_idx];
    new_e = cur_e;
    if (cur_e.exit_no == upd_exit) begin
      if (cur_e.hyst != '1) new_e.hyst = cur_e.hyst + 1'b1;
    end else if (cur_e.hyst == '0) begin
      new_e.exit_no = upd_exit;
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
    if (!busy_q && rd_en) rd_exit <= table_q[rd_idx].exit_no;
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

  assign busy = busy_q;

endmodule
