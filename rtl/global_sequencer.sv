// global_sequencer: the Multiscalar global sequencer with its task predictor.
//
// The sequencer walks the task flow graph one task at a time. For the current
// task it fetches the task header, predicts which of the (up to four) exits
// the task will leave by, turns that exit into the start address of the next
// task, and dispatches the current task to the processing unit at the tail of
// the ring. The next task then becomes current. Prediction uses:
//  - a path-based exit predictor: a PHT of last-exit-with-hysteresis automata
//    (leh_pht) indexed by a folded path index (path_index, D-O-L-C (F) =
//    7-4-9-9 (3), 14 index bits);
//  - for the address of the predicted exit: the header's target field for
//    BRANCH and CALL exits, the return address stack (ras) for RETURN exits,
//    and the correlated task target buffer (cttb, 7-4-4-5 (3), 11 index bits)
//    for INDIRECT_BRANCH and INDIRECT_CALL exits;
//  - one path history register (path_history) shared by both indexes.
// A task whose header has a single exit always gets that exit, and the PHT is
// not updated for it.
//
// When the head processing unit finishes, it reports the exit it took and the
// actual next task address (cmpl_*). The head retires; the PHT, the CTTB, the
// committed path history and the committed RAS are updated with the actual
// outcome. If the actual address differs from the predicted successor, every
// task behind the head is squashed (squash pulse), the speculative history
// and RAS are repaired from their committed copies and the sequencer restarts
// from the actual address.
//
// Interfaces:
//  - start_addr: first task, used once the PHT/CTTB reset sweep ends.
//  - header fetch: hdr_req is a one-cycle request for the header at hdr_addr;
//    exactly one hdr_rsp_valid with hdr_rsp answers it, any number of cycles
//    later. A response to a request made before a squash is dropped.
//  - dispatch: disp_valid pulses with the task address and the unit number.
//    Dispatch stalls while every unit is busy.
//  - completion: cmpl_valid may be raised only while head_valid; head_unit
//    tells which unit is the head.
// Timing: header response to dispatch takes three cycles (latch header, read
// tables, select and dispatch), so a task is started at most every four
// cycles plus the header latency. Commit takes effect in the cycle of
// cmpl_valid.
//
// From the document: the predictor organisation, the automaton, the path
// indexing and its parameters, the use of header, RAS and CTTB per exit type,
// FIFO commit with squash of everything behind the head, update of the
// automata at commit (non-speculatively) and of the history at prediction
// (speculatively), the single-exit rule. This design's own: the FSM and its
// timing, the header-fetch and completion handshakes, repair from committed
// copies, and the fallback to the first populated exit when the PHT names an
// empty header slot.
module global_sequencer
  import task_pkg::*;
#(
  parameter int unsigned NUM_PU    = 4,
  // exit predictor D-O-L-C (F)
  parameter int unsigned XP_D      = 7,
  parameter int unsigned XP_O      = 4,
  parameter int unsigned XP_L      = 9,
  parameter int unsigned XP_C      = 9,
  parameter int unsigned XP_F      = 3,
  // CTTB D-O-L-C (F)
  parameter int unsigned TB_D      = 7,
  parameter int unsigned TB_O      = 4,
  parameter int unsigned TB_L      = 4,
  parameter int unsigned TB_C      = 5,
  parameter int unsigned TB_F      = 3,
  parameter int unsigned HYST_W    = 2,
  parameter int unsigned RAS_DEPTH = 16,
  parameter int unsigned ADDR_LSB  = 2,
  localparam int unsigned PU_W     = (NUM_PU > 1) ? $clog2(NUM_PU) : 1,
  localparam int unsigned XP_IDX_W = (((XP_D > 0) ? (XP_D - 1) * XP_O + XP_L : 0) + XP_C) / XP_F,
  localparam int unsigned TB_IDX_W = (((TB_D > 0) ? (TB_D - 1) * TB_O + TB_L : 0) + TB_C) / TB_F
) (
  input  logic         clk,
  input  logic         rst_n,
  input  addr_t        start_addr,
  // header fetch
  output logic         hdr_req,
  output addr_t        hdr_addr,
  input  logic         hdr_rsp_valid,
  input  task_header_t hdr_rsp,
  // dispatch to the tail processing unit
  output logic         disp_valid,
  output logic [PU_W-1:0] disp_unit,
  output addr_t        disp_addr,
  // head processing unit
  output logic         head_valid,
  output logic [PU_W-1:0] head_unit,
  input  logic         cmpl_valid,
  input  exit_t        cmpl_exit,
  input  addr_t        cmpl_target,
  output logic         squash,
  output logic         ready            // reset sweep done
);

  localparam int unsigned HDEPTH = (XP_D > TB_D) ? XP_D : TB_D;
  localparam int unsigned HD     = (HDEPTH > 0) ? HDEPTH : 1;
  localparam int unsigned HB0    = (XP_L > XP_O) ? XP_L : XP_O;
  localparam int unsigned HB1    = (TB_L > TB_O) ? TB_L : TB_O;
  localparam int unsigned HB2    = (HB0 > HB1) ? HB0 : HB1;
  localparam int unsigned HBITS  = (HB2 > 0) ? HB2 : 1;
  localparam int unsigned XHD    = (XP_D > 0) ? XP_D : 1;
  localparam int unsigned THD    = (TB_D > 0) ? TB_D : 1;

  // Record kept for each task in flight, one per processing unit.
  typedef struct packed {
    addr_t                addr;
    task_header_t         hdr;
    logic                 multi;        // more than one exit: PHT is updated
    addr_t                pred_next;
    logic [XP_IDX_W-1:0]  xp_idx;
    logic [TB_IDX_W-1:0]  tb_idx;
  } task_rec_t;

  typedef enum logic [2:0] {S_INIT, S_REQ, S_WAIT, S_LOOKUP, S_PREDICT} state_e;

  state_e        state_q;
  addr_t         cur_q;
  task_header_t  hdr_q;
  logic          drop_q;
  logic [XP_IDX_W-1:0] xp_idx_q;
  logic [TB_IDX_W-1:0] tb_idx_q;

  // ---------------------------------------------------------------- history
  logic [HBITS-1:0] hist [HD];
  logic [HBITS-1:0] xp_hist [XHD];
  logic [HBITS-1:0] tb_hist [THD];
  logic             spec_advance, commit, mispredict;
  task_rec_t        head_r;

  path_history #(.DEPTH(HD), .HBITS(HBITS), .ADDR_LSB(ADDR_LSB)) u_hist (
    .clk, .rst_n,
    .spec_push  (spec_advance),
    .spec_addr  (cur_q),
    .commit_push(commit),
    .commit_addr(head_r.addr),
    .restore    (mispredict),
    .hist       (hist)
  );

  always_comb begin
    for (int i = 0; i < XHD; i++) xp_hist[i] = hist[i];
    for (int i = 0; i < THD; i++) tb_hist[i] = hist[i];
  end

  logic [XP_IDX_W-1:0] xp_idx;
  logic [TB_IDX_W-1:0] tb_idx;

  path_index #(.D(XP_D), .O(XP_O), .L(XP_L), .C(XP_C), .F(XP_F),
               .HBITS(HBITS), .ADDR_LSB(ADDR_LSB)) u_xp_index (
    .cur_addr(cur_q), .hist(xp_hist), .idx(xp_idx));

  path_index #(.D(TB_D), .O(TB_O), .L(TB_L), .C(TB_C), .F(TB_F),
               .HBITS(HBITS), .ADDR_LSB(ADDR_LSB)) u_tb_index (
    .cur_addr(cur_q), .hist(tb_hist), .idx(tb_idx));

  // ----------------------------------------------------------- predictors
  logic   pht_busy, ttb_busy, lookup;
  exit_t  pht_exit;
  addr_t  ttb_target, ras_top;
  exit_spec_e act_spec;
  logic   upd_pht, upd_ttb;

  assign act_spec = head_r.hdr.exits[cmpl_exit].spec;
  assign upd_pht  = commit && head_r.multi;
  assign upd_ttb  = commit && is_indirect(act_spec);

  leh_pht #(.IDX_W(XP_IDX_W), .HYST_W(HYST_W)) u_pht (
    .clk, .rst_n, .busy(pht_busy),
    .rd_en(lookup), .rd_idx(xp_idx), .rd_exit(pht_exit),
    .upd_en(upd_pht), .upd_idx(head_r.xp_idx), .upd_exit(cmpl_exit));

  cttb #(.IDX_W(TB_IDX_W), .HYST_W(HYST_W), .ADDR_LSB(ADDR_LSB)) u_cttb (
    .clk, .rst_n, .busy(ttb_busy),
    .rd_en(lookup), .rd_idx(tb_idx), .rd_target(ttb_target),
    .upd_en(upd_ttb), .upd_idx(head_r.tb_idx), .upd_target(cmpl_target));

  // Exit selection and target generation.
  exit_t      first_exit, sel_exit;
  int unsigned n_exits;
  exit_info_t sel;
  addr_t      pred_next;
  logic       ras_push, ras_pop;

  always_comb begin
    n_exits    = num_exits(hdr_q);
    first_exit = '0;
    for (int i = NUM_EXITS - 1; i >= 0; i--)
      if (hdr_q.exits[i].spec != EXIT_NONE) first_exit = exit_t'(i);
    if (n_exits <= 1 || hdr_q.exits[pht_exit].spec == EXIT_NONE) sel_exit = first_exit;
    else                                                         sel_exit = pht_exit;
    sel = hdr_q.exits[sel_exit];
    unique case (sel.spec)
      EXIT_RETURN:                         pred_next = ras_top;
      EXIT_INDIRECT_BR, EXIT_INDIRECT_CALL: pred_next = ttb_target;
      default:                             pred_next = sel.target;
    endcase
  end

  // --------------------------------------------------------------- queue
  task_rec_t  new_rec;
  logic [$bits(task_rec_t)-1:0] head_bits;
  logic       q_full;

  assign new_rec = '{addr: cur_q, hdr: hdr_q, multi: (n_exits > 1),
                     pred_next: pred_next, xp_idx: xp_idx_q, tb_idx: tb_idx_q};

  task_queue #(.NUM_PU(NUM_PU), .REC_W($bits(task_rec_t))) u_queue (
    .clk, .rst_n,
    .enq(disp_valid), .enq_rec(new_rec),
    .deq(commit), .flush(mispredict),
    .full(q_full), .empty(), .count(),
    .tail_unit(disp_unit), .head_unit(head_unit),
    .head_valid(head_valid), .head_rec(head_bits));

  assign head_r = task_rec_t'(head_bits);

  // ---------------------------------------------------------------- commit
  assign commit     = cmpl_valid && head_valid;
  assign mispredict = commit && (cmpl_target != head_r.pred_next);
  assign squash     = mispredict;

  // Speculative and committed return address stack.
  assign ras_push = spec_advance && is_call(sel.spec);
  assign ras_pop  = spec_advance && (sel.spec == EXIT_RETURN);

  ras #(.DEPTH(RAS_DEPTH)) u_ras (
    .clk, .rst_n,
    .spec_push(ras_push), .spec_pop(ras_pop), .spec_addr(sel.ret_addr),
    .cmt_push (commit && is_call(act_spec)),
    .cmt_pop  (commit && act_spec == EXIT_RETURN),
    .cmt_addr (head_r.hdr.exits[cmpl_exit].ret_addr),
    .restore  (mispredict),
    .top      (ras_top));

  // ------------------------------------------------------------------ FSM
  assign ready        = !pht_busy && !ttb_busy;
  assign lookup       = (state_q == S_LOOKUP);
  assign disp_valid   = (state_q == S_PREDICT) && !q_full && !mispredict;
  assign spec_advance = disp_valid;
  assign disp_addr    = cur_q;
  assign hdr_req      = (state_q == S_REQ) && !mispredict;
  assign hdr_addr     = cur_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_INIT;
      cur_q    <= '0;
      hdr_q    <= '0;
      drop_q   <= 1'b0;
      xp_idx_q <= '0;
      tb_idx_q <= '0;
    end else begin
      unique case (state_q)
        S_INIT: if (ready) begin
          cur_q   <= start_addr;
          state_q <= S_REQ;
        end
        S_REQ: if (!mispredict) state_q <= S_WAIT;
        S_WAIT: if (hdr_rsp_valid) begin
          if (drop_q) begin
            drop_q  <= 1'b0;
            state_q <= S_REQ;
          end else begin
            hdr_q   <= hdr_rsp;
            state_q <= S_LOOKUP;
          end
        end
        S_LOOKUP: begin
          xp_idx_q <= xp_idx;
          tb_idx_q <= tb_idx;
          state_q  <= S_PREDICT;
        end
        S_PREDICT: if (disp_valid) begin
          cur_q   <= pred_next;
          state_q <= S_REQ;
        end
        default: state_q <= S_INIT;
      endcase
      // A squash overrides whatever the sequencer was doing.
      if (mispredict) begin
        cur_q <= cmpl_target;
        if (state_q == S_WAIT && !hdr_rsp_valid) begin
          drop_q  <= 1'b1;
          state_q <= S_WAIT;
        end else begin
          state_q <= S_REQ;
        end
      end
    end
  end

  a_cmpl_has_head: assert property (@(posedge clk) disable iff (!rst_n) cmpl_valid |-> head_valid)
    else $error("global_sequencer: completion without a head task");
  a_header_has_exit: assert property (@(posedge clk) disable iff (!rst_n) state_q == S_PREDICT |-> n_exits != 0)
    else $error("global_sequencer: task header without exits");

endmodule
