// tb_multiscalar_top: end-to-end test of the whole design at its default
// sizes (four processing units, 16K-entry exit PHT, 2K-entry CTTB, 16-entry
// return address stack, 1K-entry bimodal predictors).
//
// The sequencer runs program 2 of tfg_prog_pkg (calls, indirect calls and
// branches, a four-exit task, exits in non-leading header slots, recursion 20
// deep). Every committed task is checked against the real program, and every
// mechanism of the design is counted; a mechanism that never happens counts
// as a failure. Each processing unit meanwhile trains its bimodal predictor
// on a branch of its own and the predictions are checked against a model.
module tb_multiscalar_top;
  import task_pkg::*;
  import tfg_prog_pkg::*;

  localparam int NUM_PU = 4;
  localparam int COMMITS = 6000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hdr_req, hdr_rsp_valid, disp_valid, head_valid, cmpl_valid, squash, ready;
  addr_t hdr_addr, disp_addr, cmpl_target, start_addr;
  task_header_t hdr_rsp;
  logic [1:0] disp_unit, head_unit;
  exit_t cmpl_exit;
  addr_t bp_pc [NUM_PU], bp_upd_pc [NUM_PU];
  logic  bp_taken [NUM_PU], bp_upd_en [NUM_PU], bp_upd_taken [NUM_PU];
  int e_checks, e_failures, commits, squashes, wp_hdrs, full_cycles;
  int checks = 0, failures = 0;

  multiscalar_top dut (.*);

  tfg_env #(.NUM_PU(NUM_PU)) env (
    .clk, .rst_n, .hdr_req, .hdr_addr, .hdr_rsp_valid, .hdr_rsp,
    .disp_valid, .disp_unit, .disp_addr, .head_valid, .head_unit,
    .cmpl_valid, .cmpl_exit, .cmpl_target, .squash,
    .checks(e_checks), .failures(e_failures), .commits, .squashes,
    .wrong_path_headers(wp_hdrs), .full_cycles);

  // ------------------------------------------------------ mechanism counters
  typedef enum int {
    M_DISPATCH, M_COMMIT, M_SQUASH, M_HDR_DROP, M_FULL_STALL, M_RAS_PUSH, M_RAS_POP,
    M_RAS_OVERFLOW, M_CTTB_PREDICT, M_CTTB_HIT, M_CTTB_HOLD, M_CTTB_REPLACE,
    M_PHT_PREDICT, M_SINGLE_EXIT, M_LEH_HOLD, M_LEH_REPLACE, M_SLOT_FALLBACK,
    M_HIGH_EXIT, M_RETURN_HIT, M_BP_TAKEN, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mname [M_COUNT] = '{"dispatch", "commit", "squash", "header_drop", "queue_full_stall",
    "ras_push", "ras_pop", "ras_overflow", "cttb_predict", "cttb_correct", "cttb_hysteresis_hold",
    "cttb_replace", "pht_predict", "single_exit_bypass", "leh_hysteresis_hold", "leh_replace",
    "empty_slot_fallback", "exit_2_or_3_predicted", "return_predicted_by_ras", "intra_task_taken"};

  wire predict_cyc = dut.u_gseq.state_q == dut.u_gseq.S_PREDICT;
  wire commit_cyc  = dut.u_gseq.commit;

  always @(posedge clk) if (rst_n) begin
    if (disp_valid) mech[M_DISPATCH]++;
    if (commit_cyc) mech[M_COMMIT]++;
    if (squash) mech[M_SQUASH]++;
    if (dut.u_gseq.drop_q && hdr_rsp_valid) mech[M_HDR_DROP]++;
    if (predict_cyc && dut.u_gseq.q_full) mech[M_FULL_STALL]++;
    if (dut.u_gseq.ras_push) mech[M_RAS_PUSH]++;
    if (dut.u_gseq.ras_pop) mech[M_RAS_POP]++;
    if (disp_valid && is_indirect(dut.u_gseq.sel.spec)) mech[M_CTTB_PREDICT]++;
    if (disp_valid && dut.u_gseq.n_exits > 1) mech[M_PHT_PREDICT]++;
    if (disp_valid && dut.u_gseq.n_exits == 1) mech[M_SINGLE_EXIT]++;
    if (disp_valid && dut.u_gseq.n_exits > 1 &&
        dut.u_gseq.hdr_q.exits[dut.u_gseq.pht_exit].spec == EXIT_NONE) mech[M_SLOT_FALLBACK]++;
    if (disp_valid && dut.u_gseq.sel_exit >= 2) mech[M_HIGH_EXIT]++;
    if (dut.u_gseq.upd_pht) begin
      if (dut.u_gseq.u_pht.cur_e.exit_no != cmpl_exit) begin
        if (dut.u_gseq.u_pht.cur_e.hyst != 0) mech[M_LEH_HOLD]++;
        else mech[M_LEH_REPLACE]++;
      end
    end
    if (dut.u_gseq.upd_ttb) begin
      if (dut.u_gseq.u_cttb.cur_e.tgt != cmpl_target[31:2]) begin
        if (dut.u_gseq.u_cttb.cur_e.hyst != 0) mech[M_CTTB_HOLD]++;
        else mech[M_CTTB_REPLACE]++;
      end
      if (!squash) mech[M_CTTB_HIT]++;
    end
    if (commit_cyc && dut.u_gseq.act_spec == EXIT_RETURN && !squash) mech[M_RETURN_HIT]++;
  end

  // ---------------------------------------------- intra-task branch predictors
  // Unit u sees one branch at 'h8000 + 'h40*u that is taken when (n % 4) != u.
  int bp_cnt [NUM_PU];
  int bp_model [NUM_PU];
  always @(posedge clk) begin
    for (int u = 0; u < NUM_PU; u++) begin
      if (!rst_n) begin
        bp_cnt[u] = 0; bp_model[u] = 1;
        bp_upd_en[u] <= 0; bp_upd_taken[u] <= 0;
        bp_pc[u] <= 32'h8000 + 32'h40 * u; bp_upd_pc[u] <= 32'h8000 + 32'h40 * u;
      end else begin
        logic t;
        // prediction check before this cycle's update lands
        checks++;
        if (bp_taken[u] !== (bp_model[u] >= 2)) begin
          failures++; $display("FAIL unit %0d bimodal prediction %b, model counter %0d", u, bp_taken[u], bp_model[u]);
        end
        if (bp_taken[u]) mech[M_BP_TAKEN]++;
        if (bp_upd_en[u]) begin
          if (bp_upd_taken[u] && bp_model[u] < 3) bp_model[u]++;
          else if (!bp_upd_taken[u] && bp_model[u] > 0) bp_model[u]--;
        end
        t = (bp_cnt[u] % 4) != u;
        bp_upd_en[u]    <= (bp_cnt[u] % 3) == 0;
        bp_upd_taken[u] <= t;
        bp_cnt[u]++;
      end
    end
  end

  task automatic finish_tb();
    checks += e_checks; failures += e_failures;
    mech[M_RAS_OVERFLOW] = (tfg_prog_pkg::max_depth > 16) ? int'(tfg_prog_pkg::max_depth) - 16 : 0;
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("mechanism %-24s %0d", mname[m], mech[m]);
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism %s never happened", mname[m]); end
    end
    $display("commits=%0d squashes=%0d wrong_path_headers=%0d full_cycles=%0d", commits, squashes, wp_hdrs, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    int late_sq;
    for (int m = 0; m < M_COUNT; m++) mech[m] = 0;
    tfg_prog_pkg::build(2);
    start_addr = tfg_prog_pkg::start_addr();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    wait (commits >= COMMITS / 2);
    late_sq = squashes;
    wait (commits >= COMMITS);
    late_sq = squashes - late_sq;
    @(posedge clk);
    // The program is periodic apart from the recursion, so the predictor must
    // end up far better than one miss per three tasks.
    checks++;
    if (late_sq * 3 > COMMITS / 2) begin failures++; $display("FAIL %0d mispredictions in the second half", late_sq); end
    $display("second-half mispredictions: %0d of %0d tasks", late_sq, COMMITS / 2);
    finish_tb();
  end
endmodule
