// tb_global_sequencer: end-to-end test of the global sequencer on the loop
// of the example task flow graph (program 1 of tfg_prog_pkg), at the
// document's predictor sizes with four processing units.
// Checks: every committed task is the next task of the real program; the
// dispatch latency; return exits are always predicted by the return address
// stack when the exit is predicted; single-exit tasks are never mispredicted;
// and the path-based predictor has learned the loop: after warm-up it
// mispredicts less than in the first calls. A second run, after a reset,
// uses program 3, a short periodic task flow graph with an indirect branch:
// once trained the predictor must not mispredict at all, which holds only if
// the tables are updated at exactly the entries used for the predictions.
module tb_global_sequencer;
  import task_pkg::*;
  import tfg_prog_pkg::*;

  localparam int NUM_PU = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic hdr_req, hdr_rsp_valid, disp_valid, head_valid, cmpl_valid, squash, ready;
  addr_t hdr_addr, disp_addr, cmpl_target, start_addr;
  task_header_t hdr_rsp;
  logic [1:0] disp_unit, head_unit;
  exit_t cmpl_exit;
  int e_checks, e_failures, commits, squashes, wp_hdrs, full_cycles;
  int checks = 0, failures = 0;

  global_sequencer dut (.*);
  tfg_env #(.NUM_PU(NUM_PU)) env (
    .clk, .rst_n, .hdr_req, .hdr_addr, .hdr_rsp_valid, .hdr_rsp,
    .disp_valid, .disp_unit, .disp_addr, .head_valid, .head_unit,
    .cmpl_valid, .cmpl_exit, .cmpl_target, .squash,
    .checks(e_checks), .failures(e_failures), .commits, .squashes,
    .wrong_path_headers(wp_hdrs), .full_cycles);

  int ret_commits = 0, single_miss = 0, early_miss = 0, late_miss = 0;

  always @(posedge clk) if (rst_n && cmpl_valid && head_valid) begin
    task_header_t h;
    h = header_of(env.unit_addr[head_unit]);
    if (h.exits[cmpl_exit].spec == EXIT_RETURN) ret_commits++;
    if (num_exits(h) == 1 && squash) single_miss++;
    if (squash) begin
      if (commits < 300) early_miss++;
      else if (commits >= 1700) late_miss++;
    end
  end

  task automatic finish_tb();
    checks += e_checks; failures += e_failures;
    $display("commits=%0d squashes=%0d early_miss=%0d late_miss=%0d returns=%0d full_cycles=%0d",
             commits, squashes, early_miss, late_miss, ret_commits, full_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end

  initial begin
    tfg_prog_pkg::build(1);
    start_addr = tfg_prog_pkg::start_addr();
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (commits >= 2000);
    @(posedge clk);
    checks++;
    if (single_miss != 0) begin failures++; $display("FAIL %0d single-exit tasks mispredicted", single_miss); end
    checks++;
    if (ret_commits == 0) begin failures++; $display("FAIL no return exits committed"); end
    checks++;
    if (!(late_miss < early_miss)) begin failures++; $display("FAIL predictor did not learn: %0d vs %0d", late_miss, early_miss); end
    // Second run: periodic program, must be predicted perfectly after warm-up.
    begin
      int c0, s0, s1;
      rst_n = 0;
      tfg_prog_pkg::build(3);
      start_addr = tfg_prog_pkg::start_addr();
      repeat (3) @(posedge clk);
      rst_n = 1;
      c0 = commits;
      wait (commits >= c0 + 300);
      s0 = squashes;
      wait (commits >= c0 + 1300);
      s1 = squashes;
      @(posedge clk);
      $display("periodic program: %0d mispredictions in the first 300 tasks, %0d in the next 1000", s0, s1 - s0);
      checks++;
      if (s1 != s0) begin failures++; $display("FAIL periodic program still mispredicted after training"); end
      checks++;
      if (s0 == 0) begin failures++; $display("FAIL periodic program never mispredicted while training"); end
    end
    finish_tb();
  end
endmodule
