// tb_leh_pht: self-checking test of the last-exit-with-hysteresis PHT.
// Checks the reset sweep length, a hand-worked automaton sequence (replace
// when the counter is zero, hold a proven exit for three wrong outcomes,
// saturate at three) and random reads/updates against a model of the table.
// A small table (6 index bits) keeps the sweep short.
module tb_leh_pht;
  import task_pkg::*;

  localparam int IDX_W = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic busy, rd_en, upd_en;
  logic [IDX_W-1:0] rd_idx, upd_idx;
  exit_t rd_exit, upd_exit;

  leh_pht #(.IDX_W(IDX_W), .HYST_W(2)) dut (.*);

  always #5 clk = ~clk;

  exit_t    m_exit [1 << IDX_W];
  int       m_hyst [1 << IDX_W];

  task automatic model_update(int i, exit_t e);
    if (m_exit[i] == e) begin if (m_hyst[i] < 3) m_hyst[i]++; end
    else if (m_hyst[i] == 0) m_exit[i] = e;
    else m_hyst[i]--;
  endtask

  task automatic do_update(int i, exit_t e);
    @(negedge clk); upd_en = 1; upd_idx = IDX_W'(i); upd_exit = e;
    @(posedge clk); model_update(i, e);
    @(negedge clk); upd_en = 0;
  endtask

  task automatic check_read(int i, string what);
    @(negedge clk); rd_en = 1; rd_idx = IDX_W'(i);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_exit !== m_exit[i]) begin
      failures++; $display("FAIL %s: entry %0d reads %0d expected %0d", what, i, rd_exit, m_exit[i]);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int busy_cycles;
    rd_en = 0; upd_en = 0; rd_idx = 0; upd_idx = 0; upd_exit = 0;
    for (int i = 0; i < (1 << IDX_W); i++) begin m_exit[i] = 0; m_hyst[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    busy_cycles = 0;
    while (busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != (1 << IDX_W)) begin failures++; $display("FAIL sweep took %0d cycles", busy_cycles); end
    // Hand-worked sequence on entry 5; the expected exits are written out.
    check_read(5, "after reset");
    do_update(5, 2); check_read(5, "replace at counter 0");            // exit 2, ctr 0
    checks++; if (rd_exit !== 2) begin failures++; $display("FAIL directed 1"); end
    do_update(5, 2); do_update(5, 2); do_update(5, 2); do_update(5, 2); // ctr saturates at 3
    do_update(5, 1); do_update(5, 3); do_update(5, 1);                 // ctr 3 -> 0, exit kept
    check_read(5, "hysteresis holds");
    checks++; if (rd_exit !== 2) begin failures++; $display("FAIL directed 2: exit %0d", rd_exit); end
    do_update(5, 1); check_read(5, "replaced after fourth miss");
    checks++; if (rd_exit !== 1) begin failures++; $display("FAIL directed 3: exit %0d", rd_exit); end
    // Read of the same entry while it is updated returns the old value.
    @(negedge clk); rd_en = 1; rd_idx = 5; upd_en = 1; upd_idx = 5; upd_exit = 3;
    @(posedge clk); model_update(5, 3);
    @(negedge clk); rd_en = 0; upd_en = 0;
    checks++; if (rd_exit !== 1) begin failures++; $display("FAIL read-during-write"); end
    check_read(5, "after read-during-write");
    // Random traffic.
    for (int n = 0; n < 4000; n++) begin
      if ($urandom % 2) do_update($urandom % (1 << IDX_W), exit_t'($urandom));
      else check_read($urandom % (1 << IDX_W), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
