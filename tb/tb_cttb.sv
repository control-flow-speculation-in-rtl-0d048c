// tb_cttb: self-checking test of the correlated task target buffer.
// Checks the reset sweep length, a hand-worked hysteresis sequence on one
// entry and random traffic against a model table.
module tb_cttb;
  import task_pkg::*;

  localparam int IDX_W = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic busy, rd_en, upd_en;
  logic [IDX_W-1:0] rd_idx, upd_idx;
  addr_t rd_target, upd_target;

  cttb #(.IDX_W(IDX_W), .HYST_W(2)) dut (.*);

  always #5 clk = ~clk;

  addr_t m_tgt  [1 << IDX_W];
  int    m_hyst [1 << IDX_W];

  task automatic do_update(int i, addr_t t);
    @(negedge clk); upd_en = 1; upd_idx = IDX_W'(i); upd_target = t;
    @(posedge clk);
    if (m_tgt[i] == t) begin if (m_hyst[i] < 3) m_hyst[i]++; end
    else if (m_hyst[i] == 0) m_tgt[i] = t;
    else m_hyst[i]--;
    @(negedge clk); upd_en = 0;
  endtask

  task automatic check_read(int i, addr_t expect_t, string what);
    @(negedge clk); rd_en = 1; rd_idx = IDX_W'(i);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_target !== expect_t) begin
      failures++; $display("FAIL %s: entry %0d target %h expected %h", what, i, rd_target, expect_t);
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
    rd_en = 0; upd_en = 0; rd_idx = 0; upd_idx = 0; upd_target = 0;
    for (int i = 0; i < (1 << IDX_W); i++) begin m_tgt[i] = 0; m_hyst[i] = 0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    busy_cycles = 0;
    while (busy) begin @(negedge clk); busy_cycles++; end
    checks++;
    if (busy_cycles != (1 << IDX_W)) begin failures++; $display("FAIL sweep took %0d cycles", busy_cycles); end
    check_read(3, 32'h0, "after reset");
    do_update(3, 32'h0000_2000); check_read(3, 32'h0000_2000, "first target stored");
    do_update(3, 32'h0000_2000); do_update(3, 32'h0000_2000);      // counter 2
    do_update(3, 32'h0000_2400); check_read(3, 32'h0000_2000, "held by counter 1");
    do_update(3, 32'h0000_2400); check_read(3, 32'h0000_2000, "held by counter 0");
    do_update(3, 32'h0000_2400); check_read(3, 32'h0000_2400, "replaced");
    do_update(7, 32'hFFFF_FFFF); check_read(7, 32'hFFFF_FFFC, "byte offset not stored");
    m_tgt[7] = 32'hFFFF_FFFC;
    for (int n = 0; n < 3000; n++) begin
      int i;
      i = $urandom % (1 << IDX_W);
      if ($urandom % 2) do_update(i, {28'($urandom % 3), 4'h0});
      else check_read(i, m_tgt[i], "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
