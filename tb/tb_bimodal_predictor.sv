// tb_bimodal_predictor: self-checking test of the 2-bit counter branch
// predictor. A hand-worked sequence checks hysteresis (one wrong outcome does
// not flip a saturated counter) and random updates are compared with a model.
module tb_bimodal_predictor;
  import task_pkg::*;

  localparam int IDX_W = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  addr_t pc, upd_pc;
  logic taken, upd_en, upd_taken;

  bimodal_predictor #(.IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  int m [1 << IDX_W];

  task automatic upd(addr_t a, logic t);
    int i;
    @(negedge clk); upd_en = 1; upd_pc = a; upd_taken = t;
    @(posedge clk);
    i = (a >> 2) % (1 << IDX_W);
    if (t && m[i] < 3) m[i]++;
    else if (!t && m[i] > 0) m[i]--;
    @(negedge clk); upd_en = 0;
  endtask

  task automatic chk(addr_t a, logic e, string what);
    pc = a; #1;
    checks++;
    if (taken !== e) begin failures++; $display("FAIL %s: pc %h predicts %b expected %b", what, a, taken, e); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    upd_en = 0; upd_pc = 0; upd_taken = 0; pc = 0;
    for (int i = 0; i < (1 << IDX_W); i++) m[i] = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    chk(32'h40, 0, "reset weakly not taken");
    upd(32'h40, 1); chk(32'h40, 1, "one taken flips a weak counter");
    upd(32'h40, 1); upd(32'h40, 1);
    upd(32'h40, 0); chk(32'h40, 1, "strong taken survives one not-taken");
    upd(32'h40, 0); chk(32'h40, 0, "second not-taken flips");
    chk(32'h44, 0, "neighbouring entry untouched");
    chk(32'h40 + (32'h4 << IDX_W), 0, "aliasing entry shares the counter");
    for (int n = 0; n < 4000; n++) begin
      addr_t a;
      a = $urandom & 32'h3FC;
      if ($urandom % 2) upd(a, 1'($urandom));
      else chk(a, m[(a >> 2) % (1 << IDX_W)] >= 2, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
