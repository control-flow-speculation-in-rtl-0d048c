// tb_ras: self-checking test of the return address stack.
// A model keeps both the speculative and the committed stacks as circular
// buffers; random pushes, pops, commits and restores are compared on the top
// of stack every cycle. A directed part checks LIFO order, overflow (the
// oldest entry is overwritten) and repair by restore.
module tb_ras;
  import task_pkg::*;

  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic spec_push, spec_pop, cmt_push, cmt_pop, restore;
  addr_t spec_addr, cmt_addr, top;

  ras #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  addr_t ms [DEPTH], mc [DEPTH];
  int    ps, pc;

  task automatic step();
    @(posedge clk);
    if (cmt_push) begin mc[pc] = cmt_addr; pc = (pc + 1) % DEPTH; end
    else if (cmt_pop) pc = (pc + DEPTH - 1) % DEPTH;
    if (restore) begin ms = mc; ps = pc; end
    else if (spec_push) begin ms[ps] = spec_addr; ps = (ps + 1) % DEPTH; end
    else if (spec_pop) ps = (ps + DEPTH - 1) % DEPTH;
    #1;
    checks++;
    if (top !== ms[(ps + DEPTH - 1) % DEPTH]) begin
      failures++;
      if (failures < 10) $display("FAIL top=%h expected %h", top, ms[(ps + DEPTH - 1) % DEPTH]);
    end
    @(negedge clk);
    spec_push = 0; spec_pop = 0; cmt_push = 0; cmt_pop = 0; restore = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spec_push = 0; spec_pop = 0; cmt_push = 0; cmt_pop = 0; restore = 0;
    spec_addr = 0; cmt_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin ms[i] = 0; mc[i] = 0; end
    ps = 0; pc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // Directed: push DEPTH+2 return addresses, pop them back.
    for (int i = 1; i <= DEPTH + 2; i++) begin spec_push = 1; spec_addr = 32'h100 * i; step(); end
    for (int i = DEPTH + 2; i >= 3; i--) begin
      checks++;
      if (top !== 32'h100 * i) begin failures++; $display("FAIL LIFO: top %h expected %h", top, 32'h100 * i); end
      spec_pop = 1; step();
    end
    checks++;   // popping DEPTH entries wraps the pointer back to the newest one
    if (top !== 32'h100 * (DEPTH + 2)) begin failures++; $display("FAIL overflow wrap: top %h", top); end
    // Commit one call, then squash: speculative stack equals committed one.
    cmt_push = 1; cmt_addr = 32'hABC0; restore = 1; step();
    checks++;
    if (top !== 32'hABC0) begin failures++; $display("FAIL restore: top %h", top); end
    // Random traffic.
    for (int n = 0; n < 5000; n++) begin
      case ($urandom % 3)
        0: spec_push = 1;
        1: spec_pop = 1;
        default: ;
      endcase
      case ($urandom % 4)
        0: cmt_push = 1;
        1: cmt_pop = 1;
        default: ;
      endcase
      restore   = ($urandom % 12) == 0;
      spec_addr = $urandom & ~32'h3;
      cmt_addr  = $urandom & ~32'h3;
      step();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
