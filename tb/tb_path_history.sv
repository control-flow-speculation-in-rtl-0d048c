// tb_path_history: self-checking test of the path history register.
// Random speculative pushes, commits and restores are applied; a queue-based
// model of both copies predicts the speculative history after every cycle.
module tb_path_history;
  import task_pkg::*;

  localparam int DEPTH = 7, HBITS = 9;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic spec_push, commit_push, restore;
  addr_t spec_addr, commit_addr;
  logic [HBITS-1:0] hist [DEPTH];

  path_history #(.DEPTH(DEPTH), .HBITS(HBITS)) dut (.*);

  always #5 clk = ~clk;

  logic [HBITS-1:0] m_spec [$], m_cmt [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    spec_push = 0; commit_push = 0; restore = 0; spec_addr = 0; commit_addr = 0;
    for (int i = 0; i < DEPTH; i++) begin m_spec.push_back(0); m_cmt.push_back(0); end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      spec_push   = ($urandom % 3) != 0;
      commit_push = ($urandom % 3) == 0;
      restore     = ($urandom % 10) == 0;
      spec_addr   = $urandom;
      commit_addr = $urandom;
      @(posedge clk);
      if (commit_push) begin
        m_cmt.push_front(9'(commit_addr >> 2)); void'(m_cmt.pop_back());
      end
      if (restore) m_spec = m_cmt;
      else if (spec_push) begin
        m_spec.push_front(9'(spec_addr >> 2)); void'(m_spec.pop_back());
      end
      #1;
      for (int i = 0; i < DEPTH; i++) begin
        checks++;
        if (hist[i] !== m_spec[i]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d hist[%0d]=%h expected %h", n, i, hist[i], m_spec[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
