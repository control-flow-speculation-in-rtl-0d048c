// tb_path_index: self-checking test of the folded path index.
// Two main instances: the exit predictor's 7-4-9-9 (3) and the 6-5-8-9 (3)
// example, both 14 index bits. A further set of instances covers the other
// D-O-L-C (F) configurations of the source design's exit predictors (14
// index bits) and target buffers (11 index bits), depth 0 to 7. Hand-worked single-bit vectors pin down the
// field placement; random vectors are compared with a reference that builds
// the intermediate index by shifting fields in from the oldest task and folds
// it bit by bit.
module tb_path_index;
  import task_pkg::*;

  int checks = 0, failures = 0;

  addr_t      cur;
  logic [8:0] hist [7];
  logic [13:0] idx_a, idx_b;

  path_index #(.D(7), .O(4), .L(9), .C(9), .F(3), .HBITS(9)) dut_a (.cur_addr(cur), .hist(hist), .idx(idx_a));
  path_index #(.D(6), .O(5), .L(8), .C(9), .F(3), .HBITS(9), .HDEPTH(7)) dut_b (.cur_addr(cur), .hist(hist), .idx(idx_b));

  // Further configurations: {D, O, L, C, F}.
  localparam int NCFG = 12;
  function automatic int cfg(int g, int field);
    int t [5];
    case (g)
      0: t = '{0, 0, 0, 14, 1};   1: t = '{1, 0, 7, 7, 1};   2: t = '{2, 4, 5, 5, 1};
      3: t = '{3, 6, 8, 8, 2};    4: t = '{4, 5, 6, 7, 2};   5: t = '{5, 4, 6, 6, 2};
      6: t = '{0, 0, 0, 11, 1};   7: t = '{1, 0, 5, 6, 1};   8: t = '{2, 3, 3, 5, 1};
      9: t = '{3, 5, 6, 6, 2};   10: t = '{5, 5, 6, 7, 3};  default: t = '{7, 4, 4, 5, 3};
    endcase
    return t[field];
  endfunction
  logic [13:0] idx_c [NCFG];
  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    localparam int W = ((cfg(g, 0) > 0 ? (cfg(g, 0) - 1) * cfg(g, 1) + cfg(g, 2) : 0) + cfg(g, 3)) / cfg(g, 4);
    logic [W-1:0] o;
    path_index #(.D(cfg(g, 0)), .O(cfg(g, 1)), .L(cfg(g, 2)), .C(cfg(g, 3)), .F(cfg(g, 4)),
                 .HBITS(9), .HDEPTH(7)) u (.cur_addr(cur), .hist(hist), .idx(o));
    assign idx_c[g] = 14'(o);
  end

  function automatic logic [13:0] ref_idx(int d, int o, int l, int c, int f, addr_t a, logic [8:0] h [7]);
    logic [63:0] inter = 0;
    logic [13:0] r = 0;
    int len = (d > 0 ? (d - 1) * o + l : 0) + c;
    int w = len / f;
    for (int k = d - 1; k >= 1; k--) inter = (inter << o) | 64'(h[k] & ((9'd1 << o) - 1));
    if (d > 0) inter = (inter << l) | 64'(h[0] & ((9'd1 << l) - 1));
    inter = (inter << c) | 64'((a >> 2) & ((32'd1 << c) - 1));
    for (int b = 0; b < len; b++) r[b % w] ^= inter[b];
    return r;
  endfunction

  task automatic expect_a(logic [13:0] e, string what);
    #1;
    checks++;
    if (idx_a !== e) begin failures++; $display("FAIL %s: idx=%h expected %h", what, idx_a, e); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if ($bits(idx_a) != 14 || dut_a.INT_W != 42) begin failures++; $display("FAIL: 7-4-9-9 (3) widths"); end
    checks++;
    if (dut_b.INT_W != 42) begin failures++; $display("FAIL: 6-5-8-9 (3) intermediate length %0d", dut_b.INT_W); end
    // Hand-worked vectors for 7-4-9-9 (3).
    cur = '0; for (int k = 0; k < 7; k++) hist[k] = '0;
    expect_a(14'h0000, "all zero");
    cur = 32'h4;                      expect_a(14'h0001, "current bit 0 -> index bit 0");
    cur = 32'h400;                    expect_a(14'h0100, "current bit 8 -> index bit 8");
    cur = 32'h2;                      expect_a(14'h0000, "byte offset ignored");
    cur = 0; hist[0] = 9'h001;        expect_a(14'h0200, "last bit 0 -> inter 9 -> index 9");
    hist[0] = 9'h020;                 expect_a(14'h0001, "last bit 5 -> inter 14 -> index 0");
    hist[0] = 0; hist[1] = 9'h001;    expect_a(14'h0010, "older(-2) bit 0 -> inter 18 -> index 4");
    hist[1] = 9'h010;                 expect_a(14'h0000, "older task bit 4 unused (O=4)");
    hist[1] = 0; hist[6] = 9'h008;    expect_a(14'h2000, "older(-7) bit 3 -> inter 41 -> index 13");
    hist[6] = 0; hist[3] = 9'h001;    // inter 26 -> index 12
    cur = 32'h4000 << 2;              // cur bit 12? C=9 so ignored
    expect_a(14'h1000, "cur bit beyond C ignored, older(-4) bit0 -> index 12");
    cur = 32'h4 << 5; hist[3] = 0; hist[0] = 9'h020;  // inter 5 and inter 14 -> bits 5 and 0
    expect_a(14'h0021, "two fields land on different bits");
    cur = 32'h4; hist[0] = 9'h020;    // inter 0 and inter 14 -> both index 0: cancel
    expect_a(14'h0000, "XOR fold cancels equal bits");
    // Random comparison with the reference.
    for (int n = 0; n < 2000; n++) begin
      cur = $urandom;
      for (int k = 0; k < 7; k++) hist[k] = 9'($urandom);
      #1;
      checks++;
      if (idx_a !== ref_idx(7, 4, 9, 9, 3, cur, hist)) begin
        failures++; $display("FAIL random A: %h vs %h", idx_a, ref_idx(7, 4, 9, 9, 3, cur, hist));
      end
      checks++;
      if (idx_b !== ref_idx(6, 5, 8, 9, 3, cur, hist)) begin
        failures++; $display("FAIL random B: %h vs %h", idx_b, ref_idx(6, 5, 8, 9, 3, cur, hist));
      end
      for (int g = 0; g < NCFG; g++) begin
        checks++;
        if (idx_c[g] !== ref_idx(cfg(g, 0), cfg(g, 1), cfg(g, 2), cfg(g, 3), cfg(g, 4), cur, hist)) begin
          failures++;
          if (failures < 20) $display("FAIL config %0d-%0d-%0d-%0d (%0d): %h vs %h", cfg(g, 0), cfg(g, 1), cfg(g, 2),
                                      cfg(g, 3), cfg(g, 4), idx_c[g],
                                      ref_idx(cfg(g, 0), cfg(g, 1), cfg(g, 2), cfg(g, 3), cfg(g, 4), cur, hist));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
