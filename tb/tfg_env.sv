// tfg_env: testbench environment around the global sequencer.
//
// Plays the parts outside the sequencer:
//  - the header store: answers each hdr_req with the header of that address
//    after 1..HDR_MAXLAT cycles (wrong-path addresses get a dummy header);
//  - the processing units: remembers which task each unit received; the head
//    unit finishes after 0..TASK_MAXLAT cycles and reports the exit and the
//    next address given by the program model (tfg_prog_pkg::resolve);
//  - the checker: every task that commits must be the next task of the real
//    program, and a dispatch that follows a header response with no stall or
//    squash in between must come exactly two cycles after it.
// Counts are outputs so that the testbench can report them.
module tfg_env
  import task_pkg::*;
  import tfg_prog_pkg::*;
#(
  parameter int unsigned NUM_PU      = 4,
  parameter int unsigned HDR_MAXLAT  = 3,
  parameter int unsigned TASK_MAXLAT = 12,
  localparam int unsigned PU_W       = (NUM_PU > 1) ? $clog2(NUM_PU) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            hdr_req,
  input  addr_t           hdr_addr,
  output logic            hdr_rsp_valid,
  output task_header_t    hdr_rsp,
  input  logic            disp_valid,
  input  logic [PU_W-1:0] disp_unit,
  input  addr_t           disp_addr,
  input  logic            head_valid,
  input  logic [PU_W-1:0] head_unit,
  output logic            cmpl_valid,
  output exit_t           cmpl_exit,
  output addr_t           cmpl_target,
  input  logic            squash,
  output int              checks,
  output int              failures,
  output int              commits,
  output int              squashes,
  output int              wrong_path_headers,
  output int              full_cycles
);

  addr_t unit_addr [NUM_PU];
  addr_t expect_addr;
  int    hdr_wait, task_wait, occ;
  addr_t pend_addr;
  bit    pend;
  longint cyc, rsp_cyc;
  bit    clean_since_rsp;

  initial begin
    checks = 0; failures = 0; commits = 0; squashes = 0; wrong_path_headers = 0; full_cycles = 0;
    hdr_rsp_valid = 0; hdr_rsp = '0; cmpl_valid = 0; cmpl_exit = 0; cmpl_target = 0;
    pend = 0; hdr_wait = 0; task_wait = -1; occ = 0; cyc = 0; rsp_cyc = 0; clean_since_rsp = 0;
    for (int i = 0; i < NUM_PU; i++) unit_addr[i] = 0;
    expect_addr = 0;
  end

  always @(posedge clk) if (!rst_n) begin
    expect_addr = tfg_prog_pkg::start_addr();
    pend = 0; task_wait = -1; occ = 0; clean_since_rsp = 0;
    hdr_rsp_valid <= 0; cmpl_valid <= 0;
  end else begin
    cyc++;
    // ---- header store
    hdr_rsp_valid <= 0;
    if (hdr_req) begin
      if (pend) begin failures++; $display("FAIL second header request while one is pending"); end
      pend      = 1;
      pend_addr = hdr_addr;
      hdr_wait  = 1 + ($urandom % HDR_MAXLAT);
      if (!tfg_prog_pkg::hdrs.exists(hdr_addr)) wrong_path_headers++;
    end else if (pend) begin
      hdr_wait--;
      if (hdr_wait == 0) begin
        hdr_rsp_valid <= 1;
        hdr_rsp       <= tfg_prog_pkg::header_of(pend_addr);
        pend          = 0;
        rsp_cyc       = cyc;
        clean_since_rsp = 1;
      end
    end
    // ---- occupancy model and dispatch timing
    if (occ == NUM_PU) begin full_cycles++; clean_since_rsp = 0; end
    if (squash) clean_since_rsp = 0;
    if (disp_valid) begin
      unit_addr[disp_unit] = disp_addr;
      if (clean_since_rsp) begin
        checks++;
        if (cyc - rsp_cyc != 3) begin
          failures++; $display("FAIL dispatch %0d cycles after the header response", cyc - rsp_cyc);
        end
      end
      clean_since_rsp = 0;
      occ++;
    end
    // ---- head processing unit
    cmpl_valid <= 0;
    if (cmpl_valid) begin
      occ--;
      if (squash) begin occ = 0; squashes++; end
      task_wait = -1;
    end else if (head_valid) begin
      if (task_wait < 0) task_wait = $urandom % (TASK_MAXLAT + 1);
      else if (task_wait > 0) task_wait--;
      if (task_wait == 0) begin
        exit_t e; addr_t t;
        checks++;
        if (unit_addr[head_unit] !== expect_addr) begin
          failures++;
          if (failures < 10) $display("FAIL commit %0d: head task %h expected %h", commits, unit_addr[head_unit], expect_addr);
        end
        tfg_prog_pkg::resolve(expect_addr, e, t);
        cmpl_valid  <= 1;
        cmpl_exit   <= e;
        cmpl_target <= t;
        expect_addr = t;
        commits++;
        task_wait = -2;   // waiting for the completion to be seen
      end
    end
  end

endmodule
