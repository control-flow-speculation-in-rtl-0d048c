// multiscalar_top: control-flow speculation of a Multiscalar processor.
//
// Holds the two levels of control-flow speculation. The global sequencer
// (global_sequencer) predicts the sequence of tasks and hands them to a ring
// of NUM_PU processing units; each processing unit predicts the branches
// inside its own task with a bimodal predictor (bimodal_predictor, one per
// unit). The processing units themselves (fetch, execution pipeline, local
// register file), the register and memory forwarding between them, the data
// banks and the header store are outside this module; their connections are
// ports:
//  - header fetch (hdr_*), task dispatch (disp_*), head completion (cmpl_*,
//    head_*) and squash: see global_sequencer;
//  - per unit u: bp_pc[u] -> bp_taken[u] branch lookup, and bp_upd_*[u]
//    branch outcome update.
// All timing is that of the sub-blocks.
//
// The split into a global sequencer and per-unit intra-task predictors, the
// four units and the bimodal scheme follow the source design; gathering them
// in one module with the processing-unit connections as ports is this
// design's own arrangement.
module multiscalar_top
  import task_pkg::*;
#(
  parameter int unsigned NUM_PU    = 4,
  parameter int unsigned RAS_DEPTH = 16,
  parameter int unsigned BP_IDX_W  = 10,
  localparam int unsigned PU_W     = (NUM_PU > 1) ? $clog2(NUM_PU) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  addr_t           start_addr,
  output logic            ready,
  output logic            hdr_req,
  output addr_t           hdr_addr,
  input  logic            hdr_rsp_valid,
  input  task_header_t    hdr_rsp,
  output logic            disp_valid,
  output logic [PU_W-1:0] disp_unit,
  output addr_t           disp_addr,
  output logic            head_valid,
  output logic [PU_W-1:0] head_unit,
  input  logic            cmpl_valid,
  input  exit_t           cmpl_exit,
  input  addr_t           cmpl_target,
  output logic            squash,
  input  addr_t           bp_pc        [NUM_PU],
  output logic            bp_taken     [NUM_PU],
  input  logic            bp_upd_en    [NUM_PU],
  input  addr_t           bp_upd_pc    [NUM_PU],
  input  logic            bp_upd_taken [NUM_PU]
);

  global_sequencer #(.NUM_PU(NUM_PU), .RAS_DEPTH(RAS_DEPTH)) u_gseq (
    .clk, .rst_n, .start_addr,
    .hdr_req, .hdr_addr, .hdr_rsp_valid, .hdr_rsp,
    .disp_valid, .disp_unit, .disp_addr,
    .head_valid, .head_unit, .cmpl_valid, .cmpl_exit, .cmpl_target,
    .squash, .ready);

  for (genvar u = 0; u < NUM_PU; u++) begin : g_pu
    bimodal_predictor #(.IDX_W(BP_IDX_W)) u_bp (
      .clk, .rst_n,
      .pc(bp_pc[u]), .taken(bp_taken[u]),
      .upd_en(bp_upd_en[u]), .upd_pc(bp_upd_pc[u]), .upd_taken(bp_upd_taken[u]));
  end

endmodule
