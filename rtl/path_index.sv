// path_index: index generator of a path-based predictor, described by the
// five parameters D-O-L-C (F).
//
// The intermediate index is the concatenation of C low-order bits of the
// current task address, L bits of the last task (current - 1) and O bits of
// each older task (current - 2 .. current - D). Its length is
// (D-1)*O + L + C, which must be a multiple of F. The final index is formed
// by cutting the intermediate index into F equal sub-fields and XORing them
// together, giving IDX_W = ((D-1)*O + L + C) / F bits.
//
// Interface: cur_addr is the current task's start address; hist[k] holds the
// HBITS low-order bits (already stripped of the byte offset) of task
// current-1-k, so hist[0] is the last task. Output idx is combinational.
//
// From the document: the field structure, the formula and the folding by
// XOR of F equal parts. This design's choices: the current-task field sits
// at the least significant end, followed by the last task, then the older
// tasks in order of age; address bits are taken from bit ADDR_LSB upward,
// since the two lowest bits of an instruction address are always zero.
module path_index
  import task_pkg::*;
#(
  parameter int unsigned D        = 7,
  parameter int unsigned O        = 4,
  parameter int unsigned L        = 9,
  parameter int unsigned C        = 9,
  parameter int unsigned F        = 3,
  parameter int unsigned HBITS    = 9,   // bits kept per task in the history
  parameter int unsigned ADDR_LSB = 2,
  parameter int unsigned HDEPTH   = (D > 0) ? D : 1,
  localparam int unsigned INT_W   = ((D > 0) ? (D - 1) * O + L : 0) + C,
  localparam int unsigned IDX_W   = INT_W / F
) (
  input  addr_t                   cur_addr,
  input  logic [HBITS-1:0]        hist [HDEPTH],
  output logic [IDX_W-1:0]        idx
);

  initial begin
    assert (INT_W % F == 0)
      else $error("path_index: intermediate index length %0d not a multiple of F=%0d", INT_W, F);
    assert (L <= HBITS && O <= HBITS)
      else $error("path_index: history keeps too few bits per task");
  end

  logic [INT_W-1:0] inter;

  always_comb begin
    int unsigned pos;
    inter = '0;
    pos   = 0;
    for (int unsigned b = 0; b < C; b++) inter[pos + b] = cur_addr[ADDR_LSB + b];
    pos += C;
    if (D > 0) begin
      for (int unsigned b = 0; b < L; b++) inter[pos + b] = hist[0][b];
      pos += L;
      for (int unsigned k = 1; k < D; k++) begin
        for (int unsigned b = 0; b < O; b++) inter[pos + b] = hist[k][b];
        pos += O;
      end
    end
  end

  always_comb begin
    idx = '0;
    for (int unsigned f = 0; f < F; f++)
      idx ^= inter[f*IDX_W +: IDX_W];
  end

endmodule
