// task_queue: the ring of processing units seen as a circular queue.
//
// Each of the NUM_PU slots stands for one processing unit and holds the
// record (REC_W bits, opaque here) of the task running on it. The tail
// pointer names the unit that receives the next task; the head pointer names
// the unit running the oldest, non-speculative task. Tasks are started at
// the tail (enq) and retire strictly in order from the head (deq). flush
// discards every task in the queue except that a deq in the same cycle still
// retires the head: together they model "the head commits and every task
// behind it is squashed". After a flush both pointers point at the unit
// after the old head, so the ring keeps turning.
//
// Interface: full / empty / count describe the occupancy; tail_unit is the
// unit an enq goes to; head_unit/head_rec/head_valid describe the head.
// Timing: updates at the next rising edge; outputs come from registers.
// enq while full and deq while empty are errors (asserted).
//
// From the document: the ring of processing units run as a circular queue
// with head and tail pointers, FIFO commit and squash of everything behind
// the head. The record contents and the flush timing are this design's own.
module task_queue #(
  parameter int unsigned NUM_PU = 4,
  parameter int unsigned REC_W  = 8,
  localparam int unsigned PTR_W = (NUM_PU > 1) ? $clog2(NUM_PU) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enq,
  input  logic [REC_W-1:0] enq_rec,
  input  logic             deq,
  input  logic             flush,
  output logic             full,
  output logic             empty,
  output logic [PTR_W:0]   count,
  output logic [PTR_W-1:0] tail_unit,
  output logic [PTR_W-1:0] head_unit,
  output logic             head_valid,
  output logic [REC_W-1:0] head_rec
);

  logic [REC_W-1:0] rec_q [NUM_PU];
  logic [PTR_W-1:0] head_q, tail_q;
  logic [PTR_W:0]   cnt_q;

  function automatic logic [PTR_W-1:0] nxt(logic [PTR_W-1:0] p);
    return (p == PTR_W'(NUM_PU - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else if (flush) begin
      head_q <= deq ? nxt(head_q) : head_q;
      tail_q <= deq ? nxt(head_q) : head_q;
      cnt_q  <= '0;
    end else begin
      if (enq) tail_q <= nxt(tail_q);
      if (deq) head_q <= nxt(head_q);
      cnt_q <= cnt_q + (PTR_W+1)'(enq) - (PTR_W+1)'(deq);
    end
  end

  always_ff @(posedge clk) begin
    if (enq && !flush) rec_q[tail_q] <= enq_rec;
  end

  assign full       = (cnt_q == (PTR_W+1)'(NUM_PU));
  assign empty      = (cnt_q == '0);
  assign count      = cnt_q;
  assign tail_unit  = tail_q;
  assign head_unit  = head_q;
  assign head_valid = !empty;
  assign head_rec   = rec_q[head_q];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(enq && full && !deq && !flush))
    else $error("task_queue: enq while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(deq && empty))
    else $error("task_queue: deq while empty");

endmodule
