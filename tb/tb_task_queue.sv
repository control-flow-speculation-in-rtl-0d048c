// tb_task_queue: self-checking test of the processing-unit ring queue.
// Random enqueue/dequeue/flush traffic is compared with a queue model: the
// head record, the head and tail unit numbers, full and empty.
module tb_task_queue;
  localparam int NUM_PU = 4, REC_W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic enq, deq, flush, full, empty, head_valid;
  logic [REC_W-1:0] enq_rec, head_rec;
  logic [2:0] count;
  logic [1:0] tail_unit, head_unit;

  task_queue #(.NUM_PU(NUM_PU), .REC_W(REC_W)) dut (.*);

  always #5 clk = ~clk;

  logic [REC_W-1:0] m [$];
  int mh, mt;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int flushes = 0, fulls = 0;
    enq = 0; deq = 0; flush = 0; enq_rec = 0;
    mh = 0; mt = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      checks++;
      if (full !== (m.size() == NUM_PU) || empty !== (m.size() == 0) || count !== 3'(m.size())
          || head_unit !== 2'(mh) || tail_unit !== 2'(mt)) begin
        failures++;
        if (failures < 10) $display("FAIL state n=%0d size=%0d full=%b empty=%b head=%0d/%0d tail=%0d/%0d",
                                    n, m.size(), full, empty, head_unit, mh, tail_unit, mt);
      end
      if (m.size() > 0) begin
        checks++;
        if (head_rec !== m[0]) begin failures++; $display("FAIL head record %h expected %h", head_rec, m[0]); end
      end
      if (full) fulls++;
      enq     = !full && ($urandom % 3 != 0);
      deq     = !empty && ($urandom % 3 == 0);
      flush   = ($urandom % 25 == 0);
      enq_rec = REC_W'($urandom);
      @(posedge clk);
      if (flush) begin
        if (deq) mh = (mh + 1) % NUM_PU;
        mt = mh; m.delete(); flushes++;
      end else begin
        if (deq) begin void'(m.pop_front()); mh = (mh + 1) % NUM_PU; end
        if (enq) begin m.push_back(enq_rec); mt = (mt + 1) % NUM_PU; end
      end
    end
    checks++;
    if (flushes == 0 || fulls == 0) begin failures++; $display("FAIL coverage flushes=%0d fulls=%0d", flushes, fulls); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
