// tb_burq: self-checking test of the BTB Update Request Queue.
// Fills the queue to full, checks first-in first-out order against a
// software queue, checks full/empty flags and simultaneous enqueue and
// dequeue, also on a full queue, with random traffic.
module tb_burq;
  import wpb_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     enq, full, head_v, deq;
  upd_req_t enq_req, head;
  logic [$clog2(BURQ_DEPTH+1)-1:0] count;
  int       checks = 0, failures = 0;

  burq dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic upd_req_t rnd_req();
    upd_req_t r;
    r = '0;
    r.pc       = {$urandom} & 32'hFFFF_FFFC;
    r.target   = {$urandom} & 32'hFFFF_FFFC;
    r.is_br    = 1'($urandom);
    r.taken    = 1'($urandom);
    r.wait_ptr = wq_ptr_t'($urandom);
    return r;
  endfunction

  upd_req_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enq = 0; deq = 0; enq_req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("empty after reset", !head_v && !full && count == 0);
    // fill
    for (int i = 0; i < BURQ_DEPTH; i++) begin
      enq = 1; enq_req = rnd_req(); q.push_back(enq_req);
      @(negedge clk);
    end
    enq = 0;
    check("full", full && count == BURQ_DEPTH);
    check("head is oldest", head_v && head == q[0]);
    // enqueue and dequeue together on a full queue
    enq = 1; deq = 1; enq_req = rnd_req();
    @(negedge clk);
    void'(q.pop_front()); q.push_back(enq_req);
    enq = 0; deq = 0;
    check("still full", full && head == q[0]);
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      enq = 1'($urandom) && !full;
      deq = 1'($urandom) && head_v;
      enq_req = rnd_req();
      if (head_v) check($sformatf("order %0d", i), head == q[0]);
      check($sformatf("count %0d", i), count == q.size());
      @(negedge clk);
      if (deq) void'(q.pop_front());
      if (enq) q.push_back(enq_req);
    end
    enq = 0;
    while (head_v) begin
      deq = 1;
      check("drain order", head == q[0]);
      @(negedge clk);
      void'(q.pop_front());
    end
    deq = 0;
    check("drained", q.size() == 0 && count == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
