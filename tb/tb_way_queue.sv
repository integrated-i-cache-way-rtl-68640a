// tb_way_queue: self-checking test of the Way Queue.
// Pushes random ways and reads them back through pointers, checking the
// tail pointer, the validity of entries not yet written or overwritten a lap
// later, and the same-cycle bypass of a push to a reader.
module tb_way_queue;
  import wpb_pkg::*;

  logic    clk = 0, rst_n = 0;
  logic    push;
  icway_t  push_way;
  wq_ptr_t tail;
  wq_ptr_t rd_ptr [2];
  logic    rd_valid [2];
  icway_t  rd_way [2];
  int      checks = 0, failures = 0;

  way_queue #(.NRD(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  icway_t model [int];   // pointer count -> way

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; push_way = '0; rd_ptr[0] = '0; rd_ptr[1] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // nothing written yet
    rd_ptr[0] = 0; rd_ptr[1] = 5;
    #1 check("empty invalid 0", !rd_valid[0]);
    check("empty invalid 5", !rd_valid[1]);
    check("tail 0", tail == 0);
    // push 100 ways (wraps 64-entry queue), check each right after
    for (int n = 0; n < 100; n++) begin
      push = 1; push_way = icway_t'($urandom_range(0, IC_WAYS-1));
      rd_ptr[1] = wq_ptr_t'(n);       // bypass read of the entry being written
      #1 check($sformatf("bypass %0d", n), rd_valid[1] && rd_way[1] == push_way);
      model[n] = push_way;
      @(negedge clk);
      push = 0;
      check($sformatf("tail %0d", n), tail == wq_ptr_t'(n + 1));
    end
    // entries 36..99 are current, 0..35 were overwritten, 100 not written
    for (int n = 0; n < 101; n++) begin
      rd_ptr[0] = wq_ptr_t'(n);
      #1;
      if (n >= 100 - WQ_DEPTH && n < 100)
        check($sformatf("read %0d", n), rd_valid[0] && rd_way[0] == model[n]);
      else if (n == 100)
        check("unwritten invalid", !rd_valid[0]);
    end
    // a pointer of the previous lap reads as invalid
    rd_ptr[0] = wq_ptr_t'(100 - WQ_DEPTH - 1);
    #1 check("stale lap invalid", !rd_valid[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
