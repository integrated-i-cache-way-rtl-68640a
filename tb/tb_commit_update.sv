// tb_commit_update: self-checking test of the commit-side WP-BTB update.
// The testbench plays the Way Queue, the BURQ and the core.  Checked: an
// immediate WP-BTB write when the way is known; queuing when it is not;
// draining of a ready BURQ head and ordering behind it; taken and not-taken
// mispredictions (redirect address, one-way or all-way redirect, request
// waiting on the WQ tail); non-branch updates; back-pressure on a full BURQ;
// commits that did not look the BTB up; direction predictor training.
module tb_commit_update;
  import wpb_pkg::*;

  logic     clk = 0, rst_n = 0;
  logic     cmt_v, cmt_ready, redir_v;
  commit_t  cmt;
  addr_t    redir_pc;
  icmask_t  redir_mask;
  wq_ptr_t  wq_rd_ptr [2];
  logic     wq_rd_valid [2];
  icway_t   wq_rd_way [2];
  wq_ptr_t  wq_tail;
  logic     bq_enq, bq_full, bq_head_v, bq_deq;
  upd_req_t bq_enq_req, bq_head;
  logic     btb_wr_en;
  btb_wr_t  btb_wr;
  logic     bp_up_en, bp_up_taken;
  addr_t    bp_up_pc;
  logic     ev_mispredict, ev_direct_wr;
  int       checks = 0, failures = 0;

  commit_update dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // Way Queue model: entries 0..15 written, way = ptr % 4; others not yet
  always_comb begin
    for (int r = 0; r < 2; r++) begin
      wq_rd_valid[r] = wq_rd_ptr[r] < 16;
      wq_rd_way[r]   = icway_t'(wq_rd_ptr[r] % 4);
    end
  end

  function automatic commit_t branch(addr_t pc, logic hit, addr_t btgt, wp_t t, wp_t f,
                                     logic ptaken, logic taken, addr_t tgt, wq_ptr_t p);
    commit_t c;
    c = '0;
    c.tag.lk = 1; c.tag.is_br = 1; c.tag.lk_pc = pc; c.tag.hit = hit;
    c.tag.btb_target = btgt; c.tag.twp = t; c.tag.fwp = f; c.tag.pred_taken = ptaken;
    c.tag.pred_next = ptaken ? btgt : pc + 4; c.tag.wq_ptr = p;
    c.taken = taken; c.target = tgt;
    return c;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmt_v = 0; cmt = '0; wq_tail = 7'd16; bq_full = 0; bq_head_v = 0; bq_head = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // 1. correctly predicted taken branch, way known (entry 6 -> way 2)
    cmt_v = 1;
    cmt = branch(32'h1000, 1, 32'h2000, '{1'b1, 2'd0}, '{1'b1, 2'd3}, 1, 1, 32'h2000, 7'd6);
    #1;
    check("1 no redirect", !redir_v && !ev_mispredict);
    check("1 direct write", btb_wr_en && ev_direct_wr && !bq_enq && cmt_ready);
    check("1 entry", btb_wr.pc == 32'h1000 && btb_wr.is_br && btb_wr.target == 32'h2000
          && btb_wr.twp == '{1'b1, 2'd2} && btb_wr.fwp == '{1'b1, 2'd3});
    check("1 predictor trained", bp_up_en && bp_up_pc == 32'h1000 && bp_up_taken);

    // 2. correctly predicted not-taken branch, next fetch not finished (ptr 20)
    cmt = branch(32'h1100, 1, 32'h3000, '{1'b1, 2'd1}, '{1'b0, 2'd0}, 0, 0, 32'h3000, 7'd20);
    #1;
    check("2 queued", bq_enq && !btb_wr_en && !redir_v);
    check("2 request", bq_enq_req.pc == 32'h1100 && bq_enq_req.wait_ptr == 7'd20
          && bq_enq_req.keep_twp && bq_enq_req.twp_old == '{1'b1, 2'd1} && !bq_enq_req.taken);

    // 3. BURQ head ready (waits on entry 9 -> way 1): drained; a new commit
    //    whose way is known queues behind it
    bq_head_v = 1;
    bq_head = '{pc: 32'h1100, is_br: 1, taken: 0, target: 32'h3000, twp_old: '{1'b1, 2'd1},
                fwp_old: '0, keep_twp: 1, wait_ptr: 7'd9};
    cmt = branch(32'h1200, 1, 32'h2000, '0, '0, 1, 1, 32'h2000, 7'd5);
    #1;
    check("3 head drained", bq_deq && btb_wr_en && btb_wr.pc == 32'h1100
          && btb_wr.fwp == '{1'b1, 2'd1} && btb_wr.twp == '{1'b1, 2'd1} && btb_wr.target == 32'h3000);
    check("3 younger queued", bq_enq && !ev_direct_wr);
    // head not ready (entry 30)
    bq_head.wait_ptr = 7'd30;
    #1 check("3 head waits", !bq_deq && !btb_wr_en && bq_enq);
    bq_head_v = 0;

    // 4. branch predicted not taken, actually taken; twp still valid
    cmt = branch(32'h1300, 1, 32'h5000, '{1'b1, 2'd3}, '{1'b1, 2'd0}, 0, 1, 32'h5000, 7'd7);
    #1;
    check("4 redirect", redir_v && ev_mispredict && redir_pc == 32'h5000 && redir_mask == 4'b1000);
    check("4 waits for redirected fetch", bq_enq && bq_enq_req.wait_ptr == 7'd16 && !btb_wr_en);

    // 5. wrong target: redirect with all ways
    cmt = branch(32'h1400, 1, 32'h5000, '{1'b1, 2'd3}, '{1'b1, 2'd0}, 1, 1, 32'h6000, 7'd7);
    #1 check("5 new target, all ways", redir_v && redir_pc == 32'h6000 && redir_mask == 4'b1111
             && !bq_enq_req.keep_twp);

    // 6. predicted taken, not taken: fall through with fwp
    cmt = branch(32'h1500, 1, 32'h5000, '{1'b1, 2'd3}, '{1'b1, 2'd2}, 1, 0, 32'h5000, 7'd7);
    #1 check("6 fall-through redirect", redir_v && redir_pc == 32'h1504 && redir_mask == 4'b0100);

    // 7. non-branch instruction, way known (entry 3 -> way 3)
    cmt = '0;
    cmt.tag.lk = 1; cmt.tag.lk_pc = 32'h1808; cmt.tag.pred_next = 32'h1820; cmt.tag.wq_ptr = 7'd3;
    #1;
    check("7 non-branch direct", btb_wr_en && !redir_v && !bp_up_en && !btb_wr.is_br
          && btb_wr.pc == 32'h1808 && btb_wr.fwp == '{1'b1, 2'd3} && !btb_wr.twp.v);

    // 8. BURQ full: commit held
    bq_full = 1; bq_head_v = 1; bq_head.wait_ptr = 7'd40;
    cmt = branch(32'h1300, 1, 32'h5000, '0, '0, 0, 1, 32'h5000, 7'd7);
    #1 check("8 held", !cmt_ready && !redir_v && !bq_enq && !btb_wr_en && !bp_up_en);
    bq_full = 0; bq_head_v = 0;

    // 9. block that did not look the BTB up
    cmt = '0;
    #1 check("9 ignored", !bq_enq && !btb_wr_en && !redir_v && !bp_up_en);
    cmt_v = 0;
    @(negedge clk);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
