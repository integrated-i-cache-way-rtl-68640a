// commit_update: WP-BTB update at instruction commit.
//
// The core hands back, one per cycle, the instruction of a fetch block that
// looked up the WP-BTB (the block's branch, or its first instruction when it
// has no branch), with the tag the fetch unit gave it and, for a branch, the
// resolved direction and target.  This unit
//   * trains the direction predictor with branch outcomes;
//   * detects a misprediction (resolved next address differs from the one
//     fetch followed) and redirects fetch to the correct address, enabling
//     one I-cache way when the entry already predicts the way of that line
//     (fwp for a not-taken branch, twp for a taken branch whose target is
//     unchanged), all ways otherwise;
//   * forms the WP-BTB update: the way of the line that followed the
//     instruction goes into twp (taken branch) or fwp (not-taken branch,
//     non-branch instruction); the other way prediction is carried over from
//     the fetch-time lookup.  The way is read from the Way Queue at the
//     instruction's wq_ptr, or, after a misprediction, at the entry the
//     redirected fetch will fill;
//   * writes the WP-BTB at once when that way is already in the WQ and no
//     older request waits, and otherwise queues the request in the BTB
//     Update Request Queue (BURQ).  The BURQ head is written as soon as its
//     WQ entry is filled.
//
// Interface and timing: all decisions are combinational on the commit input
// and take effect at the next clock edge.  cmt_ready is low while the BURQ
// is full; the core then holds the commit.  (It depends on the queue's
// state only, not on this cycle's Way Queue contents, so that the redirect
// to fetch is free of combinational loops.)  Every
// looked-up instruction writes its entry (allocation on a miss, refresh on a
// hit); that the commit stage rewrites hits as well as misses, and the
// one-per-cycle commit port, are this design's choices.
module commit_update
  import wpb_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  // commit port
  input  logic     cmt_v,
  input  commit_t  cmt,
  output logic     cmt_ready,
  // redirect to fetch
  output logic     redir_v,
  output addr_t    redir_pc,
  output icmask_t  redir_mask,
  // Way Queue reads (0: this commit, 1: BURQ head) and tail
  output wq_ptr_t  wq_rd_ptr [2],
  input  logic     wq_rd_valid [2],
  input  icway_t   wq_rd_way [2],
  input  wq_ptr_t  wq_tail,
  // BURQ
  output logic     bq_enq,
  output upd_req_t bq_enq_req,
  input  logic     bq_full,
  input  logic     bq_head_v,
  input  upd_req_t bq_head,
  output logic     bq_deq,
  // WP-BTB write port
  output logic     btb_wr_en,
  output btb_wr_t  btb_wr,
  // direction predictor training
  output logic     bp_up_en,
  output addr_t    bp_up_pc,
  output logic     bp_up_taken,
  // events
  output logic     ev_mispredict,
  output logic     ev_direct_wr
);

  function automatic btb_wr_t make_wr(upd_req_t r, icway_t way);
    btb_wr_t e;
    e.pc     = r.pc;
    e.is_br  = r.is_br;
    e.target = r.is_br ? r.target : '0;
    if (r.is_br && r.taken) begin
      e.twp = '{v: 1'b1, way: way};
      e.fwp = r.fwp_old;
    end else begin
      e.twp = (r.is_br && r.keep_twp) ? r.twp_old : '0;
      e.fwp = '{v: 1'b1, way: way};
    end
    return e;
  endfunction

  logic     rel;        // commit that concerns the WP-BTB
  addr_t    actual_next;
  logic     mispred;
  upd_req_t req;
  logic     direct;
  logic     need_enq;
  logic     head_rdy;

  always_comb begin
    rel = cmt_v && cmt.tag.lk;
    if (cmt.tag.is_br)
      actual_next = cmt.taken ? cmt.target : cmt.tag.lk_pc + 32'd4;
    else
      actual_next = line_base(cmt.tag.lk_pc) + addr_t'(LINE_BYTES);
    mispred = rel && cmt.tag.is_br && (actual_next != cmt.tag.pred_next);

    req.pc       = cmt.tag.lk_pc;
    req.is_br    = cmt.tag.is_br;
    req.taken    = cmt.taken;
    req.target   = cmt.target;
    req.twp_old  = cmt.tag.hit ? cmt.tag.twp : '0;
    req.fwp_old  = cmt.tag.hit ? cmt.tag.fwp : '0;
    req.keep_twp = cmt.tag.hit && cmt.tag.btb_target == cmt.target;
    req.wait_ptr = mispred ? wq_tail : cmt.tag.wq_ptr;

    wq_rd_ptr[0] = req.wait_ptr;
    wq_rd_ptr[1] = bq_head.wait_ptr;

    cmt_ready = !bq_full;
    redir_v  = mispred && cmt_ready;
    redir_pc = actual_next;
    if (cmt.taken)
      redir_mask = req.keep_twp ? pred_mask(cmt.tag.twp) : '1;
    else
      redir_mask = cmt.tag.hit ? pred_mask(cmt.tag.fwp) : '1;
  end

  // decisions that depend on the Way Queue contents
  always_comb begin
    head_rdy  = bq_head_v && wq_rd_valid[1];
    direct    = rel && !bq_head_v && !mispred && wq_rd_valid[0];
    need_enq  = rel && !direct;

    bq_enq     = need_enq && cmt_ready;
    bq_enq_req = req;
    bq_deq     = head_rdy;

    btb_wr_en = head_rdy || (direct && cmt_ready);
    btb_wr    = head_rdy ? make_wr(bq_head, wq_rd_way[1]) : make_wr(req, wq_rd_way[0]);

    bp_up_en    = rel && cmt.tag.is_br && cmt_ready;
    bp_up_pc    = cmt.tag.lk_pc;
    bp_up_taken = cmt.taken;

    ev_mispredict = mispred && cmt_ready;
    ev_direct_wr  = direct && cmt_ready;
  end

  // a redirect is only issued for a commit that is accepted
  a_redir_accepted: assert property (@(posedge clk) disable iff (!rst_n)
                                     redir_v |-> cmt_ready);

endmodule
