// fetch_unit: instruction fetch control of the way-predicting front end.
//
// Each access reads one I-cache line, starting at the fetch address, with
// the data ways chosen by the way prediction for that fetch (one way when a
// prediction exists, all ways otherwise).  When the access finishes:
//   1. the hit way is pushed into the Way Queue (WQ);
//   2. the fetched words are predecoded; the fetch block ends at the first
//      control-transfer instruction or at the end of the line;
//   3. the WP-BTB is looked up with the branch address, or - if the block
//      holds no branch and the BTB organisation lets non-branch
//      instructions in - with the address of the block's first instruction;
//      the block's tag records wq_ptr = the next WQ entry, i.e. the entry
//      the following fetch will fill;
//   4. on a hit the next fetch enables only the predicted way (twp for a
//      predicted-taken branch, fwp for the fall-through line);
//   5. otherwise the next fetch enables all ways.
// The block, its words and its tag (ftag_t) go to the core on blk_*:
// blk_insn holds the whole line, word k at index k, and the block is the
// blk_n words starting at index blk_pc[4:2].
//
// Other cases: if the line is in a way that was not enabled (wrong way
// prediction) the same address is read again next cycle with that way only;
// on a cache miss the line is requested on mem_* and written into the cache
// when it returns, and the address is then read again with all ways.  A
// redirect from commit (misprediction) drops the access in flight and
// restarts fetch at redir_pc with the ways in redir_mask.  After reset
// fetch starts at RESET_PC with all ways enabled.  stall holds back
// new accesses; an access already in flight still delivers its block.
//
// Timing: the I-cache responds one cycle after an access; the BTB, the
// direction predictor and the next-address choice are combinational on that
// response and start the next access in the same cycle, so a run of hits
// delivers one block per cycle.  Steps 1-5 follow the WP-BTB fetch flow; the
// block boundaries, the re-read on a wrong way, and the refill handshake
// are this design's choices.  rst_n resets the state asynchronously and
// also disables the refill assertion; the lint note that it is used both
// ways refers to that assertion only.
module fetch_unit
  import wpb_pkg::*;
#(
  parameter addr_t RESET_PC = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  btb_cfg_e cfg,
  input  logic     stall,
  // redirect from commit
  input  logic     redir_v,
  input  addr_t    redir_pc,
  input  icmask_t  redir_mask,
  // I-cache
  output logic     ic_rd_en,
  output addr_t    ic_rd_addr,
  output icmask_t  ic_rd_mask,
  input  logic     ic_rsp_v,
  input  addr_t    ic_rsp_addr,
  input  logic     ic_hit,
  input  icway_t   ic_hit_way,
  input  logic     ic_hit_en,
  input  line_t    ic_data,
  output logic     ic_fill_en,
  output addr_t    ic_fill_addr,
  output line_t    ic_fill_data,
  // next level memory (refill)
  output logic     mem_req,
  output addr_t    mem_addr,
  input  logic     mem_rsp_v,
  input  line_t    mem_rsp_data,
  // WP-BTB lookup
  output logic     btb_lk_en,
  output addr_t    btb_lk_pc,
  output logic     btb_lk_is_br,
  input  logic     btb_hit,
  input  addr_t    btb_target,
  input  wp_t      btb_twp,
  input  wp_t      btb_fwp,
  // direction predictor
  output addr_t    bp_pc,
  input  logic     bp_taken,
  // Way Queue
  output logic     wq_push,
  output icway_t   wq_push_way,
  input  wq_ptr_t  wq_tail,
  // fetch blocks to the core
  output logic     blk_v,
  output addr_t    blk_pc,
  output logic [OFS_W:0] blk_n,
  output insn_t    blk_insn [LINE_WORDS],
  output ftag_t    blk_tag,
  // events
  output logic     ev_way_miss,
  output logic     ev_cache_miss
);

  // pending access (address and ways of the next read)
  logic    pend_v_q;
  addr_t   pend_pc_q;
  icmask_t pend_mask_q;
  // outstanding refill
  logic    rf_busy_q;
  addr_t   rf_addr_q;

  // ------------------------------------------------------------ predecode
  logic               br_found;
  logic [OFS_W-1:0]   br_k;
  logic [OFS_W-1:0]   ofs;
  addr_t              br_pc;
  always_comb begin
    ofs      = ic_rsp_addr[2 +: OFS_W];
    br_found = 1'b0;
    br_k     = '0;
    for (int k = 0; k < LINE_WORDS; k++) begin
      blk_insn[k] = ic_data[32*k +: 32];
      if (k >= int'(ofs) && !br_found && is_ctrl(ic_data[32*k +: 32])) begin
        br_found = 1'b1;
        br_k     = OFS_W'(k);
      end
    end
    br_pc = line_base(ic_rsp_addr) + addr_t'({br_k, 2'b00});
  end

  // ------------------------------------------------------------ finish
  logic    finish;     // block delivered this cycle
  addr_t   nxt_pc;
  icmask_t nxt_mask;
  logic    nxt_v;
  logic    rf_start;
  // lookup request (depends on the cache response only)
  always_comb begin
    finish        = ic_rsp_v && ic_hit_en && !redir_v;
    ev_way_miss   = ic_rsp_v && ic_hit && !ic_hit_en && !redir_v;
    ev_cache_miss = ic_rsp_v && !ic_hit && !redir_v;
    rf_start      = ev_cache_miss;
    btb_lk_is_br  = br_found;
    btb_lk_pc     = br_found ? br_pc : ic_rsp_addr;
    btb_lk_en     = finish && (br_found || cfg != CFG_BASE);
    bp_pc         = br_pc;
  end

  // block, next address and ways (uses the lookup result)
  always_comb begin

    blk_v   = finish;
    blk_pc  = ic_rsp_addr;
    blk_n   = br_found ? (OFS_W+1)'(br_k - ofs) + 1'b1
                       : (OFS_W+1)'(LINE_WORDS) - (OFS_W+1)'(ofs);

    blk_tag            = '0;
    blk_tag.lk         = br_found || cfg != CFG_BASE;
    blk_tag.is_br      = br_found;
    blk_tag.lk_pc      = btb_lk_pc;
    blk_tag.hit        = btb_hit;
    blk_tag.btb_target = btb_target;
    blk_tag.twp        = btb_twp;
    blk_tag.fwp        = btb_fwp;
    blk_tag.wq_ptr     = wq_tail + 1'b1;

    wq_push     = finish;
    wq_push_way = ic_hit_way;

    // next access
    nxt_v    = pend_v_q;
    nxt_pc   = pend_pc_q;
    nxt_mask = pend_mask_q;
    if (finish) begin
      if (br_found && btb_hit && bp_taken) begin
        blk_tag.pred_taken = 1'b1;
        nxt_pc   = btb_target;
        nxt_mask = pred_mask(btb_twp);
      end else if (br_found) begin
        nxt_pc   = br_pc + 32'd4;
        nxt_mask = btb_hit ? pred_mask(btb_fwp) : '1;
      end else begin
        nxt_pc   = line_base(ic_rsp_addr) + addr_t'(LINE_BYTES);
        nxt_mask = btb_hit ? pred_mask(btb_fwp) : '1;
      end
      nxt_v = 1'b1;
    end else if (ev_way_miss) begin
      nxt_v    = 1'b1;
      nxt_pc   = ic_rsp_addr;
      nxt_mask = way_onehot(ic_hit_way);
    end else if (rf_start) begin
      nxt_v    = 1'b1;
      nxt_pc   = ic_rsp_addr;
      nxt_mask = '1;
    end
    blk_tag.pred_next = nxt_pc;
    if (redir_v) begin
      nxt_v    = 1'b1;
      nxt_pc   = redir_pc;
      nxt_mask = redir_mask;
    end

    ic_rd_en   = nxt_v && !stall && !rf_busy_q && !rf_start;
    ic_rd_addr = nxt_pc;
    ic_rd_mask = nxt_mask;

    mem_req      = rf_start;
    mem_addr     = line_base(ic_rsp_addr);
    ic_fill_en   = rf_busy_q && mem_rsp_v;
    ic_fill_addr = rf_addr_q;
    ic_fill_data = mem_rsp_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v_q    <= 1'b1;
      pend_pc_q   <= RESET_PC;
      pend_mask_q <= '1;
      rf_busy_q   <= 1'b0;
      rf_addr_q   <= '0;
    end else begin
      pend_v_q    <= nxt_v && !ic_rd_en;
      pend_pc_q   <= nxt_pc;
      pend_mask_q <= nxt_mask;
      if (rf_start) begin
        rf_busy_q <= 1'b1;
        rf_addr_q <= line_base(ic_rsp_addr);
      end else if (ic_fill_en) begin
        rf_busy_q <= 1'b0;
      end
    end
  end

  // a refill is only started when none is outstanding
  a_one_refill: assert property (@(posedge clk) disable iff (!rst_n)
                                 rf_start |-> !rf_busy_q);

endmodule
