// wp_frontend: instruction fetch front end with a way-predicting BTB.
//
// The front end of an out-of-order processor whose branch target buffer
// also predicts, for the next fetch, which way of the 4-way instruction
// cache holds the line, so that only one data way is read.  It holds
//   * icache        - 64 KB, 4-way, 32 B lines, per-way data enables;
//   * wp_btb        - 2K-entry, 4-way BTB with target (twp) and fall-through
//                     (fwp) way predictions, optionally partitioned into
//                     branch ways and non-branch ways (input cfg);
//   * dir_pred      - combined bimodal / global-history direction predictor;
//   * way_queue     - Way Queue (WQ) of the hit way of every finished fetch;
//   * burq          - BTB Update Request Queue for updates whose way is not
//                     yet known;
//   * fetch_unit    - fetch control, predecode, next address and way choice;
//   * commit_update - WP-BTB update and misprediction redirect at commit.
//
// Interface: fetch blocks leave on blk_* (one per cycle at most, never
// back-pressured; the core raises stall to stop new accesses).  Each block
// carries an ftag_t that the core returns on cmt_* when the block's branch,
// or its first instruction, commits (at most one per cycle, held while
// cmt_ready is low).  A committed misprediction redirects fetch.  Cache
// misses are served over mem_req/mem_addr -> mem_rsp_v/mem_rsp_data (one
// request outstanding, any latency).  cfg selects the BTB organisation:
// BASE, SHARE, or the 1/3, 2/2 and 3/1 branch/non-branch way partitions; it
// is meant to be set per application and held while running.  The ev_*
// outputs pulse for events of interest (way-predicted fetch, wrong way, cache
// miss, BURQ use, misprediction) and support energy accounting.  rst_n is
// an asynchronous reset; the sub-blocks' assertions also use it as their
// disable condition, which lint reports as use both ways.
module wp_frontend
  import wpb_pkg::*;
#(
  parameter int unsigned IC_SIZE     = 65536,
  parameter int unsigned BTB_ENTRIES = 2048,
  parameter int unsigned BP_ENTRIES  = 4096,
  parameter int unsigned BP_HIST     = 12,
  parameter addr_t       RESET_PC    = '0
) (
  input  logic     clk,
  input  logic     rst_n,
  input  btb_cfg_e cfg,
  input  logic     stall,
  // fetch blocks
  output logic     blk_v,
  output addr_t    blk_pc,
  output logic [OFS_W:0] blk_n,
  output insn_t    blk_insn [LINE_WORDS],
  output ftag_t    blk_tag,
  // commit
  input  logic     cmt_v,
  input  commit_t  cmt,
  output logic     cmt_ready,
  // refill
  output logic     mem_req,
  output addr_t    mem_addr,
  input  logic     mem_rsp_v,
  input  line_t    mem_rsp_data,
  // events
  output logic     ev_fetch,        // an I-cache read was issued
  output icmask_t  ev_fetch_ways,   // ... with these data ways enabled
  output btbmask_t ev_btb_ways,     // BTB ways enabled by this cycle's lookup
  output logic     ev_way_miss,
  output logic     ev_cache_miss,
  output logic     ev_mispredict,
  output logic     ev_burq_enq,
  output logic     ev_direct_wr,
  output logic     ev_btb_wr,
  output logic [$clog2(BURQ_DEPTH+1)-1:0] ev_burq_count   // requests waiting in the BURQ
);

  // I-cache
  logic    ic_rd_en, ic_rsp_v, ic_hit, ic_hit_en, ic_fill_en;
  addr_t   ic_rd_addr, ic_rsp_addr, ic_fill_addr;
  icmask_t ic_rd_mask;
  icway_t  ic_hit_way;
  line_t   ic_data, ic_fill_data;
  // BTB
  logic    btb_lk_en, btb_lk_is_br, btb_hit, btb_wr_en;
  addr_t   btb_lk_pc, btb_target;
  wp_t     btb_twp, btb_fwp;
  btb_wr_t btb_wr;
  // direction predictor
  addr_t   bp_pc, bp_up_pc;
  logic    bp_taken, bp_up_en, bp_up_taken;
  // WQ
  logic    wq_push;
  icway_t  wq_push_way;
  wq_ptr_t wq_tail;
  wq_ptr_t wq_rd_ptr   [2];
  logic    wq_rd_valid [2];
  icway_t  wq_rd_way   [2];
  // BURQ
  logic     bq_enq, bq_full, bq_head_v, bq_deq;
  upd_req_t bq_enq_req, bq_head;
  // redirect
  logic    redir_v;
  addr_t   redir_pc;
  icmask_t redir_mask;

  icache #(.SIZE_BYTES(IC_SIZE)) u_icache (
    .clk, .rst_n,
    .rd_en(ic_rd_en), .rd_addr(ic_rd_addr), .rd_mask(ic_rd_mask),
    .rsp_v(ic_rsp_v), .rsp_addr(ic_rsp_addr), .hit(ic_hit), .hit_way(ic_hit_way),
    .hit_en(ic_hit_en), .data(ic_data),
    .fill_en(ic_fill_en), .fill_addr(ic_fill_addr), .fill_data(ic_fill_data),
    .fill_way()
  );

  wp_btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n, .cfg,
    .lk_en(btb_lk_en), .lk_pc(btb_lk_pc), .lk_is_br(btb_lk_is_br),
    .lk_hit(btb_hit), .lk_way(), .lk_target(btb_target),
    .lk_twp(btb_twp), .lk_fwp(btb_fwp), .lk_ways(ev_btb_ways),
    .wr_en(btb_wr_en), .wr(btb_wr), .wr_way()
  );

  dir_pred #(.BIM_ENTRIES(BP_ENTRIES), .CHO_ENTRIES(BP_ENTRIES), .HIST_BITS(BP_HIST)) u_bp (
    .clk, .rst_n,
    .lk_pc(bp_pc), .lk_taken(bp_taken),
    .up_en(bp_up_en), .up_pc(bp_up_pc), .up_taken(bp_up_taken)
  );

  way_queue #(.NRD(2)) u_wq (
    .clk, .rst_n,
    .push(wq_push), .push_way(wq_push_way), .tail(wq_tail),
    .rd_ptr(wq_rd_ptr), .rd_valid(wq_rd_valid), .rd_way(wq_rd_way)
  );

  burq u_burq (
    .clk, .rst_n,
    .enq(bq_enq), .enq_req(bq_enq_req), .full(bq_full),
    .head_v(bq_head_v), .head(bq_head), .deq(bq_deq), .count(ev_burq_count)
  );

  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n, .cfg, .stall,
    .redir_v, .redir_pc, .redir_mask,
    .ic_rd_en, .ic_rd_addr, .ic_rd_mask,
    .ic_rsp_v, .ic_rsp_addr, .ic_hit, .ic_hit_way, .ic_hit_en, .ic_data,
    .ic_fill_en, .ic_fill_addr, .ic_fill_data,
    .mem_req, .mem_addr, .mem_rsp_v, .mem_rsp_data,
    .btb_lk_en, .btb_lk_pc, .btb_lk_is_br, .btb_hit, .btb_target, .btb_twp, .btb_fwp,
    .bp_pc, .bp_taken,
    .wq_push, .wq_push_way, .wq_tail,
    .blk_v, .blk_pc, .blk_n, .blk_insn, .blk_tag,
    .ev_way_miss, .ev_cache_miss
  );

  commit_update u_commit (
    .clk, .rst_n,
    .cmt_v, .cmt, .cmt_ready,
    .redir_v, .redir_pc, .redir_mask,
    .wq_rd_ptr, .wq_rd_valid, .wq_rd_way, .wq_tail,
    .bq_enq, .bq_enq_req, .bq_full, .bq_head_v, .bq_head, .bq_deq,
    .btb_wr_en, .btb_wr,
    .bp_up_en, .bp_up_pc, .bp_up_taken,
    .ev_mispredict, .ev_direct_wr
  );

  assign ev_fetch      = ic_rd_en;
  assign ev_fetch_ways = ic_rd_en ? ic_rd_mask : '0;
  assign ev_burq_enq   = bq_enq;
  assign ev_btb_wr     = btb_wr_en;

endmodule
