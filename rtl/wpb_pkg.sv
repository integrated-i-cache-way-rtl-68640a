// wpb_pkg: types and constants shared by the way-predicting BTB front end.
//
// The front end fetches one cache line (or the part of it up to and including
// the first control-transfer instruction) per access from a 4-way set
// associative instruction cache.  A way-predicting branch target buffer
// (WP-BTB) caches, next to each branch target, the I-cache way of the target
// line (twp) and of the fall-through line (fwp), so that the next fetch can
// enable a single data way.  Sizes follow the evaluated machine: 64 KB 4-way
// I-cache with 32-byte lines, 2K-entry 4-way BTB.  The Way Queue depth, the
// BTB update queue depth and the instruction encoding used by the predecoder
// are this design's own choices.
package wpb_pkg;

  // ---------------------------------------------------------------- address
  localparam int unsigned AW         = 32;   // byte address width
  localparam int unsigned LINE_BYTES = 32;   // I-cache block size
  localparam int unsigned LINE_WORDS = LINE_BYTES / 4;
  localparam int unsigned OFS_W      = $clog2(LINE_WORDS);

  typedef logic [AW-1:0]            addr_t;
  typedef logic [31:0]              insn_t;
  typedef logic [LINE_BYTES*8-1:0]  line_t;

  // ---------------------------------------------------------------- I-cache ways
  localparam int unsigned IC_WAYS  = 4;
  localparam int unsigned IC_WAY_W = $clog2(IC_WAYS);
  typedef logic [IC_WAY_W-1:0] icway_t;
  typedef logic [IC_WAYS-1:0]  icmask_t;

  // A way prediction: valid bit plus way number.
  typedef struct packed {
    logic   v;
    icway_t way;
  } wp_t;

  // ---------------------------------------------------------------- BTB
  localparam int unsigned BTB_WAYS  = 4;
  localparam int unsigned BTB_WAY_W = $clog2(BTB_WAYS);
  typedef logic [BTB_WAY_W-1:0] btbway_t;
  typedef logic [BTB_WAYS-1:0]  btbmask_t;

  // BTB organisation.  BASE: only branches access the BTB.  SHARE: branch and
  // non-branch accesses use all ways.  P1_3/P2_2/P3_1: the first 1/2/3 ways
  // are for branches, the remaining ways for non-branch accesses.
  typedef enum logic [2:0] {
    CFG_BASE  = 3'd0,
    CFG_SHARE = 3'd1,
    CFG_P1_3  = 3'd2,
    CFG_P2_2  = 3'd3,
    CFG_P3_1  = 3'd4
  } btb_cfg_e;

  // ---------------------------------------------------------------- Way Queue
  localparam int unsigned WQ_DEPTH = 64;
  localparam int unsigned WQ_IDX_W = $clog2(WQ_DEPTH);
  localparam int unsigned WQ_PTR_W = WQ_IDX_W + 1;   // index plus wrap bit
  typedef logic [WQ_PTR_W-1:0] wq_ptr_t;

  localparam int unsigned BURQ_DEPTH = 8;

  // ---------------------------------------------------------------- records
  // Information the front end attaches to each fetch block.  The core keeps
  // it with the block's branch (or first instruction) and hands it back at
  // commit.
  typedef struct packed {
    logic    lk;          // this block looked up the WP-BTB (wq_ptr valid)
    logic    is_br;       // the lookup was made by a branch
    addr_t   lk_pc;       // address used for the lookup
    logic    hit;         // WP-BTB hit
    addr_t   btb_target;  // target address from the hit entry
    wp_t     twp;         // target way prediction of the hit entry
    wp_t     fwp;         // fall-through way prediction of the hit entry
    logic    pred_taken;  // predicted direction (branches)
    addr_t   pred_next;   // predicted next fetch address
    wq_ptr_t wq_ptr;      // WQ entry that will hold the way of the next fetch
  } ftag_t;

  // Commit of a block's looked-up instruction, from the core.
  typedef struct packed {
    ftag_t tag;
    logic  taken;         // resolved direction (branches)
    addr_t target;        // resolved target address (branches)
  } commit_t;

  // Pending WP-BTB update, held in the BURQ.
  typedef struct packed {
    addr_t   pc;
    logic    is_br;
    logic    taken;
    addr_t   target;
    wp_t     twp_old;     // way predictions carried from fetch
    wp_t     fwp_old;
    logic    keep_twp;    // old twp still describes the (unchanged) target
    wq_ptr_t wait_ptr;    // WQ entry holding the way of the next fetch
  } upd_req_t;

  // Entry write into the WP-BTB.  The BTB picks the way itself.
  typedef struct packed {
    addr_t pc;
    logic  is_br;
    addr_t target;
    wp_t   twp;
    wp_t   fwp;
  } btb_wr_t;

  // ---------------------------------------------------------------- helpers
  // Predecode: MIPS-style control transfer classification.  Opcode 1 (REGIMM
  // branches), 2..7 (j, jal, beq, bne, blez, bgtz), or SPECIAL with function
  // 8/9 (jr, jalr).
  function automatic logic is_ctrl(insn_t w);
    logic [5:0] op;
    logic [5:0] fn;
    op = w[31:26];
    fn = w[5:0];
    return (op >= 6'd1 && op <= 6'd7) || (op == 6'd0 && (fn == 6'd8 || fn == 6'd9));
  endfunction

  // BTB ways a lookup or allocation may use.
  function automatic btbmask_t part_mask(btb_cfg_e cfg, logic is_br);
    btbmask_t m;
    int unsigned nb;
    case (cfg)
      CFG_P1_3: nb = 1;
      CFG_P2_2: nb = 2;
      CFG_P3_1: nb = 3;
      default:  nb = BTB_WAYS;
    endcase
    for (int unsigned w = 0; w < BTB_WAYS; w++)
      m[w] = (nb == BTB_WAYS) ? 1'b1 : (is_br ? (w < nb) : (w >= nb));
    if (cfg == CFG_BASE && !is_br) m = '0;
    return m;
  endfunction

  function automatic icmask_t way_onehot(icway_t w);
    return icmask_t'(1) << w;
  endfunction

  // I-cache ways to enable for a fetch, from a way prediction.
  function automatic icmask_t pred_mask(wp_t p);
    return p.v ? way_onehot(p.way) : '1;
  endfunction

  function automatic addr_t line_base(addr_t a);
    return {a[AW-1:$clog2(LINE_BYTES)], {$clog2(LINE_BYTES){1'b0}}};
  endfunction

endpackage
