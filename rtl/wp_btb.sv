// wp_btb: way-predicting branch target buffer (WP-BTB).
//
// A set-associative BTB whose entries hold (address tag, target address, LRU
// age, twp, fwp).  twp is the I-cache way of the line holding the target
// address, fwp the I-cache way of the line holding the fall-through address.
// A branch looks the BTB up with its own address; when there is no branch in
// a fetch block, the block's first instruction looks it up (non-branch
// access) to find fwp for the next sequential line.
//
// Partitioning: the input cfg selects which ways a branch or a non-branch
// access may read and allocate (see wpb_pkg::part_mask).  Only those ways are
// enabled, which is what lowers the energy per access; lk_ways reports them.
//
// Interface and timing:
//   * Lookup (lk_en, lk_pc, lk_is_br) is combinational: hit, target and way
//     predictions are valid in the same cycle.
//   * Write (wr_en, wr) takes effect at the clock edge.  The BTB first looks
//     for an entry with the same address in the allowed ways and overwrites
//     it; otherwise it allocates an invalid way or the least recently used
//     one of the allowed ways.  The written way becomes most recently used.
//   * Replacement state is true LRU kept as per-way ages (0 = most recent).
// LRU is updated on writes only (every committed lookup instruction writes
// its entry), which is this design's choice; the entry format, the way
// predictions and the partitioning follow the WP-BTB organisation.
module wp_btb
  import wpb_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned WAYS    = BTB_WAYS
) (
  input  logic     clk,
  input  logic     rst_n,
  input  btb_cfg_e cfg,
  // lookup
  input  logic     lk_en,
  input  addr_t    lk_pc,
  input  logic     lk_is_br,
  output logic     lk_hit,
  output btbway_t  lk_way,
  output addr_t    lk_target,
  output wp_t      lk_twp,
  output wp_t      lk_fwp,
  output btbmask_t lk_ways,     // ways enabled by this lookup
  // write
  input  logic     wr_en,
  input  btb_wr_t  wr,
  output btbway_t  wr_way       // way chosen for the write (for observation)
);

  localparam int unsigned SETS  = ENTRIES / WAYS;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned TAG_W = AW - 2 - IDX_W;
  localparam int unsigned AGE_W = $clog2(WAYS);

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [AGE_W-1:0] age_t;

  logic          valid_q [SETS][WAYS];
  age_t          age_q   [SETS][WAYS];
  tag_t          tag_m   [WAYS][SETS];
  logic [AW-3:0] tgt_m   [WAYS][SETS];
  wp_t           twp_m   [WAYS][SETS];
  wp_t           fwp_m   [WAYS][SETS];

  function automatic idx_t idx_of(addr_t a);
    return a[2 +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[AW-1 -: TAG_W];
  endfunction

  // ------------------------------------------------------------ lookup
  always_comb begin
    idx_t i;
    i         = idx_of(lk_pc);
    lk_ways   = lk_en ? part_mask(cfg, lk_is_br) : '0;
    lk_hit    = 1'b0;
    lk_way    = '0;
    lk_target = '0;
    lk_twp    = '0;
    lk_fwp    = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (lk_ways[w] && valid_q[i][w] && tag_m[w][i] == tag_of(lk_pc) && !lk_hit) begin
        lk_hit    = 1'b1;
        lk_way    = btbway_t'(w);
        lk_target = {tgt_m[w][i], 2'b00};
        lk_twp    = twp_m[w][i];
        lk_fwp    = fwp_m[w][i];
      end
    end
  end

  // ------------------------------------------------------------ write way
  btbmask_t wmask;
  logic     wmatch;
  always_comb begin
    idx_t i;
    logic found_inv;
    age_t best_age;
    i         = idx_of(wr.pc);
    wmask     = part_mask(cfg, wr.is_br);
    wmatch    = 1'b0;
    found_inv = 1'b0;
    best_age  = '0;
    wr_way    = '0;
    // existing entry for the same address
    for (int w = 0; w < WAYS; w++) begin
      if (wmask[w] && valid_q[i][w] && tag_m[w][i] == tag_of(wr.pc) && !wmatch) begin
        wmatch = 1'b1;
        wr_way = btbway_t'(w);
      end
    end
    if (!wmatch) begin
      // first invalid allowed way, else the oldest allowed way
      for (int w = 0; w < WAYS; w++) begin
        if (wmask[w] && !valid_q[i][w] && !found_inv) begin
          found_inv = 1'b1;
          wr_way    = btbway_t'(w);
        end
      end
      if (!found_inv) begin
        for (int w = 0; w < WAYS; w++) begin
          if (wmask[w] && age_q[i][w] >= best_age) begin
            best_age = age_q[i][w];
            wr_way   = btbway_t'(w);
          end
        end
      end
    end
  end

  wire do_wr = wr_en && (wmask != '0);

  // ------------------------------------------------------------ state
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          age_q[s][w]   <= age_t'(w);
        end
    end else if (do_wr) begin
      valid_q[idx_of(wr.pc)][wr_way] <= 1'b1;
      for (int w = 0; w < WAYS; w++) begin
        if (btbway_t'(w) == wr_way)
          age_q[idx_of(wr.pc)][w] <= '0;
        else if (age_q[idx_of(wr.pc)][w] < age_q[idx_of(wr.pc)][wr_way])
          age_q[idx_of(wr.pc)][w] <= age_q[idx_of(wr.pc)][w] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) begin
      tag_m[wr_way][idx_of(wr.pc)] <= tag_of(wr.pc);
      tgt_m[wr_way][idx_of(wr.pc)] <= wr.target[AW-1:2];
      twp_m[wr_way][idx_of(wr.pc)] <= wr.twp;
      fwp_m[wr_way][idx_of(wr.pc)] <= wr.fwp;
    end
  end

endmodule
