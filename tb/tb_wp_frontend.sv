// tb_wp_frontend: end-to-end test of the way-predicting fetch front end at
// its full default size (64 KB I-cache, 2K-entry BTB, 4K-entry predictors).
//
// The testbench plays the processor core and the next memory level.
//   * Program: a synthetic MIPS-like instruction stream computed from the
//     address.  Code lives in NREG regions placed 16 KB apart, so that lines
//     at the same offset in different regions share an I-cache set (six
//     lines for four ways): lines get evicted and come back in other ways,
//     which makes way predictions go stale.  Branches are loops, biased
//     forward branches and jumps between regions; the last word of a
//     region always jumps to the next region.  Instruction words that are
//     not branches never decode as control transfers.
//   * Core: keeps fetched blocks in a 16-entry fetch queue and commits the
//     oldest one at most once per cycle, no earlier than COMMIT_DELAY cycles
//     after it arrived and not in cycles it randomly pauses.  It resolves
//     each branch (random direction with the branch's bias), checks that
//     every committed block starts at the correct address, holds the right
//     instruction words and ends at the first branch or at the line end,
//     and checks that the front end redirects exactly on mispredictions.
//     A misprediction flushes the fetch queue.  stall is raised when the
//     queue is nearly full.
//   * Memory: answers each refill request after L2_LAT cycles.
// The program runs under each BTB organisation in turn (BASE, SHARE, 1_3,
// 2_2, 3_1) without reset; for each the testbench prints the BTB hit rates
// for branch and non-branch lookups, the share of fetches that enabled one
// I-cache data way, and the average number of data and BTB ways enabled.
// Every mechanism of the design must occur at least once: one-way fetch,
// wrong way and re-read, cache miss and refill, misprediction redirect
// (also one with a single way), deferred update through the BURQ, immediate
// update, non-branch lookup hit, fetch stall and each organisation.
module tb_wp_frontend;
  import wpb_pkg::*;

  localparam int    NREG         = 6;
  localparam addr_t REG_STRIDE   = 32'h4000;
  localparam addr_t REG_SIZE     = 32'h600;
  localparam int    BLOCKS_PER   = 6000;
  localparam int    COMMIT_DELAY = 6;
  localparam int    L2_LAT       = 20;
  localparam int    FQ_SIZE      = 16;

  logic     clk = 0, rst_n = 0;
  btb_cfg_e cfg;
  logic     stall;
  logic     blk_v;
  addr_t    blk_pc;
  logic [OFS_W:0] blk_n;
  insn_t    blk_insn [LINE_WORDS];
  ftag_t    blk_tag;
  logic     cmt_v, cmt_ready;
  commit_t  cmt;
  logic     mem_req, mem_rsp_v;
  addr_t    mem_addr;
  line_t    mem_rsp_data;
  logic     ev_fetch, ev_way_miss, ev_cache_miss, ev_mispredict;
  logic     ev_burq_enq, ev_direct_wr, ev_btb_wr;
  icmask_t  ev_fetch_ways;
  btbmask_t ev_btb_ways;
  logic [$clog2(BURQ_DEPTH+1)-1:0] ev_burq_count;

  wp_frontend dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- program
  function automatic int unsigned hsh(addr_t a);
    int unsigned x;
    x = a * 32'h9E37_79B1;
    x = x ^ (x >> 15);
    x = x * 32'h85EB_CA6B;
    return x ^ (x >> 13);
  endfunction

  function automatic int region_of(addr_t a);
    return int'(a / REG_STRIDE);
  endfunction
  function automatic addr_t reg_base(int r);
    return addr_t'(r) * REG_STRIDE;
  endfunction
  function automatic logic in_code(addr_t a);
    return region_of(a) < NREG && (a % REG_STRIDE) < REG_SIZE;
  endfunction

  // static branch description: 0 none, else kind; target and bias
  function automatic int br_kind(addr_t a);
    int unsigned h;
    if (!in_code(a)) return 0;
    if ((a % REG_STRIDE) == REG_SIZE - 4) return 9;      // region exit
    h = hsh(a);
    if (h % 8 != 0) return 0;
    return 1 + int'((h >> 8) % 8);
  endfunction

  function automatic addr_t br_target(addr_t a);
    int unsigned h;
    int k;
    addr_t base, t;
    h = hsh(a);
    k = br_kind(a);
    base = reg_base(region_of(a));
    if (k == 9) return reg_base((region_of(a) + 1) % NREG);
    if (k == 1) begin                                 // loop back
      t = a - 4 * (1 + (h >> 12) % 24);
      return (t < base || t > a) ? base : t;
    end
    if (k == 2 || k == 3) begin                       // jump to another region
      return reg_base((region_of(a) + 1 + int'((h >> 12) % (NREG - 1))) % NREG)
             + 4 * ((h >> 16) % (REG_SIZE / 4 - 1));
    end
    t = a + 4 * (1 + (h >> 12) % 16);                 // forward skip
    return (t >= base + REG_SIZE) ? base + REG_SIZE - 4 : t;
  endfunction

  function automatic int br_bias(addr_t a);          // taken percentage
    int k = br_kind(a);
    if (k == 9) return 100;
    if (k == 1) return 80;
    if (k == 2 || k == 3) return 50;
    return (((hsh(a) >> 20) % 2) != 0) ? 90 : 10;
  endfunction

  function automatic insn_t insn_at(addr_t a);
    int unsigned h = hsh(a ^ 32'h1234_5678);
    if (br_kind(a) != 0) return {6'd4, 26'(h)};       // beq
    return {6'd8 + 6'(h % 8), 26'(h >> 6)};           // ALU / load / store opcodes 8..15
  endfunction

  function automatic line_t line_at(addr_t a);
    line_t l;
    addr_t b = line_base(a);
    for (int k = 0; k < LINE_WORDS; k++) l[32*k +: 32] = insn_at(b + addr_t'(4 * k));
    return l;
  endfunction

  // ---------------------------------------------------------------- state
  typedef struct {
    addr_t   pc;
    int      n;
    insn_t   w [LINE_WORDS];
    ftag_t   tag;
    longint  t_in;
  } blk_s;

  blk_s   fq [$];
  longint cyc = 0;
  addr_t  exp_pc;
  int     committed_blocks = 0;
  longint committed_insns = 0;
  int     phase_blocks = 0;
  int     mem_due = -1;
  addr_t  mem_pend;

  // event counters (whole run) and per-organisation statistics
  int n_onehot, n_allway, n_waymiss, n_miss, n_mispred, n_redir1, n_burq, n_direct;
  int n_nb_hit, n_stall, n_held;
  int s_fetch, s_waymiss, s_onehot, s_dways, s_btbways, s_btblk;
  int s_br_lk, s_br_hit, s_nb_lk, s_nb_hit;
  int cfg_runs [5];

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- core
  task automatic print_phase(btb_cfg_e c);
    $display("cfg %-9s wrong way %4.1f%%  branch hit %5.1f%%  non-branch hit %5.1f%%  one-way fetches %5.1f%%  data ways/fetch %4.2f  BTB ways/lookup %4.2f",
             c.name(), 100.0 * s_waymiss / (s_fetch > 0 ? s_fetch : 1),
             100.0 * s_br_hit / (s_br_lk > 0 ? s_br_lk : 1),
             100.0 * s_nb_hit / (s_nb_lk > 0 ? s_nb_lk : 1),
             100.0 * s_onehot / (s_fetch > 0 ? s_fetch : 1),
             real'(s_dways) / (s_fetch > 0 ? s_fetch : 1),
             real'(s_btbways) / (s_btblk > 0 ? s_btblk : 1));
  endtask

  function automatic void clear_phase();
    s_fetch = 0; s_waymiss = 0; s_onehot = 0; s_dways = 0; s_btbways = 0; s_btblk = 0;
    s_br_lk = 0; s_br_hit = 0; s_nb_lk = 0; s_nb_hit = 0;
  endfunction

  btb_cfg_e cfgs [5] = '{CFG_BASE, CFG_SHARE, CFG_P1_3, CFG_P2_2, CFG_P3_1};

  initial begin : core
    blk_s   b;
    addr_t  actual_next, last_pc;
    logic   has_br, taken, exp_mis;
    int     ci;
    cfg = CFG_BASE; stall = 0; cmt_v = 0; cmt = '0; mem_rsp_v = 0; mem_rsp_data = '0;
    clear_phase();
    exp_pc = 32'h0;
    ci = 0;
    cfg_runs[0] = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    while (ci < 5) begin
      // ------------- drive inputs for this cycle
      cyc++;
      mem_rsp_v = 0;
      if (mem_due >= 0 && cyc >= longint'(mem_due)) begin
        mem_rsp_v = 1;
        mem_rsp_data = line_at(mem_pend);
        mem_due = -1;
      end
      stall = fq.size() >= FQ_SIZE - 2;
      cmt_v = 0;
      exp_mis = 0;
      actual_next = '0;
      if (fq.size() > 0 && cyc - fq[0].t_in >= longint'(COMMIT_DELAY) && $urandom_range(0, 99) >= 15) begin
        b = fq[0];
        // resolve the block
        last_pc = b.pc + addr_t'(4 * (b.n - 1));
        has_br  = br_kind(last_pc) != 0;
        taken   = has_br && ($urandom_range(0, 99) < br_bias(last_pc));
        if (has_br) actual_next = taken ? br_target(last_pc) : last_pc + 4;
        else        actual_next = line_base(b.pc) + addr_t'(LINE_BYTES);
        exp_mis = has_br && (actual_next != b.tag.pred_next);
        cmt_v      = 1;
        cmt.tag    = b.tag;
        cmt.taken  = taken;
        cmt.target = has_br ? br_target(last_pc) : '0;
      end
      #1;
      // ------------- sample outputs
      if (ev_fetch) begin
        s_fetch++;
        s_dways += $countones(ev_fetch_ways);
        if ($countones(ev_fetch_ways) == 1) begin s_onehot++; n_onehot++; end
        else n_allway++;
      end
      if (ev_btb_ways != 0 || dut.btb_lk_en) begin
        s_btblk++;
        s_btbways += $countones(ev_btb_ways);
      end
      if (ev_way_miss) begin n_waymiss++; s_waymiss++; end
      if (ev_cache_miss) begin
        n_miss++;
        check("refill address", mem_req && mem_addr == line_base(mem_addr));
        check("one refill at a time", mem_due < 0);
        mem_due  = int'(cyc) + L2_LAT;
        mem_pend = mem_addr;
      end
      if (stall) n_stall++;
      if (ev_burq_enq) n_burq++;
      if (ev_direct_wr) n_direct++;
      if (cmt_v && !cmt_ready) n_held++;

      if (cmt_v && cmt_ready) begin
        void'(fq.pop_front());
        // block checks
        check($sformatf("block address %h (expected %h)", b.pc, exp_pc), b.pc == exp_pc);
        for (int k = 0; k < b.n; k++)
          check("instruction word", b.w[int'(b.pc[2 +: OFS_W]) + k] == insn_at(b.pc + addr_t'(4 * k)));
        for (int k = 0; k < b.n - 1; k++)
          check("no branch inside block", !is_ctrl(b.w[int'(b.pc[2 +: OFS_W]) + k]));
        check("block ends at branch or line end",
              has_br || line_base(last_pc + 4) != line_base(b.pc));
        check("lookup address", !b.tag.lk || b.tag.lk_pc == (has_br ? last_pc : b.pc));
        check("misprediction redirect", ev_mispredict == exp_mis && dut.redir_v == exp_mis);
        if (exp_mis) begin
          n_mispred++;
          check("redirect address", dut.redir_pc == actual_next);
          if ($countones(dut.redir_mask) == 1) n_redir1++;
          fq.delete();
        end
        if (b.tag.lk) begin
          if (b.tag.is_br) begin s_br_lk++; if (b.tag.hit) s_br_hit++; end
          else begin
            s_nb_lk++;
            if (b.tag.hit) begin s_nb_hit++; n_nb_hit++; end
          end
        end
        if (cfg == CFG_BASE) check("base: only branches look up", !b.tag.lk || b.tag.is_br);
        exp_pc = actual_next;
        committed_blocks++;
        committed_insns += longint'(b.n);
        phase_blocks++;
      end
      if (blk_v) begin
        blk_s nb;
        nb.pc = blk_pc; nb.n = int'(blk_n); nb.tag = blk_tag; nb.t_in = cyc;
        for (int k = 0; k < LINE_WORDS; k++) nb.w[k] = blk_insn[k];
        check("fetch queue never overflows", fq.size() < FQ_SIZE);
        fq.push_back(nb);
      end
      // ------------- change organisation
      if (phase_blocks >= BLOCKS_PER) begin
        print_phase(cfg);
        if (cfg == CFG_SHARE) begin
          check("share: most fetches enable one way", s_onehot * 2 > s_fetch);
          check("share: non-branch lookups hit", s_nb_hit * 2 > s_nb_lk);
          check("share: way predictions mostly right", s_waymiss * 5 < s_fetch);
        end
        if (cfg == CFG_BASE) check("base: no non-branch lookups", s_nb_lk == 0);
        phase_blocks = 0;
        clear_phase();
        ci++;
        if (ci < 5) begin
          cfg = cfgs[ci];
          cfg_runs[ci]++;
        end
      end
      @(negedge clk);
    end

    $display("blocks %0d, instructions %0d, cycles %0d", committed_blocks, committed_insns, cyc);
    $display("one-way fetches %0d, all-way fetches %0d, wrong way %0d, cache misses %0d",
             n_onehot, n_allway, n_waymiss, n_miss);
    $display("mispredictions %0d (one-way redirect %0d), BURQ requests %0d, immediate updates %0d",
             n_mispred, n_redir1, n_burq, n_direct);
    $display("non-branch hits %0d, fetch stall cycles %0d, commits held %0d",
             n_nb_hit, n_stall, n_held);
    check("mechanism: one-way fetch", n_onehot > 0);
    check("mechanism: all-way fetch", n_allway > 0);
    check("mechanism: wrong way re-read", n_waymiss > 0);
    check("mechanism: cache miss refill", n_miss > 0);
    check("mechanism: misprediction redirect", n_mispred > 0);
    check("mechanism: one-way redirect", n_redir1 > 0);
    check("mechanism: BURQ deferred update", n_burq > 0);
    check("mechanism: immediate update", n_direct > 0);
    check("mechanism: non-branch way prediction", n_nb_hit > 0);
    check("mechanism: fetch stall", n_stall > 0);
    for (int i = 0; i < 5; i++) check($sformatf("organisation %0d ran", i), cfg_runs[i] == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
