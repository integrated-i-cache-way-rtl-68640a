// tb_fetch_unit: self-checking test of the fetch control.
// The testbench plays the I-cache, the WP-BTB, the direction predictor and
// the Way Queue, and walks the fetch unit through: reset fetch with all
// ways, a predicted-taken branch using twp, a wrong way prediction and its
// one-way re-read, a non-branch lookup, a cache miss and refill, a not-taken
// branch using fwp, a block starting in the middle of a line, the BASE
// organisation (no non-branch lookup), stall, and a redirect that drops the
// access in flight.
module tb_fetch_unit;
  import wpb_pkg::*;

  logic     clk = 0, rst_n = 0;
  btb_cfg_e cfg;
  logic     stall, redir_v;
  addr_t    redir_pc;
  icmask_t  redir_mask;
  logic     ic_rd_en, ic_rsp_v, ic_hit, ic_hit_en, ic_fill_en;
  addr_t    ic_rd_addr, ic_rsp_addr, ic_fill_addr;
  icmask_t  ic_rd_mask;
  icway_t   ic_hit_way;
  line_t    ic_data, ic_fill_data;
  logic     mem_req, mem_rsp_v;
  addr_t    mem_addr;
  line_t    mem_rsp_data;
  logic     btb_lk_en, btb_lk_is_br, btb_hit;
  addr_t    btb_lk_pc, btb_target;
  wp_t      btb_twp, btb_fwp;
  addr_t    bp_pc;
  logic     bp_taken;
  logic     wq_push;
  icway_t   wq_push_way;
  wq_ptr_t  wq_tail;
  logic     blk_v;
  addr_t    blk_pc;
  logic [OFS_W:0] blk_n;
  insn_t    blk_insn [LINE_WORDS];
  ftag_t    blk_tag;
  logic     ev_way_miss, ev_cache_miss;
  int       checks = 0, failures = 0;

  fetch_unit #(.RESET_PC(32'h0)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam insn_t NOP = 32'h0000_0000;
  localparam insn_t BEQ = {6'd4, 26'h0};

  function automatic line_t mkline(int br_at);   // br_at < 0: no branch
    line_t l;
    for (int k = 0; k < LINE_WORDS; k++) l[32*k +: 32] = (k == br_at) ? BEQ : NOP;
    return l;
  endfunction

  icmask_t sent_mask;
  addr_t   sent_addr;

  // advance one cycle, remembering what was read
  task automatic tick();
    sent_mask = ic_rd_mask;
    sent_addr = ic_rd_addr;
    @(negedge clk);
    ic_rsp_v = 0; ic_hit = 0; ic_hit_en = 0; mem_rsp_v = 0; redir_v = 0;
    btb_hit = 0; btb_target = '0; btb_twp = '0; btb_fwp = '0; bp_taken = 0;
    #1;
  endtask

  task automatic respond(logic hit, icway_t way, line_t l);
    ic_rsp_v = 1; ic_rsp_addr = sent_addr; ic_hit = hit; ic_hit_way = way;
    ic_hit_en = hit && sent_mask[way]; ic_data = l;
    #1;
  endtask

  task automatic btb(logic hit, addr_t tgt, wp_t t, wp_t f, logic taken);
    btb_hit = hit; btb_target = tgt; btb_twp = t; btb_fwp = f; bp_taken = taken;
    #1;
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = CFG_SHARE; stall = 0; redir_v = 0; redir_pc = '0; redir_mask = '0;
    ic_rsp_v = 0; ic_rsp_addr = '0; ic_hit = 0; ic_hit_way = '0; ic_hit_en = 0; ic_data = '0;
    mem_rsp_v = 0; mem_rsp_data = '0; btb_hit = 0; btb_target = '0; btb_twp = '0; btb_fwp = '0;
    bp_taken = 0; wq_tail = 7'd10;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    #1;

    // reset fetch: address 0, all ways
    check("reset read", ic_rd_en && ic_rd_addr == 0 && ic_rd_mask == 4'b1111);
    tick();
    // line 0 holds a branch at word 3, in way 2; BTB: taken to 0x100, twp = 1
    respond(1, 2, mkline(3));
    check("branch lookup", btb_lk_en && btb_lk_is_br && btb_lk_pc == 32'hC && bp_pc == 32'hC);
    btb(1, 32'h100, '{1'b1, 2'd1}, '{1'b1, 2'd0}, 1);
    check("block out", blk_v && blk_pc == 0 && blk_n == 4 && blk_insn[3] == BEQ);
    check("wq push way 2", wq_push && wq_push_way == 2);
    check("wq_ptr next entry", blk_tag.wq_ptr == 7'd11 && blk_tag.lk && blk_tag.is_br);
    check("tag carries prediction", blk_tag.hit && blk_tag.pred_taken && blk_tag.pred_next == 32'h100
          && blk_tag.twp == '{1'b1, 2'd1} && blk_tag.btb_target == 32'h100);
    check("next: target with one way", ic_rd_en && ic_rd_addr == 32'h100 && ic_rd_mask == 4'b0010);
    wq_tail = 7'd11;
    tick();
    // line 0x100 is really in way 3: wrong way
    respond(1, 3, mkline(-1));
    check("wrong way event", ev_way_miss && !blk_v && !wq_push);
    check("re-read with hit way", ic_rd_en && ic_rd_addr == 32'h100 && ic_rd_mask == 4'b1000);
    tick();
    respond(1, 3, mkline(-1));
    check("non-branch lookup", btb_lk_en && !btb_lk_is_br && btb_lk_pc == 32'h100);
    btb(0, '0, '0, '0, 0);
    check("full line block", blk_v && blk_n == 8 && blk_tag.lk && !blk_tag.is_br && !blk_tag.hit);
    check("next line, all ways", ic_rd_en && ic_rd_addr == 32'h120 && ic_rd_mask == 4'b1111);
    wq_tail = 7'd12;
    tick();
    // 0x120 misses
    respond(0, 0, '0);
    check("cache miss", ev_cache_miss && mem_req && mem_addr == 32'h120 && !ic_rd_en && !blk_v);
    for (int i = 0; i < 5; i++) begin
      tick();
      check("no read during refill", !ic_rd_en && !mem_req);
    end
    mem_rsp_v = 1; mem_rsp_data = mkline(1);
    #1 check("fill", ic_fill_en && ic_fill_addr == 32'h120 && ic_fill_data == mkline(1) && !ic_rd_en);
    tick();
    check("re-read after refill", ic_rd_en && ic_rd_addr == 32'h120 && ic_rd_mask == 4'b1111);
    tick();
    // branch at word 1 predicted not taken, fwp = way 0
    respond(1, 1, mkline(1));
    btb(1, 32'h400, '{1'b1, 2'd2}, '{1'b1, 2'd0}, 0);
    check("not-taken block", blk_v && blk_n == 2 && !blk_tag.pred_taken && blk_tag.pred_next == 32'h128);
    check("fall-through with fwp", ic_rd_en && ic_rd_addr == 32'h128 && ic_rd_mask == 4'b0001);
    tick();
    // block from the middle of the line, branch at word 6 -> 5 instructions
    respond(1, 0, mkline(6));
    check("mid-line lookup pc", btb_lk_pc == 32'h138 && btb_lk_is_br);
    btb(0, '0, '0, '0, 1);
    check("mid-line block", blk_v && blk_pc == 32'h128 && blk_n == 5);
    check("BTB miss: fall through, all ways", ic_rd_en && ic_rd_addr == 32'h13C && ic_rd_mask == 4'b1111);
    // BASE organisation: no lookup for a block without branch
    cfg = CFG_BASE;
    tick();
    respond(1, 0, mkline(-1));
    check("base: no non-branch lookup", !btb_lk_en && !blk_tag.lk && blk_v && blk_n == 1);
    check("base: next line all ways", ic_rd_addr == 32'h140 && ic_rd_mask == 4'b1111);
    cfg = CFG_SHARE;
    // stall holds the next access
    stall = 1;
    #1 check("stall: no read", !ic_rd_en);
    tick();
    check("stall: still none", !ic_rd_en);
    tick();
    stall = 0;
    #1 check("after stall: pending read", ic_rd_en && ic_rd_addr == 32'h140 && ic_rd_mask == 4'b1111);
    tick();
    // redirect while the response arrives: block dropped, new address
    respond(1, 0, mkline(-1));
    redir_v = 1; redir_pc = 32'h200; redir_mask = 4'b0100;
    #1 check("redirect drops block", !blk_v && !wq_push && !btb_lk_en);
    check("redirect read", ic_rd_en && ic_rd_addr == 32'h200 && ic_rd_mask == 4'b0100);
    tick();
    respond(1, 2, mkline(0));
    btb(1, 32'h0, '{1'b1, 2'd2}, '0, 1);
    check("redirected line delivered", blk_v && blk_pc == 32'h200 && blk_n == 1);
    check("taken back to 0 with twp", ic_rd_addr == 32'h0 && ic_rd_mask == 4'b0100);
    tick();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
