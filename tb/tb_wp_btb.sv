// tb_wp_btb: self-checking test of the way-predicting BTB.
// Directed checks of lookup contents, misses, LRU replacement inside a set,
// refresh of an existing entry without duplication, and the way partitions
// of every BTB organisation (which ways are enabled and allocated for branch
// and non-branch accesses).
module tb_wp_btb;
  import wpb_pkg::*;

  localparam addr_t SETSTRIDE = 32'd2048;   // 512 sets x 4 bytes

  logic     clk = 0, rst_n = 0;
  btb_cfg_e cfg;
  logic     lk_en, lk_is_br, lk_hit, wr_en;
  addr_t    lk_pc, lk_target;
  btbway_t  lk_way, wr_way;
  wp_t      lk_twp, lk_fwp;
  btbmask_t lk_ways;
  btb_wr_t  wr;
  int       checks = 0, failures = 0;

  wp_btb dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic write(addr_t pc, logic br, addr_t tgt, wp_t t, wp_t f);
    wr = '{pc: pc, is_br: br, target: tgt, twp: t, fwp: f};
    wr_en = 1;
    @(negedge clk);
    wr_en = 0;
  endtask

  task automatic look(addr_t pc, logic br);
    lk_en = 1; lk_pc = pc; lk_is_br = br;
    #1;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  btbway_t w_first;

  initial begin
    cfg = CFG_SHARE; lk_en = 0; lk_pc = '0; lk_is_br = 0; wr_en = 0; wr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- basic hit / miss
    look(32'h1000, 1);
    check("miss after reset", !lk_hit && lk_ways == 4'b1111);
    write(32'h1000, 1, 32'h2000, '{1'b1, 2'd2}, '{1'b1, 2'd3});
    look(32'h1000, 1);
    check("hit", lk_hit && lk_target == 32'h2000 && lk_twp == '{1'b1, 2'd2} && lk_fwp == '{1'b1, 2'd3});
    look(32'h1004, 1);
    check("neighbour miss", !lk_hit);
    look(32'h1000 + SETSTRIDE, 1);
    check("other tag miss", !lk_hit);

    // ---- fill the set, refresh the first, next allocation evicts the LRU
    write(32'h1000 + 1*SETSTRIDE, 1, 32'h3000, '0, '0);
    write(32'h1000 + 2*SETSTRIDE, 0, 32'h0,    '0, '{1'b1, 2'd1});
    write(32'h1000 + 3*SETSTRIDE, 1, 32'h5300, '0, '0);
    for (int i = 0; i < 4; i++) begin
      look(32'h1000 + i*SETSTRIDE, i != 2);
      check($sformatf("set full hit %0d", i), lk_hit);
    end
    write(32'h1000, 1, 32'h2400, '{1'b1, 2'd0}, '{1'b1, 2'd3});  // refresh, no new way
    look(32'h1000, 1);
    check("refreshed", lk_hit && lk_target == 32'h2400 && lk_twp == '{1'b1, 2'd0});
    look(32'h1000 + 3*SETSTRIDE, 1);
    check("refresh did not evict", lk_hit);
    write(32'h1000 + 4*SETSTRIDE, 1, 32'h6400, '0, '0);
    look(32'h1000 + 1*SETSTRIDE, 1);
    check("LRU evicted", !lk_hit);
    look(32'h1000, 1);
    check("MRU kept", lk_hit);
    look(32'h1000 + 4*SETSTRIDE, 1);
    check("new entry", lk_hit && lk_target == 32'h6400);

    // ---- partition 1/3
    cfg = CFG_P1_3;
    look(32'h4200, 1);
    check("1_3 branch ways", lk_ways == 4'b0001);
    look(32'h4200, 0);
    check("1_3 non-branch ways", lk_ways == 4'b1110);
    wr = '{pc: 32'h4200, is_br: 1, target: 32'h40, twp: '0, fwp: '0};
    #1 check("1_3 branch allocates way 0", wr_way == 0);
    write(32'h4200, 1, 32'h40, '0, '0);
    write(32'h4200 + SETSTRIDE, 1, 32'h80, '0, '0);  // replaces the only branch way
    look(32'h4200, 1);
    check("1_3 single branch way replaced", !lk_hit);
    look(32'h4200 + SETSTRIDE, 1);
    check("1_3 new branch hit", lk_hit && lk_way == 0);
    look(32'h4200 + SETSTRIDE, 0);
    check("1_3 branch entry not seen by non-branch access", !lk_hit);
    for (int i = 2; i < 5; i++) write(32'h4200 + i*SETSTRIDE, 0, '0, '0, '{1'b1, 2'(i)});
    for (int i = 2; i < 5; i++) begin
      look(32'h4200 + i*SETSTRIDE, 0);
      check($sformatf("1_3 non-branch %0d", i), lk_hit && lk_way != 0 && lk_fwp == '{1'b1, 2'(i)});
    end
    look(32'h4200 + SETSTRIDE, 1);
    check("1_3 non-branch fill kept branch", lk_hit);

    // ---- partition 2/2 and 3/1
    cfg = CFG_P2_2;
    look(32'h5300, 1); check("2_2 branch ways", lk_ways == 4'b0011);
    look(32'h5300, 0); check("2_2 non-branch ways", lk_ways == 4'b1100);
    wr = '{pc: 32'h5300, is_br: 0, target: '0, twp: '0, fwp: '0};
    #1 check("2_2 non-branch allocates way 2", wr_way == 2);
    cfg = CFG_P3_1;
    look(32'h5300, 1); check("3_1 branch ways", lk_ways == 4'b0111);
    look(32'h5300, 0); check("3_1 non-branch ways", lk_ways == 4'b1000);
    #1 check("3_1 non-branch allocates way 3", wr_way == 3);

    // ---- base: non-branch accesses do not use the BTB
    cfg = CFG_BASE;
    look(32'h6400, 0); check("base non-branch no ways", lk_ways == 4'b0000 && !lk_hit);
    look(32'h6400, 1); check("base branch all ways", lk_ways == 4'b1111);
    write(32'h6400, 0, '0, '0, '{1'b1, 2'd1});
    cfg = CFG_SHARE;
    look(32'h6400, 0); check("base non-branch not written", !lk_hit);
    lk_en = 0;
    #1 check("no ways without lookup", lk_ways == 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
