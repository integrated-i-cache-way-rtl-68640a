// tb_dir_pred: self-checking test of the combined direction predictor.
// A reference model (plain integer tables) is trained alongside the
// predictor with random branch streams: biased branches, alternating
// branches and loops.  Every prediction is compared with the model, and the
// test also checks that an always-taken branch and an alternating branch
// (which only the global-history component can learn) end up predicted
// correctly.
module tb_dir_pred;
  import wpb_pkg::*;

  logic  clk = 0, rst_n = 0;
  addr_t lk_pc, up_pc;
  logic  lk_taken, up_en, up_taken;
  int    checks = 0, failures = 0;

  dir_pred dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  // reference model
  int bim [4096], glb [4096], cho [4096];
  int hist;

  function automatic int satm(int c, bit t);
    return t ? (c < 3 ? c + 1 : 3) : (c > 0 ? c - 1 : 0);
  endfunction
  function automatic bit mpred(addr_t pc);
    int i = (pc >> 2) % 4096;
    return (cho[i] >= 2) ? (glb[hist] >= 2) : (bim[i] >= 2);
  endfunction
  function automatic void mupdate(addr_t pc, bit t);
    int i = (pc >> 2) % 4096;
    bit b = bim[i] >= 2, g = glb[hist] >= 2;
    bim[i] = satm(bim[i], t);
    glb[hist] = satm(glb[hist], t);
    if (b != g) cho[i] = satm(cho[i], g == t);
    hist = ((hist << 1) | t) & 12'hFFF;
  endfunction

  // predict, compare with the model, train both
  task automatic step(addr_t pc, bit t, output bit pred);
    lk_pc = pc;
    #1;
    pred = lk_taken;
    check($sformatf("model pc=%h", pc), lk_taken == mpred(pc));
    up_en = 1; up_pc = pc; up_taken = t;
    @(negedge clk);
    up_en = 0;
    mupdate(pc, t);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit p;
  int right;

  initial begin
    for (int i = 0; i < 4096; i++) begin bim[i] = 1; glb[i] = 1; cho[i] = 1; end
    hist = 0;
    lk_pc = '0; up_pc = '0; up_en = 0; up_taken = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // always-taken branch
    for (int i = 0; i < 4; i++) step(32'h400, 1, p);
    check("always taken learned", p == 1);

    // alternating branch: bimodal cannot learn it, the global table can
    right = 0;
    for (int i = 0; i < 200; i++) begin
      step(32'h800, i % 2, p);
      if (i >= 150 && p == bit'(i % 2)) right++;
    end
    check($sformatf("alternating learned (%0d/50)", right), right >= 48);

    // random mix of biased branches
    for (int i = 0; i < 3000; i++) begin
      addr_t pc = addr_t'($urandom_range(0, 63)) << 2;
      step(pc, ($urandom_range(0, 99) < (pc[2] ? 90 : 10)), p);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
