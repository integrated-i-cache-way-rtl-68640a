// tb_icache: self-checking test of the way-enabled instruction cache.
// Refills lines, reads them with all ways, with the right single way and
// with a wrong single way (a way misprediction: hit but no data), checks
// the one-cycle read latency, misses, and LRU replacement within a set.
module tb_icache;
  import wpb_pkg::*;

  localparam addr_t SETSTRIDE = 32'd16384;   // 512 sets x 32 bytes

  logic    clk = 0, rst_n = 0;
  logic    rd_en, rsp_v, hit, hit_en, fill_en;
  addr_t   rd_addr, rsp_addr, fill_addr;
  icmask_t rd_mask;
  icway_t  hit_way, fill_way;
  line_t   data, fill_data;
  int      checks = 0, failures = 0;

  icache dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic line_t pattern(addr_t a);
    line_t l;
    for (int k = 0; k < LINE_WORDS; k++) l[32*k +: 32] = a ^ 32'h5A5A_0000 ^ 32'(k * 4);
    return l;
  endfunction

  task automatic fill(addr_t a, output icway_t w);
    @(negedge clk);   // let the previous read's LRU update happen first
    fill_en = 1; fill_addr = a; fill_data = pattern(a);
    #1 w = fill_way;
    @(negedge clk);
    fill_en = 0;
  endtask

  // read; response checked one cycle later
  task automatic rd(addr_t a, icmask_t m);
    rd_en = 1; rd_addr = a; rd_mask = m;
    @(negedge clk);
    rd_en = 0;
    check("latency one cycle", rsp_v && rsp_addr == a);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  icway_t w [6];

  initial begin
    rd_en = 0; rd_addr = '0; rd_mask = '0; fill_en = 0; fill_addr = '0; fill_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check("no response without read", !rsp_v);

    rd(32'h0000_1040, '1);
    check("cold miss", !hit && !hit_en);

    fill(32'h0000_1040, w[0]);
    check("first fill way 0", w[0] == 0);
    rd(32'h0000_1044, '1);
    check("hit all ways", hit && hit_en && hit_way == w[0] && data == pattern(32'h0000_1040));
    rd(32'h0000_1044, way_onehot(w[0]));
    check("hit predicted way", hit && hit_en && data == pattern(32'h0000_1040));
    rd(32'h0000_1044, way_onehot(w[0] + 2'd1));
    check("wrong way: hit, no data", hit && !hit_en && hit_way == w[0]);

    // fill three more lines into the same set
    for (int i = 1; i < 4; i++) fill(32'h0000_1040 + i*SETSTRIDE, w[i]);
    check("distinct ways", w[1] == 1 && w[2] == 2 && w[3] == 3);
    for (int i = 0; i < 4; i++) begin
      rd(32'h0000_1040 + i*SETSTRIDE, way_onehot(w[i]));
      check($sformatf("set hit %0d", i), hit_en && data == pattern(32'h0000_1040 + i*SETSTRIDE));
    end
    // line 0 is now the oldest; use line 0 again so line 1 becomes oldest
    rd(32'h0000_1040, '1);
    fill(32'h0000_1040 + 4*SETSTRIDE, w[4]);
    check("LRU victim", w[4] == w[1]);
    rd(32'h0000_1040 + 1*SETSTRIDE, '1);
    check("evicted line misses", !hit);
    rd(32'h0000_1040 + 4*SETSTRIDE, way_onehot(w[4]));
    check("new line hits", hit_en && data == pattern(32'h0000_1040 + 4*SETSTRIDE));
    rd(32'h0000_1040, way_onehot(w[0]));
    check("recent line kept", hit_en);
    // other set unaffected
    rd(32'h0000_1060, '1);
    check("other set misses", !hit);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
