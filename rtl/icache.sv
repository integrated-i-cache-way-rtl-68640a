// icache: set-associative instruction cache with per-way data enables.
//
// Default organisation: 64 KB, 4 ways, 32-byte lines (512 sets).  A read
// presents the fetch address and a way mask.  All tag ways are read (the hit
// way must be known to detect a wrong way prediction), but only the data
// ways in the mask are read: with a correct way prediction one data way is
// activated instead of four, which is where the energy is saved.
//
// Timing: synchronous read.  rd_en/rd_addr/rd_mask are sampled at a clock
// edge and the response (rsp_v, hit, hit_way, hit_en, data) is valid in the
// following cycle.  hit_en says the hit way was among the enabled ways and
// data holds the line; hit && !hit_en is a way misprediction and the line
// must be read again with the right way.  A miss is refilled through
// fill_en/fill_addr/fill_data (one cycle write into the least recently used
// way, reported on fill_way).  Reading the tags of every way while reading
// one data way, the LRU replacement and the refill port are this design's
// choices; the size and associativity follow the evaluated machine.
module icache
  import wpb_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 65536
) (
  input  logic    clk,
  input  logic    rst_n,
  // read
  input  logic    rd_en,
  input  addr_t   rd_addr,
  input  icmask_t rd_mask,
  output logic    rsp_v,
  output addr_t   rsp_addr,
  output logic    hit,          // some way holds the line
  output icway_t  hit_way,
  output logic    hit_en,       // ... and that way's data was read
  output line_t   data,
  // refill
  input  logic    fill_en,
  input  addr_t   fill_addr,
  input  line_t   fill_data,
  output icway_t  fill_way
);

  localparam int unsigned SETS  = SIZE_BYTES / (LINE_BYTES * IC_WAYS);
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned LB    = $clog2(LINE_BYTES);
  localparam int unsigned TAG_W = AW - LB - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  function automatic idx_t idx_of(addr_t a);
    return a[LB +: IDX_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[AW-1 -: TAG_W];
  endfunction

  logic   valid_q [SETS][IC_WAYS];
  icway_t age_q   [SETS][IC_WAYS];
  tag_t   tag_m   [IC_WAYS][SETS];
  line_t  data_m  [IC_WAYS][SETS];

  // registered read results
  logic    rv_q;
  addr_t   ra_q;
  icmask_t rm_q;
  logic    tv_q [IC_WAYS];
  tag_t    tq_q [IC_WAYS];
  line_t   dq_q [IC_WAYS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rv_q <= 1'b0;
      ra_q <= '0;
      rm_q <= '0;
      for (int w = 0; w < IC_WAYS; w++) begin
        tv_q[w] <= 1'b0;
        tq_q[w] <= '0;
      end
    end else begin
      rv_q <= rd_en;
      if (rd_en) begin
        ra_q <= rd_addr;
        rm_q <= rd_mask;
        for (int w = 0; w < IC_WAYS; w++) begin
          tv_q[w] <= valid_q[idx_of(rd_addr)][w];
          tq_q[w] <= tag_m[w][idx_of(rd_addr)];
        end
      end
    end
  end

  // data ways: only the enabled ones are read
  always_ff @(posedge clk) begin
    for (int w = 0; w < IC_WAYS; w++)
      if (rd_en && rd_mask[w]) dq_q[w] <= data_m[w][idx_of(rd_addr)];
  end

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int w = 0; w < IC_WAYS; w++) begin
      if (tv_q[w] && tq_q[w] == tag_of(ra_q) && !hit) begin
        hit     = 1'b1;
        hit_way = icway_t'(w);
      end
    end
    rsp_v    = rv_q;
    rsp_addr = ra_q;
    hit_en   = hit && rm_q[hit_way];
    data     = dq_q[hit_way];
  end

  // victim: first invalid way, else the oldest
  always_comb begin
    logic   inv;
    icway_t best;
    inv      = 1'b0;
    best     = '0;
    fill_way = '0;
    for (int w = 0; w < IC_WAYS; w++) begin
      if (!valid_q[idx_of(fill_addr)][w] && !inv) begin
        inv      = 1'b1;
        fill_way = icway_t'(w);
      end
    end
    if (!inv) begin
      for (int w = 0; w < IC_WAYS; w++) begin
        if (age_q[idx_of(fill_addr)][w] >= best) begin
          best     = age_q[idx_of(fill_addr)][w];
          fill_way = icway_t'(w);
        end
      end
    end
  end

  // valid bits and LRU ages; a delivered hit or a refill makes a way newest.
  // The fetch unit never refills in a cycle that delivers a hit; if both
  // happened, only the refilled way would be made newest.
  logic   touch;
  idx_t   touch_idx;
  icway_t touch_way;
  always_comb begin
    touch     = fill_en || (rv_q && hit_en);
    touch_idx = fill_en ? idx_of(fill_addr) : idx_of(ra_q);
    touch_way = fill_en ? fill_way : hit_way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < IC_WAYS; w++) begin
          valid_q[s][w] <= 1'b0;
          age_q[s][w]   <= icway_t'(w);
        end
    end else begin
      if (fill_en) valid_q[idx_of(fill_addr)][fill_way] <= 1'b1;
      if (touch) begin
        for (int w = 0; w < IC_WAYS; w++) begin
          if (icway_t'(w) == touch_way)
            age_q[touch_idx][w] <= '0;
          else if (age_q[touch_idx][w] < age_q[touch_idx][touch_way])
            age_q[touch_idx][w] <= age_q[touch_idx][w] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_en) begin
      tag_m[fill_way][idx_of(fill_addr)]  <= tag_of(fill_addr);
      data_m[fill_way][idx_of(fill_addr)] <= fill_data;
    end
  end

endmodule
