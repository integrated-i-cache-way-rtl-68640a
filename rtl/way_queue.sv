// way_queue: the Way Queue (WQ), a record of the I-cache hit way of each
// finished fetch.
//
// Every fetch that finishes pushes its hit way at the tail.  A fetch block's
// branch (or, with no branch, its first instruction) is given the pointer of
// the *next* entry, i.e. the entry the following fetch will fill, so that at
// commit it can read the way of the line that actually followed it: the
// target line or the fall-through line.
//
// The queue is circular and never blocks: old entries are simply
// overwritten.  Pointers carry one wrap bit above the index and every entry
// remembers the full pointer it was written under, so a read returns valid
// only when the entry really holds the way for that pointer (not yet written,
// or written for the pointer of the previous lap, reads as not valid).  This
// assumes fewer than DEPTH fetch blocks are in flight between fetch and
// commit.
//
// Interface and timing: push at the clock edge; the tail pointer and the NRD
// read ports are combinational.  A read in the same cycle as the push of the
// same entry sees the new way (bypass), so a waiting update can proceed in
// the cycle the fetch finishes.
module way_queue
  import wpb_pkg::*;
#(
  parameter int unsigned NRD = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    push,
  input  icway_t  push_way,
  output wq_ptr_t tail,            // entry the next push writes
  input  wq_ptr_t rd_ptr   [NRD],
  output logic    rd_valid [NRD],
  output icway_t  rd_way   [NRD]
);

  logic    ent_v   [WQ_DEPTH];
  wq_ptr_t ent_ptr [WQ_DEPTH];
  icway_t  ent_way [WQ_DEPTH];
  wq_ptr_t tail_q;

  assign tail = tail_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tail_q <= '0;
      for (int i = 0; i < WQ_DEPTH; i++) begin
        ent_v[i]   <= 1'b0;
        ent_ptr[i] <= '0;
        ent_way[i] <= '0;
      end
    end else if (push) begin
      ent_v[tail_q[WQ_IDX_W-1:0]]   <= 1'b1;
      ent_ptr[tail_q[WQ_IDX_W-1:0]] <= tail_q;
      ent_way[tail_q[WQ_IDX_W-1:0]] <= push_way;
      tail_q                        <= tail_q + 1'b1;
    end
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      if (push && rd_ptr[r] == tail_q) begin
        rd_valid[r] = 1'b1;
        rd_way[r]   = push_way;
      end else begin
        rd_valid[r] = ent_v[rd_ptr[r][WQ_IDX_W-1:0]] &&
                      ent_ptr[rd_ptr[r][WQ_IDX_W-1:0]] == rd_ptr[r];
        rd_way[r]   = ent_way[rd_ptr[r][WQ_IDX_W-1:0]];
      end
    end
  end

endmodule
