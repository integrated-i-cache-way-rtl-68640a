// burq: BTB Update Request Queue.
//
// A WP-BTB update can only be written once the I-cache way of the line that
// followed the committing instruction is known.  When that fetch has not
// finished yet (it missed in the cache, or the branch was mispredicted and
// the correct line is only fetched now), the update request waits here.
// Requests leave in order; the head is written into the WP-BTB once the Way
// Queue entry it waits for (upd_req_t.wait_ptr) has been filled - that test
// is made by the user of the queue.
//
// Interface and timing: a plain first-in first-out queue of upd_req_t.  enq
// and deq act at the clock edge; head/head_v show the oldest request
// combinationally; full is asserted when DEPTH requests are held, and the
// producer must then hold its request (the commit stage stalls).  Enqueue and
// dequeue in the same cycle are allowed, also when full.  The depth is this
// design's choice.  rst_n is an asynchronous reset and also disables the
// two assertions, which is why lint sees it used both ways.
module burq
  import wpb_pkg::*;
#(
  parameter int unsigned DEPTH = BURQ_DEPTH
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     enq,
  input  upd_req_t enq_req,
  output logic     full,
  output logic     head_v,
  output upd_req_t head,
  input  logic     deq,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned PW = $clog2(DEPTH);
  localparam int unsigned CW = $clog2(DEPTH+1);

  upd_req_t          mem [DEPTH];
  logic [PW-1:0]     rd_q, wr_q;
  logic [CW-1:0]     cnt_q;

  assign full   = (cnt_q == CW'(DEPTH));
  assign head_v = (cnt_q != '0);
  assign head   = mem[rd_q];
  assign count  = cnt_q;

  wire do_deq = deq && head_v;
  wire do_enq = enq && (!full || do_deq);

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (do_enq) wr_q <= inc(wr_q);
      if (do_deq) rd_q <= inc(rd_q);
      cnt_q <= cnt_q + CW'(do_enq) - CW'(do_deq);
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_q] <= enq_req;
  end

  // The producer must not push into a full queue unless the head leaves.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  enq |-> (!full || deq));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   deq |-> head_v);

endmodule
