// dir_pred: combined branch direction predictor.
//
// Three tables of 2-bit saturating counters: a bimodal table indexed by the
// branch address, a global table indexed by a 12-bit global history of
// branch outcomes, and a chooser indexed by the branch address that selects
// which of the two is believed.  Default sizes: 4K entries each, 12 history
// bits.  The WP-BTB supplies the target; this unit supplies the direction.
//
// Interface and timing: the lookup (lk_pc -> lk_taken) is combinational.  An
// update (up_en, up_pc, up_taken) at commit trains both component tables,
// moves the chooser towards the component that was right when they
// disagreed, and shifts the outcome into the history at the clock edge.
// The sizes follow the evaluated machine; the indexing (address bits above
// the word offset for the bimodal table and the chooser, the history alone
// for the global table), the commit-time history update and the reset
// state (weakly not taken, chooser weakly towards bimodal) are this design's
// choices.
module dir_pred
  import wpb_pkg::*;
#(
  parameter int unsigned BIM_ENTRIES = 4096,
  parameter int unsigned CHO_ENTRIES = 4096,
  parameter int unsigned HIST_BITS   = 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  addr_t lk_pc,
  output logic  lk_taken,
  input  logic  up_en,
  input  addr_t up_pc,
  input  logic  up_taken
);

  localparam int unsigned BW = $clog2(BIM_ENTRIES);
  localparam int unsigned CW = $clog2(CHO_ENTRIES);
  localparam int unsigned GN = 1 << HIST_BITS;

  logic [1:0]           bim_q [BIM_ENTRIES];
  logic [1:0]           glb_q [GN];
  logic [1:0]           cho_q [CHO_ENTRIES];
  logic [HIST_BITS-1:0] hist_q;

  function automatic logic [1:0] sat(logic [1:0] c, logic t);
    if (t) return (c == 2'd3) ? c : c + 2'd1;
    else   return (c == 2'd0) ? c : c - 2'd1;
  endfunction

  always_comb begin
    logic b, g;
    b        = bim_q[lk_pc[2 +: BW]][1];
    g        = glb_q[hist_q][1];
    lk_taken = cho_q[lk_pc[2 +: CW]][1] ? g : b;
  end

  logic ub, ug;
  assign ub = bim_q[up_pc[2 +: BW]][1];
  assign ug = glb_q[hist_q][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist_q <= '0;
      for (int i = 0; i < BIM_ENTRIES; i++) bim_q[i] <= 2'd1;
      for (int i = 0; i < GN; i++)          glb_q[i] <= 2'd1;
      for (int i = 0; i < CHO_ENTRIES; i++) cho_q[i] <= 2'd1;
    end else if (up_en) begin
      bim_q[up_pc[2 +: BW]] <= sat(bim_q[up_pc[2 +: BW]], up_taken);
      glb_q[hist_q]         <= sat(glb_q[hist_q], up_taken);
      if (ub != ug)
        cho_q[up_pc[2 +: CW]] <= sat(cho_q[up_pc[2 +: CW]], ug == up_taken);
      hist_q <= {hist_q[HIST_BITS-2:0], up_taken};
    end
  end

endmodule
