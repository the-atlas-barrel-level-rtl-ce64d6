// overlap_solver: first clock of the sector trigger pipeline.
//
// When two adjacent towers of the sector both flag an eta overlap, they have
// seen the same muon, which must be counted once. For each adjacent pair
// (i, i+1) in which both candidates are valid and carry the eta-overlap flag,
// this design drops the candidate with the lower threshold, and the one of
// the higher PAD number when the thresholds are equal (the rule for which copy
// to keep is not published). The eta-overlap bit is consumed here: each PAD
// enters with 9 bits and leaves with 8, as in the board's pipeline drawing.
//
// Timing: one register stage (one BC).
module overlap_solver
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic      clk,
  input  logic      rst_n,
  input  pad_cand_t in  [N],
  output cand_t     out [N]
);
  logic [N-1:0] drop;

  always_comb begin
    drop = '0;
    for (int i = 0; i + 1 < int'(N); i++) begin
      if (in[i].valid && in[i].ovl_eta && in[i+1].valid && in[i+1].ovl_eta) begin
        if (in[i].thr < in[i+1].thr) drop[i]   = 1'b1;
        else                         drop[i+1] = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) out[i] <= '0;
    end else begin
      for (int i = 0; i < int'(N); i++)
        out[i] <= '{valid: in[i].valid && !drop[i], ovl_phi: in[i].ovl_phi,
                    hit_opl: in[i].hit_opl, thr: in[i].thr, roi: in[i].roi};
    end
  end
endmodule
