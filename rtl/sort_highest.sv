// sort_highest: second clock of the sector trigger pipeline.
//
// An N x (N-1) matrix comparator (8 x 7 on the board) compares every
// candidate with every other one; the candidate that beats all others is the
// highest-pT muon of the sector. Higher threshold wins; between equal
// thresholds the lower PAD number wins (this tie rule is this design's
// choice). The winner leaves as an 11-bit candidate (8 bits plus its 3-bit
// PAD number); the candidate array is passed on with the winner removed, for
// the second-candidate stage.
//
// Timing: one register stage (one BC).
module sort_highest
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cand_t     in   [N],
  output sel_cand_t first,
  output cand_t     rest [N]
);
  logic [N-1:0] win;
  sel_cand_t    sel;

  always_comb begin
    sel = '0;
    for (int i = 0; i < int'(N); i++) begin
      win[i] = in[i].valid;
      for (int j = 0; j < int'(N); j++)
        if (j != i && !beats(in[i], i, in[j], j)) win[i] = 1'b0;
      if (win[i]) begin
        sel.c   = in[i];
        sel.pad = 3'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first <= '0;
      for (int i = 0; i < int'(N); i++) rest[i] <= '0;
    end else begin
      first <= sel;
      for (int i = 0; i < int'(N); i++) begin
        rest[i]       <= in[i];
        rest[i].valid <= in[i].valid && !win[i];
      end
    end
  end
endmodule
