// trigger_pipeline: sector trigger algorithm of one Sector-Logic/RX board.
//
// Takes the 9-bit candidates of the eight PADs of one trigger sector (already
// registered by the link receivers) and the 3 low bits of the BCID, and runs
// the board's three-BC pipeline: eta-overlap removal, first candidate
// (8 x 7 matrix comparator), second candidate and the "more than two" flag
// (second matrix comparator). A final register drives the 32-bit parallel
// cable to the MUCTPI. With the link input register this gives the board's
// total trigger latency of 5 BC from link word to MUCTPI word.
//
// Word to the MUCTPI (layout chosen by this design; the content is the
// board's): [10:0] first candidate, [21:11] second candidate, [22] more than
// two candidates, [25:23] BCID, [31:26] zero. A candidate is
// {valid, overlap-phi, HitOPL, threshold[2:0], ROI[1:0], PAD[2:0]}.
//
// Timing: mu_word reflects the inputs presented 4 clk edges earlier.
module trigger_pipeline
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  pad_cand_t    cand [N],
  input  logic [2:0]   bcid,
  output muctpi_word_t mu_word
);
  cand_t      ovl_q [N];
  cand_t      rest_q[N];
  sel_cand_t  first_q, first_q2, second_q;
  logic       more2_q;
  logic [2:0] bcid_q [3];

  overlap_solver #(.N(N)) u_ovl (.clk, .rst_n, .in(cand), .out(ovl_q));
  sort_highest   #(.N(N)) u_s1  (.clk, .rst_n, .in(ovl_q), .first(first_q), .rest(rest_q));
  sort_second    #(.N(N)) u_s2  (.clk, .rst_n, .in(rest_q), .first_in(first_q),
                                 .first(first_q2), .second(second_q), .more2(more2_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid_q  <= '{default: '0};
      mu_word <= '0;
    end else begin
      bcid_q[0] <= bcid;
      bcid_q[1] <= bcid_q[0];
      bcid_q[2] <= bcid_q[1];
      mu_word   <= '{zero: '0, bcid: bcid_q[2], more2: more2_q,
                     cand1: second_q, cand0: first_q2};
    end
  end
endmodule
