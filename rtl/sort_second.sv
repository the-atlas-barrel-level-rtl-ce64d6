// sort_second: third clock of the sector trigger pipeline.
//
// The candidates left after the first stage (the highest one removed) go
// through a second matrix comparator (each of the remaining seven against the
// six others on the board), with the same ordering rule as sort_highest, to
// find the second highest-pT muon. Only two candidates reach the MUCTPI; when
// a third one exists, the more2 flag is raised. The first candidate is
// delayed alongside so both leave together.
//
// Timing: one register stage (one BC).
module sort_second
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic      clk,
  input  logic      rst_n,
  input  cand_t     in    [N],
  input  sel_cand_t first_in,
  output sel_cand_t first,
  output sel_cand_t second,
  output logic      more2
);
  logic [N-1:0] win;
  sel_cand_t    sel;
  int unsigned  nvalid;

  always_comb begin
    sel    = '0;
    nvalid = 0;
    for (int i = 0; i < int'(N); i++) begin
      if (in[i].valid) nvalid++;
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
      first  <= '0;
      second <= '0;
      more2  <= 1'b0;
    end else begin
      first  <= first_in;
      second <= sel;
      more2  <= (nvalid > 1);
    end
  end
endmodule
