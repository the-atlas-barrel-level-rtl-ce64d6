// level_sync: two-flip-flop synchronizer for control levels.
//
// Carries register settings (link enable, RXID, thresholds) and status flags
// from one clock region into another. The bits are quasi-static: they are
// changed only while the affected logic is idle, so bits of one value may
// arrive one clock apart without harm.
module level_sync #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= '0; q <= '0;
    end else begin
      s1 <= d; q <= s1;
    end
  end
endmodule
