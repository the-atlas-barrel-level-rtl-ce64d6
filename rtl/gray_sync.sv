// gray_sync: carries a slowly changing counter value into another clock region.
//
// The value is Gray-coded and registered in the source clock, passed through
// two flip-flops in the destination clock and decoded there. For a counter
// that steps by one, every sampled value is one that the counter really held.
// Used for the monitoring counters and FIFO levels read through VME; a FIFO
// level may step by more than one, so a reading taken during a change can be
// off, which is acceptable for monitoring.
//
// Timing: about three destination clocks of latency.
module gray_sync #(
  parameter int unsigned W = 16
) (
  input  logic         sclk,
  input  logic         srst_n,
  input  logic [W-1:0] sval,
  input  logic         dclk,
  input  logic         drst_n,
  output logic [W-1:0] dval
);
  logic [W-1:0] g_s, g_d1, g_d2;

  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n) g_s <= '0;
    else         g_s <= sval ^ (sval >> 1);
  end

  always_ff @(posedge dclk or negedge drst_n) begin
    if (!drst_n) begin
      g_d1 <= '0; g_d2 <= '0;
    end else begin
      g_d1 <= g_s;
      g_d2 <= g_d1;
    end
  end

  always_comb begin
    dval[W-1] = g_d2[W-1];
    for (int i = int'(W) - 2; i >= 0; i--) dval[i] = dval[i+1] ^ g_d2[i];
  end
endmodule
