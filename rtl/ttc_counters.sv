// ttc_counters: bunch-crossing and L1 Accept counters driven by the TTC signals.
//
// The board receives the LHC clock, LV1A (trigger accepted), BC-RST (resets
// the bunch-crossing counter) and EV-RST (resets the L1A counter). The BCID
// counter counts clocks and restarts at 0 on BC-RST; the L1-ID counter counts
// LV1A pulses and restarts at 0 on EV-RST. On an LV1A the current BCID and
// the L1-ID given to that event are presented for one clock (l1a_q), which is
// when the trigger FIFO is written. The 12-bit widths are this design's
// choice (enough for the 3564 bunch crossings of one LHC orbit).
//
// Timing: counters update at each clk edge; l1a_q, ev_l1id, ev_bcid one clk
// after LV1A.
module ttc_counters (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l1a,
  input  logic        bc_rst,
  input  logic        ev_rst,
  output logic [11:0] bcid,
  output logic [11:0] l1id,      // L1-ID of the next accepted event
  output logic        l1a_q,
  output logic [11:0] ev_l1id,
  output logic [11:0] ev_bcid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bcid <= '0; l1id <= '0; l1a_q <= 1'b0; ev_l1id <= '0; ev_bcid <= '0;
    end else begin
      bcid  <= bc_rst ? 12'd0 : bcid + 1'b1;
      l1a_q <= l1a;
      if (l1a) begin
        ev_l1id <= ev_rst ? 12'd0 : l1id;
        ev_bcid <= bcid;
      end
      if (ev_rst) l1id <= l1a ? 12'd1 : 12'd0;
      else if (l1a) l1id <= l1id + 1'b1;
    end
  end
endmodule
