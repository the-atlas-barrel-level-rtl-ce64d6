// busy_logic: Busy generation of the read-out path.
//
// The read-out logic checks the occupancy of the internal FIFOs and raises
// Busy, which stops new L1A from being sent until the FIFOs have been read.
// Here Busy is the OR of: the almost-full flags of the enabled input FIFOs
// and of the trigger FIFO (written in this clock region), the almost-full
// flag of the output FIFO (written in the event-building region, brought in
// through two flip-flops), and the Busy-Xoff bit of the enabled PADs, which
// tells that a PAD's own FIFOs are almost full. Which sources are ORed is this
// design's reading; the almost-full threshold is set by a register.
//
// Timing: busy is registered; a source raises it one clk later (three for
// the output FIFO flag). busy_count counts clocks spent busy.
module busy_logic
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] link_en,
  input  logic [N-1:0] in_afull,
  input  logic [N-1:0] pad_xoff,
  input  logic         trig_afull,
  input  logic         out_afull_async,
  output logic         busy,
  output logic [15:0]  busy_count
);
  logic out_afull_s1, out_afull_s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_afull_s1 <= 1'b0;
      out_afull_s2 <= 1'b0;
      busy         <= 1'b0;
      busy_count   <= '0;
    end else begin
      out_afull_s1 <= out_afull_async;
      out_afull_s2 <= out_afull_s1;
      busy <= |(link_en & (in_afull | pad_xoff)) | trig_afull | out_afull_s2;
      if (busy && busy_count != '1) busy_count <= busy_count + 1'b1;
    end
  end
endmodule
