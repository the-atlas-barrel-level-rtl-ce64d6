// link_rx: receiver side of one optical link (one PAD / trigger tower).
//
// Each bunch crossing the G2Link receiver card delivers one 16-bit word with
// a data-valid strobe. The link carries both the PAD trigger words and the
// read-out PAD frames; this design uses the link's flag bit to tell them
// apart (flag = 0: trigger word, flag = 1: read-out word). The module
// registers the word once (first clock of the 5-BC trigger latency): trigger
// words go to the trigger pipeline as a 9-bit candidate that is valid for
// exactly one BC, read-out words go to the input FIFO write port. The PAD's
// Busy-Xoff bit is held from the last trigger word until the next one.
//
// Timing: outputs change one clk after the word is presented.
module link_rx
  import sl_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] link_data,
  input  logic        link_dv,
  input  logic        link_flag,
  output pad_cand_t   cand,        // trigger candidate, valid for one BC
  output logic        ro_we,       // read-out word to the input FIFO
  output logic [15:0] ro_data,
  output logic        busy_xoff,
  output logic [15:0] trig_count   // trigger words received (monitoring)
);
  pad_trig_t w;
  assign w = pad_trig_t'(link_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cand       <= '0;
      ro_we      <= 1'b0;
      ro_data    <= '0;
      busy_xoff  <= 1'b0;
      trig_count <= '0;
    end else begin
      cand    <= to_pad_cand(link_dv && !link_flag, w);
      ro_we   <= link_dv && link_flag;
      ro_data <= link_data;
      if (link_dv && !link_flag) begin
        busy_xoff  <= w.busy_xoff;
        trig_count <= trig_count + 1'b1;
      end
    end
  end
endmodule
