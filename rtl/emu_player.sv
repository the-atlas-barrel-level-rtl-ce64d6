// emu_player: replays PAD link words and TTC signals written through VME.
//
// For tests the board can stand in for the PADs and the TTC system: words
// written by VME into the emulation FIFO are played, in the trigger clock
// region, onto the same paths as the optical links and the TTC inputs. One
// FIFO entry is taken per clock while enabled. Entry format (this design's):
//   [31:30] = 0  stage a trigger word: [26:24] link, [15:0] word
//   [31:30] = 1  send a read-out word now: [26:24] link, [15:0] word
//   [31:30] = 2  bunch-crossing strobe: send all staged trigger words in this
//                clock and pulse [0] LV1A, [1] BC-RST, [2] EV-RST
// Staging lets the trigger words of several PADs arrive in the same BC.
//
// Timing: outputs are registered, one clk after the entry is taken.
module emu_player
  import sl_pkg::*;
#(
  parameter int unsigned N = NPAD
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        fifo_empty,
  input  logic [31:0] fifo_data,
  output logic        fifo_re,
  output logic [15:0] link_data [N],
  output logic [N-1:0] link_dv,
  output logic [N-1:0] link_flag,
  output logic        l1a,
  output logic        bc_rst,
  output logic        ev_rst
);
  logic [15:0]  stage [N];
  logic [N-1:0] staged;
  logic [1:0]   kind;
  logic [2:0]   lk;

  assign fifo_re = enable && !fifo_empty;
  assign kind    = fifo_data[31:30];
  assign lk      = fifo_data[26:24];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N); i++) begin stage[i] <= '0; link_data[i] <= '0; end
      staged <= '0; link_dv <= '0; link_flag <= '0;
      l1a <= 1'b0; bc_rst <= 1'b0; ev_rst <= 1'b0;
    end else begin
      link_dv <= '0; link_flag <= '0;
      l1a <= 1'b0; bc_rst <= 1'b0; ev_rst <= 1'b0;
      if (fifo_re) begin
        unique case (kind)
          2'd0: if (int'(lk) < int'(N)) begin
            stage[lk]  <= fifo_data[15:0];
            staged[lk] <= 1'b1;
          end
          2'd1: if (int'(lk) < int'(N)) begin
            link_data[lk] <= fifo_data[15:0];
            link_dv[lk]   <= 1'b1;
            link_flag[lk] <= 1'b1;
          end
          2'd2: begin
            for (int i = 0; i < int'(N); i++) link_data[i] <= stage[i];
            link_dv <= staged;
            staged  <= '0;
            l1a     <= fifo_data[0];
            bc_rst  <= fifo_data[1];
            ev_rst  <= fifo_data[2];
          end
          default: ;
        endcase
      end
    end
  end
endmodule
