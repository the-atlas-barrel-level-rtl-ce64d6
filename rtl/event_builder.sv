// event_builder: read-out event building of the Sector-Logic/RX.
//
// For each accepted event (one entry of the trigger FIFO, written on LV1A)
// the builder writes one SL/RX frame:
//   RX header  {1001, RXID[3:0], L1-ID[7:0]}
//   the 32-bit trigger word of the event, high half first
//   one PAD frame from each enabled link, link 0 first, copied word by word
//     from the link's input FIFO: PAD header {0101, PADID, status} ... PAD
//     footer {0111, error code}
//   RX footer  {1011, error code[11:0]}
// The frame markers are the board's; the header status contents, the place
// of the trigger word and the error code bits are this design's choices.
// L1-ID/BC-ID check: the PAD header status byte is taken to hold
// {L1-ID[3:0], BCID[3:0]} of the event and is compared with the SL's own
// counters. A link whose header does not match, whose FIFO shows words other
// than a PAD header where one is expected (they are dropped), or that sends
// nothing for TIMEOUT clocks gets its bit set in error code[N-1:0]; bit 8
// marks a timeout. The data words of a PAD frame are assumed never to begin
// with the PAD footer nibble 0111.
//
// The 16-bit frame words are packed in pairs into 32-bit output FIFO words
// (first word in [31:16]); bit 32 marks the last word of a frame, whose low
// half is 0000 when the frame has an odd number of words.
//
// Timing: at most one 16-bit frame word per clk; stalls while the output FIFO
// is full or an input FIFO is empty.
module event_builder
  import sl_pkg::*;
#(
  parameter int unsigned N       = NPAD,
  parameter int unsigned TIMEOUT = 4096
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  link_en,
  input  logic [3:0]    rxid,
  // trigger FIFO (read side)
  input  logic          tf_empty,
  input  trig_entry_t   tf_data,
  output logic          tf_re,
  // input FIFOs (read side)
  input  logic [N-1:0]  if_empty,
  input  logic [15:0]   if_data [N],
  output logic [N-1:0]  if_re,
  // output FIFO (write side)
  input  logic          of_full,
  output logic          of_we,
  output logic [32:0]   of_data,
  // monitoring
  output logic [15:0]   ev_count,
  output logic [15:0]   err_count,
  output logic          timeout_seen
);
  typedef enum logic [2:0] {
    S_IDLE, S_HDR, S_TRG_H, S_TRG_L, S_LINK, S_WAIT_HDR, S_COPY, S_FTR
  } state_t;

  state_t       state;
  trig_entry_t  ev;
  logic [3:0]   link;
  logic [N-1:0] err;
  logic         tmo;
  logic [$clog2(TIMEOUT+1)-1:0] timer;
  logic [15:0]  half;
  logic         have_half;

  // one frame word per clock, decided combinationally
  logic         emit, emit_last;
  logic [15:0]  emit_w;
  logic [15:0]  cur;
  logic         cur_ok, link_on;
  logic [11:0]  errcode;

  assign cur     = (link < 4'(N)) ? if_data[link[$clog2(N)-1:0]] : 16'h0;
  assign cur_ok  = (link < 4'(N)) ? !if_empty[link[$clog2(N)-1:0]] : 1'b0;
  assign link_on = (link < 4'(N)) ? link_en[link[$clog2(N)-1:0]] : 1'b0;
  assign errcode = 12'({tmo, err});

  always_comb begin
    emit = 1'b0; emit_last = 1'b0; emit_w = '0;
    if_re = '0; tf_re = 1'b0;
    if (!of_full) begin
      unique case (state)
        S_HDR:   begin emit = 1'b1; emit_w = {RX_HDR, rxid, ev.l1id[7:0]}; end
        S_TRG_H: begin emit = 1'b1; emit_w = ev.trig[31:16]; end
        S_TRG_L: begin emit = 1'b1; emit_w = ev.trig[15:0]; end
        S_WAIT_HDR, S_COPY: if (cur_ok) begin
          if_re[link[$clog2(N)-1:0]] = 1'b1;
          emit   = (state == S_COPY) || (cur[15:12] == PAD_HDR);
          emit_w = cur;
        end
        S_FTR: begin
          emit = 1'b1; emit_last = 1'b1; emit_w = {RX_FTR, errcode};
          tf_re = 1'b1;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ev <= '0; link <= '0; err <= '0; tmo <= 1'b0; timer <= '0;
      half <= '0; have_half <= 1'b0; of_we <= 1'b0; of_data <= '0;
      ev_count <= '0; err_count <= '0; timeout_seen <= 1'b0;
    end else begin
      // packing of 16-bit frame words into the 32-bit output FIFO
      of_we <= 1'b0;
      if (emit) begin
        if (have_half) begin
          of_we <= 1'b1; of_data <= {emit_last, half, emit_w}; have_half <= 1'b0;
        end else if (emit_last) begin
          of_we <= 1'b1; of_data <= {1'b1, emit_w, 16'h0000};
        end else begin
          half <= emit_w; have_half <= 1'b1;
        end
      end

      unique case (state)
        S_IDLE: if (!tf_empty) begin
          ev <= tf_data; link <= '0; err <= '0; tmo <= 1'b0; state <= S_HDR;
        end
        S_HDR:   if (emit) state <= S_TRG_H;
        S_TRG_H: if (emit) state <= S_TRG_L;
        S_TRG_L: if (emit) state <= S_LINK;
        S_LINK: begin
          timer <= '0;
          if (link >= 4'(N))   state <= S_FTR;
          else if (!link_on)   link  <= link + 1'b1;
          else                 state <= S_WAIT_HDR;
        end
        S_WAIT_HDR, S_COPY: begin
          if (|if_re) begin
            timer <= '0;
            if (state == S_WAIT_HDR) begin
              if (cur[15:12] == PAD_HDR) begin
                state <= S_COPY;
                if (cur[7:4] != ev.l1id[3:0] || cur[3:0] != ev.bcid[3:0])
                  err[link[$clog2(N)-1:0]] <= 1'b1;
              end else begin
                err[link[$clog2(N)-1:0]] <= 1'b1;   // stray word dropped
              end
            end else if (cur[15:12] == PAD_FTR) begin
              link  <= link + 1'b1;
              state <= S_LINK;
            end
          end else if (!cur_ok) begin
            if (timer == TIMEOUT[$bits(timer)-1:0]) begin
              err[link[$clog2(N)-1:0]] <= 1'b1;
              tmo          <= 1'b1;
              timeout_seen <= 1'b1;
              link         <= link + 1'b1;
              state        <= S_LINK;
            end else begin
              timer <= timer + 1'b1;
            end
          end
        end
        S_FTR: if (emit) begin
          state    <= S_IDLE;
          ev_count <= ev_count + 1'b1;
          if (|errcode) err_count <= err_count + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
