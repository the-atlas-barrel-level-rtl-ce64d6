// sl_fpga: the trigger and read-out FPGA of the Sector-Logic/RX board.
//
// Four clock regions, separated by asynchronous FIFOs:
//   trigger region (clk_trig, TTC or local clock): the eight link receivers,
//     the TTC counters, the 5-BC sector trigger pipeline driving the MUCTPI
//     word, the write side of the eight input read-out FIFOs, of the trigger
//     FIFO (one entry per LV1A) and of the MUCTPI spy FIFO, Busy, and the
//     player of VME-emulated PAD/TTC data;
//   event-building region (clk_eb, TTC, local or twice local): the event
//     builder, reading the input and trigger FIFOs and writing the output FIFO;
//   serializer region (clk_ser): reads the output FIFO into the serializer;
//   VME region (clk_vme, local): the bus slave and the register map.
// Twelve FIFOs: 8 input, trigger, output, emulation, MUCTPI spy. The clock
// of each region is chosen outside (one clock input per region) by
// multiplexers that the clk_sel register output drives.
// FIFO depths are this design's choice (input and output 1024 words).
// Links switched off in CTRL.link_en take no part in the trigger, the
// read-out or Busy. In emulation mode the played PAD words also leave on
// tx_*, for G2Link transmitter cards that let this board stand in for the
// PADs of another board. With CTRL.ro_vme set, the built frames go to VME through
// ro_vme_port instead of the serializer; the MUCTPI words can always be read
// back through the spy FIFO.
//
// Timing: a PAD trigger word reaches mu_word five clk_trig edges after it is
// on the link inputs. Read-out frames leave on ser_data after the event
// builder has gathered one PAD frame from every enabled link.
module sl_fpga
  import sl_pkg::*;
#(
  parameter int unsigned IN_AW   = 10,
  parameter int unsigned OUT_AW  = 10,
  parameter int unsigned TRIG_AW = 8,
  parameter int unsigned EMU_AW  = 6,
  parameter int unsigned SPY_AW  = 6,
  parameter int unsigned TIMEOUT = 4096
) (
  input  logic          rst_n,
  input  logic          clk_trig,
  input  logic          clk_eb,
  input  logic          clk_ser,
  input  logic          clk_vme,
  // optical links
  input  logic [15:0]   link_data [NPAD],
  input  logic [NPAD-1:0] link_dv,
  input  logic [NPAD-1:0] link_flag,
  // TTC
  input  logic          ttc_l1a,
  input  logic          ttc_bc_rst,
  input  logic          ttc_ev_rst,
  // outputs
  output muctpi_word_t  mu_word,
  output logic          busy,
  output logic [39:0]   ser_data,
  // emulated PAD words towards G2Link transmitter cards (emulation mode)
  output logic [15:0]   tx_data [NPAD],
  output logic [NPAD-1:0] tx_dv,
  output logic [NPAD-1:0] tx_flag,
  // clock selection of the trigger, event-building and serializer regions
  output logic [3:0]    clk_sel,
  // bus from the VME FPGA
  input  logic [23:0]   bus_in,
  output logic [23:0]   bus_out,
  output logic          bus_oe,
  input  logic          strb,
  input  logic          vack,
  output logic          ack
);
  localparam int unsigned TEW = $bits(trig_entry_t);

  logic rst_t, rst_e, rst_s, rst_v;
  rst_sync u_rst_t (.clk(clk_trig), .rst_n, .rst_n_sync(rst_t));
  rst_sync u_rst_e (.clk(clk_eb),   .rst_n, .rst_n_sync(rst_e));
  rst_sync u_rst_s (.clk(clk_ser),  .rst_n, .rst_n_sync(rst_s));
  rst_sync u_rst_v (.clk(clk_vme),  .rst_n, .rst_n_sync(rst_v));

  // ---------------- VME region: bus slave and registers ----------------
  logic        reg_wr, reg_rd;
  logic [6:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [7:0]  v_link_en;
  logic [3:0]  v_rxid;
  logic        v_ser_en, v_emu_mode, v_busy, v_tmo;
  logic        v_ro_vme, ro_valid, ro_pop;
  logic [32:0] ro_word;
  logic [15:0] v_afull;
  logic        emu_full, emu_we;
  logic [31:0] emu_wdata;
  logic        spy_empty, spy_re;
  logic [31:0] spy_data;
  logic [15:0] mon [32];

  sl_vme_slave u_slave (
    .clk(clk_vme), .rst_n(rst_v), .bus_in, .bus_out, .bus_oe, .strb, .vack, .ack,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata
  );

  sl_regs #(.AFULL_RST(16'((2**IN_AW) * 3 / 4))) u_regs (
    .clk(clk_vme), .rst_n(rst_v), .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata,
    .link_en(v_link_en), .rxid(v_rxid), .ser_en(v_ser_en), .emu_mode(v_emu_mode), .ro_vme(v_ro_vme), .clk_sel,
    .afull_thr(v_afull), .busy(v_busy), .timeout_seen(v_tmo),
    .emu_full, .emu_we, .emu_wdata, .spy_empty, .spy_data, .spy_re,
    .ro_valid, .ro_data(ro_word), .ro_pop, .mon
  );

  // ---------------- trigger region ----------------
  logic [7:0]  t_link_en;
  logic        t_emu_mode;
  logic [15:0] t_afull;
  level_sync #(.W(25)) u_sync_t (.clk(clk_trig), .rst_n(rst_t),
    .d({v_link_en, v_emu_mode, v_afull}), .q({t_link_en, t_emu_mode, t_afull}));

  // emulation FIFO and player
  logic        emu_empty, emu_re;
  logic [31:0] emu_rdata;
  logic [EMU_AW:0] emu_wlevel;
  async_fifo #(.DW(32), .AW(EMU_AW)) u_emu_fifo (
    .wclk(clk_vme), .wrst_n(rst_v), .we(emu_we), .wdata(emu_wdata), .afull_thr('1),
    .full(emu_full), .almost_full(), .wlevel(emu_wlevel),
    .rclk(clk_trig), .rrst_n(rst_t), .re(emu_re), .rdata(emu_rdata), .empty(emu_empty), .rlevel()
  );

  logic [15:0]     e_data [NPAD];
  logic [NPAD-1:0] e_dv, e_flag;
  assign tx_dv   = t_emu_mode ? e_dv : '0;
  assign tx_flag = e_flag;
  logic            e_l1a, e_bcr, e_ecr;
  emu_player u_emu (
    .clk(clk_trig), .rst_n(rst_t), .enable(t_emu_mode),
    .fifo_empty(emu_empty), .fifo_data(emu_rdata), .fifo_re(emu_re),
    .link_data(e_data), .link_dv(e_dv), .link_flag(e_flag),
    .l1a(e_l1a), .bc_rst(e_bcr), .ev_rst(e_ecr)
  );

  // TTC counters
  logic        l1a, bcr, ecr, l1a_q;
  logic [11:0] bcid, l1id, ev_l1id, ev_bcid;
  assign l1a = ttc_l1a    | e_l1a;
  assign bcr = ttc_bc_rst | e_bcr;
  assign ecr = ttc_ev_rst | e_ecr;
  ttc_counters u_ttc (.clk(clk_trig), .rst_n(rst_t), .l1a, .bc_rst(bcr), .ev_rst(ecr),
                      .bcid, .l1id, .l1a_q, .ev_l1id, .ev_bcid);

  // link receivers
  pad_cand_t       cand [NPAD];
  logic [NPAD-1:0] ro_we, xoff, in_afull;
  logic [15:0]     ro_data [NPAD];
  logic [15:0]     trig_cnt [NPAD];
  logic [IN_AW:0]  in_wlevel [NPAD];
  logic [NPAD-1:0] in_empty, in_re;
  logic [15:0]     in_rdata [NPAD];
  logic [2:0]      bcid_link;

  always_ff @(posedge clk_trig or negedge rst_t) begin
    if (!rst_t) bcid_link <= '0;
    else        bcid_link <= bcid[2:0];
  end

  for (genvar i = 0; i < int'(NPAD); i++) begin : g_link
    logic [15:0] d;
    logic        dv, fl;
    pad_cand_t   c_raw;
    assign d  = t_emu_mode ? e_data[i] : link_data[i];
    assign dv = t_emu_mode ? e_dv[i]   : link_dv[i];
    assign fl = t_emu_mode ? e_flag[i] : link_flag[i];
    assign tx_data[i] = e_data[i];
    link_rx u_rx (.clk(clk_trig), .rst_n(rst_t), .link_data(d), .link_dv(dv), .link_flag(fl),
                  .cand(c_raw), .ro_we(ro_we[i]), .ro_data(ro_data[i]),
                  .busy_xoff(xoff[i]), .trig_count(trig_cnt[i]));
    async_fifo #(.DW(16), .AW(IN_AW)) u_in_fifo (
      .wclk(clk_trig), .wrst_n(rst_t), .we(ro_we[i] && t_link_en[i]), .wdata(ro_data[i]),
      .afull_thr(t_afull[IN_AW:0]), .full(), .almost_full(in_afull[i]), .wlevel(in_wlevel[i]),
      .rclk(clk_eb), .rrst_n(rst_e), .re(in_re[i]), .rdata(in_rdata[i]),
      .empty(in_empty[i]), .rlevel()
    );
    // a disabled link takes no part in the sector trigger
    assign cand[i] = t_link_en[i] ? c_raw : '0;
  end

  // sector trigger
  trigger_pipeline u_trig (.clk(clk_trig), .rst_n(rst_t), .cand, .bcid(bcid_link), .mu_word);

  // trigger FIFO, written on each LV1A with the MUCTPI word of that BC
  trig_entry_t       tf_wdata, tf_rdata;
  logic              tf_empty, tf_re, tf_afull;
  logic [TRIG_AW:0]  tf_wlevel;
  assign tf_wdata = '{l1id: ev_l1id, bcid: ev_bcid, trig: mu_word};
  async_fifo #(.DW(TEW), .AW(TRIG_AW)) u_trig_fifo (
    .wclk(clk_trig), .wrst_n(rst_t), .we(l1a_q), .wdata(tf_wdata),
    .afull_thr((TRIG_AW+1)'(2**TRIG_AW - 4)), .full(), .almost_full(tf_afull), .wlevel(tf_wlevel),
    .rclk(clk_eb), .rrst_n(rst_e), .re(tf_re), .rdata(tf_rdata), .empty(tf_empty), .rlevel()
  );

  // MUCTPI spy FIFO: every BC with at least one candidate
  logic [SPY_AW:0] spy_wlevel;
  async_fifo #(.DW(32), .AW(SPY_AW)) u_spy_fifo (
    .wclk(clk_trig), .wrst_n(rst_t), .we(mu_word.cand0.c.valid), .wdata(mu_word),
    .afull_thr('1), .full(), .almost_full(), .wlevel(spy_wlevel),
    .rclk(clk_vme), .rrst_n(rst_v), .re(spy_re), .rdata(spy_data), .empty(spy_empty), .rlevel()
  );

  // Busy
  logic        out_afull;
  logic [15:0] busy_cnt;
  busy_logic u_busy (.clk(clk_trig), .rst_n(rst_t), .link_en(t_link_en), .in_afull,
                     .pad_xoff(xoff), .trig_afull(tf_afull), .out_afull_async(out_afull),
                     .busy, .busy_count(busy_cnt));

  // ---------------- event-building region ----------------
  logic [7:0]  b_link_en;
  logic [3:0]  b_rxid;
  logic [15:0] b_afull;
  level_sync #(.W(28)) u_sync_e (.clk(clk_eb), .rst_n(rst_e),
    .d({v_link_en, v_rxid, v_afull}), .q({b_link_en, b_rxid, b_afull}));

  logic        of_full, of_we, of_empty, of_re, tmo;
  logic [32:0] of_wdata, of_rdata;
  logic [15:0] ev_cnt, err_cnt;
  logic [OUT_AW:0] of_rlevel;

  event_builder #(.N(NPAD), .TIMEOUT(TIMEOUT)) u_eb (
    .clk(clk_eb), .rst_n(rst_e), .link_en(b_link_en), .rxid(b_rxid),
    .tf_empty, .tf_data(tf_rdata), .tf_re,
    .if_empty(in_empty), .if_data(in_rdata), .if_re(in_re),
    .of_full, .of_we, .of_data(of_wdata),
    .ev_count(ev_cnt), .err_count(err_cnt), .timeout_seen(tmo)
  );

  async_fifo #(.DW(33), .AW(OUT_AW)) u_out_fifo (
    .wclk(clk_eb), .wrst_n(rst_e), .we(of_we), .wdata(of_wdata),
    .afull_thr(b_afull[OUT_AW:0]), .full(of_full), .almost_full(out_afull), .wlevel(),
    .rclk(clk_ser), .rrst_n(rst_s), .re(of_re), .rdata(of_rdata), .empty(of_empty), .rlevel(of_rlevel)
  );

  // ---------------- serializer region ----------------
  logic        s_ser_en, s_ro_vme, ser_re, port_re;
  logic [15:0] ser_words, ser_frames;
  level_sync #(.W(2)) u_sync_s (.clk(clk_ser), .rst_n(rst_s), .d({v_ser_en, v_ro_vme}),
                                .q({s_ser_en, s_ro_vme}));
  // the output FIFO goes either to the serializer or, for VME, to ro_vme_port
  assign of_re = ser_re || port_re;
  ser_if u_ser (.clk(clk_ser), .rst_n(rst_s), .enable(s_ser_en && !s_ro_vme), .of_empty,
                .of_data(of_rdata), .of_re(ser_re), .ser_data, .word_count(ser_words), .frame_count(ser_frames));
  ro_vme_port u_ro_port (
    .sclk(clk_ser), .srst_n(rst_s), .enable(s_ro_vme), .of_empty, .of_data(of_rdata),
    .of_re(port_re), .vclk(clk_vme), .vrst_n(rst_v), .pop(ro_pop), .valid(ro_valid),
    .data(ro_word)
  );

  // ---------------- monitoring into the VME region ----------------
  level_sync #(.W(2)) u_sync_v (.clk(clk_vme), .rst_n(rst_v), .d({busy, tmo}), .q({v_busy, v_tmo}));

  logic [15:0] mon_t [21];
  assign mon_t[0] = 16'(l1id);
  assign mon_t[1] = 16'(bcid);
  assign mon_t[2] = busy_cnt;
  assign mon_t[3] = 16'(tf_wlevel);
  for (genvar i = 0; i < int'(NPAD); i++) begin : g_mon
    assign mon_t[4+i]  = 16'(in_wlevel[i]);
    assign mon_t[12+i] = trig_cnt[i];
  end
  assign mon_t[20] = 16'(spy_wlevel);

  for (genvar i = 0; i < 21; i++) begin : g_mon_t
    gray_sync #(.W(16)) u_gs (.sclk(clk_trig), .srst_n(rst_t), .sval(mon_t[i]),
                              .dclk(clk_vme), .drst_n(rst_v), .dval(mon[i]));
  end
  gray_sync #(.W(16)) u_gs_ev  (.sclk(clk_eb),  .srst_n(rst_e), .sval(ev_cnt),
                                .dclk(clk_vme), .drst_n(rst_v), .dval(mon[21]));
  gray_sync #(.W(16)) u_gs_err (.sclk(clk_eb),  .srst_n(rst_e), .sval(err_cnt),
                                .dclk(clk_vme), .drst_n(rst_v), .dval(mon[22]));
  gray_sync #(.W(16)) u_gs_sw  (.sclk(clk_ser), .srst_n(rst_s), .sval(ser_words),
                                .dclk(clk_vme), .drst_n(rst_v), .dval(mon[23]));
  gray_sync #(.W(16)) u_gs_sf  (.sclk(clk_ser), .srst_n(rst_s), .sval(ser_frames),
                                .dclk(clk_vme), .drst_n(rst_v), .dval(mon[24]));
  gray_sync #(.W(16)) u_gs_ol  (.sclk(clk_ser), .srst_n(rst_s), .sval(16'(of_rlevel)),
                                .dclk(clk_vme), .drst_n(rst_v), .dval(mon[25]));
  assign mon[26] = 16'(emu_wlevel);
  for (genvar i = 27; i < 32; i++) begin : g_mon_z
    assign mon[i] = '0;
  end
endmodule
