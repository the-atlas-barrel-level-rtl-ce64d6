// tb_sl_rx_board: end-to-end test of the Sector-Logic/RX board at its full
// size (eight links, 1024-word FIFOs, default settings).
//
// Clocks: trigger region 40 MHz (TTC), event building 80 MHz (2 x local),
// serializer and VME regions on slightly different 40 MHz clocks.
// Phase A: 600 bunch crossings of random PAD trigger words on links 0..6
//   (link 7 disabled, as in a seven-tower sector) with random LV1A. Every
//   MUCTPI word is compared with a reference model five clocks after its link
//   words; after each LV1A every enabled PAD sends a read-out frame on its
//   link between trigger words. One PAD header carries a wrong BC-ID and one
//   trigger word sets Busy-Xoff.
// Phase B: one LV1A for which link 3 sends nothing (event-builder timeout).
// Phase C: emulation mode. PAD trigger words, TTC pulses and read-out words
//   are written through VME into the emulation FIFO; the MUCTPI word is read
//   back from the spy FIFO; with the serializer stopped and a low threshold
//   the output FIFO raises Busy; that frame is then read word by word
//   through VME (read-out-to-VME mode), which clears Busy. The played PAD
//   words must also appear, and only then, on the transmitter outputs.
// Every SL/RX frame leaving on the serializer bits is compared with one built
// here from the data sent. Monitoring counters are read through VME. Each
// mechanism (overlap removal, more than two candidates, LV1A, Busy from
// Busy-Xoff and from FIFO occupancy, L1-ID/BC-ID mismatch, timeout, mode
// switch, spy read, serializer stall) is counted and must occur.
module tb_sl_rx_board;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"

  logic rst_n = 0, clk_trig = 0, clk_eb = 0, clk_ser = 0, clk_local = 0;
  logic [15:0] link_data [NPAD];
  logic [NPAD-1:0] link_dv = 0, link_flag = 0;
  logic ttc_l1a = 0, ttc_bc_rst = 0, ttc_ev_rst = 0;
  muctpi_word_t mu_word;
  logic [39:0] ser_data;
  logic busy;
  logic vme_req = 0, vme_we = 0, vme_ack;
  logic [7:0] vme_addr = 0;
  logic [31:0] vme_wdata = 0, vme_rdata;
  logic [15:0] extf_d;
  logic extf_wen_n, extf_ren_n, extf_rs_n;
  logic [31:0] g2_cfg;
  logic [7:0] ser_cfg;
  logic tck, tms, tdi;

  always #12.5 clk_trig  = ~clk_trig;
  always #6.25 clk_eb    = ~clk_eb;
  always #12.6 clk_ser   = ~clk_ser;
  always #12.4 clk_local = ~clk_local;

  sl_rx_board dut (
    .rst_n, .clk_trig, .clk_eb, .clk_ser, .clk_local,
    .link_data, .link_dv, .link_flag, .ttc_l1a, .ttc_bc_rst, .ttc_ev_rst,
    .mu_word, .ser_data, .busy, .link_tx_data, .link_tx_dv, .link_tx_flag, .clk_sel,
    .vme_req, .vme_we, .vme_addr, .vme_wdata, .vme_rdata, .vme_ack,
    .extf_d, .extf_wen_n, .extf_q(16'h0), .extf_ren_n, .extf_ef_n(1'b0), .extf_ff_n(1'b1),
    .extf_rs_n, .g2_cfg, .ser_cfg, .jtag_tck(tck), .jtag_tms(tms), .jtag_tdi(tdi), .jtag_tdo(1'b0));

  int checks = 0, failures = 0;

  // emulated PAD words leaving towards G2Link transmitter cards
  logic [15:0] link_tx_data [NPAD];
  logic [NPAD-1:0] link_tx_dv, link_tx_flag;
  logic [3:0] clk_sel;
  logic [15:0] tx_exp1 = 0, tx_exp4 = 0;
  int n_tx_words = 0, n_tx_pair = 0;
  always @(posedge clk_trig) if (rst_n) begin
    foreach (link_tx_dv[l]) if (link_tx_dv[l]) n_tx_words++;
    if (link_tx_dv == 8'h12 && !link_tx_flag[1] && !link_tx_flag[4]
        && link_tx_data[1] == tx_exp1 && link_tx_data[4] == tx_exp4) n_tx_pair++;
  end
  int n_ovl = 0, n_more2 = 0, n_l1a = 0, n_busy_xoff = 0, n_busy_fifo = 0, n_mis = 0,
      n_tmo = 0, n_mode = 0, n_spy = 0, n_stall = 0, n_frames = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------- VME access ----------------
  task automatic vme(input bit w, input logic [7:0] a, input logic [31:0] d, output logic [31:0] q);
    int cyc = 0;
    @(negedge clk_local); vme_req = 1; vme_we = w; vme_addr = a; vme_wdata = d;
    @(negedge clk_local); vme_req = 0;
    while (!vme_ack && cyc < 2000) begin @(negedge clk_local); cyc++; end
    check(vme_ack, $sformatf("VME access 0x%0h acknowledged", a));
    q = vme_rdata;
  endtask
  task automatic vwr(input logic [7:0] a, input logic [31:0] d);
    logic [31:0] q;
    vme(1, a, d, q);
  endtask
  task automatic vrd(input logic [7:0] a, output logic [31:0] q);
    vme(0, a, 32'h0, q);
  endtask

  // ---------------- expected read-out ----------------
  logic [32:0] expw[$], got[$];
  int ro_base, n_rovme = 0;
  logic [15:0] ro_q [NPAD][$];

  task automatic expect_frame(input logic [15:0] w[$]);
    for (int i = 0; i < w.size(); i += 2)
      expw.push_back({i + 2 >= w.size(), w[i], (i + 1 < w.size()) ? w[i+1] : 16'h0000});
  endtask

  always @(posedge clk_ser) if (rst_n && ser_data[32]) begin
    got.push_back(ser_data[32:0] == 0 ? 33'h0 : {ser_data[33], ser_data[31:0]});
    if (ser_data[33]) n_frames++;
  end

  // ---------------- trigger reference ----------------
  int tb_bc = 0, tb_l1id = 0;
  always @(posedge clk_trig) if (rst_n) tb_bc = ttc_bc_rst ? 0 : (tb_bc + 1) % 4096;

  function automatic muctpi_word_t model(input pad_cand_t c [8], input logic [2:0] b);
    muctpi_word_t w;
    cand_t o [8];
    ref_overlap(c, o);
    w = '0;
    w.bcid  = b;
    w.cand0 = ref_best(o, -1);
    w.cand1 = ref_best(o, w.cand0.c.valid ? int'(w.cand0.pad) : -1);
    w.more2 = ref_count(o) > 2;
    return w;
  endfunction

  // build and queue the PAD frames of one event; returns the expected RX frame
  task automatic make_event(input int l1id, input int bcid, input muctpi_word_t tw,
                            input int bad_link, input bit skip, output logic [15:0] fr[$]);
    logic [11:0] err = 0;
    fr = {};
    fr.push_back({RX_HDR, 4'h5, 8'(l1id)});
    fr.push_back(tw[31:16]);
    fr.push_back(tw[15:0]);
    for (int l = 0; l < 7; l++) begin
      logic [15:0] pf[$];
      int ncm;
      if (skip && l == bad_link) begin err[l] = 1; err[8] = 1; continue; end
      pf = {};
      pf.push_back({PAD_HDR, 4'(l), 4'(l1id), 4'(bcid)});
      if (!skip && l == bad_link) begin pf[0][3:0] = ~pf[0][3:0]; err[l] = 1; end
      ncm = $urandom_range(1, 3);
      for (int c = 0; c < ncm; c++) begin
        int len;
        len = $urandom_range(1, 4);
        for (int k = 0; k < len; k++) pf.push_back({4'hC, 12'($urandom)});
      end
      pf.push_back({PAD_FTR, 12'h000});
      foreach (pf[k]) begin ro_q[l].push_back(pf[k]); fr.push_back(pf[k]); end
    end
    fr.push_back({RX_FTR, err});
  endtask

  // one bunch crossing of link traffic; trig[l] = trigger word or 'x' flag
  task automatic drive_bc(input logic [15:0] tw [NPAD], input logic [NPAD-1:0] has_tw);
    for (int l = 0; l < int'(NPAD); l++) begin
      if (has_tw[l]) begin
        link_data[l] = tw[l]; link_dv[l] = 1; link_flag[l] = 0;
      end else if (ro_q[l].size()) begin
        link_data[l] = ro_q[l].pop_front(); link_dv[l] = 1; link_flag[l] = 1;
      end else begin
        link_data[l] = 16'h0; link_dv[l] = 0; link_flag[l] = 0;
      end
    end
  endtask

  // in phase A only a PAD's Busy-Xoff can raise Busy (FIFOs stay far from
  // their threshold); in phase C only the output FIFO occupancy can
  int phase = 0;
  always @(posedge clk_trig) if (rst_n && busy) begin
    if (phase == 0) n_busy_xoff++; else if (phase == 2) n_busy_fifo++;
  end

  initial begin
    logic [31:0] q;
    muctpi_word_t expq[$];
    muctpi_word_t e_word;
    logic [15:0] fr[$];
    logic [15:0] tw [NPAD];
    logic [NPAD-1:0] has;
    pad_cand_t cands [8];
    cand_t ov [8];
    int pend_l1a_bc;
    bit pend_l1a;
    int ev = 0;

    foreach (link_data[i]) link_data[i] = 16'h0;
    repeat (4) @(posedge clk_trig);
    @(negedge clk_trig) rst_n = 1;
    repeat (6) @(negedge clk_trig);
    ttc_bc_rst = 1; ttc_ev_rst = 1;
    @(negedge clk_trig);
    ttc_bc_rst = 0; ttc_ev_rst = 0;

    // identifiers and set-up through VME
    vrd(8'h00, q); check(q == 32'h564D4546, "VME FPGA identifier");
    vrd(8'h80, q); check(q == 32'h534C5258, "SL FPGA identifier through the bus");
    vwr(8'h81, 32'h0000_157F);                 // links 0..6, RXID 5, serializer on
    vrd(8'h81, q); check(q == 32'h0000_157F, "control register");
    check(clk_sel == 4'h0, "clock selection after reset: all TTC");
    vwr(8'h85, 32'hFFFF_FFFC);  // event building local x2, serializer local
    vrd(8'h85, q); check(q == 32'hC && clk_sel == 4'hC, $sformatf("clock selection %h", q));
    repeat (10) @(negedge clk_trig);

    // ---------------- phase A ----------------
    pend_l1a = 0;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk_trig);
      // compare the MUCTPI word due now
      if (expq.size() == 5) begin
        e_word = expq.pop_front();
        check(mu_word == e_word, $sformatf("t=%0d MUCTPI word %h want %h", t, mu_word, e_word));
      end
      // an LV1A sampled at the last edge: its trigger word is on the output now
      if (pend_l1a) begin
        make_event(tb_l1id, pend_l1a_bc, mu_word, (ev == 3) ? 5 : -1, 0, fr);
        if (ev == 3) n_mis++;
        expect_frame(fr);
        tb_l1id++; ev++; n_l1a++;
        pend_l1a = 0;
      end
      has = '0;
      foreach (cands[i]) cands[i] = '0;
      for (int l = 0; l < 7; l++) begin
        if ($urandom_range(0, 2) == 0 || (t == 100 && l == 2)) begin
          pad_trig_t w;
          w = pad_trig_t'($urandom);
          w.busy_xoff = (t == 100 && l == 2);
          w.rsv_hi = 0; w.rsv8 = 0;
          tw[l] = w; has[l] = 1;
          cands[l] = to_pad_cand(1'b1, w);
        end
      end
      if (t == 140) begin   // clear the Busy-Xoff of PAD 2
        pad_trig_t w;
        w = '0; w.thr = 3'd1; tw[2] = w; has[2] = 1; cands[2] = to_pad_cand(1'b1, w);
      end
      drive_bc(tw, has);
      e_word = model(cands, 3'(tb_bc));
      ref_overlap(cands, ov);
      foreach (ov[i]) if (cands[i].valid && !ov[i].valid) n_ovl++;
      if (e_word.more2) n_more2++;
      expq.push_back(e_word);
      ttc_l1a = (t > 20 && t < 560 && $urandom_range(0, 24) == 0);
      if (ttc_l1a) begin pend_l1a = 1; pend_l1a_bc = tb_bc; end
    end
    @(negedge clk_trig) ttc_l1a = 0;
    if (pend_l1a) begin
      make_event(tb_l1id, pend_l1a_bc, mu_word, -1, 0, fr);
      expect_frame(fr); tb_l1id++; ev++; n_l1a++;
    end
    foreach (tw[i]) tw[i] = 16'h0;
    while (ro_q[0].size() || ro_q[1].size() || ro_q[2].size() || ro_q[3].size() ||
           ro_q[4].size() || ro_q[5].size() || ro_q[6].size()) begin
      @(negedge clk_trig); drive_bc(tw, '0);
    end
    @(negedge clk_trig); drive_bc(tw, '0);
    for (int k = 0; k < 20000 && got.size() < expw.size(); k++) @(negedge clk_trig);
    check(got.size() == expw.size(), $sformatf("phase A: %0d output words, want %0d", got.size(), expw.size()));

    // ---------------- phase B: timeout ----------------
    phase = 1;
    @(negedge clk_trig);
    ttc_l1a = 1; pend_l1a_bc = tb_bc;
    @(negedge clk_trig);
    ttc_l1a = 0;
    make_event(tb_l1id, pend_l1a_bc, mu_word, 3, 1, fr);
    expect_frame(fr); tb_l1id++; ev++; n_l1a++; n_tmo++;
    while (ro_q[0].size() || ro_q[1].size() || ro_q[2].size() || ro_q[4].size() ||
           ro_q[5].size() || ro_q[6].size()) begin
      @(negedge clk_trig); drive_bc(tw, '0);
    end
    @(negedge clk_trig); drive_bc(tw, '0);
    for (int k = 0; k < 20000 && got.size() < expw.size(); k++) @(negedge clk_trig);
    check(got.size() == expw.size(), $sformatf("phase B: %0d output words, want %0d", got.size(), expw.size()));

    // ---------------- phase C: emulation ----------------
    // empty the spy FIFO of the words recorded so far
    for (int k = 0; k < 80; k++) begin
      vrd(8'h84, q);
      if (q[2]) break;
      vrd(8'h8B, q);
    end
    vrd(8'h84, q); check(q[2], "spy FIFO emptied");
    phase = 2;
    vwr(8'h82, 32'd4);                          // low almost-full threshold
    vwr(8'h81, 32'h0000_057F);                  // serializer stopped, emulation off
    begin
      pad_trig_t w1, w4;
      muctpi_word_t mw;
      logic [15:0] pf[$];
      w1 = '0; w1.thr = 3'd5; w1.roi = 2'd2; w1.ovl_phi = 1;
      w4 = '0; w4.thr = 3'd6; w4.roi = 2'd1;
      vwr(8'h8A, 32'h8000_0002);                // strobe: BC-RST
      tx_exp1 = 16'(w1); tx_exp4 = 16'(w4);
      vwr(8'h8A, {2'd0, 3'b0, 3'd1, 8'h0, 16'(w1)});
      vwr(8'h8A, {2'd0, 3'b0, 3'd4, 8'h0, 16'(w4)});
      vwr(8'h8A, 32'h8000_0000);                // strobe: trigger words
      vwr(8'h8A, 32'h8000_0000);
      vwr(8'h8A, 32'h8000_0000);
      vwr(8'h8A, 32'h8000_0000);
      vwr(8'h8A, 32'h8000_0001);                // strobe: LV1A
      // read-out frames of the emulated PADs
      for (int l = 0; l < 7; l++) begin
        vwr(8'h8A, {2'd1, 3'b0, 3'(l), 8'h0, PAD_HDR, 4'(l), 4'(tb_l1id), 4'd6});
        vwr(8'h8A, {2'd1, 3'b0, 3'(l), 8'h0, 16'hC000 + 16'(l)});
        vwr(8'h8A, {2'd1, 3'b0, 3'(l), 8'h0, PAD_FTR, 12'h0});
      end
      vwr(8'h81, 32'h0000_257F);                // emulation on: play
      n_mode++;
      mw = '0;
      mw.cand0 = '{c: '{valid: 1, ovl_phi: 0, hit_opl: 0, thr: 3'd6, roi: 2'd1}, pad: 3'd4};
      mw.cand1 = '{c: '{valid: 1, ovl_phi: 1, hit_opl: 0, thr: 3'd5, roi: 2'd2}, pad: 3'd1};
      mw.bcid  = 3'd2;   // BCID of the clock in which the words reached the links
      fr = {};
      fr.push_back({RX_HDR, 4'h5, 8'(tb_l1id)});
      fr.push_back(mw[31:16]);
      fr.push_back(mw[15:0]);
      for (int l = 0; l < 7; l++) begin
        fr.push_back({PAD_HDR, 4'(l), 4'(tb_l1id), 4'd6});
        fr.push_back(16'hC000 + 16'(l));
        fr.push_back({PAD_FTR, 12'h0});
      end
      fr.push_back({RX_FTR, 12'h0});
      ro_base = expw.size();
      expect_frame(fr); tb_l1id++; n_l1a++;
      // spy FIFO: skip words of earlier phases, find the emulated one
      begin
        bit found = 0;
        repeat (20) @(negedge clk_trig);
        vrd(8'h8B, q);
        found = (q == 32'(mw));
        check(found, "emulated MUCTPI word read from the spy FIFO");
        if (found) n_spy++;
      end
      repeat (200) @(negedge clk_trig);
      check(busy, "Busy from output FIFO occupancy while the serializer is stopped");
      n_stall++;
      // take this frame out through VME instead of the serializer
      vwr(8'h81, 32'h0000_557F);                // read-out frames to VME
      n_mode++;
      begin
        logic [31:0] st;
        int k, tries;
        k = 0; tries = 0;
        while (k < expw.size() - ro_base && tries < 200) begin
          vrd(8'h8D, st);
          tries++;
          if (st[0]) begin
            vrd(8'h8C, q);
            check({st[1], q} == expw[ro_base + k],
                  $sformatf("VME read-out word %0d: %h want %h", k, {st[1], q}, expw[ro_base + k]));
            k++;
          end
        end
        check(k == expw.size() - ro_base, $sformatf("VME read-out words %0d", k));
        if (k == expw.size() - ro_base) n_rovme++;
        vrd(8'h8D, st); check(st == 0, "nothing more held for VME");
        while (expw.size() > ro_base) void'(expw.pop_back());
      end
      repeat (200) @(negedge clk_trig);
      check(!busy, "Busy clears when the output FIFO is read");
      vwr(8'h81, 32'h0000_357F);                // back to the serializer
    end

    // ---------------- results ----------------
    check(got.size() == expw.size(), $sformatf("%0d output words, want %0d", got.size(), expw.size()));
    for (int i = 0; i < expw.size() && i < got.size(); i++)
      check(got[i] == expw[i], $sformatf("output word %0d: %h want %h", i, got[i], expw[i]));
    vrd(8'hA0, q); check(q == 32'(tb_l1id), $sformatf("L1-ID counter %0d want %0d", q, tb_l1id));
    vrd(8'hB5, q); check(q == 32'(n_l1a), $sformatf("built events %0d want %0d", q, n_l1a));
    vrd(8'hB6, q); check(q == 32'd2, $sformatf("events with errors %0d want 2", q));
    vrd(8'hB8, q); check(q == 32'(n_frames) && n_frames + n_rovme == n_l1a, $sformatf("serializer frames %0d", q));
    vrd(8'h84, q); check(q[3], "timeout seen in status");
    check(n_ovl > 0, "overlap removal happened");
    check(n_more2 > 0, "more than two candidates happened");
    check(n_l1a > 10, "LV1A happened");
    check(n_busy_xoff > 0, "Busy from Busy-Xoff happened");
    check(n_busy_fifo > 0, "Busy from FIFO occupancy happened");
    check(n_mis > 0 && n_tmo > 0, "mismatch and timeout happened");
    check(n_mode > 0 && n_spy > 0 && n_stall > 0, "mode switch, spy read and stall happened");
    check(n_rovme > 0, "read-out frame read through VME happened");
    check(n_tx_pair == 1, $sformatf("emulated trigger words on the transmitter outputs together: %0d", n_tx_pair));
    check(n_tx_words == 2 + 7 * 3, $sformatf("words on the transmitter outputs: %0d want 23", n_tx_words));
    $display("events %0d overlap %0d more2 %0d busy(xoff) %0d busy(fifo) %0d mismatch %0d timeout %0d",
             n_l1a, n_ovl, n_more2, n_busy_xoff, n_busy_fifo, n_mis, n_tmo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
