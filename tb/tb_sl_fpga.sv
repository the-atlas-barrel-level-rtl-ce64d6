// tb_sl_fpga: test of the SL FPGA on its own, with its reset settings (all
// eight links enabled, RXID 0, serializer on) and no VME traffic.
//
// 800 bunch crossings of random PAD trigger words on all eight links, with
// random LV1A and TTC BC-RST / EV-RST at the start. Every MUCTPI word is
// compared with the reference model five clocks after its link words; after
// each LV1A every PAD sends a read-out frame between its trigger words, and
// every SL/RX frame leaving on the serializer bits is compared with one built
// here. The event-building region runs at 80 MHz, the serializer at 40 MHz.
// Busy must stay low throughout (the FIFOs never fill).
module tb_sl_fpga;
  logic [15:0] tx_data [sl_pkg::NPAD];
  logic [sl_pkg::NPAD-1:0] tx_dv, tx_flag;
  logic [3:0] clk_sel;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"

  logic rst_n = 0, clk_trig = 0, clk_eb = 0, clk_ser = 0, clk_vme = 0;
  logic [15:0] link_data [NPAD];
  logic [NPAD-1:0] link_dv = 0, link_flag = 0;
  logic ttc_l1a = 0, ttc_bc_rst = 0, ttc_ev_rst = 0;
  muctpi_word_t mu_word;
  logic [39:0] ser_data;
  logic busy, bus_oe, ack;
  logic [23:0] bus_out;

  always #12.5 clk_trig = ~clk_trig;
  always #6.25 clk_eb   = ~clk_eb;
  always #12.7 clk_ser  = ~clk_ser;
  always #12.3 clk_vme  = ~clk_vme;

  sl_fpga dut (.rst_n, .clk_trig, .clk_eb, .clk_ser, .clk_vme,
               .link_data, .link_dv, .link_flag, .ttc_l1a, .ttc_bc_rst, .ttc_ev_rst,
               .mu_word, .busy, .ser_data, .tx_data, .tx_dv, .tx_flag, .clk_sel,
               .bus_in(24'h0), .bus_out, .bus_oe, .strb(1'b0), .vack(1'b0), .ack);

  int checks = 0, failures = 0, n_l1a = 0, n_busy = 0, n_more2 = 0, n_ovl = 0;
  logic [32:0] expw[$], got[$];
  logic [15:0] ro_q [NPAD][$];
  int tb_bc = 0, tb_l1id = 0;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk_trig) if (rst_n) begin
    tb_bc = ttc_bc_rst ? 0 : (tb_bc + 1) % 4096;
    if (busy) n_busy++;
  end
  always @(posedge clk_ser) if (rst_n && ser_data[32]) got.push_back({ser_data[33], ser_data[31:0]});

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

  task automatic make_event(input int l1id, input int bcid, input muctpi_word_t tw);
    logic [15:0] fr[$];
    fr = {};
    fr.push_back({RX_HDR, 4'h0, 8'(l1id)});
    fr.push_back(tw[31:16]);
    fr.push_back(tw[15:0]);
    for (int l = 0; l < 8; l++) begin
      int ncm;
      ro_q[l].push_back({PAD_HDR, 4'(l), 4'(l1id), 4'(bcid)}); fr.push_back(ro_q[l][$]);
      ncm = $urandom_range(1, 8);
      for (int k = 0; k < ncm; k++) begin
        ro_q[l].push_back({4'hC, 12'($urandom)}); fr.push_back(ro_q[l][$]);
      end
      ro_q[l].push_back({PAD_FTR, 12'h0}); fr.push_back(ro_q[l][$]);
    end
    fr.push_back({RX_FTR, 12'h0});
    for (int i = 0; i < fr.size(); i += 2)
      expw.push_back({i + 2 >= fr.size(), fr[i], (i + 1 < fr.size()) ? fr[i+1] : 16'h0000});
  endtask

  function automatic bit ro_left();
    foreach (ro_q[l]) if (ro_q[l].size()) return 1;
    return 0;
  endfunction

  initial begin
    muctpi_word_t expq[$];
    muctpi_word_t e_word;
    pad_cand_t cands [8];
    cand_t ov [8];
    bit pend;
    int pend_bc;
    foreach (link_data[i]) link_data[i] = 16'h0;
    repeat (4) @(posedge clk_trig);
    @(negedge clk_trig) rst_n = 1;
    repeat (6) @(negedge clk_trig);
    ttc_bc_rst = 1; ttc_ev_rst = 1;
    @(negedge clk_trig);
    ttc_bc_rst = 0; ttc_ev_rst = 0;
    pend = 0;
    for (int t = 0; t < 800 || ro_left() || expq.size(); t++) begin
      @(negedge clk_trig);
      if (expq.size() == 5 || (t >= 800 && expq.size())) begin
        e_word = expq.pop_front();
        check(mu_word == e_word, $sformatf("t=%0d MUCTPI word %h want %h", t, mu_word, e_word));
      end
      if (pend) begin make_event(tb_l1id, pend_bc, mu_word); tb_l1id++; n_l1a++; pend = 0; end
      foreach (cands[i]) cands[i] = '0;
      for (int l = 0; l < 8; l++) begin
        if (t < 800 && $urandom_range(0, 3) == 0) begin
          pad_trig_t w;
          w = pad_trig_t'($urandom);
          w.busy_xoff = 0;
          link_data[l] = w; link_dv[l] = 1; link_flag[l] = 0;
          cands[l] = to_pad_cand(1'b1, w);
        end else if (ro_q[l].size()) begin
          link_data[l] = ro_q[l].pop_front(); link_dv[l] = 1; link_flag[l] = 1;
        end else begin
          link_dv[l] = 0; link_flag[l] = 0;
        end
      end
      if (t < 800) begin
        e_word = model(cands, 3'(tb_bc));
        ref_overlap(cands, ov);
        foreach (ov[i]) if (cands[i].valid && !ov[i].valid) n_ovl++;
        if (e_word.more2) n_more2++;
        expq.push_back(e_word);
      end
      ttc_l1a = (t > 10 && t < 780 && $urandom_range(0, 19) == 0);
      if (ttc_l1a) begin pend = 1; pend_bc = tb_bc; end
    end
    @(negedge clk_trig) link_dv = 0; ttc_l1a = 0;
    for (int k = 0; k < 20000 && got.size() < expw.size(); k++) @(negedge clk_trig);
    repeat (50) @(negedge clk_trig);
    check(got.size() == expw.size(), $sformatf("%0d output words, want %0d", got.size(), expw.size()));
    for (int i = 0; i < expw.size() && i < got.size(); i++)
      check(got[i] == expw[i], $sformatf("output word %0d: %h want %h", i, got[i], expw[i]));
    check(n_busy == 0, "Busy stayed low");
    check(n_l1a > 10 && n_ovl > 0 && n_more2 > 0, "LV1A, overlap removal and more than two exercised");
    $display("events %0d overlap %0d more2 %0d", n_l1a, n_ovl, n_more2);
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
