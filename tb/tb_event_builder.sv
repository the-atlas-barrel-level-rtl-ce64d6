// tb_event_builder: self-checking test of the read-out event builder.
//
// Queues stand for the trigger FIFO, the eight input FIFOs and the output
// FIFO (which reports full on random clocks). 60 events are built with links
// 0..6 enabled and link 7 disabled. PAD frames carry 1 to 8 CM frames of
// random length. Some events are damaged on purpose: a wrong L1-ID/BC-ID in a
// PAD header, a stray word ahead of a PAD header, or a link that sends
// nothing (timeout). The expected SL/RX frame of every event, error code
// included, is built here and compared with the packed 32-bit output words.
// Each mechanism (mismatch, stray word, timeout, output-full stall, odd and
// even frame lengths) is counted and must occur.
module tb_event_builder;
  import sl_pkg::*;
  localparam int TMO = 64;
  logic clk = 0, rst_n = 0;
  logic [7:0] link_en = 8'h7F;
  logic [3:0] rxid = 4'hA;
  logic tf_empty, tf_re, of_full = 0, of_we;
  trig_entry_t tf_data;
  logic [7:0] if_empty, if_re;
  logic [15:0] if_data [8];
  logic [32:0] of_data;
  logic [15:0] ev_count, err_count;
  logic timeout_seen;

  trig_entry_t tq[$];
  logic [15:0] iq[8][$];
  logic [32:0] got[$], expw[$];
  int checks = 0, failures = 0;
  int n_mis = 0, n_stray = 0, n_tmo = 0, n_stall = 0, n_odd = 0, n_even = 0, n_err_ev = 0;

  always #6.25 clk = ~clk;

  event_builder #(.N(8), .TIMEOUT(TMO)) dut (
    .clk, .rst_n, .link_en, .rxid, .tf_empty, .tf_data, .tf_re,
    .if_empty, .if_data, .if_re, .of_full, .of_we, .of_data,
    .ev_count, .err_count, .timeout_seen);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic void refresh();
    tf_empty = (tq.size() == 0);
    tf_data  = tq.size() ? tq[0] : '0;
    for (int i = 0; i < 8; i++) begin
      if_empty[i] = (iq[i].size() == 0);
      if_data[i]  = iq[i].size() ? iq[i][0] : 16'h0;
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      if (of_we) got.push_back(of_data);
      if (of_full) n_stall++;
      if (tf_re && tq.size()) void'(tq.pop_front());
      for (int i = 0; i < 8; i++) if (if_re[i] && iq[i].size()) void'(iq[i].pop_front());
    end
    #1 refresh();
    of_full = ($urandom_range(0, 4) == 0);
  end

  // pack a 16-bit frame into the expected 32-bit output words
  task automatic expect_frame(input logic [15:0] w[$]);
    if (w.size() % 2) n_odd++; else n_even++;
    for (int i = 0; i < w.size(); i += 2) begin
      bit last = (i + 2 >= w.size());
      expw.push_back({last, w[i], (i + 1 < w.size()) ? w[i+1] : 16'h0000});
    end
  endtask

  initial begin
    refresh();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int e = 0; e < 60; e++) begin
      trig_entry_t te;
      logic [15:0] fr[$];
      logic [7:0] err;
      bit tmo;
      int kind, bad;
      te.l1id = 12'(e + 100);
      te.bcid = 12'($urandom);
      te.trig = muctpi_word_t'($urandom);
      kind = (e % 4 == 3) ? $urandom_range(1, 3) : 0;   // 1 mismatch, 2 stray, 3 timeout
      bad  = $urandom_range(0, 6);
      err = '0; tmo = 0;
      fr = {};
      fr.push_back({RX_HDR, rxid, te.l1id[7:0]});
      fr.push_back(te.trig[31:16]);
      fr.push_back(te.trig[15:0]);
      @(negedge clk);
      for (int l = 0; l < 8; l++) begin
        logic [15:0] pf[$];
        int ncm;
        if (!link_en[l]) begin
          if ($urandom_range(0, 1)) iq[l].push_back(16'h5000);   // ignored: link disabled
          continue;
        end
        if (kind == 3 && l == bad) begin err[l] = 1; tmo = 1; n_tmo++; continue; end
        if (kind == 2 && l == bad) begin iq[l].push_back(16'h1234); err[l] = 1; n_stray++; end
        pf = {};
        pf.push_back({PAD_HDR, 4'(l), te.l1id[3:0], te.bcid[3:0]});
        if (kind == 1 && l == bad) begin pf[0][3:0] = pf[0][3:0] + 4'd1; err[l] = 1; n_mis++; end
        ncm = $urandom_range(1, 8);
        for (int c = 0; c < ncm; c++) begin
          int len = $urandom_range(1, 4);
          for (int k = 0; k < len; k++) pf.push_back({4'hC, 12'($urandom)});
        end
        pf.push_back({PAD_FTR, 12'h000});
        foreach (pf[k]) begin iq[l].push_back(pf[k]); fr.push_back(pf[k]); end
      end
      fr.push_back({RX_FTR, 12'({tmo, err})});
      if (|err) n_err_ev++;
      expect_frame(fr);
      tq.push_back(te);
      refresh();
      // wait for the event to be built
      while (ev_count != 16'(e + 1)) @(negedge clk);
      // the disabled link's leftovers are never read
      iq[7] = {};
      refresh();
    end
    repeat (5) @(negedge clk);
    check(got.size() == expw.size(), $sformatf("output words %0d, want %0d", got.size(), expw.size()));
    for (int i = 0; i < expw.size() && i < got.size(); i++)
      check(got[i] == expw[i], $sformatf("word %0d got %h want %h", i, got[i], expw[i]));
    check(ev_count == 60, "event count");
    check(err_count == 16'(n_err_ev), $sformatf("error count %0d want %0d", err_count, n_err_ev));
    check(timeout_seen == (n_tmo > 0), "timeout flag");
    check(n_mis > 0 && n_stray > 0 && n_tmo > 0, "mismatch, stray word and timeout exercised");
    check(n_stall > 0 && n_odd > 0 && n_even > 0, "stall, odd and even frames exercised");
    $display("mismatch %0d stray %0d timeout %0d stall %0d odd %0d even %0d", n_mis, n_stray, n_tmo, n_stall, n_odd, n_even);
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
