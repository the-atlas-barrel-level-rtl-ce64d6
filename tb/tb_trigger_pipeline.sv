// tb_trigger_pipeline: self-checking test of the sector trigger pipeline.
//
// Every clock (one bunch crossing) a random set of PAD candidates and a BCID
// is applied; the expected MUCTPI word is computed by the reference model
// (overlap removal, best candidate, next best, more-than-two flag) and
// compared four clocks later, the pipeline's latency from its inputs. Single
// isolated candidates check that the word appears on exactly the fourth edge.
// Overlap removals and more-than-two events are counted and must occur.
module tb_trigger_pipeline;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"
  logic clk = 0, rst_n = 0;
  pad_cand_t cand [8];
  logic [2:0] bcid = 0;
  muctpi_word_t mu_word, e_word;
  muctpi_word_t expq[$];
  cand_t ov [8];
  sel_cand_t f;
  int checks = 0, failures = 0, n_ovl = 0, n_more2 = 0, lat_ok = 0;

  always #12.5 clk = ~clk;
  trigger_pipeline dut (.clk, .rst_n, .cand, .bcid, .mu_word);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

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

  initial begin
    foreach (cand[i]) cand[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // latency: one candidate, then silence
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      foreach (cand[i]) cand[i] = '0;
      cand[k] = '{valid: 1, ovl_eta: 0, ovl_phi: 1, hit_opl: 0, thr: 3'(k % 7 + 1), roi: 2'(k)};
      bcid = 3'(k);
      @(negedge clk);
      foreach (cand[i]) cand[i] = '0;
      for (int e = 1; e <= 6; e++) begin
        if (e == 4) begin
          check(mu_word.cand0.c.valid && mu_word.cand0.pad == 3'(k) && mu_word.bcid == 3'(k),
                $sformatf("latency: PAD %0d word not out after 4 edges", k));
          if (mu_word.cand0.c.valid) lat_ok++;
        end else begin
          check(!mu_word.cand0.c.valid || e > 4 && 0, $sformatf("latency: word present at edge %0d", e));
        end
        @(negedge clk);
      end
    end
    // random traffic
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      foreach (cand[i]) begin
        cand[i] = pad_cand_t'($urandom);
        cand[i].valid = ($urandom_range(0, 2) == 0);
      end
      bcid = 3'($urandom);
      e_word = model(cand, bcid);
      ref_overlap(cand, ov);
      foreach (cand[i]) if (cand[i].valid && !ov[i].valid) n_ovl++;
      if (e_word.more2) n_more2++;
      expq.push_back(e_word);
      if (expq.size() == 5) begin
        e_word = expq.pop_front();
        check(mu_word == e_word, $sformatf("t=%0d got %h want %h", t, mu_word, e_word));
      end
    end
    check(n_ovl > 0 && n_more2 > 0, "overlap and more-than-two exercised");
    $display("overlap removals %0d, more-than-two %0d, latency checks %0d", n_ovl, n_more2, lat_ok);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
