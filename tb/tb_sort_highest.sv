// tb_sort_highest: self-checking test of the first-candidate matrix comparator.
//
// Applies 3000 random candidate sets (few thresholds, so that ties are
// frequent) and checks, one clock later, the selected candidate with its PAD
// number and the passed-on array with exactly the winner removed.
module tb_sort_highest;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"
  logic clk = 0, rst_n = 0;
  cand_t in [8], rest [8];
  sel_cand_t first, e_first;
  cand_t e_rest [8];
  int checks = 0, failures = 0, ties = 0;

  always #12.5 clk = ~clk;
  sort_highest dut (.clk, .rst_n, .in, .first, .rest);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    foreach (in[i]) in[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      foreach (in[i]) begin
        in[i] = cand_t'($urandom);
        in[i].valid = ($urandom_range(0, 2) == 0);
        in[i].thr = 3'($urandom_range(1, 3));
      end
      e_first = ref_best(in, -1);
      e_rest = in;
      if (e_first.c.valid) e_rest[e_first.pad].valid = 1'b0;
      for (int i = 0; i < 8; i++)
        if (e_first.c.valid && i > int'(e_first.pad) && in[i].valid && in[i].thr == e_first.c.thr) begin ties++; break; end
      @(posedge clk); #1;
      check(first == e_first, $sformatf("t=%0d first got %h want %h", t, first, e_first));
      foreach (rest[i]) check(rest[i] == e_rest[i], $sformatf("t=%0d rest %0d", t, i));
    end
    check(ties > 0, "equal-threshold ties exercised");
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
