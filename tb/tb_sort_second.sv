// tb_sort_second: self-checking test of the second-candidate comparator.
//
// Applies 3000 random sets of the candidates left after the first stage,
// with a random first candidate to be delayed, and checks one clock later the
// second candidate, the delayed first one and the "more than two" flag (set
// when two or more candidates remain). Counts how often the flag was set.
module tb_sort_second;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"
  logic clk = 0, rst_n = 0;
  cand_t in [8];
  sel_cand_t first_in, first, second, e_second, e_first;
  logic more2;
  bit e_more2;
  int checks = 0, failures = 0, n_more2 = 0;

  always #12.5 clk = ~clk;
  sort_second dut (.clk, .rst_n, .in, .first_in, .first, .second, .more2);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    foreach (in[i]) in[i] = '0;
    first_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      foreach (in[i]) begin
        in[i] = cand_t'($urandom);
        in[i].valid = ($urandom_range(0, 3) == 0);
      end
      first_in = sel_cand_t'($urandom);
      e_first  = first_in;
      e_second = ref_best(in, -1);
      e_more2  = ref_count(in) >= 2;
      if (e_more2) n_more2++;
      @(posedge clk); #1;
      check(second == e_second, $sformatf("t=%0d second got %h want %h", t, second, e_second));
      check(first == e_first, "first delayed");
      check(more2 == e_more2, $sformatf("t=%0d more2", t));
    end
    check(n_more2 > 0, "more-than-two flag exercised");
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
