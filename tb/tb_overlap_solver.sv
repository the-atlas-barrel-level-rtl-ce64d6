// tb_overlap_solver: self-checking test of the eta-overlap stage.
//
// Applies 3000 random sets of eight PAD candidates, biased so that adjacent
// PADs often both flag an eta overlap, and compares the registered output
// with the reference model one clock later. Counts how often a duplicate was
// removed and fails if that never happened.
module tb_overlap_solver;
  import sl_pkg::*;
  `include "tb_trig_ref.svh"
  logic clk = 0, rst_n = 0;
  pad_cand_t in [8];
  cand_t out [8], exp_out [8];
  int checks = 0, failures = 0, removed = 0;

  always #12.5 clk = ~clk;
  overlap_solver dut (.clk, .rst_n, .in, .out);

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
        in[i] = pad_cand_t'($urandom);
        in[i].valid = ($urandom_range(0, 2) != 0);
        in[i].ovl_eta = ($urandom_range(0, 1) == 1);
      end
      ref_overlap(in, exp_out);
      foreach (in[i]) if (in[i].valid && !exp_out[i].valid) removed++;
      @(posedge clk); #1;
      foreach (out[i]) check(out[i] == exp_out[i], $sformatf("t=%0d pad %0d: got %h want %h", t, i, out[i], exp_out[i]));
    end
    check(removed > 0, "duplicate removal exercised");
    $display("overlap removals: %0d", removed);
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
