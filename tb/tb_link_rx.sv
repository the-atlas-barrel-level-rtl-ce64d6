// tb_link_rx: self-checking test of one link receiver.
//
// Drives 500 random link words (trigger and read-out, with and without data
// valid) and checks, one clock later, the 9-bit candidate, the read-out write
// strobe and data, the held Busy-Xoff bit and the trigger word count against
// values computed here from the 16-bit word format.
module tb_link_rx;
  import sl_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [15:0] d = 0;
  logic dv = 0, fl = 0;
  pad_cand_t cand;
  logic ro_we, xoff;
  logic [15:0] ro_data, cnt;
  int checks = 0, failures = 0;
  logic exp_xoff = 0;
  int unsigned exp_cnt = 0;

  always #12.5 clk = ~clk;

  link_rx dut (.clk, .rst_n, .link_data(d), .link_dv(dv), .link_flag(fl),
               .cand, .ro_we, .ro_data, .busy_xoff(xoff), .trig_count(cnt));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d  = 16'($urandom);
      dv = ($urandom_range(0, 3) != 0);
      fl = ($urandom_range(0, 1) == 1);
      @(posedge clk); #1;
      if (dv && !fl) begin exp_xoff = d[15]; exp_cnt++; end
      check(cand.valid == (dv && !fl), "candidate valid");
      if (dv && !fl)
        check({cand.ovl_eta, cand.ovl_phi, cand.hit_opl, cand.thr, cand.roi} == d[7:0],
              $sformatf("candidate fields %h for word %h", cand, d));
      check(ro_we == (dv && fl), "read-out strobe");
      if (dv && fl) check(ro_data == d, "read-out data");
      check(xoff == exp_xoff, "busy_xoff held");
      check(cnt == 16'(exp_cnt), "trigger word count");
    end
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
