// tb_ttc_counters: self-checking test of the BCID and L1-ID counters.
//
// Runs 5000 clocks with random LV1A, occasional BC-RST and EV-RST, and checks
// the counters, the one-clock l1a_q strobe and the L1-ID/BCID given to each
// accepted event against counters kept here.
module tb_ttc_counters;
  logic clk = 0, rst_n = 0;
  logic l1a = 0, bcr = 0, ecr = 0;
  logic [11:0] bcid, l1id, ev_l1id, ev_bcid;
  logic l1a_q;
  int checks = 0, failures = 0;
  int m_bc = 1, m_l1 = 0, m_evl1 = 0, m_evbc = 0;  // one edge passes after reset release
  int n_bcr = 0, n_ecr = 0;

  always #12.5 clk = ~clk;
  ttc_counters dut (.clk, .rst_n, .l1a, .bc_rst(bcr), .ev_rst(ecr), .bcid, .l1id, .l1a_q, .ev_l1id, .ev_bcid);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      l1a = ($urandom_range(0, 9) == 0);
      bcr = ($urandom_range(0, 299) == 0);
      ecr = ($urandom_range(0, 499) == 0);
      if (bcr) n_bcr++;
      if (ecr) n_ecr++;
      // model of the edge to come
      if (l1a) begin m_evl1 = ecr ? 0 : m_l1; m_evbc = m_bc; end
      m_bc = bcr ? 0 : (m_bc + 1) % 4096;
      if (ecr) m_l1 = l1a ? 1 : 0; else if (l1a) m_l1 = (m_l1 + 1) % 4096;
      @(posedge clk); #1;
      check(bcid == 12'(m_bc), $sformatf("t=%0d bcid %0d want %0d", t, bcid, m_bc));
      check(l1id == 12'(m_l1), $sformatf("t=%0d l1id %0d want %0d", t, l1id, m_l1));
      check(l1a_q == l1a, "l1a_q");
      if (l1a) check(ev_l1id == 12'(m_evl1) && ev_bcid == 12'(m_evbc), $sformatf("t=%0d event tag", t));
    end
    check(n_bcr > 0 && n_ecr > 0, "both resets exercised");
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
