// tb_async_fifo: self-checking test of the dual-clock FIFO.
//
// Writes 2000 random words with random write enables on a 10 ns clock and
// reads them with random read enables on a 13 ns clock, comparing every word
// with a queue of what was written. A fill phase with reads stopped checks
// that full rises after exactly 2**AW words, that almost_full follows the
// threshold and that further writes are dropped; the FIFO then drains to
// empty with the same words.
module tb_async_fifo;
  localparam int AW = 4;
  localparam int DW = 16;
  logic wclk = 0, rclk = 0, rst_n = 0;
  logic we = 0, re = 0, full, afull, empty;
  logic [DW-1:0] wdata = 0, rdata;
  logic [AW:0] wlevel, rlevel;
  int checks = 0, failures = 0;
  logic [DW-1:0] q[$];
  int nread = 0;
  bit reading = 1;

  always #5 wclk = ~wclk;
  always #6.5 rclk = ~rclk;

  async_fifo #(.DW(DW), .AW(AW)) dut (
    .wclk, .wrst_n(rst_n), .we, .wdata, .afull_thr(5'd12), .full, .almost_full(afull), .wlevel,
    .rclk, .rrst_n(rst_n), .re, .rdata, .empty, .rlevel);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reader: compare the word shown when popping
  always @(posedge rclk) if (rst_n) begin
    if (re && !empty) begin
      check(q.size() > 0 && rdata == q[0], $sformatf("read word %0d: got %h", nread, rdata));
      if (q.size() > 0) void'(q.pop_front());
      nread++;
    end
    re <= reading && ($urandom_range(0, 3) != 0);
  end

  initial begin
    repeat (3) @(posedge wclk);
    @(negedge wclk) rst_n = 1;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(posedge wclk);
      #1;
      if (we && !full) ;  // accounted at the edge below
      we = ($urandom_range(0, 1) == 1);
      wdata = DW'($urandom);
      @(negedge wclk);
      if (we && !full) q.push_back(wdata);
      @(posedge wclk); #1 we = 0;
    end
    // drain
    repeat (100) @(posedge rclk);
    check(empty && q.size() == 0, "FIFO empty after random traffic");
    // fill with reading stopped
    reading = 0;
    repeat (4) @(posedge rclk);
    for (int i = 0; i < 20; i++) begin
      @(negedge wclk);
      we = 1; wdata = DW'(i + 16'h100);
      if (!full) q.push_back(wdata);
      @(posedge wclk); #1 we = 0;
    end
    repeat (4) @(posedge wclk);
    check(full, "full after 20 writes into 16 words");
    check(wlevel == 16, $sformatf("wlevel %0d, want 16", wlevel));
    check(afull, "almost_full at level 16 >= 12");
    check(q.size() == 16, "16 words accepted");
    reading = 1;
    repeat (100) @(posedge rclk);
    check(empty && !full && !afull, "empty after drain");
    check(nread > 500, $sformatf("words read %0d", nread));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
