// tb_busy_logic: self-checking test of the Busy generation.
//
// Applies random almost-full flags, Busy-Xoff bits and link enables and
// checks Busy one clock later (three clocks for the output FIFO flag, which
// is synchronized), and the count of busy clocks.
module tb_busy_logic;
  logic clk = 0, rst_n = 0;
  logic [7:0] en = 0, in_af = 0, xoff = 0;
  logic trig_af = 0, out_af = 0, busy;
  logic [15:0] bcount;
  int checks = 0, failures = 0, n_busy = 0, exp_count = 0;
  bit hist_out [3] = '{0, 0, 0};

  always #12.5 clk = ~clk;
  busy_logic dut (.clk, .rst_n, .link_en(en), .in_afull(in_af), .pad_xoff(xoff),
                  .trig_afull(trig_af), .out_afull_async(out_af), .busy, .busy_count(bcount));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      bit e;
      en    = 8'($urandom);
      in_af = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h0;
      xoff  = ($urandom_range(0, 3) == 0) ? 8'(1 << $urandom_range(0, 7)) : 8'h0;
      trig_af = ($urandom_range(0, 9) == 0);
      if (t % 50 == 0) out_af = ~out_af;
      hist_out[2] = hist_out[1]; hist_out[1] = hist_out[0]; hist_out[0] = out_af;
      e = |(en & (in_af | xoff)) | trig_af | hist_out[2];
      @(posedge clk); #1;
      check(busy == e, $sformatf("t=%0d busy %b want %b en %h af %h xo %h tf %b h %b", t, busy, e, en, in_af, xoff, trig_af, hist_out[2]));
      @(negedge clk);
      check(bcount == 16'(n_busy), "busy count");   // counts busy clocks before this one
      if (busy) n_busy++;
    end
    check(n_busy > 0 && n_busy < 3000, "busy both set and clear");
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
