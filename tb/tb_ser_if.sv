// tb_ser_if: self-checking test of the serializer-region reader.
//
// A queue stands for the output FIFO (first word shown while not empty).
// Random frames of 32-bit words are offered; with random enable gaps the test
// checks that each word appears once, in order, on the 40 serializer bits with
// the valid and last-word bits, one word per clock at most, and that the word
// and frame counters agree.
module tb_ser_if;
  logic clk = 0, rst_n = 0, en = 0, re;
  logic [32:0] q[$];
  logic [32:0] exp[$];
  logic [39:0] sd;
  logic [15:0] wc, fc;
  int checks = 0, failures = 0, nframes = 0, nwords = 0;

  always #12.5 clk = ~clk;
  ser_if dut (.clk, .rst_n, .enable(en), .of_empty(q.size() == 0),
              .of_data(q.size() ? q[0] : 33'h0), .of_re(re), .ser_data(sd),
              .word_count(wc), .frame_count(fc));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (re) void'(q.pop_front());
  end

  always @(negedge clk) if (rst_n) begin
    if (sd[32]) begin
      check(exp.size() > 0 && sd[33:0] == {exp[0][32], 1'b1, exp[0][31:0]}, $sformatf("word %0d got %h", nwords, sd));
      check(sd[39:34] == 0, "spare bits zero");
      if (exp.size()) void'(exp.pop_front());
      nwords++;
      if (sd[33]) nframes++;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int f = 0; f < 100; f++) begin
      int n;
      n = $urandom_range(1, 9);
      for (int i = 0; i < n; i++) begin
        logic [32:0] w;
        w = {(i == n - 1) ? 1'b1 : 1'b0, 32'($urandom)};
        q.push_back(w); exp.push_back(w);
      end
    end
    while (q.size() > 0) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
    end
    repeat (3) @(negedge clk);
    check(exp.size() == 0, "all words sent");
    check(wc == 16'(nwords) && fc == 16'(nframes) && nframes == 100, $sformatf("counters %0d %0d model %0d %0d", wc, fc, nwords, nframes));
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
