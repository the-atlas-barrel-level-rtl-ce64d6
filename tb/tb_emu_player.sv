// tb_emu_player: self-checking test of the PAD/TTC emulation player.
//
// A queue stands for the emulation FIFO. Random sequences of entries (staged
// trigger words, read-out words, bunch-crossing strobes with TTC bits) are
// played; the test keeps its own staging table and checks, one clock after
// each entry, the link words, valid and flag bits and TTC pulses, and that
// nothing is played while the player is disabled.
module tb_emu_player;
  logic clk = 0, rst_n = 0, en = 0;
  logic [31:0] q[$];
  logic re;
  logic [15:0] ld [8];
  logic [7:0] dv, fl;
  logic l1a, bcr, ecr;
  logic [15:0] st [8];
  logic [7:0] staged = 0;
  int checks = 0, failures = 0, n_strobe = 0;

  always #12.5 clk = ~clk;
  emu_player dut (.clk, .rst_n, .enable(en), .fifo_empty(q.size() == 0),
                  .fifo_data(q.size() ? q[0] : 32'h0), .fifo_re(re),
                  .link_data(ld), .link_dv(dv), .link_flag(fl), .l1a, .bc_rst(bcr), .ev_rst(ecr));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // disabled: nothing is taken
    q.push_back(32'h4000_0001);
    repeat (3) @(negedge clk);
    check(q.size() == 1 && dv == 0, "disabled player takes nothing");
    q = {};
    en = 1;
    for (int t = 0; t < 2000; t++) begin
      logic [31:0] e;
      int k, l;
      k = $urandom_range(0, 2);
      l = $urandom_range(0, 7);
      e = {2'(k), 3'b0, 3'(l), 8'h0, 16'($urandom)};
      q.push_back(e);
      @(posedge clk);
      #1 void'(q.pop_front());
      if (k == 0) begin
        st[l] = e[15:0]; staged[l] = 1;
        check(dv == 0 && !l1a && !bcr && !ecr, "staging sends nothing");
      end else if (k == 1) begin
        check(dv == 8'(1 << l) && fl == 8'(1 << l) && ld[l] == e[15:0], "read-out word sent");
      end else begin
        n_strobe++;
        check(dv == staged && fl == 0, $sformatf("strobe sends staged words %h/%h", dv, staged));
        for (int i = 0; i < 8; i++) if (staged[i]) check(ld[i] == st[i], "staged word");
        check({ecr, bcr, l1a} == e[2:0], "TTC pulses");
        staged = 0;
      end
      @(negedge clk);
    end
    check(n_strobe > 0, "strobes exercised");
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
