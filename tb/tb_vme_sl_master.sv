// tb_vme_sl_master: self-checking test of the VME-FPGA end of the bus.
//
// The master is connected to the SL-side slave (sl_vme_slave) over the 24-bit
// bus, the two running on unrelated clocks (40 MHz and 33 MHz). A register
// array stands behind the slave. Random 32-bit writes and reads are started
// on the master's local port; the test checks the data read back against a
// model of the registers, that done comes once per access, and that the two
// ends never drive the bus together.
module tb_vme_sl_master;
  logic clk = 0, sclk = 0, rst_n = 0;
  logic req = 0, we = 0, busy, done;
  logic [6:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [23:0] bus, m_out, s_out;
  logic m_oe, s_oe, strb, vack, ack;
  logic reg_wr, reg_rd;
  logic [6:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [128];
  int checks = 0, failures = 0, contention = 0, n_done = 0;

  always #12.5 clk = ~clk;
  always #15 sclk = ~sclk;
  assign bus = s_oe ? s_out : (m_oe ? m_out : 24'h0);
  assign reg_rdata = regs[reg_addr];

  vme_sl_master dut (.clk, .rst_n, .req, .we, .addr, .wdata, .rdata, .busy, .done,
                     .bus_in(bus), .bus_out(m_out), .bus_oe(m_oe), .strb, .vack, .ack);
  sl_vme_slave u_slave (.clk(sclk), .rst_n, .bus_in(bus), .bus_out(s_out), .bus_oe(s_oe),
                        .strb, .vack, .ack, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge sclk) if (rst_n && reg_wr) regs[reg_addr] <= reg_wdata;
  always @(posedge clk) begin
    if (rst_n && m_oe && s_oe) contention++;
    if (done) n_done++;
  end

  task automatic access(input bit w, input logic [6:0] a, input logic [31:0] d);
    int n0 = n_done;
    int cyc = 0;
    @(negedge clk);
    req = 1; we = w; addr = a; wdata = d;
    @(negedge clk);
    req = 0;
    while (!done && cyc < 500) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(n_done == n0 + 1, "one done per access");
  endtask

  initial begin
    logic [31:0] model [128];
    foreach (regs[i]) begin regs[i] = 32'($urandom); model[i] = regs[i]; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (4) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      logic [6:0] a;
      logic [31:0] d;
      a = 7'($urandom);
      d = 32'($urandom);
      if ($urandom_range(0, 1)) begin
        access(1, a, d);
        model[a] = d;
        repeat (3) @(posedge sclk);
        check(regs[a] == d, $sformatf("write 0x%0h: reg %h want %h", a, regs[a], d));
      end else begin
        access(0, a, 32'h0);
        check(rdata == model[a], $sformatf("read 0x%0h: got %h want %h", a, rdata, model[a]));
      end
    end
    check(contention == 0, "no bus contention");
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
