// tb_sl_vme_slave: self-checking test of the SL end of the inter-FPGA bus.
//
// A master written here, clocked at 40 MHz against the slave's 33 MHz, makes
// random 32-bit writes and reads, each as two 16-bit transfers (low half
// first) with the strb / ack / vack sequences. A register array stands for
// the register map. The test checks that each 32-bit write reaches the
// register side once with the right address and data, that each 32-bit read
// raises exactly one read pulse and returns the register's value, and that
// the two ends never drive the bus together.
module tb_sl_vme_slave;
  logic clk = 0, mclk = 0, rst_n = 0;
  logic [23:0] bus, m_out = 0, s_out;
  logic m_oe = 0, s_oe, strb = 0, vack = 0, ack;
  logic reg_wr, reg_rd;
  logic [6:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [128];
  int checks = 0, failures = 0, n_wr = 0, n_rd = 0, contention = 0;

  always #15 clk = ~clk;
  always #12.5 mclk = ~mclk;
  assign bus = m_oe ? m_out : (s_oe ? s_out : 24'h0);
  assign reg_rdata = regs[reg_addr];

  sl_vme_slave dut (.clk, .rst_n, .bus_in(bus), .bus_out(s_out), .bus_oe(s_oe),
                    .strb, .vack, .ack, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (reg_wr) begin regs[reg_addr] <= reg_wdata; n_wr++; end
    if (reg_rd) n_rd++;
    if (m_oe && s_oe) contention++;
  end

  task automatic xfer(input bit rd, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    @(posedge mclk);
    m_out <= {rd, a, d}; m_oe <= 1; strb <= 1;
    do @(posedge mclk); while (!ack);
    m_oe <= 0; strb <= 0;
    do @(posedge mclk); while (ack);
    q = bus[15:0];
    if (rd) begin
      vack <= 1;
      do @(posedge mclk); while (!ack);
      vack <= 0;
      do @(posedge mclk); while (ack);
    end
  endtask

  task automatic write32(input logic [6:0] a, input logic [31:0] d);
    logic [15:0] q;
    xfer(0, a, d[15:0], q);
    xfer(0, a, d[31:16], q);
  endtask

  task automatic read32(input logic [6:0] a, output logic [31:0] d);
    logic [15:0] lo, hi;
    xfer(1, a, 16'h0, lo);
    xfer(1, a, 16'h0, hi);
    d = {hi, lo};
  endtask

  initial begin
    logic [31:0] model [128];
    foreach (regs[i]) begin regs[i] = 32'($urandom); model[i] = regs[i]; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      logic [6:0] a;
      logic [31:0] d, q;
      int w0, r0;
      a = 7'($urandom);
      if ($urandom_range(0, 1)) begin
        d = 32'($urandom);
        w0 = n_wr;
        write32(a, d);
        model[a] = d;
        repeat (4) @(posedge clk);
        check(n_wr == w0 + 1, "one register write per 32-bit write");
        check(regs[a] == d, $sformatf("write 0x%0h: reg %h want %h", a, regs[a], d));
      end else begin
        r0 = n_rd;
        read32(a, q);
        check(n_rd == r0 + 1, "one read pulse per 32-bit read");
        check(q == model[a], $sformatf("read 0x%0h: got %h want %h", a, q, model[a]));
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
