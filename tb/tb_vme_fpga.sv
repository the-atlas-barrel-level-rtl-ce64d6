// tb_vme_fpga: self-checking test of the VME FPGA logic.
//
// The VME FPGA is joined to the SL-side bus slave (sl_vme_slave) with a
// register array behind it; a queue stands for the external 8k x 16 FIFO chip
// (first word shown on Q while EF_n is high). Through the decoded VME port the
// test checks the eight internal registers, routing of addresses with bit 7
// set to the SL FPGA (writes and reads), external FIFO writes, reads, flags
// and reset, the G2Link and serializer configuration pins and the JTAG pins
// (TDO looped back from TDI).
module tb_vme_fpga;
  logic clk = 0, sclk = 0, rst_n = 0;
  logic req = 0, we = 0, ack_l;
  logic [7:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [23:0] bus, m_out, s_out;
  logic m_oe, s_oe, strb, vack, ack;
  logic [15:0] extf_d, extf_q;
  logic extf_wen_n, extf_ren_n, extf_rs_n, extf_ef_n, extf_ff_n;
  logic [31:0] g2_cfg;
  logic [7:0] ser_cfg;
  logic tck, tms, tdi;
  logic reg_wr, reg_rd;
  logic [6:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [128];
  logic [15:0] xq[$];
  int checks = 0, failures = 0;
  localparam int XDEPTH = 8192;

  always #12.5 clk = ~clk;
  always #11 sclk = ~sclk;
  assign bus = s_oe ? s_out : (m_oe ? m_out : 24'h0);
  assign reg_rdata = regs[reg_addr];
  assign extf_q    = xq.size() ? xq[0] : 16'h0;
  assign extf_ef_n = (xq.size() != 0);
  assign extf_ff_n = (xq.size() < XDEPTH);

  vme_fpga dut (
    .clk, .rst_n, .lreq(req), .lwe(we), .laddr(addr), .lwdata(wdata), .lrdata(rdata), .lack(ack_l),
    .bus_in(bus), .bus_out(m_out), .bus_oe(m_oe), .strb, .vack, .ack,
    .extf_d, .extf_wen_n, .extf_q, .extf_ren_n, .extf_ef_n, .extf_ff_n, .extf_rs_n,
    .g2_cfg, .ser_cfg, .jtag_tck(tck), .jtag_tms(tms), .jtag_tdi(tdi), .jtag_tdo(tdi));
  sl_vme_slave u_slave (.clk(sclk), .rst_n, .bus_in(bus), .bus_out(s_out), .bus_oe(s_oe),
                        .strb, .vack, .ack, .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata);

  always @(posedge sclk) if (rst_n && reg_wr) regs[reg_addr] <= reg_wdata;
  // external FIFO chip
  always @(posedge clk) if (rst_n) begin
    if (!extf_rs_n) xq = {};
    else begin
      if (!extf_ren_n && xq.size()) void'(xq.pop_front());
      if (!extf_wen_n && xq.size() < XDEPTH) xq.push_back(extf_d);
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic access(input bit w, input logic [7:0] ad, input logic [31:0] d, output logic [31:0] q);
    int cyc = 0;
    @(negedge clk); req = 1; we = w; addr = ad; wdata = d;
    @(negedge clk); req = 0;
    while (!ack_l && cyc < 500) begin @(negedge clk); cyc++; end
    check(ack_l, "access acknowledged");
    q = rdata;
  endtask

  initial begin
    logic [31:0] q;
    logic [31:0] model [128];
    foreach (regs[i]) begin regs[i] = 32'($urandom); model[i] = regs[i]; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (3) @(posedge clk);
    access(0, 8'h00, 0, q); check(q == 32'h564D4546, "identifier");
    access(1, 8'h01, 32'hA5A5_0F0F, q); check(g2_cfg == 32'hA5A5_0F0F, "G2Link configuration pins");
    access(0, 8'h01, 0, q); check(q == 32'hA5A5_0F0F, "G2Link configuration read back");
    access(1, 8'h02, 32'h0000_00C3, q); check(ser_cfg == 8'hC3, "serializer configuration pins");
    access(1, 8'h07, 32'hDEAD_BEEF, q); access(0, 8'h07, 0, q); check(q == 32'hDEAD_BEEF, "scratch");
    access(1, 8'h06, 32'h5, q); check(tck && !tms && tdi, "JTAG pins");
    access(0, 8'h06, 0, q); check(q == 32'hD, "JTAG read with TDO");
    // external FIFO
    access(0, 8'h03, 0, q); check(q == 32'h2, "external FIFO empty");
    for (int i = 0; i < 10; i++) access(1, 8'h04, 32'(16'h4000 + i), q);
    access(0, 8'h03, 0, q); check(q == 32'h3, "external FIFO not empty");
    for (int i = 0; i < 6; i++) begin
      access(0, 8'h04, 0, q); check(q == 32'(16'h4000 + i), $sformatf("external FIFO word %0d: %h", i, q));
    end
    access(1, 8'h05, 32'h1, q);
    @(negedge clk);
    access(0, 8'h03, 0, q); check(q == 32'h2, "external FIFO reset");
    // SL FPGA registers through the bus
    for (int t = 0; t < 60; t++) begin
      logic [6:0] a7;
      logic [31:0] d;
      a7 = 7'($urandom); d = 32'($urandom);
      if (t % 2 == 0) begin
        access(1, {1'b1, a7}, d, q); model[a7] = d;
        repeat (3) @(posedge sclk);
        check(regs[a7] == d, $sformatf("SL write 0x%0h", a7));
      end else begin
        access(0, {1'b1, a7}, 0, q);
        check(q == model[a7], $sformatf("SL read 0x%0h: %h want %h", a7, q, model[a7]));
      end
    end
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
