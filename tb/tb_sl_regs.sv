// tb_sl_regs: self-checking test of the SL register map.
//
// Drives the register side directly (one-clock write and read pulses) and
// checks the identifier, the reset values and masking of the control
// register, the threshold and scratch registers, the status bits, the
// emulation-FIFO push (only at its address and only when not full), the spy
// FIFO pop (only at its address and only when not empty), the read-out
// port for VME (word, status, pop only when a word is held) and the 32
// monitoring words at 0x20..0x3F.
module tb_sl_regs;
  logic clk = 0, rst_n = 0;
  logic wr = 0, rd = 0;
  logic [6:0] a = 0;
  logic [31:0] wd = 0, rdata;
  logic [7:0] link_en;
  logic [3:0] rxid;
  logic ser_en, emu_mode, emu_we, spy_re, ro_vme, ro_pop;
  logic [3:0] clk_sel;
  logic ro_valid = 0;
  logic [32:0] ro_data = 33'h1_8765_4321;
  logic [15:0] afull;
  logic busy = 0, tmo = 0, emu_full = 0, spy_empty = 0;
  logic [31:0] emu_wdata, spy_data = 32'hCAFE_0001;
  logic [15:0] mon [32];
  int checks = 0, failures = 0, n_emu = 0, n_spy = 0, n_ro = 0;

  always #12.5 clk = ~clk;
  sl_regs #(.AFULL_RST(16'd768)) dut (
    .clk, .rst_n, .reg_wr(wr), .reg_rd(rd), .reg_addr(a), .reg_wdata(wd), .reg_rdata(rdata),
    .link_en, .rxid, .ser_en, .emu_mode, .afull_thr(afull), .clk_sel, .busy, .timeout_seen(tmo),
    .emu_full, .emu_we, .emu_wdata, .spy_empty, .spy_data, .spy_re,
    .ro_vme, .ro_valid, .ro_data, .ro_pop, .mon);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (emu_we) begin n_emu++; check(emu_wdata == wd, "emulation data"); end
    if (spy_re) n_spy++;
    if (ro_pop) n_ro++;
  end

  task automatic wreg(input logic [6:0] ad, input logic [31:0] d);
    @(negedge clk); wr = 1; a = ad; wd = d;
    @(negedge clk); wr = 0;
  endtask
  task automatic rreg(input logic [6:0] ad, output logic [31:0] d);
    @(negedge clk); rd = 1; a = ad; #1 d = rdata;
    @(negedge clk); rd = 0;
  endtask

  initial begin
    logic [31:0] d;
    foreach (mon[i]) mon[i] = 16'(i * 16'h0101 + 16'h11);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rreg(7'h00, d); check(d == 32'h534C5258, "identifier");
    rreg(7'h01, d); check(d == 32'h000010FF, "control reset value");
    check(link_en == 8'hFF && ser_en && !emu_mode && rxid == 0, "control outputs after reset");
    rreg(7'h02, d); check(d == 768 && afull == 768, "threshold reset value");
    wreg(7'h01, 32'hFFFF_2A5C);
    rreg(7'h01, d); check(d == 32'h0000_2A5C, $sformatf("control masked: %h", d));
    check(link_en == 8'h5C && rxid == 4'hA && !ser_en && emu_mode && !ro_vme, "control fields");
    wreg(7'h01, 32'h0000_4000); check(ro_vme && !emu_mode && link_en == 0, "read-out to VME bit");
    wreg(7'h01, 32'hFFFF_2A5C);
    wreg(7'h02, 32'd100); check(afull == 100, "threshold write");
    wreg(7'h03, 32'h1234_5678); rreg(7'h03, d); check(d == 32'h1234_5678, "scratch");
    rreg(7'h05, d); check(d == 0 && clk_sel == 0, "clock selection reset value");
    wreg(7'h05, 32'hFFFF_FFF5); rreg(7'h05, d);
    check(d == 32'h5 && clk_sel == 4'h5, $sformatf("clock selection %h", d));
    busy = 1; tmo = 1; emu_full = 0; spy_empty = 0;
    rreg(7'h04, d); check(d == 32'h9, $sformatf("status %h", d));
    // emulation FIFO push
    wreg(7'h0A, 32'h8000_0001); check(n_emu == 1, "emulation push");
    emu_full = 1;
    wreg(7'h0A, 32'h8000_0002); check(n_emu == 1, "no push when full");
    wreg(7'h0B, 32'h0); wreg(7'h03, 32'h0); check(n_emu == 1, "no push at other addresses");
    // spy FIFO pop
    rreg(7'h0B, d); check(d == 32'hCAFE_0001 && n_spy == 1, "spy read pops");
    spy_empty = 1;
    rreg(7'h0B, d); check(d == 0 && n_spy == 1, "no pop when empty");
    rreg(7'h04, d); check(d == 32'hF, $sformatf("status %h", d));
    rreg(7'h0A, d); check(n_spy == 1, "no pop at other addresses");
    // read-out port
    rreg(7'h0D, d); check(d == 0, "read-out port status: nothing held");
    rreg(7'h0C, d); check(d == 0 && n_ro == 0, "no read-out pop when nothing held");
    ro_valid = 1;
    rreg(7'h0D, d); check(d == 32'h3 && n_ro == 0, $sformatf("read-out port status %h", d));
    rreg(7'h0C, d); check(d == 32'h8765_4321 && n_ro == 1, "read-out word read pops");
    ro_data = 33'h0_0000_00AB;
    rreg(7'h0D, d); check(d == 32'h1, $sformatf("read-out status, not end of frame %h", d));
    rreg(7'h0B, d); check(n_ro == 1, "no read-out pop at other addresses");
    // monitoring
    for (int i = 0; i < 32; i++) begin
      rreg(7'(7'h20 + i), d);
      check(d == {16'h0, mon[i]}, $sformatf("monitor %0d: %h", i, d));
    end
    rreg(7'h15, d); check(d == 0, "unused address reads 0");
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
