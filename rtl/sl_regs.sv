// sl_regs: register map of the SL FPGA, in the VME clock region.
//
// Reached through sl_vme_slave with a 7-bit address; all entries are 32 bits.
// The board uses its VME access for monitoring (counters, FIFO occupancy) and
// for tests, where PAD words and TTC signals can be emulated and the MUCTPI
// output can be read. The map below is this design's:
//   0x00 RO  identifier 0x534C5258
//   0x01 RW  control: [7:0] link enable, [11:8] RXID, [12] serializer
//            enable, [13] emulation mode (link inputs taken from the
//            emulation FIFO instead of the optical links), [14] read-out
//            frames to VME instead of the serializer       reset 0x000010FF
//   0x02 RW  FIFO almost-full threshold for Busy              reset AFULL_RST
//   0x03 RW  scratch
//   0x04 RO  status: [0] busy, [1] emulation FIFO full, [2] spy FIFO empty,
//            [3] event-builder timeout seen
//   0x05 RW  clock selection, driven out to the board's clock multiplexers:
//            [0] trigger region 0 TTC / 1 local, [2:1] event-building
//            region 0 TTC / 1 local / 2 local x2, [3] serializer region
//            0 TTC / 1 local                                   reset 0
//   0x0A WO  emulation FIFO: push one entry (see emu_player)
//   0x0B RO  MUCTPI spy FIFO: pop one recorded 32-bit MUCTPI word
//   0x0C RO  read-out word held for VME (see ro_vme_port): reading takes it
//   0x0D RO  read-out port status: [0] a word is held, [1] it ends a frame
//   0x20+i RO monitoring value mon[i], i = 0..31 (zero-extended)
// Other addresses read as 0. Control values cross to the other clock regions
// as quasi-static levels.
//
// Timing: reg_rdata is combinational on reg_addr; writes and pops take effect
// at the clk edge that ends the reg_wr / reg_rd pulse.
module sl_regs #(
  parameter logic [15:0] AFULL_RST = 16'd768
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        reg_wr,
  input  logic        reg_rd,
  input  logic [6:0]  reg_addr,
  input  logic [31:0] reg_wdata,
  output logic [31:0] reg_rdata,
  // control
  output logic [7:0]  link_en,
  output logic [3:0]  rxid,
  output logic        ser_en,
  output logic        emu_mode,
  output logic        ro_vme,
  output logic [15:0] afull_thr,
  output logic [3:0]  clk_sel,
  // status
  input  logic        busy,
  input  logic        timeout_seen,
  // emulation FIFO (write side)
  input  logic        emu_full,
  output logic        emu_we,
  output logic [31:0] emu_wdata,
  // MUCTPI spy FIFO (read side)
  input  logic        spy_empty,
  input  logic [31:0] spy_data,
  output logic        spy_re,
  // read-out words for VME (ro_vme_port)
  input  logic        ro_valid,
  input  logic [32:0] ro_data,
  output logic        ro_pop,
  // monitoring
  input  logic [15:0] mon [32]
);
  localparam logic [31:0] ID = 32'h534C_5258;
  logic [31:0] ctrl, scratch;

  assign link_en  = ctrl[7:0];
  assign rxid     = ctrl[11:8];
  assign ser_en   = ctrl[12];
  assign emu_mode = ctrl[13];
  assign ro_vme   = ctrl[14];

  assign emu_we    = reg_wr && reg_addr == 7'h0A && !emu_full;
  assign emu_wdata = reg_wdata;
  assign spy_re    = reg_rd && reg_addr == 7'h0B && !spy_empty;
  assign ro_pop    = reg_rd && reg_addr == 7'h0C && ro_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl <= 32'h0000_10FF; afull_thr <= AFULL_RST; scratch <= '0; clk_sel <= '0;
    end else if (reg_wr) begin
      unique case (reg_addr)
        7'h01: ctrl      <= reg_wdata & 32'h0000_7FFF;
        7'h02: afull_thr <= reg_wdata[15:0];
        7'h03: scratch   <= reg_wdata;
        7'h05: clk_sel   <= reg_wdata[3:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr[6:5] == 2'b01) reg_rdata = {16'h0, mon[reg_addr[4:0]]};
    else begin
      unique case (reg_addr)
        7'h00: reg_rdata = ID;
        7'h01: reg_rdata = ctrl;
        7'h02: reg_rdata = {16'h0, afull_thr};
        7'h03: reg_rdata = scratch;
        7'h05: reg_rdata = {28'h0, clk_sel};
        7'h04: reg_rdata = {28'h0, timeout_seen, spy_empty, emu_full, busy};
        7'h0B: reg_rdata = spy_empty ? 32'h0 : spy_data;
        7'h0C: reg_rdata = ro_valid ? ro_data[31:0] : 32'h0;
        7'h0D: reg_rdata = {30'h0, ro_data[32] && ro_valid, ro_valid};
        default: ;
      endcase
    end
  end
endmodule
