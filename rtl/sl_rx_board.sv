// sl_rx_board: the Sector-Logic/RX board, off-detector trigger and read-out
// board of one trigger sector of the ATLAS barrel level-1 muon trigger.
//
// Eight optical links bring the PAD trigger words and read-out frames of the
// sector's six to eight trigger towers. The SL FPGA (sl_fpga) runs the sector
// trigger and sends a 32-bit word per bunch crossing to the MUCTPI, and builds
// the read-out events sent through the serializer to the ROD. The VME FPGA
// (vme_fpga) serves the VME crate's single-board computer and reaches the SL
// FPGA over a 24-bit bus (16 data, 7 address, 1 read/write) with its
// handshake lines; the bus is wired here as the board traces are, the SL
// FPGA's drivers taking the bus while it reads back data. Parts outside the
// two FPGAs (G2Link receiver cards, serializer chip, external FIFO chip, clock
// generation and selection, VME64x bus interface) are outside this module:
// their signals are ports.
//
// Clocks: clk_trig (input FIFOs and trigger, TTC or local), clk_eb (event
// building, TTC, local or 2 x local), clk_ser (serializer, TTC or local),
// clk_local (VME region and VME FPGA, 40 MHz local quartz).
// rst_local is rst_n released in step with clk_local; it resets the VME FPGA
// asynchronously and also switches off the bus-ownership assertion during
// reset, which is why it is seen both as an asynchronous reset and as a
// sampled signal.
module sl_rx_board
  import sl_pkg::*;
(
  input  logic            rst_n,
  input  logic            clk_trig,
  input  logic            clk_eb,
  input  logic            clk_ser,
  input  logic            clk_local,
  // optical links, from the G2Link receiver cards
  input  logic [15:0]     link_data [NPAD],
  input  logic [NPAD-1:0] link_dv,
  input  logic [NPAD-1:0] link_flag,
  // TTC
  input  logic            ttc_l1a,
  input  logic            ttc_bc_rst,
  input  logic            ttc_ev_rst,
  // to the MUCTPI interface, the ROD serializer and the TTC busy
  output muctpi_word_t    mu_word,
  output logic [39:0]     ser_data,
  output logic            busy,
  // emulated PAD words, to G2Link transmitter cards when fitted
  output logic [15:0]     link_tx_data [NPAD],
  output logic [NPAD-1:0] link_tx_dv,
  output logic [NPAD-1:0] link_tx_flag,
  // selection lines for the board's clock multiplexers (see sl_regs 0x05)
  output logic [3:0]      clk_sel,
  // decoded VME access
  input  logic            vme_req,
  input  logic            vme_we,
  input  logic [7:0]      vme_addr,
  input  logic [31:0]     vme_wdata,
  output logic [31:0]     vme_rdata,
  output logic            vme_ack,
  // external FIFO chip
  output logic [15:0]     extf_d,
  output logic            extf_wen_n,
  input  logic [15:0]     extf_q,
  output logic            extf_ren_n,
  input  logic            extf_ef_n,
  input  logic            extf_ff_n,
  output logic            extf_rs_n,
  // configuration and JTAG pins
  output logic [31:0]     g2_cfg,
  output logic [7:0]      ser_cfg,
  output logic            jtag_tck,
  output logic            jtag_tms,
  output logic            jtag_tdi,
  input  logic            jtag_tdo
);
  logic [23:0] v_out, s_out, bus;
  logic        v_oe, s_oe, strb, vack, ack;
  logic        rst_local;

  rst_sync u_rst_local (.clk(clk_local), .rst_n, .rst_n_sync(rst_local));

  // the shared 24-bit bus
  always_comb begin
    if (s_oe)      bus = s_out;
    else if (v_oe) bus = v_out;
    else           bus = '0;
  end

  vme_fpga u_vme (
    .clk(clk_local), .rst_n(rst_local),
    .lreq(vme_req), .lwe(vme_we), .laddr(vme_addr), .lwdata(vme_wdata),
    .lrdata(vme_rdata), .lack(vme_ack),
    .bus_in(bus), .bus_out(v_out), .bus_oe(v_oe), .strb, .vack, .ack,
    .extf_d, .extf_wen_n, .extf_q, .extf_ren_n, .extf_ef_n, .extf_ff_n, .extf_rs_n,
    .g2_cfg, .ser_cfg, .jtag_tck, .jtag_tms, .jtag_tdi, .jtag_tdo
  );

  sl_fpga u_sl (
    .rst_n, .clk_trig, .clk_eb, .clk_ser, .clk_vme(clk_local),
    .link_data, .link_dv, .link_flag, .ttc_l1a, .ttc_bc_rst, .ttc_ev_rst,
    .mu_word, .busy, .ser_data,
    .tx_data(link_tx_data), .tx_dv(link_tx_dv), .tx_flag(link_tx_flag), .clk_sel,
    .bus_in(bus), .bus_out(s_out), .bus_oe(s_oe), .strb, .vack, .ack
  );

  // only one FPGA drives the bus at a time
  a_bus_owner: assert property (@(posedge clk_local) disable iff (!rst_local) !(v_oe && s_oe))
    else $error("both FPGAs drive the inter-FPGA bus");
endmodule
