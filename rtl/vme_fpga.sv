// vme_fpga: logic of the board's VME FPGA.
//
// The VME FPGA answers the VME crate's single-board computer. It holds eight
// 32-bit registers of its own, reaches the 44 registers and 12 FIFOs of the SL
// FPGA over the 24-bit bus (vme_sl_master), controls the external 8k x 16 FIFO,
// drives the configuration pins of the G2Link receiver cards and of the
// serializer, and drives the JTAG pins. It runs on the board's 40 MHz local
// clock.
//
// The VME64x slave protocol itself is not part of this module: it takes an
// access already decoded from the VME bus (lreq, a one-clock pulse, with lwe,
// laddr, lwdata; lack pulses when done, with lrdata valid). Address split (this design's):
// laddr[7] = 1 goes to the SL FPGA with laddr[6:0]; laddr[7] = 0 selects an
// internal register with laddr[2:0]:
//   0 RO  identifier 0x564D4546
//   1 RW  G2Link card configuration pins   g2_cfg
//   2 RW  serializer configuration pins    ser_cfg[7:0]
//   3 RO  external FIFO flags {FF_n, EF_n} in [1:0]
//   4 RW  external FIFO data: a write pushes D[15:0]; a read returns Q and
//         pops it (Q taken to show the first word while EF_n is high)
//   5 WO  external FIFO reset: writing bit 0 pulses RS_n low for one clock
//   6 RW  JTAG: [0] TCK, [1] TMS, [2] TDI, [3] TDO (read only)
//   7 RW  scratch
// Internal accesses complete in one clock; SL accesses take the time of the
// two bus transfers.
module vme_fpga (
  input  logic        clk,
  input  logic        rst_n,
  // decoded VME access
  input  logic        lreq,
  input  logic        lwe,
  input  logic [7:0]  laddr,
  input  logic [31:0] lwdata,
  output logic [31:0] lrdata,
  output logic        lack,
  // bus to the SL FPGA
  input  logic [23:0] bus_in,
  output logic [23:0] bus_out,
  output logic        bus_oe,
  output logic        strb,
  output logic        vack,
  input  logic        ack,
  // external FIFO
  output logic [15:0] extf_d,
  output logic        extf_wen_n,
  input  logic [15:0] extf_q,
  output logic        extf_ren_n,
  input  logic        extf_ef_n,
  input  logic        extf_ff_n,
  output logic        extf_rs_n,
  // configuration and JTAG pins
  output logic [31:0] g2_cfg,
  output logic [7:0]  ser_cfg,
  output logic        jtag_tck,
  output logic        jtag_tms,
  output logic        jtag_tdi,
  input  logic        jtag_tdo
);
  localparam logic [31:0] ID = 32'h564D_4546;
  logic        m_req, m_done, m_busy;
  logic [31:0] m_rdata, scratch;
  logic        sl_pending;

  vme_sl_master u_master (
    .clk, .rst_n, .req(m_req), .we(lwe), .addr(laddr[6:0]), .wdata(lwdata),
    .rdata(m_rdata), .busy(m_busy), .done(m_done),
    .bus_in, .bus_out, .bus_oe, .strb, .vack, .ack
  );

  assign m_req = lreq && laddr[7] && !sl_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lrdata <= '0; lack <= 1'b0; sl_pending <= 1'b0;
      g2_cfg <= '0; ser_cfg <= '0; scratch <= '0;
      extf_d <= '0; extf_wen_n <= 1'b1; extf_ren_n <= 1'b1; extf_rs_n <= 1'b1;
      jtag_tck <= 1'b0; jtag_tms <= 1'b0; jtag_tdi <= 1'b0;
    end else begin
      lack <= 1'b0;
      extf_wen_n <= 1'b1; extf_ren_n <= 1'b1; extf_rs_n <= 1'b1;
      if (sl_pending) begin
        if (m_done) begin
          lack <= 1'b1; lrdata <= m_rdata; sl_pending <= 1'b0;
        end
      end else if (lreq && laddr[7]) begin
        sl_pending <= 1'b1;
      end else if (lreq) begin
        lack <= 1'b1;
        if (lwe) begin
          unique case (laddr[2:0])
            3'd1: g2_cfg  <= lwdata;
            3'd2: ser_cfg <= lwdata[7:0];
            3'd4: if (extf_ff_n) begin extf_d <= lwdata[15:0]; extf_wen_n <= 1'b0; end
            3'd5: extf_rs_n <= !lwdata[0];
            3'd6: {jtag_tdi, jtag_tms, jtag_tck} <= lwdata[2:0];
            3'd7: scratch <= lwdata;
            default: ;
          endcase
        end else begin
          unique case (laddr[2:0])
            3'd0: lrdata <= ID;
            3'd1: lrdata <= g2_cfg;
            3'd2: lrdata <= {24'h0, ser_cfg};
            3'd3: lrdata <= {30'h0, extf_ff_n, extf_ef_n};
            3'd4: begin
              lrdata <= {16'h0, extf_ef_n ? extf_q : 16'h0};
              if (extf_ef_n) extf_ren_n <= 1'b0;
            end
            3'd6: lrdata <= {28'h0, jtag_tdo, jtag_tdi, jtag_tms, jtag_tck};
            3'd7: lrdata <= scratch;
            default: lrdata <= '0;
          endcase
        end
      end
    end
  end
endmodule
