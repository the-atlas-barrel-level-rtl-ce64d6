// sl_vme_slave: SL-FPGA end of the 24-bit bus from the VME FPGA.
//
// The bus carries 16 data bits [15:0], a 7-bit internal address [22:16] and
// the read/write bit [23] (1 = read). The VME FPGA is the master. Besides the
// shared bus this design uses three handshake lines: strb (master asserts:
// command on the bus), ack (slave), vack (master acknowledges read data).
//   write: master drives the command and raises strb; the slave takes it and
//          raises ack; the master drops strb and releases the bus; the slave
//          drops ack.
//   read:  master drives the command and raises strb; the slave takes it and
//          raises ack; the master releases the bus and drops strb; the slave
//          drives the data and drops ack; the master takes the data and
//          raises vack; the slave releases the bus and raises ack; the master
//          drops vack; the slave drops ack. Every step waits for the other
//          end, so the bus never has two drivers whatever the two clocks.
// Registers and FIFOs are 32 bits wide, so each access is two transfers to
// the same address, low half first. A write is performed when the high half
// arrives; a read is performed (and a FIFO popped) when the low half is asked
// for, the high half being returned by the second transfer. The order of the
// halves and the handshake lines are this design's choices; the bus split and
// the write/read sequences follow the board. strb and vack pass through two
// flip-flops, so the two FPGAs may run on unrelated clocks.
//
// Register side: reg_wr / reg_rd are one-clock pulses with reg_addr; reg_rdata
// is sampled in the clock cycle in which reg_rd is high.
module sl_vme_slave (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [23:0] bus_in,
  output logic [23:0] bus_out,
  output logic        bus_oe,
  input  logic        strb,
  input  logic        vack,
  output logic        ack,
  output logic        reg_wr,
  output logic        reg_rd,
  output logic [6:0]  reg_addr,
  output logic [31:0] reg_wdata,
  input  logic [31:0] reg_rdata
);
  typedef enum logic [2:0] {S_IDLE, S_WACK, S_RCMD, S_RDATA, S_RDONE} state_t;
  state_t      state;
  logic [1:0]  strb_s, vack_s;
  logic        half;              // 0: next transfer is a low half
  logic [15:0] wlo, rlo, rhi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strb_s <= '0; vack_s <= '0;
    end else begin
      strb_s <= {strb_s[0], strb};
      vack_s <= {vack_s[0], vack};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; half <= 1'b0; wlo <= '0; rlo <= '0; rhi <= '0;
      bus_out <= '0; bus_oe <= 1'b0; ack <= 1'b0;
      reg_wr <= 1'b0; reg_rd <= 1'b0; reg_addr <= '0; reg_wdata <= '0;
    end else begin
      reg_wr <= 1'b0;
      reg_rd <= 1'b0;
      unique case (state)
        S_IDLE: if (strb_s[1]) begin
          reg_addr <= bus_in[22:16];
          ack      <= 1'b1;
          if (!bus_in[23]) begin
            if (!half) wlo <= bus_in[15:0];
            else begin
              reg_wdata <= {bus_in[15:0], wlo};
              reg_wr    <= 1'b1;
            end
            state <= S_WACK;
          end else begin
            if (!half) reg_rd <= 1'b1;
            state <= S_RCMD;
          end
        end
        S_WACK: if (!strb_s[1]) begin
          ack <= 1'b0; half <= !half; state <= S_IDLE;
        end
        S_RCMD: begin
          if (reg_rd) {rhi, rlo} <= reg_rdata;   // sampled with the read pulse
          if (!strb_s[1] && !reg_rd) begin
            bus_out <= {1'b1, reg_addr, half ? rhi : rlo};
            bus_oe <= 1'b1;
            ack    <= 1'b0;
            state  <= S_RDATA;
          end
        end
        S_RDATA: if (vack_s[1]) begin
          bus_oe <= 1'b0; ack <= 1'b1; half <= !half; state <= S_RDONE;
        end
        S_RDONE: if (!vack_s[1]) begin
          ack <= 1'b0; state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
