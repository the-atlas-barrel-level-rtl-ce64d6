// vme_sl_master: VME-FPGA end of the 24-bit bus to the SL FPGA.
//
// Turns one 32-bit register access of the VME FPGA into the two 16-bit
// transfers of the inter-FPGA bus (low half first), using the sequences
// described in sl_vme_slave: for a write the master puts {0, address, data}
// on the bus, raises strb, waits for ack, drops strb and releases the bus;
// for a read it puts {1, address, -} on the bus, raises strb, waits for ack,
// releases the bus and drops strb, waits for the slave to drop ack (data
// valid), takes the data and raises vack, waits for ack (bus released),
// drops vack and waits for the slave to drop ack. ack passes through two
// flip-flops.
//
// Local side: req starts an access (ignored while busy), done pulses for one
// clk at the end, with rdata valid from then on.
module vme_sl_master (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req,
  input  logic        we,
  input  logic [6:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        busy,
  output logic        done,
  input  logic [23:0] bus_in,
  output logic [23:0] bus_out,
  output logic        bus_oe,
  output logic        strb,
  output logic        vack,
  input  logic        ack
);
  typedef enum logic [2:0] {M_IDLE, M_CMD, M_WREL, M_RWAIT, M_VACK, M_VEND} state_t;
  state_t      state;
  logic [1:0]  ack_s;
  logic        half, rw;
  logic [6:0]  a;
  logic [31:0] wd;

  assign busy = (state != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ack_s <= '0;
    else        ack_s <= {ack_s[0], ack};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE; half <= 1'b0; rw <= 1'b0; a <= '0; wd <= '0;
      rdata <= '0; done <= 1'b0; bus_out <= '0; bus_oe <= 1'b0; strb <= 1'b0; vack <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        M_IDLE: if (req) begin
          rw <= !we; a <= addr; wd <= wdata; half <= 1'b0;
          bus_out <= {!we, addr, wdata[15:0]};
          bus_oe  <= 1'b1;
          strb    <= 1'b1;
          state   <= M_CMD;
        end
        M_CMD: if (ack_s[1]) begin
          strb   <= 1'b0;
          bus_oe <= 1'b0;
          state  <= rw ? M_RWAIT : M_WREL;
        end
        M_WREL: if (!ack_s[1]) begin
          if (!half) begin
            half    <= 1'b1;
            bus_out <= {1'b0, a, wd[31:16]};
            bus_oe  <= 1'b1;
            strb    <= 1'b1;
            state   <= M_CMD;
          end else begin
            done  <= 1'b1;
            state <= M_IDLE;
          end
        end
        M_RWAIT: if (!ack_s[1]) begin
          if (!half) rdata[15:0]  <= bus_in[15:0];
          else       rdata[31:16] <= bus_in[15:0];
          vack  <= 1'b1;
          state <= M_VACK;
        end
        M_VACK: if (ack_s[1]) begin
          vack  <= 1'b0;
          state <= M_VEND;
        end
        M_VEND: begin
          if (!ack_s[1]) begin
            if (!half) begin
              half    <= 1'b1;
              bus_out <= {1'b1, a, 16'h0};
              bus_oe  <= 1'b1;
              strb    <= 1'b1;
              state   <= M_CMD;
            end else begin
              done  <= 1'b1;
              state <= M_IDLE;
            end
          end
        end
        default: state <= M_IDLE;
      endcase
    end
  end
endmodule
