// async_fifo: dual-clock FIFO separating the clock regions of the SL FPGA.
//
// Every clock region of the Sector Logic (input/trigger, event building,
// serializer, VME) is separated from the others by FIFOs of this kind. The
// write and read pointers are kept in binary and crossed to the other side in
// Gray code through two flip-flops, so the full and empty flags are
// conservative but never wrong. Depth is 2**AW words of DW bits.
//
// Interface: write side (wclk, wrst_n, we, wdata, full, wlevel, almost_full
// at wlevel >= afull_thr); read side (rclk, rrst_n, re, rdata, empty, rlevel).
// rdata shows the oldest word while empty is low (first-word fall-through);
// re pops it at the next rclk edge. Writes when full and reads when empty are
// ignored. The depths used in the board are this design's choices.
module async_fifo #(
  parameter int unsigned DW = 16,
  parameter int unsigned AW = 10
) (
  input  logic          wclk,
  input  logic          wrst_n,
  input  logic          we,
  input  logic [DW-1:0] wdata,
  input  logic [AW:0]   afull_thr,
  output logic          full,
  output logic          almost_full,
  output logic [AW:0]   wlevel,
  input  logic          rclk,
  input  logic          rrst_n,
  input  logic          re,
  output logic [DW-1:0] rdata,
  output logic          empty,
  output logic [AW:0]   rlevel
);
  logic [DW-1:0] mem [2**AW];
  logic [AW:0] wbin, rbin, wgray, rgray;
  logic [AW:0] rgray_w1, rgray_w2, wgray_r1, wgray_r2;

  function automatic logic [AW:0] b2g(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] g2b(input logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = int'(AW) - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // write side
  logic [AW:0] rbin_w;
  assign rbin_w      = g2b(rgray_w2);
  assign wlevel      = wbin - rbin_w;
  assign full        = (wlevel == (AW+1)'(2**AW));
  assign almost_full = (wlevel >= afull_thr);

  always_ff @(posedge wclk) begin
    if (we && !full) mem[wbin[AW-1:0]] <= wdata;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin <= '0; wgray <= '0; rgray_w1 <= '0; rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (we && !full) begin
        wbin  <= wbin + 1'b1;
        wgray <= b2g(wbin + 1'b1);
      end
    end
  end

  // read side
  logic [AW:0] wbin_r;
  assign wbin_r = g2b(wgray_r2);
  assign rlevel = wbin_r - rbin;
  assign empty  = (rlevel == '0);
  assign rdata  = mem[rbin[AW-1:0]];

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin <= '0; rgray <= '0; wgray_r1 <= '0; wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (re && !empty) begin
        rbin  <= rbin + 1'b1;
        rgray <= b2g(rbin + 1'b1);
      end
    end
  end
endmodule
