// ser_if: serializer-region reader of the output FIFO.
//
// In the serializer clock region the built SL/RX frames are read from the
// output FIFO and sent to the serializer chip, which takes 40 TTL bits per
// clock (40 MHz) and sends them to the ROD over an 8-bit LVDS link. One
// 32-bit output word is sent per clock while the FIFO has data and sending is
// enabled. Serializer input bits (this design's choice): [31:0] frame data,
// [32] data valid, [33] last word of a frame, [39:34] zero.
//
// Timing: ser_data is registered; a word popped at one clk edge is on
// ser_data after that edge.
module ser_if (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        of_empty,
  input  logic [32:0] of_data,
  output logic        of_re,
  output logic [39:0] ser_data,
  output logic [15:0] word_count,
  output logic [15:0] frame_count
);
  assign of_re = enable && !of_empty;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ser_data <= '0; word_count <= '0; frame_count <= '0;
    end else begin
      ser_data <= of_re ? {6'b0, of_data[32], 1'b1, of_data[31:0]} : '0;
      if (of_re) begin
        word_count <= word_count + 1'b1;
        if (of_data[32]) frame_count <= frame_count + 1'b1;
      end
    end
  end
endmodule
