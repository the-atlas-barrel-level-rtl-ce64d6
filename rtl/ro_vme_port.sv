// ro_vme_port: lets VME read the built read-out frames instead of the
// serializer.
//
// When enabled, this port (and not ser_if) reads the output FIFO in the
// serializer clock region, one 33-bit entry {end of frame, data[31:0]} at a
// time, into a holding register. VME (clock region of the register map)
// sees the held word with a valid flag and takes it with a one-clock pop.
// The two sides run a toggle handshake: the serializer side flips fill_t
// each time it loads the register, the VME side flips pop_t each time it
// takes the word, and each side sees the other's toggle through two
// flip-flops. The register is loaded only while fill_t equals the
// synchronized pop_t (the word has been taken). The held data cross to the
// VME side as a quasi-static bus: they are stable from the load until the
// VME pop, and VME only looks at them after fill_t has passed its
// synchronizer, so no sampled bit can be changing.
//
// The port is this design's way of giving VME direct access to the data
// going to the ROD; no holding-register scheme is prescribed for it.
//
// Timing: a word is valid on the VME side about three VME clocks after it
// is loaded; after a pop the next word is valid some five clocks later.
module ro_vme_port (
  // serializer region
  input  logic        sclk,
  input  logic        srst_n,
  input  logic        enable,     // VME read-out mode (synchronized to sclk)
  input  logic        of_empty,
  input  logic [32:0] of_data,    // {end of frame, data}
  output logic        of_re,
  // VME region
  input  logic        vclk,
  input  logic        vrst_n,
  input  logic        pop,        // take the held word
  output logic        valid,      // a word is held
  output logic [32:0] data
);
  logic [32:0] hold;
  logic        fill_t, pop_t;
  logic [1:0]  pop_s, fill_v;

  // serializer side: load when the previous word has been taken
  assign of_re = enable && !of_empty && (fill_t == pop_s[1]);

  always_ff @(posedge sclk or negedge srst_n) begin
    if (!srst_n) begin
      hold <= '0; fill_t <= 1'b0; pop_s <= '0;
    end else begin
      pop_s <= {pop_s[0], pop_t};
      if (of_re) begin
        hold   <= of_data;
        fill_t <= ~fill_t;
      end
    end
  end

  // VME side
  assign valid = fill_v[1] != pop_t;
  assign data  = hold;

  always_ff @(posedge vclk or negedge vrst_n) begin
    if (!vrst_n) begin
      fill_v <= '0; pop_t <= 1'b0;
    end else begin
      fill_v <= {fill_v[0], fill_t};
      if (pop && valid) pop_t <= ~pop_t;
    end
  end
endmodule
