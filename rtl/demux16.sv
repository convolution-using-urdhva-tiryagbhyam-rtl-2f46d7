// demux16: 1:16 demultiplexer for the serial convolver's product.
//
// The 8-bit product z is steered to output slot sel (0..15); all other slots
// are driven to zero. A one-hot strobe marks the selected slot when en is
// high, so a register bank can load only that slot. Purely combinational.
// A demultiplexer with four select lines s0..s3 taking the 8-bit product to
// sixteen destinations follows the serial block diagram; the zeroing of
// unselected outputs and the strobe are this implementation's choice.
module demux16
  import conv_pkg::*;
(
  input  prod_t             z,
  input  logic [3:0]        sel,
  input  logic              en,
  output prod_t [15:0]      slot,
  output logic  [15:0]      strobe
);

  always_comb begin
    slot   = '0;
    strobe = '0;
    slot[sel]   = z;
    strobe[sel] = en;
  end

endmodule
