// conv_parallel: parallel convolver of two four-sample, 4-bit sequences.
//
// All sixteen sample products x[i]*h[j] are formed at once by sixteen 4x4
// Vedic multipliers, and the column adders (conv_adders: carry look-ahead for
// the two-product columns, carry-save with ripple-carry last stage for the
// three- and four-product columns) sum them into conv0..conv6.
// Purely combinational: the result follows the inputs after one pass through
// a multiplier and one adder, with no clock and no handshake.
// Interface: x and h (x[0] = a, h[0] = e), conv.
// Sixteen multipliers with no multiplexers, feeding CSA-RCA and CLA adders,
// follow the parallel block diagram. The block diagram also draws the
// demultiplexer between multipliers and adders; with one multiplier per
// product each product has a fixed destination, so it is wiring here.
module conv_parallel
  import conv_pkg::*;
(
  input  sample_t [NSEQ-1:0] x,
  input  sample_t [NSEQ-1:0] h,
  output conv_out_t          conv
);

  prod_grid_t prod;

  for (genvar i = 0; i < NSEQ; i++) begin : g_row
    for (genvar j = 0; j < NSEQ; j++) begin : g_col
      vedic_mul4x4 u_mul (.a(x[i]), .b(h[j]), .p(prod[i][j]));
    end
  end

  conv_adders u_add (.prod(prod), .conv(conv));

endmodule
