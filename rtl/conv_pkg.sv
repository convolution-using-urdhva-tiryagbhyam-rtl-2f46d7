// conv_pkg: widths and result type shared by the convolution datapaths.
//
// Both convolvers take two sequences of four unsigned 4-bit samples,
// x = [a b c d] and h = [e f g h], and return the seven-sample linear
// convolution as the column sums conv0..conv6 of the "direct method": the
// samples are laid out like a pencil-and-paper multiplication with d and h in
// the rightmost column, and each column of products is summed without carries
// between columns. conv0 = d*h is the rightmost column, conv6 = a*e the
// leftmost, so conv6 is y[0] and conv0 is y[6] of the usual indexing.
//
// The 4-bit samples, four-sample sequences and 8-bit products follow the
// design description. The column widths are the smallest that hold the
// worst-case sum (15*15 per product): 8 bits for one product, 9 for two and
// 10 for three or four; these are this implementation's choice.
package conv_pkg;

  localparam int unsigned DW   = 4;       // sample width
  localparam int unsigned NSEQ = 4;       // samples per sequence
  localparam int unsigned PW   = 2 * DW;  // product width

  typedef logic [DW-1:0] sample_t;
  typedef logic [PW-1:0] prod_t;

  // Sixteen products, indexed [i][j] = x[i] * h[j] with x[0] = a, h[0] = e.
  typedef prod_t [NSEQ-1:0][NSEQ-1:0] prod_grid_t;

  // The seven column sums, named as the outputs conv0..conv6.
  typedef struct packed {
    logic [PW-1:0] conv6;  // a*e
    logic [PW:0]   conv5;  // a*f + b*e
    logic [PW+1:0] conv4;  // a*g + b*f + c*e
    logic [PW+1:0] conv3;  // a*h + b*g + c*f + d*e
    logic [PW+1:0] conv2;  // b*h + c*g + d*f
    logic [PW:0]   conv1;  // c*h + d*g
    logic [PW-1:0] conv0;  // d*h
  } conv_out_t;

endpackage
