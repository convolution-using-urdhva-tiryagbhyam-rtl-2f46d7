// conv_adders: column adders that turn the sixteen products into the seven
// convolution outputs conv0..conv6.
//
// With x = [a b c d] and h = [e f g h] (a = x[0], e = h[0]) the products are
// arranged as in a long multiplication and each column is summed separately:
//   conv6 = ae                       (no adder)
//   conv5 = af + be                  (carry look-ahead adder)
//   conv4 = ag + bf + ce             (CSA with ripple-carry last stage)
//   conv3 = ah + bg + cf + de        (CSA with ripple-carry last stage)
//   conv2 = bh + cg + df             (CSA with ripple-carry last stage)
//   conv1 = ch + dg                  (carry look-ahead adder)
//   conv0 = dh                       (no adder)
// The column assignment and the adder type per column follow the design;
// the operand order within a column is this implementation's. Purely
// combinational; shared by the serial and the parallel convolver.
module conv_adders
  import conv_pkg::*;
(
  input  prod_grid_t prod,   // prod[i][j] = x[i] * h[j]
  output conv_out_t  conv
);

  logic [PW:0]   sum5, sum1;
  logic [PW+1:0] sum4, sum3, sum2;

  // prod[i][j] contributes to column 6 - (i + j)
  cla_adder #(.WIDTH(PW)) u_cla5 (
    .a(prod[0][1]), .b(prod[1][0]), .cin(1'b0), .sum(sum5));

  csa_rca #(.WIDTH(PW), .NOPS(3)) u_csa4 (
    .ops({prod[0][2], prod[1][1], prod[2][0]}), .sum(sum4));

  csa_rca #(.WIDTH(PW), .NOPS(4)) u_csa3 (
    .ops({prod[0][3], prod[1][2], prod[2][1], prod[3][0]}), .sum(sum3));

  csa_rca #(.WIDTH(PW), .NOPS(3)) u_csa2 (
    .ops({prod[1][3], prod[2][2], prod[3][1]}), .sum(sum2));

  cla_adder #(.WIDTH(PW)) u_cla1 (
    .a(prod[2][3]), .b(prod[3][2]), .cin(1'b0), .sum(sum1));

  always_comb begin
    conv.conv6 = prod[0][0];
    conv.conv5 = sum5;
    conv.conv4 = sum4;
    conv.conv3 = sum3;
    conv.conv2 = sum2;
    conv.conv1 = sum1;
    conv.conv0 = prod[3][3];
  end

endmodule
