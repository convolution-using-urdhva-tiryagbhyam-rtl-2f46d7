// csa_rca: multi-operand unsigned adder, carry-save tree with a ripple-carry
// last stage.
//
// NOPS operands of WIDTH bits are reduced to two vectors, a sum and a carry,
// by NOPS-2 rows of full adders (carry-save adders): each row takes the
// running sum, the running carry shifted one place left, and the next
// operand, and no carry moves sideways inside a row. A ripple-carry adder
// then adds the final sum and carry vectors. The result has
// WIDTH + $clog2(NOPS) bits, enough for NOPS maximal operands.
// Purely combinational.
// In the convolvers it sums the three- and four-product columns conv2, conv3
// and conv4. The CSA-with-RCA structure is the design's; the row order and
// the result width are this implementation's choice.
module csa_rca #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned NOPS  = 3,
  localparam int unsigned OW   = WIDTH + $clog2(NOPS)
) (
  input  logic [NOPS-1:0][WIDTH-1:0] ops,
  output logic [OW-1:0]              sum
);

  logic [OW-1:0] s, c, x, cs;  // running sum, running carry, next operand
  logic          rc;           // ripple carry of the last stage

  always_comb begin
    s = OW'(ops[0]);
    c = '0;
    if (NOPS > 1) c = OW'(ops[1]);
    // carry-save rows
    for (int k = 2; k < NOPS; k++) begin
      x  = OW'(ops[k]);
      cs = (s & c) | (s & x) | (c & x);
      s  = s ^ c ^ x;
      c  = cs << 1;
    end
    // ripple-carry last stage
    rc = 1'b0;
    for (int i = 0; i < OW; i++) begin
      sum[i] = s[i] ^ c[i] ^ rc;
      rc     = (s[i] & c[i]) | (s[i] & rc) | (c[i] & rc);
    end
  end

endmodule
