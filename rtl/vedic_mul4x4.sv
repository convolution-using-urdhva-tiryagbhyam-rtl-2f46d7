// vedic_mul4x4: 4x4-bit unsigned Vedic multiplier built from four 2x2
// Urdhva Tiryagbhyam multipliers.
//
// The operands are split into 2-bit halves. The four 2x2 products
// aL*bL, aH*bL, aL*bH and aH*bH are formed in parallel (vertical, two
// crosswise, vertical) and then added at their weights 1, 4, 4 and 16:
// the two crosswise products are summed first, and that sum is added to the
// vertical products. Purely combinational, 8-bit product.
// Splitting 4x4 into four parallel 2x2 multiplications follows the design
// description; the adders that merge them are not described there and are
// written here as plain word-level additions.
module vedic_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q_ll, q_hl, q_lh, q_hh;  // 2x2 partial products
  logic [4:0] xsum;                   // sum of the two crosswise products

  vedic_mul2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q_ll));
  vedic_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q_hl));
  vedic_mul2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q_lh));
  vedic_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q_hh));

  always_comb begin
    xsum = {1'b0, q_hl} + {1'b0, q_lh};
    p     = {q_hh, q_ll} + {1'b0, xsum, 2'b00};
  end

endmodule
