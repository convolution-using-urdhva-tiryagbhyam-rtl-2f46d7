// vedic_mul2x2: 2x2-bit unsigned multiplier by the Urdhva Tiryagbhyam
// ("vertically and crosswise") rule.
//
// The vertical product a0*b0 is bit 0. The two crosswise products a1*b0 and
// a0*b1 are added by a half adder to give bit 1 and a carry; the second
// vertical product a1*b1 is added to that carry by a second half adder to give
// bits 2 and 3. Purely combinational: four AND gates and two half adders.
// The rule is the one described for the design; the gate-level form is the
// usual two-half-adder realisation.
module vedic_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x0, x1, v1;  // vertical and crosswise partial products
  logic c1;              // carry out of the crosswise column

  always_comb begin
    v0   = a[0] & b[0];
    x0   = a[1] & b[0];
    x1   = a[0] & b[1];
    v1   = a[1] & b[1];
    p[0] = v0;
    p[1] = x0 ^ x1;
    c1   = x0 & x1;
    p[2] = v1 ^ c1;
    p[3] = v1 & c1;
  end

endmodule
