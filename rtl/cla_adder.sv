// cla_adder: two-operand unsigned carry look-ahead adder.
//
// Each bit position forms a generate g = a & b and a propagate p = a ^ b.
// Every carry is computed directly from the generates, propagates and the
// carry-in as the two-level sum of products
//   c[i+1] = g[i] | p[i]g[i-1] | p[i]p[i-1]g[i-2] | ... | p[i..0]cin
// so no carry waits for the carry of the previous bit. The sum bit is
// p[i] ^ c[i] and the carry out of the top bit becomes the MSB of the result.
// Purely combinational.
// In the convolvers it adds the two-product columns conv1 and conv5. The
// adder type and its 8-bit operand width are the design's; the flat
// single-level look-ahead (no carry groups) is this implementation's choice.
module cla_adder #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH:0]   sum
);

  logic [WIDTH-1:0] g, p;
  logic [WIDTH:0]   c;
  logic             term;

  always_comb begin
    g    = a & b;
    p    = a ^ b;
    c    = '0;
    c[0] = cin;
    for (int i = 0; i < WIDTH; i++) begin
      // c[i+1]: OR over k of (g[k] propagated through bits k+1..i), plus cin
      term = cin;
      for (int k = 0; k <= i; k++) term = term & p[k];
      c[i+1] = term;
      for (int k = 0; k <= i; k++) begin
        term = g[k];
        for (int m = k + 1; m <= i; m++) term = term & p[m];
        c[i+1] = c[i+1] | term;
      end
    end
    sum = {c[WIDTH], p ^ c[WIDTH-1:0]};
  end

endmodule
