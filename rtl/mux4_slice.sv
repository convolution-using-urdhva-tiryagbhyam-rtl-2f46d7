// mux4_slice: 4:1 multiplexer selecting one bit of four samples.
//
// The serial convolver feeds its single multiplier through eight of these,
// one per operand bit: the slice for bit k of the first sequence receives
// a_k, b_k, c_k, d_k and outputs the bit of the selected sample. Select value
// 0 picks the first sample (a or e), 3 the last (d or h).
// Purely combinational.
// Bit-sliced 4:1 multiplexers driven by two select lines follow the serial
// block diagram; the select encoding is this implementation's choice.
module mux4_slice (
  input  logic [3:0] d,    // d[i]: bit of sample i (i = 0 is a or e)
  input  logic [1:0] sel,
  output logic       y
);

  always_comb begin
    unique case (sel)
      2'd0: y = d[0];
      2'd1: y = d[1];
      2'd2: y = d[2];
      2'd3: y = d[3];
    endcase
  end

endmodule
