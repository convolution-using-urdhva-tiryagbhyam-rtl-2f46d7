// conv_top: the two convolvers of the design side by side.
//
// Both compute the seven-sample linear convolution of two four-sample,
// unsigned 4-bit sequences by the direct (long-multiplication, no carry
// between columns) method, with Urdhva Tiryagbhyam Vedic multipliers.
//   * Parallel convolver (par_*): sixteen multipliers, combinational,
//     result valid one propagation delay after the inputs change.
//   * Serial convolver (ser_*): one multiplier time-shared over the sixteen
//     products through input multiplexers and a demultiplexer; start pulse,
//     16 clocks to the done pulse, result held until the next start.
// The two have separate ports and share nothing; the serial one trades
// speed for area, the parallel one area for speed.
module conv_top
  import conv_pkg::*;
(
  // parallel convolver
  input  sample_t [NSEQ-1:0] par_x,
  input  sample_t [NSEQ-1:0] par_h,
  output conv_out_t          par_conv,
  // serial convolver
  input  logic               clk,
  input  logic               rst_n,
  input  logic               ser_start,
  input  sample_t [NSEQ-1:0] ser_x,
  input  sample_t [NSEQ-1:0] ser_h,
  output logic               ser_busy,
  output logic               ser_done,
  output conv_out_t          ser_conv
);

  conv_parallel u_par (.x(par_x), .h(par_h), .conv(par_conv));

  conv_serial u_ser (
    .clk(clk), .rst_n(rst_n), .start(ser_start), .x(ser_x), .h(ser_h),
    .busy(ser_busy), .done(ser_done), .conv(ser_conv));

endmodule
