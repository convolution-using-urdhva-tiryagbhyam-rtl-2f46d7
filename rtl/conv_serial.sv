// conv_serial: serial convolver of two four-sample, 4-bit sequences using a
// single 4x4 Vedic multiplier.
//
// On start the sequences x = [a b c d] and h = [e f g h] are latched. For
// sixteen clocks the select lines from serial_ctrl choose one sample of each
// sequence through eight bit-sliced 4:1 multiplexers (four for the
// multiplicand y7..y4, four for the multiplier y3..y0); the one multiplier
// forms their 8-bit product z7..z0, and a 1:16 demultiplexer steers it into
// the product register of that sample pair. The seven column sums
// conv0..conv6 are formed from the registers by carry look-ahead and
// carry-save/ripple-carry adders (conv_adders) and are valid from the done
// pulse until the next start.
//
// Interface: clk, active-low asynchronous rst_n, start pulse, x and h
// (x[0] = a, h[0] = e), busy, done, conv. Latency 16 clocks from the start
// edge to done; one run at a time.
// One multiplier, input multiplexers, demultiplexer and CLA / CSA-RCA adders
// follow the serial block diagram. The operand latch, product registers and
// the controller are this implementation's choice: the diagram shows the
// demultiplexer feeding the adders but not how the products are held.
module conv_serial
  import conv_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  sample_t [NSEQ-1:0]    x,
  input  sample_t [NSEQ-1:0]    h,
  output logic                  busy,
  output logic                  done,
  output conv_out_t             conv
);

  sample_t [NSEQ-1:0] x_q, h_q;   // latched operands
  logic               load, store;
  logic [3:0]         sel;        // {s3, s2, s1, s0}
  logic [7:0]         y;          // multiplier inputs y7..y0
  prod_t              z;          // multiplier output z7..z0
  prod_t [15:0]       slot;
  logic  [15:0]       strobe;
  prod_t [15:0]       prod_q;     // product registers, slot = 4*j + i
  prod_grid_t         grid;

  serial_ctrl u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .load(load), .store(store), .sel(sel), .busy(busy), .done(done));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      h_q <= '0;
    end else if (load) begin
      x_q <= x;
      h_q <= h;
    end
  end

  // Bit-sliced input multiplexers: y[4+k] is bit k of x[sel[1:0]],
  // y[k] is bit k of h[sel[3:2]].
  for (genvar k = 0; k < DW; k++) begin : g_mux
    mux4_slice u_mux_x (
      .d({x_q[3][k], x_q[2][k], x_q[1][k], x_q[0][k]}), .sel(sel[1:0]), .y(y[DW+k]));
    mux4_slice u_mux_h (
      .d({h_q[3][k], h_q[2][k], h_q[1][k], h_q[0][k]}), .sel(sel[3:2]), .y(y[k]));
  end

  vedic_mul4x4 u_mul (.a(y[7:4]), .b(y[3:0]), .p(z));

  demux16 u_demux (.z(z), .sel(sel), .en(store), .slot(slot), .strobe(strobe));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod_q <= '0;
    end else begin
      for (int n = 0; n < 16; n++)
        if (strobe[n]) prod_q[n] <= slot[n];
    end
  end

  always_comb begin
    for (int i = 0; i < NSEQ; i++)
      for (int j = 0; j < NSEQ; j++)
        grid[i][j] = prod_q[4*j + i];
  end

  conv_adders u_add (.prod(grid), .conv(conv));

endmodule
