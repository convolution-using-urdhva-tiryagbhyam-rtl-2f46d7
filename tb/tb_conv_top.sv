// tb_conv_top: end-to-end test of both convolvers at their default sizes.
//
// Each operation applies one sequence pair to the parallel convolver and the
// same pair to the serial one, checks both results against the integer
// reference and against each other, and checks the serial latency of 16
// clocks. Mechanisms counted (each must occur at least once): parallel
// evaluations, serial runs, each of the sixteen select / demultiplexer slots
// storing a product, a start ignored while busy, back-to-back serial runs and
// the serial result held across idle cycles. Includes the worked example
// (4 4 3 2) * (4 5 6) = (16 36 56 47 28 12).
module tb_conv_top;
  import conv_pkg::*;
  import conv_ref_pkg::*;

  localparam int NOPS = 200;

  logic               clk = 1'b0, rst_n = 1'b0, ser_start = 1'b0;
  sample_t [NSEQ-1:0] par_x, par_h, ser_x, ser_h;
  logic               ser_busy, ser_done;
  conv_out_t          par_conv, ser_conv;
  int checks = 0, failures = 0;

  int n_par = 0, n_ser = 0, n_ignored = 0, n_b2b = 0, n_hold = 0;
  int slot_hits [16];

  conv_top dut (
    .par_x(par_x), .par_h(par_h), .par_conv(par_conv),
    .clk(clk), .rst_n(rst_n), .ser_start(ser_start), .ser_x(ser_x), .ser_h(ser_h),
    .ser_busy(ser_busy), .ser_done(ser_done), .ser_conv(ser_conv));

  always #5 clk = ~clk;

  // observe which product slot the serial datapath writes each clock
  always @(posedge clk)
    if (rst_n && dut.u_ser.store) slot_hits[dut.u_ser.sel]++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic operation(input sample_t [NSEQ-1:0] vx, input sample_t [NSEQ-1:0] vh,
                           input conv_out_t w, input bit poke_start, input int gap);
    int lat;
    @(negedge clk);
    par_x     = vx;
    par_h     = vh;
    ser_x     = vx;
    ser_h     = vh;
    ser_start = 1'b1;
    #1;
    expect_true("parallel result", par_conv == w);
    n_par++;
    @(posedge clk);
    @(negedge clk);
    ser_start = 1'b0;
    lat = 0;
    while (!ser_done && lat < 40) begin
      ser_x = {$urandom, $urandom};
      ser_h = {$urandom, $urandom};
      if (poke_start && lat == 5) begin
        ser_start = 1'b1;     // must be ignored: a run is in progress
        n_ignored++;
      end
      @(negedge clk);
      ser_start = 1'b0;
      lat++;
    end
    expect_true("serial latency 16", lat == 16);
    expect_true("serial result", ser_conv == w);
    expect_true("serial equals parallel", ser_conv == par_conv);
    n_ser++;
    if (gap == 0) n_b2b++;
    if (gap > 0) begin
      repeat (gap) @(negedge clk);
      expect_true("serial result held", ser_conv == w);
      n_hold++;
    end
    if (par_conv != w) $display("  x=%h h=%h par=%p want=%p", vx, vh, par_conv, w);
    if (ser_conv != w) $display("  x=%h h=%h ser=%p want=%p", vx, vh, ser_conv, w);
  endtask

  initial begin
    sample_t [NSEQ-1:0] vx, vh;
    foreach (slot_hits[k]) slot_hits[k] = 0;
    par_x = '0;
    par_h = '0;
    ser_x = '0;
    ser_h = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;

    operation('{4'd2, 4'd3, 4'd4, 4'd4}, '{4'd0, 4'd6, 4'd5, 4'd4},
              '{conv6: 8'd16, conv5: 9'd36, conv4: 10'd56, conv3: 10'd47,
                conv2: 10'd28, conv1: 9'd12, conv0: 8'd0}, 1'b1, 3);
    operation('1, '1, conv_ref('1, '1), 1'b0, 0);
    for (int n = 0; n < NOPS; n++) begin
      for (int k = 0; k < NSEQ; k++) begin
        vx[k] = sample_t'($urandom);
        vh[k] = sample_t'($urandom);
      end
      operation(vx, vh, conv_ref(vx, vh), ($urandom_range(7) == 0), int'($urandom_range(2)));
    end

    $display("mechanisms: parallel=%0d serial=%0d ignored_start=%0d back_to_back=%0d held=%0d",
             n_par, n_ser, n_ignored, n_b2b, n_hold);
    expect_true("parallel evaluations happened", n_par > 0);
    expect_true("serial runs happened", n_ser > 0);
    expect_true("start ignored while busy happened", n_ignored > 0);
    expect_true("back-to-back serial runs happened", n_b2b > 0);
    expect_true("result hold happened", n_hold > 0);
    for (int k = 0; k < 16; k++) begin
      expect_true($sformatf("slot %0d written %0d times", k, slot_hits[k]),
                  slot_hits[k] == n_ser);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
