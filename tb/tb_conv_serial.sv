// tb_conv_serial: checks the serial convolver. Each run pulses start with a
// sequence pair, scrambles the inputs during the run (the operands are
// latched at start), and requires done exactly 16 clocks after the start edge
// with the result equal to the reference. Runs: the worked example
// (4 4 3 2) * (4 5 6) = (16 36 56 47 28 12), all-maximum samples, then 300
// random pairs, some back to back.
module tb_conv_serial;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  logic               clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  sample_t [NSEQ-1:0] x, h;
  logic               busy, done;
  conv_out_t          conv, want;
  int checks = 0, failures = 0;

  conv_serial dut (.clk(clk), .rst_n(rst_n), .start(start), .x(x), .h(h),
                   .busy(busy), .done(done), .conv(conv));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input sample_t [NSEQ-1:0] vx, input sample_t [NSEQ-1:0] vh,
                     input conv_out_t w, input int gap);
    int lat;
    @(negedge clk);
    x     = vx;
    h     = vh;
    start = 1'b1;
    @(posedge clk);             // start edge
    @(negedge clk);
    start = 1'b0;
    lat   = 0;  // rising edges after the start edge
    while (!done && lat < 40) begin
      x = {$urandom, $urandom};  // inputs are don't-care during the run
      h = {$urandom, $urandom};
      @(negedge clk);
      lat++;
    end
    checks++;
    if (lat != 16) begin
      failures++;
      $display("FAIL latency %0d clocks, want 16", lat);
    end
    checks++;
    if (conv != w) begin
      failures++;
      $display("FAIL x=%h h=%h got %p want %p", vx, vh, conv, w);
    end
    // result holds until the next start
    repeat (gap) @(negedge clk);
    checks++;
    if (conv != w) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    sample_t [NSEQ-1:0] vx, vh;
    x = '0;
    h = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    run('{4'd2, 4'd3, 4'd4, 4'd4}, '{4'd0, 4'd6, 4'd5, 4'd4},
        '{conv6: 8'd16, conv5: 9'd36, conv4: 10'd56, conv3: 10'd47,
          conv2: 10'd28, conv1: 9'd12, conv0: 8'd0}, 2);
    run('1, '1, conv_ref('1, '1), 0);
    for (int n = 0; n < 300; n++) begin
      for (int k = 0; k < NSEQ; k++) begin
        vx[k] = sample_t'($urandom);
        vh[k] = sample_t'($urandom);
      end
      run(vx, vh, conv_ref(vx, vh), int'($urandom_range(3)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
