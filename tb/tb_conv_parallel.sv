// tb_conv_parallel: checks the parallel convolver. First the worked example
// (4 4 3 2) * (4 5 6) = (16 36 56 47 28 12), with the shorter sequence padded
// by a trailing zero, against those printed numbers; then all-maximum
// samples, then 5000 random sequence pairs against the integer reference.
module tb_conv_parallel;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  sample_t [NSEQ-1:0] x, h;
  conv_out_t          conv, want;
  int checks = 0, failures = 0;

  conv_parallel dut (.x(x), .h(h), .conv(conv));

  task automatic check(input string what);
    #1;
    checks++;
    if (conv != want) begin
      failures++;
      $display("FAIL %s: x=%h h=%h got %p want %p", what, x, h, conv, want);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // x = [a b c d] = [4 4 3 2], h = [e f g h] = [4 5 6 0]
    x = '{4'd2, 4'd3, 4'd4, 4'd4};
    h = '{4'd0, 4'd6, 4'd5, 4'd4};
    want = '{conv6: 8'd16, conv5: 9'd36, conv4: 10'd56, conv3: 10'd47,
             conv2: 10'd28, conv1: 9'd12, conv0: 8'd0};
    check("worked example");
    x = '1;
    h = '1;
    want = conv_ref(x, h);
    check("all ones");
    for (int n = 0; n < 5000; n++) begin
      for (int k = 0; k < NSEQ; k++) begin
        x[k] = sample_t'($urandom);
        h[k] = sample_t'($urandom);
      end
      want = conv_ref(x, h);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
