// tb_conv_adders: drives the sixteen product inputs of the column adders
// directly (all-maximum products, then 2000 random product grids) and checks
// each column sum against integer addition of that column's products.
module tb_conv_adders;
  import conv_pkg::*;
  prod_grid_t prod;
  conv_out_t  conv;
  int checks = 0, failures = 0;

  conv_adders dut (.prod(prod), .conv(conv));

  task automatic check;
    int col [7];
    int got [7];
    #1;
    foreach (col[k]) col[k] = 0;
    for (int i = 0; i < NSEQ; i++)
      for (int j = 0; j < NSEQ; j++)
        col[6 - (i + j)] += int'(prod[i][j]);
    got = '{int'(conv.conv0), int'(conv.conv1), int'(conv.conv2), int'(conv.conv3),
            int'(conv.conv4), int'(conv.conv5), int'(conv.conv6)};
    for (int k = 0; k < 7; k++) begin
      checks++;
      if (got[k] != col[k]) begin
        failures++;
        $display("FAIL conv%0d: got %0d want %0d", k, got[k], col[k]);
      end
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
    prod = '1;
    check();
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < NSEQ; i++)
        for (int j = 0; j < NSEQ; j++)
          prod[i][j] = prod_t'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
