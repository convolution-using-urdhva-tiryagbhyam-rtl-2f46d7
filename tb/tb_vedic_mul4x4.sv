// tb_vedic_mul4x4: exhaustive check of the 4x4 Vedic multiplier against
// integer multiplication (all 256 operand pairs), including the worked
// example 1101 x 1010 = 10000010.
module tb_vedic_mul4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 4'b1101;
    b = 4'b1010;
    #1;
    checks++;
    if (p != 8'b1000_0010) begin
      failures++;
      $display("FAIL worked example: got %b", p);
    end
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
