// tb_csa_rca: checks the carry-save / ripple-carry adder in both sizes the
// convolvers use (three and four 8-bit operands) against integer addition:
// all-ones operands, then 2000 random operand sets.
module tb_csa_rca;
  logic [2:0][7:0] ops3;
  logic [3:0][7:0] ops4;
  logic [9:0]      sum3, sum4;
  int checks = 0, failures = 0;

  csa_rca #(.WIDTH(8), .NOPS(3)) dut3 (.ops(ops3), .sum(sum3));
  csa_rca #(.WIDTH(8), .NOPS(4)) dut4 (.ops(ops4), .sum(sum4));

  task automatic check;
    int e3, e4;
    #1;
    e3 = int'(ops3[0]) + int'(ops3[1]) + int'(ops3[2]);
    e4 = int'(ops4[0]) + int'(ops4[1]) + int'(ops4[2]) + int'(ops4[3]);
    checks += 2;
    if (sum3 != 10'(e3)) begin
      failures++;
      $display("FAIL 3 ops %h: got %0d want %0d", ops3, sum3, e3);
    end
    if (sum4 != 10'(e4)) begin
      failures++;
      $display("FAIL 4 ops %h: got %0d want %0d", ops4, sum4, e4);
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
    ops3 = '1;
    ops4 = '1;
    check();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 3; k++) ops3[k] = 8'($urandom);
      for (int k = 0; k < 4; k++) ops4[k] = 8'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
