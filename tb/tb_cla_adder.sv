// tb_cla_adder: checks the 8-bit carry look-ahead adder against integer
// addition: long carry chains (255 + 1, 255 + 255, alternating patterns),
// then 2000 random operand pairs with random carry-in.
module tb_cla_adder;
  logic [7:0] a, b;
  logic       cin;
  logic [8:0] sum;
  int checks = 0, failures = 0;

  cla_adder #(.WIDTH(8)) dut (.a(a), .b(b), .cin(cin), .sum(sum));

  task automatic check(input int va, input int vb, input int vc);
    a   = 8'(va);
    b   = 8'(vb);
    cin = 1'(vc);
    #1;
    checks++;
    if (sum != 9'(va + vb + vc)) begin
      failures++;
      $display("FAIL %0d+%0d+%0d: got %0d", va, vb, vc, sum);
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
    check(255, 1, 0);
    check(255, 0, 1);
    check(255, 255, 1);
    check(8'hAA, 8'h55, 1);
    check(0, 0, 0);
    for (int n = 0; n < 2000; n++)
      check(int'($urandom_range(255)), int'($urandom_range(255)), int'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
