// tb_mux4_slice: exhaustive check of the 4:1 bit multiplexer (all 16 data
// patterns with all four select values).
module tb_mux4_slice;
  logic [3:0] d;
  logic [1:0] sel;
  logic       y;
  int checks = 0, failures = 0;

  mux4_slice dut (.d(d), .sel(sel), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      for (int s = 0; s < 4; s++) begin
        d   = 4'(v);
        sel = 2'(s);
        #1;
        checks++;
        if (y != ((v >> s) & 1)) begin
          failures++;
          $display("FAIL d=%b sel=%0d: got %b", d, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
