// tb_serial_ctrl: checks the sequencer of the serial convolver. After a
// start pulse the select lines must step 0..15 with store high, one value per
// clock; done must pulse exactly 16 clocks after the start edge; a start
// while busy must be ignored; idle cycles must show no store.
module tb_serial_ctrl;
  logic       clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic       load, store, busy, done;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  serial_ctrl dut (.clk(clk), .rst_n(rst_n), .start(start), .load(load),
                   .store(store), .sel(sel), .busy(busy), .done(done));

  always #5 clk = ~clk;

  task automatic expect_eq(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d want %0d at %0t", what, got, want, $time);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      expect_eq("idle store", int'(store), 0);
      expect_eq("idle busy", int'(busy), 0);
      start = 1'b1;
      #1;
      expect_eq("load with start", int'(load), 1);
      @(posedge clk);           // start edge
      @(negedge clk);
      start = 1'b0;
      for (int k = 0; k < 16; k++) begin
        expect_eq("busy", int'(busy), 1);
        expect_eq("store", int'(store), 1);
        expect_eq("sel", int'(sel), k);
        expect_eq("no done during run", int'(done), 0);
        // a start during the run must have no effect
        start = (k == 7);
        #1;
        expect_eq("no load while busy", int'(load), 0);
        @(negedge clk);
        start = 1'b0;
      end
      // 16 clocks after the start edge
      expect_eq("done", int'(done), 1);
      expect_eq("idle after run", int'(busy), 0);
      @(negedge clk);
      expect_eq("done is a pulse", int'(done), 0);
      repeat (run) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
