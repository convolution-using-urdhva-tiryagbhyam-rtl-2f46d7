// tb_demux16: checks that the demultiplexer puts the product on exactly the
// selected slot, zero on the other fifteen, and a strobe only on the selected
// slot and only when enabled (every select value, enable high and low,
// random products).
module tb_demux16;
  import conv_pkg::*;
  prod_t        z;
  logic [3:0]   sel;
  logic         en;
  prod_t [15:0] slot;
  logic  [15:0] strobe;
  int checks = 0, failures = 0;

  demux16 dut (.z(z), .sel(sel), .en(en), .slot(slot), .strobe(strobe));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 8; rep++) begin
      for (int s = 0; s < 16; s++) begin
        for (int e = 0; e < 2; e++) begin
          z   = prod_t'($urandom_range(255, 1));
          sel = 4'(s);
          en  = 1'(e);
          #1;
          for (int n = 0; n < 16; n++) begin
            checks += 2;
            if (slot[n] != ((n == s) ? z : 8'd0)) begin
              failures++;
              $display("FAIL sel=%0d slot %0d = %0d", s, n, slot[n]);
            end
            if (strobe[n] != ((n == s) && e == 1)) begin
              failures++;
              $display("FAIL sel=%0d en=%0d strobe %0d = %b", s, e, n, strobe[n]);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
