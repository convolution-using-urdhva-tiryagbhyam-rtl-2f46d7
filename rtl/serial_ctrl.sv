// serial_ctrl: sequencer of the serial convolver.
//
// A start pulse in the idle state loads the operands (load is high in that
// cycle) and begins a run. During the run a 4-bit counter drives the select
// lines sel = {s3, s2, s1, s0} through 0..15, one product per clock: s1:s0
// pick the sample of the first sequence, s3:s2 the sample of the second, and
// the same four lines steer the demultiplexer, with store high so the product
// register of the selected slot loads at the next rising edge. After the
// sixteenth product the controller returns to idle and pulses done for one
// cycle; from then the column sums are valid until the next start.
//
// Timing: start sampled at edge 0, products stored at edges 1..16, done high
// in the cycle after edge 16 (16 clocks from start to done). A start while
// busy is ignored. Asynchronous active-low reset.
// The four select lines and the one-product-at-a-time schedule follow the
// serial block diagram; the counter, start/done handshake and reset are this
// implementation's choice, since the design description gives no controller.
// The two assertions are disabled during reset, so rst_n is also read
// synchronously by them; lint reports this as a net used both synchronously
// and asynchronously. It concerns only the checkers, not the flip-flops.
module serial_ctrl (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  output logic       load,    // latch operands this cycle
  output logic       store,   // product register of slot sel loads at next edge
  output logic [3:0] sel,     // {s3, s2, s1, s0}
  output logic       busy,
  output logic       done     // one-cycle pulse: all sixteen products stored
);

  typedef enum logic {S_IDLE, S_RUN} state_t;

  state_t     state;
  logic [3:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_RUN;
          cnt   <= '0;
        end
        S_RUN: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  always_comb begin
    busy  = (state == S_RUN);
    load  = (state == S_IDLE) && start;
    store = busy;
    sel   = cnt;
  end

  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy)
    else $error("done raised while a run is in progress");
  a_sel_step: assert property (@(posedge clk) disable iff (!rst_n)
                               (busy && sel != 4'd15) |=> (busy && sel == $past(sel) + 4'd1))
    else $error("select lines did not advance by one during a run");

endmodule
