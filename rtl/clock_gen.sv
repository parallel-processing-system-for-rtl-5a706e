// clock_gen: processor cycle generator.
//
// The processing unit runs from one fast base clock.  Three bits of each
// microinstruction set how many base-clock periods its cycle lasts (field
// value + 1, so 1 to 8 periods), which lets slow operations such as a
// multiply or a memory access take a longer cycle while simple ones stay
// short.  adv is the one-cycle pulse that ends a processor cycle: all
// registers of the processor load on it.  A cycle also waits while stall is
// high (an interface that is not ready), so adv comes in the first base clock
// where the minimum length has elapsed and no stall is present.
//
// That the clock generator takes 3 bits from the pipeline register follows
// the processor diagram; reading them as a cycle length is this design's own
// interpretation.  Synchronous reset restarts the count.
module clock_gen (
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] cyc,
  input  logic       stall,
  output logic       adv,
  output logic       stalled      // length has elapsed but a stall holds the cycle
);
  logic [2:0] cnt;
  logic       done;

  assign done    = (cnt >= cyc);
  assign adv     = done && !stall && !rst;
  assign stalled = done && stall;

  always_ff @(posedge clk) begin
    if (rst || adv) cnt <= '0;
    else if (!done) cnt <= cnt + 1'b1;
  end
endmodule
