// pipeline_reg: the 96-bit microinstruction pipeline register.
//
// It holds the microinstruction being executed while the sequencer and the
// microprogram memory fetch the next one, so the fetch of instruction n+1
// overlaps the execution of instruction n.  All units are driven in parallel
// from its fields.  It loads only when the processor cycle completes (adv);
// during a stretched or stalled cycle it holds its word.  Reset (or a disabled
// processor) clears it to all zeros, which decodes as a sequencer jump to
// address 0 with every other unit idle, so the processor starts at
// microaddress 0 when it is enabled.
//
// The register and its place between memory and units follow the processor
// diagram; the clear-to-zero reset word is this design's own choice.
module pipeline_reg
  import pps_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   adv,
  input  uword_t d,
  output uword_t q
);
  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (adv) q <= d;
  end
endmodule
