// mul29517: 16 x 16 bit parallel multiplier in the manner of the Am29517.
//
// Operands are loaded from the processor's 16-bit bus into the X and Y input
// registers.  The 32-bit product is formed combinationally with each operand
// taken as two's complement or unsigned (tcx, tcy), so signed, unsigned and
// mixed products are all available, with optional rounding (adds 1 at bit 15
// so the most significant half is rounded).  The product is captured in the
// product register when ldp is set, or passed straight through when ft is set.
// Because the bus is 16 bits wide, the full product leaves the multiplier
// multiplexed: msp selects the most or least significant half onto p.
//
// The 16x16 size, the operand formats, the 32-bit multiplexed product and the
// 8 control lines follow the processor description; the meaning given to each
// of the 8 control bits is this design's own.
//
// Timing: X, Y and product registers load on the rising clk edge when en is
// high; p is combinational from the product register (or from the operand
// registers in feed-through mode).  Reset clears all three registers.
module mul29517
  import pps_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  mul_f_t            ctl,
  input  logic [DATA_W-1:0] bus_in,
  output logic [DATA_W-1:0] p,
  output logic [2*DATA_W-1:0] product   // full product register, for observation
);
  logic [DATA_W-1:0]   xr, yr;
  logic                xs, ys;       // sign modes captured with the operands
  logic                rnd_r;
  logic [2*DATA_W-1:0] preg, pcomb;

  always_comb begin
    logic signed [DATA_W:0]     xe, ye;
    logic signed [2*DATA_W+1:0] full;
    xe    = {xs && xr[DATA_W-1], xr};
    ye    = {ys && yr[DATA_W-1], yr};
    full  = xe * ye;
    pcomb = full[2*DATA_W-1:0] + (rnd_r ? (2*DATA_W)'(1 << (DATA_W-1)) : '0);
  end

  assign product = ctl.ft ? pcomb : preg;
  assign p       = ctl.msp ? product[2*DATA_W-1:DATA_W] : product[DATA_W-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      xr <= '0; yr <= '0; preg <= '0; xs <= 1'b0; ys <= 1'b0; rnd_r <= 1'b0;
    end else if (en) begin
      if (ctl.ldx) begin xr <= bus_in; xs <= ctl.tcx; end
      if (ctl.ldy) begin yr <= bus_in; ys <= ctl.tcy; end
      if (ctl.ldx || ctl.ldy) rnd_r <= ctl.rnd;
      if (ctl.ldp) preg <= pcomb;
    end
  end

endmodule
