// addr_adder: data memory address adder.
//
// Forms the work-memory address of a cycle as the selected address/index
// register plus the 16-bit literal of the microinstruction (indexed access),
// or the literal alone (absolute access).  The sum also goes to the bus so a
// program can compute an address arithmetic result without the ALU.
//
// The adder between the special registers, the literal field and the data
// memory follows the processor diagram; the two modes are this design's own.
// Purely combinational.
module addr_adder
  import pps_pkg::*;
(
  input  logic              indexed,
  input  logic [DATA_W-1:0] ar,
  input  logic [DATA_W-1:0] lit,
  output logic [DATA_W-1:0] addr
);
  assign addr = indexed ? ar + lit : lit;
endmodule
