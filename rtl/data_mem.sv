// data_mem: the processor's work memory, 12k words of 16 bits.
//
// It holds working space and constants downloaded by a processor program
// (calibrations, ADC pedestals, reciprocal tables for division by
// multiplication).  The address comes from the address adder; the read is
// combinational so a word can be read and used on the bus in one processor
// cycle; a write takes place at the end of the cycle (en high).  Addresses at
// or above WORDS read as zero and ignore writes.
//
// The 12k x 16 size follows the processor diagram (the text allows 4k to
// 12k); the out-of-range behaviour is this design's own.
module data_mem
  import pps_pkg::*;
#(
  parameter int unsigned WORDS = 12288
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [DATA_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [DATA_W-1:0] mem [WORDS];
  logic              inrange;

  assign inrange = (32'(addr) < WORDS);
  assign rdata   = inrange ? mem[addr[AW-1:0]] : '0;

  always_ff @(posedge clk)
    if (en && we && inrange) mem[addr[AW-1:0]] <= wdata;
endmodule
