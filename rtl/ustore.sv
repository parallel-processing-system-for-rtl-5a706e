// ustore: the processor's microprogram memory, 4k words of 96-bit horizontal
// microcode.
//
// The sequencer address selects a word that is read combinationally and
// captured by the pipeline register at the end of the cycle.  The program
// cannot write this memory: it is loaded only from the CAMAC dataway
// interface, 16 bits at a time, because the dataway carries 16-bit words.  A
// write names the word address and one of the six 16-bit slices (slice 0 =
// bits 15:0 ... slice 5 = bits 95:80).  The same interface reads a slice back
// for verification.
//
// Size 4k x 96 and the 16-bit download path follow the processor diagram; the
// slice numbering is this design's own.  No reset: contents are whatever was
// downloaded.  Writes happen on the rising clk edge; both reads are
// combinational.
module ustore
  import pps_pkg::*;
#(
  parameter int unsigned AW    = UADDR_W,
  parameter int unsigned WORDS = 4096
) (
  input  logic                  clk,
  input  logic [AW-1:0]         raddr,
  output logic [UWORD_W-1:0]    rdata,
  input  logic                  dl_we,
  input  logic [AW-1:0]         dl_addr,
  input  logic [2:0]            dl_slice,
  input  logic [DATA_W-1:0]     dl_wdata,
  output logic [DATA_W-1:0]     dl_rdata
);
  logic [UWORD_W-1:0] mem [WORDS];

  assign rdata    = mem[raddr];
  assign dl_rdata = (dl_slice < 3'(USLICES)) ? mem[dl_addr][dl_slice*DATA_W +: DATA_W] : '0;

  always_ff @(posedge clk)
    if (dl_we && dl_slice < 3'(USLICES))
      mem[dl_addr][dl_slice*DATA_W +: DATA_W] <= dl_wdata;

endmodule
