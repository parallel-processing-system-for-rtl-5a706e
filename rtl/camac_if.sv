// camac_if: a processor's CAMAC dataway interface (download and control).
//
// Through it the host computer, via the INPUT module, writes and verifies the
// microprogram memory and enables or disables the processor.  Commands:
//   CC_SETADDR  data[11:0] = microword address, slice counter set to 0
//   CC_WRITE    data written to the current slice of the current word; the
//               slice counter then advances, and after slice 5 the address
//               increments and the slice returns to 0, so a program is
//               streamed as consecutive 16-bit words, six per microword
//   CC_READ     returns the current slice on rd_data, then advances the same
//               way (verification uses the same path as the download)
//   CC_ENABLE   data[0] = 1 runs the processor, 0 disables (holds it in reset)
// Writes are accepted only while the processor is disabled, since the program
// memory must not change under a running program.
//
// The 12-bit address and 16-bit data paths from this interface to the
// microprogram memory follow the processor diagram; the command set and the
// auto-advancing address are this design's own.  rd_data is combinational
// from the current address and slice.  Reset disables the processor.  The write data
// (us_wdata) and the read-back (rd_data) are plain wires between the dataway
// and the memory port; only the address, slice, strobe and run state are
// logic of this block.
module camac_if
  import pps_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  logic               cmd_valid,
  input  camac_cmd_e         cmd,
  input  logic [DATA_W-1:0]  cmd_data,
  output logic [DATA_W-1:0]  rd_data,
  output logic               run,
  // to the microprogram memory
  output logic               us_we,
  output logic [UADDR_W-1:0] us_addr,
  output logic [2:0]         us_slice,
  output logic [DATA_W-1:0]  us_wdata,
  input  logic [DATA_W-1:0]  us_rdata
);
  logic step;

  assign us_we    = cmd_valid && cmd == CC_WRITE && !run;
  assign us_wdata = cmd_data;
  assign rd_data  = us_rdata;
  assign step     = cmd_valid && (cmd == CC_READ || (cmd == CC_WRITE && !run));

  always_ff @(posedge clk) begin
    if (rst) begin
      run <= 1'b0; us_addr <= '0; us_slice <= '0;
    end else if (cmd_valid) begin
      if (cmd == CC_SETADDR) begin
        us_addr  <= cmd_data[UADDR_W-1:0];
        us_slice <= '0;
      end else if (cmd == CC_ENABLE) begin
        run <= cmd_data[0];
      end else if (step) begin
        if (us_slice == 3'(USLICES - 1)) begin
          us_slice <= '0;
          us_addr  <= us_addr + 1'b1;
        end else us_slice <= us_slice + 1'b1;
      end
    end
  end
endmodule
