// hist_out: the random-time access OUTPUT module towards the satellite
// histogramming system.
//
// Processors produce 32-bit histogram words (typically a channel address to
// be incremented) at unpredictable times.  This module takes them from the
// processors' 32-bit histogram registers in round-robin order, one word per
// clock, into a small FIFO, and offers them to the satellite microprocessor
// and its mass memory on a valid/ready port, tagged with the number of the
// processor that produced each word.
//
// A module between the processors and the satellite system and the 32-bit
// register width follow the system description; the round-robin collection,
// the FIFO, its depth and the source tag are this design's own.  Single
// clock, synchronous reset.
module hist_out
  import pps_pkg::*;
#(
  parameter int unsigned NPROC      = 4,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic [NPROC-1:0]        p_valid,
  input  logic [HIST_W-1:0]       p_data [NPROC],
  output logic [NPROC-1:0]        p_ready,
  output logic                    h_valid,
  output logic [HIST_W-1:0]       h_data,
  output logic [$clog2(NPROC > 1 ? NPROC : 2)-1:0] h_src,
  input  logic                    h_ready
);
  localparam int unsigned IW = $clog2(NPROC > 1 ? NPROC : 2);

  logic [IW-1:0]        last, pick;
  logic                 found, f_full, f_empty, f_wr;
  logic [HIST_W+IW-1:0] f_rdata;

  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int off = 1; off <= NPROC; off++) begin
      int unsigned k;
      k = (int'(last) + off) % NPROC;
      if (!found && p_valid[k]) begin found = 1'b1; pick = IW'(k); end
    end
  end

  assign f_wr = found && !f_full;

  always_comb begin
    p_ready = '0;
    if (f_wr) p_ready[pick] = 1'b1;
  end

  sync_fifo #(.WIDTH(HIST_W + IW), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(f_wr), .wr_data({pick, p_data[pick]}),
    .rd_en(h_valid && h_ready), .rd_data(f_rdata), .empty(f_empty), .full(f_full),
    .count()
  );

  assign h_valid = !f_empty;
  assign h_data  = f_rdata[HIST_W-1:0];
  assign h_src   = f_rdata[HIST_W+IW-1:HIST_W];

  always_ff @(posedge clk) begin
    if (rst)       last <= IW'(NPROC - 1);
    else if (f_wr) last <= pick;
  end

endmodule
