// input_module: the INPUT module (CAMAC), event distribution and download.
//
// Two functions.  (1) Download: the host selects one or more processors with
// a select mask and sends commands (set address, write/read a 16-bit slice of
// microcode, enable/disable) that are broadcast to every selected processor,
// so processors sharing one program are loaded in parallel; reads return the
// data of the lowest selected processor for verification.  (2) Event
// distribution: event words enter a FIFO either from the host over the CAMAC
// dataway (host_wr) or from the data acquisition system's front-panel input
// (das_valid/das_ready), chosen by src_das.  Each word is 24 bits plus an
// end-of-event flag.  When the FIFO holds data and some enabled processor
// raises its "available" flag, the distributor assigns the next event to one
// of them (round-robin among the available ones, starting after the last one
// served), then moves words into that processor's input register one at a
// time as it frees it, until the end-of-event word has gone; only then is the
// next event assigned.  So each event goes whole to one processor.
//
// The two functions, the 4k-word minimum FIFO, the two input sources, the
// 24-bit transfers, the parallel download and the "available" signalling
// follow the system description.  The end-of-event flag as the event
// boundary, the round-robin choice, the command set and the source select are
// this design's own.  Timing: single clock, synchronous reset; one word moved
// per clock at most.  The command code and data are broadcast to the
// processors on plain wires (p_cmd, p_cmd_data); only the per-processor
// strobes depend on the selection.
module input_module
  import pps_pkg::*;
#(
  parameter int unsigned NPROC      = 4,
  parameter int unsigned FIFO_DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,
  // host download / control
  input  logic                     sel_we,
  input  logic [NPROC-1:0]         sel_mask_in,
  input  logic                     pc_valid,
  input  camac_cmd_e               pc_cmd,
  input  logic [DATA_W-1:0]        pc_data,
  output logic [DATA_W-1:0]        pc_rdata,
  // event sources
  input  logic                     src_das,
  input  logic                     host_wr,
  input  logic [XFER_W-1:0]        host_data,
  input  logic                     host_eoe,
  input  logic                     das_valid,
  input  logic [XFER_W-1:0]        das_data,
  input  logic                     das_eoe,
  output logic                     das_ready,
  output logic                     fifo_full,
  output logic [$clog2(FIFO_DEPTH):0] fifo_count,
  // to the processors
  output logic [NPROC-1:0]         p_cmd_valid,
  output camac_cmd_e               p_cmd,
  output logic [DATA_W-1:0]        p_cmd_data,
  input  logic [DATA_W-1:0]        p_cmd_rdata [NPROC],
  input  logic [NPROC-1:0]         p_running,
  input  logic [NPROC-1:0]         p_avail,
  input  logic [NPROC-1:0]         p_in_ready,
  output logic [NPROC-1:0]         p_in_wr,
  output logic [XFER_W-1:0]        p_in_data,
  output logic                     p_in_eoe,
  output logic [NPROC-1:0]         p_assign
);
  localparam int unsigned IW = (NPROC > 1) ? $clog2(NPROC) : 1;

  logic [NPROC-1:0]  sel_mask;
  logic              f_wr, f_rd, f_empty;
  logic [XFER_W:0]   f_wdata, f_rdata;
  logic              busy;
  logic [IW-1:0]     cur, last;
  logic              found;
  logic [IW-1:0]     pick;

  // ---------------------------------------------------------------- download
  always_ff @(posedge clk) begin
    if (rst)         sel_mask <= '0;
    else if (sel_we) sel_mask <= sel_mask_in;
  end

  assign p_cmd_valid = pc_valid ? sel_mask : '0;
  assign p_cmd       = pc_cmd;
  assign p_cmd_data  = pc_data;

  always_comb begin
    pc_rdata = '0;
    for (int k = NPROC - 1; k >= 0; k--)
      if (sel_mask[k]) pc_rdata = p_cmd_rdata[k];
  end

  // ---------------------------------------------------------------- event FIFO
  assign das_ready = src_das && !fifo_full;
  assign f_wr      = src_das ? das_valid : host_wr;
  assign f_wdata   = src_das ? {das_eoe, das_data} : {host_eoe, host_data};

  sync_fifo #(.WIDTH(XFER_W + 1), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst, .wr_en(f_wr), .wr_data(f_wdata), .rd_en(f_rd), .rd_data(f_rdata),
    .empty(f_empty), .full(fifo_full), .count(fifo_count)
  );

  // ---------------------------------------------------------------- distributor
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int off = 1; off <= NPROC; off++) begin
      int unsigned k;
      k = (int'(last) + off) % NPROC;
      if (!found && p_avail[k] && p_running[k]) begin
        found = 1'b1;
        pick  = IW'(k);
      end
    end
  end

  assign f_rd      = busy && !f_empty && p_in_ready[cur];
  assign p_in_data = f_rdata[XFER_W-1:0];
  assign p_in_eoe  = f_rdata[XFER_W];

  always_comb begin
    p_in_wr  = '0;
    p_assign = '0;
    if (f_rd) p_in_wr[cur] = 1'b1;
    if (!busy && !f_empty && found) p_assign[pick] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy <= 1'b0; cur <= '0; last <= IW'(NPROC - 1);
    end else if (!busy) begin
      if (!f_empty && found) begin
        busy <= 1'b1; cur <= pick; last <= pick;
      end
    end else if (f_rd && f_rdata[XFER_W]) begin
      busy <= 1'b0;
    end
  end

endmodule
