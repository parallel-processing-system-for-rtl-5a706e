// pps_top: the parallel processing system.
//
// NPROC identical microprogrammed processors (pp_processor) work on whole
// events in parallel: the event stream divides naturally at event
// boundaries, so each event is handled by one processor independently of the
// others, and four processors of ~200 ns cycle give an effective cycle near
// 50-70 ns.  Around them:
//   input_module   downloads microcode into the selected processors (in
//                  parallel when they share a program), enables them, and
//                  distributes whole events from its input FIFO (host or
//                  data acquisition front panel) to available processors;
//   output_module  collects whole processed events into its output FIFO,
//                  read by the host or through a front-panel port;
//   mem_module     64k x 16 shared memory, request/grant, for large tables,
//                  shared values and histograms; the host can also reach it;
//   hist_out       passes 32-bit histogram words to the satellite
//                  histogramming microprocessor and its mass memory.
// The host computer and its CAMAC crate controllers, the data acquisition
// system and the satellite microprocessor with its mass memory are outside
// this design: their signals are the ports of this module.
//
// Timing: one clock for the whole system (the processors stretch their own
// cycles with their clock generators); synchronous active-high reset.  The
// "available" and "output ready" LAMs of each processor are brought out.
module pps_top
  import pps_pkg::*;
#(
  parameter int unsigned NPROC        = 4,
  parameter int unsigned USTORE_WORDS = 4096,
  parameter int unsigned DMEM_WORDS   = 12288,
  parameter int unsigned IN_DEPTH     = 4096,
  parameter int unsigned OUT_DEPTH    = 4096,
  parameter int unsigned MM_WORDS     = 65536,
  parameter int unsigned HIST_DEPTH   = 16
) (
  input  logic                     clk,
  input  logic                     rst,
  // host download/control through the INPUT module
  input  logic                     sel_we,
  input  logic [NPROC-1:0]         sel_mask,
  input  logic                     pc_valid,
  input  camac_cmd_e               pc_cmd,
  input  logic [DATA_W-1:0]        pc_data,
  output logic [DATA_W-1:0]        pc_rdata,
  // event input
  input  logic                     src_das,
  input  logic                     host_wr,
  input  logic [XFER_W-1:0]        host_data,
  input  logic                     host_eoe,
  input  logic                     das_valid,
  input  logic [XFER_W-1:0]        das_data,
  input  logic                     das_eoe,
  output logic                     das_ready,
  output logic                     in_fifo_full,
  // event output
  input  logic                     fp_mode,
  output logic                     fp_valid,
  output logic [DATA_W-1:0]        fp_data,
  output logic                     fp_eoe,
  input  logic                     fp_ready,
  input  logic                     host_rd,
  output logic [DATA_W-1:0]        host_rdata,
  output logic                     host_reoe,
  output logic                     out_fifo_empty,
  // satellite histogramming system
  output logic                     h_valid,
  output logic [HIST_W-1:0]        h_data,
  output logic [$clog2(NPROC > 1 ? NPROC : 2)-1:0] h_src,
  input  logic                     h_ready,
  // host access to the shared memory
  input  logic                     mh_req,
  input  logic                     mh_we,
  input  logic [DATA_W-1:0]        mh_addr,
  input  logic [DATA_W-1:0]        mh_wdata,
  output logic                     mh_ack,
  output logic [DATA_W-1:0]        mh_rdata,
  // LAMs and observation
  output logic [NPROC-1:0]         lam_avail,
  output logic [NPROC-1:0]         lam_outrdy,
  output logic [NPROC-1:0]         running,
  output logic [NPROC-1:0]         stalled,
  output logic [31:0]              n_mem_contend,
  output logic [31:0]              n_out_multi_wait
);
  logic [NPROC-1:0]  p_cmd_valid;
  camac_cmd_e        p_cmd;
  logic [DATA_W-1:0] p_cmd_data;
  logic [DATA_W-1:0] p_cmd_rdata [NPROC];
  logic [NPROC-1:0]  p_in_ready, p_in_wr, p_assign;
  logic [XFER_W-1:0] p_in_data;
  logic              p_in_eoe;
  logic [NPROC-1:0]  o_valid, o_eoe, o_ready;
  logic [DATA_W-1:0] o_data [NPROC];
  logic [NPROC-1:0]  hs_valid, hs_ready;
  logic [HIST_W-1:0] hs_data [NPROC];
  logic [NPROC-1:0]  m_req, m_we, m_ack;
  logic [DATA_W-1:0] m_addr [NPROC];
  logic [DATA_W-1:0] m_wdata [NPROC];
  logic [DATA_W-1:0] m_rdata;
  logic [NPROC-1:0]  p_adv;
  logic [UADDR_W-1:0] p_upc [NPROC];

  input_module #(.NPROC(NPROC), .FIFO_DEPTH(IN_DEPTH)) u_in (
    .clk, .rst, .sel_we, .sel_mask_in(sel_mask), .pc_valid, .pc_cmd, .pc_data, .pc_rdata,
    .src_das, .host_wr, .host_data, .host_eoe, .das_valid, .das_data, .das_eoe, .das_ready,
    .fifo_full(in_fifo_full), .fifo_count(),
    .p_cmd_valid, .p_cmd, .p_cmd_data, .p_cmd_rdata, .p_running(running), .p_avail(lam_avail),
    .p_in_ready, .p_in_wr, .p_in_data, .p_in_eoe, .p_assign
  );

  for (genvar g = 0; g < NPROC; g++) begin : g_pp
    pp_processor #(.USTORE_WORDS(USTORE_WORDS), .DMEM_WORDS(DMEM_WORDS)) u_pp (
      .clk, .rst,
      .cmd_valid(p_cmd_valid[g]), .cmd(p_cmd), .cmd_data(p_cmd_data),
      .cmd_rdata(p_cmd_rdata[g]), .running(running[g]),
      .in_wr(p_in_wr[g]), .in_data(p_in_data), .in_eoe(p_in_eoe), .in_ready(p_in_ready[g]),
      .assign_evt(p_assign[g]), .avail(lam_avail[g]),
      .out_valid(o_valid[g]), .out_data(o_data[g]), .out_eoe(o_eoe[g]), .out_ready(o_ready[g]),
      .hist_valid(hs_valid[g]), .hist_data(hs_data[g]), .hist_ready(hs_ready[g]),
      .mm_req(m_req[g]), .mm_we(m_we[g]), .mm_addr(m_addr[g]), .mm_wdata(m_wdata[g]),
      .mm_ack(m_ack[g]), .mm_rdata(m_rdata),
      .upc(p_upc[g]), .adv(p_adv[g]), .stalled(stalled[g])
    );
  end

  assign lam_outrdy = o_valid;

  output_module #(.NPROC(NPROC), .FIFO_DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst, .p_valid(o_valid), .p_data(o_data), .p_eoe(o_eoe), .p_ready(o_ready),
    .fp_mode, .fp_valid, .fp_data, .fp_eoe, .fp_ready, .host_rd, .host_rdata, .host_reoe,
    .fifo_empty(out_fifo_empty), .fifo_count(), .n_multi_wait(n_out_multi_wait)
  );

  mem_module #(.NPROC(NPROC), .WORDS(MM_WORDS)) u_mem (
    .clk, .rst, .req(m_req), .we(m_we), .addr(m_addr), .wdata(m_wdata), .ack(m_ack),
    .rdata(m_rdata), .h_req(mh_req), .h_we(mh_we), .h_addr(mh_addr), .h_wdata(mh_wdata),
    .h_ack(mh_ack), .n_contend(n_mem_contend)
  );
  assign mh_rdata = m_rdata;

  hist_out #(.NPROC(NPROC), .FIFO_DEPTH(HIST_DEPTH)) u_hist (
    .clk, .rst, .p_valid(hs_valid), .p_data(hs_data), .p_ready(hs_ready),
    .h_valid, .h_data, .h_src, .h_ready
  );

endmodule
