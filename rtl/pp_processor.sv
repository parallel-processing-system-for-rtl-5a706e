// pp_processor: one parallel processor (the processing unit).
//
// A horizontally microprogrammed 16-bit processor.  The sequencer (seq2910)
// addresses the 4k x 96 microprogram memory (ustore); the word read is loaded
// into the pipeline register, whose fields drive every unit in parallel in
// the next cycle: the sequencer itself (branch data, instruction, condition
// enable, counter load), the clock generator (cycle length), the multiplier
// (mul29517), the ALU processor (alu29116), a 16-bit literal, and the special
// registers (special_regs).  All data moves over one 16-bit bus, driven by the
// unit the microinstruction's bus field selects: ALU result, multiplier
// output, literal, work memory read, a special register, or the address adder.
// The address adder forms the work-memory (data_mem, 12k x 16) address from
// an index register and the literal.  Because ALU and multiplier share the
// bus, one cycle can load the multiplier and use the ALU on the same word,
// while the sequencer and special registers act independently.
//
// Interfaces: the CAMAC command port (camac_if) downloads/verifies microcode
// and enables the processor; the input register port receives event words
// from the INPUT module; the output register and the 32-bit histogram
// register are read by the OUTPUT and histogram modules; the MAR/MDR pair
// makes request/ack accesses to the shared MEMORY module.  avail and out_rdy
// are the "available" and "output ready" LAMs.
//
// Timing: every register loads on adv, the end of a processor cycle, which
// the clock generator issues after the microinstruction's cycle length and
// only when no addressed interface stalls.  A disabled processor is held in
// reset, so it restarts at microaddress 0.  The block structure and field
// widths follow the processor diagram; the encodings are this design's own
// (see pps_pkg).
// The sequencer's source-enable outputs (pl_n, map_n, vect_n) and stack-full
// flag, the ALU status word and the full 32-bit product are left unconnected
// inside: the branch address always comes from the pipeline register, and
// those signals remain available for probing.
module pp_processor
  import pps_pkg::*;
#(
  parameter int unsigned USTORE_WORDS = 4096,
  parameter int unsigned DMEM_WORDS   = 12288
) (
  input  logic               clk,
  input  logic               rst,
  // CAMAC dataway interface
  input  logic               cmd_valid,
  input  camac_cmd_e         cmd,
  input  logic [DATA_W-1:0]  cmd_data,
  output logic [DATA_W-1:0]  cmd_rdata,
  output logic               running,
  // input register
  input  logic               in_wr,
  input  logic [XFER_W-1:0]  in_data,
  input  logic               in_eoe,
  output logic               in_ready,
  input  logic               assign_evt,
  output logic               avail,
  // output register
  output logic               out_valid,
  output logic [DATA_W-1:0]  out_data,
  output logic               out_eoe,
  input  logic               out_ready,
  // histogram register
  output logic               hist_valid,
  output logic [HIST_W-1:0]  hist_data,
  input  logic               hist_ready,
  // MEMORY module
  output logic               mm_req,
  output logic               mm_we,
  output logic [DATA_W-1:0]  mm_addr,
  output logic [DATA_W-1:0]  mm_wdata,
  input  logic               mm_ack,
  input  logic [DATA_W-1:0]  mm_rdata,
  // observation
  output logic [UADDR_W-1:0] upc,
  output logic               adv,
  output logic               stalled
);
  logic                core_rst;
  uword_t              pl, uword_next;
  logic [UWORD_W-1:0]  urd;
  logic                us_we;
  logic [UADDR_W-1:0]  us_addr;
  logic [2:0]          us_slice;
  logic [DATA_W-1:0]   us_wdata, us_rdata;
  logic [DATA_W-1:0]   bus, bus_ext, alu_y, mul_p, sr_rd, ar_val, addr, dm_rd;
  logic                alu_ct, cond, stall;
  logic [3:0]          alu_status;
  logic [2*DATA_W-1:0] product;
  logic                full_n, pl_n, map_n, vect_n;

  assign core_rst = rst || !running;

  camac_if u_camac (
    .clk, .rst, .cmd_valid, .cmd, .cmd_data, .rd_data(cmd_rdata), .run(running),
    .us_we, .us_addr, .us_slice, .us_wdata, .us_rdata
  );

  seq2910 u_seq (
    .clk, .rst(core_rst), .en(adv),
    .i(pl.seq.i), .ccen(pl.seq.ccen), .cc(cond), .rld(pl.seq.rld), .ci(1'b1),
    .d(pl.d), .y(upc), .full_n, .pl_n, .map_n, .vect_n
  );

  ustore #(.WORDS(USTORE_WORDS)) u_ustore (
    .clk, .raddr(upc), .rdata(urd),
    .dl_we(us_we), .dl_addr(us_addr), .dl_slice(us_slice),
    .dl_wdata(us_wdata), .dl_rdata(us_rdata)
  );

  assign uword_next = uword_t'(urd);

  pipeline_reg u_pl (.clk, .rst(core_rst), .adv, .d(uword_next), .q(pl));

  clock_gen u_clk (.clk, .rst(core_rst), .cyc(pl.cyc), .stall, .adv, .stalled);

  alu29116 u_alu (
    .clk, .rst(core_rst), .en(adv), .ctl(pl.alu), .bus_in(bus_ext),
    .y(alu_y), .ct(alu_ct), .status(alu_status)
  );

  mul29517 u_mul (
    .clk, .rst(core_rst), .en(adv), .ctl(pl.mul), .bus_in(bus),
    .p(mul_p), .product
  );

  addr_adder u_add (.indexed(pl.sr.ar_add), .ar(ar_val), .lit(pl.imm), .addr);

  data_mem #(.WORDS(DMEM_WORDS)) u_dmem (
    .clk, .en(adv), .we(pl.sr.dm_we), .addr, .wdata(bus), .rdata(dm_rd)
  );

  special_regs u_sr (
    .clk, .rst(core_rst), .adv, .ctl(pl.sr), .bus_in(bus), .alu_ct,
    .rd_data(sr_rd), .ar_val, .cond, .stall,
    .in_wr, .in_data, .in_eoe, .in_ready, .assign_evt, .avail,
    .out_valid, .out_data, .out_eoe, .out_ready,
    .hist_valid, .hist_data, .hist_ready,
    .mm_req, .mm_we, .mm_addr, .mm_wdata, .mm_ack, .mm_rdata
  );

  // The 16-bit bus.  The ALU reads the bus as driven by the other units
  // only (zero in a cycle where the ALU itself drives it), so a
  // microinstruction cannot close a combinational loop through the ALU.
  always_comb begin
    unique case (pl.sr.bus)
      BUS_MUL:  bus_ext = mul_p;
      BUS_IMM:  bus_ext = pl.imm;
      BUS_DMEM: bus_ext = dm_rd;
      BUS_SREG: bus_ext = sr_rd;
      BUS_ADDR: bus_ext = addr;
      default:  bus_ext = '0;
    endcase
  end
  assign bus = (pl.sr.bus == BUS_ALU) ? alu_y : bus_ext;

endmodule
