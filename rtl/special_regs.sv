// special_regs: the processor's special and interface registers.
//
// These registers work beside the ALU and the multiplier, driven by their own
// 26-bit field of the microinstruction, so they can act in the same cycle as
// the arithmetic units:
//   AR0..AR3  address/index registers: loaded from the bus, one can be added
//             to the literal to address the work memory and can be incremented
//             at the end of the cycle; its zero test is a sequencer condition.
//   RNG       random number register (16-bit Galois LFSR, polynomial
//             x^16+x^14+x^13+x^11+1); used to smooth ADC values.  Writing seeds
//             it (a zero seed is replaced by 1).
//   SHPR      shift/priority register: shifts left or right by one, or clears
//             its highest set bit; reading PRIO gives the index of that bit
//             (0xFFFF when SHPR is zero), so a hit pattern can be scanned.
//   IN/INHI   input register, written by the INPUT module with one 24-bit
//             event word and its end-of-event flag; IN reads bits 15:0, INHI
//             reads {eoe, 7'b0, bits 23:16}.  The io operation IN_POP frees it.
//   OUT       output register towards the OUTPUT module: IO_OUT / IO_OUT_EOE
//             place the bus word (and an end-of-event mark) in it.
//   HIST      32-bit histogram output register: HIST holds the upper half and
//             IO_HIST pushes {HIST, bus} towards the histogramming system.
//   MAR/MDR   the register pair for the shared MEMORY module: IO_MM_RD reads
//             memory[MAR] into MDR, IO_MM_WR writes MDR to memory[MAR].
//   avail     the "available" flag (LAM): IO_AVAIL sets it, the INPUT
//             module clears it when it starts sending this processor an event.
// An io operation whose interface is not ready stalls the processor cycle
// (stall output to the clock generator) instead of needing a polling loop;
// the same readiness is also offered as sequencer conditions.
//
// Which registers exist follows the processor description; the register
// numbering, the read layouts, the LFSR polynomial, the PRIO encoding and
// stalling on a busy interface are this design's own choices.
//
// Timing: all registers load on the rising clk edge when adv (end of a
// processor cycle) is high; the interface handshakes (in_wr, out_ready,
// hist_ready, mm_ack) act on any base clock edge.  Synchronous reset clears
// every register and flag.
module special_regs
  import pps_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic                adv,
  input  sreg_f_t             ctl,
  input  logic [DATA_W-1:0]   bus_in,
  input  logic                alu_ct,
  output logic [DATA_W-1:0]   rd_data,
  output logic [DATA_W-1:0]   ar_val,     // selected address register, to the adder
  output logic                cond,       // condition for the sequencer (polarity applied)
  output logic                stall,
  // input register, written by the INPUT module
  input  logic                in_wr,
  input  logic [XFER_W-1:0]   in_data,
  input  logic                in_eoe,
  output logic                in_ready,
  input  logic                assign_evt,
  output logic                avail,
  // output register, read by the OUTPUT module
  output logic                out_valid,
  output logic [DATA_W-1:0]   out_data,
  output logic                out_eoe,
  input  logic                out_ready,
  // histogram register
  output logic                hist_valid,
  output logic [HIST_W-1:0]   hist_data,
  input  logic                hist_ready,
  // MEMORY module port
  output logic                mm_req,
  output logic                mm_we,
  output logic [DATA_W-1:0]   mm_addr,
  output logic [DATA_W-1:0]   mm_wdata,
  input  logic                mm_ack,
  input  logic [DATA_W-1:0]   mm_rdata
);
  logic [DATA_W-1:0] ar [4];
  logic [DATA_W-1:0] rng, shpr, hist_hi, mar, mdr;
  logic [XFER_W-1:0] in_r;
  logic              in_v, in_e;
  logic [DATA_W-1:0] prio;
  logic              c_raw;

  always_comb begin
    prio = '1;
    for (int k = 0; k < DATA_W; k++)
      if (shpr[k]) prio = DATA_W'(k);
  end

  assign ar_val = ar[ctl.ar];

  always_comb begin
    unique case (ctl.rd)
      SR_AR0:  rd_data = ar[0];
      SR_AR1:  rd_data = ar[1];
      SR_AR2:  rd_data = ar[2];
      SR_AR3:  rd_data = ar[3];
      SR_RNG:  rd_data = rng;
      SR_SHPR: rd_data = shpr;
      SR_PRIO: rd_data = prio;
      SR_IN:   rd_data = in_r[DATA_W-1:0];
      SR_INHI: rd_data = {in_e, 7'b0, in_r[XFER_W-1:DATA_W]};
      SR_HIST: rd_data = hist_hi;
      SR_MAR:  rd_data = mar;
      SR_MDR:  rd_data = mdr;
      default: rd_data = '0;
    endcase
  end

  always_comb begin
    unique case (ctl.cond)
      CS_TRUE:     c_raw = 1'b1;
      CS_ALU:      c_raw = alu_ct;
      CS_ARZ:      c_raw = (ar_val == '0);
      CS_INV:      c_raw = in_v;
      CS_INEOE:    c_raw = in_e;
      CS_OUTFREE:  c_raw = !out_valid;
      CS_HISTFREE: c_raw = !hist_valid;
      default:     c_raw = (shpr == '0);
    endcase
    cond = c_raw ^ ctl.cpol;
  end

  always_comb begin
    unique case (ctl.io)
      IO_IN_POP:             stall = !in_v;
      IO_OUT, IO_OUT_EOE:    stall = out_valid;
      IO_HIST:               stall = hist_valid;
      IO_MM_RD, IO_MM_WR:    stall = !mm_ack;
      default:               stall = 1'b0;
    endcase
  end

  assign in_ready = !in_v;
  assign mm_req   = !rst && (ctl.io == IO_MM_RD || ctl.io == IO_MM_WR);
  assign mm_we    = (ctl.io == IO_MM_WR);
  assign mm_addr  = mar;
  assign mm_wdata = mdr;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < 4; k++) ar[k] <= '0;
      rng <= 16'h0001; shpr <= '0; hist_hi <= '0; mar <= '0; mdr <= '0;
      in_r <= '0; in_v <= 1'b0; in_e <= 1'b0;
      out_valid <= 1'b0; out_data <= '0; out_eoe <= 1'b0;
      hist_valid <= 1'b0; hist_data <= '0;
      avail <= 1'b0;
    end else begin
      // handshakes with the modules outside the processor
      if (in_wr && !in_v) begin in_r <= in_data; in_e <= in_eoe; in_v <= 1'b1; end
      if (out_valid && out_ready)   out_valid  <= 1'b0;
      if (hist_valid && hist_ready) hist_valid <= 1'b0;
      if (mm_ack && !mm_we)         mdr <= mm_rdata;
      if (assign_evt)               avail <= 1'b0;

      if (adv) begin
        // address registers: load from bus, else increment
        for (int k = 0; k < 4; k++) begin
          if (ctl.wr == sreg_e'(int'(SR_AR0) + k)) ar[k] <= bus_in;
          else if (ctl.ar_inc && ctl.ar == 2'(k)) ar[k] <= ar[k] + 1'b1;
        end
        if (ctl.wr == SR_RNG)       rng <= (bus_in == '0) ? 16'h0001 : bus_in;
        else if (ctl.rng)           rng <= (rng >> 1) ^ (rng[0] ? 16'hB400 : 16'h0000);
        if (ctl.wr == SR_SHPR)      shpr <= bus_in;
        else unique case (ctl.sh)
          SH_LEFT:   shpr <= shpr << 1;
          SH_RIGHT:  shpr <= shpr >> 1;
          SH_CLRTOP: if (shpr != '0) shpr[prio[3:0]] <= 1'b0;
          default: ;
        endcase
        if (ctl.wr == SR_HIST) hist_hi <= bus_in;
        if (ctl.wr == SR_MAR)  mar <= bus_in;
        if (ctl.wr == SR_MDR)  mdr <= bus_in;
        unique case (ctl.io)
          IO_IN_POP:  in_v <= 1'b0;
          IO_OUT, IO_OUT_EOE: begin
            out_data <= bus_in; out_eoe <= (ctl.io == IO_OUT_EOE); out_valid <= 1'b1;
          end
          IO_HIST:    begin hist_data <= {hist_hi, bus_in}; hist_valid <= 1'b1; end
          IO_AVAIL:   if (!assign_evt) avail <= 1'b1;
          default: ;
        endcase
      end
    end
  end

endmodule
