// pps_asm: microprogram builder shared by the processor and system
// testbenches.
//
// Provides the reference event-analysis microprogram and the function that
// computes, independently of the hardware, what it must produce.  Event
// format on input: word 0 = event identifier, words 1..n = ADC values, the
// last word carrying the end-of-event flag (n >= 1).  For each event the
// program:
//   - raises "available", takes the identifier, stores it in MAR and the
//     upper half of the histogram register and sends it as the first output word;
//   - for each ADC value w: stores w in work memory at 0x100 + AR0 (AR0
//     increments), multiplies it by the gain K on the multiplier and sends
//     the most significant half c = (w*K) >> 16 to the output, summing c in
//     ALU register 0; the last value goes out with the end-of-event mark;
//   - pushes {identifier, sum} to the histogram output;
//   - in a subroutine, adds the sum to shared memory word [identifier]
//     (read, add, write through MAR/MDR);
//   - jumps back to the start.
package pps_asm;
  import pps_pkg::*;

  localparam logic [15:0] GAIN = 16'hC000;   // 0.75 as an unsigned fraction

  function automatic uword_t nop();
    uword_t u;
    u = '0;
    u.seq.i = SQ_CONT;
    return u;
  endfunction

  function automatic uword_t alu(uword_t u, alu_op_e op, alu_asrc_e a, alu_bsrc_e b, int ra, alu_dst_e dst, int n = 0);
    u.alu.op = op; u.alu.asrc = a; u.alu.bsrc = b; u.alu.ra = 5'(ra); u.alu.dst = dst; u.alu.n = 4'(n);
    return u;
  endfunction

  function automatic uword_t jmp(uword_t u, seq_op_e i, int d, bit ccen = 0, cond_sel_e c = CS_TRUE, bit pol = 0);
    u.seq.i = i; u.d = 12'(d); u.seq.ccen = ccen; u.sr.cond = c; u.sr.cpol = pol;
    return u;
  endfunction

  // the event-analysis program: address -> microword
  function automatic void build_program(ref uword_t prog [int]);
    uword_t u;
    prog.delete();
    u = nop(); u.sr.io = IO_AVAIL;                                               prog[0] = u;
    u = nop(); u.sr.bus = BUS_SREG; u.sr.rd = SR_IN; u.sr.io = IO_IN_POP; u.sr.wr = SR_MAR;
    u = alu(u, AL_PASSA, ASRC_BUS, BSRC_REG, 1, ADST_REG);                        prog[1] = u;
    u = nop(); u.sr.bus = BUS_ALU; u.sr.io = IO_OUT; u.sr.wr = SR_HIST;
    u = alu(u, AL_PASSA, ASRC_REG, BSRC_REG, 1, ADST_NONE);                       prog[2] = u;
    u = nop(); u = alu(u, AL_PASSB, ASRC_REG, BSRC_CONST, 0, ADST_REG, 0);        prog[3] = u;
    // loop over ADC values
    u = nop(); u.sr.bus = BUS_SREG; u.sr.rd = SR_IN; u.sr.io = IO_IN_POP; u.mul.ldx = 1;
    u.sr.dm_we = 1; u.sr.ar_add = 1; u.sr.ar = 2'd0; u.sr.ar_inc = 1; u.imm = 16'h0100;
    u = jmp(u, SQ_CJP, 8, 1, CS_INEOE);                                           prog[4] = u;
    u = nop(); u.sr.bus = BUS_IMM; u.imm = GAIN; u.mul.ldy = 1;                   prog[5] = u;
    u = nop(); u.sr.bus = BUS_MUL; u.mul.ft = 1; u.mul.msp = 1; u.sr.io = IO_OUT; u.cyc = 3'd2;
    u = alu(u, AL_ADD, ASRC_BUS, BSRC_REG, 0, ADST_REG);
    u = jmp(u, SQ_CJP, 4);                                                        prog[6] = u;
    // last ADC value
    u = nop(); u.sr.bus = BUS_IMM; u.imm = GAIN; u.mul.ldy = 1;                   prog[8] = u;
    u = nop(); u.sr.bus = BUS_MUL; u.mul.ft = 1; u.mul.msp = 1; u.sr.io = IO_OUT_EOE; u.cyc = 3'd2;
    u = alu(u, AL_ADD, ASRC_BUS, BSRC_REG, 0, ADST_REG);                          prog[9] = u;
    u = nop(); u.sr.bus = BUS_ALU; u.sr.io = IO_HIST;
    u = alu(u, AL_PASSA, ASRC_REG, BSRC_REG, 0, ADST_NONE);
    u = jmp(u, SQ_CJS, 20);                                                       prog[10] = u;
    u = nop(); u = jmp(u, SQ_CJP, 0);                                             prog[11] = u;
    // subroutine: shared memory [id] += sum
    u = nop(); u.sr.io = IO_MM_RD;                                                prog[20] = u;
    u = nop(); u.sr.bus = BUS_SREG; u.sr.rd = SR_MDR;
    u = alu(u, AL_ADD, ASRC_BUS, BSRC_REG, 0, ADST_REG);                          prog[21] = u;
    u = nop(); u.sr.bus = BUS_ALU; u.sr.wr = SR_MDR;
    u = alu(u, AL_PASSA, ASRC_REG, BSRC_REG, 0, ADST_NONE);                       prog[22] = u;
    u = nop(); u.sr.io = IO_MM_WR; u = jmp(u, SQ_CRTN, 0);                        prog[23] = u;
  endfunction

  // reference result of one event
  function automatic logic [15:0] calib(logic [15:0] w);
    logic [31:0] p;
    p = 32'(w) * 32'(GAIN);
    return p[31:16];
  endfunction

endpackage
