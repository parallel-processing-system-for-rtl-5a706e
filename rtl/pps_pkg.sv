// pps_pkg: shared sizes, the 96-bit horizontal microinstruction layout and the
// opcode encodings of the parallel processing system for spin spectrometer
// event analysis.
//
// The microword is split into the seven fields whose widths are printed on the
// processing-unit block diagram: 12 bits of branch/counter data and 6 control
// bits for the sequencer, 3 bits for the clock generator, 8 for the
// multiplier, 25 for the ALU processor, a 16-bit literal that reaches the bus
// and the address adder, and 26 for the special registers.  12+6+3+8+25+16+26
// is exactly the 96-bit microword width.  How the bits inside each field are
// assigned, and every opcode value below, is this design's own choice.
package pps_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned DATA_W    = 16;   // processor data and I/O width
  localparam int unsigned XFER_W    = 24;   // CAMAC transfer width into INPUT
  localparam int unsigned UADDR_W   = 12;   // microprogram address (4k)
  localparam int unsigned UWORD_W   = 96;   // horizontal microword
  localparam int unsigned USLICES   = UWORD_W / DATA_W;   // 6 download slices
  localparam int unsigned HIST_W    = 32;   // histogram output register
  localparam int unsigned STACK_D   = 5;    // sequencer subroutine stack depth
  localparam int unsigned NREGS     = 32;   // ALU internal register file

  // ---------------------------------------------------------------- sequencer
  // 16 microinstructions of the Am2910-compatible sequencer.
  typedef enum logic [3:0] {
    SQ_JZ   = 4'd0,  SQ_CJS  = 4'd1,  SQ_JMAP = 4'd2,  SQ_CJP  = 4'd3,
    SQ_PUSH = 4'd4,  SQ_JSRP = 4'd5,  SQ_CJV  = 4'd6,  SQ_JRP  = 4'd7,
    SQ_RFCT = 4'd8,  SQ_RPCT = 4'd9,  SQ_CRTN = 4'd10, SQ_CJPP = 4'd11,
    SQ_LDCT = 4'd12, SQ_LOOP = 4'd13, SQ_CONT = 4'd14, SQ_TWB  = 4'd15
  } seq_op_e;

  // ---------------------------------------------------------------- ALU
  typedef enum logic [4:0] {
    AL_PASSA = 5'd0,  AL_PASSB = 5'd1,  AL_ADD   = 5'd2,  AL_ADDC  = 5'd3,
    AL_SUB   = 5'd4,  AL_SUBR  = 5'd5,  AL_INCA  = 5'd6,  AL_DECA  = 5'd7,
    AL_AND   = 5'd8,  AL_OR    = 5'd9,  AL_XOR   = 5'd10, AL_NOTA  = 5'd11,
    AL_NEGA  = 5'd12, AL_ROTL  = 5'd13, AL_SHL   = 5'd14, AL_SHR   = 5'd15,
    AL_SAR   = 5'd16, AL_SETB  = 5'd17, AL_CLRB  = 5'd18, AL_TSTB  = 5'd19,
    AL_MASK  = 5'd20, AL_PRIO  = 5'd21, AL_STAT  = 5'd22
  } alu_op_e;

  typedef enum logic [1:0] {ASRC_REG = 2'd0, ASRC_ACC = 2'd1, ASRC_LATCH = 2'd2, ASRC_BUS = 2'd3} alu_asrc_e;
  typedef enum logic [1:0] {BSRC_REG = 2'd0, BSRC_ACC = 2'd1, BSRC_BUS = 2'd2, BSRC_CONST = 2'd3} alu_bsrc_e;
  typedef enum logic [2:0] {
    ADST_NONE = 3'd0, ADST_REG = 3'd1, ADST_ACC = 3'd2, ADST_LATCH = 3'd3, ADST_REGACC = 3'd4
  } alu_dst_e;
  typedef enum logic [2:0] {
    TS_Z = 3'd0, TS_NZ = 3'd1, TS_N = 3'd2, TS_C = 3'd3,
    TS_V = 3'd4, TS_LT = 3'd5, TS_LE = 3'd6, TS_NC = 3'd7
  } alu_test_e;

  // ---------------------------------------------------------------- bus
  typedef enum logic [2:0] {
    BUS_NONE = 3'd0, BUS_ALU = 3'd1, BUS_MUL = 3'd2, BUS_IMM = 3'd3,
    BUS_DMEM = 3'd4, BUS_SREG = 3'd5, BUS_ADDR = 3'd6, BUS_RSV = 3'd7
  } bus_src_e;

  // ---------------------------------------------------------------- special registers
  typedef enum logic [3:0] {
    SR_NONE = 4'd0,  SR_AR0  = 4'd1,  SR_AR1  = 4'd2,  SR_AR2  = 4'd3,
    SR_AR3  = 4'd4,  SR_RNG  = 4'd5,  SR_SHPR = 4'd6,  SR_PRIO = 4'd7,
    SR_IN   = 4'd8,  SR_INHI = 4'd9,  SR_HIST = 4'd10, SR_MAR  = 4'd11,
    SR_MDR  = 4'd12, SR_RSV13 = 4'd13, SR_RSV14 = 4'd14, SR_RSV15 = 4'd15
  } sreg_e;

  typedef enum logic [2:0] {
    IO_NONE = 3'd0, IO_IN_POP = 3'd1, IO_OUT = 3'd2, IO_OUT_EOE = 3'd3,
    IO_HIST = 3'd4, IO_MM_RD = 3'd5, IO_MM_WR = 3'd6, IO_AVAIL = 3'd7
  } io_op_e;

  typedef enum logic [2:0] {
    CS_TRUE = 3'd0, CS_ALU = 3'd1, CS_ARZ = 3'd2, CS_INV = 3'd3,
    CS_INEOE = 3'd4, CS_OUTFREE = 3'd5, CS_HISTFREE = 3'd6, CS_SHPRZ = 3'd7
  } cond_sel_e;

  typedef enum logic [1:0] {SH_HOLD = 2'd0, SH_LEFT = 2'd1, SH_RIGHT = 2'd2, SH_CLRTOP = 2'd3} sh_op_e;

  // ---------------------------------------------------------------- microword fields
  typedef struct packed {
    seq_op_e     i;       // sequencer instruction
    logic        ccen;    // 1: condition tested; 0: condition forced to pass
    logic        rld;     // 1: load counter/register from the D field
  } seq_f_t;              // 6 bits

  typedef struct packed {
    logic        ldx;     // load X operand register from bus
    logic        ldy;     // load Y operand register from bus
    logic        tcx;     // X is two's complement
    logic        tcy;     // Y is two's complement
    logic        rnd;     // round: add 1 at bit 15 of the product
    logic        ft;      // feed-through: product output bypasses product register
    logic        ldp;     // load product register
    logic        msp;     // output mux: 1 = most significant, 0 = least significant half
  } mul_f_t;              // 8 bits

  typedef struct packed {
    alu_op_e     op;      // 5
    alu_asrc_e   asrc;    // 2
    alu_bsrc_e   bsrc;    // 2
    logic [4:0]  ra;      // 5 register file address
    alu_dst_e    dst;     // 3
    logic [3:0]  n;       // 4 shift count / bit number / constant
    alu_test_e   tsel;    // 3 test condition select
    logic        sload;   // 1 update status register
  } alu_f_t;              // 25 bits

  typedef struct packed {
    bus_src_e    bus;     // 3 which unit drives the 16-bit bus
    sreg_e       rd;      // 4 special register read onto bus
    sreg_e       wr;      // 4 special register loaded from bus
    logic [1:0]  ar;      // 2 address register feeding the adder / zero test
    logic        ar_inc;  // 1 increment that address register at end of cycle
    logic        ar_add;  // 1 adder: 1 = AR + literal, 0 = literal alone
    logic        dm_we;   // 1 write bus into data memory at adder address
    cond_sel_e   cond;    // 3 condition routed to the sequencer
    logic        cpol;    // 1 invert the condition
    io_op_e      io;      // 3 interface operation
    sh_op_e      sh;      // 2 shift/priority register operation
    logic        rng;     // 1 step the random number register
  } sreg_f_t;             // 26 bits

  typedef struct packed {
    logic [UADDR_W-1:0] d;     // 12
    seq_f_t             seq;   // 6
    logic [2:0]         cyc;   // 3 clock generator: cycle length - 1
    mul_f_t             mul;   // 8
    alu_f_t             alu;   // 25
    logic [DATA_W-1:0]  imm;   // 16
    sreg_f_t            sr;    // 26
  } uword_t;

  // Commands from the host to a processor's CAMAC dataway interface.
  typedef enum logic [1:0] {
    CC_SETADDR = 2'd0, CC_WRITE = 2'd1, CC_READ = 2'd2, CC_ENABLE = 2'd3
  } camac_cmd_e;

endpackage
