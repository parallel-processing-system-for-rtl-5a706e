// alu29116: 16-bit microprogrammed ALU processor in the manner of the Am29116.
//
// It holds 32 internal registers, an accumulator, an input latch and a
// status register (Z, N, C, V).  Each cycle the 25-bit control field picks an
// A operand (register, accumulator, latch or external bus), a B operand
// (register, accumulator, bus or the 4-bit constant from the control field),
// an operation, and where the result goes (register, accumulator, latch or
// both register and accumulator).  The result is always presented on y, from
// where the processor's bus multiplexer can route it to the 16-bit bus.
// Operations: add/subtract with carry, increment, decrement, negate, logic,
// rotate and shifts by 0..15 bits, set/clear/test of one bit, masking, priority
// encoding and reading the status word.  ct is the selected test condition,
// available during the cycle for the sequencer.
//
// The feature list (accumulator, 15-bit rotations, bit set/mask/clear,
// priority encoding, 32 registers, input latch, condition codes, status word
// read, data from the control inputs) follows the processor description; the
// 25-bit control encoding and the exact operation set are this design's own.
// The priority encoder returns 1 + the index of the highest set bit of A, or 0
// when A is zero.
//
// Timing: combinational y/ct; registers, accumulator, latch and status are
// written on the rising clk edge when en is high.  Reset clears accumulator,
// latch and status; the register file is not reset.
module alu29116
  import pps_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  alu_f_t            ctl,
  input  logic [DATA_W-1:0] bus_in,
  output logic [DATA_W-1:0] y,
  output logic              ct,
  output logic [3:0]        status     // {V, C, N, Z}
);
  logic [DATA_W-1:0] regs [NREGS];
  logic [DATA_W-1:0] acc, latch;
  logic              sz, sn, sc, sv;

  logic [DATA_W-1:0] a, b, res;
  logic              c_out, v_out;
  logic [DATA_W:0]   sum;
  logic [4:0]        prio;

  always_comb begin
    unique case (ctl.asrc)
      ASRC_REG:   a = regs[ctl.ra];
      ASRC_ACC:   a = acc;
      ASRC_LATCH: a = latch;
      default:    a = bus_in;
    endcase
    unique case (ctl.bsrc)
      BSRC_REG:   b = regs[ctl.ra];
      BSRC_ACC:   b = acc;
      BSRC_BUS:   b = bus_in;
      default:    b = DATA_W'(ctl.n);
    endcase
  end

  always_comb begin
    prio = '0;
    for (int k = 0; k < DATA_W; k++)
      if (a[k]) prio = 5'(k + 1);
  end

  always_comb begin
    sum   = '0;
    c_out = sc;
    v_out = sv;
    res   = a;
    unique case (ctl.op)
      AL_PASSA: res = a;
      AL_PASSB: res = b;
      AL_ADD:   begin sum = {1'b0, a} + {1'b0, b};
                      res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (a[DATA_W-1] == b[DATA_W-1]) && (res[DATA_W-1] != a[DATA_W-1]); end
      AL_ADDC:  begin sum = {1'b0, a} + {1'b0, b} + (DATA_W+1)'(sc);
                      res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (a[DATA_W-1] == b[DATA_W-1]) && (res[DATA_W-1] != a[DATA_W-1]); end
      AL_SUB:   begin sum = {1'b0, a} + {1'b0, ~b} + 1'b1;      // carry = no borrow
                      res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (a[DATA_W-1] != b[DATA_W-1]) && (res[DATA_W-1] != a[DATA_W-1]); end
      AL_SUBR:  begin sum = {1'b0, b} + {1'b0, ~a} + 1'b1;
                      res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (a[DATA_W-1] != b[DATA_W-1]) && (res[DATA_W-1] != b[DATA_W-1]); end
      AL_INCA:  begin sum = {1'b0, a} + 1'b1; res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (res == {1'b1, {(DATA_W-1){1'b0}}}); end
      AL_DECA:  begin sum = {1'b0, a} + {1'b0, {DATA_W{1'b1}}}; res = sum[DATA_W-1:0];
                      c_out = sum[DATA_W]; v_out = (a == {1'b1, {(DATA_W-1){1'b0}}}); end
      AL_AND:   res = a & b;
      AL_OR:    res = a | b;
      AL_XOR:   res = a ^ b;
      AL_NOTA:  res = ~a;
      AL_NEGA:  begin sum = {1'b0, ~a} + 1'b1; res = sum[DATA_W-1:0]; c_out = sum[DATA_W];
                      v_out = (a == {1'b1, {(DATA_W-1){1'b0}}}); end
      AL_ROTL:  res = (a << ctl.n) | (a >> (DATA_W - 32'(ctl.n)));
      AL_SHL:   begin res = a << ctl.n; if (ctl.n != 0) c_out = a[DATA_W - 32'(ctl.n)]; end
      AL_SHR:   begin res = a >> ctl.n; if (ctl.n != 0) c_out = a[ctl.n - 1]; end
      AL_SAR:   begin res = DATA_W'($signed(a) >>> ctl.n); if (ctl.n != 0) c_out = a[ctl.n - 1]; end
      AL_SETB:  res = a | (DATA_W'(1) << ctl.n);
      AL_CLRB:  res = a & ~(DATA_W'(1) << ctl.n);
      AL_TSTB:  res = a & (DATA_W'(1) << ctl.n);
      AL_MASK:  res = a & ~b;
      AL_PRIO:  res = DATA_W'(prio);
      AL_STAT:  res = DATA_W'({sv, sc, sn, sz});
      default:  res = a;
    endcase
  end

  assign y      = res;
  assign status = {sv, sc, sn, sz};

  // test output uses the flags this operation produces
  always_comb begin
    logic z_n, n_n;
    z_n = (res == '0);
    n_n = res[DATA_W-1];
    unique case (ctl.tsel)
      TS_Z:    ct = z_n;
      TS_NZ:   ct = !z_n;
      TS_N:    ct = n_n;
      TS_C:    ct = c_out;
      TS_V:    ct = v_out;
      TS_LT:   ct = n_n ^ v_out;
      TS_LE:   ct = z_n || (n_n ^ v_out);
      default: ct = !c_out;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc <= '0; latch <= '0;
      {sv, sc, sn, sz} <= '0;
    end else if (en) begin
      if (ctl.dst == ADST_ACC || ctl.dst == ADST_REGACC) acc   <= res;
      if (ctl.dst == ADST_LATCH)                         latch <= res;
      if (ctl.sload) begin
        sz <= (res == '0);
        sn <= res[DATA_W-1];
        sc <= c_out;
        sv <= v_out;
      end
    end
  end

  always_ff @(posedge clk)
    if (en && (ctl.dst == ADST_REG || ctl.dst == ADST_REGACC)) regs[ctl.ra] <= res;

endmodule
