// tb_alu29116: self-checking test of the 16-bit ALU processor.
// Random operands are written into the register file and accumulator through
// the bus, then every operation is applied with random operands and shift
// counts; result, test output and status flags are compared with a reference
// model written in the testbench.  Also checks the input latch, register+acc
// destination, add-with-carry chaining and reading the status word.
module tb_alu29116;
  import pps_pkg::*;
  logic clk = 0, rst = 1, en = 1;
  alu_f_t ctl;
  logic [15:0] bus_in, y;
  logic ct;
  logic [3:0] status;
  int checks = 0, failures = 0;

  alu29116 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [15:0] mregs [32];
  logic [15:0] macc;
  logic        mc;

  function automatic alu_f_t mk(alu_op_e op, alu_asrc_e as, alu_bsrc_e bs, int ra, alu_dst_e dst,
                                int n = 0, alu_test_e ts = TS_Z, bit sl = 1);
    alu_f_t c;
    c.op = op; c.asrc = as; c.bsrc = bs; c.ra = 5'(ra); c.dst = dst; c.n = 4'(n); c.tsel = ts; c.sload = sl;
    return c;
  endfunction

  task automatic cyc(alu_f_t c, logic [15:0] b);
    ctl = c; bus_in = b; @(posedge clk); #1;
  endtask

  // reference: returns {carry, result}
  function automatic logic [16:0] ref_op(alu_op_e op, logic [15:0] a, logic [15:0] b, int n, logic cin);
    logic [16:0] s;
    logic [31:0] w;
    case (op)
      AL_PASSA: return {cin, a};
      AL_PASSB: return {cin, b};
      AL_ADD:   return {1'b0, a} + {1'b0, b};
      AL_ADDC:  return {1'b0, a} + {1'b0, b} + 17'(cin);
      AL_SUB:   begin s = {1'b0, a} - {1'b0, b}; return {~s[16], s[15:0]}; end
      AL_SUBR:  begin s = {1'b0, b} - {1'b0, a}; return {~s[16], s[15:0]}; end
      AL_AND:   return {cin, a & b};
      AL_OR:    return {cin, a | b};
      AL_XOR:   return {cin, a ^ b};
      AL_NOTA:  return {cin, ~a};
      AL_ROTL:  begin w = {a, a} << n; return {cin, w[31:16]}; end
      AL_SHR:   return {(n == 0) ? cin : a[n-1], a >> n};
      AL_SAR:   return {(n == 0) ? cin : a[n-1], 16'($signed(a) >>> n)};
      AL_SETB:  return {cin, a | (16'd1 << n)};
      AL_CLRB:  return {cin, a & ~(16'd1 << n)};
      AL_MASK:  return {cin, a & ~b};
      AL_PRIO:  begin
                  int p; p = 0;
                  for (int k = 0; k < 16; k++) if (a[k]) p = k + 1;
                  return {cin, 16'(p)};
                end
      default:  return 'x;
    endcase
  endfunction

  initial begin
    alu_op_e ops [] = '{AL_PASSA, AL_PASSB, AL_ADD, AL_ADDC, AL_SUB, AL_SUBR, AL_AND, AL_OR, AL_XOR,
                         AL_NOTA, AL_ROTL, AL_SHR, AL_SAR, AL_SETB, AL_CLRB, AL_MASK, AL_PRIO};
    ctl = mk(AL_PASSA, ASRC_BUS, BSRC_REG, 0, ADST_NONE); bus_in = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    mc = 0;
    // fill registers through the bus
    for (int r = 0; r < 32; r++) begin
      mregs[r] = 16'($urandom);
      cyc(mk(AL_PASSA, ASRC_BUS, BSRC_REG, r, ADST_REG, 0, TS_Z, 0), mregs[r]);
    end
    macc = 16'h1234;
    cyc(mk(AL_PASSA, ASRC_BUS, BSRC_REG, 0, ADST_ACC, 0, TS_Z, 0), macc);
    // read them back
    for (int r = 0; r < 32; r++) begin
      ctl = mk(AL_PASSA, ASRC_REG, BSRC_REG, r, ADST_NONE, 0, TS_Z, 0); #1;
      checks++; if (y !== mregs[r]) begin failures++; $display("FAIL reg %0d", r); end
      @(posedge clk); #1;
    end
    // random operations: A from the bus, B from a register, result to accumulator
    for (int t = 0; t < 3000; t++) begin
      alu_op_e op; logic [15:0] a; int r, n; logic [16:0] e;
      op = ops[$urandom_range(0, ops.size() - 1)];
      a = 16'($urandom); if ($urandom_range(0, 9) == 0) a = 0;
      r = $urandom_range(0, 31); n = $urandom_range(0, 15);
      e = ref_op(op, a, mregs[r], n, mc);
      ctl = mk(op, ASRC_BUS, BSRC_REG, r, ADST_ACC, n, alu_test_e'($urandom_range(0, 1)), 1); bus_in = a; #1;
      checks++;
      if (y !== e[15:0]) begin failures++; $display("FAIL %s a=%h b=%h n=%0d y=%h exp %h", op.name(), a, mregs[r], n, y, e[15:0]); end
      checks++;
      if (ct !== ((ctl.tsel == TS_Z) ? (e[15:0] == 0) : (e[15:0] != 0))) begin failures++; $display("FAIL ct %s", op.name()); end
      @(posedge clk); #1;
      if (op inside {AL_ADD, AL_ADDC, AL_SUB, AL_SUBR, AL_SHR, AL_SAR}) mc = e[16];
      macc = e[15:0];
      checks++;
      if (status[2] !== mc || status[0] !== (e[15:0] == 0) || status[1] !== e[15]) begin
        failures++; $display("FAIL status %s %b exp c=%b", op.name(), status, mc);
      end
    end
    // accumulator source and register+accumulator destination
    cyc(mk(AL_ADD, ASRC_ACC, BSRC_CONST, 7, ADST_REGACC, 5, TS_Z, 0), 0);
    ctl = mk(AL_PASSA, ASRC_REG, BSRC_REG, 7, ADST_NONE, 0, TS_Z, 0); #1;
    checks++; if (y !== macc + 5) begin failures++; $display("FAIL reg+acc dst"); end
    ctl = mk(AL_PASSA, ASRC_ACC, BSRC_REG, 0, ADST_NONE, 0, TS_Z, 0); #1;
    checks++; if (y !== macc + 5) begin failures++; $display("FAIL acc"); end
    // input latch
    cyc(mk(AL_PASSA, ASRC_BUS, BSRC_REG, 0, ADST_LATCH, 0, TS_Z, 0), 16'hBEEF);
    ctl = mk(AL_INCA, ASRC_LATCH, BSRC_REG, 0, ADST_NONE, 0, TS_Z, 0); #1;
    checks++; if (y !== 16'hBEF0) begin failures++; $display("FAIL latch"); end
    // 32-bit add: low words carry into high words
    cyc(mk(AL_ADD, ASRC_BUS, BSRC_CONST, 0, ADST_NONE, 1, TS_Z, 1), 16'hFFFF);
    ctl = mk(AL_ADDC, ASRC_BUS, BSRC_CONST, 0, ADST_NONE, 0, TS_C, 1); bus_in = 16'h0010; #1;
    checks++; if (y !== 16'h0011) begin failures++; $display("FAIL addc chain"); end
    // overflow and signed less-than
    ctl = mk(AL_SUB, ASRC_BUS, BSRC_CONST, 0, ADST_NONE, 1, TS_V, 0); bus_in = 16'h8000; #1;
    checks++; if (ct !== 1'b1) begin failures++; $display("FAIL overflow"); end
    ctl = mk(AL_SUB, ASRC_BUS, BSRC_CONST, 0, ADST_NONE, 3, TS_LT, 0); bus_in = 16'd2; #1;
    checks++; if (ct !== 1'b1) begin failures++; $display("FAIL less-than"); end
    @(posedge clk); #1;
    ctl = mk(AL_STAT, ASRC_BUS, BSRC_REG, 0, ADST_NONE, 0, TS_Z, 0); #1;
    checks++; if (y !== {12'b0, status}) begin failures++; $display("FAIL status read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
