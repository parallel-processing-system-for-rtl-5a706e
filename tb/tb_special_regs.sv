// tb_special_regs: self-checking test of the special and interface registers.
// Checks address register load, increment and zero test; the random number
// sequence against an LFSR model; shift/priority register shifts, priority
// read and clear-highest-bit; the input register handshake and its stall;
// output and histogram register pushes, their stall while full and release;
// memory module read/write through MAR/MDR with stall until ack; the
// available flag; and the condition polarity.
module tb_special_regs;
  import pps_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  sreg_f_t ctl;
  logic [15:0] bus_in, rd_data, ar_val, out_data, mm_addr, mm_wdata, mm_rdata;
  logic alu_ct = 0, cond, stall;
  logic in_wr = 0, in_eoe = 0, in_ready, assign_evt = 0, avail;
  logic [23:0] in_data = 0;
  logic out_valid, out_eoe, out_ready = 0;
  logic hist_valid, hist_ready = 0;
  logic [31:0] hist_data;
  logic mm_req, mm_we, mm_ack = 0;
  int checks = 0, failures = 0;

  special_regs dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(logic c, string msg);
    checks++; if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask
  // one processor cycle with this control word
  task automatic op(sreg_f_t c, logic [15:0] b = 0);
    ctl = c; bus_in = b; adv = 1; @(posedge clk); #1; adv = 0;
  endtask
  function automatic sreg_f_t z(); return '0; endfunction

  initial begin
    sreg_f_t c; logic [15:0] lf;
    ctl = '0; bus_in = 0; mm_rdata = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    // address registers
    for (int k = 0; k < 4; k++) begin c = z(); c.wr = sreg_e'(int'(SR_AR0) + k); op(c, 16'(100 * k + 2)); end
    for (int k = 0; k < 4; k++) begin
      ctl = z(); ctl.rd = sreg_e'(int'(SR_AR0) + k); ctl.ar = 2'(k); #1;
      chk(rd_data == 16'(100 * k + 2) && ar_val == rd_data, "AR load");
    end
    c = z(); c.ar = 2'd2; c.ar_inc = 1; op(c); op(c);
    ctl = z(); ctl.rd = SR_AR2; #1; chk(rd_data == 16'd204, "AR increment");
    c = z(); c.wr = SR_AR1; op(c, 16'hFFFF);
    ctl = z(); ctl.ar = 2'd1; ctl.cond = CS_ARZ; #1; chk(cond == 0, "AR nonzero");
    c = z(); c.ar = 2'd1; c.ar_inc = 1; op(c);
    ctl = z(); ctl.ar = 2'd1; ctl.cond = CS_ARZ; #1; chk(cond == 1, "AR zero after wrap");
    ctl.cpol = 1; #1; chk(cond == 0, "condition polarity");
    ctl = z(); ctl.cond = CS_TRUE; #1; chk(cond == 1, "true condition");
    ctl.cond = CS_ALU; alu_ct = 1; #1; chk(cond == 1, "alu condition"); alu_ct = 0;
    // random number register
    c = z(); c.wr = SR_RNG; op(c, 16'hACE1); lf = 16'hACE1;
    for (int t = 0; t < 100; t++) begin
      ctl = z(); ctl.rd = SR_RNG; #1; chk(rd_data == lf, "RNG sequence");
      c = z(); c.rng = 1; op(c);
      lf = lf[0] ? ((lf >> 1) ^ 16'hB400) : (lf >> 1);
    end
    // shift/priority register
    c = z(); c.wr = SR_SHPR; op(c, 16'b0010_0000_1001_0000);
    ctl = z(); ctl.rd = SR_PRIO; #1; chk(rd_data == 16'd13, "priority 13");
    c = z(); c.sh = SH_CLRTOP; op(c);
    ctl = z(); ctl.rd = SR_PRIO; #1; chk(rd_data == 16'd7, "priority 7 after clear");
    c = z(); c.sh = SH_LEFT; op(c);
    ctl = z(); ctl.rd = SR_SHPR; #1; chk(rd_data == 16'h0120, "shift left");
    c = z(); c.sh = SH_RIGHT; op(c); op(c);
    ctl = z(); ctl.rd = SR_SHPR; #1; chk(rd_data == 16'h0048, "shift right");
    c = z(); c.sh = SH_CLRTOP; op(c);
    ctl = z(); ctl.rd = SR_PRIO; #1; chk(rd_data == 16'd3, "priority 3");
    c = z(); c.sh = SH_CLRTOP; op(c);
    ctl = z(); ctl.rd = SR_PRIO; ctl.cond = CS_SHPRZ; #1; chk(rd_data == 16'hFFFF && cond, "empty priority");
    // input register
    ctl = z(); ctl.io = IO_IN_POP; #1; chk(stall == 1 && in_ready == 1, "stall on empty input");
    in_wr = 1; in_data = 24'hAB1234; in_eoe = 1; @(posedge clk); #1; in_wr = 0;
    chk(in_ready == 0 && stall == 0, "input full");
    ctl.rd = SR_IN; #1; chk(rd_data == 16'h1234, "IN read");
    ctl.rd = SR_INHI; ctl.cond = CS_INEOE; #1; chk(rd_data == 16'h80AB && cond, "INHI read and eoe");
    in_wr = 1; in_data = 24'h000001; @(posedge clk); #1; in_wr = 0;
    ctl.rd = SR_IN; #1; chk(rd_data == 16'h1234, "input not overwritten while full");
    op(ctl); chk(in_ready == 1, "pop frees input");
    // output register
    c = z(); c.io = IO_OUT; op(c, 16'h5555);
    chk(out_valid && out_data == 16'h5555 && !out_eoe, "output push");
    ctl = z(); ctl.io = IO_OUT_EOE; ctl.cond = CS_OUTFREE; #1; chk(stall && !cond, "stall on full output");
    out_ready = 1; @(posedge clk); #1; out_ready = 0;
    chk(!out_valid && !stall, "output taken");
    op(ctl, 16'h6666); chk(out_valid && out_eoe && out_data == 16'h6666, "output eoe push");
    out_ready = 1; @(posedge clk); #1; out_ready = 0;
    // histogram register
    c = z(); c.wr = SR_HIST; op(c, 16'h0003);
    c = z(); c.io = IO_HIST; op(c, 16'h0044);
    chk(hist_valid && hist_data == 32'h0003_0044, "histogram push");
    ctl = z(); ctl.io = IO_HIST; #1; chk(stall, "stall on full histogram register");
    hist_ready = 1; @(posedge clk); #1; hist_ready = 0; #1; chk(!hist_valid && !stall, "histogram taken");
    // memory module
    c = z(); c.wr = SR_MAR; op(c, 16'h0200);
    c = z(); c.wr = SR_MDR; op(c, 16'h7777);
    ctl = z(); ctl.io = IO_MM_WR; #1;
    chk(mm_req && mm_we && mm_addr == 16'h0200 && mm_wdata == 16'h7777 && stall, "memory write request");
    mm_ack = 1; #1; chk(!stall, "ack ends stall"); op(ctl); mm_ack = 0;
    ctl = z(); ctl.io = IO_MM_RD; #1; chk(mm_req && !mm_we && stall, "memory read request");
    mm_ack = 1; mm_rdata = 16'h4321; adv = 1; @(posedge clk); #1; adv = 0; mm_ack = 0;
    ctl = z(); ctl.rd = SR_MDR; #1; chk(rd_data == 16'h4321 && !mm_req, "memory read data");
    // available flag
    chk(!avail, "not available after reset");
    c = z(); c.io = IO_AVAIL; op(c); chk(avail, "available set");
    assign_evt = 1; @(posedge clk); #1; assign_evt = 0; chk(!avail, "available cleared by assignment");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
