// tb_seq2910: self-checking test of the microprogram sequencer.
// Walks a hand-worked sequence through conditional jumps, subroutine call and
// return, counted loops (RPCT, RFCT with PUSH), LOOP, JRP, TWB, stack-full
// signalling and JZ, comparing the next address y with values worked out by
// hand from the instruction definitions.
module tb_seq2910;
  import pps_pkg::*;
  logic clk = 0, rst = 1, en = 1, ccen, cc, rld, ci = 1;
  seq_op_e i;
  logic [11:0] d, y;
  logic full_n, pl_n, map_n, vect_n;
  int checks = 0, failures = 0;

  seq2910 dut (.*);

  always #5 clk = ~clk;
  initial begin
    #200000; failures++; $display("watchdog"); 
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic step(seq_op_e op, logic e, logic c, logic [11:0] dd, logic [11:0] exp_y, logic r = 0);
    i = op; ccen = e; cc = c; d = dd; rld = r;
    #1;
    checks++;
    if (y !== exp_y) begin failures++; $display("FAIL %s d=%0d cc=%0d: y=%0d exp %0d", op.name(), dd, c, y, exp_y); end
    @(posedge clk); #1;
  endtask

  initial begin
    i = SQ_CONT; ccen = 0; cc = 0; d = 0; rld = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    step(SQ_CONT, 1, 0, 0,   0);
    step(SQ_CONT, 1, 0, 0,   1);
    step(SQ_CJP,  1, 0, 100, 2);     // fail
    step(SQ_CJP,  1, 1, 100, 100);   // pass
    step(SQ_CJS,  1, 1, 200, 200);   // call, pushes 101
    step(SQ_CONT, 1, 0, 0,   201);
    step(SQ_CRTN, 1, 1, 0,   101);   // return
    step(SQ_LDCT, 1, 0, 3,   102);   // R = 3
    step(SQ_RPCT, 1, 0, 50,  50);    // R 3->2
    step(SQ_RPCT, 1, 0, 50,  50);    // 2->1
    step(SQ_RPCT, 1, 0, 50,  50);    // 1->0
    step(SQ_RPCT, 1, 0, 50,  51);    // R==0: fall through
    step(SQ_PUSH, 1, 1, 2,   52);    // push uPC (52, the word after PUSH), R = 2
    step(SQ_CONT, 1, 0, 0,   53);
    step(SQ_RFCT, 1, 0, 0,   52);    // R=2 -> top of stack (52), R=1
    step(SQ_RFCT, 1, 0, 0,   52);    // R=1 -> 52, R=0
    step(SQ_RFCT, 1, 0, 0,   53);    // R=0: fall through, pop
    step(SQ_CRTN, 1, 1, 0,   0);     // empty stack reads as 0
    step(SQ_JZ,   1, 0, 0,   0);
    checks++; if (full_n !== 1'b1) begin failures++; $display("FAIL full_n after JZ"); end
    for (int k = 0; k < 5; k++) step(SQ_CJS, 1, 1, 10, 10);
    checks++; if (full_n !== 1'b0) begin failures++; $display("FAIL full_n not low with 5 entries"); end
    step(SQ_JZ,   1, 0, 0,   0);
    checks++; if (full_n !== 1'b1) begin failures++; $display("FAIL full_n after clear"); end
    step(SQ_CJP,  0, 0, 77,  77);    // ccen off: always pass
    step(SQ_CONT, 1, 0, 300, 78, 1); // rld: R = 300
    step(SQ_JRP,  1, 0, 5,   300);   // fail -> R
    step(SQ_JRP,  1, 1, 5,   5);     // pass -> D
    step(SQ_PUSH, 1, 0, 0,   6);     // push 6 (no counter load: cc fail)
    step(SQ_LOOP, 1, 0, 0,   6);     // fail -> top of stack (6)
    step(SQ_LOOP, 1, 1, 0,   7);     // pass -> uPC, pop
    step(SQ_CJPP, 1, 1, 40,  40);    // pass, pop of empty stack
    step(SQ_LDCT, 1, 0, 1,   41);    // R = 1
    step(SQ_PUSH, 1, 0, 0,   42);    // push 42
    step(SQ_TWB,  1, 0, 99,  42);    // R!=0, fail -> F, R=0
    step(SQ_TWB,  1, 0, 99,  99);    // R==0, fail -> D, pop
    step(SQ_JSRP, 1, 0, 9,   0);     // fail: push 100, y = R (0)
    step(SQ_CRTN, 1, 1, 0,   100);
    i = SQ_JMAP; d = 12'h123; #1; checks++;
    if (y !== 12'h123 || map_n !== 1'b0) begin failures++; $display("FAIL JMAP"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
