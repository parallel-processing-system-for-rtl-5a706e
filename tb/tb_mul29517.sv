// tb_mul29517: self-checking test of the 16x16 multiplier.
// Random operands in all four format combinations (unsigned/two's complement
// for X and Y) are loaded from the bus, the product register is loaded and
// both halves are read back through the 16-bit output multiplexer; the
// feed-through path and rounding are checked too.  Expected products are
// computed in the testbench with 64-bit integer arithmetic.
module tb_mul29517;
  import pps_pkg::*;
  logic clk = 0, rst = 1, en = 1;
  mul_f_t ctl;
  logic [15:0] bus_in, p;
  logic [31:0] product;
  int checks = 0, failures = 0;

  mul29517 dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    ctl = '0; bus_in = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 2000; t++) begin
      logic [15:0] x, yv; bit sx, sy, rnd; longint ex, ey, e;
      x = 16'($urandom); yv = 16'($urandom); sx = 1'($urandom); sy = 1'($urandom); rnd = (t % 7 == 0);
      ex = sx ? longint'($signed(x)) : longint'(x);
      ey = sy ? longint'($signed(yv)) : longint'(yv);
      e  = ex * ey + (rnd ? 32768 : 0);
      ctl = '0; ctl.ldx = 1; ctl.tcx = sx; bus_in = x; @(posedge clk); #1;
      ctl = '0; ctl.ldy = 1; ctl.tcy = sy; ctl.rnd = rnd; bus_in = yv; @(posedge clk); #1;
      ctl = '0; ctl.ft = 1; ctl.msp = 1; #1;
      checks++; if (p !== e[31:16]) begin failures++; $display("FAIL ft msp x=%h y=%h %b%b", x, yv, sx, sy); end
      ctl = '0; ctl.ldp = 1; @(posedge clk); #1;
      ctl = '0; ctl.msp = 0; bus_in = 16'hFFFF; #1;
      checks++; if (p !== e[15:0]) begin failures++; $display("FAIL lsp x=%h y=%h %b%b p=%h exp %h", x, yv, sx, sy, p, e[15:0]); end
      ctl.msp = 1; #1;
      checks++; if (p !== e[31:16]) begin failures++; $display("FAIL msp x=%h y=%h %b%b p=%h exp %h", x, yv, sx, sy, p, e[31:16]); end
      checks++; if (product !== e[31:0]) begin failures++; $display("FAIL product"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
