// tb_pipeline_reg: self-checking test of the microinstruction pipeline
// register: it clears to zero on reset, loads only on adv and holds its word
// otherwise, checked against random microwords.
module tb_pipeline_reg;
  import pps_pkg::*;
  logic clk = 0, rst = 1, adv = 0;
  uword_t d, q, exp_q;
  int checks = 0, failures = 0;

  pipeline_reg dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    d = uword_t'({$urandom, $urandom, $urandom});
    @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset"); end
    rst = 0; exp_q = '0;
    for (int t = 0; t < 500; t++) begin
      d = uword_t'({$urandom, $urandom, $urandom}); adv = 1'($urandom);
      if (adv) exp_q = d;
      @(posedge clk); #1;
      checks++; if (q !== exp_q) begin failures++; $display("FAIL cycle %0d", t); end
    end
    rst = 1; @(posedge clk); #1;
    checks++; if (q !== '0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
