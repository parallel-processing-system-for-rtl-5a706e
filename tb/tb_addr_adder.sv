// tb_addr_adder: self-checking test of the data memory address adder, in
// both indexed (register + literal, modulo 2^16) and absolute modes.
module tb_addr_adder;
  logic indexed;
  logic [15:0] ar, lit, addr;
  int checks = 0, failures = 0;

  addr_adder dut (.*);
  initial begin
    #1000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int t = 0; t < 2000; t++) begin
      int unsigned e;
      indexed = 1'($urandom); ar = 16'($urandom); lit = 16'($urandom);
      e = indexed ? (int'(ar) + int'(lit)) % 65536 : int'(lit);
      #1; checks++;
      if (addr !== 16'(e)) begin failures++; $display("FAIL %b %h %h", indexed, ar, lit); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
