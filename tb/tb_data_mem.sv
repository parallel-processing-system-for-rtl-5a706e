// tb_data_mem: self-checking test of the 12k x 16 work memory.
// Random writes and reads over the whole 12k range (writes only when en is
// high) are compared with a model array; addresses at or above 12288 must
// read zero and ignore writes.
module tb_data_mem;
  logic clk = 0, en, we;
  logic [15:0] addr, wdata, rdata;
  logic [15:0] model [12288];
  bit          known [12288];
  int checks = 0, failures = 0;

  data_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    en = 0; we = 0; addr = 0; wdata = 0;
    for (int t = 0; t < 20000; t++) begin
      addr = 16'($urandom_range(0, 12287)); if (t % 50 == 0) addr = 16'($urandom_range(12288, 65535));
      if ($urandom_range(0, 1)) begin
        en = 1'($urandom_range(0, 3) != 0); we = 1; wdata = 16'($urandom);
        if (en && addr < 12288) begin model[addr] = wdata; known[addr] = 1; end
        @(posedge clk); #1; en = 0; we = 0;
      end else begin
        #1;
        if (addr >= 12288) begin checks++; if (rdata !== 0) begin failures++; $display("FAIL out of range"); end end
        else if (known[addr]) begin checks++; if (rdata !== model[addr]) begin failures++; $display("FAIL %h", addr); end end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
