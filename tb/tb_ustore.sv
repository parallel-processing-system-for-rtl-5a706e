// tb_ustore: self-checking test of the 4k x 96 microprogram memory.
// Writes random 96-bit words slice by slice (six 16-bit slices) at random
// addresses, then checks the 96-bit read port and the 16-bit verification
// read of every slice against a copy kept in the testbench.
module tb_ustore;
  import pps_pkg::*;
  logic clk = 0;
  logic [11:0] raddr, dl_addr;
  logic [95:0] rdata;
  logic dl_we;
  logic [2:0] dl_slice;
  logic [15:0] dl_wdata, dl_rdata;
  int checks = 0, failures = 0;
  logic [95:0] model [int];

  ustore dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    dl_we = 0; raddr = 0; dl_addr = 0; dl_slice = 0; dl_wdata = 0;
    for (int t = 0; t < 200; t++) begin
      logic [11:0] a; logic [95:0] w;
      a = 12'($urandom); w = {$urandom, $urandom, $urandom};
      if (t == 0) a = 12'hFFF;
      model[int'(a)] = w;
      for (int s = 0; s < 6; s++) begin
        dl_we = 1; dl_addr = a; dl_slice = 3'(s); dl_wdata = w[s*16 +: 16];
        @(posedge clk); #1;
      end
      dl_we = 0;
    end
    // a write to slice 6 or 7 must change nothing
    dl_we = 1; dl_addr = 12'hFFF; dl_slice = 3'd6; dl_wdata = 16'hDEAD; @(posedge clk); #1; dl_we = 0;
    foreach (model[a]) begin
      raddr = 12'(a); #1;
      checks++; if (rdata !== model[a]) begin failures++; $display("FAIL word %h", a); end
      for (int s = 0; s < 6; s++) begin
        dl_addr = 12'(a); dl_slice = 3'(s); #1;
        checks++; if (dl_rdata !== model[a][s*16 +: 16]) begin failures++; $display("FAIL slice %h/%0d", a, s); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
