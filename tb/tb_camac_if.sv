// tb_camac_if: self-checking test of the processor's CAMAC download
// interface together with a microprogram memory.  Streams a random program
// of 20 microwords (six 16-bit writes each, address auto-advancing),
// verifies it through the read command, checks that writes are refused while
// the processor is enabled and that enable/disable drive run.
module tb_camac_if;
  import pps_pkg::*;
  logic clk = 0, rst = 1, cmd_valid = 0, run;
  camac_cmd_e cmd;
  logic [15:0] cmd_data, rd_data, us_wdata, us_rdata;
  logic us_we;
  logic [11:0] us_addr;
  logic [2:0] us_slice;
  logic [95:0] rdata;
  logic [95:0] prog [20];
  int checks = 0, failures = 0;

  camac_if dut (.*);
  ustore mem (.clk, .raddr(12'd0), .rdata, .dl_we(us_we), .dl_addr(us_addr), .dl_slice(us_slice),
              .dl_wdata(us_wdata), .dl_rdata(us_rdata));
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic send(camac_cmd_e c, logic [15:0] dd);
    cmd_valid = 1; cmd = c; cmd_data = dd; @(posedge clk); #1; cmd_valid = 0;
  endtask

  initial begin
    cmd = CC_SETADDR; cmd_data = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    checks++; if (run !== 0) begin failures++; $display("FAIL run after reset"); end
    foreach (prog[k]) prog[k] = {$urandom, $urandom, $urandom};
    send(CC_SETADDR, 16'd100);
    foreach (prog[k]) for (int s = 0; s < 6; s++) send(CC_WRITE, prog[k][s*16 +: 16]);
    send(CC_SETADDR, 16'd100);
    foreach (prog[k]) for (int s = 0; s < 6; s++) begin
      cmd_valid = 1; cmd = CC_READ; #1;
      checks++; if (rd_data !== prog[k][s*16 +: 16]) begin failures++; $display("FAIL verify %0d/%0d", k, s); end
      @(posedge clk); #1; cmd_valid = 0;
    end
    send(CC_ENABLE, 16'd1);
    checks++; if (run !== 1) begin failures++; $display("FAIL enable"); end
    send(CC_SETADDR, 16'd100);
    send(CC_WRITE, 16'hDEAD);           // refused while running
    send(CC_SETADDR, 16'd100); #1;
    checks++; if (rd_data !== prog[0][15:0]) begin failures++; $display("FAIL write while running"); end
    send(CC_ENABLE, 16'd0);
    checks++; if (run !== 0) begin failures++; $display("FAIL disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
