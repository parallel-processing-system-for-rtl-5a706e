// tb_mem_module: self-checking test of the shared 64k x 16 memory.
// Four processor ports issue random read/write requests, holding each
// request until its ack as a processor does, while the host port also
// writes; every read is compared with a model of the memory.  Checks one ack
// per request, the two-clock access, that contention occurs and that every
// port is served (round-robin fairness: no port waits more than 2*(N+1)+1
// clocks).
module tb_mem_module;
  import pps_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] req = 0, we = 0, ack;
  logic [15:0] addr [N], wdata [N];
  logic [15:0] rdata;
  logic h_req = 0, h_we = 0, h_ack;
  logic [15:0] h_addr = 0, h_wdata = 0;
  logic [31:0] n_contend;
  logic [15:0] model [int];
  int checks = 0, failures = 0, served [N], maxwait = 0;

  mem_module #(.NPROC(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar g = 0; g < N; g++) begin : g_port
    initial begin
      addr[g] = 0; wdata[g] = 0;
      wait (!rst);
      repeat (300) begin
        int w;
        @(posedge clk); #1;
        // addresses private to this port so the model is exact
        addr[g] = 16'($urandom_range(0, 63) * N + g); we[g] = 1'($urandom); wdata[g] = 16'($urandom);
        if (!model.exists(int'(addr[g]))) we[g] = 1;
        req[g] = 1; w = 0;
        do begin @(posedge clk); #1; w++; end while (!ack[g]);
        if (w > maxwait) maxwait = w;
        checks++;
        if (!we[g] && rdata !== model[int'(addr[g])]) begin
          failures++; $display("FAIL port %0d read %h: %h exp %h", g, addr[g], rdata, model[int'(addr[g])]);
        end
        if (we[g]) model[int'(addr[g])] = wdata[g];
        served[g]++;
        req[g] = 0;
        if ($urandom_range(0, 1)) @(posedge clk);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst = 0;
    // host writes a constant at the top of memory while the ports run
    repeat (20) @(posedge clk); #1;
    h_req = 1; h_we = 1; h_addr = 16'hFFFF; h_wdata = 16'h1357;
    do @(posedge clk); while (!h_ack); #1;
    h_req = 1; h_we = 0;
    @(posedge clk); #1; h_req = 0;
    do @(posedge clk); while (!h_ack); #1;
    checks++; if (rdata !== 16'h1357) begin failures++; $display("FAIL host read"); end
    wait (served[0] == 300 && served[1] == 300 && served[2] == 300 && served[3] == 300);
    checks++; if (n_contend == 0) begin failures++; $display("FAIL no contention seen"); end
    checks++; if (maxwait > 2 * (N + 1) + 1) begin failures++; $display("FAIL max wait %0d", maxwait); end
    $display("contended grants %0d, longest wait %0d clocks", n_contend, maxwait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
