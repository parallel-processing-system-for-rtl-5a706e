// tb_hist_out: self-checking test of the histogram output module.
// Four processor models push 50 32-bit words each at random times; the
// satellite side accepts with random ready.  Every word must arrive once,
// tagged with its source, in per-source order, and all sources must be served.
module tb_hist_out;
  import pps_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] p_valid, p_ready;
  logic [31:0] p_data [N];
  logic h_valid, h_ready = 0;
  logic [31:0] h_data;
  logic [1:0] h_src;
  int checks = 0, failures = 0, next_exp [N], total = 0;

  hist_out #(.NPROC(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #5000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar g = 0; g < N; g++) begin : g_proc
    logic v = 0; int k = 0;
    assign p_valid[g] = v;
    assign p_data[g]  = {8'(g), 24'(k * 7 + 1)};
    always @(posedge clk) if (!rst) begin
      if (v && p_ready[g]) begin v <= 0; k <= k + 1; end
      else if (!v && k < 50 && $urandom_range(0, 2) == 0) v <= 1;
    end
  end

  initial begin
    foreach (next_exp[g]) next_exp[g] = 0;
    repeat (2) @(posedge clk); #1 rst = 0;
    while (total < 200) begin
      h_ready = 1'($urandom_range(0, 1)); #1;
      if (h_valid && h_ready) begin
        int g; g = int'(h_src);
        checks++;
        if (h_data !== {8'(g), 24'(next_exp[g] * 7 + 1)}) begin
          failures++; $display("FAIL src %0d data %h exp word %0d", g, h_data, next_exp[g]);
        end
        next_exp[g]++; total++;
      end
      @(posedge clk); #1;
    end
    foreach (next_exp[g]) begin checks++; if (next_exp[g] != 50) begin failures++; $display("FAIL count %0d", g); end end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
