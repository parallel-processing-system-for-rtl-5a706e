// tb_input_module: self-checking test of the INPUT module.
// Download: the select mask must gate broadcast commands to exactly the
// selected processors and the read-back must come from the lowest selected
// one.  Events: 60 events of random length (1..12 words) enter from the host
// and then from the front-panel input; four processor models accept words
// with random delays and become available again at random times.  Every event
// must arrive whole, in order, at a single processor that was available, and
// events must be spread over all processors.  Finally the FIFO is filled with
// no processor available and must report full at 4096 words and refuse more.
module tb_input_module;
  import pps_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic sel_we = 0, pc_valid = 0, src_das = 0, host_wr = 0, host_eoe = 0, das_valid = 0, das_eoe = 0;
  logic [N-1:0] sel_mask_in = 0;
  camac_cmd_e pc_cmd = CC_WRITE;
  logic [15:0] pc_data = 0, pc_rdata;
  logic [23:0] host_data = 0, das_data = 0;
  logic das_ready, fifo_full;
  logic [12:0] fifo_count;
  logic [N-1:0] p_cmd_valid, p_running, p_avail, p_in_ready, p_in_wr, p_assign;
  camac_cmd_e p_cmd;
  logic [15:0] p_cmd_data;
  logic [15:0] p_cmd_rdata [N];
  logic [23:0] p_in_data;
  logic p_in_eoe;
  int checks = 0, failures = 0;

  input_module #(.NPROC(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // event k has words {k, j} j = 0..len-1, last one flagged
  int evlen [60];
  int got_ev [N];      // event being received by each processor model, -1 none
  int got_w  [N];
  int per_proc [N];
  int done_events = 0;
  logic [N-1:0] was_assigned;

  for (genvar g = 0; g < N; g++) begin : g_proc
    logic avail_r = 0, busy_r = 0;
    assign p_avail[g] = avail_r;
    assign p_in_ready[g] = !busy_r;
    assign p_cmd_rdata[g] = 16'(16'h1000 + g);
    always @(posedge clk) begin
      if (p_assign[g]) begin
        checks++; if (!avail_r) begin failures++; $display("FAIL assign to unavailable %0d", g); end
        avail_r <= 0; got_w[g] = 0; got_ev[g] = -1;
      end
      if (p_in_wr[g]) begin
        int ev, w;
        checks++;
        if (busy_r) begin failures++; $display("FAIL write to busy input register"); end
        ev = int'(p_in_data[23:8]); w = int'(p_in_data[7:0]);
        if (got_w[g] == 0) got_ev[g] = ev;
        if (ev != got_ev[g] || w != got_w[g] || p_in_eoe != (w == evlen[ev] - 1)) begin
          failures++; $display("FAIL proc %0d got ev %0d w %0d exp ev %0d w %0d", g, ev, w, got_ev[g], got_w[g]);
        end
        got_w[g]++;
        if (p_in_eoe) begin done_events++; per_proc[g]++; end
        busy_r <= 1;
      end else if (busy_r && $urandom_range(0, 2) == 0) busy_r <= 0;
      if (!avail_r && !p_assign[g] && (got_ev[g] < 0 ? 1 : got_w[g] == evlen[got_ev[g]]) && $urandom_range(0, 9) == 0)
        avail_r <= 1;
    end
  end

  initial begin
    for (int k = 0; k < 60; k++) evlen[k] = $urandom_range(1, 12);
    for (int g = 0; g < N; g++) begin got_ev[g] = -1; got_w[g] = 0; end
    p_running = '1;
    repeat (2) @(posedge clk); #1 rst = 0;
    // ---- download broadcast
    sel_we = 1; sel_mask_in = 4'b0110; @(posedge clk); #1; sel_we = 0;
    pc_valid = 1; pc_cmd = CC_WRITE; pc_data = 16'h55AA; #1;
    checks++; if (p_cmd_valid !== 4'b0110 || p_cmd != CC_WRITE || p_cmd_data != 16'h55AA) begin failures++; $display("FAIL broadcast"); end
    checks++; if (pc_rdata !== 16'h1001) begin failures++; $display("FAIL readback source"); end
    pc_valid = 0; #1;
    checks++; if (p_cmd_valid !== 0) begin failures++; $display("FAIL command without valid"); end
    // ---- events: first 30 from the host, then 30 from the front panel
    for (int k = 0; k < 60; k++) begin
      src_das = (k >= 30);
      for (int j = 0; j < evlen[k]; j++) begin
        if (!src_das) begin
          host_wr = 1; host_data = {16'(k), 8'(j)}; host_eoe = (j == evlen[k] - 1);
          @(posedge clk); #1; host_wr = 0;
        end else begin
          das_valid = 1; das_data = {16'(k), 8'(j)}; das_eoe = (j == evlen[k] - 1);
          do @(posedge clk); while (!das_ready); #1; das_valid = 0;
        end
      end
    end
    wait (done_events == 60);
    for (int g = 0; g < N; g++) begin
      checks++; if (per_proc[g] == 0) begin failures++; $display("FAIL processor %0d got no event", g); end
    end
    $display("events per processor: %0d %0d %0d %0d", per_proc[0], per_proc[1], per_proc[2], per_proc[3]);
    // ---- fill the FIFO with no processor running
    p_running = '0; src_das = 1;
    for (int j = 0; j < 4100; j++) begin
      das_valid = 1; das_data = 24'(j); das_eoe = 0; @(posedge clk); #1;
    end
    das_valid = 0;
    checks++; if (!fifo_full || fifo_count != 4096 || das_ready) begin failures++; $display("FAIL full: %0d", fifo_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
