// tb_pps_top: end-to-end test of the whole parallel processing system at its
// full size (4 processors, 4k x 96 microcode, 12k x 16 work memories, 4k
// FIFOs, 64k shared memory).
//
// The host loads the reference event-analysis microprogram (see pps_asm)
// into all processors at once through the INPUT module, verifies it in each
// processor separately, presets shared-memory words through the host port,
// and enables processors 0..2 only.  Events (identifier + 1..8 ADC values)
// enter first over the host path, then through the front-panel input;
// processor 3 is enabled part-way.  Output is read through the front-panel
// port with random ready, then by host reads; histogram words are accepted
// with random ready.  Each output event must be contiguous and exactly as
// computed in the testbench; every histogram word and every shared-memory
// word must match.  Counts and requires: parallel download, events on every
// processor, no event for a disabled processor, input, output and memory
// stalls, shared-memory contention, output service decisions with several
// processors waiting, both input sources and both output read paths.
module tb_pps_top;
  import pps_pkg::*;
  import pps_asm::*;
  localparam int N = 4;
  localparam int NEV = 120;
  logic clk = 0, rst = 1;
  logic sel_we = 0; logic [N-1:0] sel_mask = 0;
  logic pc_valid = 0; camac_cmd_e pc_cmd = CC_SETADDR; logic [15:0] pc_data = 0, pc_rdata;
  logic src_das = 0, host_wr = 0, host_eoe = 0, das_valid = 0, das_eoe = 0, das_ready, in_fifo_full;
  logic [23:0] host_data = 0, das_data = 0;
  logic fp_mode = 1, fp_valid, fp_eoe, fp_ready = 0, host_rd = 0, host_reoe, out_fifo_empty;
  logic [15:0] fp_data, host_rdata;
  logic h_valid, h_ready = 0; logic [31:0] h_data; logic [1:0] h_src;
  logic mh_req = 0, mh_we = 0, mh_ack; logic [15:0] mh_addr = 0, mh_wdata = 0, mh_rdata;
  logic [N-1:0] lam_avail, lam_outrdy, running, stalled;
  logic [31:0] n_mem_contend, n_out_multi_wait;
  int checks = 0, failures = 0;

  pps_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #100000000; failures++; $display("watchdog: out %0d hist %0d run %b avail %b", out_done, hist_done, running, lam_avail);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  uword_t prog [int];
  logic [15:0] ev_words [NEV][$];
  logic [15:0] sh_init [NEV];
  int events_of [N];
  int n_in_stall = 0, n_out_stall = 0, n_mm_stall = 0, n_parallel_dl = 0, n_host_src = 0, n_das_src = 0;
  int n_fp_reads = 0, n_host_reads = 0, early_p3 = 0;
  bit p3_enabled = 0;

  function automatic logic [15:0] ev_sum(int k);
    logic [15:0] s; s = 0;
    for (int j = 1; j < ev_words[k].size(); j++) s += calib(ev_words[k][j]);
    return s;
  endfunction

  task automatic select(logic [N-1:0] m);
    sel_we = 1; sel_mask = m; @(posedge clk); #1; sel_we = 0;
  endtask
  task automatic send(camac_cmd_e c, logic [15:0] dd);
    pc_valid = 1; pc_cmd = c; pc_data = dd; @(posedge clk); #1; pc_valid = 0;
  endtask
  task automatic host_mem(bit w, logic [15:0] a, logic [15:0] dd, output logic [15:0] r);
    mh_req = 1; mh_we = w; mh_addr = a; mh_wdata = dd;
    do begin @(posedge clk); #1; end while (!mh_ack);
    mh_req = 0;
    r = mh_rdata;
  endtask

  // observation of mechanisms
  always @(posedge clk) if (!rst) begin
    for (int g = 0; g < N; g++) begin
      if (dut.u_in.p_assign[g]) begin events_of[g]++; if (g == 3 && !p3_enabled) early_p3++; end
    end
    if (stalled[0] && dut.g_pp[0].u_pp.pl.sr.io == IO_IN_POP) n_in_stall++;
    if (stalled[1] && dut.g_pp[1].u_pp.pl.sr.io inside {IO_OUT, IO_OUT_EOE}) n_out_stall++;
    if (stalled[2] && dut.g_pp[2].u_pp.pl.sr.io inside {IO_MM_RD, IO_MM_WR}) n_mm_stall++;
    if (pc_valid && pc_cmd == CC_WRITE && $countones(dut.u_in.p_cmd_valid) == N) n_parallel_dl++;
    if (host_wr) n_host_src++;
    if (das_valid && das_ready) n_das_src++;
  end

  // output reader: events are checked as whole units, in any order
  int out_done = 0, cur_ev = -1, cur_idx = 0;
  bit seen [NEV];
  initial begin
    wait (!rst);
    @(posedge clk); #1;
    forever begin
      logic take; logic [15:0] w; logic e;
      if (out_done == NEV / 2) fp_mode = 0;
      if (fp_mode) begin fp_ready = 1'($urandom_range(0, 4) == 0); host_rd = 0; end
      else begin fp_ready = 0; host_rd = !out_fifo_empty && $urandom_range(0, 2) == 0; end
      #1;
      take = fp_mode ? (fp_valid && fp_ready) : host_rd;
      w = fp_mode ? fp_data : host_rdata; e = fp_mode ? fp_eoe : host_reoe;
      if (take) begin
        if (fp_mode) n_fp_reads++; else n_host_reads++;
        if (cur_ev < 0) begin
          cur_ev = int'(w) - 16'h0400; cur_idx = 0;
          checks++;
          if (cur_ev < 0 || cur_ev >= NEV || seen[cur_ev]) begin
            failures++; $display("FAIL bad or repeated event id %h", w); cur_ev = 0;
          end
          seen[cur_ev] = 1;
        end else begin
          logic [15:0] ex; ex = calib(ev_words[cur_ev][cur_idx]);
          checks++;
          if (w !== ex) begin failures++; $display("FAIL ev %0d word %0d: %h exp %h", cur_ev, cur_idx, w, ex); end
        end
        checks++;
        if (e !== (cur_idx == ev_words[cur_ev].size() - 1)) begin failures++; $display("FAIL eoe ev %0d idx %0d", cur_ev, cur_idx); end
        cur_idx++;
        if (e) begin cur_ev = -1; out_done++; end
      end
      @(posedge clk); #1;
    end
  end

  // histogram reader
  int hist_done = 0;
  always @(posedge clk) begin
    h_ready <= 1'($urandom_range(0, 2) == 0);
    if (h_valid && h_ready) begin
      int k; k = int'(h_data[31:16]) - 16'h0400;
      checks++;
      if (k < 0 || k >= NEV || h_data[15:0] !== ev_sum(k)) begin failures++; $display("FAIL hist %h", h_data); end
      hist_done++;
    end
  end

  task automatic put_word(logic [23:0] dd, logic last);
    if (!src_das) begin
      while (in_fifo_full) @(posedge clk);
      #1 host_wr = 1; host_data = dd; host_eoe = last; @(posedge clk); #1 host_wr = 0;
    end else begin
      das_valid = 1; das_data = dd; das_eoe = last;
      do @(posedge clk); while (!das_ready); #1 das_valid = 0;
    end
  endtask

  initial begin
    logic [15:0] r;
    int t0;
    for (int k = 0; k < NEV; k++) begin
      int n; n = $urandom_range(1, 8);
      ev_words[k].push_back(16'(16'h0400 + k));
      for (int j = 0; j < n; j++) ev_words[k].push_back(16'($urandom));
      sh_init[k] = 16'($urandom);
    end
    build_program(prog);
    repeat (3) @(posedge clk); #1 rst = 0;
    // ---- download to all four processors at once
    select('1);
    foreach (prog[a]) begin
      send(CC_SETADDR, 16'(a));
      for (int s = 0; s < 6; s++) send(CC_WRITE, prog[a][s*16 +: 16]);
    end
    // ---- verify each processor separately
    for (int g = 0; g < N; g++) begin
      select(4'(1 << g));
      foreach (prog[a]) begin
        send(CC_SETADDR, 16'(a));
        for (int s = 0; s < 6; s++) begin
          pc_valid = 1; pc_cmd = CC_READ; #1;
          checks++; if (pc_rdata !== prog[a][s*16 +: 16]) begin failures++; $display("FAIL verify p%0d @%0d", g, a); end
          @(posedge clk); #1 pc_valid = 0;
        end
      end
    end
    // ---- preset shared memory
    for (int k = 0; k < NEV; k++) host_mem(1, 16'(16'h0400 + k), sh_init[k], r);
    // ---- enable processors 0..2
    select(4'b0111); send(CC_ENABLE, 16'd1);
    // ---- events
    t0 = $time;
    for (int k = 0; k < NEV; k++) begin
      if (k == NEV / 2) src_das = 1;
      if (k == 30) begin
        wait (out_done >= 25);
        select(4'b1000); send(CC_ENABLE, 16'd1); p3_enabled = 1;
      end
      foreach (ev_words[k][j]) put_word({8'h00, ev_words[k][j]}, j == ev_words[k].size() - 1);
      if (k % 10 == 0) begin repeat ($urandom_range(0, 200)) @(posedge clk); #1; end
    end
    wait (out_done == NEV && hist_done == NEV);
    repeat (50) @(posedge clk); #1;
    // ---- shared memory: preset value plus the event's sum
    for (int k = 0; k < NEV; k++) begin
      host_mem(0, 16'(16'h0400 + k), 0, r);
      checks++;
      if (r !== 16'(sh_init[k] + ev_sum(k))) begin failures++; $display("FAIL shared memory ev %0d: %h", k, r); end
    end
    // ---- mechanisms
    $display("events per processor %0d %0d %0d %0d; before p3 enable on p3: %0d", events_of[0], events_of[1], events_of[2], events_of[3], early_p3);
    $display("stalls: input %0d output %0d memory %0d; memory contention %0d; output multi-wait %0d",
             n_in_stall, n_out_stall, n_mm_stall, n_mem_contend, n_out_multi_wait);
    $display("parallel download writes %0d; host words %0d, front-panel words %0d; fp reads %0d host reads %0d; %0d clocks",
             n_parallel_dl, n_host_src, n_das_src, n_fp_reads, n_host_reads, ($time - t0) / 10);
    foreach (events_of[g]) begin checks++; if (events_of[g] == 0) begin failures++; $display("FAIL no events on %0d", g); end end
    checks++; if (early_p3 != 0) begin failures++; $display("FAIL disabled processor got an event"); end
    checks++; if (n_in_stall == 0)       begin failures++; $display("FAIL no input stall"); end
    checks++; if (n_out_stall == 0)      begin failures++; $display("FAIL no output stall"); end
    checks++; if (n_mm_stall == 0)       begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_mem_contend == 0)    begin failures++; $display("FAIL no memory contention"); end
    checks++; if (n_out_multi_wait == 0) begin failures++; $display("FAIL no multi-wait output decision"); end
    checks++; if (n_parallel_dl == 0)    begin failures++; $display("FAIL no parallel download"); end
    checks++; if (n_host_src == 0 || n_das_src == 0) begin failures++; $display("FAIL an input source unused"); end
    checks++; if (n_fp_reads == 0 || n_host_reads == 0) begin failures++; $display("FAIL an output path unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
