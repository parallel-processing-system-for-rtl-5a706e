// tb_pps_workload: the system's intended operating configurations, run at
// full size (no parameter overrides) with realistic event sizes and rates.
//
// Workload (numbers from the system's requirements): events of 250 bytes,
// i.e. one identifier word and 124 16-bit ADC values, each needing 3000
// processor operations; a target of 5000 events/s; a data-acquisition
// front-panel source of up to 1.3 Mbyte/s and a tape source (host over the
// dataway) of up to 0.7 Mbyte/s.  Timing assumption of this testbench: a
// 50 ns base clock and every microinstruction given a 4-clock (200 ns)
// processor cycle, the cycle time the processor is designed for.
//
// The processors run the reference program of pps_asm, modified here:
// every microword gets cycle length 4, a counted delay loop (LDCT + RPCT on
// the sequencer counter) pads each event to exactly 3000 executed
// microinstructions, and the output-register and histogram writes are
// removed when the configuration does not use that destination.
//
// Runs (one per configuration; the first twice):
//   0  DAS -> PPS -> tapes + uP histograms, source unthrottled: measures
//      capacity; requires >= 5000 events/s and an effective cycle time
//      (elapsed time / operations executed by all processors) <= 70 ns
//   1  the same configuration with the source paced at 1.3 Mbyte/s
//   2  tapes -> PPS -> tapes, source paced at 0.7 Mbyte/s
//   3  tapes -> PPS -> uP histograms, source paced at 0.7 Mbyte/s
// In every run each output event and histogram word is checked against
// values computed here, the operation count per event must be 3000 (plus
// the few words a processor executes while waiting), and in paced runs the
// system must keep up with the source: the input FIFO never holds more than
// two events, and all processors are idle again within two event times of
// the last input word.
module tb_pps_workload;
  import pps_pkg::*;
  import pps_asm::*;
  localparam int N       = 4;
  localparam int NADC    = 124;               // 250 bytes = 125 words
  localparam int OPS     = 3000;              // operations per event
  localparam int PAD     = OPS - 3 * NADC - 12;   // delay-loop count
  localparam int CLK_NS  = 50;
  localparam int CYCLEN  = 4;                 // base clocks per processor cycle
  localparam int MAXEV   = 40;
  localparam int EV_CLKS = OPS * CYCLEN;      // one event on one processor
  logic clk = 0, rst = 1;
  logic sel_we = 0; logic [N-1:0] sel_mask = 0;
  logic pc_valid = 0; camac_cmd_e pc_cmd = CC_SETADDR; logic [15:0] pc_data = 0, pc_rdata;
  logic src_das = 0, host_wr = 0, host_eoe = 0, das_valid = 0, das_eoe = 0, das_ready, in_fifo_full;
  logic [23:0] host_data = 0, das_data = 0;
  logic fp_mode = 0, fp_valid, fp_eoe, fp_ready = 0, host_rd = 0, host_reoe, out_fifo_empty;
  logic [15:0] fp_data, host_rdata;
  logic h_valid, h_ready = 1; logic [31:0] h_data; logic [1:0] h_src;
  logic mh_req = 0, mh_we = 0, mh_ack; logic [15:0] mh_addr = 0, mh_wdata = 0, mh_rdata;
  logic [N-1:0] lam_avail, lam_outrdy, running, stalled;
  logic [31:0] n_mem_contend, n_out_multi_wait;
  int checks = 0, failures = 0;

  pps_top dut (.*);
  always #5 clk = ~clk;
  initial begin
    #40000000; failures++; $display("watchdog: run %0d out %0d hist %0d", run, out_done, hist_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // current run
  int run = 0, nev = 0, gap = 0;
  bit want_out = 1, want_hist = 1;
  logic [15:0] ev [MAXEV][NADC+1];
  int clk_n = 0, ops = 0, max_fill = 0, events_of [N];
  uword_t prog [int];

  function automatic logic [15:0] ev_id(int k);
    return 16'(16'h0400 + 64 * run + k);
  endfunction
  function automatic logic [15:0] ev_sum(int k);
    logic [15:0] s; s = 0;
    for (int j = 1; j <= NADC; j++) s += calib(ev[k][j]);
    return s;
  endfunction

  always @(posedge clk) begin
    clk_n++;
    if (!rst) begin
      ops += $countones(dut.p_adv);
      if (int'(dut.u_in.fifo_count) > max_fill) max_fill = int'(dut.u_in.fifo_count);
      for (int g = 0; g < N; g++) if (dut.u_in.p_assign[g]) events_of[g]++;
    end
  end

  // the program for one configuration
  task automatic make_program();
    uword_t u;
    build_program(prog);
    u = nop(); u = jmp(u, SQ_LDCT, PAD);  prog[11] = u;
    u = nop(); u = jmp(u, SQ_RPCT, 12);   prog[12] = u;
    u = nop(); u = jmp(u, SQ_CJP, 0);     prog[13] = u;
    foreach (prog[a]) begin
      prog[a].cyc = 3'(CYCLEN - 1);
      if (!want_out && prog[a].sr.io inside {IO_OUT, IO_OUT_EOE}) prog[a].sr.io = IO_NONE;
      if (!want_hist && prog[a].sr.io == IO_HIST) prog[a].sr.io = IO_NONE;
    end
  endtask

  task automatic select(logic [N-1:0] m);
    sel_we = 1; sel_mask = m; @(posedge clk); #1; sel_we = 0;
  endtask
  task automatic send(camac_cmd_e c, logic [15:0] dd);
    pc_valid = 1; pc_cmd = c; pc_data = dd; @(posedge clk); #1; pc_valid = 0;
  endtask

  // output read by the host (to tape), one word per clock when present
  int out_done = 0, cur_ev = -1, cur_idx = 0;
  initial begin
    @(posedge clk); #1;
    forever begin
      host_rd = !rst && !out_fifo_empty;
      #1;
      if (host_rd) begin
        if (cur_ev < 0) begin
          cur_ev = int'(host_rdata) - int'(ev_id(0)); cur_idx = 0;
          checks++;
          if (cur_ev < 0 || cur_ev >= nev) begin failures++; $display("FAIL run %0d bad event id %h", run, host_rdata); cur_ev = 0; end
        end else begin
          checks++;
          if (host_rdata !== calib(ev[cur_ev][cur_idx])) begin
            failures++; $display("FAIL run %0d ev %0d word %0d: %h", run, cur_ev, cur_idx, host_rdata);
          end
        end
        checks++;
        if (host_reoe !== (cur_idx == NADC)) begin failures++; $display("FAIL run %0d eoe ev %0d idx %0d", run, cur_ev, cur_idx); end
        cur_idx++;
        if (host_reoe) begin cur_ev = -1; out_done++; end
      end
      @(posedge clk); #1;
    end
  end

  // histogram words taken by the satellite system
  int hist_done = 0;
  always @(posedge clk) if (!rst && h_valid && h_ready) begin
    int k; k = int'(h_data[31:16]) - int'(ev_id(0));
    checks++;
    if (k < 0 || k >= nev || h_data[15:0] !== ev_sum(k)) begin failures++; $display("FAIL run %0d hist %h", run, h_data); end
    hist_done++;
  end

  task automatic put_word(logic [23:0] dd, logic last);
    if (!src_das) begin
      while (in_fifo_full) @(posedge clk);
      #1 host_wr = 1; host_data = dd; host_eoe = last; @(posedge clk); #1 host_wr = 0;
    end else begin
      das_valid = 1; das_data = dd; das_eoe = last;
      do @(posedge clk); while (!das_ready); #1 das_valid = 0;
    end
    repeat (gap > 0 ? gap - 1 : 0) @(posedge clk);
    #1;
  endtask

  task automatic do_run(int r, string name, bit das, int g, int n, bit o, bit h);
    int t0, t_in, t_end, ops0, ev0 [N];
    real ev_per_s, eff_ns;
    run = r; src_das = das; gap = g; nev = n; want_out = o; want_hist = h;
    out_done = 0; hist_done = 0;
    for (int k = 0; k < n; k++) begin
      ev[k][0] = ev_id(k);
      for (int j = 1; j <= NADC; j++) ev[k][j] = 16'($urandom);
    end
    make_program();
    rst = 1; repeat (3) @(posedge clk); #1 rst = 0;
    select('1);
    foreach (prog[a]) begin
      send(CC_SETADDR, 16'(a));
      for (int s = 0; s < 6; s++) send(CC_WRITE, prog[a][s*16 +: 16]);
    end
    send(CC_ENABLE, 16'd1);
    repeat (20) @(posedge clk); #1;
    ev0 = events_of; ops0 = ops; t0 = clk_n; max_fill = 0;
    for (int k = 0; k < n; k++) begin
      for (int j = 0; j <= NADC; j++) put_word({8'h00, ev[k][j]}, j == NADC);
    end
    t_in = clk_n;
    // done when every event has left and every processor is waiting again
    wait ((!o || out_done == n) && (!h || hist_done == n) && lam_avail == '1 && stalled == '1);
    t_end = clk_n;
    ops0 = ops - ops0;
    ev_per_s = real'(n) * 1.0e9 / (real'(t_end - t0) * CLK_NS);
    eff_ns = real'(t_end - t0) * CLK_NS / real'(ops0);
    $display("run %0d %s: %0d events in %0d clocks = %0.0f events/s; %0d operations (%0.1f per event); effective cycle %0.1f ns; input FIFO peak %0d words; per processor %0d %0d %0d %0d",
             r, name, n, t_end - t0, ev_per_s, ops0, real'(ops0) / n, eff_ns, max_fill,
             events_of[0] - ev0[0], events_of[1] - ev0[1], events_of[2] - ev0[2], events_of[3] - ev0[3]);
    checks++;
    if (ops0 < n * OPS || ops0 > n * OPS + 2 * N) begin failures++; $display("FAIL run %0d: %0d operations", r, ops0); end
    for (int g2 = 0; g2 < N; g2++) begin
      checks++; if (events_of[g2] == ev0[g2]) begin failures++; $display("FAIL run %0d: processor %0d idle", r, g2); end
    end
    if (g == 0) begin
      checks++; if (ev_per_s < 5000.0) begin failures++; $display("FAIL run %0d: below 5000 events/s", r); end
      checks++; if (eff_ns > 70.0)     begin failures++; $display("FAIL run %0d: effective cycle above 70 ns", r); end
    end else begin
      checks++; if (max_fill > 2 * (NADC + 1) || t_end - t_in > 2 * EV_CLKS) begin
        failures++; $display("FAIL run %0d: falls behind the source", r);
      end
    end
    repeat (20) @(posedge clk); #1;
  endtask

  initial begin
    repeat (3) @(posedge clk); #1;
    // 1.3 Mbyte/s = one 16-bit word per 1.54 us = 31 clocks; 0.7 Mbyte/s = 58 clocks
    do_run(0, "DAS -> PPS -> tapes + uP histograms (unthrottled)", 1,  0, 40, 1, 1);
    do_run(1, "DAS -> PPS -> tapes + uP histograms (1.3 Mbyte/s)", 1, 31, 24, 1, 1);
    do_run(2, "tapes -> PPS -> tapes (0.7 Mbyte/s)",               0, 58, 24, 1, 0);
    do_run(3, "tapes -> PPS -> uP histograms (0.7 Mbyte/s)",       0, 58, 24, 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
