// tb_pp_processor: end-to-end test of one processor running the reference
// event-analysis microprogram (see pps_asm).
// The testbench downloads the program through the CAMAC command port,
// verifies it by reading it back, enables the processor and then plays the
// INPUT module (assigns events when "available" is raised and feeds words
// with random gaps), the OUTPUT and histogram modules (accept with random
// ready) and the shared memory (acks requests after random delays).  Output
// words, histogram words, shared-memory contents and the raw values kept in
// work memory are compared with values computed in the testbench.  Also
// counts input, output and memory stalls, and checks that the multiply
// instructions, programmed with a 3-clock cycle, take at least 3 clocks.
module tb_pp_processor;
  import pps_pkg::*;
  import pps_asm::*;
  logic clk = 0, rst = 1;
  logic cmd_valid = 0; camac_cmd_e cmd = CC_SETADDR; logic [15:0] cmd_data = 0, cmd_rdata; logic running;
  logic in_wr = 0, in_eoe = 0, in_ready, assign_evt = 0, avail;
  logic [23:0] in_data = 0;
  logic out_valid, out_eoe, out_ready = 0; logic [15:0] out_data;
  logic hist_valid, hist_ready = 0; logic [31:0] hist_data;
  logic mm_req, mm_we, mm_ack = 0; logic [15:0] mm_addr, mm_wdata, mm_rdata = 0;
  logic [11:0] upc; logic adv, stalled;
  int checks = 0, failures = 0;
  localparam int NEV = 40;

  pp_processor dut (.*);
  always #5 clk = ~clk;
  initial begin
    #20000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  uword_t prog [int];
  logic [15:0] ev_words [NEV][$];
  logic [15:0] shmem [int];
  int n_in_stall = 0, n_out_stall = 0, n_mm_stall = 0, n_mul_short = 0;

  task automatic send(camac_cmd_e c, logic [15:0] dd);
    cmd_valid = 1; cmd = c; cmd_data = dd; @(posedge clk); #1; cmd_valid = 0;
  endtask

  // shared memory model
  always @(posedge clk) begin
    mm_ack <= 0;
    if (mm_req && !mm_ack && $urandom_range(0, 2) == 0) begin
      mm_ack <= 1;
      if (mm_we) shmem[int'(mm_addr)] = mm_wdata;
      else mm_rdata <= shmem.exists(int'(mm_addr)) ? shmem[int'(mm_addr)] : 16'h0;
    end
  end

  // stall counting by kind, and cycle length of the multiply instructions
  int clocks_in_cycle = 0;
  always @(posedge clk) if (running) begin
    if (stalled) begin
      if (dut.pl.sr.io == IO_IN_POP) n_in_stall++;
      if (dut.pl.sr.io inside {IO_OUT, IO_OUT_EOE}) n_out_stall++;
      if (dut.pl.sr.io inside {IO_MM_RD, IO_MM_WR}) n_mm_stall++;
    end
    clocks_in_cycle++;
    if (adv) begin
      if (dut.pl.sr.bus == BUS_MUL && clocks_in_cycle < 3) n_mul_short++;
      clocks_in_cycle = 0;
    end
  end

  // output consumer
  int out_ev = 0, out_idx = 0;
  always @(posedge clk) begin
    out_ready <= 1'($urandom_range(0, 3) == 0);
    if (out_valid && out_ready) begin
      logic [15:0] e; logic last;
      if (out_idx == 0) e = ev_words[out_ev][0];
      else e = calib(ev_words[out_ev][out_idx]);
      last = (out_idx == ev_words[out_ev].size() - 1);
      checks++;
      if (out_data !== e || out_eoe !== last) begin
        failures++; $display("FAIL out ev %0d idx %0d: %h/%b exp %h/%b", out_ev, out_idx, out_data, out_eoe, e, last);
      end
      if (last) begin out_ev++; out_idx = 0; end else out_idx++;
    end
  end

  // histogram consumer
  int hist_ev = 0;
  function automatic logic [15:0] ev_sum(int k);
    logic [15:0] s; s = 0;
    for (int j = 1; j < ev_words[k].size(); j++) s += calib(ev_words[k][j]);
    return s;
  endfunction
  always @(posedge clk) begin
    hist_ready <= 1'($urandom_range(0, 1));
    if (hist_valid && hist_ready) begin
      checks++;
      if (hist_data !== {ev_words[hist_ev][0], ev_sum(hist_ev)}) begin
        failures++; $display("FAIL hist ev %0d: %h", hist_ev, hist_data);
      end
      hist_ev++;
    end
  end

  initial begin
    logic [15:0] raw [$];
    for (int k = 0; k < NEV; k++) begin
      int n; n = (k == 0) ? 1 : $urandom_range(1, 8);
      ev_words[k].push_back(16'(16'h0400 + k));
      shmem[16'h0400 + k] = 16'($urandom);
      for (int j = 0; j < n; j++) begin
        ev_words[k].push_back(16'($urandom)); raw.push_back(ev_words[k][$]);
      end
    end
    build_program(prog);
    repeat (2) @(posedge clk); #1 rst = 0;
    // download and verify
    foreach (prog[a]) begin
      send(CC_SETADDR, 16'(a));
      for (int s = 0; s < 6; s++) send(CC_WRITE, prog[a][s*16 +: 16]);
    end
    foreach (prog[a]) begin
      send(CC_SETADDR, 16'(a));
      for (int s = 0; s < 6; s++) begin
        cmd_valid = 1; cmd = CC_READ; #1;
        checks++; if (cmd_rdata !== prog[a][s*16 +: 16]) begin failures++; $display("FAIL verify %0d", a); end
        @(posedge clk); #1; cmd_valid = 0;
      end
    end
    checks++; if (avail !== 0) begin failures++; $display("FAIL avail while disabled"); end
    send(CC_ENABLE, 16'd1);
    // play the INPUT module
    for (int k = 0; k < NEV; k++) begin
      while (!avail) @(posedge clk);
      #1 assign_evt = 1; @(posedge clk); #1 assign_evt = 0;
      foreach (ev_words[k][j]) begin
        repeat ($urandom_range(0, (k % 4 == 0) ? 12 : 1)) @(posedge clk);
        #1;
        while (!in_ready) begin @(posedge clk); #1; end
        in_wr = 1; in_data = {8'h00, ev_words[k][j]}; in_eoe = (j == ev_words[k].size() - 1);
        @(posedge clk); #1 in_wr = 0;
      end
    end
    while (hist_ev < NEV || out_ev < NEV) @(posedge clk);
    repeat (40) @(posedge clk);
    #1;
    foreach (raw[j]) begin
      checks++;
      if (dut.u_dmem.mem[16'h0100 + j] !== raw[j]) begin failures++; $display("FAIL work memory %0d", j); end
    end
    $display("stalls: input %0d output %0d memory %0d; short multiply cycles %0d", n_in_stall, n_out_stall, n_mm_stall, n_mul_short);
    checks++; if (n_in_stall == 0 || n_out_stall == 0 || n_mm_stall == 0) begin failures++; $display("FAIL a stall kind never happened"); end
    checks++; if (n_mul_short != 0) begin failures++; $display("FAIL multiply cycle shorter than programmed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // shared memory check: record initial values and compare at the end
  logic [15:0] sh_init [NEV];
  initial begin
    #1;
    for (int k = 0; k < NEV; k++) sh_init[k] = shmem[16'h0400 + k];
    wait (hist_ev == NEV && out_ev == NEV);
    repeat (30) @(posedge clk);
    for (int k = 0; k < NEV; k++) begin
      checks++;
      if (shmem[16'h0400 + k] !== 16'(sh_init[k] + ev_sum(k))) begin
        failures++; $display("FAIL shared memory ev %0d: %h exp %h", k, shmem[16'h0400 + k], 16'(sh_init[k] + ev_sum(k)));
      end
    end
  end
endmodule
