// tb_output_module: self-checking test of the FIFO-OUTPUT module.
// Part 1: a directed case of the service order: while processor 1's event is
// being taken, processor 3 and then processor 2 start waiting; processor 3
// (first come) must be served before processor 2 although round-robin alone
// would pick 2.  Part 2: four processor models each emit 25 events of random
// length at random times; the FIFO is read through the front-panel port with
// random ready, then through host reads.  Each event must leave the FIFO
// contiguous (whole-event service), each processor's events in order, and
// all words must arrive.
module tb_output_module;
  import pps_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst = 1;
  logic [N-1:0] p_valid, p_eoe, p_ready;
  logic [15:0] p_data [N];
  logic fp_mode = 1, fp_valid, fp_eoe, fp_ready = 0, host_rd = 0, host_reoe, fifo_empty;
  logic [15:0] fp_data, host_rdata;
  logic [12:0] fifo_count;
  logic [31:0] n_multi_wait;
  int checks = 0, failures = 0;

  output_module #(.NPROC(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    #50000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // processor models: word = {proc[1:0], event[5:0], index[7:0]}
  int nev [N], len_tab [N][25], sent_ev [N];
  bit run_models = 0;
  logic [N-1:0] direct_valid = 0;
  logic [15:0]  direct_data [N];
  logic [N-1:0] direct_eoe = 0;

  for (genvar g = 0; g < N; g++) begin : g_proc
    logic v = 0, e = 0; logic [15:0] dta = 0; int ev = 0, idx = 0;
    assign p_valid[g] = run_models ? v : direct_valid[g];
    assign p_data[g]  = run_models ? dta : direct_data[g];
    assign p_eoe[g]   = run_models ? e : direct_eoe[g];
    always @(posedge clk) if (run_models) begin
      if (v && p_ready[g]) begin
        v <= 0;
        if (e) begin ev <= ev + 1; idx <= 0; end else idx <= idx + 1;
      end else if (!v && ev < 25 && $urandom_range(0, 3) == 0) begin
        v <= 1; dta <= {2'(g), 6'(ev), 8'(idx)}; e <= (idx == len_tab[g][ev] - 1);
      end
    end
  end

  initial begin
    int order [$];
    foreach (len_tab[g, k]) len_tab[g][k] = $urandom_range(1, 10);
    foreach (direct_data[g]) direct_data[g] = 16'(g);
    repeat (2) @(posedge clk); #1 rst = 0;
    // ---- part 1: directed first-come-first-served case
    fp_ready = 1;
    direct_valid[1] = 1; direct_eoe[1] = 0;
    repeat (3) @(posedge clk); #1;          // module is now taking words from 1
    direct_valid[3] = 1; direct_eoe[3] = 1;
    repeat (2) @(posedge clk); #1;
    direct_valid[2] = 1; direct_eoe[2] = 1;
    repeat (2) @(posedge clk); #1;
    direct_eoe[1] = 1;                      // processor 1 ends its event
    fork
      begin
        for (int t = 0; t < 40; t++) begin
          @(posedge clk);
          for (int g = 0; g < N; g++) if (p_ready[g] && direct_eoe[g] && direct_valid[g]) begin
            order.push_back(g);
          end
        end
      end
      begin
        for (int t = 0; t < 40; t++) begin
          @(posedge clk); #1;
          for (int g = 0; g < N; g++) if (order.size() > 0 && order[$] == g) direct_valid[g] = 0;
        end
      end
    join
    checks++;
    if (order.size() != 3 || order[0] != 1 || order[1] != 3 || order[2] != 2) begin
      failures++; $display("FAIL service order %p", order);
    end
    checks++; if (n_multi_wait == 0) begin failures++; $display("FAIL no multi-wait decision"); end
    repeat (5) @(posedge clk); #1;
    while (!fifo_empty) @(posedge clk); #1;
    // ---- part 2: random traffic
    begin
      int cur_p, exp_ev [N], exp_idx [N], words, total;
      total = 0; foreach (len_tab[g, k]) total += len_tab[g][k];
      cur_p = -1; words = 0;
      foreach (exp_ev[g]) begin exp_ev[g] = 0; exp_idx[g] = 0; end
      run_models = 1;
      while (words < total) begin
        logic take; logic [15:0] w; logic e;
        if (words == total / 2) fp_mode = 0;
        if (fp_mode) begin fp_ready = 1'($urandom_range(0, 1)); host_rd = 0; end
        else begin fp_ready = 0; host_rd = !fifo_empty && $urandom_range(0, 1); end
        #1;
        take = fp_mode ? (fp_valid && fp_ready) : host_rd;
        w = fp_mode ? fp_data : host_rdata; e = fp_mode ? fp_eoe : host_reoe;
        if (take) begin
          int g;
          g = int'(w[15:14]);
          checks++;
          if ((cur_p >= 0 && g != cur_p) || int'(w[13:8]) != exp_ev[g] || int'(w[7:0]) != exp_idx[g] ||
              e != (exp_idx[g] == len_tab[g][exp_ev[g]] - 1)) begin
            failures++; $display("FAIL word %h from %0d exp ev %0d idx %0d cur %0d", w, g, exp_ev[g], exp_idx[g], cur_p);
          end
          if (e) begin exp_ev[g]++; exp_idx[g] = 0; cur_p = -1; end
          else begin exp_idx[g]++; cur_p = g; end
          words++;
        end
        @(posedge clk); #1;
      end
      $display("words %0d, decisions with several waiting %0d", words, n_multi_wait);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
