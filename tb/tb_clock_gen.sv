// tb_clock_gen: self-checking test of the processor cycle generator.
// For every cycle length 1..8 and random stall patterns it measures the base
// clocks between adv pulses and checks that a cycle lasts exactly its
// programmed length, extended by stall until the first clock without stall.
module tb_clock_gen;
  logic clk = 0, rst = 1, stall = 0, adv, stalled;
  logic [2:0] cyc;
  int checks = 0, failures = 0;

  clock_gen dut (.*);
  always #5 clk = ~clk;
  initial begin
    #2000000; failures++; $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    cyc = 0;
    @(posedge clk); #1 rst = 0;
    for (int t = 0; t < 400; t++) begin
      int len, n, hold;
      cyc = 3'($urandom); len = int'(cyc) + 1;
      hold = (t % 3 == 0) ? $urandom_range(1, 5) : 0;   // clocks of stall after length elapses
      n = 0;
      // count clocks of this cycle; adv ends it
      forever begin
        n++;
        stall = (n >= len) && (n < len + hold);
        #1;
        if (adv) break;
        @(posedge clk); #1;
      end
      checks++;
      if (n !== len + hold) begin failures++; $display("FAIL len=%0d hold=%0d took %0d", len, hold, n); end
      @(posedge clk); #1;
      stall = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
