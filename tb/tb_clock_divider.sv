// tb_clock_divider: checks that `tick` is high exactly one clock in every
// DIV, for DIV = 7, DIV = 1 and the default DIV = 100, and that reset
// restarts the count.
module tb_clock_divider;
  logic clock = 0, reset = 1;
  logic t7, t1, t100;
  int checks = 0, failures = 0;
  int c7 = 0, c1 = 0, c100 = 0, cyc = 0;

  clock_divider #(.DIV(7)) d7   (.clock, .reset, .tick(t7));
  clock_divider #(.DIV(1)) d1   (.clock, .reset, .tick(t1));
  clock_divider            d100 (.clock, .reset, .tick(t100));

  always #5 clock = ~clock;

  initial begin
    repeat (3) @(posedge clock);
    reset <= 0;
    // after reset release the count is 0: first tick in cycle DIV-1
    for (cyc = 0; cyc < 1400; cyc++) begin
      @(negedge clock);
      checks++;
      if (t7 !== ((cyc % 7) == 6)) begin
        failures++;
        $display("FAIL div7 cyc=%0d tick=%0b", cyc, t7);
      end
      checks++;
      if (t1 !== 1'b1) failures++;
      checks++;
      if (t100 !== ((cyc % 100) == 99)) begin
        failures++;
        $display("FAIL div100 cyc=%0d tick=%0b", cyc, t100);
      end
      c7 += t7; c100 += t100;
      @(posedge clock);
    end
    checks++;
    if (c7 != 200 || c100 != 14) failures++;
    // reset in the middle restarts the count
    reset <= 1;
    @(posedge clock);
    reset <= 0;
    for (int i = 0; i < 14; i++) begin
      @(negedge clock);
      checks++;
      if (t7 !== ((i % 7) == 6)) failures++;
      @(posedge clock);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
