// tb_phase_oscillator: drives random frequency words, random tick patterns
// and random phase_in values and compares the phase register with a model
// that adds freq to phase_in on every tick, modulo 1024. Also runs the
// free-running loop (phase_in = phase) until the sawtooth wraps, and checks
// the period is ceil(1024/freq) ticks.
module tb_phase_oscillator;
  logic clock = 0, reset = 1, tick = 0;
  logic [7:0] freq = 0;
  logic [9:0] phase_in = 0, phase;
  logic       loop_mode = 0;
  logic [9:0] ph_mux;
  int checks = 0, failures = 0;
  int model = 0;

  assign ph_mux = loop_mode ? phase : phase_in;

  phase_oscillator dut (.clock, .reset, .tick, .freq, .phase_in(ph_mux), .phase);

  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    reset <= 0;
    @(negedge clock);
    checks++;
    if (phase !== 10'd0) failures++;
    // random open-loop
    for (int i = 0; i < 2000; i++) begin
      @(negedge clock);
      tick     = ($urandom_range(0, 2) == 0);
      freq     = 8'($urandom);
      phase_in = 10'($urandom);
      if (tick) model = (int'(phase_in) + int'(freq)) % 1024;
      @(posedge clock);
      #1;
      checks++;
      if (int'(phase) != model) begin
        failures++;
        $display("FAIL i=%0d got %0d want %0d", i, phase, model);
      end
    end
    // closed loop: sawtooth from zero
    reset <= 1;
    @(posedge clock);
    reset <= 0;
    loop_mode = 1;
    foreach (freq_list[j]) begin
      int ticks, wraps, prev;
      ticks = 0;
      wraps = 0;
      reset <= 1;
      @(posedge clock);
      reset <= 0;
      @(negedge clock);
      freq = freq_list[j];
      tick = 1;
      prev = 0;
      while (wraps == 0) begin
        @(posedge clock);
        #1;
        ticks++;
        if (int'(phase) < prev) wraps++;
        prev = int'(phase);
      end
      checks++;
      if (ticks != (1024 + int'(freq_list[j]) - 1) / int'(freq_list[j])) begin
        failures++;
        $display("FAIL period f=%0d ticks=%0d", freq_list[j], ticks);
      end
      @(negedge clock);
      tick = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] freq_list [4] = '{8'd1, 8'd3, 8'd52, 8'd255};

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
