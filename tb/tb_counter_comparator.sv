// tb_counter_comparator: runs the PWM module with a tick every other clock
// and a new random input for each carrier period (chosen at the wrap, plus
// the extremes 0, 127, 128, 254); the module must apply each input from the
// next wrap on, for one whole period. Every clock the registered outputs are
// compared with a model of the counter and the window comparison; per
// period it checks the high count 512 - 2*inp, exactly one oscillator
// strobe per 512 ticks, the gate split at the zero crossing (positive half:
// gate_p = pulse; negative half: gate_n = inverted pulse) and the symmetry
// of the pulse about the middle of the period (between counts 255 and 256).
module tb_counter_comparator;
  logic clock = 0, reset = 1, tick = 0;
  logic [7:0] inp = 8'd127;
  logic out, gate_p, gate_n, osc_tick;
  int checks = 0, failures = 0;
  int m_count = 0;
  int cur = 127;
  logic m_out = 0, m_gp = 0, m_gn = 0;
  int hi = 0, osc = 0, periods = 0;
  int pos_periods = 0, neg_periods = 0;
  int fixed [4] = '{0, 127, 128, 254};
  logic [511:0] shape;

  counter_comparator dut (.clock, .reset, .tick, .inp, .out, .gate_p, .gate_n, .osc_tick);

  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    reset <= 0;
    while (periods < 41) begin
      @(negedge clock);
      tick = ~tick;
      #1;
      // combinational oscillator strobe
      checks++;
      if (osc_tick !== (tick && m_count == 511)) failures++;
      if (osc_tick) osc++;
      @(posedge clock);
      // model update with pre-edge values
      m_out = !((m_count >= 256 - cur) && (m_count < 256 + cur));
      m_gp  = (cur > 127) && m_out;
      m_gn  = (cur <= 127) && !m_out;
      if (tick) shape[m_count] = m_out;
      if (tick && m_count == 511) begin
        // end of a period: examine it, then pick the next input
        int h;
        h = 0;
        for (int c = 0; c < 512; c++) h += int'(shape[c]);
        checks++;
        if (h != 512 - 2 * cur) begin
          failures++;
          $display("FAIL high count level=%0d h=%0d", cur, h);
        end
        checks++;
        for (int c = 0; c < 512; c++)
          if (shape[c] != shape[511 - c]) begin
            failures++;
            break;
          end
        if (cur > 127) pos_periods++; else neg_periods++;
        periods++;
        m_count = 0;
        cur = int'(inp);
        #1;
        if (periods < 4) inp = 8'(fixed[periods]);
        else inp = 8'($urandom_range(0, 254));
      end else if (tick) begin
        m_count++;
        #1;
      end else #1;
      checks++;
      if (out !== m_out || gate_p !== m_gp || gate_n !== m_gn) begin
        failures++;
        $display("FAIL cnt=%0d level=%0d out=%0b/%0b gp=%0b/%0b gn=%0b/%0b", m_count, cur,
                 out, m_out, gate_p, m_gp, gate_n, m_gn);
      end
    end
    checks++;
    if (osc != periods) failures++;
    checks++;
    if (int'(dut.level) != cur) failures++;
    checks++;
    if (pos_periods == 0 || neg_periods == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
