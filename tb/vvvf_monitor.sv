// vvvf_monitor: end-to-end scoreboard for the vvvf controller.
//
// It keeps its own model of the configuration registers (from the bus),
// of the phase accumulator (advanced by the frequency word on every
// oscillator strobe, or restarted from the programmed initial phase while
// enable is high) and of the expected comparator input of each phase,
//   inp_k = (C[(theta_k+phi)>>2] + C[(theta_k-phi)>>2]) >> 1,
// theta_k = theta + k*341, C[i] = floor(127 + 127*cos(2*pi*i/255)),
// with phi the bus amplitude or, in volts-per-hertz mode, the angle
// round(acos(min(f/F_BASE,1))*1023/(2*pi)). The comparators latch their
// input at each counter wrap, so the pulses of a period show the phase the
// accumulator held during the period before. Since the outputs are
// registered, a period is measured from one clock after its oscillator
// strobe to one clock after the next. For every carrier period with no bus
// activity in it or the three periods before, it checks, in clocks:
//   SPWM high time        = (512 - 2*inp_k) * DIV
//   positive-half gate     = SPWM high time if inp_k > 127, else 0
//   negative-half gate     = SPWM low time  if inp_k <= 127, else 0
// and it checks the probed phase register against the model every clock.
// It counts each mechanism it sees: bus writes by select, enable held
// across an oscillator strobe, phase wrap-around, positive and negative
// half cycles, and (volts-per-hertz mode) periods below and at/above base.
module vvvf_monitor #(
  parameter int unsigned DIV        = 100,
  parameter int unsigned F_BASE     = 52,
  parameter bit          USE_VF_LUT = 1'b0
) (
  input  logic       clock,
  input  logic       reset,
  input  logic [7:0] data_in,
  input  logic [1:0] sel,
  input  logic       en,
  input  logic [2:0] pulse,
  input  logic [5:0] gate,
  input  logic       osc_tick,
  input  logic [9:0] phase_probe,
  output int         checks,
  output int         failures,
  output int         n_write [4],
  output int         n_hold,
  output int         n_wrap,
  output int         n_pos,
  output int         n_neg,
  output int         n_periods,
  output int         n_vf_below,
  output int         n_vf_above
);
  localparam real PI = 3.14159265358979323846;

  int m_freq, m_amp, m_init, m_phase, ph_prev, ph_used;
  int hi [3], gp [3], gn [3];
  bit dirty, dirty_prev, dirty_prev2, dirty_prev3, osc_d;
  int started;

  function automatic int c_tab(int i);
    return $rtoi($floor(127.0 + 127.0 * $cos(2.0 * PI * i / 255.0) + 1.0e-9));
  endfunction

  function automatic int vf_phi(int f);
    real m;
    int  p;
    m = real'(f) / real'(F_BASE);
    if (m > 1.0) m = 1.0;
    p = $rtoi($acos(m) * 1023.0 / (2.0 * PI) + 0.5);
    return (p > 255) ? 255 : p;
  endfunction

  function automatic int ref_inp(int th, int ph);
    int a, b;
    a = ((th + ph) % 1024) >> 2;
    b = ((th - ph + 1024) % 1024) >> 2;
    return (c_tab(a) + c_tab(b)) >> 1;
  endfunction

  always @(posedge clock) begin
    if (reset) begin
      m_freq = 0; m_amp = 0; m_init = 0; m_phase = 0; ph_prev = 0; ph_used = 0;
      foreach (hi[k]) begin hi[k] = 0; gp[k] = 0; gn[k] = 0; end
      dirty = 1; dirty_prev = 1; dirty_prev2 = 1; dirty_prev3 = 1; osc_d = 0; started = 0;
    end else begin
      checks++;
      if (int'(phase_probe) != m_phase) begin
        failures++;
        if (failures < 10) $display("FAIL phase register %0d, model %0d", phase_probe, m_phase);
      end
      for (int k = 0; k < 3; k++) begin
        hi[k] += int'(pulse[k]);
        gp[k] += int'(gate[4 - 2*k]);
        gn[k] += int'(gate[5 - 2*k]);
      end
      if (en) dirty = 1;
      // outputs are registered: a period's samples end one clock after its strobe
      if (osc_d) begin
        if (started >= 3 && !dirty && !dirty_prev && !dirty_prev2 && !dirty_prev3) begin
          int phi;
          phi = USE_VF_LUT ? vf_phi(m_freq) : m_amp;
          n_periods++;
          if (USE_VF_LUT && m_freq < int'(F_BASE)) n_vf_below++;
          if (USE_VF_LUT && m_freq >= int'(F_BASE)) n_vf_above++;
          for (int k = 0; k < 3; k++) begin
            int inp, want_hi;
            inp = ref_inp((ph_used + 341 * k) % 1024, phi);
            want_hi = (512 - 2 * inp) * int'(DIV);
            checks += 3;
            if (hi[k] != want_hi) begin
              failures++;
              if (failures < 10)
                $display("FAIL period %0d phase%0d theta=%0d phi=%0d high %0d want %0d",
                         n_periods, k + 1, (ph_used + 341 * k) % 1024, phi, hi[k], want_hi);
            end
            if (gp[k] != ((inp > 127) ? want_hi : 0)) begin
              failures++;
              if (failures < 10) $display("FAIL gate_p phase%0d %0d", k + 1, gp[k]);
            end
            if (gn[k] != ((inp <= 127) ? 512 * int'(DIV) - want_hi : 0)) begin
              failures++;
              if (failures < 10) $display("FAIL gate_n phase%0d %0d", k + 1, gn[k]);
            end
            if (inp > 127 && gp[k] > 0) n_pos++;
            if (inp <= 127 && gn[k] > 0) n_neg++;
          end
        end
        foreach (hi[k]) begin hi[k] = 0; gp[k] = 0; gn[k] = 0; end
      end
      osc_d = osc_tick;
      if (osc_tick) begin
        started++;
        dirty_prev3 = dirty_prev2;
        dirty_prev2 = dirty_prev;
        dirty_prev = dirty;
        ph_used = ph_prev;
        ph_prev = m_phase;
        dirty = en;
        // oscillator model: source is the initial phase while enable is high
        begin
          int src;
          src = en ? m_init : m_phase;
          if (en) n_hold++;
          if (src + m_freq >= 1024) n_wrap++;
          m_phase = (src + m_freq) % 1024;
        end
      end
      if (en) begin
        n_write[sel]++;
        case (sel)
          2'b00: m_amp = int'(data_in);
          2'b01: m_freq = int'(data_in);
          2'b10: m_init = (m_init & 'h300) | int'(data_in);
          2'b11: m_init = (m_init & 'h0ff) | ((int'(data_in) & 3) << 8);
        endcase
      end
    end
  end

  initial begin
    checks = 0; failures = 0; n_hold = 0; n_wrap = 0; n_pos = 0; n_neg = 0;
    n_periods = 0; n_vf_below = 0; n_vf_above = 0;
    n_write = '{0, 0, 0, 0};
  end
endmodule
