// tb_vf_amplitude_lut: for every frequency word, compares the amplitude
// angle with round(acos(min(f/52,1)) * 1023/(2*pi)) limited to 255, and
// checks the volts-per-hertz property directly: cos of the returned angle
// is within one angle step of f/52 below the base and exactly 1 (angle 0)
// at and above it. A second instance with F_BASE = 100 checks the
// parameter.
module tb_vf_amplitude_lut;
  logic [7:0] freq, amp, amp100;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  vf_amplitude_lut                 dut    (.freq, .amp);
  vf_amplitude_lut #(.F_BASE(100)) dut100 (.freq, .amp(amp100));

  function automatic int ref_phi(int f, int fb);
    real m;
    int  p;
    m = real'(f) / real'(fb);
    if (m > 1.0) m = 1.0;
    p = $rtoi($acos(m) * 1023.0 / (2.0 * PI) + 0.5);
    return (p > 255) ? 255 : p;
  endfunction

  initial begin
    for (int f = 0; f < 256; f++) begin
      real m_got;
      freq = 8'(f);
      #1;
      checks++;
      if (int'(amp) != ref_phi(f, 52)) begin
        failures++;
        $display("FAIL f=%0d got %0d want %0d", f, amp, ref_phi(f, 52));
      end
      checks++;
      if (int'(amp100) != ref_phi(f, 100)) failures++;
      m_got = $cos(2.0 * PI * real'(amp) / 1023.0);
      checks++;
      if (f >= 52) begin
        if (amp != 8'd0) failures++;
      end else if (f > 0) begin
        // one angle step changes cos by at most 2*pi/1023 ~ 0.0061
        if ((m_got - real'(f) / 52.0) > 0.0062 || (real'(f) / 52.0 - m_got) > 0.0062) begin
          failures++;
          $display("FAIL index f=%0d m=%f", f, m_got);
        end
      end else if (amp != 8'd255) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
