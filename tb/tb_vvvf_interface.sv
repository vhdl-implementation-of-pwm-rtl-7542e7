// tb_vvvf_interface: random bus traffic (data, select, enable) and random
// phasein; a model register set written by select while enable is high is
// compared with freq, amp and the phase output every clock. The phase
// output must be the stored initial phase while enable is high and phasein
// while it is low.
module tb_vvvf_interface;
  import vvvf_pkg::*;
  logic clock = 0, reset = 1;
  logic [7:0] data_in = 0;
  logic [1:0] sel = 0;
  logic       en = 0;
  logic [9:0] phasein = 0;
  logic [7:0] freq, amp;
  logic [9:0] phase;
  int checks = 0, failures = 0;
  int m_freq = 0, m_amp = 0, m_ph = 0;
  int writes [4] = '{0, 0, 0, 0};

  vvvf_interface dut (.clock, .reset, .data_in, .sel(sel_e'(sel)), .en, .phasein,
                      .freq, .amp, .phase);

  always #5 clock = ~clock;

  initial begin
    repeat (2) @(posedge clock);
    reset <= 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clock);
      data_in = 8'($urandom);
      sel     = 2'($urandom);
      en      = ($urandom_range(0, 1) == 1);
      phasein = 10'($urandom);
      #1;
      checks++;
      if (phase !== (en ? 10'(m_ph) : phasein)) begin
        failures++;
        $display("FAIL phase mux i=%0d", i);
      end
      if (en) begin
        writes[sel]++;
        case (sel)
          2'b00: m_amp = int'(data_in);
          2'b01: m_freq = int'(data_in);
          2'b10: m_ph = (m_ph & 'h300) | int'(data_in);
          2'b11: m_ph = (m_ph & 'h0ff) | ((int'(data_in) & 3) << 8);
        endcase
      end
      @(posedge clock);
      #1;
      checks++;
      if (int'(freq) != m_freq || int'(amp) != m_amp) begin
        failures++;
        $display("FAIL regs i=%0d freq=%0d/%0d amp=%0d/%0d", i, freq, m_freq, amp, m_amp);
      end
    end
    // the stored phase, seen with enable high and select on frequency
    @(negedge clock);
    en = 1; sel = 2'b01; data_in = 8'(m_freq);
    #1;
    checks++;
    if (int'(phase) != m_ph) failures++;
    foreach (writes[s]) begin
      checks++;
      if (writes[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
