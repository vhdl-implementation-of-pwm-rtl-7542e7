// tb_vvvf_bus_hold: the controller with enable held high while the select
// cycles 00, 01, 10, 11 on every clock and the bus alternates 10101010b
// (selects 00, 10) and 01010101b (selects 01, 11). This keeps rewriting
// amplitude 170, frequency 85 and initial phase 1_1010_1010b = 426, so the
// oscillator must stay at 426 + 85 = 511 and every carrier period must
// carry the same three pulses, each with high time (512 - 2*v_k)*DIV
// clocks, v_k = (C[(511+341k+170)>>2] + C[(511+341k-170)>>2]) >> 1.
// Run at DIV = 16.
module tb_vvvf_bus_hold;
  localparam int unsigned DIV = 16;
  localparam int          PERIOD = 512 * DIV;
  localparam real PI = 3.14159265358979323846;

  logic clock = 0, reset = 1;
  logic [7:0] data_in = 0;
  logic [1:0] sel = 0;
  logic       en = 0;
  logic [2:0] pulse;
  logic [5:0] gate;
  int checks = 0, failures = 0;
  int hi [3] = '{0, 0, 0};
  int periods = 0;
  bit osc_d = 0;

  vvvf #(.DIV(DIV)) dut (.clock, .reset, .data_in, .sel, .en, .pulse, .gate);

  always #5 clock = ~clock;

  function automatic int c_tab(int i);
    return $rtoi($floor(127.0 + 127.0 * $cos(2.0 * PI * i / 255.0) + 1.0e-9));
  endfunction

  function automatic int ref_inp(int th, int ph);
    return (c_tab(((th + ph) % 1024) >> 2) + c_tab(((th - ph + 1024) % 1024) >> 2)) >> 1;
  endfunction

  // bus: select counts up every clock, data alternates with it
  always @(negedge clock) begin
    if (!reset) begin
      en      <= 1'b1;
      sel     <= sel + 2'd1;
      data_in <= sel[0] ? 8'b1010_1010 : 8'b0101_0101;
    end
  end

  // per-period high time, measured one clock behind the strobe
  always @(posedge clock) begin
    if (!reset) begin
      for (int k = 0; k < 3; k++) hi[k] += int'(pulse[k]);
      if (osc_d) begin
        periods++;
        if (periods >= 4) begin
          for (int k = 0; k < 3; k++) begin
            int want;
            want = (512 - 2 * ref_inp((511 + 341 * k) % 1024, 170)) * int'(DIV);
            checks++;
            if (hi[k] != want) begin
              failures++;
              $display("FAIL period %0d phase%0d high %0d want %0d", periods, k + 1, hi[k], want);
            end
          end
          checks++;
          if (dut.phase[0] !== 10'd511) failures++;
        end
        hi = '{0, 0, 0};
      end
      osc_d <= dut.osc_tick[0];
    end
  end

  initial begin
    repeat (4) @(posedge clock);
    reset <= 0;
    repeat (12 * PERIOD) @(posedge clock);
    checks++;
    if (periods < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * PERIOD) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
