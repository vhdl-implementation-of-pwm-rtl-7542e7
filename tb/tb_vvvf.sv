// tb_vvvf: end-to-end test of the controller at a reduced counter rate
// (DIV = 16; every other parameter at its default). Two controllers share
// the configuration bus: one takes its amplitude from the bus, the other
// from the volts-per-hertz table. The bus programs amplitude, frequency and
// both initial-phase bytes, holds enable across an oscillator strobe, then
// runs three operating points (below base frequency, above it with phase
// wrap-around, and a slow large-amplitude one). vvvf_monitor checks every
// carrier period of all six gate outputs and three SPWM outputs against
// its own model; every mechanism must have occurred at least once.
module tb_vvvf;
  localparam int unsigned DIV = 16;
  localparam int          PERIOD = 512 * DIV;

  logic clock = 0, reset = 1;
  logic [7:0] data_in = 0;
  logic [1:0] sel = 0;
  logic       en = 0;
  logic [2:0] pulse, pulse_vf;
  logic [5:0] gate, gate_vf;

  int checks, failures;
  int c0, f0, c1, f1;
  int w0 [4], w1 [4];
  int hold0, wrap0, pos0, neg0, per0, b0, a0;
  int hold1, wrap1, pos1, neg1, per1, b1, a1;

  vvvf #(.DIV(DIV)) dut (.clock, .reset, .data_in, .sel, .en, .pulse, .gate);
  vvvf #(.DIV(DIV), .USE_VF_LUT(1'b1)) dut_vf (.clock, .reset, .data_in, .sel, .en,
                                               .pulse(pulse_vf), .gate(gate_vf));

  vvvf_monitor #(.DIV(DIV)) mon (
    .clock, .reset, .data_in, .sel, .en, .pulse, .gate,
    .osc_tick(dut.osc_tick[0]), .phase_probe(dut.phase[0]),
    .checks(c0), .failures(f0), .n_write(w0), .n_hold(hold0), .n_wrap(wrap0),
    .n_pos(pos0), .n_neg(neg0), .n_periods(per0), .n_vf_below(b0), .n_vf_above(a0));

  vvvf_monitor #(.DIV(DIV), .USE_VF_LUT(1'b1)) mon_vf (
    .clock, .reset, .data_in, .sel, .en, .pulse(pulse_vf), .gate(gate_vf),
    .osc_tick(dut_vf.osc_tick[0]), .phase_probe(dut_vf.phase[0]),
    .checks(c1), .failures(f1), .n_write(w1), .n_hold(hold1), .n_wrap(wrap1),
    .n_pos(pos1), .n_neg(neg1), .n_periods(per1), .n_vf_below(b1), .n_vf_above(a1));

  always #5 clock = ~clock;

  task automatic write(input logic [1:0] s, input logic [7:0] d);
    @(negedge clock);
    en = 1; sel = s; data_in = d;
  endtask

  task automatic configure(input int amp, input int freq, input int ph);
    write(2'b00, 8'(amp));
    write(2'b01, 8'(freq));
    write(2'b10, 8'(ph & 'hff));
    write(2'b11, 8'(ph >> 8));
  endtask

  task automatic release_bus();
    @(negedge clock);
    en = 0;
  endtask

  task automatic expect_count(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never seen: %s", what);
    end
  endtask

  initial begin
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clock);
    reset <= 0;
    // operating point 1: below base frequency, bus enable held for a strobe
    configure(60, 40, 700);
    repeat (PERIOD + 10) @(negedge clock);
    release_bus();
    repeat (30 * PERIOD) @(posedge clock);
    // operating point 2: above base frequency, full bus amplitude
    configure(0, 100, 0);
    release_bus();
    repeat (25 * PERIOD) @(posedge clock);
    // operating point 3: slow, small bus amplitude
    configure(200, 7, 900);
    release_bus();
    repeat (20 * PERIOD) @(posedge clock);

    checks += c0 + c1;
    failures += f0 + f1;
    foreach (w0[s]) expect_count($sformatf("bus write, select %0d", s), w0[s]);
    expect_count("enable held across an oscillator strobe", hold0);
    expect_count("phase wrap-around", wrap0);
    expect_count("positive half-cycle gate", pos0);
    expect_count("negative half-cycle gate", neg0);
    expect_count("volts-per-hertz below base", b1);
    expect_count("volts-per-hertz at or above base", a1);
    expect_count("volts-per-hertz controller, positive half", pos1);
    expect_count("volts-per-hertz controller, negative half", neg1);
    $display("periods checked %0d + %0d; writes %0d %0d %0d %0d; holds %0d; wraps %0d; half cycles +%0d -%0d; v/f below %0d above %0d",
             per0, per1, w0[0], w0[1], w0[2], w0[3], hold0, wrap0, pos0, neg0, b1, a1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * PERIOD) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
