// tb_vvvf_full: one complete operation of the controller with every
// parameter at its default (DIV = 100, bus amplitude). The bus programs an
// amplitude angle of 40, the frequency word 52 (50 Hz with a 50 MHz clock)
// and an initial phase of 300, then the controller runs for more than one
// full output cycle (1024/52 carrier periods of 51200 clocks). vvvf_monitor
// checks the SPWM and gate outputs of all three phases in every period.
module tb_vvvf_full;
  localparam int unsigned DIV = 100;
  localparam int          PERIOD = 512 * DIV;

  logic clock = 0, reset = 1;
  logic [7:0] data_in = 0;
  logic [1:0] sel = 0;
  logic       en = 0;
  logic [2:0] pulse;
  logic [5:0] gate;

  int checks, failures;
  int c0, f0;
  int w0 [4];
  int hold0, wrap0, pos0, neg0, per0, b0, a0;

  vvvf dut (.clock, .reset, .data_in, .sel, .en, .pulse, .gate);

  vvvf_monitor mon (
    .clock, .reset, .data_in, .sel, .en, .pulse, .gate,
    .osc_tick(dut.osc_tick[0]), .phase_probe(dut.phase[0]),
    .checks(c0), .failures(f0), .n_write(w0), .n_hold(hold0), .n_wrap(wrap0),
    .n_pos(pos0), .n_neg(neg0), .n_periods(per0), .n_vf_below(b0), .n_vf_above(a0));

  always #10 clock = ~clock;

  task automatic write(input logic [1:0] s, input logic [7:0] d);
    @(negedge clock);
    en = 1; sel = s; data_in = d;
  endtask

  initial begin
    checks = 0;
    failures = 0;
    repeat (4) @(posedge clock);
    reset <= 0;
    write(2'b00, 8'd40);
    write(2'b01, 8'd52);
    write(2'b10, 8'(300 & 'hff));
    write(2'b11, 8'(300 >> 8));
    @(negedge clock);
    en = 0;
    repeat (26 * PERIOD) @(posedge clock);
    checks += c0;
    failures += f0;
    // a full output cycle checked, and both half cycles and a wrap seen
    checks++;
    if (per0 < 20 || wrap0 == 0 || pos0 == 0 || neg0 == 0) failures++;
    $display("periods checked %0d; wraps %0d; half cycles +%0d -%0d", per0, wrap0, pos0, neg0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30 * PERIOD) @(posedge clock);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
