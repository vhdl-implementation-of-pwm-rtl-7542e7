// tb_amplitude_module: applies random amplitude angles and phases (plus
// corner cases), holds them, and after 24 clocks compares each output with
// (C[(theta+phi)>>2] + C[(theta-phi)>>2]) >> 1, where C is the offset
// cosine table computed here with real arithmetic. It also checks that the
// result is within 2 codes of 127 + 127*cos(phi)*cos(theta), that the
// outputs do not change while the inputs are held, and that a new input
// reaches all three outputs no later than 23 clocks after it is applied.
module tb_amplitude_module;
  logic clock = 0, reset = 1;
  logic [7:0] amp = 0;
  logic [9:0] phase [3] = '{default: '0};
  logic [7:0] out [3];
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979323846;

  amplitude_module dut (.clock, .reset, .amp, .phase, .out);

  always #5 clock = ~clock;

  function automatic int c_tab(int i);
    return $rtoi($floor(127.0 + 127.0 * $cos(2.0 * PI * i / 255.0) + 1.0e-9));
  endfunction

  function automatic int ref_out(int th, int ph);
    int a, b;
    a = ((th + ph) % 1024) >> 2;
    b = ((th - ph + 1024) % 1024) >> 2;
    return (c_tab(a) + c_tab(b)) >> 1;
  endfunction

  initial begin
    repeat (3) @(posedge clock);
    reset <= 0;
    for (int n = 0; n < 400; n++) begin
      int lat;
      bit done;
      int want [3];
      @(negedge clock);
      if (n == 0) begin amp = 0; phase = '{10'd0, 10'd341, 10'd682}; end
      else if (n == 1) begin amp = 255; phase = '{10'd0, 10'd512, 10'd256}; end
      else begin
        amp = 8'($urandom);
        phase[0] = 10'($urandom);
        phase[1] = phase[0] + 10'd341;
        phase[2] = phase[1] + 10'd341;
        if (n % 3 == 0) phase[2] = 10'($urandom);
      end
      foreach (want[k]) want[k] = ref_out(int'(phase[k]), int'(amp));
      // latency: all three correct within 23 clocks
      lat = 0;
      done = 0;
      while (!done && lat < 40) begin
        @(posedge clock);
        #1;
        lat++;
        done = (int'(out[0]) == want[0]) && (int'(out[1]) == want[1]) &&
               (int'(out[2]) == want[2]);
      end
      checks++;
      if (!done || lat > 23) begin
        failures++;
        $display("FAIL n=%0d latency %0d done=%0b", n, lat, done);
      end
      // stays put while the inputs are held
      repeat (24) @(posedge clock);
      #1;
      foreach (want[k]) begin
        real ideal;
        checks++;
        if (int'(out[k]) != want[k]) begin
          failures++;
          $display("FAIL n=%0d k=%0d th=%0d phi=%0d got %0d want %0d", n, k, phase[k], amp,
                   out[k], want[k]);
        end
        ideal = 127.0 + 127.0 * $cos(2.0 * PI * real'(amp) / 1023.0) *
                $cos(2.0 * PI * real'(phase[k]) / 1023.0);
        checks++;
        if (real'(out[k]) - ideal > 2.6 || ideal - real'(out[k]) > 2.6) begin
          failures++;
          $display("FAIL accuracy n=%0d k=%0d got %0d ideal %f", n, k, out[k], ideal);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
