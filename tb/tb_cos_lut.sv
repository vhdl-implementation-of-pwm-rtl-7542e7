// tb_cos_lut: reads all 256 addresses of the cosine table and compares each
// with floor(127 + 127*cos(2*pi*i/255)) computed here with real arithmetic
// (no folding), checks the one-clock read latency and the 120-degree
// example (address 85 reads 63).
module tb_cos_lut;
  logic clock = 0;
  logic [7:0] addr, data;
  int checks = 0, failures = 0;

  cos_lut dut (.clock, .addr, .data);

  always #5 clock = ~clock;

  function automatic int ref_cos(int i);
    return $rtoi($floor(127.0 + 127.0 * $cos(2.0 * 3.14159265358979323846 * i / 255.0) + 1.0e-9));
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clock);
      addr = 8'(i);
      @(posedge clock);
      #1;
      checks++;
      if (int'(data) != ref_cos(i)) begin
        failures++;
        $display("FAIL addr=%0d got %0d want %0d", i, data, ref_cos(i));
      end
    end
    // latency: data changes only at a clock edge
    @(negedge clock);
    addr = 8'd0;
    #2;
    checks++;
    if (data !== 8'(ref_cos(255))) failures++;
    @(posedge clock);
    #1;
    checks++;
    if (data !== 8'd254) failures++;
    @(negedge clock);
    addr = 8'd85;
    @(posedge clock);
    #1;
    checks++;
    if (data !== 8'd63) failures++;
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
