// tb_phase_add120: exhaustive check of the +120 degree phase adder against
// (p + 341) mod 1024 for all 1024 inputs, plus the two-stage chain returning
// to within one code of the start after three shifts.
module tb_phase_add120;
  logic [9:0] phin, phout, phout2, phout3;
  int checks = 0, failures = 0;

  phase_add120 dut  (.phin(phin),   .phout(phout));
  phase_add120 dut2 (.phin(phout),  .phout(phout2));
  phase_add120 dut3 (.phin(phout2), .phout(phout3));

  initial begin
    for (int p = 0; p < 1024; p++) begin
      phin = 10'(p);
      #1;
      checks++;
      if (phout !== 10'((p + 341) % 1024)) begin
        failures++;
        $display("FAIL p=%0d got %0d", p, phout);
      end
      // three 120-degree steps are 1023 codes = -1 mod 1024
      checks++;
      if (phout3 !== 10'((p + 1023) % 1024)) failures++;
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
