// tb_frac_comp_eff_op: checks the effective operation for all eight sign /
// operation combinations (subtraction when an odd number of s_a, s_b, sop is
// set) and the forming of the two 27-bit adder operands for random inputs.
module tb_frac_comp_eff_op;
  logic [23:0] frac_a, frac_b;
  logic [2:0]  grs_b;
  logic        sop, s_a, s_b, s_eff;
  logic [26:0] frac_a1, frac_b1;
  int checks = 0, failures = 0;

  frac_comp_eff_op dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 800; i++) begin
      logic exp_sub;
      {sop, s_a, s_b} = 3'(i);
      frac_a = 24'($urandom); frac_b = 24'($urandom); grs_b = 3'($urandom);
      #1;
      // add when the signs agree after the operation is applied to b
      exp_sub = (s_a != (s_b != sop));
      checks++;
      if (s_eff !== exp_sub || frac_a1 !== frac_a * 8 || frac_b1 !== frac_b * 8 + grs_b) begin
        failures++;
        if (failures < 10) $display("FAIL sop=%0d sa=%0d sb=%0d -> %0d", sop, s_a, s_b, s_eff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
