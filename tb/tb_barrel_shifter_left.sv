// tb_barrel_shifter_left: checks near-path normalization. Random adder
// results with a random number of leading zeros are shifted by their leading
// zero count; for large exponents the leading one must reach bit 26 and the
// exponent drop by the count, for small exponents the shift must stop at
// exponent 1 (denormal result). Expected values use integer arithmetic.
module tb_barrel_shifter_left;
  logic [7:0]  exp_grt;
  logic [26:0] din, man_sft;
  logic [4:0]  shift_amt;
  logic [9:0]  exp_sum;
  int checks = 0, failures = 0;
  int n_limited = 0;

  barrel_shifter_left dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      int lz, sh;
      lz = $urandom_range(0, 26);
      din = (27'($urandom) | 27'h400_0000) >> lz;
      exp_grt = (i % 3 == 0) ? 8'($urandom_range(1, 30)) : 8'($urandom_range(1, 254));
      shift_amt = 5'(lz);
      #1;
      sh = (lz > exp_grt - 1) ? exp_grt - 1 : lz;
      if (sh < lz) n_limited++;
      checks++;
      if (man_sft !== 27'(din << sh) || exp_sum !== 10'(exp_grt - sh) ||
          (sh == lz && !man_sft[26])) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d din=%h lz=%0d -> %0d %h", exp_grt, din, lz, exp_sum, man_sft);
      end
    end
    checks++;
    if (n_limited == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
