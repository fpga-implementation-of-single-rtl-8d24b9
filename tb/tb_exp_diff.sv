// tb_exp_diff: exhaustive test of the exponent difference unit over all
// 65536 pairs of 8-bit exponents. Expected values come from integer
// arithmetic: sign_d = (a < b), big_num = |a-b| > 31, shift_amt = min(|a-b|, 31).
module tb_exp_diff;
  logic [7:0] exp_a, exp_b;
  logic [4:0] shift_amt;
  logic       sign_d, big_num;
  int checks = 0, failures = 0;

  exp_diff dut (.exp_a(exp_a), .exp_b(exp_b), .shift_amt(shift_amt), .sign_d(sign_d), .big_num(big_num));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int d;
        exp_a = 8'(i); exp_b = 8'(j); #1;
        d = (i > j) ? i - j : j - i;
        checks++;
        if (sign_d !== (i < j) || big_num !== (d > 31) || shift_amt !== 5'((d > 31) ? 31 : d)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d %0d -> %0d %0d %0d", i, j, shift_amt, sign_d, big_num);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
