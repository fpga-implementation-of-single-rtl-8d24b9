// tb_exp_sum: checks exponent selection, the rounding carry, the denormal
// encoding (field 0 when the rounded significand has no leading one) and
// overflow (exponent 255 or more gives field 255 and the overflow flag).
module tb_exp_sum;
  logic [9:0] exp_far, exp_near;
  logic       lod_sel, rnd_carry, hidden, overflow;
  logic [7:0] exp_out;
  int checks = 0, failures = 0;
  int n_ovf = 0;

  exp_sum dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int e;
      exp_far  = 10'($urandom_range(1, 255));
      exp_near = 10'($urandom_range(1, 254));
      lod_sel  = 1'($urandom);
      rnd_carry = 1'($urandom);
      hidden   = rnd_carry | 1'($urandom);
      #1;
      e = int'(lod_sel ? exp_near : exp_far) + int'(rnd_carry);
      if (e >= 255) n_ovf++;
      checks++;
      if (overflow !== (e >= 255) || exp_out !== ((e >= 255) ? 8'd255 : (hidden ? 8'(e) : 8'd0))) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d hidden=%0d -> %0d %0d", e, hidden, exp_out, overflow);
      end
    end
    checks++;
    if (n_ovf == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
