// tb_shifter: exhaustive test of the near/far path decoder: far_sel must be
// 1 exactly when the shift amount is larger than 1.
module tb_shifter;
  logic [4:0] shift_amt;
  logic       far_sel;
  int checks = 0, failures = 0;

  shifter dut (.shift_amt(shift_amt), .far_sel(far_sel));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      shift_amt = 5'(i); #1;
      checks++;
      if (far_sel !== (i > 1)) begin failures++; $display("FAIL %0d -> %0d", i, far_sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
