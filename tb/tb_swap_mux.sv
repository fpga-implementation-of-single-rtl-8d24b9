// tb_swap_mux: random test of the operand swap. For each random operand
// pair both values of sign_d are applied; the expected routing is written
// out directly.
module tb_swap_mux;
  logic [7:0]  exp_a, exp_b, exp_grt;
  logic [23:0] man_a, man_b, man_grt, man_less;
  logic        sign_a, sign_b, sign_d, sign_grt;
  int checks = 0, failures = 0;

  swap_mux dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      exp_a = 8'($urandom); exp_b = 8'($urandom);
      man_a = 24'($urandom); man_b = 24'($urandom);
      sign_a = 1'($urandom); sign_b = 1'($urandom);
      sign_d = 1'(i);
      #1;
      checks++;
      if (sign_d ? (exp_grt !== exp_b || man_grt !== man_b || man_less !== man_a || sign_grt !== sign_b)
                 : (exp_grt !== exp_a || man_grt !== man_a || man_less !== man_b || sign_grt !== sign_a)) begin
        failures++;
        if (failures < 10) $display("FAIL sign_d=%0d", sign_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
