// tb_fp_special: checks operand classification and unpacking. Hand-picked
// zero, denormal, normal, infinity and NaN patterns plus random words; the
// expected class is worked out from the IEEE 754 field rules.
module tb_fp_special;
  import fpa_pkg::*;
  fp32_t       x;
  fp_class_t   cls;
  logic [23:0] mant;
  logic [7:0]  exp_eff;
  int checks = 0, failures = 0;

  fp_special dut (.x(x), .cls(cls), .mant(mant), .exp_eff(exp_eff));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [31:0] v);
    logic [7:0] e;
    logic [22:0] f;
    logic zero, den, norm, inf, nan;
    x = v; #1;
    e = v[30:23]; f = v[22:0];
    zero = (e == 0) && (f == 0);
    den  = (e == 0) && (f != 0);
    inf  = (e == 255) && (f == 0);
    nan  = (e == 255) && (f != 0);
    norm = (e != 0) && (e != 255);
    checks++;
    if (cls.is_zero !== zero || cls.is_denorm !== den || cls.is_inf !== inf ||
        cls.is_nan !== nan || cls.is_norm !== norm ||
        cls.exp_zero !== (e == 0) || cls.exp_ones !== (e == 255) || cls.frac_zero !== (f == 0) ||
        mant !== {(e != 0), f} || exp_eff !== ((e == 0) ? 8'd1 : e)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%h cls=%b mant=%h exp_eff=%h", v, cls, mant, exp_eff);
    end
  endtask

  initial begin
    check(32'h0000_0000); check(32'h8000_0000); check(32'h0000_0001);
    check(32'h807F_FFFF); check(32'h0080_0000); check(32'h3F80_0000);
    check(32'h7F7F_FFFF); check(32'h7F80_0000); check(32'hFF80_0000);
    check(32'h7FC0_0000); check(32'h7F80_0001);
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] v;
      v = $urandom;
      case (i % 4)
        0: v[30:23] = 8'h00;
        1: v[30:23] = 8'hFF;
        default: ;
      endcase
      check(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
