// tb_comp_add: random test of the two's complement adder. The testbench
// supplies y already inverted for a subtraction, as the inverter does, and
// expects |x + y_orig| for an addition or |x - y_orig| with neg = (x < y_orig)
// for a subtraction, worked out with integer arithmetic. Equal operands and
// operands differing only in the LSB are included.
module tb_comp_add;
  logic [26:0] x, y, y_orig;
  logic        seff, neg;
  logic [27:0] s;
  int checks = 0, failures = 0;

  comp_add dut (.x(x), .y(y), .seff(seff), .s(s), .neg(neg));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      longint ex, ey, want;
      logic   want_neg;
      x = 27'($urandom); y_orig = 27'($urandom);
      if (i % 3 == 1) y_orig = x;
      if (i % 3 == 2) y_orig = x ^ 27'(1);
      seff = 1'(i / 3);
      y = seff ? ~y_orig : y_orig;
      #1;
      ex = longint'(x); ey = longint'(y_orig);
      if (seff) begin
        want_neg = (ex < ey);
        want = want_neg ? ey - ex : ex - ey;
      end else begin
        want_neg = 1'b0;
        want = ex + ey;
      end
      checks++;
      if (s !== 28'(want) || neg !== want_neg) begin
        failures++;
        if (failures < 10) $display("FAIL x=%h y=%h seff=%0d -> s=%h neg=%0d", x, y_orig, seff, s, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
