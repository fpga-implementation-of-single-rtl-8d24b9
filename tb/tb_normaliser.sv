// tb_normaliser: checks far-path normalization on adder results of the
// shapes the datapath produces: additions with and without carry out (and
// small denormal sums), subtractions whose result lies in [1, 2) or [0.5, 1).
// Expected values follow from the value the result represents: a carry out
// halves the significand (lost bit kept as sticky) and raises the exponent,
// a subtraction result below 1 is doubled and lowers it. lod_sel must be
// s_eff & ~far_sel.
module tb_normaliser;
  logic [7:0]  exp_grt;
  logic [27:0] s;
  logic        far_sel, s_eff, lod_sel;
  logic [9:0]  exp_sum;
  logic [26:0] man_sum;
  int checks = 0, failures = 0;
  int n_right = 0, n_left = 0, n_keep = 0;

  normaliser dut (.*);

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6000; i++) begin
      logic [26:0] want_m;
      int          want_e;
      exp_grt = 8'($urandom_range(3, 254));
      s_eff   = 1'(i % 2);
      far_sel = 1'($urandom);
      if (!s_eff) begin
        s = 28'($urandom);
        if (i % 10 == 0) s[27:26] = 2'b00;     // tiny sum of denormals
      end else begin
        s = 28'($urandom) & 28'h7FF_FFFF;       // no carry out in a subtraction
        if (!s[26]) s[25] = 1'b1;               // far path: result >= 0.5
      end
      #1;
      if (s[27]) begin
        want_m = {s[27:2], s[1] | s[0]}; want_e = exp_grt + 1; n_right++;
      end else if (s[26] || !s_eff) begin
        want_m = s[26:0]; want_e = exp_grt; n_keep++;
      end else begin
        want_m = 27'(s * 2); want_e = exp_grt - 1; n_left++;
      end
      checks++;
      if (man_sum !== want_m || exp_sum !== 10'(want_e) || lod_sel !== (s_eff & ~far_sel)) begin
        failures++;
        if (failures < 10) $display("FAIL e=%0d s=%h seff=%0d -> %0d %h", exp_grt, s, s_eff, exp_sum, man_sum);
      end
    end
    checks++;
    if (n_right == 0 || n_left == 0 || n_keep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
