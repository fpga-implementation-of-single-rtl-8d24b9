// tb_fpa_synt: end-to-end test of the floating point adder at its default
// configuration. Drives one operation per clock (a, b, sop) and checks, one
// cycle later, the registered sum and flags against the exact reference model
// in fpa_ref_pkg. Stimulus: the worked example (15.84375 - 15.75 = 0.09375),
// hand-picked corner cases, and random operands drawn from classes that force
// each mechanism of the datapath: swap, far path with one-bit right shift and
// one-bit left shift, near path with leading-one detection and large
// cancellation, rounding up with carry out, denormal results, overflow,
// infinities and NaNs, exact zero. Each mechanism is counted from the
// design's internal signals and must occur at least once. The latency of one
// cycle is checked by comparing each result with the operands of the
// previous cycle.
module tb_fpa_synt;
  import fpa_pkg::*;
  import fpa_ref_pkg::*;

  localparam int N_RANDOM = 1000000;

  logic      clk = 1'b0;
  logic      rst;
  fp32_t     a, b;
  logic      sop;
  fp32_t     sum;
  fp_flags_t flags;

  fpa_synt dut (.clk(clk), .rst(rst), .a(a), .b(b), .sop(sop), .sum(sum), .flags(flags));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // mechanism counters
  int n_swap, n_far_right, n_far_left, n_near, n_cancel, n_round_carry,
      n_denorm_res, n_overflow, n_nan, n_inf, n_zero, n_neg, n_big, n_inexact;

  // pending operation from the previous cycle
  logic        pend_valid;
  logic [31:0] pend_a, pend_b;
  logic        pend_sop;

  task automatic check_result();
    ref_t e;
    if (!pend_valid) return;
    e = ref_add(pend_a, pend_b, pend_sop);
    checks++;
    if (sum !== e.res || flags.invalid !== e.invalid || flags.overflow !== e.overflow ||
        flags.inexact !== e.inexact) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h sop=%0d got %h i%0d o%0d x%0d exp %h i%0d o%0d x%0d",
                 pend_a, pend_b, pend_sop, sum, flags.invalid, flags.overflow, flags.inexact,
                 e.res, e.invalid, e.overflow, e.inexact);
    end
  endtask

  // Count the mechanisms an operation exercises, worked out from the
  // operands and the reference result (not from the design's internals).
  task automatic count_mechanisms(logic [31:0] xa, logic [31:0] xb, logic xs);
    ref_t e;
    int   ea, eb, emax, diff, er;
    logic sub, spec;
    e    = ref_add(xa, xb, xs);
    ea   = (xa[30:23] == 0) ? 1 : int'(xa[30:23]);
    eb   = (xb[30:23] == 0) ? 1 : int'(xb[30:23]);
    emax = (ea > eb) ? ea : eb;
    diff = (ea > eb) ? ea - eb : eb - ea;
    er   = int'(e.res[30:23]);
    sub  = xa[31] ^ xb[31] ^ xs;
    spec = (xa[30:23] == 8'hFF) || (xb[30:23] == 8'hFF);
    if (spec) begin
      if (e.res[30:23] == 8'hFF && e.res[22:0] != 0) n_nan++; else n_inf++;
      return;
    end
    if (ea < eb) n_swap++;
    if (diff > 31) n_big++;
    if (!sub && er > emax && !e.overflow) n_far_right++;
    if (sub && diff >= 2 && er == emax - 1) n_far_left++;
    if (sub && diff <= 1) n_near++;
    if (sub && diff <= 1 && er < emax - 8) n_cancel++;
    if (e.inexact && !e.overflow && e.res[22:0] == 0) n_round_carry++;
    if (sub && diff == 0 && xb[22:0] > xa[22:0]) n_neg++;
    if (er == 0 && e.res[22:0] != 0) n_denorm_res++;
    if (e.res[30:0] == 0) n_zero++;
    if (e.overflow) n_overflow++;
    if (e.inexact) n_inexact++;
  endtask

  // Present one operation. Just before the clock edge the output must still
  // hold the previous result; just after it, the result of this operation.
  task automatic apply(logic [31:0] xa, logic [31:0] xb, logic xs);
    a = xa; b = xb; sop = xs;
    #1 count_mechanisms(xa, xb, xs);
    check_result();
    @(posedge clk);
    #1;
    pend_valid = 1'b1; pend_a = xa; pend_b = xb; pend_sop = xs;
    check_result();
  endtask

  function automatic logic [31:0] rand_operand(int cls, logic [7:0] near_exp);
    logic [31:0] x;
    x = $urandom;
    case (cls)
      0: ;                                                    // any bit pattern
      1: x[30:23] = near_exp + 8'($urandom_range(0, 2)) - 8'd1; // close exponent
      2: x[30:23] = 8'($urandom_range(0, 3));                 // tiny / denormal
      3: x[30:23] = 8'($urandom_range(250, 254));             // huge
      4: x[22:0]  = ($urandom_range(0, 1) != 0) ? 23'h7FFFFF : 23'h0; // rounding edges
      default: x[30:23] = near_exp + 8'($urandom_range(0, 40)) - 8'd20;
    endcase
    return x;
  endfunction

  initial begin : watchdog
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] xa, xb;
    int ca, cb;
    pend_valid = 1'b0;
    a = '0; b = '0; sop = 1'b0;
    rst = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (sum !== 32'd0 || flags !== '0) begin failures++; $display("FAIL reset"); end
    rst = 1'b0;

    // worked example: 0 10000010 11111011... minus 0 10000010 11111...
    apply({1'b0, 8'b1000_0010, 23'b1111_1011_0000_0000_0000_000},
          {1'b0, 8'b1000_0010, 23'b1111_1000_0000_0000_0000_000}, 1'b1);
    checks++;
    if (sum !== 32'h3DC0_0000) begin failures++; $display("FAIL example %h", sum); end

    // corner cases
    apply(32'h3F80_0000, 32'h3F80_0000, 1'b0);   // 1 + 1
    apply(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1 = +0
    apply(32'h8000_0000, 32'h0000_0000, 1'b0);   // -0 + +0
    apply(32'h8000_0000, 32'h0000_0000, 1'b1);   // -0 - +0 = -0
    apply(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    apply(32'h7F80_0000, 32'h7F80_0000, 1'b1);   // inf - inf
    apply(32'h7F80_0000, 32'h3F80_0000, 1'b0);   // inf + 1
    apply(32'h3F80_0000, 32'hFF80_0000, 1'b1);   // 1 - (-inf)
    apply(32'h7F80_0001, 32'h3F80_0000, 1'b0);   // sNaN
    apply(32'h0080_0000, 32'h0000_0001, 1'b1);   // min normal - min denormal
    apply(32'h0000_0001, 32'h0000_0001, 1'b0);   // denormal + denormal
    apply(32'h007F_FFFF, 32'h0000_0001, 1'b0);   // denormal carries into normal
    apply(32'h3F80_0000, 32'h3380_0000, 1'b0);   // 1 + 2^-24: tie, stays even
    apply(32'h3F80_0001, 32'h3380_0000, 1'b0);   // tie, rounds up
    apply(32'h3F7F_FFFF, 32'h3380_0000, 1'b0);   // carry out of rounding
    apply(32'h3F80_0000, 32'h0000_0001, 1'b1);   // big exponent difference
    apply(32'h3F80_0000, 32'h3F80_0001, 1'b1);   // negative difference, equal exponents

    for (int i = 0; i < N_RANDOM; i++) begin
      ca = $urandom_range(0, 5);
      cb = $urandom_range(0, 5);
      xa = rand_operand(ca, 8'd127);
      xb = rand_operand(cb, xa[30:23]);
      // avoid spending many cases on NaN / infinity patterns
      if ($urandom_range(0, 15) != 0) begin
        if (xa[30:23] == 8'hFF) xa[30:23] = 8'hFE;
        if (xb[30:23] == 8'hFF) xb[30:23] = 8'hFE;
      end
      apply(xa, xb, 1'($urandom));
    end
    apply('0, '0, 1'b0);

    $display("mechanisms: swap=%0d big_shift=%0d far_right=%0d far_left=%0d near=%0d cancel>8=%0d round_carry=%0d",
             n_swap, n_big, n_far_right, n_far_left, n_near, n_cancel, n_round_carry);
    $display("            negative_diff=%0d denormal_result=%0d zero=%0d overflow=%0d inf=%0d nan=%0d inexact=%0d",
             n_neg, n_denorm_res, n_zero, n_overflow, n_inf, n_nan, n_inexact);
    begin
      int cnt[14];
      cnt = '{n_swap, n_big, n_far_right, n_far_left, n_near, n_cancel, n_round_carry,
              n_neg, n_denorm_res, n_zero, n_overflow, n_inf, n_nan, n_inexact};
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
