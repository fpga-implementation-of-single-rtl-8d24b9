// fpa_synt: IEEE 754 single precision floating point adder / subtractor.
//
// sum = a + b when sop = 0, a - b when sop = 1, rounded to nearest even,
// with denormal operands and results, infinities and NaNs handled. The
// result and its exception flags are registered: a result appears on sum and
// flags one clock edge after a, b and sop are presented (latency 1, one new
// operation accepted every cycle). rst is synchronous and active high and
// clears the output register.
//
// Datapath, in algorithm order:
//   fp_special (x2)     classify operands, hidden bit, effective exponent
//   exp_diff            exponent subtraction -> shift amount, swap control
//   swap_mux            larger-exponent operand in front
//   barrel_shifter      align the smaller significand (guard/round/sticky)
//   shifter             shift amount > 1 ? far path : near path (far_sel)
//   frac_comp_eff_op    effective operation s_eff, 27-bit adder operands
//   inverter            one's complement of the aligned operand if s_eff
//   comp_add            two's complement add, negate a negative difference
//   normaliser          far path: at most one-bit normalization; lod_sel
//   lod                 near path: leading zero count
//   barrel_shifter_left near path: left normalization, exponent decrement
//   man_sum             select path, round to nearest even
//   exp_sum             select path, rounding carry, overflow
// Special operands (NaN, infinity) override the datapath result here.
//
// The block partition, names and the step order follow the document. The
// near/far path split, the sticky bit, gradual underflow, the flags and the
// canonical quiet NaN 0x7FC00000 are this design's choices.
module fpa_synt
  import fpa_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  fp32_t     a,
  input  fp32_t     b,
  input  logic      sop,
  output fp32_t     sum,
  output fp_flags_t flags
);

  // ---- step 1: operand classification ----
  fp_class_t           cls_a, cls_b;
  logic [MANT_W-1:0]   man_a, man_b;
  logic [EXP_W-1:0]    exp_a, exp_b;
  logic                sign_b_eff;

  fp_special u_spec_a (.x(a), .cls(cls_a), .mant(man_a), .exp_eff(exp_a));
  fp_special u_spec_b (.x(b), .cls(cls_b), .mant(man_b), .exp_eff(exp_b));

  assign sign_b_eff = b.sign ^ sop;

  // ---- step 2: exponent difference and swap ----
  logic [SHAMT_W-1:0]  shift_amt;
  logic                sign_d, big_num;
  logic [EXP_W-1:0]    exp_grt;
  logic [MANT_W-1:0]   man_grt, man_less;
  logic                sign_grt;

  exp_diff #(.EW(EXP_W), .SW(SHAMT_W)) u_expdiff (
    .exp_a(exp_a), .exp_b(exp_b),
    .shift_amt(shift_amt), .sign_d(sign_d), .big_num(big_num));

  swap_mux u_swap (
    .exp_a(exp_a), .exp_b(exp_b), .man_a(man_a), .man_b(man_b),
    .sign_a(a.sign), .sign_b(sign_b_eff), .sign_d(sign_d),
    .exp_grt(exp_grt), .man_grt(man_grt), .man_less(man_less), .sign_grt(sign_grt));

  // ---- step 3: alignment, path decode ----
  logic [MANT_W-1:0]   man_aligned;
  logic                g, r, st;
  logic                far_sel;

  barrel_shifter #(.W(MANT_W), .SW(SHAMT_W)) u_bar (
    .din(man_less), .shift_amt(shift_amt), .dout(man_aligned), .g(g), .r(r), .s(st));

  shifter #(.SW(SHAMT_W)) u_shift_dec (.shift_amt(shift_amt), .far_sel(far_sel));

  // ---- steps 4-7: effective operation, invert, add ----
  logic [EXT_W-1:0]    frac_a1, frac_b1, frac_b_inv;
  logic                s_eff;
  logic [EXT_W:0]      s_mag;
  logic                neg;

  frac_comp_eff_op u_frc_eff (
    .frac_a(man_grt), .frac_b(man_aligned), .grs_b({g, r, st}),
    .sop(sop), .s_a(a.sign), .s_b(b.sign),
    .frac_a1(frac_a1), .frac_b1(frac_b1), .s_eff(s_eff));

  inverter #(.W(EXT_W)) u_inv (.din(frac_b1), .s_eff(s_eff), .dout(frac_b_inv));

  comp_add #(.W(EXT_W)) u_add (.x(frac_a1), .y(frac_b_inv), .seff(s_eff), .s(s_mag), .neg(neg));

  // ---- steps 8-9: normalization, far and near paths ----
  logic [XEXP_W-1:0]   exp_far, exp_near;
  logic [EXT_W-1:0]    man_far, man_near;
  logic                lod_sel;
  logic [SHAMT_W-1:0]  d_lod;

  normaliser u_norm (
    .exp_grt(exp_grt), .s(s_mag), .far_sel(far_sel), .s_eff(s_eff),
    .exp_sum(exp_far), .man_sum(man_far), .lod_sel(lod_sel));

  lod #(.W(EXT_W), .DW(SHAMT_W)) u_lod (.fss(s_mag[EXT_W-1:0]), .lod_sel(lod_sel), .d(d_lod));

  barrel_shifter_left u_shift_left (
    .exp_grt(exp_grt), .din(s_mag[EXT_W-1:0]), .shift_amt(d_lod),
    .exp_sum(exp_near), .man_sft(man_near));

  // ---- steps 10-12: rounding, exponent adjust ----
  logic [FRAC_W-1:0]   frac_rnd;
  logic                hidden, rnd_carry, inexact;
  logic [EXP_W-1:0]    exp_res;
  logic                ovf;

  man_sum u_mansum (
    .man_far(man_far), .man_near(man_near), .lod_sel(lod_sel),
    .frac(frac_rnd), .hidden(hidden), .rnd_carry(rnd_carry), .inexact(inexact));

  exp_sum u_expsum (
    .exp_far(exp_far), .exp_near(exp_near), .lod_sel(lod_sel),
    .rnd_carry(rnd_carry), .hidden(hidden), .exp_out(exp_res), .overflow(ovf));

  // ---- sign, special operands, packing ----
  fp32_t     res_d;
  fp_flags_t flags_d;
  logic      res_zero;
  logic      snan_a, snan_b;

  always_comb begin
    res_zero = ~hidden & (frac_rnd == '0);
    snan_a   = cls_a.is_nan & ~a.frac[FRAC_W-1];
    snan_b   = cls_b.is_nan & ~b.frac[FRAC_W-1];
    flags_d  = '0;
    if (cls_a.is_nan || cls_b.is_nan || (cls_a.is_inf && cls_b.is_inf && s_eff)) begin
      res_d = QNAN;
      flags_d.invalid = snan_a | snan_b | (cls_a.is_inf & cls_b.is_inf & s_eff);
    end else if (cls_a.is_inf) begin
      res_d = '{sign: a.sign, exp: EXP_MAX, frac: '0};
    end else if (cls_b.is_inf) begin
      res_d = '{sign: sign_b_eff, exp: EXP_MAX, frac: '0};
    end else begin
      // An exact zero from opposite signs is +0 under round to nearest.
      res_d.sign = (res_zero && s_eff) ? 1'b0 : (sign_grt ^ neg);
      res_d.exp  = exp_res;
      res_d.frac = ovf ? '0 : frac_rnd;
      flags_d.overflow = ovf;
      flags_d.inexact  = inexact | ovf;
    end
  end

  // ---- output register ----
  always_ff @(posedge clk) begin
    if (rst) begin
      sum   <= '0;
      flags <= '0;
    end else begin
      sum   <= res_d;
      flags <= flags_d;
    end
  end

  // ---- datapath invariants ----
  // A far-path subtraction (exponent difference of two or more) never loses
  // more than one leading bit, so the normaliser's one-bit left shift is
  // enough.
  a_far_sub_one_bit: assert property (@(posedge clk) disable iff (rst)
    (s_eff && far_sel) |-> (s_mag[EXT_W-1:EXT_W-2] != 2'b00));
  // A negative difference needs equal exponents, so nothing was shifted out
  // and the negation in comp_add is exact.
  a_neg_equal_exp: assert property (@(posedge clk) disable iff (rst)
    neg |-> (shift_amt == '0));

endmodule
