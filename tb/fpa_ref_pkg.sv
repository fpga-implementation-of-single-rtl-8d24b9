// fpa_ref_pkg: bit-exact reference model for the testbenches. It adds two
// binary32 values by a different route from the design: each finite operand
// becomes a signed integer in units of 2^-149 (the smallest denormal), the
// two integers are added exactly in 300-bit arithmetic, and the exact sum is
// rounded once to nearest even. Special operands follow IEEE 754, with
// 0x7FC00000 as the NaN result.
package fpa_ref_pkg;

  typedef logic signed [299:0] wide_t;

  typedef struct packed {
    logic [31:0] res;
    logic        invalid;
    logic        overflow;
    logic        inexact;
  } ref_t;

  function automatic wide_t to_wide(logic [31:0] x);
    logic [23:0] m;
    int          e;
    wide_t       v;
    m = {(x[30:23] != 0), x[22:0]};
    e = (x[30:23] == 0) ? 1 : int'(x[30:23]);
    v = wide_t'(m) <<< (e - 1);
    return x[31] ? -v : v;
  endfunction

  function automatic ref_t ref_add(logic [31:0] a, logic [31:0] b, logic sop);
    ref_t  o;
    logic  sb, a_nan, b_nan, a_inf, b_inf;
    wide_t s, mag, keep, rem, half;
    int    p, sh;
    o  = '0;
    sb = b[31] ^ sop;
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    a_inf = (a[30:23] == 8'hFF) && (a[22:0] == 0);
    b_inf = (b[30:23] == 8'hFF) && (b[22:0] == 0);
    if (a_nan || b_nan || (a_inf && b_inf && (a[31] != sb))) begin
      o.res = 32'h7FC0_0000;
      o.invalid = (a_nan && !a[22]) || (b_nan && !b[22]) || (a_inf && b_inf);
      return o;
    end
    if (a_inf) begin o.res = {a[31], 8'hFF, 23'd0}; return o; end
    if (b_inf) begin o.res = {sb, 8'hFF, 23'd0}; return o; end
    s = to_wide(a) + to_wide({sb, b[30:0]});
    if (s == 0) begin
      o.res = {a[31] & sb, 31'd0};
      return o;
    end
    o.res[31] = (s < 0);
    mag = (s < 0) ? -s : s;
    p = 0;
    for (int i = 0; i < 300; i++) if (mag[i]) p = i;
    if (p <= 23) begin
      o.res[30:0] = mag[30:0];          // denormal or smallest normal, exact
      return o;
    end
    sh   = p - 23;
    keep = mag >>> sh;
    rem  = mag - (keep <<< sh);
    half = wide_t'(1) <<< (sh - 1);
    o.inexact = (rem != 0);
    if (rem > half || (rem == half && keep[0])) keep = keep + 1;
    if (keep[24]) begin keep = keep >>> 1; sh = sh + 1; end
    if (sh + 1 >= 255) begin
      o.res[30:0] = {8'hFF, 23'd0};
      o.overflow  = 1'b1;
      o.inexact   = 1'b1;
    end else begin
      o.res[30:0] = {8'(sh + 1), keep[22:0]};
    end
    return o;
  endfunction

endpackage
