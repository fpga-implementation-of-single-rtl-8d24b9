// fpa_pkg: types and constants shared by the single precision floating point
// adder. An IEEE 754 binary32 word is split into sign, 8-bit biased exponent
// and 23-bit fraction; inside the datapath the significand is 24 bits wide
// (hidden bit included) and is extended by guard, round and sticky bits to
// 27 bits. Exponents are carried with two spare bits (10 bits) so that a
// carry past 254 is visible as overflow.
package fpa_pkg;

  localparam int unsigned EXP_W  = 8;           // exponent field
  localparam int unsigned FRAC_W = 23;          // fraction field
  localparam int unsigned MANT_W = FRAC_W + 1;  // significand with hidden bit
  localparam int unsigned EXT_W  = MANT_W + 3;  // significand + guard, round, sticky
  localparam int unsigned SHAMT_W = 5;          // alignment / normalization shift
  localparam int unsigned XEXP_W = EXP_W + 2;   // internal exponent with headroom

  localparam logic [EXP_W-1:0] EXP_MAX = '1;    // 255: infinity / NaN
  localparam logic [31:0] QNAN = 32'h7FC0_0000; // canonical quiet NaN

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Classification of one operand.
  typedef struct packed {
    logic exp_zero;   // exponent field all zeros
    logic exp_ones;   // exponent field all ones
    logic frac_zero;  // fraction field all zeros
    logic is_zero;
    logic is_denorm;
    logic is_norm;
    logic is_inf;
    logic is_nan;
  } fp_class_t;

  // Exception flags delivered with each result.
  typedef struct packed {
    logic invalid;   // NaN operand or infinity minus infinity
    logic overflow;  // finite operands, result rounded to infinity
    logic inexact;   // result differs from the exact sum
  } fp_flags_t;

endpackage
