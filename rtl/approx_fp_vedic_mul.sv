// approx_fp_vedic_mul: approximate IEEE 754 single precision multiplier with
// a Vedic (Urdhva-Tiryagbhyam) mantissa multiplier. Top of the design.
//
// The product is built in three parts, as in any floating-point multiplier:
//   sign      y.sign = a.sign ^ b.sign (one XOR gate, here)
//   exponent  exp_adder: a.exp + b.exp - 127
//   mantissa  approx_mant_mul: (1.fa) * (1.fb) on 24-bit integers, with the
//             least significant of the four Vedic sub-products left out
//             (APPROX = 1), which costs at most about two units in the last
//             place
// and fp_normalizer then shifts the product into 1.f form, adjusts the
// exponent, truncates the fraction and packs the word, returning a signed
// zero for a zero or subnormal operand or an underflow and a signed infinity
// on overflow.
//
// Interface: a and b in, y out, 32 bits each and nothing else (96 pins), so
// the unit is purely combinational, with no clock or reset; a register stage
// can be placed around it by the user. The three-part structure, the Vedic
// mantissa multiplier and the approximation of the mantissa alone follow the
// design; the dropped sub-product, truncation and the special-value rules are
// this design's own choices. APPROX = 0 gives the exact unit for comparison.
module approx_fp_vedic_mul
  import fpmul_pkg::*;
#(
  parameter bit APPROX = 1'b1          // 1: approximate mantissa product
) (
  input  fp32_t a,
  input  fp32_t b,
  output fp32_t y
);

  logic              sign;
  logic [EXP_W+1:0]  e_sum;
  logic [PROD_W-1:0] prod;
  logic              zero_in;
  logic              shifted, overflow, underflow;   // internal status

  assign sign    = a.sign ^ b.sign;
  assign zero_in = (a.exp == '0) || (b.exp == '0);

  exp_adder #(.EXP_W(EXP_W), .BIAS(BIAS)) u_exp (
    .ea(a.exp), .eb(b.exp), .e_sum(e_sum)
  );

  approx_mant_mul #(.W(MANT_W), .APPROX(APPROX)) u_mant (
    .a({1'b1, a.frac}), .b({1'b1, b.frac}), .p(prod)
  );

  fp_normalizer #(.EXP_W(EXP_W), .FRAC_W(FRAC_W)) u_norm (
    .sign(sign), .e_sum(e_sum), .prod(prod), .zero_in(zero_in),
    .result(y), .shifted(shifted), .overflow(overflow),
    .underflow(underflow)
  );

endmodule
