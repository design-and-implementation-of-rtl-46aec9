// fp_normalizer: normalisation and packing stage of the floating-point
// multiplier.
//
// The product of two mantissas of the form 1.f lies in [1, 4), so the
// 2*(FRAC_W+1)-bit integer product has its leading one in the top bit or the
// one below it. If the top bit is set the product is shifted right one place
// (the 'shifted' output) and the exponent is incremented; the FRAC_W bits
// below the leading one become the stored fraction. Bits below those are
// dropped, i.e. the result is truncated toward zero; the design does not say
// how to round, and truncation needs no rounding adder.
//
// Exponent range: a final exponent of 0 or less flushes the result to a zero
// of the right sign (underflow, no subnormals); 2^EXP_W-1 or more gives an
// infinity of the right sign (overflow). When zero_in is set (an operand is
// zero or subnormal) the result is a signed zero. Infinity and NaN operands
// get no separate path; their all-ones exponent drives the result to
// overflow. Normalising follows the design; the special-value rules are this
// design's own. Combinational.
module fp_normalizer #(
  parameter int unsigned EXP_W  = 8,   // exponent field width
  parameter int unsigned FRAC_W = 23   // stored fraction width
) (
  input  logic                      sign,       // sign of the result
  input  logic [EXP_W+1:0]          e_sum,      // ea + eb - bias, signed
  input  logic [2*(FRAC_W+1)-1:0]   prod,       // mantissa product
  input  logic                      zero_in,    // an operand is zero
  output logic [EXP_W+FRAC_W:0]     result,     // packed sign:exp:frac
  output logic                      shifted,    // product was in [2, 4)
  output logic                      overflow,   // result set to infinity
  output logic                      underflow   // result flushed to zero
);

  localparam int unsigned PW = 2 * (FRAC_W + 1);

  logic signed [EXP_W+1:0] e_norm;     // exponent after normalisation
  logic [FRAC_W-1:0]       frac;

  always_comb begin
    shifted = prod[PW-1];
    if (shifted) frac = prod[PW-2 -: FRAC_W];
    else         frac = prod[PW-3 -: FRAC_W];
    e_norm = $signed(e_sum) + $signed({{(EXP_W+1){1'b0}}, shifted});

    overflow  = 1'b0;
    underflow = 1'b0;
    if (zero_in) begin
      result = {sign, {(EXP_W+FRAC_W){1'b0}}};
    end else if (e_norm <= 0) begin
      underflow = 1'b1;
      result    = {sign, {(EXP_W+FRAC_W){1'b0}}};
    end else if (e_norm >= $signed((EXP_W+2)'((1 << EXP_W) - 1))) begin
      overflow = 1'b1;
      result   = {sign, {EXP_W{1'b1}}, {FRAC_W{1'b0}}};
    end else begin
      result = {sign, e_norm[EXP_W-1:0], frac};
    end
  end

endmodule
