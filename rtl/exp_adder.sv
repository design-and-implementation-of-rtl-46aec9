// exp_adder: exponent stage of the floating-point multiplier.
//
// The product of two numbers carries the sum of their exponents. Both inputs
// are biased (stored value = true exponent + BIAS), so their sum holds the
// bias twice and one BIAS is taken off:
//     e_sum = ea + eb - BIAS
// The result is a two's-complement number two bits wider than an exponent
// field, wide enough for every case (-BIAS .. 2*(2^EXP_W-1)-BIAS), so that
// the normaliser can see overflow and underflow. Adding the exponents follows
// the design; the bias handling is that of IEEE 754. Combinational.
module exp_adder #(
  parameter int unsigned EXP_W = 8,    // exponent field width
  parameter int unsigned BIAS  = 127   // exponent bias
) (
  input  logic [EXP_W-1:0] ea,
  input  logic [EXP_W-1:0] eb,
  output logic [EXP_W+1:0] e_sum       // ea + eb - BIAS, two's complement
);

  always_comb begin
    e_sum = {2'b00, ea} + {2'b00, eb} - (EXP_W + 2)'(BIAS);
  end

endmodule
