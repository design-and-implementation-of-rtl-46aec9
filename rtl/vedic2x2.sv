// vedic2x2: the 2 x 2 bit cell of the Urdhva-Tiryagbhyam (vertically and
// crosswise) multiplier, the leaf of the recursive Vedic multiplier.
//
// The four bit products are formed at once: the vertical a0&b0 gives p[0];
// the two crosswise products a1&b0 and a0&b1 are added by a half adder to
// give p[1] and a carry; the vertical a1&b1 and that carry are added by a
// second half adder to give p[2] and p[3]. Two half adders and four AND
// gates, no full adder. Purely combinational. The cell is the standard leaf
// of a Vedic multiplier; its use here is this design's own choice.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic cross_c;   // carry of the crosswise half adder

  always_comb begin
    p[0]    = a[0] & b[0];
    p[1]    = (a[1] & b[0]) ^ (a[0] & b[1]);
    cross_c = (a[1] & b[0]) & (a[0] & b[1]);
    p[2]    = (a[1] & b[1]) ^ cross_c;
    p[3]    = (a[1] & b[1]) & cross_c;
  end

endmodule
