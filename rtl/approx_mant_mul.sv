// approx_mant_mul: approximate mantissa multiplier of the floating-point unit.
//
// One Urdhva-Tiryagbhyam level is applied to the W-bit mantissas (hidden one
// included): a = aH:aL, b = bH:bL with H = W/2 bits each. The vertical
// high product aH*bH and the two crosswise products aH*bL, aL*bH are formed by
// exact Vedic multipliers (vedic_mul). With APPROX = 1 the vertical low
// product aL*bL is left out altogether, which removes one of the four
// half-size multipliers and the adder bits below 2^H:
//     p = (aH*bH << 2H) + ((aH*bL + aL*bH) << H)          (APPROX = 1)
//     p = the above + aL*bL                              (APPROX = 0, exact)
// The product is then short by aL*bL < 2^(2H) = 2^W, which is below the
// weight of the last fraction bit the normaliser keeps (2^(W-1) or 2^W), so
// the result is off by at most one or two units in the last place, and the
// relative error shrinks as the mantissas grow. Using a Vedic multiplier for
// the mantissa and approximating only the mantissa follows the design; which
// partial product to drop is this design's own choice. APPROX = 0 exists only
// to compare against the exact unit. Purely combinational.
module approx_mant_mul #(
  parameter int unsigned W      = 24,  // mantissa width, hidden one included
  parameter bit          APPROX = 1'b1 // 1: drop aL*bL; 0: exact product
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned H = W / 2;   // low half width
  localparam int unsigned U = W - H;   // high half width (H or H+1)

  logic [2*U-1:0] p_hh;                // aH*bH
  logic [U+H-1:0] p_hl, p_lh;          // crosswise products
  logic [U+H:0]   x_sum;               // crosswise sum with carry
  logic [2*W-1:0] p_upper;             // the three kept products

  vedic_mul #(.W(U)) u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));

  // crosswise products: the low half is zero-extended to U bits so that the
  // same square Vedic multiplier serves both
  logic [2*U-1:0] p_hl_w, p_lh_w;
  vedic_mul #(.W(U)) u_hl (.a(a[W-1:H]), .b(U'(b[H-1:0])), .p(p_hl_w));
  vedic_mul #(.W(U)) u_lh (.a(U'(a[H-1:0])), .b(b[W-1:H]), .p(p_lh_w));
  assign p_hl = p_hl_w[U+H-1:0];
  assign p_lh = p_lh_w[U+H-1:0];

  always_comb begin
    x_sum   = {1'b0, p_hl} + {1'b0, p_lh};
    p_upper = {p_hh, {(2*H){1'b0}}} + ((2*W)'(x_sum) << H);
  end

  if (APPROX) begin : g_approx
    assign p = p_upper;
  end else begin : g_exact
    logic [2*H-1:0] p_ll;              // aL*bL, only in the exact unit
    vedic_mul #(.W(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));
    assign p = p_upper + (2*W)'(p_ll);
  end

endmodule
