// vedic_mul: exact unsigned W x W multiplier organised by the
// Urdhva-Tiryagbhyam (vertically and crosswise) sutra.
//
// The operands are read as D = ceil(W/2) base-4 digits (2-bit groups). Every
// digit pair a[i], b[j] is multiplied at once by a 2 x 2 UT cell (vedic2x2),
// so all D*D partial products exist in parallel. The sutra then walks the
// result columns from the least significant one: column k collects the
// vertical and crosswise digit products with i + j = k (one product in the
// first and last column, D in the middle one), adds the carry from column
// k-1, keeps the low digit as result digit k and passes the rest on as the
// carry. The column sums are written as '+' and left to synthesis.
// Using the sutra for the mantissa product follows the design; working it
// on 2-bit digits with 2 x 2 cells is this design's own organisation.
// Purely combinational: p follows a and b after the gate delay.
module vedic_mul #(
  parameter int unsigned W = 24   // operand width (24: binary32 mantissa)
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int unsigned D  = (W + 1) / 2;   // number of 2-bit digits
  localparam int unsigned CW = 16;            // column sum width (D*9 + carry)

  logic [2*D-1:0] a_d, b_d;                   // operands padded to whole digits
  logic [3:0]     pp [D][D];                  // digit products a[i]*b[j]
  logic [4*D-1:0] p_full;                     // product of the padded operands

  assign a_d = (2*D)'(a);
  assign b_d = (2*D)'(b);

  for (genvar i = 0; i < D; i++) begin : g_row
    for (genvar j = 0; j < D; j++) begin : g_col
      vedic2x2 u_cell (.a(a_d[2*i +: 2]), .b(b_d[2*j +: 2]), .p(pp[i][j]));
    end
  end

  always_comb begin
    logic [CW-1:0] col;      // sum of one column plus incoming carry
    logic [CW-1:0] carry;    // carry into the next column
    carry  = '0;
    p_full = '0;
    for (int k = 0; k < 2*D - 1; k++) begin
      col = carry;
      for (int i = 0; i < D; i++) begin
        if (k - i >= 0 && k - i < D) col = col + CW'(pp[i][k-i]);
      end
      p_full[2*k +: 2] = col[1:0];
      carry            = col >> 2;
    end
    p_full[4*D-2 +: 2] = carry[1:0];
  end

  assign p = p_full[2*W-1:0];

endmodule
