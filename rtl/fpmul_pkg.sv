// fpmul_pkg: shared constants and types of the approximate single precision
// Vedic multiplier. The field widths and the exponent bias are those of the
// IEEE 754 binary32 format, which the multiplier takes and returns. The
// packed struct fp32_t lays the fields out in IEEE order (sign in bit 31,
// exponent in bits 30:23, stored fraction in bits 22:0), so a 32-bit word
// can be cast to it directly.
package fpmul_pkg;

  localparam int unsigned EXP_W  = 8;            // exponent field width
  localparam int unsigned FRAC_W = 23;           // stored fraction width
  localparam int unsigned MANT_W = FRAC_W + 1;   // mantissa with hidden one
  localparam int unsigned PROD_W = 2 * MANT_W;   // full mantissa product
  localparam int unsigned BIAS   = 127;          // exponent bias

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

endpackage
