// fp_ref_pkg: reference models for the floating-point multiplier testbenches,
// computed in double precision and independent of the RTL. The product of
// two single precision mantissas (24 x 24 bits) is exact in a double, so the
// exact result is that double cut back to single precision by truncating the
// fraction (zero below the smallest normal, infinity above the largest). The
// approximate result is the same conversion of
// (ma*mb - maL*mbL) * 2^(ea+eb-300), i.e. the product without the vertical
// product of the low 12-bit mantissa halves. A zero or subnormal operand
// gives a signed zero.
package fp_ref_pkg;

  // IEEE 754 single precision word of a double, fraction truncated
  function automatic logic [31:0] to_single_trunc(input real v);
    logic [63:0] d;
    int          e;
    d = $realtobits(v);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // reference results of the exact and the approximate unit
  task automatic reference(input logic [31:0] x, input logic [31:0] z,
                           output logic [31:0] r_ext, output logic [31:0] r_apx);
    longint unsigned ma, mb, full, low;
    real             scale, sgn;
    if (x[30:23] == 8'd0 || z[30:23] == 8'd0) begin
      r_ext = {x[31] ^ z[31], 31'd0};
      r_apx = r_ext;
      return;
    end
    ma    = 64'({1'b1, x[22:0]});
    mb    = 64'({1'b1, z[22:0]});
    full  = ma * mb;
    low   = (ma % 4096) * (mb % 4096);
    sgn   = (x[31] ^ z[31]) ? -1.0 : 1.0;
    // 2^(ea+eb-300) built directly as a double
    scale = $bitstoreal({1'b0, 11'(int'(x[30:23]) + int'(z[30:23]) - 300 + 1023), 52'd0});
    r_ext = to_single_trunc(sgn * real'(full) * scale);
    r_apx = to_single_trunc(sgn * real'(full - low) * scale);
  endtask

endpackage
