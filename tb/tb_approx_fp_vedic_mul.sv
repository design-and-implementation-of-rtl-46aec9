// tb_approx_fp_vedic_mul: end-to-end self-checking testbench of the
// approximate single precision Vedic multiplier at its default parameters.
//
// References come from fp_ref_pkg, computed in double precision
// independently of the RTL. The unit must match the approximate reference,
// (ma*mb - maL*mbL) * 2^(ea+eb-300) truncated to single precision, bit for
// bit; it must never exceed the exact (truncated) product in magnitude and
// must stay within two units in the last place of it.
//
// Hand-worked products come first (1.5*2 = 3, -2.5*4 = -10, 0*x, overflow to
// infinity, underflow to zero). Then random operands over the full exponent
// range and over a middle range. Every mechanism of the design is counted
// and must occur: normalisation shift, no shift, zero operand, exponent
// underflow, exponent overflow, negative result and an approximate result
// that differs from the exact one. The unit is combinational; results are
// checked in the same cycle the operands are applied (zero latency).
module tb_approx_fp_vedic_mul;
  import fp_ref_pkg::*;

  localparam int unsigned NRAND = 40000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_zero = 0, n_under = 0, n_over = 0;
  int n_neg = 0, n_approx_diff = 0;

  logic [31:0] a, b, y;

  approx_fp_vedic_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] r_ext, r_apx;
    a = x; b = z;
    #1;   // combinational: result valid within the same cycle
    reference(x, z, r_ext, r_apx);
    // mechanism counters
    if (dut.u_norm.shifted) n_shift++; else n_noshift++;
    if (x[30:23] == 8'd0 || z[30:23] == 8'd0) n_zero++;
    if (dut.u_norm.underflow) n_under++;
    if (dut.u_norm.overflow)  n_over++;
    if (y[31]) n_neg++;
    if (y != r_ext) n_approx_diff++;
    checks += 2;
    if (y !== r_apx) begin
      failures++;
      if (failures < 10) $display("FAIL approx %h * %h: got %h expected %h", x, z, y, r_apx);
    end
    if (y[31] != r_ext[31] || y[30:0] > r_ext[30:0] || r_ext[30:0] - y[30:0] > 31'd2) begin
      failures++;
      if (failures < 10) $display("FAIL error bound %h * %h: approx %h exact %h", x, z, y, r_ext);
    end
    @(posedge clk);
  endtask

  task automatic expect_word(input logic [31:0] x, input logic [31:0] z, input logic [31:0] w);
    check(x, z);
    checks++;
    if (y !== w) begin
      failures++;
      $display("FAIL %h * %h: got %h, hand-worked %h", x, z, y, w);
    end
  endtask

  initial begin
    a = '0; b = '0;
    expect_word(32'h3FC0_0000, 32'h4000_0000, 32'h4040_0000);  //  1.5 * 2   = 3
    expect_word(32'hC020_0000, 32'h4080_0000, 32'hC120_0000);  // -2.5 * 4   = -10
    expect_word(32'h3F80_0000, 32'h3F80_0000, 32'h3F80_0000);  //  1 * 1     = 1
    expect_word(32'h0000_0000, 32'h4049_0FDB, 32'h0000_0000);  //  0 * pi    = 0
    expect_word(32'h8000_0000, 32'h4049_0FDB, 32'h8000_0000);  // -0 * pi    = -0
    expect_word(32'h7F00_0000, 32'h4000_0000, 32'h7F80_0000);  //  2^127 * 2 = inf
    expect_word(32'h0080_0000, 32'h3F00_0000, 32'h0000_0000);  //  2^-126 / 2 -> 0
    expect_word(32'h7F80_0000, 32'h4000_0000, 32'h7F80_0000);  //  inf * 2   = inf
    // random operands over the whole normal exponent range
    for (int n = 0; n < NRAND; n++) begin
      logic [31:0] x, z;
      x = $urandom; z = $urandom;
      if (x[30:23] == 8'hFF) x[30] = 1'b0;
      if (z[30:23] == 8'hFF) z[30] = 1'b0;
      if ($urandom_range(63) == 0) x[30:23] = 8'd0;
      check(x, z);
    end
    // random operands with results in the normal range
    for (int n = 0; n < NRAND; n++) begin
      logic [31:0] x, z;
      x = {1'($urandom), 8'($urandom_range(154, 100)), 23'($urandom)};
      z = {1'($urandom), 8'($urandom_range(154, 100)), 23'($urandom)};
      check(x, z);
    end
    $display("mechanisms: shift=%0d noshift=%0d zero=%0d underflow=%0d overflow=%0d negative=%0d approx_differs=%0d",
             n_shift, n_noshift, n_zero, n_under, n_over, n_neg, n_approx_diff);
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_zero == 0 || n_under == 0 || n_over == 0 ||
        n_neg == 0 || n_approx_diff == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
