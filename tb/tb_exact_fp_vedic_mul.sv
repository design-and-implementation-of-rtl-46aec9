// tb_exact_fp_vedic_mul: self-checking testbench of the multiplier with the
// approximation switched off (APPROX = 0), the exact unit the approximate one
// is measured against. Every result must equal the exact product, truncated
// to single precision, from fp_ref_pkg. Hand-worked products first, then
// random operands over the whole exponent range and over a middle range.
// Combinational: results are checked in the cycle the operands are applied.
module tb_exact_fp_vedic_mul;
  import fp_ref_pkg::*;

  localparam int unsigned NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [31:0] a, b, y;

  approx_fp_vedic_mul #(.APPROX(1'b0)) dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] x, input logic [31:0] z);
    logic [31:0] r_ext, r_apx;
    a = x; b = z;
    #1;
    reference(x, z, r_ext, r_apx);
    checks++;
    if (y !== r_ext) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h: got %h expected %h", x, z, y, r_ext);
    end
    @(posedge clk);
  endtask

  initial begin
    a = '0; b = '0;
    check(32'h3FC0_0000, 32'h4000_0000);
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);
    check(32'hBF80_0001, 32'h3F80_0001);
    for (int n = 0; n < NRAND; n++) begin
      logic [31:0] x, z;
      x = $urandom; z = $urandom;
      if (x[30:23] == 8'hFF) x[30] = 1'b0;
      if (z[30:23] == 8'hFF) z[30] = 1'b0;
      check(x, z);
    end
    for (int n = 0; n < NRAND; n++) begin
      check({1'($urandom), 8'($urandom_range(154, 100)), 23'($urandom)},
            {1'($urandom), 8'($urandom_range(154, 100)), 23'($urandom)});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
