// tb_approx_mant_mul: self-checking testbench of the approximate mantissa
// multiplier. Two instances see the same operands: the approximate one
// (default parameters) must return a*b - aL*bL, where aL and bL are the low
// 12 bits, and the exact one (APPROX = 0) must return a*b. Both references
// are computed with the simulator's '*'. Operands are normalised mantissas
// (top bit set) as in the floating-point unit, plus a few arbitrary values.
// The run also checks that the error stays below 2^24 and that some
// operands do give an error, and has a clocked watchdog.
module tb_approx_mant_mul;

  localparam int unsigned NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, nonzero_err = 0;

  logic [23:0] a, b;
  logic [47:0] p_apx, p_ext;

  approx_mant_mul                    dut_apx (.a(a), .b(b), .p(p_apx));
  approx_mant_mul #(.APPROX(1'b0))   dut_ext (.a(a), .b(b), .p(p_ext));

  task automatic check(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] exact, dropped;
    a = x; b = y;
    @(posedge clk);
    exact   = 48'(x) * 48'(y);
    dropped = 48'(x[11:0]) * 48'(y[11:0]);
    checks += 3;
    if (p_ext !== exact) begin
      failures++;
      if (failures < 10) $display("FAIL exact %h*%h got %h exp %h", x, y, p_ext, exact);
    end
    if (p_apx !== exact - dropped) begin
      failures++;
      if (failures < 10) $display("FAIL approx %h*%h got %h exp %h", x, y, p_apx, exact - dropped);
    end
    if (p_apx > exact || exact - p_apx >= 48'd1 << 24) begin
      failures++;
      if (failures < 10) $display("FAIL error bound %h*%h", x, y);
    end
    if (p_apx != exact) nonzero_err++;
  endtask

  initial begin
    check(24'h800000, 24'h800000);
    check(24'hFFFFFF, 24'hFFFFFF);
    check(24'h800FFF, 24'h800FFF);
    check(24'h000000, 24'h123456);
    check(24'h000FFF, 24'h000FFF);
    for (int n = 0; n < NRAND; n++)
      check(24'($urandom) | 24'h800000, 24'($urandom) | 24'h800000);
    for (int n = 0; n < 1000; n++)
      check(24'($urandom), 24'($urandom));
    checks++;
    if (nonzero_err == 0) begin
      failures++;
      $display("FAIL approximation never changed a product");
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
