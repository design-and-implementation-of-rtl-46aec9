// tb_vedic_mul: self-checking testbench of the Vedic (Urdhva-Tiryagbhyam)
// multiplier. A 24-bit instance (the mantissa size) and a 7-bit instance (an
// odd width, which exercises the digit padding; checked exhaustively) are
// compared with the '*' operator of the simulator: all-zero, all-one and
// single-bit corner operands, then random operands. The multiplier is
// combinational; a free-running clock paces the stimulus and a watchdog
// ends the run if it hangs.
module tb_vedic_mul;

  localparam int unsigned NRAND = 20000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [23:0] a24, b24;
  logic [47:0] p24;
  logic [6:0]  a7, b7;
  logic [13:0] p7;

  vedic_mul #(.W(24)) dut24 (.a(a24), .b(b24), .p(p24));
  vedic_mul #(.W(7))  dut7  (.a(a7),  .b(b7),  .p(p7));

  task automatic check24(input logic [23:0] x, input logic [23:0] y);
    logic [47:0] expect_p;
    a24 = x; b24 = y;
    @(posedge clk);
    expect_p = 48'(x) * 48'(y);
    checks++;
    if (p24 !== expect_p) begin
      failures++;
      if (failures < 10)
        $display("FAIL W=24 %h * %h: got %h expected %h", x, y, p24, expect_p);
    end
  endtask

  initial begin
    a7 = '0; b7 = '0;
    check24('0, '0);
    check24('1, '1);
    check24('1, 24'd1);
    check24(24'h800000, 24'h800000);
    check24(24'hFFFFFF, 24'h800000);
    for (int s = 0; s < 24; s++) check24(24'd1 << s, '1);
    for (int n = 0; n < NRAND; n++) check24(24'($urandom), 24'($urandom));
    // odd width: every operand pair
    for (int x = 0; x < 128; x++) begin
      for (int y = 0; y < 128; y++) begin
        a7 = 7'(x); b7 = 7'(y);
        @(posedge clk);
        checks++;
        if (p7 !== 14'(x * y)) begin
          failures++;
          if (failures < 10) $display("FAIL W=7 %0d * %0d: got %0d", x, y, p7);
        end
      end
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
