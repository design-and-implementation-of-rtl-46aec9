// tb_exp_adder: exhaustive self-checking testbench of the exponent adder.
// Every pair of 8-bit biased exponents is applied and the 10-bit result,
// read as a signed number, is compared with ea + eb - 127 computed in
// integer arithmetic. A clock paces the stimulus; a watchdog ends a hung run.
module tb_exp_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  logic [7:0] ea, eb;
  logic [9:0] e_sum;

  exp_adder dut (.ea(ea), .eb(eb), .e_sum(e_sum));

  initial begin
    for (int x = 0; x < 256; x++) begin
      for (int y = 0; y < 256; y++) begin
        ea = 8'(x); eb = 8'(y);
        @(posedge clk);
        checks++;
        if (int'($signed(e_sum)) != x + y - 127) begin
          failures++;
          if (failures < 10)
            $display("FAIL %0d + %0d: got %0d", x, y, $signed(e_sum));
        end
      end
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
