// tb_fp_normalizer: self-checking testbench of the normalisation and packing
// stage. Random products in [1, 4) (top or second bit set), exponents over
// the whole range the exponent adder can produce (-127 .. 383), random
// signs and an occasional zero operand are applied. The expected word and
// flags are worked out in integer arithmetic (divide by 2^23 or 2^24, take
// the fraction modulo 2^23, compare the exponent with 1 and 254). Every
// path (shift, no shift, zero, underflow, overflow, normal) must be taken.
module tb_fp_normalizer;

  localparam int unsigned NRAND = 30000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_zero = 0, n_under = 0, n_over = 0, n_normal = 0;

  logic        sign, zero_in;
  logic [9:0]  e_sum;
  logic [47:0] prod;
  logic [31:0] result;
  logic        shifted, overflow, underflow;

  fp_normalizer dut (
    .sign(sign), .e_sum(e_sum), .prod(prod), .zero_in(zero_in),
    .result(result), .shifted(shifted), .overflow(overflow), .underflow(underflow)
  );

  task automatic check(input logic s, input int e, input logic [47:0] pr, input logic z);
    longint unsigned pv, mant;
    int              en;
    logic            exp_sh, exp_ov, exp_un;
    logic [31:0]     exp_res;
    sign = s; e_sum = 10'(e); prod = pr; zero_in = z;
    @(posedge clk);
    pv     = longint'(pr);
    exp_sh = (pv >= (64'd1 << 47));
    if (exp_sh) begin mant = pv / (64'd1 << 24); en = e + 1; end
    else        begin mant = pv / (64'd1 << 23); en = e;     end
    exp_ov = 1'b0; exp_un = 1'b0;
    if (z) begin
      exp_res = {s, 31'd0}; n_zero++;
    end else if (en <= 0) begin
      exp_res = {s, 31'd0}; exp_un = 1'b1; n_under++;
    end else if (en >= 255) begin
      exp_res = {s, 8'hFF, 23'd0}; exp_ov = 1'b1; n_over++;
    end else begin
      exp_res = {s, 8'(en), 23'(mant % (64'd1 << 23))}; n_normal++;
    end
    if (exp_sh) n_shift++; else n_noshift++;
    checks++;
    if (result !== exp_res || shifted !== exp_sh || overflow !== exp_ov || underflow !== exp_un) begin
      failures++;
      if (failures < 10)
        $display("FAIL s=%b e=%0d prod=%h z=%b: got %h sh%b ov%b un%b, expected %h sh%b ov%b un%b",
                 s, e, pr, z, result, shifted, overflow, underflow, exp_res, exp_sh, exp_ov, exp_un);
    end
  endtask

  initial begin
    // boundaries of the exponent range, both shift cases
    check(1'b0, 1,   48'h4000_0000_0000, 1'b0);   // smallest normal
    check(1'b1, 0,   48'h7FFF_FFFF_FFFF, 1'b0);   // underflow without shift
    check(1'b0, 0,   48'h8000_0000_0000, 1'b0);   // shift rescues exponent 0
    check(1'b0, 254, 48'h7FFF_FFFF_FFFF, 1'b0);   // largest normal
    check(1'b1, 254, 48'h8000_0000_0000, 1'b0);   // shift overflows
    check(1'b0, 383, 48'hFFFF_FFFF_FFFF, 1'b0);
    check(1'b1, -127, 48'h4000_0000_0000, 1'b0);
    check(1'b1, 100, 48'h5555_5555_5555, 1'b1);   // zero operand
    for (int n = 0; n < NRAND; n++) begin
      logic [47:0] pr;
      pr = {16'($urandom), 32'($urandom)};
      if (pr[47] == 1'b0) pr[46] = 1'b1;
      check(1'($urandom), int'($urandom_range(510)) - 127, pr, ($urandom_range(15) == 0));
    end
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_zero == 0 || n_under == 0 || n_over == 0 || n_normal == 0) begin
      failures++;
      $display("FAIL a path was never taken");
    end
    $display("paths: shift=%0d noshift=%0d zero=%0d underflow=%0d overflow=%0d normal=%0d",
             n_shift, n_noshift, n_zero, n_under, n_over, n_normal);
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
