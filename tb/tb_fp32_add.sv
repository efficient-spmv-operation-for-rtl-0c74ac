// tb_fp32_add: checks fp32_add against a double-precision reference on
// directed cases (cancellation, zeros, large exponent gaps) and random
// operands with near and far exponents.
module tb_fp32_add;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_add dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = r2f(f2r(ta) + f2r(tb_));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("ADD MISMATCH %h + %h = %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3fc00000, 32'h40200000);
    check(32'h3f800000, 32'hbf800000);   // exact cancellation
    check(32'h3f800001, 32'hbf800000);   // massive cancellation
    check(32'h00000000, 32'h40200000);
    check(32'h4b800000, 32'h3f800000);   // 2^24 + 1: tie
    check(32'h4b800000, 32'h3f800001);   // just above tie
    check(32'h7f7fffff, 32'h7f7fffff);   // overflow
    for (int i = 0; i < 20000; i++) check(rand_f(3), rand_f(3));
    for (int i = 0; i < 20000; i++) check(rand_f(40), rand_f(40));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
