// tb_fp32_mul: checks fp32_mul against a double-precision reference on
// directed and random operands, including overflow, underflow and zeros.
module tb_fp32_mul;
  import tb_fp_pkg::*;
  logic [31:0] a, b, y, exp_y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_);
    a = ta; b = tb_;
    #1;
    exp_y = r2f(f2r(ta) * f2r(tb_));
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("MUL MISMATCH %h * %h = %h expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(32'h3fc00000, 32'h40200000);   // 1.5 * 2.5
    check(32'h00000000, 32'h40200000);   // zero
    check(32'h7f000000, 32'h7f000000);   // overflow
    check(32'h00800000, 32'h00800000);   // underflow
    check(32'hbf800001, 32'h3f800001);   // rounding
    for (int i = 0; i < 20000; i++) check(rand_f(60), rand_f(60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
