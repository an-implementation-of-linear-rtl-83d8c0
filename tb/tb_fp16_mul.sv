// tb_fp16_mul: self-checking test of the FPU-16 multiplier.
// Random normal operands (including products that overflow and underflow) are
// compared bit for bit with a double-precision reference rounded to binary16;
// a few directed IEEE special cases are checked against hand-worked results.
module tb_fp16_mul;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  fp16_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [15:0] exp_y);
    #1;
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y !== exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h = %h, expected %h", a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // directed cases
    a = 16'h3C00; b = 16'h4000; check(16'h4000);   // 1 * 2 = 2
    a = 16'hBE00; b = 16'h4200; check(16'hC480);   // -1.5 * 3 = -4.5
    a = 16'h7C00; b = 16'h0000; check(16'h7E00);   // inf * 0 = NaN
    a = 16'h7C00; b = 16'hC000; check(16'hFC00);   // inf * -2 = -inf
    a = 16'h8000; b = 16'h4000; check(16'h8000);   // -0 * 2 = -0
    a = 16'h7BFF; b = 16'h4000; check(16'h7C00);   // overflow
    a = 16'h0400; b = 16'h3800; check(16'h0000);   // underflow flushes
    a = 16'h7E00; b = 16'h3C00; check(16'h7E00);   // NaN propagates
    repeat (3000) begin
      a = rand_normal(1, 30);
      b = rand_normal(1, 30);
      check(r2h(h2r(a) * h2r(b), a[15] ^ b[15]));
    end
    repeat (3000) begin
      a = rand_normal(8, 22);
      b = rand_normal(8, 22);
      check(r2h(h2r(a) * h2r(b), a[15] ^ b[15]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
