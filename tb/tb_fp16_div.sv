// tb_fp16_div: self-checking test of the FPU-16 divider.
// Random normal operands are compared bit for bit with a double-precision
// reference rounded to binary16; directed cases cover division by zero,
// 0/0, inf/inf, x/inf and exact quotients.
module tb_fp16_div;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  int checks = 0, failures = 0;

  fp16_div dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [15:0] exp_y);
    #1;
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y !== exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL div %h / %h = %h, expected %h", a, b, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'h3C00; b = 16'h4000; check(16'h3800);   // 1 / 2 = 0.5
    a = 16'h4600; b = 16'hC200; check(16'hC000);   // 6 / -3 = -2
    a = 16'h3C00; b = 16'h4200; check(16'h3555);   // 1 / 3
    a = 16'h3C00; b = 16'h0000; check(16'h7C00);   // 1 / 0 = inf
    a = 16'hBC00; b = 16'h0000; check(16'hFC00);   // -1 / 0 = -inf
    a = 16'h0000; b = 16'h0000; check(16'h7E00);   // 0 / 0 = NaN
    a = 16'h7C00; b = 16'h7C00; check(16'h7E00);   // inf / inf = NaN
    a = 16'h4000; b = 16'hFC00; check(16'h8000);   // 2 / -inf = -0
    repeat (6000) begin
      a = rand_normal(1, 30);
      b = rand_normal(1, 30);
      check(r2h(h2r(a) / h2r(b), a[15] ^ b[15]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
