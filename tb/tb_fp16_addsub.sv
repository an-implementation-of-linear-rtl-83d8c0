// tb_fp16_addsub: self-checking test of the FPU-16 adder/subtracter.
// Random normal operands with close and distant exponents, for both add and
// subtract, are compared bit for bit with a double-precision reference
// rounded to binary16; directed cases cover cancellation, signed zeros,
// infinities and NaN.
module tb_fp16_addsub;
  import fp16_ref_pkg::*;

  logic [15:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp16_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [15:0] exp_y);
    #1;
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y !== exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL %h %s %h = %h, expected %h", a, sub ? "-" : "+", b, y, exp_y);
    end
  endtask

  task automatic rnd(input int lo, input int hi);
    logic [15:0] bb;
    a   = rand_normal(lo, hi);
    b   = rand_normal(lo, hi);
    sub = 1'($urandom);
    bb  = {b[15] ^ sub, b[14:0]};
    check(r2h(h2r(a) + h2r(bb), a[15] & bb[15]));
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sub = 0; a = 16'h3C00; b = 16'h3C00; check(16'h4000);   // 1 + 1 = 2
    sub = 1; a = 16'h3C00; b = 16'h3C00; check(16'h0000);   // 1 - 1 = +0
    sub = 0; a = 16'h3C00; b = 16'h1000; check(16'h3C00);   // 1 + 2^-11: tie, even
    sub = 0; a = 16'h3C01; b = 16'h1000; check(16'h3C02);   // tie rounds up to even
    sub = 1; a = 16'h3C00; b = 16'h3BFF; check(16'h1000);   // cancellation
    sub = 0; a = 16'h8000; b = 16'h8000; check(16'h8000);   // -0 + -0 = -0
    sub = 1; a = 16'h7C00; b = 16'h7C00; check(16'h7E00);   // inf - inf = NaN
    sub = 0; a = 16'h7C00; b = 16'hC000; check(16'h7C00);   // inf + -2
    sub = 0; a = 16'h7BFF; b = 16'h7BFF; check(16'h7C00);   // overflow
    sub = 1; a = 16'h0401; b = 16'h0400; check(16'h0000);   // underflow flushes
    repeat (3000) rnd(1, 30);
    repeat (3000) rnd(12, 18);
    repeat (2000) rnd(14, 15);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
