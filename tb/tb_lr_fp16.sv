// tb_lr_fp16: self-checking test of the half-precision linear-regression engine.
//
// 1. The eight training points of the evaluation data set are fed one by one
//    with N = 1..8. After every sample a1 and a2 are compared bit for bit with
//    a step-by-step reference that rounds every intermediate result to
//    binary16 exactly as the schedule does. After the first sample the
//    determinant is zero, and the fit must be the line through the origin:
//    a1 = Sxy/Sxx (here 16'h3E2F, 1.5459) and a2 = 0. The final fit must
//    be 3.0215 / 1.4160 (16'h420B / 16'h3DAA) and lie within 0.01 of the
//    published a1 = 3.022, a2 = 1.416.
// 2. After clear, the same points are fed with N held at 8 (the size of the
//    data set), the way the published per-iteration results were formed;
//    every fit is checked bit for bit and must lie within 0.015 of the
//    published one (a1 = 1.546, a2 = 0 for the first sample, and so on).
// 3. Random data sets (with clear between them) are checked the same way.
// The latency (18 cycles, 11 for a zero determinant, from the accepting
// edge to out_valid) and in_ready being low while busy are checked on every
// sample.
module tb_lr_fp16;
  import fp16_ref_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0, in_ready, out_valid;
  logic [15:0] n_in, x_in, y_in, a1, a2;
  int checks = 0, failures = 0, n_single = 0;

  // reference state
  logic [15:0] sx, sxx, sy, sxy;

  lr_fp16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] m(input logic [15:0] a, input logic [15:0] b);
    return r2h(h2r(a) * h2r(b), a[15] ^ b[15]);
  endfunction
  function automatic logic [15:0] s(input logic [15:0] a, input logic [15:0] b, input logic neg);
    return r2h(h2r(a) + (neg ? -h2r(b) : h2r(b)), a[15] & (b[15] ^ neg));
  endfunction

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (is_nan(exp_v) ? !is_nan(got) : (got !== exp_v)) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic sample(input int n, input logic [15:0] x, input logic [15:0] y);
    logic [15:0] nn, den, inv, e1, e2;
    int cyc;
    logic single;
    nn = r2h(real'(n), 1'b0);
    // reference
    sx  = s(sx, x, 0);
    sxx = s(sxx, m(x, x), 0);
    sy  = s(sy, y, 0);
    sxy = s(sxy, m(x, y), 0);
    den = s(m(nn, sxx), m(sx, sx), 1);
    single = (den[14:10] == 0);
    if (single) begin
      // singular system: line through the origin
      e1 = r2h(h2r(sxy) / h2r(sxx), sxy[15] ^ sxx[15]);
      e2 = 16'h0000;
    end else begin
      inv = r2h(1.0 / h2r(den), den[15]);
      e1 = m(inv, s(m(nn, sxy), m(sx, sy), 1));
      e2 = m(inv, s(m(sxx, sy), m(sx, sxy), 1));
    end
    // drive
    @(negedge clk);
    checks++;
    if (!in_ready) begin failures++; $display("FAIL not ready"); end
    n_in = nn; x_in = x; y_in = y; in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0; clear = 0;
    cyc = 0;
    while (!out_valid) begin
      checks++;
      if (in_ready) begin failures++; $display("FAIL ready while busy"); end
      @(posedge clk); #1;
      cyc++;
    end
    checks++;
    if (cyc != (single ? 11 : 18)) begin failures++; $display("FAIL latency %0d", cyc); end
    if (single) n_single++;
    expect_eq(a1, e1, $sformatf("a1 n=%0d", n));
    expect_eq(a2, e2, $sformatf("a2 n=%0d", n));
  endtask

  real xs[8] = '{-1.1, 0.1, 1.2, 2.3, 3.1, 4.1, 4.8, 5.7};
  real ys[8] = '{-1.7, 2.4, 5.0, 7.3, 10.9, 12.5, 16.2, 19.7};

  // published per-iteration coefficients; the 7th a2 (1.305) fits neither
  // the closed form (1.204) nor the published integer-CPU result (1.195) and
  // is not compared
  real pub_a1[8] = '{1.546, 2.01, 3.0, 2.906, 3.075, 2.914, 2.975, 3.022};
  real pub_a2[8] = '{0.0, 0.3384, 0.638, 0.717, 0.834, 1.018, 1.305, 1.416};

  initial begin
    n_in = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    sx = 0; sxx = 0; sy = 0; sxy = 0;
    for (int i = 0; i < 8; i++) begin
      sample(i + 1, r2h(xs[i], 0), r2h(ys[i], 0));
      if (i == 0) begin
        expect_eq(a1, 16'h3E2F, "first a1");
        expect_eq(a2, 16'h0000, "first a2");
      end
    end
    expect_eq(a1, 16'h420B, "final a1");
    expect_eq(a2, 16'h3DAA, "final a2");
    checks++;
    if (h2r(a1) < 3.012 || h2r(a1) > 3.032 || h2r(a2) < 1.406 || h2r(a2) > 1.426) begin
      failures++; $display("FAIL fit %f %f", h2r(a1), h2r(a2));
    end
    $display("fit: a1 = %f  a2 = %f", h2r(a1), h2r(a2));
    // the same data with N held at 8, the size of the data set, as the
    // published per-iteration coefficients were formed
    @(negedge clk); clear = 1;
    sx = 0; sxx = 0; sy = 0; sxy = 0;
    for (int i = 0; i < 8; i++) begin
      sample(8, r2h(xs[i], 0), r2h(ys[i], 0));
      checks++;
      if (h2r(a1) - pub_a1[i] > 0.015 || pub_a1[i] - h2r(a1) > 0.015 ||
          (i != 6 && (h2r(a2) - pub_a2[i] > 0.015 || pub_a2[i] - h2r(a2) > 0.015))) begin
        failures++;
        $display("FAIL N=8 iteration %0d: %f %f", i + 1, h2r(a1), h2r(a2));
      end
    end
    // random data sets
    repeat (10) begin
      @(negedge clk); clear = 1;
      sx = 0; sxx = 0; sy = 0; sxy = 0;
      for (int i = 0; i < 6; i++)
        sample(i + 1, r2h(real'($urandom % 200) / 20.0 - 5.0, 0),
                      r2h(real'($urandom % 400) / 10.0 - 20.0, 0));
    end
    checks++;
    if (n_single < 11) begin failures++; $display("FAIL single-point path taken %0d times", n_single); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
