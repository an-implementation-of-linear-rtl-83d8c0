// tb_lr_system: end-to-end test of the whole design at its default size.
//
// Both ways of computing the regression are run on the eight training
// points of the evaluation data set, with N = 8 (the size of the data set)
// at every iteration, as the published per-iteration results were formed:
//   * the floating-point engine: the testbench keeps in_valid high from the
//     moment a sample is ready, so samples wait (stall) while the engine is
//     busy. Each result is compared bit for bit with an IEEE
//     round-to-nearest reference. Then clear starts a second data set, fed
//     with the running count N = 1, 2, 3, whose first fit has a zero
//     determinant (line through the origin).
//   * the microcomputer is loaded with the regression program and the same
//     data through its loader port, runs to HLT, and its sixteen stored
//     coefficients are compared bit for bit with a truncating reference.
// Both ways are also compared with the published coefficients to within
// 0.015 (one published value that fits neither way is skipped), and the mean
// square difference between the two ways is printed. Mechanisms counted,
// each of which must occur: zero-determinant fits, regular fits, input
// stalls, clears, microcomputer subroutine calls, taken branches and the
// halt.
module tb_lr_system;
  import bzk_pkg::*;
  import bzk_asm_pkg::*;
  import bzk_lr_prog_pkg::*;
  import fp16_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic lr_clear = 0, lr_in_valid = 0, lr_in_ready, lr_out_valid;
  logic [15:0] lr_n = 0, lr_x = 0, lr_y = 0, lr_a1, lr_a2;
  logic bzk_load_en = 1, bzk_load_we = 0;
  logic [15:0] bzk_load_addr = 0, bzk_load_data = 0, bzk_load_rdata, bzk_ac, bzk_pc;
  logic bzk_halted, bzk_instr_done;
  flags_t bzk_ccr;

  int checks = 0, failures = 0;
  int n_single = 0, n_regular = 0, n_stall = 0, n_clear = 0, n_call = 0, n_taken = 0, n_halt = 0;

  lr_system dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stall: a sample offered while the engine is busy
  always @(negedge clk) if (rst_n && lr_in_valid && !lr_in_ready) n_stall++;

  // control-flow events of the microcomputer, seen through its PC
  logic [15:0] pc_prev;
  always @(posedge clk) begin
    pc_prev <= bzk_pc;
    if (!bzk_load_en && bzk_pc != pc_prev && bzk_pc != pc_prev + 16'd2 && pc_prev != 0) n_taken++;
  end

  real xr[8] = '{-1.1, 0.1, 1.2, 2.3, 3.1, 4.1, 4.8, 5.7};
  real yr[8] = '{-1.7, 2.4, 5.0, 7.3, 10.9, 12.5, 16.2, 19.7};
  logic [15:0] xs[$], ys[$];
  logic [15:0] ip_a1[8], ip_a2[8];
  // published coefficients of the two ways, for a loose comparison
  real pub_ip_a1[8]  = '{1.546, 2.01, 3.0, 2.906, 3.075, 2.914, 2.975, 3.022};
  real pub_ip_a2[8]  = '{0.0, 0.3384, 0.638, 0.717, 0.834, 1.018, 1.305, 1.416};
  real pub_bzk_a1[8] = '{1.551, 2.004, 2.996, 2.908, 3.076, 2.91, 2.969, 3.012};
  real pub_bzk_a2[8] = '{0.0, 0.3384, 0.6367, 0.718, 0.8345, 1.017, 1.195, 1.41};

  task automatic expect_near(input logic [15:0] got, input real pub, input string what);
    checks++;
    if (h2r(got) - pub > 0.015 || pub - h2r(got) > 0.015) begin
      failures++; $display("FAIL %s: %f, published %f", what, h2r(got), pub);
    end
  endtask

  function automatic logic [15:0] m(input logic [15:0] a, input logic [15:0] b);
    return r2h(h2r(a) * h2r(b), a[15] ^ b[15]);
  endfunction
  function automatic logic [15:0] s(input logic [15:0] a, input logic [15:0] b, input logic neg);
    return r2h(h2r(a) + (neg ? -h2r(b) : h2r(b)), a[15] & (b[15] ^ neg));
  endfunction

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp_v, input string what);
    checks++;
    if (got !== exp_v) begin failures++; $display("FAIL %s: %h expected %h", what, got, exp_v); end
  endtask

  // Feed one data set to the engine, checking every result. The driver
  // offers each sample as soon as the previous one has been accepted, so it
  // waits while the engine is busy; the checker collects the results.
  task automatic engine_set(input int cnt, input logic first_clear, input logic keep,
                           input logic fixed_n);
    logic [15:0] sx, sxx, sy, sxy, nn, den, inv;
    logic [15:0] e1[$], e2[$], nv[$];
    logic        sg[$];
    sx = 0; sxx = 0; sy = 0; sxy = 0;
    for (int i = 0; i < cnt; i++) begin
      nn = r2h(real'(fixed_n ? cnt : i + 1), 0);
      nv.push_back(nn);
      sx = s(sx, xs[i], 0); sxx = s(sxx, m(xs[i], xs[i]), 0);
      sy = s(sy, ys[i], 0); sxy = s(sxy, m(xs[i], ys[i]), 0);
      den = s(m(nn, sxx), m(sx, sx), 1);
      sg.push_back(den[14:0] == 0);
      if (den[14:0] == 0) begin
        e1.push_back(r2h(h2r(sxy) / h2r(sxx), sxy[15] ^ sxx[15])); e2.push_back(0);
      end else begin
        inv = r2h(1.0 / h2r(den), den[15]);
        e1.push_back(m(inv, s(m(nn, sxy), m(sx, sy), 1)));
        e2.push_back(m(inv, s(m(sxx, sy), m(sx, sxy), 1)));
      end
    end
    fork
      begin : driver
        for (int i = 0; i < cnt; i++) begin
          @(negedge clk);
          lr_in_valid = 1; lr_n = nv[i]; lr_x = xs[i]; lr_y = ys[i];
          lr_clear = first_clear && (i == 0);
          if (lr_clear) n_clear++;
          while (!lr_in_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        lr_in_valid = 0; lr_clear = 0;
      end
      begin : collect
        for (int i = 0; i < cnt; i++) begin
          @(negedge clk);
          while (!lr_out_valid) @(negedge clk);
          expect_eq(lr_a1, e1[i], $sformatf("engine a1[%0d]", i + 1));
          expect_eq(lr_a2, e2[i], $sformatf("engine a2[%0d]", i + 1));
          if (sg[i]) n_single++; else n_regular++;
          if (keep) begin ip_a1[i] = lr_a1; ip_a2[i] = lr_a2; end
        end
      end
    join
  endtask

  initial begin
    bzk_asm a;
    logic [15:0] sx, sxx, sy, sxy, nn, t, p, q, den, inv, e1, e2, g1, g2;
    real mse;
    logic [15:0] pc_last;
    int cyc;

    foreach (xr[i]) begin xs.push_back(r2h(xr[i], 0)); ys.push_back(r2h(yr[i], 0)); end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- floating-point engine ----
    engine_set(8, 0, 1, 1);     // N = 8 throughout
    $display("engine: a1 = %f, a2 = %f", h2r(lr_a1), h2r(lr_a2));
    engine_set(3, 1, 0, 0);     // after clear, N = 1, 2, 3

    // ---- microcomputer ----
    a = new();
    checks++;
    if (build(a, xs, ys) != 0) begin failures++; $display("FAIL assembly"); end
    foreach (a.img[ad]) begin
      @(negedge clk); bzk_load_we = 1; bzk_load_addr = 16'(ad); bzk_load_data = a.img[ad];
    end
    @(negedge clk); bzk_load_we = 0; bzk_load_en = 0;
    cyc = 0;
    pc_last = 0;
    while (!bzk_halted && cyc < 500000) begin
      @(negedge clk); cyc++;
      // a call: PC jumps to the entry of one of the library routines
      if (bzk_pc != pc_last && bzk_pc != pc_last + 16'd2 &&
          (int'(bzk_pc) == a.labels["FADD"] || int'(bzk_pc) == a.labels["FSUB"] ||
           int'(bzk_pc) == a.labels["FMUL"] || int'(bzk_pc) == a.labels["FDIV"])) n_call++;
      pc_last = bzk_pc;
    end
    if (bzk_halted) n_halt++;
    $display("microcomputer: %0d cycles", cyc);

    sx = 0; sxx = 0; sy = 0; sxy = 0; nn = 16'h4800; mse = 0.0;  // N = 8.0
    for (int i = 0; i < 8; i++) begin
            sx  = sw_add(sx, xs[i]);
      t   = sw_mul(xs[i], xs[i]); sxx = sw_add(sxx, t);
      t   = sw_mul(xs[i], ys[i]);
      sy  = sw_add(sy, ys[i]); sxy = sw_add(sxy, t);
      p = sw_mul(nn, sxx); q = sw_mul(sx, sx); den = sw_sub(p, q);
      if (den[14:0] == 0) begin
        e1 = sw_div(sxy, sxx); e2 = 0;
      end else begin
        inv = sw_div(16'h3C00, den);
        p = sw_mul(nn, sxy); q = sw_mul(sx, sy); p = sw_sub(p, q); e1 = sw_mul(inv, p);
        p = sw_mul(sxx, sy); q = sw_mul(sx, sxy); p = sw_sub(p, q); e2 = sw_mul(inv, p);
      end
      bzk_load_en = 1;
      @(negedge clk); bzk_load_addr = 16'(addr_of(A1ARR + i)); @(negedge clk); g1 = bzk_load_rdata;
      @(negedge clk); bzk_load_addr = 16'(addr_of(A2ARR + i)); @(negedge clk); g2 = bzk_load_rdata;
      expect_eq(g1, e1, $sformatf("microcomputer a1[%0d]", i + 1));
      expect_eq(g2, e2, $sformatf("microcomputer a2[%0d]", i + 1));
      expect_near(ip_a1[i], pub_ip_a1[i], $sformatf("engine a1[%0d] vs published", i + 1));
      // the published engine a2 of the 7th iteration (1.305) matches neither
      // the closed form (1.204) nor the other way's 1.195; it is not compared
      if (i != 6) expect_near(ip_a2[i], pub_ip_a2[i], $sformatf("engine a2[%0d] vs published", i + 1));
      expect_near(g1, pub_bzk_a1[i], $sformatf("microcomputer a1[%0d] vs published", i + 1));
      expect_near(g2, pub_bzk_a2[i], $sformatf("microcomputer a2[%0d] vs published", i + 1));
      $display("n=%0d  engine a1=%8.4f a2=%8.4f   microcomputer a1=%8.4f a2=%8.4f",
               i + 1, h2r(ip_a1[i]), h2r(ip_a2[i]), h2r(g1), h2r(g2));
      mse += (h2r(ip_a1[i]) - h2r(g1)) ** 2 + (h2r(ip_a2[i]) - h2r(g2)) ** 2;
    end
    mse = mse / 16.0;
    $display("mean square difference between the two ways: %e", mse);
    checks++;
    if (mse > 1.0e-3) begin failures++; $display("FAIL the two ways disagree"); end

    $display("single=%0d regular=%0d stalls=%0d clears=%0d calls=%0d taken=%0d halts=%0d",
             n_single, n_regular, n_stall, n_clear, n_call, n_taken, n_halt);
    checks++;
    if (n_single == 0 || n_regular == 0 || n_stall == 0 || n_clear == 0 ||
        n_call == 0 || n_taken == 0 || n_halt == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
