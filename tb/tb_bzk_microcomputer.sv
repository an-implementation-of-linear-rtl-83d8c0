// tb_bzk_microcomputer: runs linear regression as a program on the
// microcomputer and checks every coefficient it produces.
//
// The program (bzk_lr_prog_pkg) and the eight training points of the
// evaluation data set are written into RAM through the loader port; the CPU
// runs until HLT; a1[i] and a2[i] for i = 1..8 are read back through the same
// port and compared bit for bit with a reference that applies the library's
// rounding rule (truncation) to exact real arithmetic, step by step in the
// program's order. N is the size of the data set, as the program uses it.
// Every coefficient of the evaluation set must also lie within 0.015 of the
// published microcomputer result for that iteration (from a1 = 1.551, a2 = 0
// for the first sample to a1 = 3.012, a2 = 1.41 for the eighth). A random
// data set of 12 points follows, and then one of 3 points whose x values are
// all equal, so that the determinant of the last fit is zero and the
// program's line-through-the-origin path is taken.
module tb_bzk_microcomputer;
  import bzk_pkg::*;
  import bzk_asm_pkg::*;
  import bzk_lr_prog_pkg::*;
  import fp16_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_en = 1, load_we = 0;
  logic [15:0] load_addr = 0, load_data = 0, load_rdata, ac, pc;
  logic halted, instr_done;
  flags_t ccr;
  int checks = 0, failures = 0;
  longint cycles, instrs;

  bzk_microcomputer dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_image(bzk_asm a);
    load_en = 1;
    foreach (a.img[adr]) begin
      @(negedge clk);
      load_we = 1; load_addr = 16'(adr); load_data = a.img[adr];
    end
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic read_word(input int adr, output logic [15:0] w);
    @(negedge clk);
    load_en = 1; load_we = 0; load_addr = 16'(adr);
    @(negedge clk);
    w = load_rdata;
  endtask

  task automatic run_set(logic [15:0] xs[$], logic [15:0] ys[$], output logic [15:0] fa1, output logic [15:0] fa2,
                         output logic [15:0] first_a1, output logic [15:0] first_a2,
                         input logic pub);
    bzk_asm a;
    logic [15:0] sx, sxx, sy, sxy, nn, t, p, q, den, inv, e1, e2, g1, g2;
    a = new();
    checks++;
    if (build(a, xs, ys) != 0) begin failures++; $display("FAIL assembly errors"); end
    load_image(a);
    @(negedge clk); load_en = 0;
    cycles = 0; instrs = 0;
    while (!halted) begin
      @(posedge clk); cycles++;
      if (instr_done) instrs++;
    end
    $display("program: %0d instructions, %0d cycles for %0d samples", instrs, cycles, xs.size());
    sx = 0; sxx = 0; sy = 0; sxy = 0; nn = r2h(real'(xs.size()), 0);
    foreach (xs[i]) begin
      sx  = sw_add(sx, xs[i]);
      t   = sw_mul(xs[i], xs[i]); sxx = sw_add(sxx, t);
      t   = sw_mul(xs[i], ys[i]);
      sy  = sw_add(sy, ys[i]);
      sxy = sw_add(sxy, t);
      p   = sw_mul(nn, sxx); q = sw_mul(sx, sx); den = sw_sub(p, q);
      if (den[14:0] == 0) begin
        e1 = sw_div(sxy, sxx); e2 = 0;
      end else begin
        inv = sw_div(16'h3C00, den);
        p = sw_mul(nn, sxy); q = sw_mul(sx, sy); p = sw_sub(p, q); e1 = sw_mul(inv, p);
        p = sw_mul(sxx, sy); q = sw_mul(sx, sxy); p = sw_sub(p, q); e2 = sw_mul(inv, p);
      end
      read_word(addr_of(A1ARR + i), g1);
      read_word(addr_of(A2ARR + i), g2);
      checks += 2;
      if (g1 !== e1) begin failures++; $display("FAIL a1[%0d] = %h expected %h", i + 1, g1, e1); end
      if (g2 !== e2) begin failures++; $display("FAIL a2[%0d] = %h expected %h", i + 1, g2, e2); end
      if (i == 0) begin first_a1 = g1; first_a2 = g2; end
      if (den[14:0] == 0) n_single++;
      if (pub) begin
        checks++;
        if (h2r(g1) - pub_a1[i] > 0.015 || pub_a1[i] - h2r(g1) > 0.015 ||
            h2r(g2) - pub_a2[i] > 0.015 || pub_a2[i] - h2r(g2) > 0.015) begin
          failures++;
          $display("FAIL iteration %0d: %f %f, published %f %f", i + 1, h2r(g1), h2r(g2),
                   pub_a1[i], pub_a2[i]);
        end
      end
      fa1 = g1; fa2 = g2;
    end
  endtask

  real xr[8] = '{-1.1, 0.1, 1.2, 2.3, 3.1, 4.1, 4.8, 5.7};
  real yr[8] = '{-1.7, 2.4, 5.0, 7.3, 10.9, 12.5, 16.2, 19.7};
  // published per-iteration results of the microcomputer
  real pub_a1[8] = '{1.551, 2.004, 2.996, 2.908, 3.076, 2.91, 2.969, 3.012};
  real pub_a2[8] = '{0.0, 0.3384, 0.6367, 0.718, 0.8345, 1.017, 1.195, 1.41};
  int n_single = 0;

  initial begin
    logic [15:0] xs[$], ys[$];
    logic [15:0] a1f, a2f, a1s, a2s;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (xr[i]) begin xs.push_back(r2h(xr[i], 0)); ys.push_back(r2h(yr[i], 0)); end
    run_set(xs, ys, a1f, a2f, a1s, a2s, 1);
    $display("evaluation set: first fit a1=%f a2=%f, final fit a1=%f a2=%f",
             h2r(a1s), h2r(a2s), h2r(a1f), h2r(a2f));
    checks += 2;
    if (h2r(a1f) < 2.992 || h2r(a1f) > 3.032 || h2r(a2f) < 1.39 || h2r(a2f) > 1.43) begin
      failures++; $display("FAIL final fit away from the published one");
    end
    if (h2r(a1s) < 1.536 || h2r(a1s) > 1.566 || a2s != 0) begin
      failures++; $display("FAIL first fit away from the published one");
    end
    // random data set
    @(negedge clk); load_en = 1;
    repeat (3) @(posedge clk);
    xs.delete(); ys.delete();
    repeat (12) begin
      xs.push_back(r2h(real'($urandom % 200) / 10.0 - 10.0, 0));
      ys.push_back(r2h(real'($urandom % 400) / 10.0 - 20.0, 0));
    end
    run_set(xs, ys, a1f, a2f, a1s, a2s, 0);
    // all x equal: with all N samples in, N*Sxx = Sx*Sx and the determinant
    // is zero, so the last fit takes the line-through-the-origin path
    @(negedge clk); load_en = 1;
    repeat (3) @(posedge clk);
    xs.delete(); ys.delete();
    repeat (3) begin
      xs.push_back(16'h4000);
      ys.push_back(r2h(real'($urandom % 400) / 10.0 - 20.0, 0));
    end
    run_set(xs, ys, a1f, a2f, a1s, a2s, 0);
    checks++;
    if (n_single != 1) begin failures++; $display("FAIL zero-determinant fits: %0d", n_single); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
