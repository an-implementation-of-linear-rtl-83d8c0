// fp16_ref_pkg: reference arithmetic for the FPU-16 testbenches.
//
// Works through SystemVerilog reals (IEEE double), independently of the RTL:
// a binary16 word is turned into a real, the operation is done in double
// precision (exact for the sum and product of two binary16 numbers) and the
// result is rounded back to binary16 to nearest even, with the same
// flush-to-zero rule as the design (results below 2^-14 become a signed zero).
// The sw_* functions model the truncating software library run on the
// microcomputer in the same way.
package fp16_ref_pkg;

  function automatic real h2r(input logic [15:0] h);
    real v;
    int  e;
    e = int'(h[14:10]);
    if (e == 0) return 0.0;
    v = real'(1024 + int'(h[9:0]));
    e = e - 25;
    while (e > 0) begin v = v * 2.0; e--; end
    while (e < 0) begin v = v / 2.0; e++; end
    return h[15] ? -v : v;
  endfunction

  // zsign is the sign used when the result is zero.
  function automatic logic [15:0] r2h(input real r, input logic zsign);
    real a, f;
    int  e, mi;
    logic s;
    if (r == 0.0) return {zsign, 15'h0};
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    a  = a * 1024.0;
    mi = int'($floor(a));
    f  = a - real'(mi);
    if (f > 0.5 || (f == 0.5 && (mi % 2) == 1)) mi++;
    if (mi == 2048) begin mi = 1024; e++; end
    e = e + 15;
    if (e >= 31) return {s, 5'h1F, 10'h0};
    if (e <= 0)  return {s, 15'h0};
    return {s, 5'(e), 10'(mi - 1024)};
  endfunction

  // Rounding toward zero, flush to +0, overflow to a signed infinity: the
  // rules of the software half-precision library of the microcomputer.
  function automatic logic [15:0] r2h_trunc(input real r);
    real a;
    int  e, mi;
    logic s;
    if (r == 0.0) return 16'h0000;
    s = (r < 0.0);
    a = s ? -r : r;
    e = 0;
    while (a >= 2.0) begin a = a / 2.0; e++; end
    while (a < 1.0)  begin a = a * 2.0; e--; end
    mi = int'($floor(a * 1024.0));
    e  = e + 15;
    if (e >= 31) return {s, 5'h1F, 10'h0};
    if (e <= 0)  return 16'h0000;
    return {s, 5'(e), 10'(mi - 1024)};
  endfunction

  function automatic logic [15:0] sw_add(input logic [15:0] a, input logic [15:0] b);
    if (a[14:10] == 0) return b;
    if (b[14:10] == 0) return a;
    return r2h_trunc(h2r(a) + h2r(b));
  endfunction

  function automatic logic [15:0] sw_sub(input logic [15:0] a, input logic [15:0] b);
    return sw_add(a, b ^ 16'h8000);
  endfunction

  function automatic logic [15:0] sw_mul(input logic [15:0] a, input logic [15:0] b);
    if (a[14:10] == 0 || b[14:10] == 0) return 16'h0000;
    return r2h_trunc(h2r(a) * h2r(b));
  endfunction

  function automatic logic [15:0] sw_div(input logic [15:0] a, input logic [15:0] b);
    if (b[14:10] == 0) return {a[15] ^ b[15], 15'h7C00};
    if (a[14:10] == 0) return 16'h0000;
    return r2h_trunc(h2r(a) / h2r(b));
  endfunction

  function automatic logic is_nan(input logic [15:0] h);
    return (h[14:10] == 5'h1F) && (h[9:0] != 0);
  endfunction

  // A random normal number with exponent field in [lo, hi].
  function automatic logic [15:0] rand_normal(input int lo, input int hi);
    logic [15:0] h;
    h[15]    = 1'($urandom);
    h[14:10] = 5'(lo + int'($urandom % (hi - lo + 1)));
    h[9:0]   = 10'($urandom);
    return h;
  endfunction

endpackage
