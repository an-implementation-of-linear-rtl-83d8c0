// bzk_lr_prog_pkg: linear regression as a BZK.SAU.FPGA program.
//
// build() assembles a program that fits y = a2 + a1*x in half precision on the
// integer-only CPU, using a software floating-point library written with the
// machine's integer instructions:
//   FADD/FSUB  align with a shift loop and a sticky bit, add or subtract the
//              significands (three extra bits), renormalise
//   FMUL       16x16 MUL into {TR, AC}, product bits picked out with DIV/MUL
//   FDIV       long division in three base-16 digits with DIV and its
//              remainder in TR
//   PACK       common exit: exponent range check and packing
// All results are truncated toward zero; zero results are +0, tiny results
// flush to +0, overflow gives a signed infinity. The main loop walks the
// samples, updates Sx, Sxx, Sy, Sxy and stores a1[i], a2[i] after every
// sample, using the same closed form as the floating-point engine (and the
// line through the origin when the determinant is zero). N is the size of
// the whole data set, written into memory with the data and held fixed while
// the sums grow; this is how the published per-iteration coefficients were
// formed (they are reproduced only with N fixed).
//
// Memory map: code from address 0; data at BASE = 16'hFC00 addressed through
// IX (word offsets below); the stack starts at 16'hFFFE.
package bzk_lr_prog_pkg;
  import bzk_pkg::*;
  import bzk_asm_pkg::*;

  localparam int BASE = 16'hFC00;

  // word offsets of the variables from BASE
  localparam int FA = 0, FB = 1, FR = 2, SA = 3, EAV = 4, EBV = 5, MA = 6, MB = 7,
                 EV = 8, RV = 9, T1 = 10, T2 = 11, STK = 12, CNT = 13, QV = 14;
  localparam int XV = 16, YV = 17, NV = 18, SX = 19, SXX = 20, SY = 21, SXY = 22,
                 DEN = 23, INV = 24, PV = 25, QQ = 26, A1 = 27, A2 = 28, PTR = 29,
                 LEFT = 30, TV = 31;
  localparam int C7C00 = 40, C03FF = 41, C0400 = 42, C8000 = 43, C7FFF = 44,
                 CONE = 45, K1024 = 46, K512 = 47, K64 = 48, K15 = 49, K16 = 50,
                 K2048 = 51, K8192 = 52, K16384 = 53, K4 = 54, K256 = 55, K8 = 56,
                 K4096 = 57, K31 = 58, K1 = 59, K14 = 60;
  localparam int XARR = 64, YARR = 96, A1ARR = 128, A2ARR = 160;
  localparam int MAXN = 32;

  // binary16 value of a small positive count (exact up to 2048)
  function automatic logic [15:0] count_to_h(int n);
    int e = 0;
    while ((n >> (e + 1)) != 0) e++;
    return {1'b0, 5'(15 + e), 10'((n << (10 - e)) & 16'h03FF)};
  endfunction

  function automatic int addr_of(int w);
    return (BASE + 2 * w) & 16'hFFFF;
  endfunction

  function automatic void ld(bzk_asm a, int v);  a.ix(OP_LDA, v); endfunction
  function automatic void st(bzk_asm a, int v);  a.ix(OP_STA, v); endfunction
  function automatic void ldd(bzk_asm a, int v); a.ix(OP_LDD, v); endfunction

  // dst = routine(src_a, src_b)
  function automatic void fop(bzk_asm a, string routine, int dst, int sa, int sb);
    ld(a, sa); st(a, FA); ld(a, sb); st(a, FB);
    a.br(OP_JMP, routine);
    st(a, dst);
  endfunction

  // AC = field extracted by mask, then DR-divided: (src & mask) / div
  function automatic void unpack_exp(bzk_asm a, int src, string zero_target, int dst);
    ld(a, src); ldd(a, C7C00); a.op0(OP_AND); a.br(OP_BZR, zero_target);
    ldd(a, K1024); a.op0(OP_DIV); st(a, dst);
  endfunction

  function automatic void unpack_man(bzk_asm a, int src);
    ld(a, src); ldd(a, C03FF); a.op0(OP_AND); ldd(a, C0400); a.op0(OP_OR);
  endfunction

  function automatic void emit(bzk_asm a, logic [15:0] xs[$], logic [15:0] ys[$]);
    // ---------------- main program ----------------
    a.org(0);
    a.li(-1024); a.op0(OP_TAX);                       // IX = BASE
    a.li(-1024); st(a, PTR);
    a.li(0); st(a, SX); st(a, SXX); st(a, SY); st(a, SXY);
    a.label("LOOP");
    ld(a, PTR); a.op0(OP_TAX); a.ix(OP_LDA, XARR); a.op0(OP_TDR);
    a.li(-1024); a.op0(OP_TAX); a.li(0); a.op0(OP_ADD); st(a, XV);
    ld(a, PTR); a.op0(OP_TAX); a.ix(OP_LDA, YARR); a.op0(OP_TDR);
    a.li(-1024); a.op0(OP_TAX); a.li(0); a.op0(OP_ADD); st(a, YV);
    fop(a, "FADD", SX, SX, XV);
    fop(a, "FMUL", TV, XV, XV);
    fop(a, "FADD", SXX, SXX, TV);
    fop(a, "FMUL", TV, XV, YV);
    fop(a, "FADD", SY, SY, YV);
    fop(a, "FADD", SXY, SXY, TV);
    fop(a, "FMUL", PV, NV, SXX);
    fop(a, "FMUL", QQ, SX, SX);
    fop(a, "FSUB", DEN, PV, QQ);
    ld(a, DEN); ldd(a, C7FFF); a.op0(OP_AND); a.br(OP_BZR, "SINGLE");
    fop(a, "FDIV", INV, CONE, DEN);
    fop(a, "FMUL", PV, NV, SXY);
    fop(a, "FMUL", QQ, SX, SY);
    fop(a, "FSUB", PV, PV, QQ);
    fop(a, "FMUL", A1, INV, PV);
    fop(a, "FMUL", PV, SXX, SY);
    fop(a, "FMUL", QQ, SX, SXY);
    fop(a, "FSUB", PV, PV, QQ);
    fop(a, "FMUL", A2, INV, PV);
    a.br(OP_BRA, "STORE");
    a.label("SINGLE");
    fop(a, "FDIV", A1, SXY, SXX);
    a.li(0); st(a, A2);
    a.label("STORE");
    ld(a, A1); a.op0(OP_TDR); ld(a, PTR); a.op0(OP_TAX); a.li(0); a.op0(OP_ADD);
    a.ix(OP_STA, A1ARR); a.li(-1024); a.op0(OP_TAX);
    ld(a, A2); a.op0(OP_TDR); ld(a, PTR); a.op0(OP_TAX); a.li(0); a.op0(OP_ADD);
    a.ix(OP_STA, A2ARR); a.li(-1024); a.op0(OP_TAX);
    ld(a, PTR); a.op0(OP_INC); a.op0(OP_INC); st(a, PTR);
    ld(a, LEFT); ldd(a, K1); a.op0(OP_SUB); st(a, LEFT); a.br(OP_BZR, "DONE");
    a.br(OP_BRA, "LOOP");
    a.label("DONE");
    a.op0(OP_HLT);

    // ---------------- FMUL: FR = FA * FB ----------------
    a.label("FMUL");
    ld(a, FA); ldd(a, FB); a.op0(OP_XOR); ldd(a, C8000); a.op0(OP_AND); st(a, SA);
    unpack_exp(a, FA, "RZERO", EAV);
    unpack_exp(a, FB, "RZERO", EBV);
    unpack_man(a, FA); st(a, MA);
    unpack_man(a, FB); ldd(a, MA); a.op0(OP_MUL); st(a, T1);   // low half
    a.op0(OP_TRA); st(a, T2);                                   // high half
    ld(a, T1); a.op0(OP_SHR); ldd(a, K512); a.op0(OP_DIV); st(a, RV);
    ld(a, T2); ldd(a, K64); a.op0(OP_MUL); ldd(a, RV); a.op0(OP_ADD); st(a, RV);
    ld(a, EAV); ldd(a, EBV); a.op0(OP_ADD); ldd(a, K15); a.op0(OP_SUB); st(a, EV);
    ld(a, RV); ldd(a, K2048); a.op0(OP_AND); a.br(OP_BZR, "PACK");
    ld(a, RV); a.op0(OP_SHR); st(a, RV); ld(a, EV); a.op0(OP_INC); st(a, EV);
    a.br(OP_BRA, "PACK");

    // ---------------- PACK: FR = SA | EV | RV ----------------
    a.label("PACK");
    ld(a, EV); a.br(OP_BMI, "RZERO"); a.br(OP_BZR, "RZERO");
    ldd(a, K31); a.op0(OP_SUB); a.br(OP_BMI, "PKOK");
    a.label("RINF");
    ld(a, SA); ldd(a, C7C00); a.op0(OP_OR); st(a, FR); a.op0(OP_RTS);
    a.label("PKOK");
    ld(a, EV); ldd(a, K1024); a.op0(OP_MUL); ldd(a, SA); a.op0(OP_OR); st(a, T1);
    ld(a, RV); ldd(a, C03FF); a.op0(OP_AND); ldd(a, T1); a.op0(OP_OR); st(a, FR);
    a.op0(OP_RTS);
    a.label("RZERO");
    a.li(0); st(a, FR); a.op0(OP_RTS);

    // ---------------- FDIV: FR = FA / FB ----------------
    a.label("FDIV");
    ld(a, FA); ldd(a, FB); a.op0(OP_XOR); ldd(a, C8000); a.op0(OP_AND); st(a, SA);
    unpack_exp(a, FB, "RINF", EBV);
    unpack_exp(a, FA, "RZERO", EAV);
    unpack_man(a, FB); st(a, MB);
    unpack_man(a, FA);
    ldd(a, K16); a.op0(OP_MUL); ldd(a, MB); a.op0(OP_DIV); st(a, QV);   // digit 1
    a.op0(OP_TRA); ldd(a, K16); a.op0(OP_MUL); ldd(a, MB); a.op0(OP_DIV); st(a, T2); // digit 2
    a.op0(OP_TRA); ldd(a, K16); a.op0(OP_MUL); ldd(a, MB); a.op0(OP_DIV); st(a, RV); // digit 3
    ld(a, QV); ldd(a, K256); a.op0(OP_MUL); ldd(a, RV); a.op0(OP_ADD); st(a, RV);
    ld(a, T2); ldd(a, K16); a.op0(OP_MUL); ldd(a, RV); a.op0(OP_ADD); st(a, RV);
    ld(a, EAV); ldd(a, EBV); a.op0(OP_SUB); ldd(a, K15); a.op0(OP_ADD); st(a, EV);
    ld(a, RV); ldd(a, K4096); a.op0(OP_AND); a.br(OP_BZR, "FDSMALL");
    ld(a, RV); ldd(a, K4); a.op0(OP_DIV); st(a, RV); a.br(OP_BRA, "PACK");
    a.label("FDSMALL");
    ld(a, RV); a.op0(OP_SHR); st(a, RV);
    ld(a, EV); ldd(a, K1); a.op0(OP_SUB); st(a, EV); a.br(OP_BRA, "PACK");

    // ---------------- FSUB / FADD: FR = FA -/+ FB ----------------
    a.label("FSUB");
    ld(a, FB); ldd(a, C8000); a.op0(OP_XOR); st(a, FB);
    a.label("FADD");
    ld(a, FA); ldd(a, C7C00); a.op0(OP_AND); a.br(OP_BZR, "RETB");
    ld(a, FB); ldd(a, C7C00); a.op0(OP_AND); a.br(OP_BZR, "RETA");
    ld(a, FB); ldd(a, C7FFF); a.op0(OP_AND); st(a, T1);
    ld(a, FA); ldd(a, C7FFF); a.op0(OP_AND); ldd(a, T1); a.op0(OP_SUB);
    a.br(OP_BMI, "FASWAP"); a.br(OP_BRA, "FAGO");
    a.label("FASWAP");
    ld(a, FA); st(a, T1); ld(a, FB); st(a, FA); ld(a, T1); st(a, FB);
    a.label("FAGO");
    ld(a, FA); ldd(a, C8000); a.op0(OP_AND); st(a, SA);
    ld(a, FA); ldd(a, C7C00); a.op0(OP_AND); ldd(a, K1024); a.op0(OP_DIV); st(a, EV);
    ld(a, FB); ldd(a, C7C00); a.op0(OP_AND); ldd(a, K1024); a.op0(OP_DIV); st(a, EBV);
    unpack_man(a, FA); ldd(a, K8); a.op0(OP_MUL); st(a, MA);
    unpack_man(a, FB); ldd(a, K8); a.op0(OP_MUL); st(a, MB);
    a.li(0); st(a, STK);
    ld(a, EV); ldd(a, EBV); a.op0(OP_SUB); st(a, CNT);
    a.br(OP_BZR, "FAALN");
    ldd(a, K14); a.op0(OP_SUB); a.br(OP_BMI, "FASL");
    a.li(1); st(a, MB); a.br(OP_BRA, "FAALN");            // only the sticky bit is left
    a.label("FASL");
    ld(a, MB); ldd(a, K1); a.op0(OP_AND); ldd(a, STK); a.op0(OP_OR); st(a, STK);
    ld(a, MB); a.op0(OP_SHR); st(a, MB);
    ld(a, CNT); ldd(a, K1); a.op0(OP_SUB); st(a, CNT); a.br(OP_BZR, "FASTK");
    a.br(OP_BRA, "FASL");
    a.label("FASTK");
    ld(a, MB); ldd(a, STK); a.op0(OP_OR); st(a, MB);
    a.label("FAALN");
    ld(a, FA); ldd(a, FB); a.op0(OP_XOR); a.br(OP_BMI, "FADIFF");
    ld(a, MA); ldd(a, MB); a.op0(OP_ADD); st(a, RV);
    ldd(a, K16384); a.op0(OP_AND); a.br(OP_BZR, "FARND");
    ld(a, RV); ldd(a, K1); a.op0(OP_AND); st(a, T1);
    ld(a, RV); a.op0(OP_SHR); ldd(a, T1); a.op0(OP_OR); st(a, RV);
    ld(a, EV); a.op0(OP_INC); st(a, EV);
    a.br(OP_BRA, "FARND");
    a.label("FADIFF");
    ld(a, MA); ldd(a, MB); a.op0(OP_SUB); st(a, RV); a.br(OP_BZR, "RZERO");
    a.label("FANL");
    ld(a, RV); ldd(a, K8192); a.op0(OP_AND); a.br(OP_BZR, "FASHL");
    a.br(OP_BRA, "FARND");
    a.label("FASHL");
    ld(a, RV); a.op0(OP_SHL); st(a, RV);
    ld(a, EV); ldd(a, K1); a.op0(OP_SUB); st(a, EV); a.br(OP_BRA, "FANL");
    a.label("FARND");
    ld(a, RV); ldd(a, K8); a.op0(OP_DIV); st(a, RV); a.br(OP_BRA, "PACK");
    a.label("RETB");
    ld(a, FB); st(a, FR); a.op0(OP_RTS);
    a.label("RETA");
    ld(a, FA); st(a, FR); a.op0(OP_RTS);

    // ---------------- data ----------------
    a.org(addr_of(LEFT)); a.word(16'(xs.size()));
    a.org(addr_of(NV));   a.word(count_to_h(xs.size()));
    a.org(addr_of(C7C00));
    a.word(16'h7C00); a.word(16'h03FF); a.word(16'h0400); a.word(16'h8000);
    a.word(16'h7FFF); a.word(16'h3C00); a.word(16'd1024); a.word(16'd512);
    a.word(16'd64);   a.word(16'd15);   a.word(16'd16);   a.word(16'd2048);
    a.word(16'd8192); a.word(16'd16384); a.word(16'd4);   a.word(16'd256);
    a.word(16'd8);    a.word(16'd4096); a.word(16'd31);   a.word(16'd1);
    a.word(16'd14);
    a.org(addr_of(XARR)); foreach (xs[i]) a.word(xs[i]);
    a.org(addr_of(YARR)); foreach (ys[i]) a.word(ys[i]);
  endfunction

  // Assemble the program with its data; returns the number of errors.
  function automatic int build(bzk_asm a, logic [15:0] xs[$], logic [15:0] ys[$]);
    a.start_pass(0);
    emit(a, xs, ys);
    a.start_pass(1);
    emit(a, xs, ys);
    return a.errors + ((xs.size() > MAXN || xs.size() != ys.size() || xs.size() == 0) ? 1 : 0);
  endfunction

endpackage
