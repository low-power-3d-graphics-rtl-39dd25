// tb_pkg: helpers shared by the testbenches: conversion between the design's
// number formats and real, tolerance comparison, and random operands.
package tb_pkg;
  import lgp_pkg::*;

  function automatic real f2r(input flp_t x);
    real m;
    if (x[30:23] == 8'd0) return 0.0;
    m = (1.0 + real'(x[22:0]) / 8388608.0) * $pow(2.0, real'(int'(x[30:23]) - 127));
    return x[31] ? -m : m;
  endfunction

  // real -> binary32 layout, truncated (values below the normal range become 0)
  function automatic flp_t r2f(input real r);
    real a;
    int  e;
    logic [22:0] f;
    a = (r < 0.0) ? -r : r;
    if (a < $pow(2.0, -126.0)) return '0;
    e = $rtoi($floor($ln(a) / $ln(2.0)));
    if (a / $pow(2.0, real'(e)) >= 2.0) e++;
    if (a / $pow(2.0, real'(e)) < 1.0) e--;
    if (e > 127) return {r < 0.0, FLP_MAX[30:0]};
    f = 23'($rtoi($floor((a / $pow(2.0, real'(e)) - 1.0) * 8388608.0)));
    return {r < 0.0, 8'(e + 127), f};
  endfunction

  function automatic real l2r(input lns_t x);
    return real'(x.l) / real'(1 << LNS_FRAC);
  endfunction

  // LNS word of a real value (exact log2, used to build reference operands)
  function automatic lns_t r2l(input real r);
    lns_t x;
    real  a;
    a   = (r < 0.0) ? -r : r;
    x.s = (r < 0.0);
    x.z = (a == 0.0);
    x.l = x.z ? '0 : LNS_W'($rtoi($floor($ln(a) / $ln(2.0) * real'(1 << LNS_FRAC))));
    return x;
  endfunction

  function automatic bit close(input real got, input real exp, input real rel, input real absl);
    real d, m;
    d = got - exp; if (d < 0.0) d = -d;
    m = exp; if (m < 0.0) m = -m;
    return d <= rel * m + absl;
  endfunction

  // random real with magnitude 2^[lo,hi) and random sign
  function automatic real rnd(input int lo, input int hi, input bit pos = 0);
    real m;
    int  e;
    m = 1.0 + real'($urandom_range(0, 32'hFFFFFF)) / 16777216.0;
    e = lo + int'($urandom_range(0, hi - lo - 1));
    m = m * $pow(2.0, real'(e));
    if (!pos && $urandom_range(0, 1) == 1) m = -m;
    return m;
  endfunction
  // ------------------------------------------------------------ shader assembly
  function automatic src_t S(input src_bank_e b, input int a, input logic [7:0] swz = SWZ_XYZW,
                             input bit neg = 0);
    return '{bank: b, addr: 8'(a), swz: swz, neg: neg};
  endfunction

  function automatic instr_t I(input vs_op_e op, input int dst = 0, input bit vob = 0,
                               input src_t s0 = '0, input src_t s1 = '0, input src_t s2 = '0,
                               input bit sub = 0, input logic [3:0] wm = 4'hF, input int tgt = 0);
    instr_t i;
    i = '0;
    i.op = op; i.dst = 8'(dst); i.dst_vob = vob; i.wmask = wm; i.sub = sub;
    i.src0 = s0; i.src1 = s1; i.src2 = s2; i.target = 7'(tgt);
    return i;
  endfunction

  localparam int LOOP_PC = 12;

  // Transform-and-lighting style test program. Setup: load four matrix
  // columns from the matrix FIFO, convert them to LNS and store them back to
  // constants 4..7. Per vertex: MAT position, DOT/MUL/MUL/MAD lighting chain
  // (two log-domain forwards), POW, DSQ, a sine series with ELM, LOG, ADD
  // with swizzle/negate, DIV.
  function automatic void shader_prog(ref instr_t p [$]);
    p.delete();
    for (int j = 0; j < 4; j++) p.push_back(I(V_LDM, j));                          // 0..3
    for (int j = 0; j < 4; j++) p.push_back(I(V_LNS, j, 0, S(B_CMEM, j)));          // 4..7
    for (int j = 0; j < 4; j++) p.push_back(I(V_STC, 4 + j, 0, S(B_GPR, j)));       // 8..11
    p.push_back(I(V_WAITV));                                                          // 12
    p.push_back(I(V_MAT, 0, 1, S(B_VIB, 0), S(B_CMEM, 4)));                           // 13
    p.push_back(I(V_DOT, 4, 0, S(B_VIB, 1), S(B_CMEM, 8)));                           // 14
    p.push_back(I(V_MUL, 5, 0, S(B_GPR, 4), S(B_CMEM, 9)));                           // 15 hazard
    p.push_back(I(V_MUL, 6, 0, S(B_GPR, 5), S(B_VIB, 2)));                            // 16 fwd
    p.push_back(I(V_MAD, 1, 1, S(B_GPR, 6), S(B_CMEM, 9), S(B_CMEM, 10)));            // 17 fwd
    p.push_back(I(V_POW, 7, 0, S(B_VIB, 3), S(B_CMEM, 11)));                          // 18
    p.push_back(I(V_DSQ, 2, 1, S(B_VIB, 2), S(B_GPR, 7)));                            // 19 hazard
    p.push_back(I(V_ELM, 3, 1, S(B_VIB, 3, 8'b11_00_00_00), S(B_CMEM, 12), S(B_CMEM, 13))); // 20
    p.push_back(I(V_LOG, 4, 1, S(B_VIB, 3)));                                         // 21
    p.push_back(I(V_ADD, 5, 1, S(B_VIB, 0), S(B_VIB, 1, 8'b00_01_10_11, 1), '0, 1));  // 22
    p.push_back(I(V_DIV, 6, 1, S(B_VIB, 0), S(B_CMEM, 9, SWZ_XYZW, 1)));              // 23
    p.push_back(I(V_CRS, 7, 1, S(B_VIB, 1), S(B_CMEM, 8)));                           // 24
    p.push_back(I(V_END, 0, 0, '0, '0, '0, 0, 4'hF, LOOP_PC));                        // 25
  endfunction

  // constants used by the program (index 8..13), as real values
  typedef real rvec_t [4];
  typedef struct {
    rvec_t m [4];        // matrix columns
    rvec_t l, k, b, e;   // c8 light direction, c9 scale, c10 bias, c11 exponents
    rvec_t kk, cc;       // c12 series powers, c13 series coefficients
  } consts_t;

  function automatic void make_consts(ref consts_t c);
    for (int j = 0; j < 4; j++) for (int i = 0; i < 4; i++) c.m[j][i] = rnd(-3, 2);
    for (int i = 0; i < 4; i++) begin
      c.l[i] = rnd(-2, 1); c.k[i] = rnd(-2, 2); c.b[i] = rnd(-2, 2);
    end
    c.e  = '{2.0, 0.5, 3.0, 1.5};
    c.kk = '{3.0, 5.0, 7.0, 9.0};
    c.cc = '{-1.0/6.0, 1.0/120.0, -1.0/5040.0, 1.0/362880.0};
  endfunction

  function automatic logic [127:0] pack4(input rvec_t v);
    return {r2f(v[3]), r2f(v[2]), r2f(v[1]), r2f(v[0])};
  endfunction
  function automatic logic [127:0] pack4l(input rvec_t v);
    return {r2l(v[3]), r2l(v[2]), r2l(v[1]), r2l(v[0])};
  endfunction
  function automatic void unpack4(input logic [127:0] w, output rvec_t v);
    for (int i = 0; i < 4; i++) v[i] = f2r(w[32*i +: 32]);
  endfunction

  // random vertex: position, normal, colour, (s, a, b, s) with s in the sine range
  function automatic void make_vertex(ref rvec_t a [4]);
    real s;
    for (int i = 0; i < 3; i++) a[0][i] = rnd(-4, 4);
    a[0][3] = 1.0;
    for (int i = 0; i < 4; i++) begin a[1][i] = rnd(-2, 1); a[2][i] = rnd(-3, 1, 1); end
    s = 0.05 + 1.4 * real'($urandom_range(0, 1000)) / 1000.0;
    a[3] = '{s, rnd(-2, 2, 1), rnd(-2, 2, 1), s};
  endfunction

  // reference results of the per-vertex program (VOB entries 0..7) and a
  // tolerance for each component
  function automatic void ref_vertex(input consts_t c, input rvec_t a [4], ref rvec_t r [8], ref rvec_t t [8]);
    real d, dm, s, sm, xx;
    for (int i = 0; i < 4; i++) begin
      r[0][i] = 0; t[0][i] = 0;
      for (int j = 0; j < 4; j++) begin r[0][i] += c.m[j][i] * a[0][j]; t[0][i] += 3e-3 * ab(c.m[j][i] * a[0][j]); end
    end
    d = 0; dm = 0;
    for (int i = 0; i < 4; i++) begin d += a[1][i] * c.l[i]; dm += ab(a[1][i] * c.l[i]); end
    for (int i = 0; i < 4; i++) begin
      real m;
      m = d * c.k[i] * a[2][i] * c.k[i];
      r[1][i] = m + c.b[i];
      t[1][i] = 1e-2 * ab(dm * c.k[i] * a[2][i] * c.k[i]) + 1e-5 * ab(c.b[i]);
    end
    for (int i = 0; i < 4; i++) begin
      real pw;
      pw = $pow(a[3][i], c.e[i]);
      r[2][i] = a[2][i] / $sqrt(pw);
      t[2][i] = 6e-3 * ab(r[2][i]);
    end
    xx = a[3][0];
    s = a[3][3]; sm = 0;
    for (int i = 0; i < 4; i++) begin
      s += c.cc[i] * $pow(xx, c.kk[i]);
      sm += ab(c.cc[i] * $pow(xx, c.kk[i]));
    end
    for (int i = 0; i < 4; i++) begin r[3][i] = s; t[3][i] = 1e-2 * sm + 1e-5 * xx; end
    for (int i = 0; i < 4; i++) begin r[4][i] = $ln(a[3][i]) / $ln(2.0); t[4][i] = 1e-3; end
    for (int i = 0; i < 4; i++) begin
      r[5][i] = a[0][i] + a[1][3-i];
      t[5][i] = 1e-6 * (ab(a[0][i]) + ab(a[1][3-i])) + 1e-30;
    end
    for (int i = 0; i < 4; i++) begin r[6][i] = -a[0][i] / c.k[i]; t[6][i] = 3e-3 * ab(r[6][i]); end
    for (int i = 0; i < 3; i++) begin
      real p, q;
      p = a[1][(i + 1) % 3] * c.l[(i + 2) % 3];
      q = a[1][(i + 2) % 3] * c.l[(i + 1) % 3];
      r[7][i] = p - q; t[7][i] = 3e-3 * (ab(p) + ab(q)) + 1e-30;
    end
    r[7][3] = 0.0; t[7][3] = 1e-30;
  endfunction

  function automatic real ab(input real v);
    return v < 0 ? -v : v;
  endfunction

endpackage
