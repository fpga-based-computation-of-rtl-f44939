// ffd_tb_pkg: reference arithmetic shared by the FFD testbenches.
// Everything here is computed with double-precision reals, independently of
// the RTL: decoding of the custom floating-point format, the cubic B-spline
// basis functions, and the deterministic pseudo-random control lattice used
// by the control-point memory model (zero on the one-point padding border),
// in the floating-point format or in the fixed-point alternative.
package ffd_tb_pkg;

  // value of a custom floating-point word {s, e[ew], m[mw]}
  function automatic real fp2real(logic [63:0] w, int ew, int mw);
    int   e, bias;
    real  m, v;
    logic s;
    bias = (1 << (ew - 1)) - 1;
    e    = int'((w >> mw) & ((64'd1 << ew) - 1));
    s    = w[ew + mw];
    if (e == 0) return 0.0;
    m = 1.0 + real'(w & ((64'd1 << mw) - 1)) / real'(64'd1 << mw);
    v = m * (2.0 ** (e - bias));
    return s ? -v : v;
  endfunction

  // assemble a word from fields
  function automatic logic [63:0] mkfp(logic s, int e, longint m, int ew, int mw);
    return (64'(s) << (ew + mw)) | (64'(e) << mw) | 64'(m);
  endfunction

  function automatic real bspline(int i, real u);
    case (i)
      0:       return (1.0 - u) * (1.0 - u) * (1.0 - u) / 6.0;
      1:       return (3.0 * u * u * u - 6.0 * u * u + 4.0) / 6.0;
      2:       return (-3.0 * u * u * u + 3.0 * u * u + 3.0 * u + 1.0) / 6.0;
      default: return u * u * u / 6.0;
    endcase
  endfunction

  function automatic int unsigned hash4(int unsigned a, int unsigned b,
                                        int unsigned c, int unsigned d);
    int unsigned h;
    h = a * 32'h9E3779B1 ^ b * 32'h85EBCA77 ^ c * 32'hC2B2AE3D ^ d * 32'h27D4EB2F;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // control point Phi_c[k][j][i] of a lattice that has nx*ny*nz points
  // including the zero border; values +-[0.25, 2)
  function automatic logic [63:0] phi_word(int unsigned seed, int c, int k, int j, int i,
                                           int nx, int ny, int nz, int dim,
                                           int ew, int mw);
    int unsigned h;
    int          bias;
    if (i <= 0 || i >= nx - 1 || j <= 0 || j >= ny - 1) return 64'd0;
    if (dim == 3 && (k <= 0 || k >= nz - 1)) return 64'd0;
    if (dim == 2 && k != 0) return 64'd0;
    h    = hash4(seed, c, k * 4096 + j, i);
    bias = (1 << (ew - 1)) - 1;
    return mkfp(h[31], bias - 2 + int'(h[30:29] % 3), longint'(h[27:0]) % (longint'(1) << mw),
                ew, mw);
  endfunction

  // value of a fixed-point word: two's complement, 1 + iw + fw bits, fw of
  // them fraction
  function automatic real fx2real(logic [63:0] w, int iw, int fw);
    longint v;
    v = longint'(w & ((64'd1 << (1 + iw + fw)) - 1));
    if (w[iw + fw]) v = v - (longint'(1) << (1 + iw + fw));
    return real'(v) / real'(longint'(1) << fw);
  endfunction

  // value of a datapath word in either format
  function automatic real word2real(logic [63:0] w, bit fixed, int ew, int mw);
    return fixed ? fx2real(w, ew, mw) : fp2real(w, ew, mw);
  endfunction

  // the control point of phi_word in either format (fixed point: the same
  // value rounded to mw fraction bits)
  function automatic logic [63:0] phi_value(int unsigned seed, int c, int k, int j, int i,
                                            int nx, int ny, int nz, int dim,
                                            int ew, int mw, bit fixed);
    logic [63:0] w;
    longint      v;
    w = phi_word(seed, c, k, j, i, nx, ny, nz, dim, ew, mw);
    if (!fixed) return w;
    v = longint'($floor(fp2real(w, ew, mw) * real'(longint'(1) << mw) + 0.5));
    return 64'(v) & ((64'd1 << (1 + ew + mw)) - 1);
  endfunction

endpackage
