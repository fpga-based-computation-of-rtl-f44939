// ffd_pkg: shared constants, types and constant functions of the B-spline
// free-form deformation (FFD) pipeline.
//
// The arithmetic uses a custom floating-point format {sign, exponent,
// mantissa} with a hidden leading one and a biased exponent. The default is
// an 8-bit exponent and a 12-bit mantissa, the precision the design is built
// around. An all-zero exponent encodes zero; there are no denormals,
// infinities or NaNs (results that overflow saturate to the largest finite
// value, results that underflow flush to zero) -- this is this design's own
// choice. Input coordinates are unsigned fixed-point numbers in control-lattice
// units: an integer part (lattice cell index) and a 10-bit fraction that
// addresses the 1024-entry B-spline tables. As an alternative the datapath
// can be built in fixed point (parameter FIXED): a two's-complement word of
// the same width, read as sign, EXP_W integer bits and MAN_W fraction bits.
package ffd_pkg;

  // Default number formats.
  localparam int unsigned EXP_W  = 8;   // floating-point exponent bits
  localparam int unsigned MAN_W  = 12;  // floating-point mantissa bits
  localparam int unsigned INT_W  = 8;   // coordinate integer bits
  localparam int unsigned FRAC_W = 10;  // coordinate fraction bits (1024-entry LUT)

  // Number of displacement components processed interleaved in every pipeline.
  localparam int unsigned NCOMP = 3;

  typedef enum logic [1:0] {
    COMP_X = 2'd0,
    COMP_Y = 2'd1,
    COMP_Z = 2'd2
  } comp_e;

  // Per-term control information that travels down the pipeline with the
  // data: first/last term of a pixel and the displacement component.
  typedef struct packed {
    logic  valid;
    logic  first;
    logic  last;
    comp_e comp;
  } term_tag_t;

  // Value 1.0 in a format with exponent width ew (returned right-aligned in
  // 64 bits: exponent = bias, mantissa = 0, sign = 0).
  function automatic logic [63:0] fp_one(int unsigned ew, int unsigned mw);
    logic [63:0] r;
    r = 64'((64'(1) << (ew - 1)) - 1) << mw;
    return r;
  endfunction

  // Numerator of the cubic B-spline basis function B_basis(u), u = f / 2**fw:
  // with S = 2**fw, B_basis(u) = num / (6 * S^3) where num is an exact integer.
  function automatic longint bspline_num(int unsigned basis, longint unsigned f,
                                         int unsigned fw);
    longint s, fl;
    s  = longint'(1) << fw;
    fl = (basis == 0) ? s - longint'(f) : longint'(f);   // B0(u) = B3(1-u)
    case (basis)
      0, 3:    return fl * fl * fl;
      1:       return 3 * fl * fl * fl - 6 * s * fl * fl + 4 * s * s * s;
      default: return -3 * fl * fl * fl + 3 * s * fl * fl + 3 * s * s * fl + s * s * s;
    endcase
  endfunction

  // B_basis(f / 2**fw) in the fixed-point format with fb fraction bits,
  // rounded to nearest (values lie in [0, 2/3], so no sign is needed).
  function automatic logic [63:0] bspline_fx(int unsigned basis, longint unsigned f,
                                             int unsigned fw, int unsigned fb);
    longint num;
    num = bspline_num(basis, f, fw);
    return 64'(((num << fb) + (longint'(3) << (3 * fw))) / (longint'(6) << (3 * fw)));
  endfunction

  // Value 1.0 in the datapath format: floating point, or fixed point with mw
  // fraction bits.
  function automatic logic [63:0] num_one(bit fixed, int unsigned ew, int unsigned mw);
    return fixed ? (64'd1 << mw) : fp_one(ew, mw);
  endfunction

  // Cubic B-spline basis function B_basis(u) for u = f / 2**fw, rounded to
  // the floating-point format (ew, mw), right-aligned in 64 bits.
  //   B0 = (1-u)^3/6, B1 = (3u^3-6u^2+4)/6, B2 = (-3u^3+3u^2+3u+1)/6, B3 = u^3/6
  function automatic logic [63:0] bspline_fp(int unsigned basis, longint unsigned f,
                                             int unsigned fw, int unsigned ew,
                                             int unsigned mw);
    longint num, r, m;
    int p, e;
    num = bspline_num(basis, f, fw);
    // value = r / 2**(3*fw + 25) with r = num * 2**24 / 3; p = leading one of r
    r = (num << 24) / 3;
    p = $clog2(r + 1) - 1;
    e = p - (3 * int'(fw) + 25) + (1 << (ew - 1)) - 1;
    // 1.m rounded to nearest on the first dropped bit
    m = ((r >> (p - int'(mw) - 1)) + 1) >> 1;
    if ((m >> (mw + 1)) != 0) begin
      m = m >> 1;
      e = e + 1;
    end
    if (num <= 0 || e <= 0) return 64'd0;
    return (64'(e) << mw) | (64'(m) & ((64'd1 << mw) - 1));
  endfunction

endpackage
