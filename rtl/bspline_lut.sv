// bspline_lut: precalculated cubic B-spline basis functions (LUT B-spline).
//
// Holds the four basis functions B0..B3 of the uniform cubic B-spline,
// 2**FRAC_W entries each (1024 by default), in the custom floating-point
// format:
//   B0(u) = (1-u)^3/6            B1(u) = (3u^3 - 6u^2 + 4)/6
//   B2(u) = (-3u^3+3u^2+3u+1)/6  B3(u) = u^3/6,   u = frac / 2**FRAC_W
// The contents are computed at elaboration from these formulas (exact
// integer arithmetic, rounded to nearest), so no table file is needed.
// One synchronous read per cycle: {basis, frac} is registered and the value
// appears one cycle later. The FFD pipeline instantiates three copies so that
// Bi(u), Bj(v) and Bk(w) can be read in the same cycle. Table size and
// formulas follow the document; the one-cycle synchronous read and the
// floating-point storage format are this design's choices. With FIXED = 1
// the tables hold the same values as fixed-point words with MAN_W fraction
// bits (rounded to nearest), for the fixed-point datapath.
module bspline_lut #(
  parameter bit          FIXED  = 1'b0,
  parameter int unsigned FRAC_W = ffd_pkg::FRAC_W,
  parameter int unsigned EXP_W  = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W  = ffd_pkg::MAN_W
) (
  input  logic                 clk,
  input  logic [1:0]           basis,   // which basis function, 0..3
  input  logic [FRAC_W-1:0]    frac,    // fraction u of the coordinate
  output logic [EXP_W+MAN_W:0] value    // B_basis(u), one cycle later
);
  localparam int unsigned W     = EXP_W + MAN_W + 1;
  localparam int unsigned DEPTH = 4 << FRAC_W;

  logic [W-1:0] rom [DEPTH];

  initial begin
    for (int unsigned a = 0; a < DEPTH; a++)
      rom[a] = FIXED ? W'(ffd_pkg::bspline_fx(a >> FRAC_W, longint'(a) % (longint'(1) << FRAC_W),
                                              FRAC_W, MAN_W))
                     : W'(ffd_pkg::bspline_fp(a >> FRAC_W, longint'(a) % (longint'(1) << FRAC_W),
                                              FRAC_W, EXP_W, MAN_W));
  end

  always_ff @(posedge clk) value <= rom[{basis, frac}];

endmodule
