// fx_mult: pipelined multiplier for the fixed-point alternative of the FFD
// datapath. A word is a two's-complement number of 1 + INT_W + FRAC_W bits:
// a sign, INT_W integer bits and FRAC_W fraction bits (8 and 12 by default,
// so a word has the same 21 bits as the floating-point word and the two
// formats share every port).
//
// Stage 1 registers the operands, stage 2 forms the full signed product,
// stage 3 rounds it back to FRAC_W fraction bits (to nearest, ties towards
// plus infinity) and saturates it to the word range. The remaining LAT-3
// stages only delay the result. One operand pair per cycle, product LAT
// cycles later. The fixed-point option, its 8/12 split and the six-cycle
// latency follow the document; the sign bit on top of the integer bits, the
// rounding and the saturation are this design's own choices.
module fx_mult #(
  parameter int unsigned INT_W  = ffd_pkg::EXP_W,
  parameter int unsigned FRAC_W = ffd_pkg::MAN_W,
  parameter int unsigned LAT    = 6
) (
  input  logic                    clk,
  input  logic [INT_W+FRAC_W:0]   a,
  input  logic [INT_W+FRAC_W:0]   b,
  output logic [INT_W+FRAC_W:0]   p
);
  localparam int unsigned W = INT_W + FRAC_W + 1;

  // Stage 1: operands
  logic signed [W-1:0] s1_a, s1_b;
  always_ff @(posedge clk) begin
    s1_a <= $signed(a);
    s1_b <= $signed(b);
  end

  // Stage 2: full product
  logic signed [2*W-1:0] s2_prod;
  always_ff @(posedge clk) s2_prod <= s1_a * s1_b;

  // Stage 3: round and saturate
  logic signed [2*W-1:0] r;
  logic [W-1:0]          n_res;
  always_comb begin
    r = (s2_prod + $signed((2*W)'(1) << (FRAC_W - 1))) >>> FRAC_W;
    if (r > $signed((2*W)'({1'b0, {(W-1){1'b1}}})))
      n_res = {1'b0, {(W-1){1'b1}}};
    else if (r < -$signed((2*W)'({1'b1, {(W-1){1'b0}}})))
      n_res = {1'b1, {(W-1){1'b0}}};
    else
      n_res = r[W-1:0];
  end

  // Stage 3 register followed by LAT-3 delay stages
  logic [W-1:0] dly [LAT-2];
  always_ff @(posedge clk) begin
    dly[0] <= n_res;
    for (int i = 1; i < LAT - 2; i++) dly[i] <= dly[i-1];
  end
  assign p = dly[LAT-3];

  initial assert (LAT >= 3 && FRAC_W >= 1) else $error("fx_mult: LAT >= 3, FRAC_W >= 1");

endmodule
