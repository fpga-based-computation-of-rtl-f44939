// fp_mult: pipelined multiplier for the custom floating-point format
// (MULT_P). Word layout is {sign, exponent[EXP_W], mantissa[MAN_W]} with a
// hidden leading one and exponent bias 2**(EXP_W-1)-1; exponent 0 is zero.
//
// Stage 1 decodes the operands and adds the exponents, stage 2 forms the
// (MAN_W+1)x(MAN_W+1) mantissa product, stage 3 normalises and rounds to
// nearest (ties away from zero), saturating on overflow and flushing to zero
// on underflow. The remaining LAT-3 stages only delay the result, leaving
// the synthesis tool room to retime the multiplier into them. A new operand
// pair is accepted every cycle; the product appears LAT cycles later. The
// six-cycle default latency is the document's; the stage split, rounding and
// the handling of overflow/underflow are this design's own.
module fp_mult #(
  parameter int unsigned EXP_W = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W = ffd_pkg::MAN_W,
  parameter int unsigned LAT   = 6
) (
  input  logic                   clk,
  input  logic [EXP_W+MAN_W:0]   a,
  input  logic [EXP_W+MAN_W:0]   b,
  output logic [EXP_W+MAN_W:0]   p
);
  localparam int unsigned W    = EXP_W + MAN_W + 1;
  localparam int unsigned BIAS = (1 << (EXP_W - 1)) - 1;
  localparam int unsigned EMAX = (1 << EXP_W) - 1;

  // Stage 1: decode
  logic                 s1_sign, s1_zero;
  logic signed [EXP_W+1:0] s1_exp;
  logic [MAN_W:0]       s1_ma, s1_mb;

  always_ff @(posedge clk) begin
    s1_sign <= a[W-1] ^ b[W-1];
    s1_zero <= (a[W-2:MAN_W] == '0) || (b[W-2:MAN_W] == '0);
    s1_exp  <= $signed({2'b00, a[W-2:MAN_W]}) + $signed({2'b00, b[W-2:MAN_W]})
               - $signed((EXP_W+2)'(BIAS));
    s1_ma   <= {1'b1, a[MAN_W-1:0]};
    s1_mb   <= {1'b1, b[MAN_W-1:0]};
  end

  // Stage 2: mantissa product
  logic                    s2_sign, s2_zero;
  logic signed [EXP_W+1:0] s2_exp;
  logic [2*MAN_W+1:0]      s2_prod;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_zero <= s1_zero;
    s2_exp  <= s1_exp;
    s2_prod <= s1_ma * s1_mb;
  end

  // Stage 3: normalise, round, range check
  logic [MAN_W+1:0]        n_man;   // rounded 1.m with one carry bit
  logic signed [EXP_W+1:0] n_exp;
  logic [W-1:0]            n_res;

  always_comb begin
    if (s2_prod[2*MAN_W+1]) begin
      n_man = {1'b0, s2_prod[2*MAN_W+1:MAN_W+1]} + (MAN_W+2)'(s2_prod[MAN_W]);
      n_exp = s2_exp + 1;
    end else begin
      n_man = {1'b0, s2_prod[2*MAN_W:MAN_W]} + (MAN_W+2)'(s2_prod[MAN_W-1]);
      n_exp = s2_exp;
    end
    if (n_man[MAN_W+1]) begin
      n_man = n_man >> 1;
      n_exp = n_exp + 1;
    end
    if (s2_zero || n_exp <= 0)
      n_res = '0;
    else if (n_exp > $signed((EXP_W+2)'(EMAX)))
      n_res = {s2_sign, EXP_W'(EMAX), {MAN_W{1'b1}}};
    else
      n_res = {s2_sign, n_exp[EXP_W-1:0], n_man[MAN_W-1:0]};
  end

  // Stage 3 register followed by LAT-3 delay stages
  logic [W-1:0] dly [LAT-2];

  always_ff @(posedge clk) begin
    dly[0] <= n_res;
    for (int i = 1; i < LAT - 2; i++) dly[i] <= dly[i-1];
  end

  assign p = dly[LAT-3];

  initial assert (LAT >= 3) else $error("fp_mult: LAT must be at least 3");

endmodule
