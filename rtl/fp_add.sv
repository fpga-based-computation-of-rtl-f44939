// fp_add: pipelined adder for the custom floating-point format (ACC_P).
// Word layout is {sign, exponent[EXP_W], mantissa[MAN_W]} with a hidden
// leading one; exponent 0 is zero.
//
// Three stages, one new operand pair per cycle, sum after 3 cycles:
//   1. order the operands by magnitude and align the smaller one to the
//      larger exponent, keeping GUARD extra low bits (bits shifted beyond
//      them are dropped, there is no sticky bit);
//   2. add or subtract the aligned mantissas;
//   3. normalise with a leading-one search, round to nearest (ties away from
//      zero), saturate on overflow and flush to zero on underflow.
// The three-cycle latency is the document's. It matters: the FFD pipeline
// closes its accumulation loop around this adder and interleaves three
// independent sums (x, y, z), one per pipeline slot. The internal
// organisation and rounding are this design's own choices.
module fp_add #(
  parameter int unsigned EXP_W = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W = ffd_pkg::MAN_W
) (
  input  logic                   clk,
  input  logic [EXP_W+MAN_W:0]   a,
  input  logic [EXP_W+MAN_W:0]   b,
  output logic [EXP_W+MAN_W:0]   s
);
  localparam int unsigned W     = EXP_W + MAN_W + 1;
  localparam int unsigned GUARD = 3;
  localparam int unsigned MW    = MAN_W + 1 + GUARD;   // aligned mantissa width
  localparam int unsigned EMAX  = (1 << EXP_W) - 1;

  // Stage 1: order and align
  logic             a_big;
  logic [EXP_W-1:0] ea, eb, el, es, ediff;
  logic [MW-1:0]    ma, mb, ml, ms;
  logic             sl, ss;

  always_comb begin
    ea    = a[W-2:MAN_W];
    eb    = b[W-2:MAN_W];
    ma    = (ea == '0) ? '0 : {1'b1, a[MAN_W-1:0], GUARD'(0)};
    mb    = (eb == '0) ? '0 : {1'b1, b[MAN_W-1:0], GUARD'(0)};
    a_big = (a[W-2:0] >= b[W-2:0]);
    el    = a_big ? ea : eb;
    es    = a_big ? eb : ea;
    ml    = a_big ? ma : mb;
    ms    = a_big ? mb : ma;
    sl    = a_big ? a[W-1] : b[W-1];
    ss    = a_big ? b[W-1] : a[W-1];
    ediff = el - es;
  end

  logic             s1_sign, s1_sub;
  logic [EXP_W-1:0] s1_exp;
  logic [MW-1:0]    s1_ml, s1_ms;

  always_ff @(posedge clk) begin
    s1_sign <= sl;
    s1_sub  <= sl ^ ss;
    s1_exp  <= el;
    s1_ml   <= ml;
    s1_ms   <= (ediff >= EXP_W'(MW)) ? '0 : (ms >> ediff);
  end

  // Stage 2: add / subtract (larger magnitude first, so never negative)
  logic             s2_sign;
  logic [EXP_W-1:0] s2_exp;
  logic [MW:0]      s2_sum;

  always_ff @(posedge clk) begin
    s2_sign <= s1_sign;
    s2_exp  <= s1_exp;
    s2_sum  <= s1_sub ? ({1'b0, s1_ml} - {1'b0, s1_ms}) : ({1'b0, s1_ml} + {1'b0, s1_ms});
  end

  // Stage 3: normalise and round
  int                      lead;
  logic [MW:0]             norm;
  logic [MAN_W+1:0]        rman;
  logic signed [EXP_W+1:0] rexp;
  logic [W-1:0]            res;

  always_comb begin
    lead = 0;
    for (int i = 0; i <= int'(MW); i++) if (s2_sum[i]) lead = i;
    // shift so that the leading one lands on bit MW
    norm = s2_sum << (int'(MW) - lead);
    // sum[MW-1] is the hidden-one position of an un-carried result
    rexp = $signed({2'b00, s2_exp}) + (EXP_W+2)'(lead - (int'(MW) - 1));
    rman = {1'b0, norm[MW:MW-MAN_W]} + (MAN_W+2)'(norm[MW-MAN_W-1]);
    if (rman[MAN_W+1]) begin
      rman = rman >> 1;
      rexp = rexp + 1;
    end
    if (s2_sum == '0 || rexp <= 0)
      res = '0;
    else if (rexp > $signed((EXP_W+2)'(EMAX)))
      res = {s2_sign, EXP_W'(EMAX), {MAN_W{1'b1}}};
    else
      res = {s2_sign, rexp[EXP_W-1:0], rman[MAN_W-1:0]};
  end

  always_ff @(posedge clk) s <= res;

endmodule
