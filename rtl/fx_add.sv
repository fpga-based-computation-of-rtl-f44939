// fx_add: pipelined adder for the fixed-point alternative of the FFD
// datapath (same word as fx_mult: two's complement, sign + INT_W integer +
// FRAC_W fraction bits).
//
// Three stages, one operand pair per cycle, sum after 3 cycles: stage 1
// registers the operands, stage 2 adds them one bit wider, stage 3 saturates
// the sum to the word range. The three-cycle latency is the document's and
// matters in the same way as for fp_add: the accumulation loop of the FFD
// pipeline is closed around it. Register split and saturation are this
// design's own choices.
module fx_add #(
  parameter int unsigned INT_W  = ffd_pkg::EXP_W,
  parameter int unsigned FRAC_W = ffd_pkg::MAN_W
) (
  input  logic                    clk,
  input  logic [INT_W+FRAC_W:0]   a,
  input  logic [INT_W+FRAC_W:0]   b,
  output logic [INT_W+FRAC_W:0]   s
);
  localparam int unsigned W = INT_W + FRAC_W + 1;

  logic signed [W-1:0] s1_a, s1_b;
  logic signed [W:0]   s2_sum;
  logic [W-1:0]        s3_res;

  always_ff @(posedge clk) begin
    s1_a   <= $signed(a);
    s1_b   <= $signed(b);
    s2_sum <= (W+1)'(s1_a) + (W+1)'(s1_b);
    // the two top bits differ exactly when the sum left the word range
    if (s2_sum[W] != s2_sum[W-1])
      s3_res <= s2_sum[W] ? {1'b1, {(W-1){1'b0}}} : {1'b0, {(W-1){1'b1}}};
    else
      s3_res <= s2_sum[W-1:0];
  end

  assign s = s3_res;

endmodule
