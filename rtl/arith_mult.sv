// arith_mult: the pipeline's multiplier (MULT_P), in the number format the
// FIXED parameter selects: the custom floating-point fp_mult (FIXED = 0, the
// default) or the fixed-point fx_mult (FIXED = 1). Both take 21-bit words by
// default and have the same LAT-cycle latency, so the datapath around them
// is the same. The document builds the pipeline with either format; making
// the choice one parameter is this design's own.
module arith_mult #(
  parameter bit          FIXED = 1'b0,
  parameter int unsigned EXP_W = ffd_pkg::EXP_W,   // integer bits when FIXED
  parameter int unsigned MAN_W = ffd_pkg::MAN_W,   // fraction bits when FIXED
  parameter int unsigned LAT   = 6
) (
  input  logic                   clk,
  input  logic [EXP_W+MAN_W:0]   a,
  input  logic [EXP_W+MAN_W:0]   b,
  output logic [EXP_W+MAN_W:0]   p
);
  if (FIXED) begin : g_fx
    fx_mult #(.INT_W(EXP_W), .FRAC_W(MAN_W), .LAT(LAT)) u_mul (.clk, .a, .b, .p);
  end else begin : g_fp
    fp_mult #(.EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(LAT)) u_mul (.clk, .a, .b, .p);
  end
endmodule
