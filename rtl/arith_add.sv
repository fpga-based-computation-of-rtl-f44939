// arith_add: the pipeline's adder (ACC_P), in the number format the FIXED
// parameter selects: the custom floating-point fp_add (FIXED = 0, the
// default) or the fixed-point fx_add (FIXED = 1). Both have a latency of 3
// cycles, which the accumulation loops around this adder depend on. The
// document builds the pipeline with either format; making the choice one
// parameter is this design's own.
module arith_add #(
  parameter bit          FIXED = 1'b0,
  parameter int unsigned EXP_W = ffd_pkg::EXP_W,   // integer bits when FIXED
  parameter int unsigned MAN_W = ffd_pkg::MAN_W    // fraction bits when FIXED
) (
  input  logic                   clk,
  input  logic [EXP_W+MAN_W:0]   a,
  input  logic [EXP_W+MAN_W:0]   b,
  output logic [EXP_W+MAN_W:0]   s
);
  if (FIXED) begin : g_fx
    fx_add #(.INT_W(EXP_W), .FRAC_W(MAN_W)) u_add (.clk, .a, .b, .s);
  end else begin : g_fp
    fp_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) u_add (.clk, .a, .b, .s);
  end
endmodule
