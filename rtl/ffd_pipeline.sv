// ffd_pipeline: one single-channel pipelined free-form deformation core.
//
// For every pixel coordinate (x, y[, z]) in control-lattice units it computes
// the B-spline FFD displacement of each component c in {x, y, z}:
//   T_c = sum_{k,j,i} Bi(u) * Bj(v) * Bk(w) * Phi_c[n+k][m+j][l+i]
// over the 4**DIM control points around the pixel, in the custom
// floating-point format, or with FIXED = 1 in the fixed-point format that the
// document offers as the alternative (same word width, same latencies).
//
// Stages:
//   1  ffd_stage1: de-interleave, split integer/fraction, run the
//      condition-free loop, read the B-spline tables and the control-point
//      memory (one term-component per cycle).
//   2  two multipliers in parallel: Bi(u)*Bj(v) and Bk(w)*Phi_c (MUL_LAT).
//   3  one multiplier: the product of the two (MUL_LAT).
//   4  one adder closed into an accumulation loop (3 cycles). Because the
//      adder takes three cycles and the x, y and z terms are interleaved
//      cycle by cycle, each component's running sum comes back out of the
//      adder exactly when that component's next term arrives. On the first
//      term of a pixel the feedback is replaced by zero.
// After the last term the three sums leave on the output channel in three
// consecutive cycles, tagged x, y, z (out_comp). There is no output
// back-pressure; the consumer must take every word.
//
// Throughput 3 * 4**DIM cycles per pixel (48 in 2D, 192 in 3D); latency from
// the first term's memory read to the x result is CP_LAT + 2*MUL_LAT +
// 3 * (4**DIM - 1) + 3 cycles. Hold rst_n low for at least
// CP_LAT + 2*MUL_LAT + 3 clock cycles so the tag pipeline is flushed.
// Stage structure, operator counts and latencies (6, 6, 3) follow the
// document; the memory port timing and output channel format are this
// design's own.
module ffd_pipeline #(
  parameter bit          FIXED   = 1'b0,   // 1: fixed-point datapath
  parameter int unsigned DIM     = 2,
  parameter int unsigned INT_W   = ffd_pkg::INT_W,
  parameter int unsigned FRAC_W  = ffd_pkg::FRAC_W,
  parameter int unsigned EXP_W   = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W   = ffd_pkg::MAN_W,
  parameter int unsigned CP_LAT  = 2,
  parameter int unsigned MUL_LAT = 6,
  localparam int unsigned IDX_W  = INT_W + 1,
  localparam int unsigned CP_AW  = 2 + 3 * IDX_W,
  localparam int unsigned FP_W   = EXP_W + MAN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // coordinate input, x/y/z interleaved
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic [INT_W+FRAC_W-1:0] in_data,
  // control-point memory (external), data CP_LAT cycles after cp_rd
  output logic                    cp_rd,
  output logic [CP_AW-1:0]        cp_addr,
  input  logic [FP_W-1:0]         cp_data,
  // displacement output, x/y/z interleaved
  output logic                    out_valid,
  output ffd_pkg::comp_e          out_comp,
  output logic [FP_W-1:0]         out_data,
  output logic                    busy
);
  import ffd_pkg::*;

  localparam int unsigned ACC_LAT = 3;
  localparam int unsigned TAG_W   = $bits(term_tag_t);

  // ---------------- stage 1 ----------------
  logic [FP_W-1:0] bu, bv, bw;
  term_tag_t       tag1;
  logic            s1_busy;

  ffd_stage1 #(
    .FIXED(FIXED), .DIM(DIM), .INT_W(INT_W), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W),
    .CP_LAT(CP_LAT)
  ) u_stage1 (
    .clk, .rst_n, .in_valid, .in_ready, .in_data,
    .cp_rd, .cp_addr, .bu, .bv, .bw, .tag(tag1), .busy(s1_busy));

  // ---------------- stage 2 ----------------
  logic [FP_W-1:0] m_uv, m_wphi;
  term_tag_t       tag2;

  arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul_uv (
    .clk, .a(bu), .b(bv), .p(m_uv));
  arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul_wphi (
    .clk, .a(bw), .b(cp_data), .p(m_wphi));
  delay_line #(.W(TAG_W), .N(MUL_LAT)) u_dly_tag2 (.clk, .d(tag1), .q(tag2));

  // ---------------- stage 3 ----------------
  logic [FP_W-1:0] term;
  term_tag_t       tag3;

  arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul_term (
    .clk, .a(m_uv), .b(m_wphi), .p(term));
  delay_line #(.W(TAG_W), .N(MUL_LAT)) u_dly_tag3 (.clk, .d(tag2), .q(tag3));

  // ---------------- stage 4: accumulator ----------------
  logic [FP_W-1:0] acc_in, acc_sum;
  term_tag_t       tag4;

  assign acc_in = tag3.first ? '0 : acc_sum;

  arith_add #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_acc (
    .clk, .a(term), .b(acc_in), .s(acc_sum));
  delay_line #(.W(TAG_W), .N(ACC_LAT)) u_dly_tag4 (.clk, .d(tag3), .q(tag4));

  assign out_valid = tag4.valid && tag4.last;
  assign out_comp  = tag4.comp;
  assign out_data  = acc_sum;

  // pipeline still holds terms of some pixel
  assign busy = s1_busy || tag1.valid || tag2.valid || tag3.valid || tag4.valid;

  // The running sum fed back for a non-first term must belong to the same
  // component's previous term: that term entered the adder ACC_LAT cycles ago.
  assert property (@(posedge clk) disable iff (!rst_n)
    (tag3.valid && !tag3.first) |-> (tag4.valid && tag4.comp == tag3.comp && !tag4.last))
    else $error("ffd_pipeline: accumulation loop out of step");

endmodule
