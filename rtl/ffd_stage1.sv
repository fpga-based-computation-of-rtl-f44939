// ffd_stage1: input pre-processing and loop control of one FFD pipeline
// (Stage 1).
//
// Coordinates arrive on a single input channel, interleaved: x, y (and z
// when DIM = 3) of one pixel on successive accepted words, each an unsigned
// fixed-point number in control-lattice units with INT_W integer and FRAC_W
// fraction bits. They are split into integer parts (lattice cell l, m, n)
// and fraction parts (u, v, w) and held in a pending register set, which is
// the double buffer that lets the next pixel load while the current one is
// being processed.
//
// For the current pixel the block runs the condition-free transformed loop
// over the 4**DIM neighbouring control points: for each term (k, j, i) it
// issues three consecutive cycles, one per displacement component x, y, z
// (the three-way interleave matches the three-cycle accumulator). Each cycle
// it reads Phi_c[n+k][m+j][l+i] from the external control-point memory and
// Bi(u), Bj(v), Bk(w) from three copies of the B-spline table. There is no
// range test: the lattice in memory is padded with a zero control point on
// each side of every axis, so index l+i always lies inside it.
//
// Control-point address: {component[1:0], K, J, I}, each index INT_W+1 bits
// (K = 0 when DIM = 2). The memory returns data CP_LAT cycles after cp_rd.
// The basis values and the term tag are delayed so that they leave this
// block in the same cycle as the corresponding control-point word arrives
// at the pipeline. With DIM = 2 the w-basis output is the constant 1.0.
// FIXED selects the number format of the tables (see ffd_pkg).
//
// Throughput: one term-component per cycle, 3 * 4**DIM cycles per pixel,
// with no bubbles between pixels while the input keeps up. in_valid/in_ready
// is a standard handshake; there is no back-pressure on the outputs.
// The loop transform, the de-interleaving and the table replication follow
// the document; the double buffer, loop order and handshake are this design's.
module ffd_stage1 #(
  parameter bit          FIXED  = 1'b0,   // fixed-point tables instead of floating point
  parameter int unsigned DIM    = 2,
  parameter int unsigned INT_W  = ffd_pkg::INT_W,
  parameter int unsigned FRAC_W = ffd_pkg::FRAC_W,
  parameter int unsigned EXP_W  = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W  = ffd_pkg::MAN_W,
  parameter int unsigned CP_LAT = 2,
  localparam int unsigned IDX_W = INT_W + 1,
  localparam int unsigned CP_AW = 2 + 3 * IDX_W,
  localparam int unsigned FP_W  = EXP_W + MAN_W + 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // coordinate input, x/y/z interleaved
  input  logic                      in_valid,
  output logic                      in_ready,
  input  logic [INT_W+FRAC_W-1:0]   in_data,
  // control-point memory read request
  output logic                      cp_rd,
  output logic [CP_AW-1:0]          cp_addr,
  // basis values and tag, aligned with the control-point data
  output logic [FP_W-1:0]           bu,
  output logic [FP_W-1:0]           bv,
  output logic [FP_W-1:0]           bw,
  output ffd_pkg::term_tag_t        tag,
  output logic                      busy
);
  import ffd_pkg::*;

  localparam logic [1:0] KMAX = (DIM == 3) ? 2'd3 : 2'd0;

  // ---------------- pending (input) register set ----------------
  logic [INT_W-1:0]  pend_int  [3];
  logic [FRAC_W-1:0] pend_frac [3];
  logic              pend_full;
  logic [1:0]        in_cnt;

  // ---------------- current pixel and loop counters ----------------
  logic [INT_W-1:0]  cur_int  [3];
  logic [FRAC_W-1:0] cur_frac [3];
  logic              act;
  logic [1:0]        cc, ci, cj, ck;
  logic              last_term, last_cycle, take;

  assign in_ready   = !pend_full;
  assign last_term  = (ci == 2'd3) && (cj == 2'd3) && (ck == KMAX);
  assign last_cycle = act && last_term && (cc == 2'(NCOMP - 1));
  assign take       = pend_full && (!act || last_cycle);
  assign busy       = act || pend_full || (in_cnt != 2'd0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_full <= 1'b0;
      in_cnt    <= 2'd0;
      for (int a = 0; a < 3; a++) begin
        pend_int[a]  <= '0;
        pend_frac[a] <= '0;
      end
    end else begin
      if (in_valid && in_ready) begin
        pend_int[in_cnt]  <= in_data[INT_W+FRAC_W-1:FRAC_W];
        pend_frac[in_cnt] <= in_data[FRAC_W-1:0];
        if (in_cnt == 2'(DIM - 1)) begin
          in_cnt    <= 2'd0;
          pend_full <= 1'b1;
        end else begin
          in_cnt <= in_cnt + 2'd1;
        end
      end
      if (take) pend_full <= 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      cc  <= '0;
      ci  <= '0;
      cj  <= '0;
      ck  <= '0;
      for (int a = 0; a < 3; a++) begin
        cur_int[a]  <= '0;
        cur_frac[a] <= '0;
      end
    end else if (take) begin
      act <= 1'b1;
      cc  <= '0;
      ci  <= '0;
      cj  <= '0;
      ck  <= '0;
      for (int a = 0; a < 3; a++) begin
        cur_int[a]  <= (a < int'(DIM)) ? pend_int[a]  : '0;
        cur_frac[a] <= (a < int'(DIM)) ? pend_frac[a] : '0;
      end
    end else if (act) begin
      if (cc != 2'(NCOMP - 1)) begin
        cc <= cc + 2'd1;
      end else begin
        cc <= '0;
        if (ci != 2'd3) ci <= ci + 2'd1;
        else begin
          ci <= '0;
          if (cj != 2'd3) cj <= cj + 2'd1;
          else begin
            cj <= '0;
            if (ck != KMAX) ck <= ck + 2'd1;
            else begin
              ck  <= '0;
              act <= 1'b0;
            end
          end
        end
      end
    end
  end

  // ---------------- issue: memory address and table reads ----------------
  logic [IDX_W-1:0] idx_i, idx_j, idx_k;
  assign idx_i   = IDX_W'(cur_int[0]) + IDX_W'(ci);
  assign idx_j   = IDX_W'(cur_int[1]) + IDX_W'(cj);
  assign idx_k   = (DIM == 3) ? IDX_W'(cur_int[2]) + IDX_W'(ck) : '0;
  assign cp_rd   = act;
  assign cp_addr = {cc, idx_k, idx_j, idx_i};

  logic [FP_W-1:0] lut_u, lut_v, lut_w;

  bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_u (
    .clk, .basis(ci), .frac(cur_frac[0]), .value(lut_u));
  bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_v (
    .clk, .basis(cj), .frac(cur_frac[1]), .value(lut_v));
  bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_w (
    .clk, .basis(ck), .frac(cur_frac[2]), .value(lut_w));

  // the tables answer after one cycle, the memory after CP_LAT cycles
  logic [3*FP_W-1:0] lut_al;
  delay_line #(.W(3 * FP_W), .N(CP_LAT - 1)) u_dly_lut (
    .clk, .d({lut_u, lut_v, lut_w}), .q(lut_al));

  assign bu = lut_al[3*FP_W-1:2*FP_W];
  assign bv = lut_al[2*FP_W-1:FP_W];
  assign bw = (DIM == 3) ? lut_al[FP_W-1:0] : FP_W'(num_one(FIXED, EXP_W, MAN_W));

  term_tag_t tag_issue;
  always_comb begin
    tag_issue.valid = act;
    tag_issue.first = act && (ci == 2'd0) && (cj == 2'd0) && (ck == 2'd0);
    tag_issue.last  = act && last_term;
    tag_issue.comp  = comp_e'(cc);
  end

  delay_line #(.W($bits(term_tag_t)), .N(CP_LAT)) u_dly_tag (
    .clk, .d(tag_issue), .q(tag));

  initial assert (CP_LAT >= 1) else $error("ffd_stage1: CP_LAT must be at least 1");
  initial assert (DIM == 2 || DIM == 3) else $error("ffd_stage1: DIM must be 2 or 3");

endmodule
