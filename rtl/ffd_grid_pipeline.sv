// ffd_grid_pipeline: multi-channel FFD processor that works on a batch of
// pixels (voxels) sharing one control-lattice cell: two channels (x, y) for
// 2D images, three (x, y, z) for 3D volumes.
//
// All pixels inside one cell of the control lattice are deformed by the same
// 4**DIM control points around that cell. The block takes a batch of NPIX
// pixels of one cell (16 by default: a 4x4 block of pixels when the lattice
// spacing is 4), stores their coordinates, and then replays them once per
// control point: for control point q = (i, j[, k]) it streams pixels
// 0..NPIX-1, one per cycle, through
//   Bi(u_p) * Bj(v_p) [* Bk(w_p)]      (1 multiplier in 2D, 2 in 3D)
//   ... * Phi_c[n+k][m+j][l+i]         (one multiplier per channel c)
//   running sums                       (one adder per channel)
// i.e. 3 multipliers and 2 adders in 2D, 5 and 3 in 3D. Each control point
// is read from memory once per batch instead of once per pixel, and the
// channels are computed side by side, so a pixel costs 16 cycles in 2D
// (64 in 3D) instead of 48 (192). Each channel keeps NPIX partial sums
// circulating through its adder (3 cycles) and an NPIX-3 stage delay line;
// on the first control point the fed-back sum is replaced by zero. After the
// last control point the batch leaves on the output channels, one pixel per
// cycle.
//
// Interface: in_valid/in_ready handshake with in_coord[0..2] = x, y, z in
// the same fixed-point format as ffd_pipeline (z unused in 2D). All NPIX
// pixels of a batch must lie in the cell of the first one, whose integer
// parts address the lattice. A second batch loads while one is processed.
// Control points come from one bank per channel, cp_data[c], all sharing the
// address {K, J, I} (K = 0 in 2D), data CP_LAT cycles after cp_rd
// (1 <= CP_LAT <= 1 + (DIM-1)*MUL_LAT). Results: out_data[c], c < DIM;
// out_data[2] is zero in 2D. No output back-pressure.
// Throughput 4**DIM * NPIX cycles per batch; the first result of a batch
// appears 1 + DIM*MUL_LAT + 3 + (4**DIM - 1)*NPIX cycles (256 in 2D, 1030
// in 3D by default) after its first issue cycle.
// The batch-per-cell schedule, the channel structure and the operator counts
// follow the document; the on-chip coordinate buffer, on-chip B-spline
// tables and all timing details are this design's own. FIXED = 1 builds the
// datapath in fixed point instead of floating point (see arith_mult).
module ffd_grid_pipeline #(
  parameter bit          FIXED   = 1'b0,   // 1: fixed-point datapath
  parameter int unsigned DIM     = 2,
  parameter int unsigned NPIX    = 16,
  parameter int unsigned INT_W   = ffd_pkg::INT_W,
  parameter int unsigned FRAC_W  = ffd_pkg::FRAC_W,
  parameter int unsigned EXP_W   = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W   = ffd_pkg::MAN_W,
  parameter int unsigned CP_LAT  = 2,
  parameter int unsigned MUL_LAT = 6,
  localparam int unsigned IDX_W  = INT_W + 1,
  localparam int unsigned FP_W   = EXP_W + MAN_W + 1,
  localparam int unsigned CW     = INT_W + FRAC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic [CW-1:0]        in_coord  [3],
  output logic                 cp_rd,
  output logic [3*IDX_W-1:0]   cp_addr,        // {K, J, I}
  input  logic [FP_W-1:0]      cp_data   [3],
  output logic                 out_valid,
  output logic [FP_W-1:0]      out_data  [3],
  output logic                 busy
);
  localparam int unsigned ACC_LAT = 3;
  localparam int unsigned PW      = $clog2(NPIX);
  localparam int unsigned QW      = 2 * DIM;                 // control-point counter bits
  localparam int unsigned BLAT    = (DIM - 1) * MUL_LAT;     // basis product latency

  // ---------------- coordinate buffers (pending and current) ----------------
  logic [FRAC_W-1:0] pend_f [3][NPIX];
  logic [FRAC_W-1:0] cur_f  [3][NPIX];
  logic [INT_W-1:0]  pend_i [3];
  logic [INT_W-1:0]  cur_i  [3];
  logic              pend_full, act;
  logic [PW-1:0]     in_cnt, cp;     // pixel counters
  logic [QW-1:0]     cq;             // control point: i = cq[1:0], j = cq[3:2], k = cq[5:4]
  logic              last_cycle, take;

  assign in_ready   = !pend_full;
  assign last_cycle = act && (cq == '1) && (cp == PW'(NPIX - 1));
  assign take       = pend_full && (!act || last_cycle);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_full <= 1'b0;
      in_cnt    <= '0;
      for (int a = 0; a < 3; a++) pend_i[a] <= '0;
    end else begin
      if (in_valid && in_ready) begin
        if (in_cnt == '0)
          for (int a = 0; a < 3; a++)
            pend_i[a] <= (a < int'(DIM)) ? in_coord[a][CW-1:FRAC_W] : '0;
        if (in_cnt == PW'(NPIX - 1)) begin
          in_cnt    <= '0;
          pend_full <= 1'b1;
        end else begin
          in_cnt <= in_cnt + 1'b1;
        end
      end
      if (take) pend_full <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready)
      for (int a = 0; a < 3; a++) pend_f[a][in_cnt] <= in_coord[a][FRAC_W-1:0];
    if (take) begin
      cur_f <= pend_f;
      cur_i <= pend_i;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act <= 1'b0;
      cp  <= '0;
      cq  <= '0;
    end else if (take) begin
      act <= 1'b1;
      cp  <= '0;
      cq  <= '0;
    end else if (act) begin
      if (cp != PW'(NPIX - 1)) cp <= cp + 1'b1;
      else begin
        cp <= '0;
        cq <= cq + 1'b1;
        if (cq == '1) act <= 1'b0;
      end
    end
  end

  // ---------------- issue ----------------
  logic [1:0]       qi, qj, qk;
  logic [IDX_W-1:0] idx_k;
  assign qi      = cq[1:0];
  assign qj      = cq[3:2];
  assign qk      = (DIM == 3) ? 2'(cq >> 4) : 2'd0;
  assign idx_k   = (DIM == 3) ? IDX_W'(cur_i[2]) + IDX_W'(qk) : '0;
  assign cp_rd   = act && (cp == '0);
  assign cp_addr = {idx_k, IDX_W'(cur_i[1]) + IDX_W'(qj), IDX_W'(cur_i[0]) + IDX_W'(qi)};

  // per-term tag: valid, first control point, last control point, new phi
  typedef struct packed {
    logic valid;
    logic first;
    logic last;
    logic newcp;
  } gtag_t;

  gtag_t tag0, tag_cp, tag_m1, tag_m2, tag_out;
  always_comb begin
    tag0.valid = act;
    tag0.first = act && (cq == '0);
    tag0.last  = act && (cq == '1);
    tag0.newcp = act && (cp == '0);
  end

  // ---------------- basis product Bi*Bj[*Bk] ----------------
  logic [FP_W-1:0] bu, bv, m_uv, m_b;
  bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_u (
    .clk, .basis(qi), .frac(cur_f[0][cp]), .value(bu));
  bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_v (
    .clk, .basis(qj), .frac(cur_f[1][cp]), .value(bv));
  arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul_uv (
    .clk, .a(bu), .b(bv), .p(m_uv));

  if (DIM == 3) begin : g_w
    logic [FP_W-1:0] bw, bw_al;
    bspline_lut #(.FIXED(FIXED), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_lut_w (
      .clk, .basis(qk), .frac(cur_f[2][cp]), .value(bw));
    delay_line #(.W(FP_W), .N(MUL_LAT)) u_dly_w (.clk, .d(bw), .q(bw_al));
    arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul_uvw (
      .clk, .a(m_uv), .b(bw_al), .p(m_b));
  end else begin : g_no_w
    assign m_b = m_uv;
  end

  delay_line #(.W($bits(gtag_t)), .N(1 + BLAT)) u_dly_m1 (.clk, .d(tag0), .q(tag_m1));

  // ---------------- control points: one read per control point ----------------
  // Stream phi per term: take the memory words on the first pixel of a
  // control point, repeat them for the others, then align with the basis
  // product.
  logic [3*FP_W-1:0] phi_now, phi_hold, phi_al;
  delay_line #(.W($bits(gtag_t)), .N(CP_LAT)) u_dly_cp (.clk, .d(tag0), .q(tag_cp));

  assign phi_now = tag_cp.newcp ? {cp_data[2], cp_data[1], cp_data[0]} : phi_hold;
  always_ff @(posedge clk) phi_hold <= phi_now;

  delay_line #(.W(3 * FP_W), .N(1 + BLAT - CP_LAT)) u_dly_phi (
    .clk, .d(phi_now), .q(phi_al));

  delay_line #(.W($bits(gtag_t)), .N(MUL_LAT)) u_dly_m2 (.clk, .d(tag_m1), .q(tag_m2));
  delay_line #(.W($bits(gtag_t)), .N(ACC_LAT)) u_dly_out (.clk, .d(tag_m2), .q(tag_out));

  // ---------------- one multiplier and one accumulator per channel ----------------
  for (genvar c = 0; c < 3; c++) begin : g_ch
    if (c < int'(DIM)) begin : g_on
      logic [FP_W-1:0] term, sum, back;
      arith_mult #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W), .LAT(MUL_LAT)) u_mul (
        .clk, .a(m_b), .b(phi_al[c*FP_W +: FP_W]), .p(term));
      arith_add #(.FIXED(FIXED), .EXP_W(EXP_W), .MAN_W(MAN_W)) u_acc (
        .clk, .a(term), .b(tag_m2.first ? '0 : back), .s(sum));
      delay_line #(.W(FP_W), .N(NPIX - ACC_LAT)) u_loop (.clk, .d(sum), .q(back));
      assign out_data[c] = sum;
    end else begin : g_off
      assign out_data[c] = '0;
    end
  end

  assign out_valid = tag_out.valid && tag_out.last;
  assign busy      = act || pend_full || (in_cnt != '0) || tag_cp.valid || tag_m1.valid ||
                     tag_m2.valid || tag_out.valid;

  initial assert (NPIX > ACC_LAT && (1 << PW) == NPIX)
    else $error("ffd_grid_pipeline: NPIX must be a power of two above 3");
  initial assert (CP_LAT >= 1 && CP_LAT <= 1 + BLAT)
    else $error("ffd_grid_pipeline: CP_LAT out of range");
  initial assert (DIM == 2 || DIM == 3) else $error("ffd_grid_pipeline: DIM must be 2 or 3");

  // every pixel of a batch must lie in the cell of the first one
  assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && in_ready && in_cnt != '0) |->
      (in_coord[0][CW-1:FRAC_W] == pend_i[0] && in_coord[1][CW-1:FRAC_W] == pend_i[1] &&
       (DIM == 2 || in_coord[2][CW-1:FRAC_W] == pend_i[2])))
    else $error("ffd_grid_pipeline: pixel outside the batch's lattice cell");

endmodule
