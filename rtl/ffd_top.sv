// ffd_top: free-form deformation processors for B-spline image registration.
//
// Two processor organisations stand side by side, each with its own ports.
//
// 1. g_pipe: NPIPE single-channel pipelines (ffd_pipeline), the main
//    configuration. The image is split into NPIPE sub-images, one per
//    pipeline. Each pipeline has its own coordinate input channel, its own
//    displacement output channel and its own control-point memory port, so
//    the default two pipelines use six external memory banks. They share
//    only clock and reset; each holds its own B-spline tables. Their ports
//    are arrays indexed by pipeline number. Default: 2D, 8-bit exponent,
//    12-bit mantissa, 48 cycles per pixel per pipeline, so a 256x256 image
//    takes 256*256*48/2 = 1,572,864 cycles (about 23 ms at 67 MHz).
//
// 2. u_grid: one batch-per-cell processor (ffd_grid_pipeline) with one
//    channel per component, the faster organisation, which needs separate
//    banks per channel for coordinates, control points and results. Its
//    ports carry the prefix grid_ and are arrays over the channels x, y, z
//    (z unused in 2D). It computes the same deformation at 16 cycles per
//    pixel in 2D when pixels arrive grouped by lattice cell (a 256x256 image
//    in 1,048,576 cycles, about 16 ms at 67 MHz).
//
// FIXED = 1 builds both organisations with the fixed-point arithmetic the
// document offers as the alternative to floating point (same word width).
// Pipeline count, number formats and cycle counts follow the document; the
// assignment of memory banks to pipelines is this design's reading.
module ffd_top #(
  parameter bit          FIXED   = 1'b0,   // 1: fixed-point datapath (both organisations)
  parameter int unsigned NPIPE   = 2,
  parameter int unsigned DIM     = 2,
  parameter int unsigned INT_W   = ffd_pkg::INT_W,
  parameter int unsigned FRAC_W  = ffd_pkg::FRAC_W,
  parameter int unsigned EXP_W   = ffd_pkg::EXP_W,
  parameter int unsigned MAN_W   = ffd_pkg::MAN_W,
  parameter int unsigned CP_LAT  = 2,
  parameter int unsigned MUL_LAT = 6,
  parameter int unsigned NPIX    = 16,
  localparam int unsigned IDX_W  = INT_W + 1,
  localparam int unsigned CP_AW  = 2 + 3 * IDX_W,
  localparam int unsigned FP_W   = EXP_W + MAN_W + 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid  [NPIPE],
  output logic                    in_ready  [NPIPE],
  input  logic [INT_W+FRAC_W-1:0] in_data   [NPIPE],
  output logic                    cp_rd     [NPIPE],
  output logic [CP_AW-1:0]        cp_addr   [NPIPE],
  input  logic [FP_W-1:0]         cp_data   [NPIPE],
  output logic                    out_valid [NPIPE],
  output ffd_pkg::comp_e          out_comp  [NPIPE],
  output logic [FP_W-1:0]         out_data  [NPIPE],
  output logic                    busy,
  // batch-per-cell processor (channels x, y[, z])
  input  logic                    grid_in_valid,
  output logic                    grid_in_ready,
  input  logic [INT_W+FRAC_W-1:0] grid_in_coord  [3],
  output logic                    grid_cp_rd,
  output logic [3*IDX_W-1:0]      grid_cp_addr,
  input  logic [FP_W-1:0]         grid_cp_data   [3],
  output logic                    grid_out_valid,
  output logic [FP_W-1:0]         grid_out_data  [3],
  output logic                    grid_busy
);
  logic [NPIPE-1:0] pipe_busy;

  for (genvar p = 0; p < NPIPE; p++) begin : g_pipe
    ffd_pipeline #(
      .FIXED(FIXED), .DIM(DIM), .INT_W(INT_W), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W),
      .CP_LAT(CP_LAT), .MUL_LAT(MUL_LAT)
    ) u_pipe (
      .clk, .rst_n,
      .in_valid(in_valid[p]), .in_ready(in_ready[p]), .in_data(in_data[p]),
      .cp_rd(cp_rd[p]), .cp_addr(cp_addr[p]), .cp_data(cp_data[p]),
      .out_valid(out_valid[p]), .out_comp(out_comp[p]), .out_data(out_data[p]),
      .busy(pipe_busy[p]));
  end

  assign busy = |pipe_busy;

  ffd_grid_pipeline #(
    .FIXED(FIXED), .DIM(DIM), .NPIX(NPIX), .INT_W(INT_W), .FRAC_W(FRAC_W), .EXP_W(EXP_W), .MAN_W(MAN_W),
    .CP_LAT(CP_LAT), .MUL_LAT(MUL_LAT)
  ) u_grid (
    .clk, .rst_n,
    .in_valid(grid_in_valid), .in_ready(grid_in_ready), .in_coord(grid_in_coord),
    .cp_rd(grid_cp_rd), .cp_addr(grid_cp_addr), .cp_data(grid_cp_data),
    .out_valid(grid_out_valid), .out_data(grid_out_data), .busy(grid_busy));

endmodule
