// ffd_top_fx_tb: the full-size end-to-end test of ffd_top_tb, repeated with
// the design built in fixed point (FIXED = 1: two's-complement words of
// sign, 8 integer and 12 fraction bits; all other parameters at their
// defaults). The control-point memory models hold the same lattices rounded
// to that format. Every result is checked against a double-precision
// evaluation of the FFD sum within 6 half-units of the last place per term,
// and the cycle counts and mechanism counts are checked exactly as in the
// floating-point test, since the schedule does not depend on the format.
// The average and maximum errors are reported and held to the same bounds
// as the 12-bit floating-point version (0.0009 and 0.0021).
module ffd_top_fx_tb;
  import ffd_tb_pkg::*;
  localparam bit FIXED = 1'b1;   // number format the references assume
  localparam int NPIPE = 2, IW = 8, FW = 10, EW = 8, MW = 12;
  localparam int IDX_W = IW + 1, AW = 2 + 3 * IDX_W, FPW = EW + MW + 1;
  localparam int IMG = 256, NL = 6, SEED = 11;
  localparam int ROWS = IMG / NPIPE;
  localparam int PERIOD = 16 * 3;
  localparam int LATENCY = 2 + 2 * 6 + 3 * (16 - 1) + 3;

  logic             clk = 0, rst_n = 0;
  logic             in_valid  [NPIPE];
  logic             in_ready  [NPIPE];
  logic [IW+FW-1:0] in_data   [NPIPE];
  logic             cp_rd     [NPIPE];
  logic [AW-1:0]    cp_addr   [NPIPE];
  logic [FPW-1:0]   cp_data   [NPIPE];
  logic             out_valid [NPIPE];
  ffd_pkg::comp_e   out_comp  [NPIPE];
  logic [FPW-1:0]   out_data  [NPIPE];
  logic             busy;
  int unsigned      border_reads [NPIPE];
  localparam int GNL = 66, GSEED = 23, NPIX = 16, NBATCH = IMG * IMG / NPIX;
  localparam int GLATENCY = 1 + 2 * 6 + 3 + 15 * NPIX;
  logic             grid_in_valid = 0, grid_in_ready;
  logic [IW+FW-1:0] grid_in_coord [3];
  logic             grid_cp_rd, grid_out_valid, grid_busy;
  logic [3*IDX_W-1:0] grid_cp_addr;
  logic [FPW-1:0]   grid_cp_data [3];
  logic [FPW-1:0]   grid_out_data [3];
  int unsigned      gbrd_x, gbrd_y;
  int               checks = 0, failures = 0;

  ffd_top #(.FIXED(FIXED)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cp_rd, .cp_addr, .cp_data,
               .out_valid, .out_comp, .out_data, .busy,
               .grid_in_valid, .grid_in_ready, .grid_in_coord, .grid_cp_rd,
               .grid_cp_addr, .grid_cp_data, .grid_out_valid, .grid_out_data, .grid_busy);

  cp_sram_model #(.FIXED(FIXED), .IDX_W(IDX_W), .FP_W(FPW), .EXP_W(EW), .MAN_W(MW), .LAT(2), .DIM(2),
                  .NX(GNL), .NY(GNL), .NZ(1), .SEED(GSEED))
    gmem_x (.clk, .rd(grid_cp_rd), .addr({2'd0, grid_cp_addr}),
            .data(grid_cp_data[0]), .border_reads(gbrd_x));
  cp_sram_model #(.FIXED(FIXED), .IDX_W(IDX_W), .FP_W(FPW), .EXP_W(EW), .MAN_W(MW), .LAT(2), .DIM(2),
                  .NX(GNL), .NY(GNL), .NZ(1), .SEED(GSEED))
    gmem_y (.clk, .rd(grid_cp_rd), .addr({2'd1, grid_cp_addr}),
            .data(grid_cp_data[1]), .border_reads(gbrd_y));
  assign grid_cp_data[2] = '0;   // no z bank in 2D

  for (genvar p = 0; p < NPIPE; p++) begin : g_mem
    cp_sram_model #(.FIXED(FIXED), .IDX_W(IDX_W), .FP_W(FPW), .EXP_W(EW), .MAN_W(MW), .LAT(2), .DIM(2),
                    .NX(NL), .NY(NL), .NZ(1), .SEED(SEED))
      mem (.clk, .rd(cp_rd[p]), .addr(cp_addr[p]), .data(cp_data[p]),
           .border_reads(border_reads[p]));
  end

  always #5 clk = ~clk;

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference displacement of pixel (px, py), component c
  function automatic real ref_disp(int px, int py, int c, output real mag);
    int  xv, yv;
    real s, t;
    xv  = px * 12;
    yv  = py * 12;
    s   = 0.0;
    mag = 0.0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        t = bspline(i, real'(xv % 1024) / 1024.0) * bspline(j, real'(yv % 1024) / 1024.0) *
            word2real(phi_value(SEED, c, 0, yv / 1024 + j, xv / 1024 + i, NL, NL, 1, 2, EW, MW,
                                FIXED), FIXED, EW, MW);
        s   += t;
        mag += (t < 0) ? -t : t;
      end
    return s;
  endfunction

  // reference for the grid processor: pixel (px, py) at (px/4, py/4)
  function automatic real gref_disp(int px, int py, int c, output real mag);
    real s, t;
    s   = 0.0;
    mag = 0.0;
    for (int j = 0; j < 4; j++)
      for (int i = 0; i < 4; i++) begin
        t = bspline(i, real'(px % 4) / 4.0) * bspline(j, real'(py % 4) / 4.0) *
            word2real(phi_value(GSEED, c, 0, py / 4 + j, px / 4 + i, GNL, GNL, 1, 2, EW, MW,
                                FIXED), FIXED, EW, MW);
        s   += t;
        mag += (t < 0) ? -t : t;
      end
    return s;
  endfunction

  // pixel n of the grid processor's stream: batch n/16 is cell (n/16 % 64,
  // n/16 / 64), pixel n%16 is row (n%16)/4, column (n%16)%4 inside it
  function automatic void gpix(int n, output int px, output int py);
    px = 4 * ((n / NPIX) % (IMG / 4)) + (n % NPIX) % 4;
    py = 4 * ((n / NPIX) / (IMG / 4)) + (n % NPIX) / 4;
  endfunction

  int  gout_n = 0, greads = 0, gfirst_rd = -1, glast_out = -1, gbatch_start = -1;
  int  gback_to_back = 0;

  always @(posedge clk) begin
    if (rst_n && grid_cp_rd) begin
      greads <= greads + 1;
      if (gfirst_rd < 0) gfirst_rd <= cyc;
    end
    if (rst_n && grid_out_valid) begin
      int  px, py;
      real ex, ey, mx, my, gx, gy, e1, e2;
      gpix(gout_n, px, py);
      ex = gref_disp(px, py, 0, mx);
      ey = gref_disp(px, py, 1, my);
      gx = word2real(64'(grid_out_data[0]), FIXED, EW, MW);
      gy = word2real(64'(grid_out_data[1]), FIXED, EW, MW);
      e1 = (gx > ex) ? gx - ex : ex - gx;
      e2 = (gy > ey) ? gy - ey : ey - gy;
      checks++;
      if (e1 > (FIXED ? 16.0 * 6.0 * 2.0 ** (-MW - 1) : mx * 2.0 ** (-MW + 3) + 1e-9) ||
          e2 > (FIXED ? 16.0 * 6.0 * 2.0 ** (-MW - 1) : my * 2.0 ** (-MW + 3) + 1e-9) ||
          grid_out_data[2] != '0) begin
        failures++;
        if (failures < 10)
          $display("grid pixel (%0d,%0d): got (%g,%g) expected (%g,%g)", px, py, gx, gy, ex, ey);
      end
      if (gout_n % NPIX == 0) begin
        if (gbatch_start >= 0 && cyc - gbatch_start == 16 * NPIX) gback_to_back++;
        gbatch_start <= cyc;
      end
      gout_n    <= gout_n + 1;
      glast_out <= cyc;
    end
  end

  initial for (int c = 0; c < 3; c++) grid_in_coord[c] = '0;

  task automatic gfeed();
    for (int n = 0; n < IMG * IMG; n++) begin
      int px, py;
      gpix(n, px, py);
      grid_in_valid = 1'b1;
      grid_in_coord[0] = (IW + FW)'(px * 256);
      grid_in_coord[1] = (IW + FW)'(py * 256);
      grid_in_coord[2] = '0;
      while (!grid_in_ready) @(negedge clk);
      @(negedge clk);
      grid_in_valid = 1'b0;
    end
  endtask

  int  out_n [NPIPE], last_x [NPIPE], stalls [NPIPE];
  int  cyc = 0, first_rd = -1, last_out = -1, back_to_back = 0, both_out = 0;
  real err_sum = 0.0, err_max = 0.0;

  initial
    for (int p = 0; p < NPIPE; p++) begin
      out_n[p]    = 0;
      last_x[p]   = -1;
      stalls[p]   = 0;
      in_valid[p] = 1'b0;
      in_data[p]  = '0;
    end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cp_rd[0] && first_rd < 0) first_rd <= cyc;
    if (out_valid[0] && out_valid[1]) both_out <= both_out + 1;
    for (int p = 0; p < NPIPE; p++) begin
      if (in_valid[p] && !in_ready[p]) stalls[p] <= stalls[p] + 1;
      if (rst_n && out_valid[p]) begin
        int  n, px, py, c;
        real ex, got, mag, err;
        n  = out_n[p];
        px = (n / 3) % IMG;
        py = p * ROWS + (n / 3) / IMG;
        c  = n % 3;
        ex  = ref_disp(px, py, c, mag);
        got = word2real(64'(out_data[p]), FIXED, EW, MW);
        err = (got > ex) ? got - ex : ex - got;
        err_sum += err;
        if (err > err_max) err_max = err;
        checks++;
        if (int'(out_comp[p]) != c || err > (FIXED ? 16.0 * 6.0 * 2.0 ** (-MW - 1) : mag * 2.0 ** (-MW + 3) + 1e-9)) begin
          failures++;
          if (failures < 10)
            $display("pipe %0d pixel (%0d,%0d) comp %0d: got %g expected %g", p, px, py,
                     out_comp[p], got, ex);
        end
        if (c == 0) begin
          if (last_x[p] >= 0 && cyc - last_x[p] == PERIOD) back_to_back++;
          last_x[p] <= cyc;
        end
        out_n[p]++;
        last_out <= cyc;
      end
    end
  end

  task automatic feed(int p);
    for (int py = p * ROWS; py < (p + 1) * ROWS; py++)
      for (int px = 0; px < IMG; px++)
        for (int a = 0; a < 2; a++) begin
          in_valid[p] = 1'b1;
          in_data[p]  = (a == 0) ? (IW + FW)'(px * 12) : (IW + FW)'(py * 12);
          while (!in_ready[p]) @(negedge clk);
          @(negedge clk);
          in_valid[p] = 1'b0;
        end
  endtask

  initial begin
    int total, expect_total;
    repeat (30) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    fork
      feed(0);
      feed(1);
      gfeed();
    join
    wait (out_n[0] == 3 * ROWS * IMG && out_n[1] == 3 * ROWS * IMG && gout_n == IMG * IMG);
    repeat (10) @(posedge clk);
    total        = last_out - first_rd + 1;
    expect_total = (ROWS * IMG - 1) * PERIOD + LATENCY + 3;
    $display("cycles=%0d (pixels per pipeline %0d, x 48 = %0d)", total, ROWS * IMG,
             ROWS * IMG * PERIOD);
    $display("average error %g, maximum error %g", err_sum / (3.0 * IMG * IMG), err_max);
    $display("events: input stalls %0d/%0d, back-to-back pixels %0d, border reads %0d/%0d, both pipelines out %0d",
             stalls[0], stalls[1], back_to_back, border_reads[0], border_reads[1], both_out);
    checks++;
    if (total != expect_total) begin
      failures++;
      $display("cycle count %0d, expected %0d", total, expect_total);
    end
    // accuracy reported for the 12-bit mantissa on a 256x256 image with a
    // 4x4 lattice: average 0.0009, maximum 0.0021
    checks++;
    if (err_sum / (3.0 * IMG * IMG) > 0.0009 || err_max > 0.0021) begin
      failures++;
      $display("error above the expected accuracy of the 12-bit format");
    end
    total        = glast_out - gfirst_rd + 1;
    expect_total = NBATCH * 16 * NPIX + NPIX;
    $display("grid processor: cycles=%0d reads=%0d back-to-back batches %0d border reads %0d",
             total, greads, gback_to_back, gbrd_x);
    checks++;
    if (total != expect_total || greads != 16 * NBATCH || gback_to_back == 0 || grid_busy ||
        gbrd_x == 0) begin
      failures++;
      $display("grid processor: expected %0d cycles and %0d reads", expect_total, 16 * NBATCH);
    end
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after the last result");
    end
    checks++;
    if (stalls[0] == 0 || stalls[1] == 0) begin
      failures++;
      $display("input stall never happened");
    end
    checks++;
    if (back_to_back == 0) begin
      failures++;
      $display("back-to-back pixels never happened");
    end
    checks++;
    if (border_reads[0] == 0 || border_reads[1] == 0) begin
      failures++;
      $display("zero border never read");
    end
    checks++;
    if (both_out == 0) begin
      failures++;
      $display("pipelines never worked in parallel");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
