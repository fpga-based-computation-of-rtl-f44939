// ffd_grid_pipeline_tb: test of the batch-per-cell processor in its 3D,
// three-channel form (the 2D form runs in ffd_top_tb).
// Three control-point memory models (x, y, z banks) hold a pseudo-random
// 4x4x4 lattice with its zero border. Batches of 16 voxels, each batch
// inside one random lattice cell with random fractions, are sent back to
// back and then with idle gaps. Every (dx, dy, dz) is compared with a
// double-precision evaluation of the FFD sum. Also checked: 64*16 = 1024
// cycles per batch when batches follow each other, the latency from the
// first control-point read to the first result, and exactly one memory read
// per control point per batch.
module ffd_grid_pipeline_tb;
  import ffd_tb_pkg::*;
  localparam bit FIXED = 1'b0;
  localparam int DIM = 3, IW = 8, FW = 10, EW = 8, MW = 12, CPL = 2, ML = 6, NPIX = 16;
  localparam int IDX_W = IW + 1, FPW = EW + MW + 1, CW = IW + FW;
  localparam int NL = 6, SEED = 5, NBATCH = 8, NCP = 64;
  localparam int PERIOD = NCP * NPIX, LATENCY = 1 + DIM * ML + 3 + (NCP - 1) * NPIX;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0, in_ready;
  logic [CW-1:0]      in_coord [3];
  logic               cp_rd, out_valid, busy;
  logic [3*IDX_W-1:0] cp_addr;
  logic [FPW-1:0]     cp_data [3];
  logic [FPW-1:0]     out_data [3];
  int unsigned        brd [3];
  int                 checks = 0, failures = 0;

  ffd_grid_pipeline #(.FIXED(FIXED), .DIM(DIM), .NPIX(NPIX), .INT_W(IW), .FRAC_W(FW), .EXP_W(EW),
                      .MAN_W(MW), .CP_LAT(CPL), .MUL_LAT(ML))
    dut (.clk, .rst_n, .in_valid, .in_ready, .in_coord, .cp_rd, .cp_addr, .cp_data,
         .out_valid, .out_data, .busy);

  for (genvar c = 0; c < 3; c++) begin : g_mem
    cp_sram_model #(.FIXED(FIXED), .IDX_W(IDX_W), .FP_W(FPW), .EXP_W(EW), .MAN_W(MW), .LAT(CPL), .DIM(DIM),
                    .NX(NL), .NY(NL), .NZ(NL), .SEED(SEED))
      mem (.clk, .rd(cp_rd), .addr({2'(c), cp_addr}), .data(cp_data[c]),
           .border_reads(brd[c]));
  end

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q [$], tol_q [$];
  int  cyc = 0, out_n = 0, reads = 0, first_rd = -1, first_out = -1, batch_start = -1;

  task automatic expect_pixel(int l, int fx, int m, int fy, int n, int fz);
    for (int c = 0; c < 3; c++) begin
      real s, a, t;
      s = 0.0;
      a = 0.0;
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++) begin
            t = bspline(i, real'(fx) / 1024.0) * bspline(j, real'(fy) / 1024.0) *
                bspline(k, real'(fz) / 1024.0) *
                word2real(phi_value(SEED, c, n + k, m + j, l + i, NL, NL, NL, DIM, EW, MW, FIXED),
                          FIXED, EW, MW);
            s += t;
            a += (t < 0) ? -t : t;
          end
      exp_q.push_back(s);
      tol_q.push_back(FIXED ? 64.0 * 6.0 * 2.0 ** (-MW - 1) : a * 2.0 ** (-MW + 3) + 1e-9);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cp_rd) begin
      reads <= reads + 1;
      if (first_rd < 0) first_rd <= cyc;
    end
    if (rst_n && out_valid) begin
      if (first_out < 0) first_out <= cyc;
      if (out_n % NPIX == 0) begin
        if (batch_start >= 0 && out_n / NPIX < 5) begin
          checks++;
          if (cyc - batch_start != PERIOD) begin
            failures++;
            $display("batch interval %0d, expected %0d", cyc - batch_start, PERIOD);
          end
        end
        batch_start <= cyc;
      end
      for (int c = 0; c < 3; c++) begin
        real ex, tl, got;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected output");
        end else begin
          ex  = exp_q.pop_front();
          tl  = tol_q.pop_front();
          got = word2real(64'(out_data[c]), FIXED, EW, MW);
          if (got - ex > tl || ex - got > tl) begin
            failures++;
            if (failures < 10)
              $display("voxel %0d comp %0d: got %g expected %g", out_n, c, got, ex);
          end
        end
      end
      out_n <= out_n + 1;
    end
  end

  task automatic send(int xv, int yv, int zv);
    in_valid    = 1'b1;
    in_coord[0] = CW'(xv);
    in_coord[1] = CW'(yv);
    in_coord[2] = CW'(zv);
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    for (int c = 0; c < 3; c++) in_coord[c] = '0;
    repeat (30) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int b = 0; b < NBATCH; b++) begin
      int l, m, n;
      l = $urandom_range(0, NL - 4);
      m = $urandom_range(0, NL - 4);
      n = $urandom_range(0, NL - 4);
      for (int p = 0; p < NPIX; p++) begin
        int fx, fy, fz;
        fx = $urandom_range(0, 1023);
        fy = $urandom_range(0, 1023);
        fz = $urandom_range(0, 1023);
        expect_pixel(l, fx, m, fy, n, fz);
        send(l * 1024 + fx, m * 1024 + fy, n * 1024 + fz);
      end
      if (b >= 5) repeat ($urandom_range(1200, 1600)) @(negedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (first_out - first_rd != LATENCY) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_rd, LATENCY);
    end
    checks++;
    if (reads != NCP * NBATCH || out_n != NPIX * NBATCH || busy) begin
      failures++;
      $display("reads %0d (expected %0d), outputs %0d, busy %0d", reads, NCP * NBATCH,
               out_n, busy);
    end
    $display("outputs=%0d reads=%0d border reads=%0d", out_n, reads, brd[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
