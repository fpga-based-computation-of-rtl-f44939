// ffd_pipeline_fx_tb: end-to-end test of one FFD pipeline in 3D built with
// the fixed-point datapath (FIXED = 1: two's complement words of sign, 8
// integer and 12 fraction bits). A control-point memory model supplies a
// pseudo-random 4x4x4 lattice (6x6x6 with the zero border) in that format.
// For each pixel the three displacement components are checked against a
// double-precision evaluation of the FFD sum with the same control points,
// within an absolute bound of 6 half-units of the last place per term. The
// test also checks the per-pixel rate (192 cycles back to back) and the
// latency from the first memory read to the first result, which are the
// same as with floating point.
module ffd_pipeline_fx_tb;
  import ffd_tb_pkg::*;
  localparam bit FIXED = 1'b1;
  localparam int DIM = 3, IW = 8, FW = 10, EW = 8, MW = 12, CPL = 2, ML = 6;
  localparam int IDX_W = IW + 1, AW = 2 + 3 * IDX_W, FPW = EW + MW + 1;
  localparam int NL = 6, SEED = 7, NPIX = 40;
  localparam int PERIOD = 3 * 64;
  localparam int LATENCY = CPL + 2 * ML + 3 * (64 - 1) + 3;

  logic               clk = 0, rst_n = 0;
  logic               in_valid = 0, in_ready;
  logic [IW+FW-1:0]   in_data = '0;
  logic               cp_rd, out_valid, busy;
  logic [AW-1:0]      cp_addr;
  logic [FPW-1:0]     cp_data, out_data;
  ffd_pkg::comp_e     out_comp;
  int unsigned        border_reads;
  int                 checks = 0, failures = 0;

  ffd_pipeline #(.FIXED(FIXED), .DIM(DIM), .INT_W(IW), .FRAC_W(FW), .EXP_W(EW), .MAN_W(MW),
                 .CP_LAT(CPL), .MUL_LAT(ML))
    dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cp_rd, .cp_addr, .cp_data,
         .out_valid, .out_comp, .out_data, .busy);

  cp_sram_model #(.FIXED(FIXED), .IDX_W(IDX_W), .FP_W(FPW), .EXP_W(EW), .MAN_W(MW), .LAT(CPL), .DIM(DIM),
                  .NX(NL), .NY(NL), .NZ(NL), .SEED(SEED))
    mem (.clk, .rd(cp_rd), .addr(cp_addr), .data(cp_data), .border_reads);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real exp_q [$], tol_q [$];
  real err_sum = 0.0;
  int  cyc = 0, out_n = 0, first_rd = -1, first_out = -1, last_x = -1, gaps_ok = 0;

  task automatic expect_pixel(int xi, int xf, int yi, int yf, int zi, int zf);
    for (int c = 0; c < 3; c++) begin
      real s, a, t;
      s = 0.0;
      a = 0.0;
      for (int k = 0; k < 4; k++)
        for (int j = 0; j < 4; j++)
          for (int i = 0; i < 4; i++) begin
            t = bspline(i, real'(xf) / 1024.0) * bspline(j, real'(yf) / 1024.0) *
                bspline(k, real'(zf) / 1024.0) *
                word2real(phi_value(SEED, c, zi + k, yi + j, xi + i, NL, NL, NL, DIM, EW, MW,
                                    FIXED), FIXED, EW, MW);
            s += t;
            a += (t < 0) ? -t : t;
          end
      exp_q.push_back(s);
      // floating point: relative to the term magnitudes; fixed point: an
      // absolute bound of 6 half-units of the last place per term
      tol_q.push_back(FIXED ? 64.0 * 6.0 * 2.0 ** (-MW - 1) : a * 2.0 ** (-MW + 3) + 1e-9);
    end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cp_rd && first_rd < 0) first_rd <= cyc;
    if (rst_n && out_valid) begin
      real ex, tl, got;
      if (first_out < 0) first_out <= cyc;
      if (out_comp == ffd_pkg::COMP_X) begin
        if (last_x >= 0 && out_n < 3 * 20) begin
          checks++;
          if (cyc - last_x != PERIOD) begin
            failures++;
            $display("pixel interval %0d, expected %0d", cyc - last_x, PERIOD);
          end
        end
        last_x <= cyc;
      end
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        ex  = exp_q.pop_front();
        tl  = tol_q.pop_front();
        got = word2real(64'(out_data), FIXED, EW, MW);
        err_sum += (got > ex) ? got - ex : ex - got;
        if (int'(out_comp) != out_n % 3 || got - ex > tl || ex - got > tl) begin
          failures++;
          if (failures < 10)
            $display("pixel %0d comp %0d: got %g expected %g (tol %g)", out_n / 3,
                     out_comp, got, ex, tl);
        end
      end
      out_n <= out_n + 1;
    end
  end

  task automatic send(int ip, int fp);
    in_valid = 1'b1;
    in_data  = {IW'(ip), FW'(fp)};
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    repeat (30) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int p = 0; p < NPIX; p++) begin
      int v [6];
      for (int a = 0; a < 6; a++)
        v[a] = (a % 2 == 0) ? $urandom_range(0, NL - 4) : $urandom_range(0, 1023);
      if (p == 0) v = '{0, 0, 0, 0, 0, 0};          // lattice corner
      if (p == 1) v = '{NL - 4, 1023, NL - 4, 1023, NL - 4, 1023};
      expect_pixel(v[0], v[1], v[2], v[3], v[4], v[5]);
      for (int a = 0; a < 3; a++) send(v[2*a], v[2*a+1]);
      if (p == 30) repeat (500) @(negedge clk);      // let the pipeline drain once
    end
    wait (exp_q.size() == 0);
    repeat (10) @(posedge clk);
    checks++;
    if (first_out - first_rd != LATENCY) begin
      failures++;
      $display("latency %0d, expected %0d", first_out - first_rd, LATENCY);
    end
    checks++;
    if (out_n != 3 * NPIX || busy) begin
      failures++;
      $display("%0d outputs, busy=%0d", out_n, busy);
    end
    checks++;
    if (border_reads == 0) begin
      failures++;
      $display("the zero border of the lattice was never read");
    end
    checks++;
    if (err_sum / real'(out_n) > (FIXED ? 2.0 ** (-MW + 2) : 2.0 ** (-MW))) begin
      failures++;
      $display("average error %g too large", err_sum / real'(out_n));
    end
    $display("outputs=%0d border_reads=%0d latency=%0d average error %g", out_n, border_reads,
             first_out - first_rd, err_sum / real'(out_n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
