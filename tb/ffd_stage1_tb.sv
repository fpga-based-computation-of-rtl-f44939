// ffd_stage1_tb: checks the loop controller and lookups of Stage 1 in 3D.
// Pixels are fed on the interleaved x/y/z channel; a memory stand-in returns
// each requested address as data CP_LAT cycles later. At every cycle the
// tag is valid, the test checks the returned address against the expected
// transformed-loop order (component fastest, then i, j, k; indices l+i,
// m+j, n+k), the first/last/component tag, and the three basis values
// against the B-spline formulas. It also checks that a run of pixels is
// processed without bubbles (3*64 cycles each) and that the input is held
// off while the double buffer is full.
module ffd_stage1_tb;
  import ffd_tb_pkg::*;
  localparam int DIM = 3, IW = 8, FW = 10, EW = 8, MW = 12, CPL = 2;
  localparam int IDX_W = IW + 1, AW = 2 + 3 * IDX_W, FPW = EW + MW + 1;
  localparam int TERMS = 64 * 3;

  logic                clk = 0, rst_n = 0;
  logic                in_valid = 0, in_ready;
  logic [IW+FW-1:0]    in_data = '0;
  logic                cp_rd, busy;
  logic [AW-1:0]       cp_addr;
  logic [FPW-1:0]      bu, bv, bw;
  ffd_pkg::term_tag_t  tag;
  int                  checks = 0, failures = 0;

  ffd_stage1 #(.DIM(DIM), .INT_W(IW), .FRAC_W(FW), .EXP_W(EW), .MAN_W(MW), .CP_LAT(CPL))
    dut (.clk, .rst_n, .in_valid, .in_ready, .in_data, .cp_rd, .cp_addr,
         .bu, .bv, .bw, .tag, .busy);

  always #5 clk = ~clk;

  // memory stand-in: returns the address
  logic [AW-1:0] mem_q [CPL];
  always_ff @(posedge clk) begin
    mem_q[0] <= cp_addr;
    for (int s = 1; s < CPL; s++) mem_q[s] <= mem_q[s-1];
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int c, k, j, i; real bu, bv, bw; bit first, last; } term_t;
  term_t exp_q [$];
  int    stalls = 0, valid_cycles = 0, first_valid = -1, last_valid = -1, cyc = 0;

  task automatic expect_pixel(int xi, int xf, int yi, int yf, int zi, int zf);
    term_t t;
    for (int k = 0; k < 4; k++)
      for (int j = 0; j < 4; j++)
        for (int i = 0; i < 4; i++)
          for (int c = 0; c < 3; c++) begin
            t.c = c; t.k = zi + k; t.j = yi + j; t.i = xi + i;
            t.bu = bspline(i, real'(xf) / 1024.0);
            t.bv = bspline(j, real'(yf) / 1024.0);
            t.bw = bspline(k, real'(zf) / 1024.0);
            t.first = (i == 0 && j == 0 && k == 0);
            t.last  = (i == 3 && j == 3 && k == 3);
            exp_q.push_back(t);
          end
  endtask

  function automatic bit near(real got, real ex);
    real tol;
    tol = ex * 2.0 ** (-MW - 1) * 1.0001 + 1e-12;
    return !(got - ex > tol || ex - got > tol);
  endfunction

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && !in_ready) stalls <= stalls + 1;
    if (rst_n && tag.valid) begin
      term_t t;
      logic [AW-1:0] ra;
      valid_cycles <= valid_cycles + 1;
      if (first_valid < 0) first_valid <= cyc;
      last_valid <= cyc;
      ra = mem_q[CPL-1];
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("unexpected term");
      end else begin
        t = exp_q.pop_front();
        if (int'(ra[AW-1:3*IDX_W]) != t.c || int'(ra[3*IDX_W-1:2*IDX_W]) != t.k ||
            int'(ra[2*IDX_W-1:IDX_W]) != t.j || int'(ra[IDX_W-1:0]) != t.i ||
            int'(tag.comp) != t.c || tag.first != t.first || tag.last != t.last ||
            !near(fp2real(bu, EW, MW), t.bu) || !near(fp2real(bv, EW, MW), t.bv) ||
            !near(fp2real(bw, EW, MW), t.bw)) begin
          failures++;
          if (failures < 10)
            $display("term mismatch: addr c%0d k%0d j%0d i%0d (exp c%0d k%0d j%0d i%0d) tag f%0d l%0d bu %g/%g",
                     ra[AW-1:3*IDX_W], ra[3*IDX_W-1:2*IDX_W], ra[2*IDX_W-1:IDX_W], ra[IDX_W-1:0],
                     t.c, t.k, t.j, t.i, tag.first, tag.last, fp2real(bu, EW, MW), t.bu);
        end
      end
    end
  end

  // called at a falling edge; returns at the falling edge after the word
  // was taken
  task automatic send(int ip, int fp);
    in_valid = 1'b1;
    in_data  = {IW'(ip), FW'(fp)};
    while (!in_ready) @(negedge clk);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic send_pixel();
    int v [6];
    for (int a = 0; a < 6; a++) v[a] = (a % 2 == 0) ? $urandom_range(0, 200) : $urandom_range(0, 1023);
    expect_pixel(v[0], v[1], v[2], v[3], v[4], v[5]);
    for (int a = 0; a < 3; a++) send(v[2*a], v[2*a+1]);
  endtask

  initial begin
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    // run 1: back-to-back pixels
    for (int p = 0; p < 8; p++) send_pixel();
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (valid_cycles != 8 * TERMS || last_valid - first_valid + 1 != 8 * TERMS) begin
      failures++;
      $display("run 1: %0d valid cycles over a span of %0d, expected %0d without bubbles",
               valid_cycles, last_valid - first_valid + 1, 8 * TERMS);
    end
    checks++;
    if (stalls == 0) begin
      failures++;
      $display("input was never held off");
    end
    // run 2: isolated pixels with idle gaps
    for (int p = 0; p < 3; p++) begin
      send_pixel();
      repeat ($urandom_range(200, 400)) @(negedge clk);
    end
    wait (exp_q.size() == 0);
    repeat (5) @(posedge clk);
    checks++;
    if (busy || valid_cycles != 11 * TERMS) begin
      failures++;
      $display("run 2: busy=%0d, %0d terms", busy, valid_cycles);
    end
    $display("stalls=%0d terms=%0d", stalls, valid_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
