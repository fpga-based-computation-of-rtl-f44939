// fp_mult_tb: self-checking test of the pipelined floating-point multiplier.
// Feeds one random operand pair per cycle (plus zeros, exact products,
// overflow and underflow cases) and checks, exactly LAT cycles later, that
// the product is the correctly rounded real product: relative error at most
// half a unit in the last place. Also checks the 6-cycle latency directly.
module fp_mult_tb;
  import ffd_tb_pkg::*;
  localparam int EW = 8, MW = 12, LAT = 6, W = EW + MW + 1, N = 3000;

  logic         clk = 0;
  logic [W-1:0] a, b, p;
  int           checks = 0, failures = 0;

  fp_mult #(.EXP_W(EW), .MAN_W(MW), .LAT(LAT)) dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] qa [$], qb [$];

  task automatic check(logic [W-1:0] x, logic [W-1:0] y, logic [W-1:0] r);
    real ex, got, tol;
    ex  = fp2real(x, EW, MW) * fp2real(y, EW, MW);
    got = fp2real(r, EW, MW);
    tol = (ex < 0 ? -ex : ex) * (2.0 ** (-MW - 1)) * 1.0001;
    checks++;
    if ((got - ex > tol) || (ex - got > tol)) begin
      failures++;
      if (failures < 10) $display("mult %h*%h: got %g expected %g", x, y, got, ex);
    end
  endtask

  function automatic logic [W-1:0] rnd();
    logic [31:0] r;
    r = $urandom;
    return W'(mkfp(r[31], 100 + int'(r[30:25]) % 50, longint'(r[MW-1:0]), EW, MW));
  endfunction

  initial begin
    logic [W-1:0] x, y;
    a = '0;
    b = '0;
    repeat (LAT + 2) @(posedge clk);
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin
        case (n)
          0: begin x = W'(mkfp(0, 127, 2048, EW, MW)); y = x; end     // 1.5*1.5
          1: begin x = '0; y = rnd(); end                             // zero
          2: begin x = W'(mkfp(1, 127, 0, EW, MW)); y = W'(mkfp(0, 130, 5, EW, MW)); end
          default: begin x = rnd(); y = rnd(); end
        endcase
        a <= x;
        b <= y;
        qa.push_back(x);
        qb.push_back(y);
      end
      @(posedge clk);
      #1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) check(qa.pop_front(), qb.pop_front(), p);
    end
    // latency: a single product after quiet cycles
    a <= W'(mkfp(0, 128, 0, EW, MW));   // 2.0
    b <= W'(mkfp(0, 128, 0, EW, MW));   // 2.0
    @(posedge clk);
    a <= '0;
    b <= '0;
    for (int c = 1; c <= LAT + 2; c++) begin
      #1;
      checks++;
      if (c == LAT && p != W'(mkfp(0, 129, 0, EW, MW))) begin
        failures++;
        $display("latency: product not present after %0d cycles", LAT);
      end
      if (c == LAT - 1 && p == W'(mkfp(0, 129, 0, EW, MW))) begin
        failures++;
        $display("latency: product present too early");
      end
      @(posedge clk);
    end
    // overflow saturates, underflow flushes to zero
    a <= W'(mkfp(0, 250, 0, EW, MW));
    b <= W'(mkfp(1, 250, 0, EW, MW));
    @(posedge clk);
    a <= W'(mkfp(0, 10, 0, EW, MW));
    b <= W'(mkfp(0, 10, 0, EW, MW));
    @(posedge clk);
    repeat (LAT - 2) @(posedge clk);
    #1;
    checks++;
    if (p != W'(mkfp(1, 255, 4095, EW, MW))) begin
      failures++;
      $display("overflow: got %h", p);
    end
    @(posedge clk);
    #1;
    checks++;
    if (p != '0) begin
      failures++;
      $display("underflow: got %h", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
