// fp_add_tb: self-checking test of the three-cycle floating-point adder.
// Random operands of both signs and nearby or distant exponents, one pair
// per cycle; the sum must match the real sum within one unit in the last
// place of the result (plus a negligible absolute term for deep
// cancellation). Also checks exact cases (x + (-x) = 0, x + 0 = x) and the
// three-cycle latency the accumulation loop depends on.
module fp_add_tb;
  import ffd_tb_pkg::*;
  localparam int EW = 8, MW = 12, LAT = 3, W = EW + MW + 1, N = 4000;

  logic         clk = 0;
  logic [W-1:0] a, b, s;
  int           checks = 0, failures = 0;

  fp_add #(.EXP_W(EW), .MAN_W(MW)) dut (.clk, .a, .b, .s);

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
    real ex, got, tol, big;
    ex  = fp2real(x, EW, MW) + fp2real(y, EW, MW);
    got = fp2real(r, EW, MW);
    big = fp2real(x, EW, MW);
    big = big < 0 ? -big : big;
    tol = (ex < 0 ? -ex : ex) * (2.0 ** (-MW)) + big * (2.0 ** (-MW - 3));
    checks++;
    if ((got - ex > tol) || (ex - got > tol)) begin
      failures++;
      if (failures < 10) $display("add %h+%h: got %g expected %g", x, y, got, ex);
    end
  endtask

  function automatic logic [W-1:0] rnd(int ebase);
    logic [31:0] r;
    r = $urandom;
    return W'(mkfp(r[31], ebase + int'(r[30:26]) % 16 - 8, longint'(r[MW-1:0]), EW, MW));
  endfunction

  initial begin
    logic [W-1:0] x, y;
    a = '0;
    b = '0;
    repeat (LAT + 2) @(posedge clk);
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin
        x = rnd(127);
        case (n % 4)
          0: y = rnd(127);
          1: y = {~x[W-1], x[W-2:0]};                // exact cancellation
          2: y = {x[W-1], x[W-2:3], 3'(n)};            // near, same sign
          default: y = (n % 8 == 3) ? '0 : {~x[W-1], x[W-2:2], 2'(n)}; // near cancellation
        endcase
        a <= x;
        b <= y;
        qa.push_back(x);
        qb.push_back(y);
      end
      @(posedge clk);
      #1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) begin
        logic [W-1:0] px, py;
        px = qa.pop_front();
        py = qb.pop_front();
        check(px, py, s);
        if (py == {~px[W-1], px[W-2:0]}) begin
          checks++;
          if (s != '0) begin
            failures++;
            $display("x + (-x) = %h, not zero", s);
          end
        end
        if (py == '0) begin
          checks++;
          if (s != px) begin
            failures++;
            $display("x + 0 = %h, not %h", s, px);
          end
        end
      end
    end
    // latency
    a <= W'(mkfp(0, 127, 0, EW, MW));
    b <= W'(mkfp(0, 127, 0, EW, MW));
    @(posedge clk);
    a <= '0;
    b <= '0;
    for (int c = 1; c <= LAT + 1; c++) begin
      #1;
      checks++;
      if ((c == LAT) != (s == W'(mkfp(0, 128, 0, EW, MW)))) begin
        failures++;
        $display("latency: cycle %0d sum %h", c, s);
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
