// fx_add_tb: self-checking test of the pipelined fixed-point adder.
// Feeds one operand pair per cycle (random words of several magnitudes and
// both signs, plus sums that leave the word range in either direction) and
// checks, exactly 3 cycles later, the sum against one worked out with reals
// and clamped to the word range, bit for bit. A single sum after quiet
// cycles checks the 3-cycle latency directly.
module fx_add_tb;
  import ffd_tb_pkg::*;
  localparam int IW = 8, FW = 12, LAT = 3, W = IW + FW + 1, N = 3000;

  logic         clk = 0;
  logic [W-1:0] a, b, s;
  int           checks = 0, failures = 0, saturated = 0;

  fx_add #(.INT_W(IW), .FRAC_W(FW)) dut (.clk, .a, .b, .s);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expected(logic [W-1:0] x, logic [W-1:0] y);
    real    ex;
    longint v;
    ex = fx2real(64'(x), IW, FW) + fx2real(64'(y), IW, FW);
    v  = longint'(ex * 2.0 ** FW);
    if (v > (longint'(1) << (IW + FW)) - 1) v = (longint'(1) << (IW + FW)) - 1;
    if (v < -(longint'(1) << (IW + FW))) v = -(longint'(1) << (IW + FW));
    return W'(v);
  endfunction

  function automatic logic [W-1:0] rnd(int bits);
    longint v;
    v = longint'($urandom) % (longint'(1) << bits);
    return W'($urandom_range(0, 1) ? -v : v);
  endfunction

  logic [W-1:0] qa [$], qb [$];

  initial begin
    logic [W-1:0] x, y, e;
    a = '0;
    b = '0;
    repeat (LAT + 2) @(posedge clk);
    for (int n = 0; n < N + LAT; n++) begin
      if (n < N) begin
        case (n)
          0: begin x = W'(200 << FW); y = x; end                       // overflow
          1: begin x = W'(-(200 << FW)); y = x; end                    // underflow
          2: begin x = W'(5); y = W'(-5); end                          // exact zero
          default: begin
            x = rnd($urandom_range(1, W - 1));
            y = rnd($urandom_range(1, W - 1));
          end
        endcase
        a <= x;
        b <= y;
        qa.push_back(x);
        qb.push_back(y);
      end
      @(posedge clk);
      #1;
      if (n >= LAT - 1 && n - (LAT - 1) < N) begin
        x = qa.pop_front();
        y = qb.pop_front();
        e = expected(x, y);
        checks++;
        if (e == {1'b0, {(W-1){1'b1}}} || e == {1'b1, {(W-1){1'b0}}}) saturated++;
        if (s !== e) begin
          failures++;
          if (failures < 10) $display("add %h+%h: got %h expected %h", x, y, s, e);
        end
      end
    end
    a <= W'(3 << FW);
    b <= W'(-(1 << (FW - 1)));
    @(posedge clk);
    a <= '0;
    b <= '0;
    for (int c = 1; c <= LAT + 2; c++) begin
      #1;
      if (c == LAT) begin
        checks++;
        if (s != W'(5 << (FW - 1))) begin
          failures++;
          $display("latency: sum not present after %0d cycles", LAT);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (saturated < 2) begin
      failures++;
      $display("sums leaving the word range: %0d", saturated);
    end
    $display("saturated sums: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
