// fx_mult_tb: self-checking test of the pipelined fixed-point multiplier.
// Feeds one operand pair per cycle: random words of several magnitudes,
// both signs, zero, exact cases and pairs whose product leaves the word
// range. The expected product is worked out with reals (exact for these
// widths), rounded to nearest with ties upwards and clamped to the word
// range, and must match bit for bit exactly LAT cycles later. A single
// product after quiet cycles checks the 6-cycle latency directly.
module fx_mult_tb;
  import ffd_tb_pkg::*;
  localparam int IW = 8, FW = 12, LAT = 6, W = IW + FW + 1, N = 3000;

  logic         clk = 0;
  logic [W-1:0] a, b, p;
  int           checks = 0, failures = 0, saturated = 0;

  fx_mult #(.INT_W(IW), .FRAC_W(FW), .LAT(LAT)) dut (.clk, .a, .b, .p);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] expected(logic [W-1:0] x, logic [W-1:0] y);
    real    ex, lim;
    longint v;
    ex  = fx2real(64'(x), IW, FW) * fx2real(64'(y), IW, FW);
    lim = 2.0 ** IW;
    v   = longint'($floor(ex * 2.0 ** FW + 0.5));
    if (ex >= lim) v = (longint'(1) << (IW + FW)) - 1;
    if (ex < -lim) v = -(longint'(1) << (IW + FW));
    return W'(v);
  endfunction

  // random word whose magnitude has about `bits` significant bits
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
          0: begin x = W'(3 << (FW - 1)); y = x; end                 // 1.5 * 1.5
          1: begin x = '0; y = rnd(W - 1); end                       // zero
          2: begin x = W'(1); y = W'(1 << (FW - 1)); end             // tie: 2^-13 -> up
          3: begin x = W'(-1); y = W'(1 << (FW - 1)); end            // tie below zero
          4: begin x = W'(100 << FW); y = W'(-(100 << FW)); end      // saturates low
          default: begin
            x = rnd($urandom_range(4, W - 1));
            y = rnd($urandom_range(4, W - 1));
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
        if (p !== e) begin
          failures++;
          if (failures < 10) $display("mult %h*%h: got %h expected %h", x, y, p, e);
        end
      end
    end
    // latency: a single product after quiet cycles
    a <= W'(2 << FW);
    b <= W'(-(3 << FW));
    @(posedge clk);
    a <= '0;
    b <= '0;
    for (int c = 1; c <= LAT + 2; c++) begin
      #1;
      if (c == LAT) begin
        checks++;
        if (p != W'(-(6 << FW))) begin
          failures++;
          $display("latency: product not present after %0d cycles", LAT);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (saturated == 0) begin
      failures++;
      $display("no product left the word range");
    end
    $display("saturated products: %0d", saturated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
