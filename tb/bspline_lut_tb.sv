// bspline_lut_tb: reads all 4 x 1024 entries of the B-spline table and
// compares each with the basis function evaluated in double precision
// (relative error at most half a unit in the last place). Also checks that
// the four basis values for the same u sum to one (partition of unity) and
// that a value appears exactly one cycle after its address.
module bspline_lut_tb;
  import ffd_tb_pkg::*;
  localparam int FW = 10, EW = 8, MW = 12, W = EW + MW + 1;

  logic          clk = 0;
  logic [1:0]    basis;
  logic [FW-1:0] frac;
  logic [W-1:0]  value;
  int            checks = 0, failures = 0;

  bspline_lut #(.FRAC_W(FW), .EXP_W(EW), .MAN_W(MW)) dut (.clk, .basis, .frac, .value);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, ex, got, tol;
    basis = 0;
    frac  = 0;
    @(posedge clk);
    for (int f = 0; f < (1 << FW); f++) begin
      sum = 0.0;
      for (int i = 0; i < 4; i++) begin
        basis <= 2'(i);
        frac  <= FW'(f);
        @(posedge clk);
        #1;
        ex  = bspline(i, real'(f) / real'(1 << FW));
        got = fp2real(value, EW, MW);
        tol = ex * (2.0 ** (-MW - 1)) * 1.0001 + 1e-12;
        sum += got;
        checks++;
        if (got - ex > tol || ex - got > tol) begin
          failures++;
          if (failures < 10) $display("B%0d(%0d): got %g expected %g", i, f, got, ex);
        end
      end
      checks++;
      if (sum > 1.0 + 4.0 * 2.0 ** (-MW) || sum < 1.0 - 4.0 * 2.0 ** (-MW)) begin
        failures++;
        $display("partition of unity at %0d: %g", f, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
