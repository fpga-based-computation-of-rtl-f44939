// delay_line: a plain N-stage shift register of W-bit words, N >= 0
// (N = 0 is a wire). Used to keep per-term tags and operands aligned with
// the fixed latencies of the lookup tables, memories and arithmetic units.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned N = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (N == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [W-1:0] r [N];
    always_ff @(posedge clk) begin
      r[0] <= d;
      for (int i = 1; i < int'(N); i++) r[i] <= r[i-1];
    end
    assign q = r[N-1];
  end
endmodule
