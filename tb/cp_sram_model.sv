// cp_sram_model: behavioural model of an external synchronous SRAM bank
// holding a control-point lattice (not synthesizable logic of the design;
// it stands in for the board memory in simulation). A read request with
// address {component, K, J, I} returns the word LAT cycles later. The
// contents are not stored but generated by ffd_tb_pkg::phi_value from the
// address, i.e. a lattice of NX x NY (x NZ) points including the zero border,
// in the floating-point format or, with FIXED = 1, in fixed point.
module cp_sram_model #(
  parameter bit          FIXED = 1'b0,
  parameter int unsigned IDX_W = 9,
  parameter int unsigned FP_W  = 21,
  parameter int unsigned EXP_W = 8,
  parameter int unsigned MAN_W = 12,
  parameter int unsigned LAT   = 2,
  parameter int unsigned DIM   = 2,
  parameter int unsigned NX    = 6,
  parameter int unsigned NY    = 6,
  parameter int unsigned NZ    = 1,
  parameter int unsigned SEED  = 1
) (
  input  logic                   clk,
  input  logic                   rd,
  input  logic [2+3*IDX_W-1:0]   addr,
  output logic [FP_W-1:0]        data,
  output int unsigned            border_reads   // reads that hit the zero border
);
  logic [FP_W-1:0] pipe [LAT];
  int c, k, j, i;

  initial border_reads = 0;

  always @(posedge clk) begin
    c = int'(addr[2+3*IDX_W-1:3*IDX_W]);
    k = int'(addr[3*IDX_W-1:2*IDX_W]);
    j = int'(addr[2*IDX_W-1:IDX_W]);
    i = int'(addr[IDX_W-1:0]);
    pipe[0] <= rd ? FP_W'(ffd_tb_pkg::phi_value(SEED, c, k, j, i, int'(NX), int'(NY), int'(NZ),
                                                int'(DIM), int'(EXP_W), int'(MAN_W), FIXED))
                  : '0;
    if (rd && (i == 0 || i == int'(NX) - 1 || j == 0 || j == int'(NY) - 1 ||
               (DIM == 3 && (k == 0 || k == int'(NZ) - 1))))
      border_reads <= border_reads + 1;
    for (int s = 1; s < int'(LAT); s++) pipe[s] <= pipe[s-1];
  end

  assign data = pipe[LAT-1];
endmodule
