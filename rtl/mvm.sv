// mvm: the original b x b matrix-vector multiplier.
//
// Row i holds b multipliers and an adder tree of b-1 adders:
//   v_i = sum_j phi[i][j] * psi[i][j]
// Every multiplier has its own data input psi[i][j]; in plain use all rows
// receive the same vector, and the data overrider in front of it may replace
// those inputs without touching the multipliers or adders. Inputs are signed
// n-bit words; products keep all 2n bits and sums are 2n + log2(b) bits wide,
// so nothing is lost (the result has twice the fraction bits of the inputs).
//
// Timing: fully pipelined, one matrix-vector product per cycle, two cycles of
// latency (product register, sum register). The pipelining is this
// implementation's choice; the design only asks for full pipelining.
module mvm #(
  parameter int unsigned B = nlf_pkg::TILE_B,
  parameter int unsigned N = nlf_pkg::WORD_N,
  localparam int unsigned SUM_W = 2 * N + $clog2(B) + 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            valid_in,
  input  logic [B-1:0][B-1:0][N-1:0]      phi,   // coefficient matrix
  input  logic [B-1:0][B-1:0][N-1:0]      psi,   // per-multiplier data inputs
  output logic                            valid_out,
  output logic [B-1:0][SUM_W-1:0]         v
);

  logic [B-1:0][B-1:0][2*N-1:0] prod_q;
  logic                         valid_q;
  logic [B-1:0][SUM_W-1:0]      sum_d;

  always_ff @(posedge clk) begin
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++)
        prod_q[i][j] <= (2*N)'($signed(phi[i][j]) * $signed(psi[i][j]));
  end

  always_comb begin
    for (int i = 0; i < B; i++) begin
      sum_d[i] = '0;
      for (int j = 0; j < B; j++)
        sum_d[i] = SUM_W'($signed(sum_d[i]) + $signed(prod_q[i][j]));
    end
  end

  always_ff @(posedge clk) begin
    v <= sum_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_q   <= valid_in;
      valid_out <= valid_q;
    end
  end

endmodule
