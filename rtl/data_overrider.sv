// data_overrider: the b x b four-to-one multiplexers in front of the
// multipliers.
//
// Multiplexer [i][j] feeds the multiplier in row i, column j. Its inputs are
// x_j (code 00), zero (01), x_i (10) and beta_j of the selected function (11);
// the codes come from override_ctrl. With m = 0 every row receives a copy of
// x, so the multiplier computes W x. With m = 1 row i receives, for each
// segment j, beta_j if the segment lies below x_i, x_i in the segment that
// holds x_i and zero above it. Purely combinational; c is also brought out so
// that a test can observe which case each multiplexer took.
module data_overrider
  import nlf_pkg::*;
#(
  parameter int unsigned B = nlf_pkg::TILE_B,
  parameter int unsigned S = nlf_pkg::SEG_S,
  parameter int unsigned N = nlf_pkg::WORD_N
) (
  input  mode_e                          m,
  input  logic [B-1:0][N-1:0]            x,     // x_i
  input  logic [B-2:0][N-1:0]            h,     // boundaries h_1 .. h_{B-1}
  input  logic [B-1:0][N-1:0]            beta,  // beta_j
  output logic [B-1:0][B-1:0][N-1:0]     psi,   // psi[i][j], multiplier inputs
  output ovr_sel_e [B-1:0][B-1:0]        c
);

  override_ctrl #(.B(B), .S(S), .N(N)) u_ctrl (
    .m (m),
    .x (x),
    .h (h),
    .c (c)
  );

  always_comb begin
    for (int i = 0; i < B; i++) begin
      for (int j = 0; j < B; j++) begin
        unique case (c[i][j])
          SEL_LINEAR: psi[i][j] = x[j];
          SEL_ZERO:   psi[i][j] = '0;
          SEL_INPUT:  psi[i][j] = x[i];
          SEL_BETA:   psi[i][j] = beta[j];
          default:    psi[i][j] = '0;
        endcase
      end
    end
  end

endmodule
