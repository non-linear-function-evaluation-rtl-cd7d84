// arith_block: matrix-vector multiplier extended with the data overrider.
//
// The data overrider turns the vector x into the b x b multiplier inputs psi
// (copies of x in linear mode; 0, x_i or beta_j per segment in non-linear
// mode). The coefficient matrix phi arrives already overridden: W in linear
// mode, the matrix whose rows are the slopes alpha_k in non-linear mode. The
// multiplier then produces
//   linear:     v = W x
//   non-linear: v_i = sum_{j below x_i} alpha_j beta_j + alpha_seg(x_i) x_i
// which is the piecewise-linear approximation without its baseline intercept.
//
// Timing: one vector per cycle. Inputs are registered after the overrider,
// then the two mvm stages follow: three cycles from valid_in to valid_out.
// The c codes of the overrider are brought out for observation (same cycle
// as the inputs).
module arith_block
  import nlf_pkg::*;
#(
  parameter int unsigned B = nlf_pkg::TILE_B,
  parameter int unsigned S = nlf_pkg::SEG_S,
  parameter int unsigned N = nlf_pkg::WORD_N,
  localparam int unsigned SUM_W = 2 * N + $clog2(B) + 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            valid_in,
  input  mode_e                           m,
  input  logic [B-1:0][N-1:0]             x,
  input  logic [B-1:0][B-1:0][N-1:0]      coef,  // W or rows of alpha_k
  input  logic [B-2:0][N-1:0]             h,     // boundaries h_1 .. h_{B-1}
  input  logic [B-1:0][N-1:0]             beta,
  output ovr_sel_e [B-1:0][B-1:0]         c,
  output logic                            valid_out,
  output logic [B-1:0][SUM_W-1:0]         v
);

  logic [B-1:0][B-1:0][N-1:0] psi_d, psi_q, phi_q;
  logic                       valid_q;

  data_overrider #(.B(B), .S(S), .N(N)) u_ovr (
    .m    (m),
    .x    (x),
    .h    (h),
    .beta (beta),
    .psi  (psi_d),
    .c    (c)
  );

  always_ff @(posedge clk) begin
    psi_q <= psi_d;
    phi_q <= coef;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= 1'b0;
    else        valid_q <= valid_in;
  end

  mvm #(.B(B), .N(N)) u_mvm (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (valid_q),
    .phi       (phi_q),
    .psi       (psi_q),
    .valid_out (valid_out),
    .v         (v)
  );

endmodule
