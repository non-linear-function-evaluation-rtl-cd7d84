// override_ctrl: segment comparators and the control code of every override
// multiplexer.
//
// For each input x_i the block compares x_i with the inner segment boundaries
// h_1 .. h_{S-1} of the selected function; h_0 = -inf and h_S .. h_B = +inf are
// implied, so there are B*(S-1) comparators. For multiplexer [i][j] the two
// results lt_j = (x_i < h_j) and lt_{j+1} = (x_i < h_{j+1}) give the code
//   m = 0                 -> 00  (x_j, linear combination)
//   lt_j and lt_{j+1}     -> 01  (0: segment j lies above x_i)
//   !lt_j and lt_{j+1}    -> 10  (x_i: x_i lies in segment j)
//   !lt_j and !lt_{j+1}   -> 11  (beta_j: segment j lies below x_i)
// The code assignment and the strict "<" comparisons follow the design's
// control table; the case lt_j and !lt_{j+1} cannot occur with ascending
// boundaries and is given code 01. Words are signed two's complement.
// Purely combinational.
module override_ctrl
  import nlf_pkg::*;
#(
  parameter int unsigned B = nlf_pkg::TILE_B,
  parameter int unsigned S = nlf_pkg::SEG_S,
  parameter int unsigned N = nlf_pkg::WORD_N
) (
  input  mode_e                          m,
  input  logic [B-1:0][N-1:0]            x,  // x_i
  input  logic [B-2:0][N-1:0]            h,  // h[j-1] holds boundary h_j, j = 1..B-1
  output ovr_sel_e [B-1:0][B-1:0]        c   // c[i][j]
);

  // lt[i][j] = (x_i < h_j), j = 0..B
  logic [B-1:0][B:0] lt;

  always_comb begin
    for (int i = 0; i < B; i++) begin
      lt[i][0] = 1'b0;                               // h_0 = -inf
      for (int j = 1; j < B; j++) begin
        if (j < S) lt[i][j] = $signed(x[i]) < $signed(h[j-1]);
        else       lt[i][j] = 1'b1;                  // unused segments: h_j = +inf
      end
      lt[i][B] = 1'b1;                               // h_B = +inf
    end
  end

  always_comb begin
    for (int i = 0; i < B; i++) begin
      for (int j = 0; j < B; j++) begin
        if (m == MODE_LINEAR)  c[i][j] = SEL_LINEAR;
        else if (!lt[i][j+1])  c[i][j] = SEL_BETA;
        else if (lt[i][j])     c[i][j] = SEL_ZERO;
        else                   c[i][j] = SEL_INPUT;
      end
    end
  end

endmodule
