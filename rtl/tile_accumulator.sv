// tile_accumulator: accumulation of tiles and output scaling.
//
// A linear combination wider than one tile is computed tile by tile: the
// b-entry results of the tiles of one output vector are summed here. The first
// tile starts the sum from zero in linear mode, and from the baseline intercept
// lambda_k in non-linear mode, which completes the piecewise-linear
// approximation. On the last tile the sum, which carries 2*FRAC fraction bits,
// is rounded (half up) to FRAC fraction bits and saturated to an n-bit signed
// word. Using the tile accumulator to add lambda_k, the rounding and the
// saturation are this implementation's choices.
//
// Timing: one tile per cycle; the result vector appears one cycle after the
// last tile, with valid_out high for one cycle. sat_out marks the entries of
// that vector that saturated.
module tile_accumulator
  import nlf_pkg::*;
#(
  parameter int unsigned B      = nlf_pkg::TILE_B,
  parameter int unsigned N      = nlf_pkg::WORD_N,
  parameter int unsigned FRAC   = nlf_pkg::FRAC_BITS,
  parameter int unsigned GUARD  = nlf_pkg::CNT_W,
  localparam int unsigned SUM_W = 2 * N + $clog2(B) + 1,
  localparam int unsigned ACC_W = SUM_W + GUARD
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     valid_in,
  input  logic                     first,    // first tile of an output vector
  input  logic                     last,     // last tile of an output vector
  input  mode_e                    m,
  input  logic [N-1:0]             lambda,   // baseline intercept, FRAC fraction bits
  input  logic [B-1:0][SUM_W-1:0]  v,        // tile result, 2*FRAC fraction bits
  output logic                     valid_out,
  output logic [B-1:0][N-1:0]      y,
  output logic [B-1:0]             sat_out
);

  localparam logic signed [ACC_W-1:0] ONE   = ACC_W'(1);
  localparam logic signed [ACC_W-1:0] MAX_Q = (ONE <<< (N - 1)) - ONE;
  localparam logic signed [ACC_W-1:0] MIN_Q = -(ONE <<< (N - 1));
  localparam logic signed [ACC_W-1:0] HALF  = ONE <<< (FRAC - 1);

  logic [B-1:0][ACC_W-1:0] acc_q, acc_d;
  logic signed [ACC_W-1:0] base;

  always_comb begin
    if (m == MODE_NONLINEAR) base = ACC_W'($signed(lambda)) <<< FRAC;
    else                     base = '0;
    for (int i = 0; i < B; i++)
      acc_d[i] = (first ? base : $signed(acc_q[i])) + ACC_W'($signed(v[i]));
  end

  always_ff @(posedge clk) begin
    if (valid_in) acc_q <= acc_d;
  end

  always_ff @(posedge clk) begin
    logic signed [ACC_W-1:0] r;
    if (valid_in && last) begin
      for (int i = 0; i < B; i++) begin
        r = ($signed(acc_d[i]) + HALF) >>> FRAC;
        if (r > MAX_Q) begin
          y[i] <= MAX_Q[N-1:0];
          sat_out[i] <= 1'b1;
        end else if (r < MIN_Q) begin
          y[i] <= MIN_Q[N-1:0];
          sat_out[i] <= 1'b1;
        end else begin
          y[i] <= r[N-1:0];
          sat_out[i] <= 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_out <= 1'b0;
    else        valid_out <= valid_in && last;
  end

endmodule
