// nlf_engine: matrix-vector engine that also evaluates non-linear functions.
//
// The engine computes either a tiled linear combination W x or a non-linear
// function f_k applied to every entry of a vector, with the same b*b
// multipliers and b*(b-1) adders. Non-linearity comes only from overriding the
// multiplier inputs:
//   data memory        -> data overrider        -> \
//                                                   matrix-vector multiplier -> tile accumulator -> data memory
//   coefficient memory -> coefficient overrider -> /
// In linear mode (m = 0) the data overrider passes copies of x and the
// coefficient memory supplies a weight tile. In non-linear mode (m = 1) row i
// of the multiplier sees beta_j for each segment below x_i, x_i in the segment
// holding it and 0 above, and the coefficient overrider reads the stored
// matrix whose rows are the segment slopes alpha_k; the tile accumulator adds
// the baseline intercept lambda_k. The result is the piecewise-linear
// approximation lambda_k + sum_{j below} alpha_j beta_j + alpha_seg x_i.
// A function is defined entirely by numbers in memory: its boundaries h_k,
// intercept terms beta_k and lambda_k in the function parameter memory and its
// slope matrix at coefficient address CMEM_DEPTH-K+k.
//
// Interface: the host loads the three memories through their write ports and
// reads results through the data memory read port, both only while the engine
// is idle (busy low). Instructions (nlf_pkg::instr_t) are given with a
// valid/ready handshake; done pulses when the last result has been written.
// Words are signed fixed point, n bits with FRAC fraction bits.
// Timing: one tile per cycle; a result reaches data memory 6 cycles after its
// last tile was issued, and done follows one cycle after the final write.
module nlf_engine
  import nlf_pkg::*;
#(
  parameter int unsigned B          = nlf_pkg::TILE_B,
  parameter int unsigned S          = nlf_pkg::SEG_S,
  parameter int unsigned N          = nlf_pkg::WORD_N,
  parameter int unsigned FRAC       = nlf_pkg::FRAC_BITS,
  parameter int unsigned K          = nlf_pkg::NUM_FUNCS,
  parameter int unsigned DMEM_DEPTH = nlf_pkg::DMEM_ENTRIES,
  parameter int unsigned CMEM_DEPTH = nlf_pkg::CMEM_ENTRIES,
  localparam int unsigned DAW   = $clog2(DMEM_DEPTH),
  localparam int unsigned CAW   = $clog2(CMEM_DEPTH),
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned SUM_W = 2 * N + $clog2(B) + 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // instructions
  input  logic                          instr_valid,
  output logic                          instr_ready,
  input  instr_t                        instr,
  output logic                          busy,
  output logic                          done,
  // data memory, host side
  input  logic                          dm_we,
  input  logic [DAW-1:0]                dm_waddr,
  input  logic [B-1:0][N-1:0]           dm_wdata,
  input  logic                          dm_re,
  input  logic [DAW-1:0]                dm_raddr,
  output logic [B-1:0][N-1:0]           dm_rdata,
  // coefficient memory, host side (weight tiles and slope matrices)
  input  logic                          cm_we,
  input  logic [CAW-1:0]                cm_waddr,
  input  logic [B-1:0][B-1:0][N-1:0]    cm_wdata,
  // function parameter memory, host side
  input  logic                          pm_we,
  input  logic [KW-1:0]                 pm_waddr,
  input  logic [B-2:0][N-1:0]           pm_h,       // boundaries h_1 .. h_{B-1}
  input  logic [B-1:0][N-1:0]           pm_beta,
  input  logic [N-1:0]                  pm_lambda,
  // results that saturated in the last written vector
  output logic [B-1:0]                  sat
);

  localparam int unsigned PW = (2 * B) * N;   // {lambda, beta, h}

  // controller
  logic            rd_en, arith_valid, acc_valid, acc_first, acc_last;
  logic [DAW-1:0]  ctl_raddr, wb_addr;
  logic [CAW-1:0]  tile_addr, coef_addr;
  logic [KW-1:0]   k;
  mode_e           m, arith_m, acc_m;

  // datapath
  logic [B-1:0][N-1:0]        x, y;
  logic [B-1:0][B-1:0][N-1:0] coef;
  logic [PW-1:0]              prm;
  logic [B-2:0][N-1:0]        h;
  logic [B-1:0][N-1:0]        beta;
  logic [N-1:0]               lambda;
  ovr_sel_e [B-1:0][B-1:0]    c;
  logic                       v_valid, y_valid;
  logic [B-1:0][SUM_W-1:0]    v;
  logic [B-1:0]               y_sat;

  nlf_controller #(.DAW(DAW), .CAW(CAW), .KW(KW)) u_ctl (
    .clk         (clk),
    .rst_n       (rst_n),
    .instr_valid (instr_valid),
    .instr_ready (instr_ready),
    .instr       (instr),
    .busy        (busy),
    .done        (done),
    .rd_en       (rd_en),
    .dmem_raddr  (ctl_raddr),
    .tile_addr   (tile_addr),
    .m           (m),
    .k           (k),
    .arith_valid (arith_valid),
    .arith_m     (arith_m),
    .acc_valid   (acc_valid),
    .acc_first   (acc_first),
    .acc_last    (acc_last),
    .acc_m       (acc_m),
    .wb_addr     (wb_addr)
  );

  // data memory: the engine's write back has priority; the host uses the
  // ports while the engine is idle
  ram_1r1w #(.WIDTH(B * N), .DEPTH(DMEM_DEPTH)) u_dmem (
    .clk   (clk),
    .we    (y_valid || dm_we),
    .waddr (y_valid ? wb_addr : dm_waddr),
    .wdata (y_valid ? y : dm_wdata),
    .re    (rd_en || dm_re),
    .raddr (busy ? ctl_raddr : dm_raddr),
    .rdata (x)
  );
  assign dm_rdata = x;

  coef_overrider #(.AW(CAW), .KW(KW), .FUNC_BASE(CMEM_DEPTH - K)) u_covr (
    .m         (m),
    .k         (k),
    .tile_addr (tile_addr),
    .coef_addr (coef_addr)
  );

  ram_1r1w #(.WIDTH(B * B * N), .DEPTH(CMEM_DEPTH)) u_cmem (
    .clk   (clk),
    .we    (cm_we),
    .waddr (cm_waddr),
    .wdata (cm_wdata),
    .re    (rd_en),
    .raddr (coef_addr),
    .rdata (coef)
  );

  // read every issue cycle; k is fixed for an instruction and the entry stays
  // on rdata until the next instruction, so lambda is still valid when the
  // accumulator needs it
  ram_1r1w #(.WIDTH(PW), .DEPTH(K)) u_pmem (
    .clk   (clk),
    .we    (pm_we),
    .waddr (pm_waddr),
    .wdata ({pm_lambda, pm_beta, pm_h}),
    .re    (rd_en),
    .raddr (k),
    .rdata (prm)
  );
  assign {lambda, beta, h} = prm;

  arith_block #(.B(B), .S(S), .N(N)) u_arith (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (arith_valid),
    .m         (arith_m),
    .x         (x),
    .coef      (coef),
    .h         (h),
    .beta      (beta),
    .c         (c),
    .valid_out (v_valid),
    .v         (v)
  );

  tile_accumulator #(.B(B), .N(N), .FRAC(FRAC)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .valid_in  (acc_valid),
    .first     (acc_first),
    .last      (acc_last),
    .m         (acc_m),
    .lambda    (lambda),
    .v         (v),
    .valid_out (y_valid),
    .y         (y),
    .sat_out   (y_sat)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       sat <= '0;
    else if (y_valid) sat <= y_sat;
  end

  a_host_idle: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !dm_we && !dm_re && !cm_we && !pm_we);
  a_datapath_aligned: assert property (@(posedge clk) disable iff (!rst_n)
    v_valid == acc_valid);

endmodule
