// nlf_pkg: constants and types shared by the non-linear function engine.
//
// The engine is a b x b matrix-vector multiplier whose inputs can be overridden
// so that the same multipliers and adders evaluate a piecewise-linear
// approximation of a non-linear function. The defaults below give the main
// configuration: b = s = 16 (tile width and number of segments) and K = 8
// functions. The word width n = 32 with 16 fraction bits is one of the widths
// the design was evaluated at (16, 32 and 64 bits); the fraction split, memory
// depths and instruction field widths are this implementation's own choices.
package nlf_pkg;

  parameter int unsigned TILE_B       = 16;  // tile width b
  parameter int unsigned SEG_S        = 16;  // segments s of the approximation, 1..TILE_B
  parameter int unsigned WORD_N       = 32;  // fixed-point word width n
  parameter int unsigned FRAC_BITS    = 16;  // fraction bits of a word
  parameter int unsigned NUM_FUNCS    = 8;   // non-linear functions held
  parameter int unsigned DMEM_ENTRIES = 64;  // vectors in data memory
  parameter int unsigned CMEM_ENTRIES = 32;  // matrices in coefficient memory
  parameter int unsigned ADDR_W       = 8;   // width of the address fields of an instruction
  parameter int unsigned CNT_W        = 8;   // width of the tile counts of an instruction

  // Two-bit control c_ij of one override multiplexer.
  typedef enum logic [1:0] {
    SEL_LINEAR = 2'b00,  // pass x_j (linear combination)
    SEL_ZERO   = 2'b01,  // x_i lies below segment j
    SEL_INPUT  = 2'b10,  // x_i lies inside segment j
    SEL_BETA   = 2'b11   // x_i lies above segment j
  } ovr_sel_e;

  // Control signal m.
  typedef enum logic {
    MODE_LINEAR    = 1'b0,
    MODE_NONLINEAR = 1'b1
  } mode_e;

  // One operation for the engine.
  //  MODE_LINEAR:    for o < n_out: dst+o = sum over t < n_in of W[coef + o*n_in + t] * x[src + t]
  //  MODE_NONLINEAR: for o < n_out: dst+o = f_func(x[src + o]) entry by entry (n_in unused)
  typedef struct packed {
    mode_e             mode;
    logic [7:0]        func;
    logic [ADDR_W-1:0] src;
    logic [ADDR_W-1:0] dst;
    logic [ADDR_W-1:0] coef;
    logic [CNT_W-1:0]  n_in;
    logic [CNT_W-1:0]  n_out;
  } instr_t;

endpackage
