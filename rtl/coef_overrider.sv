// coef_overrider: chooses which coefficient matrix feeds the multipliers.
//
// In linear mode the multipliers take the weight tile W at tile_addr. In
// non-linear mode every row of the coefficient matrix must be the slope vector
// alpha_k of function k. Because that matrix does not depend on the data it is
// not built by multiplexers: it is stored, pre-computed, in the coefficient
// memory at FUNC_BASE + k, and this block only steers the memory address.
// Storing the overridden matrices follows the design; placing them in the top
// K entries of the coefficient memory is this implementation's choice.
// Purely combinational.
module coef_overrider
  import nlf_pkg::*;
#(
  parameter int unsigned AW        = $clog2(nlf_pkg::CMEM_ENTRIES),
  parameter int unsigned KW        = $clog2(nlf_pkg::NUM_FUNCS),
  parameter int unsigned FUNC_BASE = nlf_pkg::CMEM_ENTRIES - nlf_pkg::NUM_FUNCS
) (
  input  mode_e            m,
  input  logic [KW-1:0]    k,          // function selector
  input  logic [AW-1:0]    tile_addr,  // weight tile for linear mode
  output logic [AW-1:0]    coef_addr
);

  always_comb begin
    if (m == MODE_NONLINEAR) coef_addr = AW'(FUNC_BASE) + AW'(k);
    else                     coef_addr = tile_addr;
  end

endmodule
