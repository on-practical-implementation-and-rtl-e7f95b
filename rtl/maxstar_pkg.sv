// maxstar_pkg: types, constants and helpers shared by the max* operator units
// and the joint turbo/LDPC check node.
//
// Log-likelihood ratios (LLRs) are signed two's-complement fixed-point numbers
// of LLR_W bits with LLR_F fractional bits (8 bits with 3 fractional bits, as
// used for the synthesis figures of the design). The generalized max*
// architectures (A1/A2/A3) take real-valued PWL coefficients a_i and b_i as
// integers scaled by 2**COEF_F; COEF_F = 8 is a choice of this implementation,
// fine enough to hold the power-of-two coefficients exactly and ln(2) to within
// 0.002.
package maxstar_pkg;

  localparam int LLR_W  = 8;  // LLR word width
  localparam int LLR_F  = 3;  // fractional bits of an LLR
  localparam int COEF_F = 8;  // fractional bits of a PWL coefficient

  // Operating mode of the programmable units of the joint check node.
  typedef enum logic {
    MODE_TURBO = 1'b0,  // two independent 8-input max* operations
    MODE_LDPC  = 1'b1   // one 8-input check-node (box-plus) operation
  } mode_e;

  // Which fixed max* approximation a programmable unit is built with.
  typedef enum logic {
    ALG_R4_A3 = 1'b0,   // r = 4, A3 form: x* + max{0, 0.5 -/+ 0.25*delta}
    ALG_R3_A2 = 1'b1    // r = 3, A2 form: max{x*, 0.5*(x1 + x2 + 1)}
  } maxstar_alg_e;

  // Clamp an integer to the range of a signed w-bit word.
  function automatic int sat_int(input int v, input int w);
    int hi, lo;
    hi = (1 <<< (w - 1)) - 1;
    lo = -(1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // True when v lies outside the range of a signed w-bit word.
  function automatic logic ovf_int(input int v, input int w);
    return (v > ((1 <<< (w - 1)) - 1)) || (v < -(1 <<< (w - 1)));
  endfunction

endpackage
