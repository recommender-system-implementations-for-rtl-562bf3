// ppc_pkg: types and constants shared by the prediction parallel circuit
// (PPC) and the matrix-factorization training engine.
//
// All arithmetic is IEEE-754 single precision.  A value is carried as the
// packed struct fp32_t so that sign, exponent and fraction can be named.
// The default model sizes are those of the 20 x 5 test dataset (20 users,
// 5 items) with two latent factors, which is the configuration the PPC is
// built and measured for; the number of prediction elements defaults to
// 100, enough to predict every user/item pair of that dataset at once.
package ppc_pkg;

  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_t;

  localparam fp32_t FP32_ZERO  = '{sign: 1'b0, exp: 8'h00, frac: 23'h0};
  localparam fp32_t FP32_QNAN  = '{sign: 1'b0, exp: 8'hFF, frac: 23'h400000};

  // Default sizes of the test dataset and of the PPC.
  localparam int unsigned DEF_K         = 2;    // latent factors
  localparam int unsigned DEF_NUM_USERS = 20;   // rows of P
  localparam int unsigned DEF_NUM_ITEMS = 5;    // rows of Q
  localparam int unsigned DEF_NPE       = 100;  // prediction elements

  function automatic logic fp32_is_nan(fp32_t v);
    return (v.exp == 8'hFF) && (v.frac != '0);
  endfunction

  function automatic logic fp32_is_inf(fp32_t v);
    return (v.exp == 8'hFF) && (v.frac == '0);
  endfunction

  // Zero or subnormal: subnormal inputs are treated as zero.
  function automatic logic fp32_is_zero(fp32_t v);
    return v.exp == 8'h00;
  endfunction

endpackage
