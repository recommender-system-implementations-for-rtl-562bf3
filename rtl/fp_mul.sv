// fp_mul: IEEE-754 single-precision multiplier with a registered output.
//
// One product per clock, latency one cycle: a and b presented with
// in_valid at a rising edge appear on y with out_valid after that edge.
// The 24 x 24 bit significand product is normalised by at most one place
// and rounded to nearest, ties to even.  Subnormal inputs are read as zero
// and results below the normal range are flushed to a signed zero;
// overflow gives a signed infinity, and NaN or infinity times zero gives
// the quiet NaN 0x7FC00000.  The multipliers of the prediction circuit are
// single-precision floating-point units with one result per cycle; the
// rounding, flush-to-zero policy and the one-cycle latency are this
// design's own choices.
module fp_mul
  import ppc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t        y_c;
  logic         sign_c;
  logic [47:0]  prod;
  logic signed [10:0] exp_c;
  logic [23:0]  mant;       // 1.xxx before rounding, hidden bit at [23]
  logic         guard, sticky, round_up;
  logic [24:0]  mant_r;

  always_comb begin
    sign_c = a.sign ^ b.sign;
    prod   = {1'b1, a.frac} * {1'b1, b.frac};
    exp_c  = 11'(signed'({3'b000, a.exp})) + 11'(signed'({3'b000, b.exp})) - 11'sd127;
    if (prod[47]) begin
      mant   = prod[47:24];
      guard  = prod[23];
      sticky = |prod[22:0];
      exp_c  = exp_c + 11'sd1;
    end else begin
      mant   = prod[46:23];
      guard  = prod[22];
      sticky = |prod[21:0];
    end
    round_up = guard & (sticky | mant[0]);
    mant_r   = {1'b0, mant} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_c  = exp_c + 11'sd1;
    end

    if (fp32_is_nan(a) || fp32_is_nan(b) ||
        (fp32_is_inf(a) && fp32_is_zero(b)) ||
        (fp32_is_inf(b) && fp32_is_zero(a))) begin
      y_c = FP32_QNAN;
    end else if (fp32_is_inf(a) || fp32_is_inf(b)) begin
      y_c = '{sign: sign_c, exp: 8'hFF, frac: '0};
    end else if (fp32_is_zero(a) || fp32_is_zero(b) || exp_c <= 11'sd0) begin
      y_c = '{sign: sign_c, exp: 8'h00, frac: '0};
    end else if (exp_c >= 11'sd255) begin
      y_c = '{sign: sign_c, exp: 8'hFF, frac: '0};
    end else begin
      y_c = '{sign: sign_c, exp: exp_c[7:0], frac: mant_r[22:0]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= FP32_ZERO;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= y_c;
    end
  end

endmodule
