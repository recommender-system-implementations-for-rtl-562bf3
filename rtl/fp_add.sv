// fp_add: IEEE-754 single-precision adder with a registered output.
//
// One sum per clock, latency one cycle: a and b presented with in_valid at
// a rising edge appear on y with out_valid after that edge.  The operand of
// larger magnitude is taken as the base; the other one's significand is
// shifted right by the exponent difference, keeping guard, round and
// sticky bits.  Like signs add (with at most one right renormalisation),
// unlike signs subtract (with a leading-zero count and left shift), and the
// result is rounded to nearest, ties to even.  Subnormal inputs are read as
// zero, results below the normal range flush to zero, overflow gives a
// signed infinity, and NaN or (+inf) + (-inf) gives the quiet NaN
// 0x7FC00000.  An exact cancellation gives +0.  The adders of the
// prediction circuit are single-precision floating-point units; these
// internal choices are this design's own.
module fp_add
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

  fp32_t        larger, lesser, y_c;
  logic [7:0]   d;
  logic [26:0]  mb, ms, ms_sh;      // [26] hidden, [25:3] fraction, [2:0] g/r/s
  logic [27:0]  sum;
  logic [26:0]  norm;
  logic signed [9:0] exp_c;
  logic [4:0]   lz;
  logic         found, round_up, sticky;
  logic [24:0]  mant_r;

  always_comb begin
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      larger = a; lesser = b;
    end else begin
      larger = b; lesser = a;
    end
    d  = larger.exp - lesser.exp;
    mb = {1'b1, larger.frac, 3'b000};
    ms = {1'b1, lesser.frac, 3'b000};
    sticky = 1'b0;
    if (d >= 8'd27) begin
      ms_sh = {26'd0, 1'b1};
    end else begin
      for (int i = 0; i < 27; i++)
        if (i < int'(d)) sticky = sticky | ms[i];
      ms_sh = (ms >> d) | {26'd0, sticky};
    end

    exp_c = 10'(signed'({2'b00, larger.exp}));
    if (larger.sign == lesser.sign) begin
      sum = {1'b0, mb} + {1'b0, ms_sh};
    end else begin
      sum = {1'b0, mb} - {1'b0, ms_sh};
    end

    // Normalise.
    lz    = '0;
    found = 1'b0;
    if (sum[27]) begin
      norm  = sum[27:1] | {26'd0, sum[0]};
      exp_c = exp_c + 10'sd1;
    end else begin
      for (int i = 26; i >= 0; i--) begin
        if (!found && sum[i]) begin
          found = 1'b1;
          lz    = 5'(26 - i);
        end
      end
      norm  = sum[26:0] << lz;
      exp_c = exp_c - 10'(signed'({5'b0, lz}));
    end

    round_up = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r   = {1'b0, norm[26:3]} + 25'(round_up);
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      exp_c  = exp_c + 10'sd1;
    end

    if (fp32_is_nan(a) || fp32_is_nan(b) ||
        (fp32_is_inf(a) && fp32_is_inf(b) && (a.sign != b.sign))) begin
      y_c = FP32_QNAN;
    end else if (fp32_is_inf(a)) begin
      y_c = a;
    end else if (fp32_is_inf(b)) begin
      y_c = b;
    end else if (fp32_is_zero(a) && fp32_is_zero(b)) begin
      y_c = '{sign: a.sign & b.sign, exp: 8'h00, frac: '0};
    end else if (fp32_is_zero(b)) begin
      y_c = a;
    end else if (fp32_is_zero(a)) begin
      y_c = b;
    end else if (sum == '0 || exp_c <= 10'sd0) begin
      y_c = FP32_ZERO;
    end else if (exp_c >= 10'sd255) begin
      y_c = '{sign: larger.sign, exp: 8'hFF, frac: '0};
    end else begin
      y_c = '{sign: larger.sign, exp: exp_c[7:0], frac: mant_r[22:0]};
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
