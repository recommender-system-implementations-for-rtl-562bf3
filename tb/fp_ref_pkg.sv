// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are widened to double precision, operated on with the simulator's
// real arithmetic, and rounded back to single precision (nearest, ties to
// even) by the bit-level routine to_fp32.  For one addition or
// multiplication of two single-precision values this double rounding gives
// the correctly rounded single-precision result.  Like the hardware, it
// treats subnormals as zero and flushes results below the normal range.
package fp_ref_pkg;

  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, f[22:0], 29'd0};
    end else begin
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_fp32(real x);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(x);
    if (d[62:52] == 11'h7FF) begin
      if (d[51:0] != 0) return 32'h7FC00000;
      return {d[63], 8'hFF, 23'd0};
    end
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic is_nan(logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  // Equal bit patterns, or both NaN.
  function automatic logic same(logic [31:0] a, logic [31:0] b);
    return (a == b) || (is_nan(a) && is_nan(b));
  endfunction

  // A random normal number with an exponent in [emin, emax].
  function automatic logic [31:0] rand_fp(int emin, int emax);
    logic [31:0] r;
    r = $urandom;
    return {r[31], 8'(emin + int'($urandom % unsigned'(emax - emin + 1))), r[22:0]};
  endfunction

endpackage
