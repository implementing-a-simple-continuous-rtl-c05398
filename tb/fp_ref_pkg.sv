// fp_ref_pkg: single-precision reference arithmetic for the testbenches.
//
// Values are carried as IEEE-754 single-precision bit patterns. Each
// operation is done in double precision and rounded once to single precision
// (round to nearest even, on the bit pattern); for a sum, difference or
// product of two single-precision numbers this gives the correctly rounded
// result. Subnormal results are flushed to zero, as in the design.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real x);
    logic [63:0] d;
    logic [52:0] m;
    logic [28:0] rem;
    logic [24:0] mr;
    int e;
    d = $realtobits(x);
    if (d[62:0] == 63'd0) return 32'd0;
    e   = int'(d[62:52]) - 1023 + 127;
    m   = {1'b1, d[51:0]};
    rem = m[28:0];
    mr  = {1'b0, m[52:29]};
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && mr[0])) mr = mr + 1'b1;
    if (mr[24]) begin mr = mr >> 1; e = e + 1; end
    if (e <= 0) return 32'd0;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction
  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction
  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // cost = floor(x * 2^frac), 0 for x <= 0, all ones when it does not fit 32 bits
  function automatic longint to_cost(logic [31:0] f, int frac);
    real v;
    v = f2r(f) * (2.0 ** frac);
    if (v <= 0.0) return 0;
    if (v >= 4294967295.0) return 64'hFFFF_FFFF;
    return longint'($floor(v));
  endfunction

  function automatic logic [31:0] rand_fp(real lo, real hi);
    real u;
    u = real'($urandom) / 4294967296.0;
    return r2f(lo + (hi - lo) * u);
  endfunction

  // Negative log Gaussian of one state, summed in hardware order.
  function automatic logic [31:0] gauss_cost(logic [31:0] gc, logic [31:0] obs[],
                                             logic [31:0] mu[], logic [31:0] iv[]);
    logic [31:0] acc, d;
    acc = gc;
    foreach (obs[i]) begin
      d   = fsub(obs[i], mu[i]);
      acc = fadd(acc, fmul(fmul(d, d), iv[i]));
    end
    return acc;
  endfunction

endpackage
