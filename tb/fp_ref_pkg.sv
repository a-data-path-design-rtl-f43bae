// fp_ref_pkg: reference arithmetic for the testbenches, independent of the RTL.
//
// Single-precision words are widened exactly to double precision (`real`), the
// operation is done in double precision, and the result is rounded back to single
// precision with round-to-nearest-even. A product of two singles is exact in double,
// and so is a sum of two singles whose exponents differ by less than 29, so for those
// the result is the correctly rounded single-precision one. Subnormal inputs and
// results are flushed to zero, as the datapath does.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) d = {f[31], 63'd0};
    else if (f[30:23] == 8'hFF) d = {f[31], 11'h7FF, f[22:0], 29'd0};
    else d = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    logic        sgn;
    int          e;
    logic [52:0] m;     // hidden bit + 52 fraction bits
    logic [24:0] mr;
    logic        g, st;
    d   = $realtobits(r);
    sgn = d[63];
    if (d[62:52] == 11'd0) return {sgn, 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {sgn, 8'hFF, 23'd0};
    e  = int'(d[62:52]) - 896;
    m  = {1'b1, d[51:0]};
    g  = m[28];
    st = |m[27:0];
    mr = {1'b0, m[52:29]} + ((g && (st || m[29])) ? 25'd1 : 25'd0);
    if (mr[24]) begin
      e  = e + 1;
      mr = mr >> 1;
    end
    if (e >= 255) return {sgn, 8'hFF, 23'd0};
    if (e <= 0)   return {sgn, 31'd0};
    return {sgn, 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  // Random normal single with the exponent in [emin, emax] and a random sign
  function automatic logic [31:0] rand_fp(int emin, int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage
