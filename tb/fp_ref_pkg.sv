// fp_ref_pkg: testbench reference arithmetic for IEEE-754 single precision.
//
// Converts between 32-bit float encodings and the simulator's double
// precision "real". A product or sum of two floats worked out in double
// precision and then rounded once to single precision (round to nearest,
// ties to even) is the correctly rounded single-precision result, so these
// functions give exact expected values for the float units. Like the design,
// subnormals are treated as zero. Also holds a small random-number helper.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
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
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal float with biased exponent in [emin, emax].
  function automatic logic [31:0] rand_fp(input int emin, input int emax);
    logic [31:0] f;
    f[31]    = 1'($urandom);
    f[30:23] = 8'(emin + int'($urandom_range(0, emax - emin)));
    f[22:0]  = 23'($urandom);
    return f;
  endfunction

  // Relative closeness test for accumulated results.
  function automatic bit close(input real got, input real want, input real rel,
                               input real abs_tol);
    real diff, mag;
    diff = got - want;
    if (diff < 0.0) diff = -diff;
    mag = (want < 0.0) ? -want : want;
    return diff <= abs_tol + rel * mag;
  endfunction

endpackage
