// tb_fp_pkg: reference helpers for the testbenches, independent of the RTL.
//
// Values are converted through the simulator's double-precision reals: a binary32
// is widened exactly to a double, and a double is rounded to binary32 here with
// round-to-nearest-even and flush-to-zero below the normal range.
package tb_fp_pkg;

  function automatic real sp2r(input logic [31:0] a);
    logic [63:0] d;
    if (a[30:23] == 8'h00) return 0.0;
    d = {a[31], 11'(int'(a[30:23]) - 127 + 1023), a[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2sp(input real v);
    logic [63:0] d;
    int          ex;
    logic [24:0] man;
    logic [28:0] rest;
    d = $realtobits(v);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    ex   = int'(d[62:52]) - 1023 + 127;
    man  = {2'b01, d[51:29]};
    rest = d[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && man[0])) man = man + 1;
    if (man[24]) begin man = man >> 1; ex = ex + 1; end
    if (ex <= 0)   return {d[63], 31'd0};
    if (ex >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(ex), man[22:0]};
  endfunction

  function automatic logic isnan32(input logic [31:0] a);
    return (a[30:23] == 8'hFF) && (a[22:0] != 0);
  endfunction

  // Error of got against the exact value refv, in units of the binary32 ulp at refv.
  function automatic real ulp_err(input logic [31:0] got, input real refv);
    real mag;
    real ulp;
    int  e;
    mag = (refv < 0) ? -refv : refv;
    if (mag == 0.0) return (sp2r(got) == 0.0) ? 0.0 : 1.0e9;
    e   = $floor($ln(mag) / $ln(2.0));
    if (2.0 ** e > mag) e = e - 1;
    if (2.0 ** (e + 1) <= mag) e = e + 1;
    if (e < -126) e = -126;
    ulp = 2.0 ** (e - 23);
    return ((sp2r(got) - refv) < 0 ? refv - sp2r(got) : sp2r(got) - refv) / ulp;
  endfunction

  // Random binary32 with the given range of unbiased exponents.
  function automatic logic [31:0] rand_fp(input logic s, input int emin, input int emax);
    int e;
    e = emin + int'($urandom_range(emax - emin));
    return {s, 8'(e + 127), 23'($urandom)};
  endfunction

endpackage
