// exp_ref_pkg: reference helpers shared by the exp() testbenches.
//
// The reference result is the simulator's double-precision $exp, an
// independent implementation. Results that exp() would give as subnormals
// are expected as +0, since the unit flushes them; results that overflow
// are expected as +inf. ulp_diff measures the distance of two doubles in
// units in the last place (both must be finite and non-negative).
package exp_ref_pkg;

  function automatic logic [63:0] ref_exp(input logic [63:0] x);
    real r;
    logic [63:0] b;
    if (x[62:52] == 11'h7FF && x[51:0] != '0) return 64'h7FF8_0000_0000_0000;
    r = $exp($bitstoreal(x));
    b = $realtobits(r);
    if (b[62:52] == 11'd0) return 64'd0;   // subnormal or zero: flushed
    return b;
  endfunction

  function automatic longint ulp_diff(input logic [63:0] a, input logic [63:0] b);
    longint d;
    d = longint'(a) - longint'(b);
    return (d < 0) ? -d : d;
  endfunction

  // Random double with exponent field in [emin, emax] and random sign.
  function automatic logic [63:0] rand_dbl(input int emin, input int emax);
    logic [51:0] f;
    logic [10:0] e;
    f = {$urandom(), $urandom()} ;
    e = 11'(emin + ($urandom() % (emax - emin + 1)));
    return {1'($urandom()), e, f};
  endfunction

endpackage
