// tb_fp_pkg: reference floating-point helpers for the testbenches.
//
// Values are converted between the IEEE 754 bit patterns of a format with E
// exponent and M fraction bits and the simulator's double-precision real. The
// arithmetic itself is done in double precision, which holds a single- or
// half-precision product exactly and rounds a sum only once more finely than the
// target (53 >= 2*24+2 bits), so rounding the double to the target format with
// to_fp gives the correctly rounded result. The conversion follows the
// conventions of the RTL: round to nearest even, subnormals flushed to zero,
// overflow to infinity.
package tb_fp_pkg;

  function automatic real from_fp(logic [31:0] x, int E, int M);
    logic        s;
    int          e;
    logic [51:0] f;
    s = x[E+M];
    e = int'((x >> M) & ((32'd1 << E) - 1));
    f = 52'(x & ((32'd1 << M) - 1));
    f = f << (52 - M);
    if (e == 0) return $bitstoreal({s, 63'd0});
    return $bitstoreal({s, 11'(e - ((1 << (E-1)) - 1) + 1023), f});
  endfunction

  function automatic logic [31:0] to_fp(real r, int E, int M);
    logic [63:0] d;
    logic        s;
    int          e;
    logic [52:0] f, q, rem, half;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 0) return 32'(s) << (E + M);
    e    = int'(d[62:52]) - 1023 + ((1 << (E-1)) - 1);
    f    = {1'b1, d[51:0]};
    q    = f >> (52 - M);
    rem  = f & ((53'd1 << (52 - M)) - 1);
    half = 53'd1 << (51 - M);
    if (rem > half || (rem == half && q[0])) q = q + 1;
    if (q == (53'd1 << (M + 1))) begin
      q = q >> 1;
      e = e + 1;
    end
    if (e <= 0) return 32'(s) << (E + M);
    if (e >= (1 << E) - 1) return (32'(s) << (E + M)) | (((32'd1 << E) - 1) << M);
    return (32'(s) << (E + M)) | (32'(e) << M) | 32'(q & ((53'd1 << M) - 1));
  endfunction

  // random normal number of the format with exponent in [emin, emax] (biased)
  function automatic logic [31:0] rand_fp(int E, int M, int emin, int emax);
    logic [31:0] s, e, f;
    s = 32'($urandom_range(0, 1));
    e = 32'($urandom_range(emin, emax));
    f = $urandom & ((32'd1 << M) - 1);
    return (s << (E + M)) | (e << M) | f;
  endfunction

endpackage
