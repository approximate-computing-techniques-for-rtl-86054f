// fp_ref_pkg: IEEE754 single <-> real conversion for testbenches, built on
// $realtobits/$bitstoreal (double precision). r2f rounds to nearest even;
// both handle normal numbers and zero only, which is all the tests use.
// r2fm rounds to a shorter fraction, as a reduced-mantissa unit does.
package fp_ref_pkg;
  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d = $realtobits(r);
    logic [52:0] m;       // 23 fraction bits, with room for the rounding carry
    int          e;
    logic        g, st;
    if (r == 0.0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {30'd0, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 1;
    if (m[23]) begin m = '0; e = e + 1; end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic real f2r(input logic [31:0] f);
    if (f[30:23] == 8'd0) return 0.0;
    return $bitstoreal({f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0});
  endfunction

  // real -> single precision keeping only mb fraction bits, round to nearest
  // even at that position (normal numbers only)
  function automatic logic [31:0] r2fm(input real r, input int mb);
    logic [63:0] d = $realtobits(r);
    logic [51:0] f;
    logic [23:0] m;
    int          e;
    logic        g, st;
    if (r == 0.0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    f  = d[51:0];
    m  = 24'(f >> (52 - mb));
    g  = f[51 - mb];
    st = (f & ((52'(1) << (51 - mb)) - 1)) != 0;
    if (g && (st || m[0])) m = m + 1;
    if (m[mb]) begin m = '0; e = e + 1; end
    return {d[63], 8'(e), 23'(m) << (23 - mb)};
  endfunction

  // keep only the mb most significant fraction bits
  function automatic logic [31:0] ftrunc(input logic [31:0] f, input int mb);
    return f & ~((32'(1) << (23 - mb)) - 1);
  endfunction
endpackage
