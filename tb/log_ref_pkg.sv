// log_ref_pkg: reference model of the log-domain estimator for testbenches,
// written in real arithmetic on log2 values rather than on fixed-point words:
// a log word stands for log2|x| = mag/32 - 127 with the sign kept apart.
package log_ref_pkg;
  function automatic real lval(input logic [13:0] l);
    return real'(l[12:0]) / 32.0 - 127.0;
  endfunction

  // encode a log2 value (already on the 1/32 grid) with saturation
  function automatic logic [13:0] lenc(input logic s, input real v);
    real m = (v + 127.0) * 32.0;
    if (m < 0.0) m = 0.0;
    if (m > 8159.0) m = 8159.0;
    return {s, 13'($rtoi(m + 0.25))};
  endfunction

  // round-half-up of a non-negative real
  function automatic int rnd(input real x);
    return $rtoi($floor(x + 0.5));
  endfunction

  // Table of log2(1 - 2^-ed) estimates, ed = 0..5
  function automatic real sub_table(input int ed);
    case (ed)
      0, 1: return -1.0;
      2: return -0.4375;
      3: return -0.1875;
      4: return -0.09375;
      5: return -0.03125;
      default: return 0.0;
    endcase
  endfunction

  // estimate of a + b (sub = 1: a - b) on log words
  function automatic logic [13:0] addsub_ref(input logic [13:0] a, input logic [13:0] b, input logic sub);
    real la = lval(a), lb = lval(b), big, d;
    logic sa = a[13], sb = b[13] ^ sub, s;
    int ed;
    big = (la >= lb) ? la : lb;
    s   = (la >= lb) ? sa : sb;
    d   = (la >= lb) ? la - lb : lb - la;
    ed  = rnd(d);
    if (sa == sb) return lenc(s, big + ((ed <= 5) ? 2.0 ** (-ed) : 0.0));
    return lenc(s, big + sub_table(ed));
  endfunction
endpackage
