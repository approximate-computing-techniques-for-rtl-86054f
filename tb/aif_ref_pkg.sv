// aif_ref_pkg: reference arithmetic for the AIF testbenches, written directly
// from the format's rules with plain integer operations (no block windows):
// the leading valid block is found from the highest set bit, truncation and
// rounding are done with masks. Widths up to 64 bits (products up to 128).
package aif_ref_pkg;
  typedef logic [127:0] u128_t;

  // number of valid K-bit blocks of v (0 for v = 0)
  function automatic int nblocks(input u128_t v, input int k);
    int msb = -1;
    for (int i = 0; i < 128; i++) if (v[i]) msb = i;
    return (msb < 0) ? 0 : msb / k + 1;
  endfunction

  // thermometer sentinel of v over nb blocks
  function automatic u128_t sentinel(input u128_t v, input int k, input int nb);
    u128_t s = '0;
    for (int i = 0; i < nb; i++) s[i] = ((v >> (i * k)) != 0);
    return s;
  endfunction

  // approximate sum with efficient rounding; returns the (N+1)-bit exact
  // result of the truncated operation
  function automatic u128_t add_ref(input u128_t a, input u128_t b, input int k, input int pc);
    int top = nblocks(a | b, k);
    int t;
    u128_t mask, r;
    if (top == 0) return '0;
    t    = (top > pc) ? (top - pc) * k : 0;          // truncated bits
    mask = (u128_t'(1) << t) - 1;
    r    = (a & ~mask) + (b & ~mask);
    if (t > 0 && a[t-1] && b[t-1]) r = r + (u128_t'(1) << t);
    return r;
  endfunction

  // classic rounding to the pc leading valid blocks
  function automatic u128_t round_ref(input u128_t v, input int k, input int pc);
    int n = nblocks(v, k);
    int t;
    u128_t mask;
    if (n <= pc) return v;
    t    = (n - pc) * k;
    mask = (u128_t'(1) << t) - 1;
    return (v & ~mask) + (v[t-1] ? (u128_t'(1) << t) : u128_t'(0));
  endfunction

  // value after the AIF storage format (block 0 dropped if all blocks valid)
  function automatic u128_t stored_ref(input u128_t v, input int n, input int k);
    if ((v >> (n - k)) != 0) return v & ~((u128_t'(1) << k) - 1);
    return v;
  endfunction

  // ---- two's-complement versions (valid block: differs from the sign fill)
  typedef logic signed [127:0] s128_t;

  function automatic int nblocks_s(input s128_t v, input int k);
    int n = 0;
    for (int i = 0; i < 32; i++) if ((v >>> (i * k)) != ((v < 0) ? -s128_t'(1) : s128_t'(0))) n = i + 1;
    return n;
  endfunction

  function automatic u128_t sentinel_s(input s128_t v, input int k, input int nb);
    u128_t s = '0;
    for (int i = 0; i < nb; i++) s[i] = ((v >>> (i * k)) != ((v < 0) ? -s128_t'(1) : s128_t'(0)));
    return s;
  endfunction

  function automatic s128_t add_ref_s(input s128_t a, input s128_t b, input int k, input int pc);
    int na = nblocks_s(a, k), nb = nblocks_s(b, k);
    int top = (na > nb) ? na : nb;
    int t;
    s128_t mask, r;
    t    = (top > pc) ? (top - pc) * k : 0;
    mask = (s128_t'(1) <<< t) - 1;
    r    = (a & ~mask) + (b & ~mask);
    if (t > 0 && a[t-1] && b[t-1]) r = r + (s128_t'(1) <<< t);
    return r;
  endfunction

  function automatic s128_t round_ref_s(input s128_t v, input int k, input int pc);
    int n = nblocks_s(v, k);
    int t;
    s128_t mask;
    if (n <= pc) return v;
    t    = (n - pc) * k;
    mask = (s128_t'(1) <<< t) - 1;
    return (v & ~mask) + (v[t-1] ? (s128_t'(1) <<< t) : s128_t'(0));
  endfunction

  // value after the signed storage format
  function automatic s128_t stored_ref_s(input s128_t v, input int n, input int k);
    if (nblocks_s(v, k) * k > n - k) return v & ~((s128_t'(1) <<< k) - 1);
    return v;
  endfunction

  // Reference for the two-stage engine at N=32, B=8, K=4, PC=4.
  // op: 0 add, 1 sub, 2 mul (the aif_op_e encoding).
  function automatic void engine_ref(input int op, input logic sgn_in, input logic [31:0] a,
                                     input logic [31:0] b, output logic [63:0] res,
                                     output logic [15:0] st, output logic ovf);
    logic        sgn = sgn_in || op == 1;
    logic [31:0] bb = (op == 1) ? -b : b;
    u128_t ua, ub, r;
    s128_t xa, xb, rs;
    ovf = 1'b0;
    if (!sgn) begin
      ua = stored_ref(u128_t'(a), 32, 4);
      ub = stored_ref(u128_t'(bb), 32, 4);
      if (op != 2) begin
        r   = add_ref(ua, ub, 4, 4);
        res = {32'd0, r[31:0]};
        ovf = r[32];
        st  = ovf ? 16'h00FF : 16'(sentinel(r & 128'hFFFF_FFFF, 4, 8));
      end else begin
        r   = round_ref(ua, 4, 4) * round_ref(ub, 4, 4);
        res = (r >> 64) != 0 ? '1 : r[63:0];
        st  = 16'(sentinel(u128_t'(res), 4, 16));
      end
    end else begin
      xa = stored_ref_s(s128_t'($signed(a)), 32, 4);
      xb = stored_ref_s(s128_t'($signed(bb)), 32, 4);
      if (op != 2) begin
        rs  = add_ref_s(xa, xb, 4, 4);
        res = 64'($signed(rs[31:0]));
        ovf = (rs != s128_t'($signed(rs[31:0])));
        st  = {8'd0, 8'(sentinel_s(s128_t'($signed(rs[31:0])), 4, 8))};
      end else begin
        rs  = round_ref_s(xa, 4, 4) * round_ref_s(xb, 4, 4);
        res = rs[63:0];
        st  = 16'(sentinel_s(s128_t'($signed(res)), 4, 16));
      end
    end
  endfunction
endpackage
