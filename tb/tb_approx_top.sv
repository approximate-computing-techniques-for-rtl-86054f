// tb_approx_top: end-to-end test of the whole design at its default
// parameters. It drives the AIF engine, the log-domain node estimator, the
// log-domain vector unit and the information-hiding multiplier through the
// top's ports, compares every result with the reference models, and counts
// how often each mechanism occurred: exact short AIF adds, truncated adds with
// the rounding carry, sentinel growth by a carry, add overflow, multiply
// operand round-up and window fold, the dropped storage block, subtraction,
// signed addition with a negative result, signed multiplication; log-domain
// multiply/divide/root/power/min/max, addition with and without compensation,
// table-based subtraction, unlike-sign addition, cut and kept inputs; a vector
// run; hidden and plain products; a reduced-mantissa product that differs from
// the full-precision one; fixed-point values converted to the log domain and
// back. A mechanism that never occurred is a failure.
module tb_approx_top;
  import aif_pkg::*;
  import log_pkg::*;
  import aif_ref_pkg::*;
  import log_ref_pkg::*;
  import fp_ref_pkg::*;
  int checks = 0, failures = 0;

  typedef enum int {
    M_ADD_EXACT, M_ADD_ROUND, M_ADD_STGROW, M_ADD_OVF, M_MUL_ROUNDUP, M_MUL_FOLD, M_STORE_DROP, M_SUB, M_S_ADD_NEG, M_S_MUL,
    M_L_MUL, M_L_DIV, M_L_SQRT, M_L_POW, M_L_MAX, M_L_MIN, M_L_ADD_COMP, M_L_ADD_NOCOMP,
    M_L_SUB_TABLE, M_L_UNLIKE, M_CUT, M_KEEP, M_DOT, M_EMBED, M_PLAIN, M_AM_DIFF, M_FX_RT, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  logic           clk = 0, rst_n = 0;
  logic           aif_in_valid = 0;
  aif_op_e        aif_in_op = AIF_ADD;
  logic           aif_in_signed = 0;
  logic [31:0]    aif_in_a = 0, aif_in_b = 0;
  logic           aif_out_valid, aif_out_ovf;
  aif_op_e        aif_out_op;
  logic [63:0]    aif_out_result;
  logic [15:0]    aif_out_st;
  log_op_e        le_op = LOG_ADD;
  logic [31:0]    le_fa = 0, le_fb = 0, le_est_f;
  logic [3:0]     le_n = 0, le_ed;
  logic [12:0]    le_delta = 0;
  logint_t        le_est_l;
  logic           le_a_dominant, le_noncritical;
  logic           ld_start = 0, ld_in_valid = 0, ld_busy, ld_done;
  logic [4:0]     ld_len = 0;
  logic [31:0]    ld_x = 0, ld_y = 0, ld_z_f;
  logint_t        ld_z_l;
  logic [31:0]    ih_a = 0, ih_b = 0, ih_result;
  logic [9:0]     ih_key = 0, ih_k_s;
  logic           ih_embed_en = 0;
  logic [31:0]    am_a = 0, am_b = 0, am_p;
  logic [31:0]    fx_in = 0, fx_out;
  logint_t        fx_l_out, fx_l_in = '0;

  approx_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // ---- AIF engine: one operation, result two cycles later
  task automatic aif_op(input aif_op_e op, input logic [31:0] a, input logic [31:0] b, input logic sg = 1'b0);
    u128_t sa = stored_ref(u128_t'(a), 32, 4), sb = stored_ref(u128_t'(b), 32, 4), r;
    logic [63:0] er;
    logic [15:0] es;
    logic        eo;
    int          t, tr;
    engine_ref(int'(op), sg, a, b, er, es, eo);
    if (op == AIF_SUB) mech[M_SUB]++;
    if (sg && op == AIF_ADD && er[63]) mech[M_S_ADD_NEG]++;
    if (sg && op == AIF_MUL) mech[M_S_MUL]++;
    if (!sg && op != AIF_SUB && (sa != u128_t'(a) || sb != u128_t'(b))) mech[M_STORE_DROP]++;
    if (!sg && op == AIF_ADD) begin
      t = nblocks(sa | sb, 4);
      r = add_ref(sa, sb, 4, 4);
      tr = (t > 4) ? (t - 4) * 4 : 0;
      if (t <= 4) mech[M_ADD_EXACT]++;
      if (tr > 0 && sa[tr-1] && sb[tr-1]) mech[M_ADD_ROUND]++;
      if (eo) mech[M_ADD_OVF]++;
      else if (es[7:0] != 8'(sentinel(sa | sb, 4, 8))) mech[M_ADD_STGROW]++;
    end else if (!sg && op == AIF_MUL) begin
      u128_t ra = round_ref(sa, 4, 4), rb = round_ref(sb, 4, 4);
      if (ra > sa || rb > sb) mech[M_MUL_ROUNDUP]++;
      if (nblocks(ra, 4) > nblocks(sa, 4) || nblocks(rb, 4) > nblocks(sb, 4)) mech[M_MUL_FOLD]++;
    end
    @(negedge clk);
    aif_in_valid = 1; aif_in_op = op; aif_in_signed = sg; aif_in_a = a; aif_in_b = b;
    @(negedge clk);
    aif_in_valid = 0;
    checks++;
    if (aif_out_valid) fail("AIF result after one cycle");
    @(negedge clk);
    checks++;
    if (!aif_out_valid || aif_out_op != op || aif_out_result !== er || aif_out_st !== es || aif_out_ovf !== eo)
      fail($sformatf("AIF %s %h %h -> %h st=%b ovf=%0d exp %h %b %0d", op.name(), a, b,
                     aif_out_result, aif_out_st, aif_out_ovf, er, es, eo));
  endtask

  // ---- log-domain node estimate
  function automatic logic greater(input logic [13:0] x, input logic [13:0] y);
    real vx = (x[13] ? -1.0 : 1.0) * (2.0 ** lval(x));
    real vy = (y[13] ? -1.0 : 1.0) * (2.0 ** lval(y));
    return vx > vy;
  endfunction

  task automatic le_check(input log_op_e op, input real x, input real y, input logic [12:0] delta);
    logic [13:0] la, lb, e;
    real d;
    logic enc;
    le_op = op; le_fa = r2f(x); le_fb = r2f(y); le_n = 4'd3; le_delta = delta;
    #1;
    la = to_log(le_fa); lb = to_log(le_fb);
    d  = lval(la) - lval(lb);
    if (d < 0) d = -d;
    case (op)
      LOG_MUL:  begin e = lenc(la[13] ^ lb[13], lval(la) + lval(lb)); mech[M_L_MUL]++; end
      LOG_DIV:  begin e = lenc(la[13] ^ lb[13], lval(la) - lval(lb)); mech[M_L_DIV]++; end
      LOG_SQRT: begin e = lenc(1'b0, $floor(lval(la) * 16.0) / 32.0); mech[M_L_SQRT]++; end
      LOG_POW:  begin e = lenc(la[13], 3.0 * lval(la)); mech[M_L_POW]++; end
      LOG_MAX:  begin e = greater(la, lb) ? la : lb; mech[M_L_MAX]++; end
      LOG_MIN:  begin e = greater(la, lb) ? lb : la; mech[M_L_MIN]++; end
      default: begin
        e = addsub_ref(la, lb, op == LOG_SUB);
        if ((la[13] ^ lb[13] ^ (op == LOG_SUB)) == 1'b0) begin
          if (rnd(d) <= 5) mech[M_L_ADD_COMP]++; else mech[M_L_ADD_NOCOMP]++;
        end else begin
          if (op == LOG_SUB) mech[M_L_SUB_TABLE]++; else mech[M_L_UNLIKE]++;
        end
      end
    endcase
    enc = (op inside {LOG_ADD, LOG_SUB, LOG_MAX, LOG_MIN}) && d >= real'(delta) / 32.0;
    if (enc) mech[M_CUT]++; else mech[M_KEEP]++;
    checks++;
    if (le_est_l !== e || le_est_f !== from_log(e) || le_noncritical !== enc)
      fail($sformatf("log %s %f %f -> %h nc=%0d exp %h %0d", op.name(), x, y, le_est_l, le_noncritical, e, enc));
  endtask

  // ---- log-domain vector multiplication
  task automatic dot_run(input int n);
    real lz[16], m, acc;
    logic [31:0] xs[16], ys[16];
    logic [13:0] e;
    int cyc = 0;
    m = -1000.0; acc = 0.0;
    for (int i = 0; i < n; i++) begin
      xs[i] = r2f(real'($urandom % 1000 + 1) / 8.0);
      ys[i] = r2f(real'($urandom % 1000 + 1) / 4.0);
      lz[i] = lval(to_log(xs[i])) + lval(to_log(ys[i]));
      if (lz[i] > m) m = lz[i];
    end
    for (int i = 0; i < n; i++) if (rnd(m - lz[i]) <= 5) acc += 2.0 ** (-rnd(m - lz[i]));
    e = lenc(1'b0, m + acc - 1.0);
    @(negedge clk); ld_start = 1; ld_len = 5'(n);
    @(negedge clk); ld_start = 0;
    for (int i = 0; i < n; i++) begin
      ld_in_valid = 1; ld_x = xs[i]; ld_y = ys[i];
      @(negedge clk); cyc++;
    end
    ld_in_valid = 0;
    while (!ld_done && cyc < 100) begin @(negedge clk); cyc++; end
    checks++;
    if (!ld_done || ld_z_l !== e || cyc != 2 * n + 1)
      fail($sformatf("dot len=%0d z=%h exp %h cycles=%0d", n, ld_z_l, e, cyc));
    else mech[M_DOT]++;
  endtask

  // ---- information hiding
  task automatic ih_check(input real x, input real y, input logic [9:0] key, input logic en);
    logic [31:0] a = r2f(x), b = r2f(y), o;
    ih_a = a; ih_b = b; ih_key = key; ih_embed_en = en; #1;
    o = r2f(f2r({a[31:10], 10'd0}) * f2r({b[31:10], 10'd0}));
    checks++;
    if (en) begin
      mech[M_EMBED]++;
      if (ih_result !== {o[31:10], a[9:0] ^ b[9:0] ^ o[9:0] ^ key}) fail("embedded product");
    end else begin
      mech[M_PLAIN]++;
      if (ih_result !== o) fail("plain product");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // AIF: directed corner cases, then random traffic
    aif_op(AIF_ADD, 32'd121, 32'd184);                 // short operands, exact
    aif_op(AIF_ADD, 32'h0123_4FFF, 32'h0000_1FFF);     // rounding carry
    aif_op(AIF_ADD, 32'h00F0_0000, 32'h0010_0000);     // sentinel grows
    aif_op(AIF_ADD, 32'hF000_0000, 32'h1000_0000);     // overflow
    aif_op(AIF_MUL, 32'h0FFF_F800, 32'd3);             // window fold
    aif_op(AIF_MUL, 32'h1234_5678, 32'h0000_ABCD);     // drop + round
    aif_op(AIF_SUB, 32'd100, 32'd250);                 // subtraction, negative result
    aif_op(AIF_ADD, 32'hFFFF_FF00, 32'd16, 1'b1);      // signed add, negative result
    aif_op(AIF_MUL, 32'hFFFF_FFF9, 32'd1234, 1'b1);    // signed multiply
    for (int i = 0; i < 300; i++)
      aif_op(aif_op_e'($urandom % 3), 32'($urandom) >> ($urandom % 32), 32'($urandom) >> ($urandom % 32), 1'($urandom));
    // log-domain node estimates
    le_check(LOG_ADD, 100.0, 6.0, 13'd96);             // 16x apart, cut at delta = 3
    le_check(LOG_ADD, 100.0, 90.0, 13'd96);            // kept
    le_check(LOG_ADD, 1000.0, 3.0, 13'd32);            // no compensation
    le_check(LOG_SUB, 100.0, 40.0, 13'd32);            // table
    le_check(LOG_ADD, 100.0, -40.0, 13'd32);           // unlike signs
    for (int i = 0; i < 500; i++) begin
      log_op_e o;
      real x, y;
      o = log_op_e'($urandom % 8);
      x = real'(int'($urandom % 20001) - 10000) / 7.0;
      y = real'(int'($urandom % 20001) - 10000) / 3.0;
      if (x == 0.0) x = 1.0;
      if (y == 0.0) y = 1.0;
      le_check(o, x, y, 13'($urandom % 128));
    end
    // vector unit: the full 16-element buffer and a few shorter vectors
    dot_run(16);
    for (int i = 0; i < 5; i++) dot_run(1 + $urandom % 16);
    // information hiding: worked example and random operands
    ih_check(3.14159, 12.31, 10'b0001010101, 1'b1);
    ih_check(3.14159, 12.31, 10'b0001010101, 1'b0);
    for (int i = 0; i < 200; i++)
      ih_check(real'($urandom % 100000 + 1) / 97.0, real'($urandom % 100000 + 1) / 13.0, 10'($urandom), 1'($urandom));
    // reduced-mantissa multiplier: 10 fraction bits in, 10 out
    for (int i = 0; i < 200; i++) begin
      real         pr;
      logic [31:0] e;
      am_a = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      am_b = {1'($urandom), 8'(100 + $urandom % 50), 23'($urandom)};
      #1;
      pr = f2r(ftrunc(am_a, 10)) * f2r(ftrunc(am_b, 10));
      e  = r2fm(pr, 10);
      checks++;
      if (am_p !== e) fail($sformatf("AM %h * %h = %h exp %h", am_a, am_b, am_p, e));
      if (e != r2f(f2r(am_a) * f2r(am_b))) mech[M_AM_DIFF]++;
    end
    // fixed point (Q16.16) to log and back: within 1/32 relative, toward zero
    for (int i = 0; i < 200; i++) begin
      real x, y;
      fx_in = 32'($urandom % 32'h0100_0000) + 32'h100;
      if ($urandom % 2) fx_in = -fx_in;
      #1;
      fx_l_in = fx_l_out;
      #1;
      x = real'($signed(fx_in));
      y = real'($signed(fx_out));
      checks++;
      if ((x > 0.0 && (y > x || y < x * 31.0 / 32.0 - 1.0)) || (x < 0.0 && (y < x || y > x * 31.0 / 32.0 + 1.0)))
        fail($sformatf("FX %h -> %h -> %h", fx_in, fx_l_out, fx_out));
      else mech[M_FX_RT]++;
    end

    for (int i = 0; i < M_COUNT; i++) begin
      checks++;
      $display("mechanism %-16s %0d", mech_e'(i), mech[i]);
      if (mech[i] == 0) fail($sformatf("mechanism %s never occurred", mech_e'(i)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
