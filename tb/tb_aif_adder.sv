// tb_aif_adder: approximate addition against the mask-based reference
// (efficient rounding of the bits below the PC leading valid blocks), at
// PC = 4 with N = 32 and at PC = 2 with N = 16, B = 4. Also checks the
// sentinel update, the overflow flag and the worst-case error bound
// 2^t + 2^(t-1) - 2 for t truncated bits. Signed mode: two's-complement
// operands against the same mask-based reference, with signed overflow and
// the sentinel taken from the sum by the negative-number rule.
module tb_aif_adder;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_round = 0, n_carry_st = 0, n_ovf = 0, n_neg = 0, n_sovf = 0;

  logic [31:0] a, b, s;
  logic [7:0]  sa, sb, ss;
  logic        ovf;
  logic [15:0] a2, b2, s2;
  logic [3:0]  sa2, sb2, ss2;
  logic        ovf2;

  logic        sg = 0;

  aif_adder #(.N(32), .B(8), .PC(4)) dut (.a(a), .b(b), .st_a(sa), .st_b(sb), .is_signed(sg), .sum(s), .st_s(ss), .ovf(ovf));
  aif_adder #(.N(16), .B(4), .PC(2)) dut2 (.a(a2), .b(b2), .st_a(sa2), .st_b(sb2), .is_signed(1'b0), .sum(s2), .st_s(ss2), .ovf(ovf2));

  task automatic chk(input logic [31:0] x, input logic [31:0] y);
    u128_t r, exact, err;
    int    top, t;
    logic [7:0] es;
    a = x; b = y;
    sa = 8'(sentinel(u128_t'(x), 4, 8));
    sb = 8'(sentinel(u128_t'(y), 4, 8));
    #1;
    r     = add_ref(u128_t'(x), u128_t'(y), 4, 4);
    exact = u128_t'(x) + u128_t'(y);
    top   = nblocks(u128_t'(x | y), 4);
    t     = (top > 4) ? (top - 4) * 4 : 0;
    es    = r[32] ? 8'hFF : 8'(sentinel(r & 128'hFFFF_FFFF, 4, 8));
    checks++;
    if (s !== r[31:0] || ovf !== r[32] || ss !== es) begin
      failures++;
      $display("FAIL add %h+%h = %h ovf=%0d st=%b exp %h ovf=%0d st=%b", x, y, s, ovf, ss, r[31:0], r[32], es);
    end
    err = (exact > r) ? exact - r : r - exact;
    checks++;
    if (t > 0 && err > (u128_t'(1) << t) + (u128_t'(1) << (t - 1)) - 2) begin
      failures++;
      $display("FAIL error bound %h+%h err=%0d t=%0d", x, y, err, t);
    end
    if (t > 0 && x[t-1] && y[t-1]) n_round++;
    if (r[32]) n_ovf++;
    else if (ss != (sa | sb)) n_carry_st++;
  endtask

  task automatic chks(input logic [31:0] x, input logic [31:0] y);
    s128_t r;
    logic  eo;
    logic [7:0] es;
    a = x; b = y; sg = 1;
    sa = 8'(sentinel_s(s128_t'($signed(x)), 4, 8));
    sb = 8'(sentinel_s(s128_t'($signed(y)), 4, 8));
    #1;
    r  = add_ref_s(s128_t'($signed(x)), s128_t'($signed(y)), 4, 4);
    eo = (r != s128_t'($signed(r[31:0])));
    es = 8'(sentinel_s(s128_t'($signed(r[31:0])), 4, 8));
    checks++;
    if (s !== r[31:0] || ovf !== eo || ss !== es) begin
      failures++;
      $display("FAIL signed add %h+%h = %h ovf=%0d st=%b exp %h ovf=%0d st=%b", x, y, s, ovf, ss, r[31:0], eo, es);
    end
    if (r < 0 && !eo) n_neg++;
    if (eo) n_sovf++;
    sg = 0;
  endtask

  task automatic chk16(input logic [15:0] x, input logic [15:0] y);
    u128_t r;
    a2 = x; b2 = y;
    sa2 = 4'(sentinel(u128_t'(x), 4, 4));
    sb2 = 4'(sentinel(u128_t'(y), 4, 4));
    #1;
    r = add_ref(u128_t'(x), u128_t'(y), 4, 2);
    checks++;
    if (s2 !== r[15:0] || ovf2 !== r[16]) begin
      failures++;
      $display("FAIL add16 %h+%h = %h exp %h", x, y, s2, r[15:0]);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // efficient rounding worst case: ...111 + ...011 at the truncated bits
    chk(32'h1234_5FFF, 32'h0001_17FF);
    chk(32'h0, 32'h0); chk(32'h5, 32'h3); chk(32'hFFFF_FFFF, 32'h1); chk(32'h0FFF_F000, 32'h0000_1000);
    chk(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 5000; i++) begin
      chk(32'($urandom) >> ($urandom % 32), 32'($urandom) >> ($urandom % 32));
      chk16(16'($urandom) >> ($urandom % 16), 16'($urandom) >> ($urandom % 16));
      chks(32'($signed(32'($urandom)) >>> ($urandom % 32)), 32'($signed(32'($urandom)) >>> ($urandom % 32)));
    end
    chks(32'h7FFF_FFFF, 32'h0000_0001); chks(32'hFFFF_FFFF, 32'h0000_0001); chks(32'h8000_0000, 32'hFFFF_FFF0);
    chks(32'h0123_4567, 32'hFEDC_BA99);
    // 16-bit, pc = 2 example from the format description (two valid blocks kept)
    chk16(16'h7A79, 16'h5BB8);
    checks++; if (n_round == 0 || n_carry_st == 0 || n_ovf == 0 || n_neg == 0 || n_sovf == 0) begin
      failures++; $display("FAIL coverage round=%0d carry=%0d ovf=%0d neg=%0d sovf=%0d", n_round, n_carry_st, n_ovf, n_neg, n_sovf);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
