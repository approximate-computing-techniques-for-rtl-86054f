// tb_aif_multiplier: approximate multiplication against the reference
// (classic rounding of each operand to its PC leading valid blocks, exact
// product of the rounded values, sentinel of that product over 2B blocks),
// at PC = 4 with N = 32 and at PC = 2 with N = 16, B = 4. Also checks the
// rounding error bound 2^-(K(PC-1)+1) per operand (1/32 at K=4, PC=2) for the 16-bit case.
// Signed mode: two's-complement operands rounded the same way (round half
// up), exact signed product, sentinel by the negative-number rule.
module tb_aif_multiplier;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_round_up = 0, n_fold = 0, n_neg = 0;

  logic [31:0] a, b;
  logic [7:0]  sa, sb;
  logic [63:0] p;
  logic [15:0] st;
  logic [15:0] a2, b2;
  logic [3:0]  sa2, sb2;
  logic [31:0] p2;
  logic [7:0]  st2;

  logic        sg = 0;

  aif_multiplier #(.N(32), .B(8), .PC(4)) dut (.a(a), .b(b), .st_a(sa), .st_b(sb), .is_signed(sg), .prod(p), .st_p(st));
  aif_multiplier #(.N(16), .B(4), .PC(2)) dut2 (.a(a2), .b(b2), .st_a(sa2), .st_b(sb2), .is_signed(1'b0), .prod(p2), .st_p(st2));

  task automatic chk(input logic [31:0] x, input logic [31:0] y);
    u128_t rx, ry, r;
    logic [63:0] ep;
    logic [15:0] es;
    a = x; b = y;
    sa = 8'(sentinel(u128_t'(x), 4, 8));
    sb = 8'(sentinel(u128_t'(y), 4, 8));
    #1;
    rx = round_ref(u128_t'(x), 4, 4);
    ry = round_ref(u128_t'(y), 4, 4);
    r  = rx * ry;
    ep = (r >> 64) != 0 ? 64'hFFFF_FFFF_FFFF_FFFF : r[63:0];
    es = 16'(sentinel(u128_t'(ep), 4, 16));
    if (rx > u128_t'(x)) n_round_up++;
    if (nblocks(rx, 4) > nblocks(u128_t'(x), 4)) n_fold++;
    checks++;
    if (p !== ep || st !== es) begin
      failures++;
      $display("FAIL mul %h*%h = %h st=%b exp %h st=%b", x, y, p, st, ep, es);
    end
  endtask

  task automatic chks(input logic [31:0] x, input logic [31:0] y);
    s128_t r;
    logic [63:0] ep;
    logic [15:0] es;
    a = x; b = y; sg = 1;
    sa = 8'(sentinel_s(s128_t'($signed(x)), 4, 8));
    sb = 8'(sentinel_s(s128_t'($signed(y)), 4, 8));
    #1;
    r  = round_ref_s(s128_t'($signed(x)), 4, 4) * round_ref_s(s128_t'($signed(y)), 4, 4);
    ep = r[63:0];
    es = 16'(sentinel_s(s128_t'($signed(ep)), 4, 16));
    if (r < 0) n_neg++;
    checks++;
    if (p !== ep || st !== es) begin
      failures++;
      $display("FAIL signed mul %h*%h = %h st=%b exp %h st=%b", x, y, p, st, ep, es);
    end
    sg = 0;
  endtask

  task automatic chk16(input logic [15:0] x, input logic [15:0] y);
    u128_t rx, ry, r;
    real   ex, ey;
    a2 = x; b2 = y;
    sa2 = 4'(sentinel(u128_t'(x), 4, 4));
    sb2 = 4'(sentinel(u128_t'(y), 4, 4));
    #1;
    rx = round_ref(u128_t'(x), 4, 2);
    ry = round_ref(u128_t'(y), 4, 2);
    r  = rx * ry;
    checks++;
    if (p2 !== r[31:0] || st2 !== 8'(sentinel(r, 4, 8))) begin
      failures++;
      $display("FAIL mul16 %h*%h = %h exp %h", x, y, p2, r[31:0]);
    end
    if (x != 0 && y != 0) begin
      ex = (real'(rx) - real'(x)) / real'(x);
      ey = (real'(ry) - real'(y)) / real'(y);
      checks++;
      if (ex < 0) ex = -ex;
      if (ey < 0) ey = -ey;
      if (ex >= 1.0 / 32.0 || ey >= 1.0 / 32.0) begin
        failures++;
        $display("FAIL rounding error bound %h %h", x, y);
      end
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
    // 263 rounded to two valid blocks gives 256 (k = 4)
    chk16(16'd263, 16'd1);
    checks++; if (p2 !== 32'd256) begin failures++; $display("FAIL 263 -> %0d", p2); end
    chk(32'h0, 32'h1234); chk(32'hFFFF_FFFF, 32'hFFFF_FFFF); chk(32'h0FFF_F800, 32'h3);
    chk(32'h0000_FFFF, 32'h0000_FFFF); chk(32'h1, 32'h1);
    for (int i = 0; i < 5000; i++) begin
      chk(32'($urandom) >> ($urandom % 32), 32'($urandom) >> ($urandom % 32));
      chk16(16'($urandom) >> ($urandom % 16), 16'($urandom) >> ($urandom % 16));
      chks(32'($signed(32'($urandom)) >>> ($urandom % 32)), 32'($signed(32'($urandom)) >>> ($urandom % 32)));
    end
    chks(32'h8000_0000, 32'h8000_0000); chks(32'h7FFF_FFFF, 32'hFFFF_FFFF); chks(32'hFFFF_FFFF, 32'hFFFF_FFFF);
    chks(32'hF000_0800, 32'h0000_0003);
    checks++; if (n_round_up == 0 || n_fold == 0 || n_neg == 0) begin
      failures++; $display("FAIL coverage round_up=%0d fold=%0d", n_round_up, n_fold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
