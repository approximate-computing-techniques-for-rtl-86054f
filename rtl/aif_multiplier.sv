// aif_multiplier: approximate multiplication in the approximate integer
// format.
// 1. Each operand is classic-rounded to its own PC leftmost valid blocks: the
//    window starting at block lo plus the most significant dropped bit. If the
//    rounding carries out of the window (a window of all ones), the rounded
//    value is the single '1' one block higher, so it still fits PC*K bits.
// 2. A PC*K x PC*K multiplier forms the window product.
// 3. The product sentinel has n_A + n_B - 1 + Cout ones, n being the operands'
//    valid-block counts (after rounding) and Cout whether the product reaches
//    block n_A + n_B - 1.
// 4. The product is shifted left by (lo_A + lo_B) blocks; bits below are zero.
// With is_signed the operands are two's complement (sentinels formed with the
// negative-number rule); each window then carries its sign bit, the core is
// (PC*K+1) x (PC*K+1) signed, and the product's sentinel is generated from
// the product with the same rule.
// Combinational; the output is the full 2N-bit product. The rounding and the
// unsigned sentinel rule follow the format's definition; the carry-out
// folding, the saturation when both unsigned operands round up to 2^N and the
// signed mode are this design's choices.
module aif_multiplier #(
  parameter int unsigned N  = aif_pkg::AIF_N,
  parameter int unsigned B  = aif_pkg::AIF_B,
  parameter int unsigned K  = N / B,
  parameter int unsigned PC = aif_pkg::AIF_PC
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [B-1:0]   st_a,
  input  logic [B-1:0]   st_b,
  input  logic           is_signed,
  output logic [2*N-1:0] prod,
  output logic [2*B-1:0] st_p
);
  localparam int unsigned W = PC * K;

  logic [W:0]       wa, wb;        // rounded windows, sign bit on top
  int unsigned      lo_a, lo_b, n_a, n_b;
  logic [2*W+1:0]   p_w;
  logic [2*N+W:0]   p_full;
  logic [2*B-1:0]   st_gen;
  int unsigned      n_s;

  initial begin
    assert (PC >= 1 && PC <= B) else $error("aif_multiplier: PC must be 1..B");
  end

  // Classic rounding of one operand to its PC leading valid blocks.
  function automatic void round_op(input logic [N-1:0] v, input logic [B-1:0] st,
                                   input logic sgn, output logic [W:0] w,
                                   output int unsigned lo, output int unsigned n);
    logic [W+1:0] r;
    n = 0;
    for (int unsigned j = 0; j < B; j++) n += int'(st[j]);
    lo = (n > PC) ? n - PC : 0;
    if (sgn) r = (W+2)'($signed(v) >>> (lo * K));
    else     r = {2'b00, W'(v >> (lo * K))};
    if (lo != 0) r = r + (W+2)'(v[lo*K-1]);
    if (r[W+1:W] == 2'b01) begin     // rounded up out of the window
      w  = (W+1)'(1) << ((PC - 1) * K);
      lo = lo + 1;
      n  = n + 1;
    end else begin
      w  = r[W:0];
    end
  endfunction

  always_comb begin
    round_op(a, st_a, is_signed, wa, lo_a, n_a);
    round_op(b, st_b, is_signed, wb, lo_b, n_b);
    if (is_signed) begin
      p_w    = (2*W+2)'($signed(wa) * $signed(wb));
      p_full = (2*N+W+1)'($signed(p_w)) << ((lo_a + lo_b) * K);
    end else begin
      p_w    = (2*W+2)'(wa) * (2*W+2)'(wb);
      p_full = (2*N+W+1)'(p_w) << ((lo_a + lo_b) * K);
    end
    if (!is_signed && p_full[2*N+W:2*N] != '0) prod = '1;   // both rounded to 2^N
    else                                       prod = p_full[2*N-1:0];
    if (n_a == 0 || n_b == 0) begin
      n_s = 0;
    end else begin
      n_s = n_a + n_b - 1;
      if (n_s < 2 * B && (p_full >> (n_s * K)) != '0) n_s = n_s + 1;
      if (n_s > 2 * B) n_s = 2 * B;
    end
  end

  aif_sentinel #(.N(2 * N), .B(2 * B), .K(K)) u_st (.value(prod), .is_signed(1'b1), .st(st_gen));

  always_comb begin
    for (int unsigned j = 0; j < 2 * B; j++) st_p[j] = is_signed ? st_gen[j] : (j < n_s);
  end
endmodule
