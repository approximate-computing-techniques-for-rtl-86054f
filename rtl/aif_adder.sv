// aif_adder: approximate addition in the approximate integer format.
// 1. The sum's sentinel is st_a | st_b; its leftmost '1' marks block i.
// 2. Blocks i..i-PC+1 of both operands (the window, starting at block lo) are
//    taken; lower blocks are dropped. If fewer than PC blocks are valid the
//    window starts at block 0 and the addition is exact.
// 3. A PC*K-bit adder adds the two windows plus the efficient-rounding carry,
//    the AND of the most significant dropped bit of each operand.
// 4. Unsigned: the carry out of block i sets sentinel bit i+1; from the top
//    block it is an overflow.
// 5. The window sum is shifted back to block lo; the bits below are zero.
// With is_signed the operands are two's complement and their sentinels must
// have been formed with the negative-number rule. The windows then carry one
// sign bit more (blocks above block i are copies of the sign), the sum is
// sign-extended, overflow means it left the signed N-bit range, and the sum's
// sentinel is generated from the sum itself, since adding numbers of opposite
// sign can also remove valid blocks.
// Combinational. Operand sentinels must match the operands (as produced by
// aif_sentinel). The unsigned algorithm and the rounding carry follow the
// format's definition; the handling of short operands and the details of the
// signed mode are this design's choices.
module aif_adder #(
  parameter int unsigned N  = aif_pkg::AIF_N,
  parameter int unsigned B  = aif_pkg::AIF_B,
  parameter int unsigned K  = N / B,
  parameter int unsigned PC = aif_pkg::AIF_PC
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [B-1:0] st_a,
  input  logic [B-1:0] st_b,
  input  logic         is_signed,
  output logic [N-1:0] sum,
  output logic [B-1:0] st_s,
  output logic         ovf
);
  localparam int unsigned W = PC * K;

  logic [B-1:0]   st_u;
  int unsigned    top;       // index of the leftmost valid block
  int unsigned    lo;        // lowest block inside the window
  logic [W:0]     a_w, b_w;  // window plus one sign/extension bit
  logic           cin;
  logic [W+1:0]   s_w;
  logic           cout;
  logic [N+W+1:0] s_full;
  logic [B-1:0]   st_sum;

  initial begin
    assert (PC >= 1 && PC <= B) else $error("aif_adder: PC must be 1..B");
  end

  aif_sentinel #(.N(N), .B(B), .K(K)) u_st (.value(sum), .is_signed(1'b1), .st(st_sum));

  always_comb begin
    st_u = st_a | st_b;
    top  = 0;
    for (int unsigned j = 0; j < B; j++) begin
      if (st_u[j]) top = j;
    end
    lo   = (top + 1 > PC) ? top + 1 - PC : 0;
    if (is_signed) begin
      a_w = (W+1)'($signed(a) >>> (lo * K));
      b_w = (W+1)'($signed(b) >>> (lo * K));
    end else begin
      a_w = {1'b0, W'(a >> (lo * K))};
      b_w = {1'b0, W'(b >> (lo * K))};
    end
    cin  = (lo != 0) ? (a[lo*K-1] & b[lo*K-1]) : 1'b0;
    s_w  = {is_signed & a_w[W], a_w} + {is_signed & b_w[W], b_w} + (W+2)'(cin);
    if (is_signed) s_full = (N+W+2)'($signed(s_w)) << (lo * K);
    else           s_full = (N+W+2)'(s_w) << (lo * K);
    sum  = s_full[N-1:0];
    cout = (st_u != '0) && s_w[(top + 1 - lo) * K];
    if (is_signed) ovf = (s_full != (N+W+2)'($signed(s_full[N-1:0])));   // left the signed range
    else           ovf = cout && (top == B - 1);
  end

  // sentinel of the sum: carry update (unsigned) or regenerated (signed)
  always_comb begin
    st_s = st_u;
    if (is_signed)                  st_s = st_sum;
    else if (cout && top != B - 1)  st_s[top+1] = 1'b1;
  end
endmodule
