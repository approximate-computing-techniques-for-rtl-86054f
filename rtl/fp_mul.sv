// fp_mul: IEEE754 single-precision multiplier, round to nearest even, with
// an optional reduced mantissa.
// Only the MB most significant fraction bits of each operand are used; the
// (MB+1)-bit significands (hidden one restored) are multiplied, the product
// normalised by at most one place and rounded to MB fraction bits from the
// guard and sticky bits; the fraction bits below MB are zero. MB = 23 is the
// exact single-precision multiplier; MB = 10 is the approximate unit used for
// recomputed graph nodes, which keeps 10 mantissa bits. Subnormal inputs and
// results are flushed to zero; overflow gives infinity; NaN, or infinity
// times zero, gives the quiet NaN 7FC00000.
// Combinational. Keeping 10 mantissa bits follows the source method; the
// multiplier itself (truncating the inputs, rounding the output) is a
// standard design and this design's own reading of "use only 10 bits".
module fp_mul #(
  parameter int unsigned MB = 23      // fraction bits kept, 1..23
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] p
);
  localparam int unsigned SW = MB + 1;          // significand width

  logic          sa, sb, sp;
  logic [7:0]    ea, eb;
  logic [22:0]   fa, fb;
  logic          a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [2*SW-1:0] prod;
  logic [MB:0]   mant;      // MB fraction bits plus a rounding carry
  logic          guard, sticky;
  logic signed [31:0] e;

  initial begin
    assert (MB >= 1 && MB <= 23) else $error("fp_mul: MB must be 1..23");
  end

  always_comb begin
    {sa, ea, fa} = a;
    {sb, eb, fb} = b;
    sp     = sa ^ sb;
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (fa == '0);
    b_inf  = (eb == 8'hFF) && (fb == '0);
    a_nan  = (ea == 8'hFF) && (fa != '0);
    b_nan  = (eb == 8'hFF) && (fb != '0);
    prod   = (2*SW)'({1'b1, fa[22 -: MB]}) * (2*SW)'({1'b1, fb[22 -: MB]});
    e      = 32'(ea) + 32'(eb) - 127;
    if (prod[2*SW-1]) begin
      mant   = {1'b0, prod[2*SW-2 -: MB]};
      guard  = prod[MB];
      sticky = (prod & ((2*SW)'(1) << MB) - 1) != '0;
      e      = e + 1;
    end else begin
      mant   = {1'b0, prod[2*SW-3 -: MB]};
      guard  = prod[MB-1];
      sticky = (prod & ((2*SW)'(1) << (MB - 1)) - 1) != '0;
    end
    if (guard && (sticky || mant[0])) mant = mant + 1'b1;
    if (mant[MB]) begin       // rounding carried into the hidden bit
      mant = '0;
      e    = e + 1;
    end
    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) p = 32'h7FC0_0000;
    else if (a_inf || b_inf)        p = {sp, 8'hFF, 23'd0};
    else if (a_zero || b_zero)      p = {sp, 31'd0};
    else if (e >= 255)              p = {sp, 8'hFF, 23'd0};
    else if (e <= 0)                p = {sp, 31'd0};
    else                            p = {sp, e[7:0], 23'(mant[MB-1:0]) << (23 - MB)};
  end
endmodule
