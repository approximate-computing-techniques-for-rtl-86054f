// log_alu: arithmetic estimation in the log domain.
// Operands are sign-magnitude log words (see log_pkg); mag = (log2|x|+127)*2^FRAC.
//   MUL  : mag_a + mag_b - bias            (one fixed-point adder)
//   DIV  : mag_a - mag_b + bias
//   SQRT : (mag_a + bias) >> 1             (log halves)
//   POW  : n * (mag_a - bias) + bias
//   MAX/MIN : compare the signed values the words stand for
//   ADD  : same signs -> larger magnitude plus 2^-ed, where ed is the rounded
//          difference of the two logs; nothing is added when ed > ED_MAX
//   SUB  : subtraction of magnitudes -> larger magnitude plus log2(1-2^-ed)
//          from a 6-entry table (-1, -1, -0.4375, -0.1875, -0.09375,
//          -0.03125 for ed = 0..5), nothing when ed > ED_MAX
// ADD of unlike signs and SUB of like signs take the magnitude-subtraction
// path; the result carries the sign of the operand with the larger magnitude.
// Results saturate to exponents 0..254. Combinational; ed is also output.
// The operations, the rounding of ed and the table follow the source method;
// the sign handling, the bias correction and the saturation are this design's.
module log_alu
  import log_pkg::*;
#(
  parameter int unsigned FRAC   = LOG_FRAC,
  parameter int unsigned ED_MAX = 5
) (
  input  log_op_e         op,
  input  logic [8+FRAC:0] a,
  input  logic [8+FRAC:0] b,
  input  logic [3:0]      n,      // exponent of POW
  output logic [8+FRAC:0] s,
  output logic [3:0]      ed
);
  localparam int MW   = 8 + FRAC;
  localparam int ONE  = 1 << FRAC;
  localparam int BIAS = 127 << FRAC;
  localparam int MAXV = (254 << FRAC) + ONE - 1;

  // log2(1 - 2^-ed) in units of 2^-5 (Table of the subtraction estimate)
  function automatic int sub_comp(input int unsigned e);
    int v;
    case (e)
      0, 1:    v = 32;
      2:       v = 14;
      3:       v = 6;
      4:       v = 3;
      5:       v = 1;
      default: v = 0;
    endcase
    if (e > ED_MAX) v = 0;
    return (v << FRAC) >> 5;
  endfunction

  function automatic logic [MW-1:0] sat(input int v);
    if (v < 0)    return '0;
    if (v > MAXV) return MW'(MAXV);
    return MW'(v);
  endfunction

  // a > b as the signed values the log words stand for
  function automatic logic greater(input logic sa, input int ma, input logic sb, input int mb);
    if (sa != sb) return sb;          // the positive one is larger
    if (!sa)      return ma > mb;
    return ma < mb;
  endfunction

  logic sa, sb, sbe;
  logic signed [31:0] ma, mb, big, diff, ed_i, r;
  logic rs;

  always_comb begin
    sa   = a[MW];
    sb   = b[MW];
    ma   = int'(a[MW-1:0]);
    mb   = int'(b[MW-1:0]);
    sbe  = sb ^ (op == LOG_SUB);
    big  = (ma >= mb) ? ma : mb;
    diff = (ma >= mb) ? ma - mb : mb - ma;
    ed_i = (diff + ONE / 2) >> FRAC;
    ed   = (ed_i > 15) ? 4'd15 : 4'(ed_i);
    r    = 0;
    rs   = 1'b0;
    unique case (op)
      LOG_MUL:  begin r = ma + mb - BIAS;  rs = sa ^ sb; end
      LOG_DIV:  begin r = ma - mb + BIAS;  rs = sa ^ sb; end
      LOG_SQRT: begin r = (ma + BIAS) >> 1; rs = 1'b0; end
      LOG_POW:  begin r = int'(n) * (ma - BIAS) + BIAS; rs = sa & n[0]; end
      LOG_MAX:  begin
        if (greater(sa, ma, sb, mb)) begin r = ma; rs = sa; end
        else                         begin r = mb; rs = sb; end
      end
      LOG_MIN:  begin
        if (greater(sa, ma, sb, mb)) begin r = mb; rs = sb; end
        else                         begin r = ma; rs = sa; end
      end
      LOG_ADD, LOG_SUB: begin
        rs = (ma >= mb) ? sa : sbe;
        if (sa == sbe) r = big + ((ed_i <= int'(ED_MAX)) ? (ONE >> ed_i) : 0);
        else           r = big - sub_comp(ed_i);
      end
      default: ;
    endcase
    s = {rs, sat(r)};
  end
endmodule
