// log_cut_check: non-criticality test of one error-resilient DFG node.
// For an add/sub node the dominant input I_d is the one with the larger
// magnitude (larger log); for max it is the larger value, for min the smaller.
// The minor input I_m is non-critical, and its branch may be cut and replaced
// by its log-domain estimate, when f(I_d - I_m) >= delta, with f the identity
// for add/sub and the absolute value for min/max. Multiply, divide, square
// root and power nodes are error sensitive: their inputs are always critical.
// Combinational. delta is unsigned fixed point with FRAC fraction bits.
// The rule follows the source method; delta's format is this design's choice.
module log_cut_check
  import log_pkg::*;
#(
  parameter int unsigned FRAC = LOG_FRAC
) (
  input  log_op_e         op,
  input  logic [8+FRAC:0] a,
  input  logic [8+FRAC:0] b,
  input  logic [7+FRAC:0] delta,
  output logic            a_dominant,
  output logic            noncritical
);
  localparam int MW = 8 + FRAC;

  logic sa, sb, a_gt;
  int   ma, mb, d;

  always_comb begin
    sa = a[MW];
    sb = b[MW];
    ma = int'(a[MW-1:0]);
    mb = int'(b[MW-1:0]);
    if (sa != sb)  a_gt = sb;
    else if (!sa)  a_gt = ma > mb;
    else           a_gt = ma < mb;
    d  = (ma >= mb) ? ma - mb : mb - ma;
    a_dominant  = 1'b0;
    noncritical = 1'b0;
    unique case (op)
      LOG_ADD, LOG_SUB: begin
        a_dominant  = ma >= mb;
        noncritical = d >= int'(delta);
      end
      LOG_MAX: begin
        a_dominant  = a_gt;
        noncritical = d >= int'(delta);
      end
      LOG_MIN: begin
        a_dominant  = !a_gt;
        noncritical = d >= int'(delta);
      end
      default: ;
    endcase
  end
endmodule
