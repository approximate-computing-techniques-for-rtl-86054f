// log_estimator: one error-resilient or error-sensitive DFG node estimated in
// the log domain. Both float operands are converted by truncation, the log ALU
// forms the estimate, which is also recovered to a float, and the cut check
// reports whether operand B is a non-critical minor input of the node (so its
// branch need not be computed exactly). Combinational. The composition mirrors
// the estimate-then-decide flow of the source method; the port set is this
// design's.
module log_estimator
  import log_pkg::*;
#(
  parameter int unsigned FRAC = LOG_FRAC   // fixed by log_pkg's conversion
) (
  input  log_op_e         op,
  input  logic [31:0]     fa,
  input  logic [31:0]     fb,
  input  logic [3:0]      n,
  input  logic [7+FRAC:0] delta,
  output logic [8+FRAC:0] est_l,
  output logic [31:0]     est_f,
  output logic [3:0]      ed,
  output logic            a_dominant,
  output logic            noncritical
);
  logic [8+FRAC:0] la, lb;

  assign la = to_log(fa);
  assign lb = to_log(fb);

  log_alu #(.FRAC(FRAC)) u_alu (.op(op), .a(la), .b(lb), .n(n), .s(est_l), .ed(ed));

  assign est_f = from_log(est_l);

  log_cut_check #(.FRAC(FRAC)) u_cut (
    .op(op), .a(la), .b(lb), .delta(delta),
    .a_dominant(a_dominant), .noncritical(noncritical)
  );
endmodule
