// log_pkg: shared types of the log-domain estimator.
// A float x = (-1)^s * 1.m * 2^(e-127) is estimated in the log domain by
// log2|x| ~ (e - 127) + m. Keeping the sign, the 8 exponent bits and the
// LOG_FRAC leading mantissa bits gives a sign-magnitude fixed-point word whose
// magnitude part e.m is unsigned with the exponent bias still inside it.
// The magnitude is read as an unsigned number "mag" in units of 2^-LOG_FRAC:
// log2|x| = mag / 2^LOG_FRAC - 127.
package log_pkg;
  parameter int unsigned LOG_FRAC = 5;                  // mantissa bits kept
  parameter int unsigned LOG_MW   = 8 + LOG_FRAC;       // magnitude width

  typedef struct packed {
    logic              sign;
    logic [LOG_MW-1:0] mag;                             // {exponent, fraction}
  } logint_t;

  // Operations the estimator understands.
  typedef enum logic [2:0] {
    LOG_MUL  = 3'd0,
    LOG_DIV  = 3'd1,
    LOG_SQRT = 3'd2,
    LOG_POW  = 3'd3,
    LOG_MAX  = 3'd4,
    LOG_MIN  = 3'd5,
    LOG_ADD  = 3'd6,
    LOG_SUB  = 3'd7
  } log_op_e;

  // Conversion by truncation: since log2(1 + m) ~ m for m in [0,1), the sign,
  // the exponent and the LOG_FRAC leading mantissa bits of a float already are
  // the log word; the remaining mantissa bits are dropped without rounding.
  function automatic logint_t to_log(input logic [31:0] f);
    return {f[31], f[30:23], f[22 -: LOG_FRAC]};
  endfunction

  // Recovery: 2^(e.m) is read back as 1.m * 2^e by padding the mantissa with
  // zeros.
  function automatic logic [31:0] from_log(input logint_t l);
    return {l, {(23 - LOG_FRAC){1'b0}}};
  endfunction
endpackage
