// fx_log_convert: conversion between two's-complement fixed-point numbers and
// the log-domain word, for using the log-domain estimator in a fixed-point
// system.
// To log: the magnitude's leading one gives the integer part of log2 (its bit
// position minus FB), and the FRAC bits right below it give the fraction by
// log2(1 + m) ~ m, as the float conversion does with the exponent and the top
// mantissa bits. The result is biased by 127 like the float path, so both
// feed the same log_alu. Zero maps to the smallest word (0).
// From log: the word's integer part is turned back into a shift of the
// significand {1, fraction}; results too large for W bits saturate to the
// largest magnitude, results below the last fraction bit become zero.
// Both directions are combinational and independent. Replacing the exponent
// field by a leading-one shift follows the source method; the Q format
// (W total bits, FB fraction bits), the rounding (truncation) and the
// saturation are this design's choices.
module fx_log_convert
  import log_pkg::*;
#(
  parameter int unsigned W  = 32,   // fixed-point width
  parameter int unsigned FB = 16    // fraction bits of the fixed-point value
) (
  input  logic [W-1:0] fx_in,
  output logint_t      l_out,
  input  logint_t      l_in,
  output logic [W-1:0] fx_out
);
  localparam int unsigned LW = $clog2(W);

  logic [W-1:0]    mag;
  logic [LW-1:0]   msb;
  logic [W-1:0]    norm;
  logic signed [31:0] e_in, e_out, sh;
  logic [W+LOG_FRAC:0] sig;        // significand shifted into place
  logic [W-1:0]    mag_out;

  // to log: magnitude, leading-one position, fraction bits below it
  always_comb begin
    mag = fx_in[W-1] ? (~fx_in + 1'b1) : fx_in;
    msb = '0;
    for (int unsigned i = 0; i < W; i++) if (mag[i]) msb = LW'(i);
    norm = mag << (W - 1 - 32'(msb));          // leading one at bit W-1
    e_in = 32'(msb) - 32'(FB) + 127;
    if (mag == '0) l_out = '{sign: 1'b0, mag: '0};
    else           l_out = '{sign: fx_in[W-1], mag: {e_in[7:0], norm[W-2 -: LOG_FRAC]}};
  end

  // from log: 2^(e) * 1.f placed at the fixed-point position
  always_comb begin
    e_out = 32'(l_in.mag[LOG_MW-1:LOG_FRAC]) - 127;
    sh    = e_out + int'(FB) - int'(LOG_FRAC);       // shift of the 6-bit {1, f}
    sig   = '0;
    if (sh >= 0) sig = (W+LOG_FRAC+1)'({1'b1, l_in.mag[LOG_FRAC-1:0]}) << sh;
    else         sig = (W+LOG_FRAC+1)'({1'b1, l_in.mag[LOG_FRAC-1:0]}) >> (-sh);
    if (sh > int'(W) || sig[W+LOG_FRAC:W-1] != '0) mag_out = {1'b0, {(W-1){1'b1}}};
    else                                           mag_out = sig[W-1:0];
    fx_out = l_in.sign ? (~mag_out + 1'b1) : mag_out;
  end
endmodule
