// aif_encode: converts an N-bit integer into the AIF storage word.
// The word is {sign, st, payload}: a sign bit, B sentinel bits and B-1
// blocks. If the top block is not valid (st[B-1] = 0) it holds no
// information and the payload is blocks B-2..0, nothing is lost. If every
// block is valid the payload is blocks B-1..1 and block 0 is dropped
// (truncated); its loss is small because the top block is significant.
// With is_signed the operand is two's complement and the sentinel uses the
// negative-number rule; the sign bit then records the operand's MSB, which
// the sentinels alone cannot restore (an invalid top block is all zeros for
// a positive and all ones for a negative number). Unsigned words carry 0.
// Combinational. The {st, payload} layout and the dropped last block follow
// the format's description for four blocks; the B-block generalisation and
// the sign bit are this design's.
module aif_encode #(
  parameter int unsigned N = aif_pkg::AIF_N,
  parameter int unsigned B = aif_pkg::AIF_B,
  parameter int unsigned K = N / B
) (
  input  logic [N-1:0]           value,
  input  logic                   is_signed,
  output logic [B+(B-1)*K:0]     aif
);
  logic [B-1:0]       st;
  logic [(B-1)*K-1:0] payload;

  aif_sentinel #(.N(N), .B(B), .K(K)) u_st (
    .value    (value),
    .is_signed(is_signed),
    .st       (st)
  );

  assign payload = st[B-1] ? value[N-1:K] : value[(B-1)*K-1:0];
  assign aif     = {is_signed & value[N-1], st, payload};
endmodule
