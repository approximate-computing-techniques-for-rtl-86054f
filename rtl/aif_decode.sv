// aif_decode: expands an AIF storage word {sign, st, payload} back to an
// N-bit integer. When the top sentinel bit is set the payload holds blocks
// B-1..1 and is shifted up one block with zeros padded into block 0;
// otherwise it is blocks B-2..0 and the top block is filled with the sign bit
// (zeros for unsigned words). The sentinel bits pass through. Combinational.
module aif_decode #(
  parameter int unsigned N = aif_pkg::AIF_N,
  parameter int unsigned B = aif_pkg::AIF_B,
  parameter int unsigned K = N / B
) (
  input  logic [B+(B-1)*K:0] aif,
  output logic [N-1:0]       value,
  output logic [B-1:0]       st
);
  logic [(B-1)*K-1:0] payload;
  logic               sign;

  assign payload = aif[(B-1)*K-1:0];
  assign st      = aif[B+(B-1)*K-1 -: B];
  assign sign    = aif[B+(B-1)*K];
  assign value   = st[B-1] ? {payload, {K{1'b0}}} : {{K{sign}}, payload};
endmodule
