// aif_sentinel: sentinel-bit generator of the approximate integer format.
// One K-bit checker per block tells whether the block holds a '1'; an OR over
// block i and all blocks above it (a prefix OR from the top) turns the checker outputs into the
// thermometer code st[i] = (block i non-zero) | st[i+1]. For a two's-complement
// negative operand (is_signed = 1 and MSB = 1) a block is valid when it holds a
// '0', so the checker becomes a NAND of the block's bits; the chain is the same.
// Purely combinational. The positive rule follows the format definition; the
// is_signed input and its exact encoding are this design's choice.
module aif_sentinel #(
  parameter int unsigned N = aif_pkg::AIF_N,
  parameter int unsigned B = aif_pkg::AIF_B,
  parameter int unsigned K = N / B
) (
  input  logic [N-1:0] value,
  input  logic         is_signed,
  output logic [B-1:0] st
);
  logic negative;
  logic [B-1:0] blk_valid;

  assign negative = is_signed & value[N-1];

  always_comb begin
    for (int unsigned i = 0; i < B; i++) begin
      blk_valid[i] = negative ? ~(&value[i*K +: K]) : (|value[i*K +: K]);
    end
    for (int unsigned i = 0; i < B; i++) begin
      st[i] = |(blk_valid >> i);      // block i or any block above it
    end
  end
endmodule
