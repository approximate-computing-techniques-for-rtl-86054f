// info_hide: approximate floating-point multiplication that hides P secret
// bits in the result's mantissa LSBs.
// The last P mantissa bits of each operand are its key part (K_A, K_B) and are
// cleared, giving A' and B'. The product O = A' x B' is formed; its last P
// bits are K_O. With embed_en the result is O with its last P bits replaced by
// K_S = K_A ^ K_B ^ K_O ^ key; without it the result is O unchanged. Changing
// P mantissa LSBs moves a value by less than 2^(P-24) relatively, so the
// embedded bits cost little accuracy. k_s is always output so that a verifier
// holding the key can compare. Combinational. The embedding rule and P = 10
// follow the source method; only multiplication is provided.
module info_hide #(
  parameter int unsigned P = 10
) (
  input  logic [31:0]  a,
  input  logic [31:0]  b,
  input  logic [P-1:0] key,
  input  logic         embed_en,
  output logic [31:0]  result,
  output logic [P-1:0] k_s
);
  logic [31:0] a_c, b_c, o;

  initial begin
    assert (P >= 1 && P <= 23) else $error("info_hide: P must be 1..23");
  end

  assign a_c = {a[31:P], {P{1'b0}}};
  assign b_c = {b[31:P], {P{1'b0}}};

  fp_mul u_mul (.a(a_c), .b(b_c), .p(o));

  assign k_s    = a[P-1:0] ^ b[P-1:0] ^ o[P-1:0] ^ key;
  assign result = embed_en ? {o[31:P], k_s} : o;
endmodule
