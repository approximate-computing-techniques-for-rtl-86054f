// aif_engine: two-stage approximate computing engine for the approximate
// integer format (AIF).
// Stage 1 (fetch): both operands are converted to AIF storage words, which is
// where the sentinel bits are generated, and registered with the operation.
// For AIF_SUB the second operand is negated first and both are taken as two's
// complement. Stage 2 (execute): the words are expanded again and fed to the
// AIF adder or the AIF multiplier; the result, its sentinel bits and the add
// overflow are registered. One operation may enter every cycle; results come
// out two cycles later with out_valid. There is no back-pressure.
// in_signed selects two's-complement operands for ADD and MUL.
// For ADD/SUB, out_result holds the N-bit sum extended to 2N bits (sign- or
// zero-extended) and out_st its B sentinel bits zero-extended; for MUL, the
// 2N-bit product and its 2B sentinel bits. Negating the most negative number
// wraps, as in any two's-complement subtractor. Computing the sentinels in the fetch pipeline follows the
// format's description; the pipeline and its interface are this design's own.
module aif_engine
  import aif_pkg::*;
#(
  parameter int unsigned N  = AIF_N,
  parameter int unsigned B  = AIF_B,
  parameter int unsigned K  = N / B,
  parameter int unsigned PC = AIF_PC
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  aif_op_e        in_op,
  input  logic           in_signed,
  input  logic [N-1:0]   in_a,
  input  logic [N-1:0]   in_b,
  output logic           out_valid,
  output aif_op_e        out_op,
  output logic [2*N-1:0] out_result,
  output logic [2*B-1:0] out_st,
  output logic           out_ovf
);
  localparam int unsigned AW = B + (B - 1) * K + 1;

  // stage 1
  logic [AW-1:0] enc_a, enc_b;
  logic [AW-1:0] s1_a, s1_b;
  logic          s1_valid;
  aif_op_e       s1_op;
  logic          s1_signed;
  logic          sgn;
  logic [N-1:0]  b_in;

  assign sgn  = in_signed | (in_op == AIF_SUB);
  assign b_in = (in_op == AIF_SUB) ? (~in_b + 1'b1) : in_b;

  aif_encode #(.N(N), .B(B), .K(K)) u_enc_a (.value(in_a), .is_signed(sgn), .aif(enc_a));
  aif_encode #(.N(N), .B(B), .K(K)) u_enc_b (.value(b_in), .is_signed(sgn), .aif(enc_b));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_op    <= AIF_ADD;
      s1_signed <= 1'b0;
      s1_a     <= '0;
      s1_b     <= '0;
    end else begin
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_op <= in_op;
        s1_signed <= sgn;
        s1_a  <= enc_a;
        s1_b  <= enc_b;
      end
    end
  end

  // stage 2
  logic [N-1:0]   dec_a, dec_b;
  logic [B-1:0]   st_a, st_b;
  logic [N-1:0]   sum;
  logic [B-1:0]   st_s;
  logic           ovf;
  logic [2*N-1:0] prod;
  logic [2*B-1:0] st_p;

  aif_decode #(.N(N), .B(B), .K(K)) u_dec_a (.aif(s1_a), .value(dec_a), .st(st_a));
  aif_decode #(.N(N), .B(B), .K(K)) u_dec_b (.aif(s1_b), .value(dec_b), .st(st_b));

  aif_adder #(.N(N), .B(B), .K(K), .PC(PC)) u_add (
    .a(dec_a), .b(dec_b), .st_a(st_a), .st_b(st_b), .is_signed(s1_signed),
    .sum(sum), .st_s(st_s), .ovf(ovf)
  );

  aif_multiplier #(.N(N), .B(B), .K(K), .PC(PC)) u_mul (
    .a(dec_a), .b(dec_b), .st_a(st_a), .st_b(st_b), .is_signed(s1_signed),
    .prod(prod), .st_p(st_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_op     <= AIF_ADD;
      out_result <= '0;
      out_st     <= '0;
      out_ovf    <= 1'b0;
    end else begin
      out_valid <= s1_valid;
      if (s1_valid) begin
        out_op <= s1_op;
        if (s1_op == AIF_MUL) begin
          out_result <= prod;
          out_st     <= st_p;
          out_ovf    <= 1'b0;
        end else begin
          out_result <= s1_signed ? (2*N)'($signed(sum)) : (2*N)'(sum);
          out_st     <= (2*B)'(st_s);
          out_ovf    <= ovf;
        end
      end
    end
  end
endmodule
