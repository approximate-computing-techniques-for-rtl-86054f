// approx_top: the three approximate-computing designs side by side.
//  * aif_*: the approximate integer format engine. Unsigned or two's-
//    complement operands are segmented into blocks, only the leading valid blocks are added,
//    subtracted or multiplied on a narrow core; 2-cycle pipeline (see
//    aif_engine).
//  * le_*: one DFG node estimated in the log domain plus its cut decision,
//    combinational (see log_estimator).
//  * ld_*: log-domain vector multiplication (see log_dot).
//  * ih_*: floating-point multiplication with information hidden in the
//    result LSBs, combinational (see info_hide).
//  * fx_*: fixed-point <-> log-domain conversion, so that fixed-point data
//    can use the log-domain estimator (see fx_log_convert).
//  * am_*: reduced-mantissa float multiplier (AM_MB fraction bits) of the
//    kind used to recompute the graph nodes that were not cut, combinational.
// The designs share only the clock and reset; they do not exchange data.
// Parameter defaults are the source's numbers where it gives them (32-bit
// words in 8 blocks, 10 hidden bits, 10 mantissa bits); PC, DEPTH, the
// fixed-point format, and
// bringing each design out on its own ports, are this design's choices.
module approx_top
  import aif_pkg::*;
  import log_pkg::*;
#(
  parameter int unsigned N     = AIF_N,
  parameter int unsigned B     = AIF_B,
  parameter int unsigned PC    = AIF_PC,
  parameter int unsigned DEPTH = 16,
  parameter int unsigned P     = 10,
  parameter int unsigned AM_MB = 10,
  parameter int unsigned FX_W  = 32,
  parameter int unsigned FX_FB = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  // AIF engine
  input  logic           aif_in_valid,
  input  aif_op_e        aif_in_op,
  input  logic           aif_in_signed,
  input  logic [N-1:0]   aif_in_a,
  input  logic [N-1:0]   aif_in_b,
  output logic           aif_out_valid,
  output aif_op_e        aif_out_op,
  output logic [2*N-1:0] aif_out_result,
  output logic [2*B-1:0] aif_out_st,
  output logic           aif_out_ovf,
  // log-domain node estimator
  input  log_op_e        le_op,
  input  logic [31:0]    le_fa,
  input  logic [31:0]    le_fb,
  input  logic [3:0]     le_n,
  input  logic [LOG_MW-1:0] le_delta,
  output logint_t        le_est_l,
  output logic [31:0]    le_est_f,
  output logic [3:0]     le_ed,
  output logic           le_a_dominant,
  output logic           le_noncritical,
  // log-domain vector multiplication
  input  logic           ld_start,
  input  logic [$clog2(DEPTH+1)-1:0] ld_len,
  input  logic           ld_in_valid,
  input  logic [31:0]    ld_x,
  input  logic [31:0]    ld_y,
  output logic           ld_busy,
  output logic           ld_done,
  output logint_t        ld_z_l,
  output logic [31:0]    ld_z_f,
  // information hiding multiplier
  input  logic [31:0]    ih_a,
  input  logic [31:0]    ih_b,
  input  logic [P-1:0]   ih_key,
  input  logic           ih_embed_en,
  output logic [31:0]    ih_result,
  output logic [P-1:0]   ih_k_s,
  // reduced-mantissa multiplier
  input  logic [31:0]    am_a,
  input  logic [31:0]    am_b,
  output logic [31:0]    am_p,
  // fixed-point <-> log conversion
  input  logic [FX_W-1:0] fx_in,
  output logint_t        fx_l_out,
  input  logint_t        fx_l_in,
  output logic [FX_W-1:0] fx_out
);
  aif_engine #(.N(N), .B(B), .K(N / B), .PC(PC)) u_aif (
    .clk(clk), .rst_n(rst_n),
    .in_valid(aif_in_valid), .in_op(aif_in_op), .in_signed(aif_in_signed), .in_a(aif_in_a), .in_b(aif_in_b),
    .out_valid(aif_out_valid), .out_op(aif_out_op), .out_result(aif_out_result),
    .out_st(aif_out_st), .out_ovf(aif_out_ovf)
  );

  log_estimator u_le (
    .op(le_op), .fa(le_fa), .fb(le_fb), .n(le_n), .delta(le_delta),
    .est_l(le_est_l), .est_f(le_est_f), .ed(le_ed),
    .a_dominant(le_a_dominant), .noncritical(le_noncritical)
  );

  log_dot #(.DEPTH(DEPTH)) u_ld (
    .clk(clk), .rst_n(rst_n), .start(ld_start), .len(ld_len),
    .in_valid(ld_in_valid), .x(ld_x), .y(ld_y),
    .busy(ld_busy), .done(ld_done), .z_l(ld_z_l), .z_f(ld_z_f)
  );

  info_hide #(.P(P)) u_ih (
    .a(ih_a), .b(ih_b), .key(ih_key), .embed_en(ih_embed_en),
    .result(ih_result), .k_s(ih_k_s)
  );

  fp_mul #(.MB(AM_MB)) u_am (.a(am_a), .b(am_b), .p(am_p));

  fx_log_convert #(.W(FX_W), .FB(FX_FB)) u_fx (
    .fx_in(fx_in), .l_out(fx_l_out), .l_in(fx_l_in), .fx_out(fx_out)
  );
endmodule
