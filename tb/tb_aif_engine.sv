// tb_aif_engine: random stream of adds, subtracts and multiplies, unsigned
// and two's complement, with gaps, through the two-stage engine. Each result must appear exactly two cycles after its
// operands and equal the reference: operands first pass through the storage
// format (block 0 dropped when all blocks are valid), then the approximate
// add (efficient rounding) or multiply (classic rounding).
module tb_aif_engine;
  import aif_pkg::*;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_add = 0, n_mul = 0, n_ovf = 0, n_drop = 0, n_sub = 0, n_smul = 0;

  logic           clk = 0, rst_n = 0;
  logic           in_valid = 0;
  aif_op_e        in_op = AIF_ADD;
  logic           in_signed = 0;
  logic [31:0]    in_a = 0, in_b = 0;
  logic           out_valid;
  aif_op_e        out_op;
  logic [63:0]    out_result;
  logic [15:0]    out_st;
  logic           out_ovf;

  aif_engine dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_op(in_op), .in_signed(in_signed), .in_a(in_a), .in_b(in_b),
                  .out_valid(out_valid), .out_op(out_op), .out_result(out_result), .out_st(out_st),
                  .out_ovf(out_ovf));

  always #5 clk = ~clk;

  typedef struct { aif_op_e op; logic [63:0] res; logic [15:0] st; logic ovf; int t; } exp_t;
  exp_t q[$];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic exp_t model(input aif_op_e op, input logic sg, input logic [31:0] a, input logic [31:0] b, input int t);
    exp_t e;
    e.op = op; e.t = t;
    engine_ref(int'(op), sg, a, b, e.res, e.st, e.ovf);
    return e;
  endfunction

  // output checker
  always @(negedge clk) if (rst_n) begin
    if (out_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (cycle - e.t != 2 || out_op != e.op || out_result !== e.res || out_st !== e.st || out_ovf !== e.ovf) begin
          failures++;
          $display("FAIL %s lat=%0d res=%h st=%b ovf=%0d exp %h %b %0d", e.op.name(), cycle - e.t,
                   out_result, out_st, out_ovf, e.res, e.st, e.ovf);
        end
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_op    = aif_op_e'($urandom % 3);
      in_signed = ($urandom % 2) != 0;
      in_a     = (i % 50 == 0) ? 32'hF000_000F : 32'($urandom) >> ($urandom % 32);
      in_b     = (i % 50 == 0) ? 32'hF000_0000 : 32'($urandom) >> ($urandom % 32);
      if (in_signed && in_a[0]) in_a = -in_a;
      if (in_valid) begin
        q.push_back(model(in_op, in_signed, in_a, in_b, cycle));
        if (in_op == AIF_ADD) n_add++; else if (in_op == AIF_SUB) n_sub++; else n_mul++;
        if (in_op == AIF_MUL && in_signed && q[$].res[63]) n_smul++;
        if (in_a >= 32'h1000_0000 && in_a[3:0] != 0) n_drop++;
        if (in_op == AIF_ADD && !in_signed && q[$].ovf) n_ovf++;
      end
    end
    @(negedge clk); in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (q.size() != 0 || n_add == 0 || n_mul == 0 || n_ovf == 0 || n_drop == 0 || n_sub == 0 || n_smul == 0) begin
      failures++; $display("FAIL left=%0d add=%0d mul=%0d ovf=%0d drop=%0d sub=%0d smul=%0d", q.size(), n_add, n_mul, n_ovf, n_drop, n_sub, n_smul);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
