// tb_aif_sentinel: checks the sentinel generator at N=32/B=8 and N=16/B=4.
// Reference: bit i is set when the operand shifted right by i blocks is
// non-zero (positive) or not all ones (negative, arithmetic shift).
module tb_aif_sentinel;
  int checks = 0, failures = 0;

  logic [31:0] v32;  logic s32;  logic [7:0] st32;
  logic [15:0] v16;  logic [3:0] st16;

  aif_sentinel #(.N(32), .B(8)) dut32 (.value(v32), .is_signed(s32), .st(st32));
  aif_sentinel #(.N(16), .B(4)) dut16 (.value(v16), .is_signed(1'b0), .st(st16));

  function automatic logic [7:0] ref32(input logic [31:0] v, input logic sgn);
    logic [7:0] r;
    for (int i = 0; i < 8; i++) begin
      if (sgn && v[31]) r[i] = ($signed(v) >>> (4 * i)) != -32'sd1;
      else              r[i] = (v >> (4 * i)) != 0;
    end
    return r;
  endfunction

  task automatic chk32(input logic [31:0] v, input logic sgn);
    v32 = v; s32 = sgn; #1;
    checks++;
    if (st32 !== ref32(v, sgn)) begin
      failures++;
      $display("FAIL sentinel v=%h signed=%0d st=%b exp=%b", v, sgn, st32, ref32(v, sgn));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // worked example of the format: 1500 and 800 with k=4 both give 0111
    v16 = 16'd1500; #1; checks++; if (st16 !== 4'b0111) begin failures++; $display("FAIL 1500 st=%b", st16); end
    v16 = 16'd800;  #1; checks++; if (st16 !== 4'b0111) begin failures++; $display("FAIL 800 st=%b", st16); end
    v16 = 16'd0;    #1; checks++; if (st16 !== 4'b0000) begin failures++; $display("FAIL 0 st=%b", st16); end
    chk32(32'h0, 0); chk32(32'hFFFF_FFFF, 0); chk32(32'hFFFF_FFFF, 1);
    chk32(32'h8000_0000, 1); chk32(32'hFFFF_FFF0, 1); chk32(32'h0000_0010, 1);
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] r;
      r = $urandom;
      chk32(r >> ($urandom % 32), $urandom % 2);
      chk32(~(r >> ($urandom % 32)), 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
