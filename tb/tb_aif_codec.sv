// tb_aif_codec: round trip through aif_encode and aif_decode. A value whose
// top block is empty must come back unchanged; a value with all blocks valid
// must come back with block 0 cleared. The stored word's sentinel field must
// equal the reference sentinel. The same holds for two's-complement operands
// with the negative-number rule.
module tb_aif_codec;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;
  int dropped = 0;

  logic [31:0] v, vo;
  logic [7:0]  st;
  logic [36:0] w;
  logic        sg = 0;

  aif_encode #(.N(32), .B(8)) u_enc (.value(v), .is_signed(sg), .aif(w));
  aif_decode #(.N(32), .B(8)) u_dec (.aif(w), .value(vo), .st(st));

  task automatic chk(input logic [31:0] x);
    logic [31:0] ev;
    logic [7:0]  es;
    v = x; #1;
    ev = 32'(stored_ref(u128_t'(x), 32, 4));
    es = 8'(sentinel(u128_t'(x), 4, 8));
    if (ev != x) dropped++;
    checks++;
    if (vo !== ev || st !== es || w[35:28] !== es) begin
      failures++;
      $display("FAIL codec v=%h out=%h exp=%h st=%b exp=%b", x, vo, ev, st, es);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chks(input logic [31:0] x);
    logic [31:0] ev;
    logic [7:0]  es;
    v = x; sg = 1; #1;
    ev = 32'(stored_ref_s(s128_t'($signed(x)), 32, 4));
    es = 8'(sentinel_s(s128_t'($signed(x)), 4, 8));
    checks++;
    if (vo !== ev || st !== es) begin
      failures++;
      $display("FAIL signed codec v=%h out=%h exp=%h st=%b exp=%b", x, vo, ev, st, es);
    end
    sg = 0;
  endtask

  initial begin
    chks(32'hFFFF_FFF7); chks(32'h8000_0000); chks(32'hF7FF_FFFF); chks(32'h0000_0007);
    for (int i = 0; i < 2000; i++) chks(32'($signed(32'($urandom)) >>> ($urandom % 32)));
    chk(32'h0); chk(32'hFFFF_FFFF); chk(32'h0FFF_FFFF); chk(32'h1000_0000); chk(32'h1234_5678);
    for (int i = 0; i < 3000; i++) chk(32'($urandom) >> ($urandom % 32));
    checks++;
    if (dropped == 0) begin failures++; $display("FAIL no dropped-block case seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
