// tb_log_cut_check: the non-criticality rule against a real-valued reference:
// for add/sub the input with the larger log dominates and the other is cut
// when the log difference reaches delta; for max/min the dominant input is the
// one the node selects and |difference| is compared; error-sensitive nodes
// never cut. Includes the delta = 3 case of the error analysis (8x apart).
module tb_log_cut_check;
  import log_pkg::*;
  import log_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_cut = 0, n_keep = 0;

  log_op_e     op;
  logic [13:0] a, b;
  logic [12:0] delta;
  logic        a_dom, nc;

  log_cut_check dut (.op(op), .a(a), .b(b), .delta(delta), .a_dominant(a_dom), .noncritical(nc));

  task automatic chk(input log_op_e o, input logic [13:0] x, input logic [13:0] y, input logic [12:0] d);
    real lx = lval(x), ly = lval(y), vx, vy, diff;
    logic e_dom, e_nc;
    op = o; a = x; b = y; delta = d; #1;
    vx = (x[13] ? -1.0 : 1.0) * (2.0 ** lx);
    vy = (y[13] ? -1.0 : 1.0) * (2.0 ** ly);
    diff = (lx > ly) ? lx - ly : ly - lx;
    e_dom = 1'b0; e_nc = 1'b0;
    case (o)
      LOG_ADD, LOG_SUB: begin e_dom = lx >= ly; e_nc = diff >= real'(d) / 32.0; end
      LOG_MAX:          begin e_dom = vx > vy;  e_nc = diff >= real'(d) / 32.0; end
      LOG_MIN:          begin e_dom = !(vx > vy); e_nc = diff >= real'(d) / 32.0; end
      default: ;
    endcase
    checks++;
    if (a_dom !== e_dom || nc !== e_nc) begin
      failures++;
      $display("FAIL %s a=%h b=%h delta=%0d dom=%0d nc=%0d exp %0d %0d", o.name(), x, y, d, a_dom, nc, e_dom, e_nc);
    end
    if (nc) n_cut++; else n_keep++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // 8 = 2^3 against 1 = 2^0 with delta = 3: minor input is non-critical
    chk(LOG_ADD, {1'b0, 8'd130, 5'd0}, {1'b0, 8'd127, 5'd0}, 13'd96);
    checks++; if (!(nc && a_dom)) begin failures++; $display("FAIL delta=3 example"); end
    chk(LOG_ADD, {1'b0, 8'd129, 5'd31}, {1'b0, 8'd127, 5'd0}, 13'd96);
    checks++; if (nc) begin failures++; $display("FAIL just below delta"); end
    for (int i = 0; i < 3000; i++) begin
      log_op_e o;
      o = log_op_e'($urandom % 8);
      chk(o, {1'($urandom), 8'(120 + $urandom % 16), 5'($urandom)},
             {1'($urandom), 8'(120 + $urandom % 16), 5'($urandom)}, 13'($urandom % 160));
    end
    checks++; if (n_cut == 0 || n_keep == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
