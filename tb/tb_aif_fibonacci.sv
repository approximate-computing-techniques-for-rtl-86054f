// tb_aif_fibonacci: the Fibonacci workload on the approximate adder at its
// default configuration (32-bit data, 8 blocks, 4 valid blocks kept). Each
// term is the approximate sum of the two previous approximate terms. The
// first 25 terms must be exact, and the relative errors (exact - approx) /
// exact of terms 25..30 must match the published values 8.24e-6, 1.02e-5,
// 9.44e-6, 9.72e-6, 9.61e-6, 9.66e-6 to three digits (terms counted from
// T0 = T1 = 1). Errors stay below 0.1% up to term 40.
module tb_aif_fibonacci;
  int checks = 0, failures = 0;

  logic [31:0] a, b, s;
  logic [7:0]  sa, sb, ss;
  logic        ovf;

  aif_sentinel u_sa (.value(a), .is_signed(1'b0), .st(sa));
  aif_sentinel u_sb (.value(b), .is_signed(1'b0), .st(sb));
  aif_adder    dut  (.a(a), .b(b), .st_a(sa), .st_b(sb), .is_signed(1'b0), .sum(s), .st_s(ss), .ovf(ovf));

  real expected [25:30] = '{8.24e-6, 1.02e-5, 9.44e-6, 9.72e-6, 9.61e-6, 9.66e-6};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned fx0 = 1, fx1 = 1, fx2;
    logic [31:0] ap0 = 1, ap1 = 1;
    real err;
    for (int i = 2; i <= 40; i++) begin
      a = ap1; b = ap0; #1;
      fx2 = fx1 + fx0;
      err = (real'(fx2) - real'(s)) / real'(fx2);
      checks++;
      if (ovf) begin failures++; $display("FAIL overflow at term %0d", i); end
      if (i <= 24) begin
        checks++;
        if (s != 32'(fx2)) begin failures++; $display("FAIL term %0d = %0d exp %0d", i, s, fx2); end
      end else if (i <= 30) begin
        checks++;
        if (err < expected[i] * 0.995 || err > expected[i] * 1.005) begin
          failures++;
          $display("FAIL term %0d error %g exp %g", i, err, expected[i]);
        end
      end else begin
        checks++;
        if (err < 0.0 || err > 1e-3) begin failures++; $display("FAIL term %0d error %g", i, err); end
      end
      $display("term %0d exact %0d approx %0d error %g", i, fx2, s, err);
      ap0 = ap1; ap1 = s; fx0 = fx1; fx1 = fx2;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
