// tb_aif_idct: image-recovery workload on the AIF arithmetic. Random 8x8
// blocks of 8-bit pixels are transformed with a floating-point DCT in the
// testbench, the coefficients rounded to integers, and the block recovered
// with a 2-D inverse DCT (rows, then columns) computed in signed 32-bit fixed
// point on the AIF multiplier and adder: basis values in Q14, every product
// and every partial sum approximate. This is done for PC = 2, 4 and 6 with
// N = 32 split into 8 blocks (the "32_8_pc" configurations), and once with
// exact integer arithmetic. Checks: the PSNR against the original pixels does
// not fall by more than 0.5 dB as PC grows (from PC = 4 on, all paths sit at
// the floor set by the integer rounding, where differences are noise), PC = 4
// and 6 are within 0.5 dB of the exact integer path, and PC = 2 loses
// accuracy. The block sizes and Q formats are this test's
// own; the source reports only PSNR per configuration.
module tb_aif_idct;
  import aif_ref_pkg::*;
  int checks = 0, failures = 0;

  localparam int NPC = 3;
  localparam int PCS [NPC] = '{2, 4, 6};

  logic [31:0] ma [NPC], mb [NPC], aa [NPC], ab [NPC], as_ [NPC];
  logic [7:0]  sma [NPC], smb [NPC], saa [NPC], sab [NPC], sas [NPC];
  logic [63:0] mp [NPC];
  logic [15:0] smp [NPC];
  logic        aovf [NPC];

  for (genvar g = 0; g < NPC; g++) begin : g_pc
    aif_multiplier #(.N(32), .B(8), .PC(PCS[g])) u_mul (
      .a(ma[g]), .b(mb[g]), .st_a(sma[g]), .st_b(smb[g]), .is_signed(1'b1), .prod(mp[g]), .st_p(smp[g]));
    aif_adder #(.N(32), .B(8), .PC(PCS[g])) u_add (
      .a(aa[g]), .b(ab[g]), .st_a(saa[g]), .st_b(sab[g]), .is_signed(1'b1), .sum(as_[g]), .st_s(sas[g]), .ovf(aovf[g]));
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] st_of(input logic [31:0] v);
    return 8'(sentinel_s(s128_t'($signed(v)), 4, 8));
  endfunction

  // one approximate multiply / add on configuration p (p = NPC: exact)
  task automatic amul(input int p, input int x, input int y, output int r);
    logic [63:0] q;
    if (p == NPC) begin r = x * y; return; end
    ma[p] = x; mb[p] = y; sma[p] = st_of(x); smb[p] = st_of(y);
    #1;
    q = mp[p];
    r = int'(q[31:0]);
  endtask

  task automatic aadd(input int p, input int x, input int y, output int r);
    if (p == NPC) begin r = x + y; return; end
    aa[p] = x; ab[p] = y; saa[p] = st_of(x); sab[p] = st_of(y);
    #1;
    r = int'(as_[p]);
    if (aovf[p]) begin failures++; $display("FAIL unexpected overflow"); end
  endtask

  int  basis [8][8];                 // basis[n][k] = round(2^14 * c_k/2 * cos((2n+1)k pi/16))
  real se [NPC+1];
  int  npix = 0;

  // 8-point inverse DCT of v (integers), result scaled by 2^-14 with rounding
  task automatic idct8(input int p, input int v [8], output int o [8]);
    int acc, t;
    for (int n = 0; n < 8; n++) begin
      acc = 0;
      for (int k = 0; k < 8; k++) begin
        amul(p, v[k], basis[n][k], t);
        aadd(p, acc, t, acc);
      end
      o[n] = (acc + (1 << 13)) >>> 14;
    end
  endtask

  initial begin
    real pi = 3.14159265358979;
    real psnr [NPC+1];
    for (int n = 0; n < 8; n++)
      for (int k = 0; k < 8; k++)
        basis[n][k] = int'($floor(16384.0 * ((k == 0) ? $sqrt(0.125) : 0.5) * $cos((2 * n + 1) * k * pi / 16.0) + 0.5));
    foreach (se[i]) se[i] = 0.0;

    for (int blk = 0; blk < 6; blk++) begin
      int  pix [8][8];
      int  coef [8][8];
      int  base;
      base = $urandom % 200;
      // smooth block plus noise, like a natural image patch
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++)
          pix[r][c] = (base + 5 * r + 3 * c + int'($urandom % 21)) % 256;
      // forward 2-D DCT in real arithmetic, rounded coefficients
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real s;
          s = 0.0;
          for (int r = 0; r < 8; r++)
            for (int c = 0; c < 8; c++)
              s += pix[r][c] * ((u == 0) ? $sqrt(0.125) : 0.5) * $cos((2 * r + 1) * u * pi / 16.0)
                             * ((v == 0) ? $sqrt(0.125) : 0.5) * $cos((2 * c + 1) * v * pi / 16.0);
          coef[u][v] = int'($floor(s + 0.5));
        end
      for (int p = 0; p <= NPC; p++) begin
        int tmp [8][8];
        int vin [8], vout [8];
        for (int u = 0; u < 8; u++) begin            // columns of coefficients -> rows of tmp
          for (int v = 0; v < 8; v++) vin[v] = coef[v][u] <<< 4;   // 4 guard bits
          idct8(p, vin, vout);
          for (int r = 0; r < 8; r++) tmp[r][u] = vout[r];
        end
        for (int r = 0; r < 8; r++) begin
          for (int u = 0; u < 8; u++) vin[u] = tmp[r][u];
          idct8(p, vin, vout);
          for (int c = 0; c < 8; c++) begin
            int y;
            y = (vout[c] + 8) >>> 4;
            y = (y < 0) ? 0 : (y > 255) ? 255 : y;
            se[p] += real'((y - pix[r][c]) * (y - pix[r][c]));
          end
        end
      end
      npix += 64;
    end

    for (int p = 0; p <= NPC; p++) begin
      real mse;
      mse = se[p] / npix;
      psnr[p] = (mse == 0.0) ? 200.0 : 10.0 * $log10(255.0 * 255.0 / mse);
      if (p < NPC) $display("32_8_%0d PSNR %0.2f dB", PCS[p], psnr[p]);
      else         $display("exact   PSNR %0.2f dB", psnr[p]);
    end
    for (int p = 1; p < NPC; p++) begin
      checks++;
      if (psnr[p] < psnr[p-1] - 0.5) begin
        failures++; $display("FAIL PSNR falls from pc=%0d to pc=%0d", PCS[p-1], PCS[p]);
      end
    end
    for (int p = 1; p < NPC; p++) begin
      checks++;
      if (psnr[p] < psnr[NPC] - 0.5) begin failures++; $display("FAIL pc=%0d far from exact", PCS[p]); end
    end
    checks++;
    if (psnr[0] > psnr[NPC] - 0.5) begin failures++; $display("FAIL pc=2 shows no approximation loss"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
