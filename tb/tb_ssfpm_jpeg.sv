// tb_ssfpm_jpeg: JPEG-style compression workload. A 32 x 32 8-bit test image
// (generated: gradient, disc, texture) is cut into 8 x 8 blocks, level
// shifted by -128, transformed with the 2-D DCT (F = T B T', T the
// orthonormal DCT-II matrix), quantized with the baseline JPEG luminance
// table scaled for quality Q (scale 5000/Q below 50, 200 - 2Q above; Q = 100
// gives all ones), dequantized, inverse transformed (B' = T' F T), shifted
// back, rounded and clamped to 0..255. Every multiplication of the DCT and
// inverse DCT is done by the approximate multiplier; additions, the
// quantizer division and the dequantizer product are exact. Products with a
// zero factor are taken as zero (the multiplier has no zero).
//
// Each build (SSFPM M = 12, cSSFPM M = 12, cSSFPM M = 14) runs its own copy
// of the data path in lockstep, and its output image is compared with the
// same computation using exact products: PSNR = 10 log10(255^2 / MSE), for
// Q = 40, 70 and 100. Checks: PSNR >= 40 dB everywhere, and the correction
// improves the mean squared error at every Q. The published averages for
// the three builds are 45.6/46.9/49.7, 52.9/53.0/57.8 and
// 55.4/56.7/60.2 dB for Q = 40/70/100; the test image differs from
// the published ones, so they are not compared number for number.
module tb_ssfpm_jpeg;
  import ssfpm_pkg::*;
  import ssfpm_ref_pkg::*;

  localparam int W = 32;
  localparam int NCFG = 3;
  localparam int NV = NCFG + 1;            // builds plus the exact path
  localparam int CM [NCFG] = '{12, 12, 14};
  localparam bit CC [NCFG] = '{1'b0, 1'b1, 1'b1};
  localparam int QS [3] = '{40, 70, 100};
  // Baseline luminance quantization table, row-major.
  localparam int QBASE [64] = '{
    16, 11, 10, 16, 24, 40, 51, 61,
    12, 12, 14, 19, 26, 58, 60, 55,
    14, 13, 16, 24, 40, 57, 69, 56,
    14, 17, 22, 29, 51, 87, 80, 62,
    18, 22, 37, 56, 68,109,103, 77,
    24, 35, 55, 64, 81,104,113, 92,
    49, 64, 78, 87,103,121,120,101,
    72, 92, 95, 98,112,100,103, 99};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a [NCFG];
  fp32_t b [NCFG];
  fp32_t c [NCFG];
  logic  ov [NCFG];
  logic  fa [NCFG];
  logic  fb [NCFG];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    ssfpm #(.M(CM[g]), .CORRECTION(CC[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a[g]), .b(b[g]),
      .out_valid(ov[g]), .c(c[g]), .alpha_a(fa[g]), .alpha_b(fb[g])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real img [W][W];
  real tm [8][8];
  real x_in [NV];
  real y_in [NV];
  real p_out [NV];

  // One multiplication per path: build k multiplies x_in[k] by y_in[k]; the
  // last path multiplies exactly (after rounding its operands to single).
  task automatic fmul();
    @(negedge clk);
    for (int k = 0; k < NCFG; k++) begin
      a[k] = f2b(x_in[k]);
      b[k] = f2b(y_in[k]);
    end
    in_valid = 1'b1;
    @(posedge clk);
    #1;
    for (int k = 0; k < NCFG; k++) begin
      p_out[k] = (x_in[k] == 0.0 || y_in[k] == 0.0) ? 0.0 : b2f(c[k]);
      checks++;
      if (!ov[k]) failures++;
    end
    p_out[NCFG] = b2f(f2b(x_in[NCFG])) * b2f(f2b(y_in[NCFG]));
  endtask

  function automatic real q8(input real x);
    real r;
    r = (x < 0.0) ? 0.0 : (x > 255.0) ? 255.0 : x;
    return real'(longint'(r + 0.5));
  endfunction

  function automatic real rnd(input real x);
    return (x < 0.0) ? -real'(longint'(-x + 0.5)) : real'(longint'(x + 0.5));
  endfunction

  // Per-path 8 x 8 working blocks.
  real blk [NV][8][8];
  real tmp [NV][8][8];

  // tmp = Tleft * blk, where Tleft = T (tl = 0) or T' (tl = 1).
  task automatic left_mul(input bit tl);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real acc [NV];
        for (int k = 0; k < NV; k++) acc[k] = 0.0;
        for (int i = 0; i < 8; i++) begin
          for (int k = 0; k < NV; k++) begin
            x_in[k] = tl ? tm[i][u] : tm[u][i];
            y_in[k] = blk[k][i][v];
          end
          fmul();
          for (int k = 0; k < NV; k++) acc[k] += p_out[k];
        end
        for (int k = 0; k < NV; k++) tmp[k][u][v] = acc[k];
      end
  endtask

  // blk = tmp * Tright, where Tright = T' (tr = 0) or T (tr = 1).
  task automatic right_mul(input bit tr);
    for (int u = 0; u < 8; u++)
      for (int v = 0; v < 8; v++) begin
        real acc [NV];
        for (int k = 0; k < NV; k++) acc[k] = 0.0;
        for (int i = 0; i < 8; i++) begin
          for (int k = 0; k < NV; k++) begin
            x_in[k] = tmp[k][u][i];
            y_in[k] = tr ? tm[i][v] : tm[v][i];
          end
          fmul();
          for (int k = 0; k < NV; k++) acc[k] += p_out[k];
        end
        for (int k = 0; k < NV; k++) blk[k][u][v] = acc[k];
      end
  endtask

  initial begin
    real mse [3][NCFG];
    for (int k = 0; k < NCFG; k++) begin a[k] = '0; b[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real v;
        v = 30.0 + 5.0 * x + 2.0 * y;
        if ((x - 12) * (x - 12) + (y - 20) * (y - 20) < 50) v = 230.0;
        v = v + real'($urandom_range(0, 30)) - 15.0;
        img[y][x] = q8(v);
      end
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++)
        tm[u][x] = ((u == 0) ? $sqrt(1.0 / 8.0) : $sqrt(2.0 / 8.0))
                   * $cos(real'((2 * x + 1) * u) * 3.14159265358979323846 / 16.0);

    for (int qi = 0; qi < 3; qi++) begin
      int s;
      real qt [8][8];
      s = (QS[qi] < 50) ? 5000 / QS[qi] : 200 - 2 * QS[qi];
      for (int i = 0; i < 64; i++) begin
        int q;
        q = (QBASE[i] * s + 50) / 100;
        qt[i / 8][i % 8] = (q < 1) ? 1.0 : real'(q);
      end
      for (int k = 0; k < NCFG; k++) mse[qi][k] = 0.0;
      for (int by = 0; by < W; by += 8)
        for (int bx = 0; bx < W; bx += 8) begin
          for (int k = 0; k < NV; k++)
            for (int i = 0; i < 8; i++)
              for (int j = 0; j < 8; j++) blk[k][i][j] = img[by+i][bx+j] - 128.0;
          left_mul(1'b0);     // T * B
          right_mul(1'b0);    // (T B) * T'
          for (int k = 0; k < NV; k++)
            for (int i = 0; i < 8; i++)
              for (int j = 0; j < 8; j++)
                blk[k][i][j] = rnd(blk[k][i][j] / qt[i][j]) * qt[i][j];
          left_mul(1'b1);     // T' * F
          right_mul(1'b1);    // (T' F) * T
          for (int k = 0; k < NCFG; k++)
            for (int i = 0; i < 8; i++)
              for (int j = 0; j < 8; j++) begin
                real d;
                d = q8(blk[k][i][j] + 128.0) - q8(blk[NCFG][i][j] + 128.0);
                mse[qi][k] += d * d;
              end
        end
      for (int k = 0; k < NCFG; k++) begin
        real p;
        mse[qi][k] /= real'(W * W);
        p = (mse[qi][k] == 0.0) ? 999.0 : 10.0 * $log10(65025.0 / mse[qi][k]);
        $display("Q=%0d %s M=%0d: PSNR %.1f dB (999 = exact)", QS[qi], CC[k] ? "cSSFPM" : "SSFPM ", CM[k], p);
        checks++;
        if (p < 40.0) failures++;
      end
      checks++;
      if (!(mse[qi][1] < mse[qi][0])) begin failures++; $display("FAIL correction does not help at Q=%0d", QS[qi]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
