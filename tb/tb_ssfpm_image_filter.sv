// tb_ssfpm_image_filter: image-filtering workload. A 48 x 48 8-bit test image
// is generated (smooth gradient, discs and a pseudo-random texture; pixel
// values are the integers 0..255 held as floats) and filtered twice, with
// every multiplication done by the approximate multiplier and every
// addition in double precision:
//
//   - smoothing with the 5 x 5 Gaussian kernel of standard deviation 2,
//     h(x,y) = exp(-(x^2+y^2)/8) normalized to sum 1;
//   - Sobel edge detection, Gx and Gy with the kernel [-1 -2 -1; 0 0 0;
//     1 2 1] and its transpose, then G = sqrt(Gx^2 + Gy^2) with both squares
//     from the multiplier.
//
// Outputs are rounded to integers in 0..255 and compared with the same
// computation using exact products; PSNR = 10 log10(255^2 / MSE) over the
// interior pixels. Three builds run side by side: SSFPM M = 12, cSSFPM
// M = 12 (the default) and cSSFPM M = 14. The checks are that every PSNR
// is at least 50 dB, that the correction and a larger M raise the Gaussian
// PSNR, and that edge detection is exact for M = 14, as published for
// m >= 14. The test image is not one of the published ones, so PSNR values
// are not compared number for number; they come out within a few dB of the
// published ones (55.5/71.9, 60.4/76.4 and 64.4/exact dB for the three
// builds).
module tb_ssfpm_image_filter;
  import ssfpm_pkg::*;
  import ssfpm_ref_pkg::*;

  localparam int W = 48;
  localparam int NCFG = 3;
  localparam int CM [NCFG] = '{12, 12, 14};
  localparam bit CC [NCFG] = '{1'b0, 1'b1, 1'b1};

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a, b;
  fp32_t c [NCFG];
  logic  ov [NCFG];
  logic  fa [NCFG];
  logic  fb [NCFG];

  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    ssfpm #(.M(CM[g]), .CORRECTION(CC[g])) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
      .out_valid(ov[g]), .c(c[g]), .alpha_a(fa[g]), .alpha_b(fb[g])
    );
  end

  always #5 clk = ~clk;

  initial begin
    #20_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real img [W][W];
  real prod_out [NCFG+1];   // last entry: exact product


  // One multiplication on every build, plus the exact product of the same
  // single-precision operands.
  task automatic fmul(input real x, input real y);
    logic [31:0] xb, yb;
    xb = f2b(x);
    yb = f2b(y);
    @(negedge clk);
    a = xb; b = yb; in_valid = 1'b1;
    @(posedge clk);
    #1;
    for (int k = 0; k < NCFG; k++) begin
      // Zero has no representation in this multiplier: a zero factor is
      // skipped, as an application would.
      prod_out[k] = (x == 0.0 || y == 0.0) ? 0.0 : b2f(c[k]);
      checks++;
      if (!ov[k]) failures++;
    end
    prod_out[NCFG] = b2f(xb) * b2f(yb);
  endtask

  function automatic real q8(input real x);
    real r;
    r = (x < 0.0) ? 0.0 : (x > 255.0) ? 255.0 : x;
    return real'(longint'(r + 0.5));
  endfunction

  initial begin
    real gk [5][5];
    real gsum;
    real mse_g [NCFG];
    real mse_e [NCFG];
    int  npix;
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // Test image.
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real v, d1, d2;
        v  = 40.0 + 3.0 * x + 1.5 * y;
        d1 = (x - 15) * (x - 15) + (y - 18) * (y - 18);
        d2 = (x - 33) * (x - 33) + (y - 30) * (y - 30);
        if (d1 < 80.0) v = 210.0;
        if (d2 < 60.0) v = v * 0.35;
        v = v + real'($urandom_range(0, 24)) - 12.0;
        img[y][x] = q8(v);
      end

    // Gaussian kernel, sigma = 2, normalized to 1.
    gsum = 0.0;
    for (int i = -2; i <= 2; i++)
      for (int j = -2; j <= 2; j++) begin
        gk[i+2][j+2] = $exp(-real'(i*i + j*j) / 8.0);
        gsum += gk[i+2][j+2];
      end
    for (int i = 0; i < 5; i++)
      for (int j = 0; j < 5; j++) gk[i][j] = gk[i][j] / gsum;

    for (int k = 0; k < NCFG; k++) begin mse_g[k] = 0.0; mse_e[k] = 0.0; end
    npix = 0;
    for (int y = 2; y < W - 2; y++) begin
      for (int x = 2; x < W - 2; x++) begin
        real acc [NCFG+1];
        real gx [NCFG+1];
        real gy [NCFG+1];
        real gxx [NCFG+1];
        real gyy [NCFG+1];
        for (int k = 0; k <= NCFG; k++) begin acc[k] = 0.0; gx[k] = 0.0; gy[k] = 0.0; end
        // Gaussian smoothing.
        for (int i = -2; i <= 2; i++)
          for (int j = -2; j <= 2; j++) begin
            fmul(img[y+i][x+j], gk[i+2][j+2]);
            for (int k = 0; k <= NCFG; k++) acc[k] += prod_out[k];
          end
        // Sobel: Gy uses the kernel as printed, Gx its transpose.
        for (int i = -1; i <= 1; i++)
          for (int j = -1; j <= 1; j++) begin
            real ky, kx;
            ky = real'(i) * ((j == 0) ? 2.0 : 1.0);
            kx = real'(j) * ((i == 0) ? 2.0 : 1.0);
            if (ky != 0.0) begin
              fmul(img[y+i][x+j], ky);
              for (int k = 0; k <= NCFG; k++) gy[k] += prod_out[k];
            end
            if (kx != 0.0) begin
              fmul(img[y+i][x+j], kx);
              for (int k = 0; k <= NCFG; k++) gx[k] += prod_out[k];
            end
          end
        // Squares: each build squares its own gradients.
        for (int k = 0; k <= NCFG; k++) begin gxx[k] = 0.0; gyy[k] = 0.0; end
        for (int k = 0; k < NCFG; k++) begin
          fmul(gx[k], gx[k]); gxx[k] = prod_out[k];
          fmul(gy[k], gy[k]); gyy[k] = prod_out[k];
        end
        gxx[NCFG] = gx[NCFG] * gx[NCFG];
        gyy[NCFG] = gy[NCFG] * gy[NCFG];
        for (int k = 0; k < NCFG; k++) begin
          real dg, de;
          dg = q8(acc[k]) - q8(acc[NCFG]);
          de = q8($sqrt(gxx[k] + gyy[k])) - q8($sqrt(gxx[NCFG] + gyy[NCFG]));
          mse_g[k] += dg * dg;
          mse_e[k] += de * de;
        end
        npix++;
      end
    end

    for (int k = 0; k < NCFG; k++) begin
      real pg, pe;
      mse_g[k] /= real'(npix);
      mse_e[k] /= real'(npix);
      pg = (mse_g[k] == 0.0) ? 999.0 : 10.0 * $log10(65025.0 / mse_g[k]);
      pe = (mse_e[k] == 0.0) ? 999.0 : 10.0 * $log10(65025.0 / mse_e[k]);
      $display("%s M=%0d: Gaussian PSNR %.1f dB, edge PSNR %.1f dB (999 = exact)",
               CC[k] ? "cSSFPM" : "SSFPM ", CM[k], pg, pe);
      checks += 2;
      if (pg < 50.0) failures++;
      if (pe < 50.0) failures++;
    end
    checks++;
    if (!(mse_g[1] < mse_g[0])) begin failures++; $display("FAIL correction does not improve smoothing"); end
    checks++;
    if (!(mse_g[2] < mse_g[1])) begin failures++; $display("FAIL M = 14 not better than M = 12"); end
    checks++;
    if (mse_e[2] != 0.0) begin failures++; $display("FAIL edge detection not exact for M = 14"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
