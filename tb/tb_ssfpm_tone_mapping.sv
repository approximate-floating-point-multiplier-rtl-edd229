// tb_ssfpm_tone_mapping: HDR tone-mapping workload (global operator). A
// 40 x 40 RGB test image with floating-point pixels spanning about five
// decades of luminance (horizontal exponential ramp, a bright disc, a dim
// corner, colour that varies across the frame) is mapped to 8 bits:
//   Ltmp = 0.27 R + 0.67 G + 0.06 B
//   Lm   = exp(mean(log(Ltmp)))            geometric mean
//   L    = (beta / Lm) * Ltmp,  beta = 0.5
//   Lmap = L / (1 + L)
//   Cout = 255 * Lmap * (C / Ltmp), quantized to 0..255, for C = R, G, B.
// The three luminance weights, the scaling by beta/Lm and the three channel
// weightings are products done by the approximate multiplier; logarithm,
// exponential, divisions and sums are exact. Writing the channel weighting
// as Lmap * (C / Ltmp) with the 255 scale folded into the exact division is
// a choice of this bench.
//
// Each build (SSFPM M = 12, cSSFPM M = 12, cSSFPM M = 14) runs its own copy
// of the data path in lockstep and is compared with the same computation
// using exact products, by PSNR over the three channels. Checks: PSNR >=
// 40 dB and the correction improves the mean squared error. The published
// averages over three HDR photographs are 46.2, 53.9 and 58.6 dB; the test
// image here is generated, so they are not compared number for number.
module tb_ssfpm_tone_mapping;
  import ssfpm_pkg::*;
  import ssfpm_ref_pkg::*;

  localparam int W = 40;
  localparam int NCFG = 3;
  localparam int NV = NCFG + 1;            // builds plus the exact path
  localparam int CM [NCFG] = '{12, 12, 14};
  localparam bit CC [NCFG] = '{1'b0, 1'b1, 1'b1};
  localparam real BETA = 0.5;

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
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real rgb [W][W][3];
  real lt [NV][W][W];
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

  initial begin
    real wgt [3];
    real lm [NV];
    real mse [NCFG];
    wgt = '{0.27, 0.67, 0.06};
    for (int k = 0; k < NCFG; k++) begin a[k] = '0; b[k] = '0; mse[k] = 0.0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real base;
        base = $pow(10.0, -1.5 + 3.5 * real'(x) / real'(W - 1));
        if ((x - 28) * (x - 28) + (y - 12) * (y - 12) < 30) base = base * 20.0;
        if (x < 8 && y > 30) base = base * 0.05;
        base = base * (0.8 + 0.4 * real'($urandom_range(0, 1000)) / 1000.0);
        rgb[y][x][0] = base * (0.5 + real'(y) / real'(W));
        rgb[y][x][1] = base;
        rgb[y][x][2] = base * (1.5 - real'(y) / real'(W));
      end

    // Luminance and its geometric mean, per path.
    for (int k = 0; k < NV; k++) lm[k] = 0.0;
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real acc [NV];
        for (int k = 0; k < NV; k++) acc[k] = 0.0;
        for (int ch = 0; ch < 3; ch++) begin
          for (int k = 0; k < NV; k++) begin
            x_in[k] = wgt[ch];
            y_in[k] = rgb[y][x][ch];
          end
          fmul();
          for (int k = 0; k < NV; k++) acc[k] += p_out[k];
        end
        for (int k = 0; k < NV; k++) begin
          lt[k][y][x] = acc[k];
          lm[k] += $ln(acc[k]);
        end
      end
    for (int k = 0; k < NV; k++) lm[k] = $exp(lm[k] / real'(W * W));

    // Scaling, compression and channel weighting.
    for (int y = 0; y < W; y++)
      for (int x = 0; x < W; x++) begin
        real lmap [NV];
        for (int k = 0; k < NV; k++) begin
          x_in[k] = BETA / lm[k];
          y_in[k] = lt[k][y][x];
        end
        fmul();
        for (int k = 0; k < NV; k++) lmap[k] = p_out[k] / (1.0 + p_out[k]);
        for (int ch = 0; ch < 3; ch++) begin
          for (int k = 0; k < NV; k++) begin
            x_in[k] = lmap[k];
            y_in[k] = 255.0 * rgb[y][x][ch] / lt[k][y][x];
          end
          fmul();
          for (int k = 0; k < NCFG; k++) begin
            real d;
            d = q8(p_out[k]) - q8(p_out[NCFG]);
            mse[k] += d * d;
          end
        end
      end

    for (int k = 0; k < NCFG; k++) begin
      real p;
      mse[k] /= real'(3 * W * W);
      p = (mse[k] == 0.0) ? 999.0 : 10.0 * $log10(65025.0 / mse[k]);
      $display("%s M=%0d: PSNR %.1f dB (999 = exact)", CC[k] ? "cSSFPM" : "SSFPM ", CM[k], p);
      checks++;
      if (p < 40.0) failures++;
    end
    checks++;
    if (!(mse[1] < mse[0])) begin failures++; $display("FAIL correction does not help"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
