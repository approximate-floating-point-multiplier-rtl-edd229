// tb_ssfpm_error_metrics: accuracy workload. Twenty multipliers, M = 12 to
// 21, each without (SSFPM) and with (cSSFPM) the correction term, are fed
// the same stream of random single-precision operands (uniform random
// mantissas, exponents drawn so the product stays in range). For each the
// mean relative error distance MRED = mean(|C - C'| / |C|) is measured
// against the exact product. Where a published value exists it must be met
// within 3 % (8 % for the M = 21 end point of the sweep, the one odd M with a
// published number; the odd-M correction columns are this design's reading):
//
//   M      12        14        16        18        21
//   SSFPM  3.41e-3   1.68e-3   8.28e-4   4.05e-4   -
//   cSSFPM 1.45e-3   7.08e-4   3.48e-4   1.73e-4   7.96e-5
//
// and over the whole sweep MRED must fall as M grows and the corrected
// variant must beat the uncorrected one at every M. The maximum relative
// error is printed as well. Every 64th result is also compared bit for bit
// with the reference model.
module tb_ssfpm_error_metrics;
  import ssfpm_pkg::*;
  import ssfpm_ref_pkg::*;

  localparam int NCFG = 20;
  localparam int NSAMPLES = 400000;
  // Configuration k: M = 12 + k/2, correction on for odd k. 0.0 = no published value.
  localparam real PAPER_MRED [NCFG] = '{3.41e-3, 1.45e-3, 0.0, 0.0, 1.68e-3, 7.08e-4,
                                        0.0, 0.0, 8.28e-4, 3.48e-4, 0.0, 0.0,
                                        4.05e-4, 1.73e-4, 0.0, 0.0, 0.0, 0.0,
                                        0.0, 7.96e-5};
  function automatic int cfg_m(input int k);
    return 12 + k / 2;
  endfunction
  function automatic bit cfg_c(input int k);
    return 1'(k % 2);
  endfunction

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a, b;
  fp32_t c [NCFG];
  logic  ov [NCFG];
  logic  fa [NCFG];
  logic  fb [NCFG];

  int  checks = 0, failures = 0;
  real sum_rel [NCFG];
  real max_rel [NCFG];

  for (genvar g = 0; g < NCFG; g++) begin : g_dut
    ssfpm #(.M(cfg_m(g)), .CORRECTION(cfg_c(g)), .NCORR(2)) dut (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
      .out_valid(ov[g]), .c(c[g]), .alpha_a(fa[g]), .alpha_b(fb[g])
    );
  end

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMPLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NCFG; k++) begin sum_rel[k] = 0.0; max_rel[k] = 0.0; end
    a = '0; b = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NSAMPLES; i++) begin
      @(negedge clk);
      in_valid = 1'b1;
      a = fp32_t'($urandom);
      b = fp32_t'($urandom);
      a.exp = 8'($urandom_range(64, 190));
      b.exp = 8'($urandom_range(64, 190));
      @(posedge clk);
      #1;
      for (int k = 0; k < NCFG; k++) begin
        real exact, approx, rel;
        int sh;
        exact = mag(a) * mag(b);
        sh = int'(c[k].exp) - (int'(a.exp) + int'(b.exp) - 127);
        approx = mag(c[k]) * ((sh == 1) ? 2.0 : 1.0);
        rel = (exact > approx) ? (exact - approx) / exact : (approx - exact) / exact;
        sum_rel[k] += rel;
        if (rel > max_rel[k]) max_rel[k] = rel;
        if ((i % 64) == 0) begin   // spot-check against the reference model
          checks++;
          if (!ov[k] || c[k] !== ref_mult(a, b, cfg_m(k), cfg_c(k), 2)) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d a=%h b=%h c=%h", k, a, b, c[k]);
          end
        end
      end
    end
    for (int k = 0; k < NCFG; k++) begin
      real mred, dev, tol;
      mred = sum_rel[k] / real'(NSAMPLES);
      if (PAPER_MRED[k] > 0.0) begin
        dev = (mred - PAPER_MRED[k]) / PAPER_MRED[k];
        $display("%s M=%0d: MRED %e (published %e, %.1f %%), max relative error %e",
                 cfg_c(k) ? "cSSFPM" : "SSFPM ", cfg_m(k), mred, PAPER_MRED[k], 100.0 * dev, max_rel[k]);
        checks++;
        tol = (cfg_m(k) == 21) ? 0.08 : 0.03;
        if (dev > tol || dev < -tol) failures++;
      end else begin
        $display("%s M=%0d: MRED %e, max relative error %e",
                 cfg_c(k) ? "cSSFPM" : "SSFPM ", cfg_m(k), mred, max_rel[k]);
      end
      // Corrected beats uncorrected at the same M; MRED falls with M.
      if (cfg_c(k)) begin
        checks++;
        if (sum_rel[k] >= sum_rel[k-1]) begin failures++; $display("FAIL correction does not help at M=%0d", cfg_m(k)); end
      end
      if (k >= 2) begin
        checks++;
        if (sum_rel[k] >= sum_rel[k-2]) begin failures++; $display("FAIL MRED does not fall at M=%0d", cfg_m(k)); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
