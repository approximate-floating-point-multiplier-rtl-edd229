// tb_mantissa_normalizer: drives P'[47:22] with each legal pair of integer
// bits (00, 01, 10) and random fractions, and compares with the mantissa
// taken from P = P' + 1 directly: P[45:22] when P < 2, P[46:23] otherwise.
module tb_mantissa_normalizer;
  logic [25:0] pprime;
  logic        sel;
  logic [23:0] mnorm;
  int checks = 0, failures = 0;
  int seen_sel0 = 0, seen_sel1 = 0;

  mantissa_normalizer dut (.pprime(pprime), .sel(sel), .mnorm(mnorm));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 30000; i++) begin
      logic [26:0] p;        // P[48:22]
      logic [23:0] want;
      logic        want_sel;
      pprime = {2'($urandom_range(0, 2)), 24'($urandom)};
      if (i < 3) pprime = {2'(i), 24'hFFFFFF};
      #1;
      p = 27'(pprime) + 27'(1 << 24);   // add one at weight 2^0 (P'[46])
      want_sel = p[25];                  // P >= 2
      want = want_sel ? p[24:1] : p[23:0];
      checks++;
      if (sel !== want_sel || mnorm !== want) begin
        failures++;
        if (failures < 10) $display("FAIL p'=%h sel=%b mnorm=%h want %b %h", pprime, sel, mnorm, want_sel, want);
      end
      if (sel) seen_sel1++; else seen_sel0++;
    end
    checks++;
    if (seen_sel0 == 0 || seen_sel1 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
