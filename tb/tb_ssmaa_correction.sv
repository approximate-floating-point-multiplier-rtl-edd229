// tb_ssmaa_correction: compares the correction term with the reference
// E* = 2^(2NM-2m'-2) * sum e*_k 2^k (brought to the unit of the segmented
// sum) for random mantissas, for M = 12 with 2 columns and for an odd M = 15
// with 3 columns (whose top column carries only the Ma term), and checks that
// the term is zero when disabled.
module tb_ssmaa_correction;
  import ssfpm_ref_pkg::*;
  logic [22:0] ma, mb;
  logic        en;
  logic [5:0]  e12;
  logic [7:0]  e15;
  int checks = 0, failures = 0, nonzero = 0;

  ssmaa_correction #(.M(12), .NCORR(2)) dut12 (.ma(ma), .mb(mb), .en(en), .ecorr(e12));
  ssmaa_correction #(.M(15), .NCORR(3)) dut15 (.ma(ma), .mb(mb), .en(en), .ecorr(e15));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input longint unsigned got);
    longint unsigned want;
    want = en ? ref_estar(ma, mb, m, (m == 12) ? 2 : 3) / pow2(2*NM - m) : 0;
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL m=%0d ma=%h mb=%h en=%b got %0d want %0d", m, ma, mb, en, got, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      ma = 23'($urandom);
      mb = 23'($urandom);
      en = (i % 5) != 0;
      #1;
      check(12, longint'(e12));
      check(15, longint'(e15));
      if (e12 != 0) nonzero++;
    end
    checks++;
    if (nonzero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
