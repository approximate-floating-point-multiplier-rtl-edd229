// tb_ssmaa: checks the segmented multiply-and-add unit against the
// equation-level reference model for four configurations (M = 12 with
// correction, the default; M = 16 without; M = 15 with three correction
// columns; M = 18 with correction). Operands are drawn so that every
// combination of selection flags occurs; each is counted and must appear.
// It also checks that a small-operand product (flags 00) never sets the
// integer bits, and that results stay below 3.
module tb_ssmaa;
  import ssfpm_ref_pkg::*;
  logic [22:0] ma, mb;
  logic [25:0] p12, p16, p15, p18;
  logic        a12, b12, a16, b16, a15, b15, a18, b18;
  int checks = 0, failures = 0;
  int rows [4] = '{0, 0, 0, 0};

  ssmaa                                             dut12 (.ma(ma), .mb(mb), .pprime(p12), .alpha_a(a12), .alpha_b(b12));
  ssmaa #(.M(16), .CORRECTION(1'b0))                dut16 (.ma(ma), .mb(mb), .pprime(p16), .alpha_a(a16), .alpha_b(b16));
  ssmaa #(.M(15), .CORRECTION(1'b1), .NCORR(3))     dut15 (.ma(ma), .mb(mb), .pprime(p15), .alpha_a(a15), .alpha_b(b15));
  ssmaa #(.M(18), .CORRECTION(1'b1), .NCORR(2))     dut18 (.ma(ma), .mb(mb), .pprime(p18), .alpha_a(a18), .alpha_b(b18));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int m, input bit corr, input int nc,
                       input logic [25:0] got, input logic ga, input logic gb);
    longint unsigned want;
    bit wa, wb;
    want = ref_pprime(int'(ma), int'(mb), m, corr, nc);
    wa = int'(ma) >= (1 << m);
    wb = int'(mb) >= (1 << m);
    checks++;
    if (longint'(got) != (want >> 22) || (want & 64'h3FFFFF) != 0 || ga != wa || gb != wb) begin
      failures++;
      if (failures < 10)
        $display("FAIL m=%0d ma=%h mb=%h got %h (%b%b) want %h (%b%b)", m, ma, mb, got, ga, gb, want >> 22, wa, wb);
    end
    checks++;
    if (got[25:24] == 2'b11) failures++;   // P' < 3
  endtask

  function automatic logic [22:0] pick(input int small_m);
    if ($urandom_range(0, 1) == 0) return 23'($urandom) & 23'((1 << small_m) - 1);
    return 23'($urandom);
  endfunction

  initial begin
    for (int i = 0; i < 40000; i++) begin
      ma = pick(12 + (i % 7));
      mb = pick(12 + ((i / 7) % 7));
      if (i == 0) begin ma = '1; mb = '1; end   // largest P'
      if (i == 1) begin ma = '0; mb = '0; end
      #1;
      check(12, 1'b1, 2, p12, a12, b12);
      check(16, 1'b0, 2, p16, a16, b16);
      check(15, 1'b1, 3, p15, a15, b15);
      check(18, 1'b1, 2, p18, a18, b18);
      rows[{a12, b12}]++;
      if (!a12 && !b12) begin
        checks++;
        if (p12[25:24] != 2'b00) failures++;
      end
    end
    for (int r = 0; r < 4; r++) begin
      checks++;
      if (rows[r] == 0) begin
        failures++;
        $display("flag combination %0d never exercised", r);
      end
    end
    $display("flag combinations 00/01/10/11: %0d %0d %0d %0d", rows[0], rows[1], rows[2], rows[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
