// tb_mantissa_rounder: random and corner inputs; the expected mantissa is the
// 24-bit value divided by two, rounded half up, kept on 23 bits.
module tb_mantissa_rounder;
  logic [23:0] mnorm;
  logic [22:0] mc;
  int checks = 0, failures = 0;

  mantissa_rounder dut (.mnorm(mnorm), .mc(mc));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 40000; i++) begin
      int unsigned v, want;
      v = $urandom & 32'hFFFFFF;
      case (i)
        0: v = 0;
        1: v = 1;
        2: v = 24'hFFFFFE;
        3: v = 24'hFFFFFF;
        4: v = 24'h7FFFFF;
        default: ;
      endcase
      mnorm = 24'(v);
      #1;
      want = ((v + 1) / 2) % (1 << 23);
      checks++;
      if (int'(mc) != int'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL mnorm=%h mc=%h want %h", mnorm, mc, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
