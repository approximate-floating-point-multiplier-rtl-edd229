// tb_exponent_adder: exhaustive check of Ea + Eb - 127 (modulo 256) over all
// 65536 exponent pairs.
module tb_exponent_adder;
  logic [7:0] ea, eb, esum;
  int checks = 0, failures = 0;

  exponent_adder dut (.ea(ea), .eb(eb), .esum(esum));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        int expect_v;
        ea = 8'(i);
        eb = 8'(j);
        #1;
        expect_v = (i + j - 127) & 255;
        checks++;
        if (int'(esum) != expect_v) begin
          failures++;
          if (failures < 10) $display("FAIL ea=%0d eb=%0d got %0d want %0d", i, j, esum, expect_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
