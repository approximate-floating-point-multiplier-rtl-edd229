// tb_exponent_update: exhaustive check of Ec = esum + sel (modulo 256).
module tb_exponent_update;
  logic [7:0] esum, ec;
  logic       sel;
  int checks = 0, failures = 0;

  exponent_update dut (.esum(esum), .sel(sel), .ec(ec));

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int s = 0; s < 2; s++) begin
        esum = 8'(i);
        sel  = 1'(s);
        #1;
        checks++;
        if (int'(ec) != ((i + s) & 255)) begin
          failures++;
          $display("FAIL esum=%0d sel=%0d got %0d", i, s, ec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
