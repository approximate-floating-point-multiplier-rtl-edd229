// tb_ssfpm: end-to-end test of the approximate multiplier at its default
// parameters (M = 12, correction on, two correction columns).
//
// Random operand pairs are streamed with random idle cycles. Every result is
// compared bit for bit with the equation-level reference model, must appear
// exactly one clock after its operands (latency 1, one result per cycle),
// and must lie within a relative error of 2^(1-M/2) + 2^(2-M) of the exact
// real product: the multiplier sees about M/2 bits of each operand, the adder
// M bits. A few directed products that the segmentation represents exactly
// are also checked, among them -13.140625 * 1.0 and 1.5 * 1.5.
//
// Mechanisms counted (each must occur): the four combinations of selection
// flags, normalization (P >= 2) and its absence, a non-zero correction term,
// idle cycles, and the valid bit cleared by reset.
module tb_ssfpm;
  import ssfpm_pkg::*;
  import ssfpm_ref_pkg::*;

  localparam int M_TB = 12;   // the design's default segment width
  localparam int NSAMPLES = 200000;

  logic  clk = 1'b0;
  logic  rst_n = 1'b0;
  logic  in_valid = 1'b0;
  fp32_t a, b, c;
  logic  out_valid, alpha_a, alpha_b;

  int checks = 0, failures = 0;
  int n_rows [4] = '{0, 0, 0, 0};
  int n_norm = 0, n_nonorm = 0, n_corr = 0, n_idle = 0, n_reset = 0;
  real max_rel = 0.0;

  ssfpm dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .b(b),
    .out_valid(out_valid), .c(c), .alpha_a(alpha_a), .alpha_b(alpha_b)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NSAMPLES * 3) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operands of the previous cycle, to be compared after the next edge.
  logic        exp_valid = 1'b0;
  logic [31:0] exp_a, exp_b;

  function automatic logic [31:0] rnd_operand();
    logic [31:0] x;
    x = $urandom;
    x[30:23] = 8'($urandom_range(64, 190));   // keep the product in range
    if ($urandom_range(0, 3) == 0) x[22:0] = x[22:0] & 23'((1 << M_TB) - 1);
    return x;
  endfunction

  task automatic check_result(input logic [31:0] xa, input logic [31:0] xb, input logic [31:0] got);
    logic [31:0] want;
    real exact, approx, rel;
    int sh;
    want = ref_mult(xa, xb, M_TB, 1'b1, 2);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h got %h want %h", xa, xb, got, want);
    end
    // Accuracy against the exact product of the significands.
    exact = mag(xa) * mag(xb);
    sh = int'(got[30:23]) - (int'(xa[30:23]) + int'(xb[30:23]) - 127);
    approx = mag(got) * ((sh == 1) ? 2.0 : 1.0);
    rel = (exact > approx) ? (exact - approx) / exact : (approx - exact) / exact;
    if (rel > max_rel) max_rel = rel;
    checks++;
    if (rel > 2.0 / real'(1 << (M_TB / 2)) + 4.0 / real'(1 << M_TB) || got[31] != (xa[31] ^ xb[31])) begin
      failures++;
      if (failures < 10) $display("FAIL accuracy a=%h b=%h rel=%g", xa, xb, rel);
    end
    if (sh == 1) n_norm++; else n_nonorm++;
    if (int'(xa[22:0]) >= (1 << M_TB) && int'(xb[22:0]) >= (1 << M_TB)
        && ref_estar(xa[22:0], xb[22:0], M_TB, 2) != 0) n_corr++;
  endtask

  task automatic directed(input logic [31:0] xa, input logic [31:0] xb, input logic [31:0] want);
    @(negedge clk);
    a = xa; b = xb; in_valid = 1'b1;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (!out_valid || c !== want) begin
      failures++;
      $display("FAIL directed %h * %h = %h, want %h", xa, xb, c, want);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++; else n_reset++;
    rst_n = 1'b1;

    directed(32'hC152_4000, 32'h3F80_0000, 32'hC152_4000); // -13.140625 * 1
    directed(32'h3FC0_0000, 32'h3FC0_0000, 32'h4010_0000); // 1.5 * 1.5 = 2.25
    directed(32'h4000_0000, 32'hC040_0000, 32'hC0C0_0000); // 2 * -3 = -6
    directed(32'h3F80_0001, 32'h3F80_0003, 32'h3F80_0004); // small mantissas, exact sum

    for (int i = 0; i < NSAMPLES; i++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 7) != 0);
      a = rnd_operand();
      b = rnd_operand();
      if (!in_valid) n_idle++;
      @(posedge clk);
      #1;
      // Result of the previous cycle's operands must be on c now.
      if (in_valid) begin
        checks++;
        if (!out_valid) begin
          failures++;
          if (failures < 10) $display("FAIL latency: no result one cycle after input");
        end
        check_result(a, b, c);
        n_rows[{alpha_a, alpha_b}]++;
      end else begin
        checks++;
        if (out_valid) failures++;
      end
    end

    for (int r = 0; r < 4; r++) begin
      checks++;
      if (n_rows[r] == 0) begin failures++; $display("flags %0d never seen", r); end
    end
    checks++; if (n_norm == 0)   begin failures++; $display("no normalization seen"); end
    checks++; if (n_nonorm == 0) begin failures++; $display("no unnormalized product seen"); end
    checks++; if (n_corr == 0)   begin failures++; $display("correction never non-zero"); end
    checks++; if (n_idle == 0)   begin failures++; $display("no idle cycle"); end
    checks++; if (n_reset == 0)  begin failures++; $display("reset not observed"); end
    $display("flags 00/01/10/11: %0d %0d %0d %0d, normalized %0d, not %0d, corrected %0d, idle %0d",
             n_rows[0], n_rows[1], n_rows[2], n_rows[3], n_norm, n_nonorm, n_corr, n_idle);
    $display("largest relative error %g", max_rel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
