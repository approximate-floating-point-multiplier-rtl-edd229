// ssfpm: approximate single-precision floating-point multiplier based on
// static segmentation of the mantissa product.
//
// c = a * b is computed in two parts separated by one pipeline register:
//
//   arithmetic stage    Sc = Sa ^ Sb; esum = Ea + Eb - 127 (exponent_adder);
//                       P'[47:22] ~ Ma*Mb + Ma + Mb from the segmented
//                       multiply-and-add unit (ssmaa), which uses only an
//                       M-bit segment of each mantissa.
//   normalization       sel = P'[47] | P'[46]; the mantissa normalizer picks
//                       24 bits, the rounder reduces them to Mc, and the
//                       exponent update adds sel to esum.
//
// Computing P' = P - 1 rather than P = (1+Ma)(1+Mb) removes the implicit
// ones from the multiplier, which is what makes segmentation possible. The
// accuracy is set at design time by M alone (the paper's evaluated range is
// 12..18); CORRECTION adds the error compensation term (the "cSSFPM").
//
// Interface and timing: a, b and in_valid are sampled on the rising clock
// edge; c and out_valid are valid after that edge (latency 1 cycle, one
// result per cycle). The normalization logic is combinational after the
// register, as in the published single-pipeline-level arrangement. The
// valid bit and the asynchronous active-low reset, which clears only the
// valid bit, are this design's own additions. Zeros, infinities, NaNs and
// denormals are not treated specially and the exponent wraps modulo 256,
// as the published datapath has no logic for them.
module ssfpm
  import ssfpm_pkg::*;
#(
  parameter int unsigned M          = 12,   // segment width, 12 <= M <= 22
  parameter bit          CORRECTION = 1'b1, // 1: cSSFPM, 0: SSFPM
  parameter int unsigned NCORR      = 2     // columns of the correction term
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  fp32_t   a,
  input  fp32_t   b,
  output logic    out_valid,
  output fp32_t   c,
  output logic    alpha_a,   // a used its upper segment (registered)
  output logic    alpha_b    // b used its upper segment (registered)
);

  arith_stage_t stage_d, stage_q;
  logic         alpha_a_d, alpha_b_d;
  logic         sel;
  logic [NM:0]  mnorm;

  // ---------------- arithmetic stage ----------------
  assign stage_d.sign = a.sign ^ b.sign;

  exponent_adder u_exp_add (
    .ea   (a.exp),
    .eb   (b.exp),
    .esum (stage_d.exp)
  );

  ssmaa #(.M(M), .CORRECTION(CORRECTION), .NCORR(NCORR)) u_ssmaa (
    .ma      (a.man),
    .mb      (b.man),
    .pprime  (stage_d.pprime),
    .alpha_a (alpha_a_d),
    .alpha_b (alpha_b_d)
  );

  // ---------------- pipeline register ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    stage_q <= stage_d;
    alpha_a <= alpha_a_d;
    alpha_b <= alpha_b_d;
  end

  // ---------------- normalization logic ----------------
  mantissa_normalizer u_norm (
    .pprime (stage_q.pprime),
    .sel    (sel),
    .mnorm  (mnorm)
  );

  mantissa_rounder u_round (
    .mnorm (mnorm),
    .mc    (c.man)
  );

  exponent_update u_exp_upd (
    .esum (stage_q.exp),
    .sel  (sel),
    .ec   (c.exp)
  );

  assign c.sign = stage_q.sign;

endmodule
