// ssmaa: static segmented multiply-and-add unit (SSMAA / cSSMAA).
//
// It approximates P' = Ma*Mb + Ma + Mb, the mantissa product (1+Ma)(1+Mb)
// minus its implicit one, with an M-bit segment of each 23-bit mantissa.
// A mantissa whose top NM-M bits (control segment) are all zero keeps its
// low segment ma[M-1:0] and loses nothing; otherwise the high segment
// ma[NM-1:NM-M] is used (selection flag alpha = 1). Depending on the two
// flags, the operands of one multiplier and one adder are truncated so that
// product and addends share the same LSB (segment-and-truncate):
//
//   flags  mult a                mult b                add a          add b
//   00     seg_a >> ceil(NM/2)   seg_b >> floor(NM/2)  seg_a          seg_b
//   01     seg_a >> ceil(NM/2)   seg_b >> floor(NM/2)  seg_a >>(NM-M) seg_b
//   10     seg_a >> ceil(NM/2)   seg_b >> floor(NM/2)  seg_a          seg_b >>(NM-M)
//   11     seg_a >> floor(M/2)   seg_b >> ceil(M/2)    seg_a          seg_b
//
// (flags are {alpha_a, alpha_b}). P'_ssm = mult_a*mult_b + add_a + add_b
// (+ E* when CORRECTION = 1) is an (M+2)-bit sum with one carry-propagate
// adder; a final shift by NM-NQ (flags 00) or 2*NM-M-NQ (otherwise) places it
// in P'[47:22], the only bits normalization needs.
//
// Purely combinational. The segmentation, the truncation table and the
// final shift follow the published scheme. For odd M the split of the row-11
// truncation (a keeps ceil(M/2) bits) follows the error-analysis equations;
// for the even default it does not matter.
module ssmaa
  import ssfpm_pkg::*;
#(
  parameter int unsigned M          = 12, // segment width, NM/2 < M < NM
  parameter bit          CORRECTION = 1'b1, // add the compensation term E*
  parameter int unsigned NCORR      = 2     // columns of E* kept
) (
  input  logic [NM-1:0] ma,       // mantissa of a, LSB weight 2^-23
  input  logic [NM-1:0] mb,       // mantissa of b
  output logic [PW-1:0] pprime,   // approximate P'[47:22]
  output logic          alpha_a,  // a used its upper segment
  output logic          alpha_b   // b used its upper segment
);

  localparam int unsigned CH = (NM + 1) / 2;     // ceil(NM/2)
  localparam int unsigned FH = NM / 2;           // floor(NM/2)
  localparam int unsigned KA = (M + 1) / 2;      // kept bits of a, row 11
  localparam int unsigned KB = M / 2;            // kept bits of b, row 11
  localparam int unsigned WA = (KA > M - CH) ? KA : M - CH; // multiplier width, a
  localparam int unsigned WB = (KB > M - FH) ? KB : M - FH; // multiplier width, b
  localparam int unsigned SW = M + 2;            // width of P'_ssm
  localparam int unsigned SH_LOW  = NM - NQ;         // final shift, flags 00
  localparam int unsigned SH_HIGH = 2*NM - M - NQ;   // final shift, otherwise

  logic [M-1:0]    seg_a, seg_b;
  logic [WA-1:0]   mul_a;
  logic [WB-1:0]   mul_b;
  logic [M-1:0]    add_a, add_b;
  logic [KA-1:0]   ecorr;
  logic [WA+WB-1:0] prod;
  logic [SW-1:0]   pssm;

  // Control segments: any set bit selects the upper segment.
  assign alpha_a = |ma[NM-1:M];
  assign alpha_b = |mb[NM-1:M];

  assign seg_a = alpha_a ? ma[NM-1:NM-M] : ma[M-1:0];
  assign seg_b = alpha_b ? mb[NM-1:NM-M] : mb[M-1:0];

  // Operand truncation of the segment-and-truncate table.
  always_comb begin
    if (alpha_a && alpha_b) begin
      mul_a = WA'(seg_a >> (M - KA));
      mul_b = WB'(seg_b >> (M - KB));
    end else begin
      mul_a = WA'(seg_a >> CH);
      mul_b = WB'(seg_b >> FH);
    end
    add_a = (!alpha_a && alpha_b) ? seg_a >> (NM - M) : seg_a;
    add_b = (alpha_a && !alpha_b) ? seg_b >> (NM - M) : seg_b;
  end

  generate
    if (CORRECTION) begin : g_corr
      ssmaa_correction #(.M(M), .NCORR(NCORR)) u_corr (
        .ma    (ma),
        .mb    (mb),
        .en    (alpha_a & alpha_b),
        .ecorr (ecorr)
      );
    end else begin : g_nocorr
      assign ecorr = '0;
    end
  endgenerate

  // Fused multiply-and-add: one partial-product matrix, one final adder.
  assign prod = mul_a * mul_b;
  assign pssm = SW'(prod) + SW'(add_a) + SW'(add_b) + SW'(ecorr);

  // Final shift to the weight of P'[22].
  assign pprime = (alpha_a || alpha_b) ? PW'(pssm) << SH_HIGH : PW'(pssm) << SH_LOW;

endmodule
