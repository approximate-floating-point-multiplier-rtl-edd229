// ssmaa_correction: error compensation term E* of the corrected segmented
// multiply-and-add unit (cSSMAA).
//
// When both mantissas take their upper segment, the multiplier only sees the
// KA = ceil(M/2) upper bits of Ma and the KB = floor(M/2) upper bits of Mb.
// The dominant part of the error is UPa*eps_b + UPb*eps_a, where eps is the
// pruned lower part of an operand. Each pruned part is estimated from its
// most significant bit as (2*msb + 1) * 2^(width-1), and after a further
// simplification every weight-2^k column of the error gets the bit
//
//   c_k = (ma[NM-KA+k] & mb[NM-KB-1]) | (mb[NM-KB+k] & ma[NM-KA-1])
//
// at bit k of the segmented sum P'_ssm (whose LSB then has weight 2^-M).
// Only the NCORR most significant columns (k = KA-1 down to KA-NCORR) are
// kept; the sum over all columns is never built. For odd M the top column
// k = KA-1 has only the Ma term, because UPb has one bit fewer. The term is
// applied only when both selection flags are high (en = 1), the case it was
// derived for.
//
// The output is KA bits wide so that it lines up with the low columns of the
// segmented sum; the columns below the kept ones are constant zero (four of
// the six bits at the default M = 12, NCORR = 2).
//
// Purely combinational. The formula and the two-column default follow the
// published correction. Which columns count as "the two terms", the odd-M
// column alignment and the gating with en are this design's choices (for
// M <= 14 the term is zero anyway outside the en case). With them, the mean
// relative error of the whole multiplier matches the published figures.
module ssmaa_correction
  import ssfpm_pkg::*;
#(
  parameter int unsigned M     = 12, // segment width
  parameter int unsigned NCORR = 2   // number of correction columns kept
) (
  input  logic [NM-1:0]        ma,   // full mantissa of a
  input  logic [NM-1:0]        mb,   // full mantissa of b
  input  logic                 en,   // alpha_a & alpha_b
  output logic [(M+1)/2-1:0]   ecorr // E* in units of the P'_ssm LSB
);

  localparam int unsigned KA = (M + 1) / 2;
  localparam int unsigned KB = M / 2;
  localparam int unsigned NC = (NCORR > KA) ? KA : NCORR;

  always_comb begin
    ecorr = '0;
    for (int unsigned i = 0; i < NC; i++) begin
      int unsigned k;
      logic        ub_bit;
      k = KA - 1 - i;
      // Column k of UPb exists only for k < KB (KB = KA - 1 when M is odd).
      ub_bit = (k < KB) ? mb[(NM-KB+k) % NM] : 1'b0; // modulo only keeps the unused index legal
      ecorr[k] = en & ((ma[NM-KA+k] & mb[NM-KB-1]) | (ub_bit & ma[NM-KA-1]));
    end
  end

endmodule
