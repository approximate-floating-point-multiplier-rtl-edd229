// mantissa_normalizer: picks the 24 mantissa bits to be rounded from P'.
//
// P' = P - 1 lies in [0, 3), so its two integer bits are 00, 01 or 10 and the
// true product P = P' + 1 needs normalization exactly when one of them is
// set: sel = p'[47] | p'[46]. The fraction bits of P and P' are equal, and the
// only integer bit of P that survives a one-place right shift is
// p[46] = ~p'[46]. So the output is
//
//   sel = 0:  p'[45:22]                  (P in [1, 2))
//   sel = 1:  {~p'[46], p'[45:23]}        (P in [2, 4), shifted right by 1)
//
// The input is P'[47:22], the only part of P' the design produces.
// Purely combinational; this is the published normalizer as drawn.
module mantissa_normalizer
  import ssfpm_pkg::*;
(
  input  logic [PW-1:0] pprime, // P'[47:22]
  output logic          sel,    // 1 when P >= 2
  output logic [NM:0]   mnorm   // 24 bits to be rounded, LSB is the round bit
);

  // pprime index i holds P'[i + NQ].
  assign sel   = pprime[PW-1] | pprime[PW-2];
  assign mnorm = sel ? {~pprime[PW-2], pprime[PW-3:1]} : pprime[PW-3:0];

endmodule
