// ssfpm_pkg: constants and types shared by the static-segmented
// floating-point multiplier (SSFPM).
//
// The multiplier works on IEEE 754 single precision words: a sign bit, an
// 8-bit exponent with bias 127 and a 23-bit mantissa (fraction) whose
// implicit leading one is not stored. The mantissa multiply-and-add result
// P' = Ma*Mb + Ma + Mb is 48 bits wide (two integer bits, 46 fraction bits);
// the normalization stage only looks at its upper 26 bits, so the NQ = 22
// least significant bits are never produced. All of these numbers are those
// of the single-precision format the design targets.
package ssfpm_pkg;

  localparam int unsigned NE   = 8;            // exponent bits
  localparam int unsigned NM   = 23;           // mantissa (fraction) bits
  localparam int unsigned BIAS = 127;          // exponent bias
  localparam int unsigned NQ   = 22;           // LSBs of P' dropped before normalization
  localparam int unsigned PW   = 2*NM + 2 - NQ; // width of the kept part of P' (26)

  // One single-precision word split into its fields.
  typedef struct packed {
    logic          sign;
    logic [NE-1:0] exp;
    logic [NM-1:0] man;
  } fp32_t;

  // Result of the arithmetic stage, held by the pipeline register.
  typedef struct packed {
    logic          sign;   // Sc = Sa ^ Sb
    logic [NE-1:0] exp;    // Ea + Eb - 127, before the update by sel
    logic [PW-1:0] pprime; // P'[47:22], approximate multiply-and-add result
  } arith_stage_t;

endpackage
