// exponent_update: final exponent Ec = esum + sel.
//
// When the mantissa product is in [2, 4) the normalizer shifts it right by
// one and sel = 1; the exponent then grows by one. As in the published
// optimized datapath, sel feeds the adder's carry input directly instead of
// choosing between esum and esum + 1 with a multiplexer. The result wraps
// modulo 256 (no overflow handling). Purely combinational.
module exponent_update
  import ssfpm_pkg::*;
(
  input  logic [NE-1:0] esum, // exponent from the arithmetic stage
  input  logic          sel,  // normalization flag
  output logic [NE-1:0] ec    // exponent of the product
);

  assign ec = esum + NE'(sel);

endmodule
