// exponent_adder: biased exponent of the product, Ea + Eb - 127.
//
// Part of the arithmetic stage. The result is kept on NE = 8 bits as in the
// published datapath; the sum wraps modulo 256, since the design handles
// neither exponent overflow nor underflow (nor zero, infinity, NaN or
// denormal inputs), which is this design's reading of a datapath that shows
// no exception logic. Purely combinational.
module exponent_adder
  import ssfpm_pkg::*;
(
  input  logic [NE-1:0] ea,   // biased exponent of a
  input  logic [NE-1:0] eb,   // biased exponent of b
  output logic [NE-1:0] esum  // ea + eb - bias, modulo 2^NE
);

  assign esum = ea + eb - NE'(BIAS);

endmodule
