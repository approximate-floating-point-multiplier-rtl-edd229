// mantissa_rounder: rounds the 24-bit normalized mantissa to 23 bits.
//
// A 24-bit adder adds one unit in the last place (the round bit) and the
// upper 23 bits of the sum are the result mantissa Mc: round to nearest,
// ties away from zero. As in the published datapath the adder's carry-out is
// not used, so a mantissa of all ones that rounds up wraps to zero without
// incrementing the exponent; this design keeps that behaviour rather than
// adding logic the datapath does not show. Purely combinational.
module mantissa_rounder
  import ssfpm_pkg::*;
(
  input  logic [NM:0]   mnorm, // normalized mantissa, bit 0 is the round bit
  output logic [NM-1:0] mc     // rounded 23-bit mantissa
);

  logic [NM:0] sum;

  assign sum = mnorm + (NM+1)'(1);
  assign mc  = sum[NM:1];

endmodule
