// ssfpm_ref_pkg: reference model used by the testbenches.
//
// It recomputes the approximate multiplier from the defining equations,
// working on whole 48-bit quantities in units of 2^-46 instead of on the bit
// slices the RTL uses:
//   - each mantissa is reduced to its segment Ma_ssm and the shifts
//     LSHa = (NM - M) * alpha_a;
//   - the multiply-and-add is evaluated in the common scale of the addends,
//     2^(-NM + LSHa) for the larger shift, with the multiplier inputs floored
//     so that their product lands on that scale;
//   - the correction term E* is evaluated as 2^(2NM - 2m' - 2) * sum e*_k 2^k;
//   - normalization and rounding use P = P' + 1 directly.
package ssfpm_ref_pkg;

  localparam int NM = 23;

  function automatic longint unsigned pow2(input int e);
    return longint'(1) << e;
  endfunction

  // E* in units of 2^-46 (only the case where both segments are upper).
  function automatic longint unsigned ref_estar(input int unsigned ma, input int unsigned mb,
                                               input int m, input int ncorr);
    int ka, kb;
    longint unsigned s;
    ka = (m + 1) / 2;  // bits of Ma that reach the multiplier
    kb = m / 2;        // bits of Mb that reach the multiplier
    s = 0;
    for (int k = ka - 1; k >= 0 && k >= ka - ncorr; k--) begin
      int unsigned t1, t2, e4;
      t1 = ((ma >> (k + NM - ka)) & 1) & ((mb >> (NM - kb - 1)) & 1);
      t2 = (k < kb) ? ((mb >> (k + NM - kb)) & 1) & ((ma >> (NM - ka - 1)) & 1) : 0;
      e4 = 4 * (t1 | t2);                   // e*_k of the error analysis
      s += longint'(e4) << k;
    end
    return s * pow2(2*NM - ka - kb - 2);
  endfunction

  // Approximate P' = Ma*Mb + Ma + Mb in units of 2^-46 (48 bits).
  function automatic longint unsigned ref_pprime(input int unsigned ma, input int unsigned mb,
                                                input int m, input bit corr, input int ncorr);
    bit aa, ab;
    int lsha, lshb, scale, da, db;
    longint unsigned sa, sb, prod, adda, addb, sum;
    aa = (ma >= (1 << m));
    ab = (mb >= (1 << m));
    lsha = aa ? NM - m : 0;
    lshb = ab ? NM - m : 0;
    sa = longint'(ma) / pow2(lsha);      // segment, LSB weight 2^(lsha-NM)
    sb = longint'(mb) / pow2(lshb);
    scale = (lsha > lshb) ? lsha : lshb; // sum LSB weight 2^(scale-NM)
    // Addends brought to the common LSB weight (floored).
    adda = sa / pow2(scale - lsha);
    addb = sb / pow2(scale - lshb);
    // The product sa*sb has LSB weight 2^(lsha+lshb-2NM); to land on
    // 2^(scale-NM) a total of NM+scale-lsha-lshb bits are dropped, split
    // between the two inputs (a drops the larger half).
    if (aa && ab) begin
      da = m / 2;           // a keeps ceil(m/2) bits
      db = m - m / 2;
    end else begin
      da = (NM + 1) / 2;
      db = NM / 2;
    end
    prod = (sa / pow2(da)) * (sb / pow2(db));
    sum = prod + adda + addb;
    sum = sum * pow2(NM + scale);
    if (corr && aa && ab) sum += ref_estar(ma, mb, m, ncorr);
    return sum;
  endfunction

  // Full approximate product as a 32-bit word.
  function automatic logic [31:0] ref_mult(input logic [31:0] a, input logic [31:0] b,
                                           input int m, input bit corr, input int ncorr);
    longint unsigned pp, p, r;
    logic [7:0] e;
    logic [22:0] mc;
    pp = ref_pprime(a[22:0], b[22:0], m, corr, ncorr);
    p  = pp + pow2(46);                    // P = P' + 1
    e  = 8'(int'(a[30:23]) + int'(b[30:23]) - 127);
    if (p >= pow2(47)) begin
      e = e + 8'd1;
      r = (p >> 23) & 64'hFFFFFF;          // P[46:23]
    end else begin
      r = (p >> 22) & 64'hFFFFFF;          // P[45:22]
    end
    r  = (r + 1) & 64'hFFFFFF;             // add one unit at the round bit
    mc = 23'(r >> 1);
    return {a[31] ^ b[31], e, mc};
  endfunction

  // Double to single precision, round to nearest even (normal range only;
  // 0.0 maps to +0).
  function automatic logic [31:0] f2b(input real x);
    logic [63:0] d;
    logic [52:0] frac;
    logic [23:0] m;
    int e;
    if (x == 0.0) return 32'h0;
    d = $realtobits(x);
    e = int'(d[62:52]) - 1023 + 127;
    frac = {1'b1, d[51:0]};
    m = frac[52:29];
    if (d[28] && (d[27:0] != 0 || m[0])) m = m + 24'd1;
    if (m == 24'd0) begin      // rounding carried out of the significand
      e = e + 1;
    end
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Single precision to double, exactly (a zero exponent field reads as 0.0).
  function automatic real b2f(input logic [31:0] x);
    if (x[30:23] == 8'd0) return 0.0;
    return $bitstoreal({x[31], 11'(int'(x[30:23]) - 127 + 1023), x[22:0], 29'd0});
  endfunction

  // Value of a word's significand times 2^(exp - 127), ignoring the sign.
  function automatic real mag(input logic [31:0] x);
    real v;
    v = 1.0 + real'(x[22:0]) / 8388608.0;
    return v;
  endfunction

endpackage
