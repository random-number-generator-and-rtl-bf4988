// madd_carry_corr: carry correction unit of the modulo 2^n-2^k-1 adder.
//
// The prefix tree delivers the carries ct of A+B+T. If A+B+T overflows n bits
// (c_out = 1) the result is (A+B+T) mod 2^n and ct are already the carries
// needed. Otherwise the result is A+B, and its carries are obtained from ct
// by two corrections instead of a second carry tree:
//   * for A1 (remove the '1' at bit 0), i = 0..k-1:
//       creal[i+1] = ct[i+1] & (c_out | ~X_(i:0))
//     where X_(i:0) is the group propagate of the plain a^b bits;
//   * for A2 (remove the '1' at bit k), with e = ~X_(k-1:0) & (p_k ^ ct[k]):
//       creal[k+1] = ct[k+1] & (c_out | e)
//       creal[i+1] = ct[i+1] & (c_out | ~P_(i:k+1) | e),  i = k+1..n-2
//     where P_(i:k+1) is the group propagate of the pre-processed p bits.
// p_k here is the pre-processed ~(a_k ^ b_k). When c_out = 0 the carries
// creal above bit k are those of the carry-save form p' + 2 g' of the upper
// bits, matching the pre-processed partial sums used by the sum unit.
//
// Purely combinational. creal[0] is unused and tied to 0. The equations are
// those of the adder's derivation; only the bit numbering of the port
// vectors is this design's own.
module madd_carry_corr #(
  parameter int unsigned N = rns_pkg::RNS_N,
  parameter int unsigned K = rns_pkg::RNS_K
) (
  input  logic [N:0]   ct,     // carries of A+B+T, ct[i] into bit i
  input  logic         cout,   // carry out of A+B+T
  input  logic [N-1:0] p,      // pre-processed propagates
  input  logic [N-1:0] x,      // plain propagates a ^ b
  output logic [N-1:0] creal   // corrected carries, creal[i] into bit i
);

  logic xgrp;                  // running X_(i:0)
  logic e;
  logic pgrp;                  // running P_(i:K+1)

  always_comb begin
    creal = '0;
    // first correction: sub-adder A1
    xgrp  = 1'b1;
    for (int i = 0; i < int'(K); i++) begin
      xgrp       = xgrp & x[i];
      creal[i+1] = ct[i+1] & (cout | ~xgrp);
    end
    // second correction: sub-adder A2 (xgrp is now X_(K-1:0))
    e           = ~xgrp & (p[K] ^ ct[K]);
    creal[K+1]  = ct[K+1] & (cout | e);
    pgrp        = 1'b1;
    for (int i = int'(K) + 1; i <= int'(N) - 2; i++) begin
      pgrp       = pgrp & p[i];
      creal[i+1] = ct[i+1] & (cout | ~pgrp | e);
    end
  end

endmodule
