// madd_preproc: pre-processing unit of the modulo 2^n-2^k-1 adder.
//
// The adder computes A+B+T (T = 2^k + 1) with a single prefix tree and later
// corrects the carries back to those of A+B when no overflow occurs. This
// unit folds the constant T into the bitwise generate/propagate pairs so
// that the prefix tree sees an ordinary two-operand addition with no carry in.
//
//  * Lower k bits (sub-adder A1) add the '1' of T at bit 0 as a carry in,
//    absorbed into bit 0:  (g0, p0) = (a0 | b0, ~(a0 ^ b0));
//    bits 1..k-1:          (gi, pi) = (ai & bi, ai ^ bi).
//  * Upper n-k bits (sub-adder A2) add the '1' of T at bit k through a simple
//    carry-save adder (SCSA): first (g'i, p'i) = (ai & bi, ai ^ bi), then
//    bit k:      (gk, pk) = (p'k, ~p'k)           (p'k plus the constant 1)
//    bits > k:   (gi, pi) = (p'i & g'(i-1), p'i ^ g'(i-1))
//    and the SCSA carry out c_scsa = g'(n-1) = a(n-1) & b(n-1).
//
// With these, sum_i p_i 2^i + sum_i g_i 2^(i+1) + c_scsa 2^n = A + B + T.
// The plain propagates x = a ^ b are also output: the carry correction needs
// the group propagate of the lower k bits of A+B without the folded carry in.
//
// Purely combinational. The equations follow the adder's description; the
// bit-k pair (p'k, ~p'k) and the meaning of p0 are those of the adder's
// gate-level schematic and its simulation trace.
module madd_preproc #(
  parameter int unsigned N = rns_pkg::RNS_N,
  parameter int unsigned K = rns_pkg::RNS_K
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p,
  output logic [N-1:0] x,
  output logic         c_scsa
);

  initial begin
    assert (K >= 1 && K <= N - 2) else $error("madd_preproc: need 1 <= K <= N-2");
  end

  logic [N-1:0] gp1, pp1;   // first SCSA stage (g'_i, p'_i)

  always_comb begin
    gp1 = a & b;
    pp1 = a ^ b;
    x   = pp1;
    // A1: lower K bits, carry in of 1 absorbed in bit 0
    g[0] = a[0] | b[0];
    p[0] = ~pp1[0];
    for (int i = 1; i < int'(K); i++) begin
      g[i] = gp1[i];
      p[i] = pp1[i];
    end
    // A2: upper N-K bits, second SCSA stage adds the constant 1 at bit K
    g[K] = pp1[K];
    p[K] = ~pp1[K];
    for (int i = int'(K) + 1; i < int'(N); i++) begin
      g[i] = pp1[i] & gp1[i-1];
      p[i] = pp1[i] ^ gp1[i-1];
    end
    c_scsa = gp1[N-1];
  end

endmodule
