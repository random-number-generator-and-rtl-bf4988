// madd_sum: sum computation unit of the modulo 2^n-2^k-1 adder.
//
// Forms the result bits from the corrected carries creal, the pre-processed
// partial sums p and the overflow flag c_out of A+B+T. At bits 0 and k the
// partial sum of A+B+T (p_i) and that of A+B (~p_i) differ because of the
// folded constant T, so c_out selects between them:
//   s_0 = c_out ^ ~p_0
//   s_k = creal_k ^ c_out ^ ~p_k
//   s_i = creal_i ^ p_i            for all other i.
// The c_out ^ ~p_k term is ready at the same time as creal, so this adds no
// delay over an ordinary prefix adder's XOR stage. Purely combinational.
module madd_sum #(
  parameter int unsigned N = rns_pkg::RNS_N,
  parameter int unsigned K = rns_pkg::RNS_K
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] creal,
  input  logic         cout,
  output logic [N-1:0] s
);

  always_comb begin
    for (int i = 0; i < int'(N); i++) s[i] = creal[i] ^ p[i];
    s[0] = cout ^ ~p[0];
    s[K] = creal[K] ^ cout ^ ~p[K];
  end

endmodule
