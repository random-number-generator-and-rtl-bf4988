// mod_adder: modulo m = 2^n - 2^k - 1 adder, s = (a + b) mod m.
//
// Instead of computing A+B and A+B+T (T = 2^k + 1) with two carry networks
// and selecting one, the adder computes only the carries of A+B+T and, when
// A+B+T does not overflow n bits (A+B < m), corrects them into the carries of
// A+B. Four units in a row:
//   madd_preproc    - generate/propagate with T folded in (two sub-adders:
//                     A1 for the low k bits, A2 with a carry-save stage for
//                     the high n-k bits)
//   madd_carry_gen  - parallel-prefix carries of A+B+T and its carry out
//   madd_carry_corr - two carry corrections, enabled when c_out = 0
//   madd_sum        - final XOR stage
//
// Interface: a and b are residues in [0, m-1]; s is their sum modulo m.
// Operands >= m are outside the adder's range and give an unspecified s.
// Purely combinational (zero latency). Defaults n = 8, k = 4 (m = 239).
module mod_adder #(
  parameter int unsigned N = rns_pkg::RNS_N,
  parameter int unsigned K = rns_pkg::RNS_K
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  logic [N-1:0] g, p, x, creal;
  logic [N:0]   ct;
  logic         c_scsa, cout;

  madd_preproc #(.N(N), .K(K)) u_pre (
    .a(a), .b(b), .g(g), .p(p), .x(x), .c_scsa(c_scsa)
  );

  madd_carry_gen #(.N(N)) u_cgen (
    .g(g), .p(p), .c_scsa(c_scsa), .ct(ct), .cout(cout)
  );

  madd_carry_corr #(.N(N), .K(K)) u_corr (
    .ct(ct), .cout(cout), .p(p), .x(x), .creal(creal)
  );

  madd_sum #(.N(N), .K(K)) u_sum (
    .p(p), .creal(creal), .cout(cout), .s(s)
  );

endmodule
