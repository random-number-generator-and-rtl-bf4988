// mod_mult: modulo m = 2^n - 2^k - 1 multiplier, r = (a * b) mod m.
//
// Used for the coefficient products of the residue FIR filter. The full
// 2n-bit product is reduced with the identity 2^n = 2^k + 1 (mod m): a value
// v = H*2^n + L is replaced by H*(2^k + 1) + L = (H << k) + H + L, which keeps
// its residue and at least halves H because k <= n-2. After N+2 such folds
// v < 2^n, and one conditional subtraction of m brings it into [0, m-1].
//
// The filter's structure only says that each tap has a multiplier; how the
// multiplier works is this design's own (the simplest fold-and-subtract
// reduction). Interface: a, b residues in [0, m-1]; r their product mod m.
// Purely combinational.
module mod_mult #(
  parameter int unsigned N = rns_pkg::RNS_N,
  parameter int unsigned K = rns_pkg::RNS_K
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] r
);

  localparam logic [N-1:0] M = N'(rns_pkg::rns_modulus(N, K));

  logic [2*N-1:0] v;

  always_comb begin
    v = (2*N)'(a) * (2*N)'(b);
    for (int it = 0; it < int'(N) + 2; it++) begin
      v = ((2*N)'(v[2*N-1:N]) << K) + (2*N)'(v[2*N-1:N]) + (2*N)'(v[N-1:0]);
    end
    r = (v[N-1:0] >= M) ? v[N-1:0] - M : v[N-1:0];
  end

endmodule
