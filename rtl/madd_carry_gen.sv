// madd_carry_gen: carry generation unit of the modulo 2^n-2^k-1 adder.
//
// A Sklansky parallel-prefix tree combines the pre-processed (g_i, p_i)
// pairs with the prefix operator
//   (G, P) . (G', P') = (G | P & G', P & P')
// into the group generates G_(i:0). Because the constant T and the carry in
// of A1 are already folded into (g, p), there is no carry in and the carry
// into bit i+1 of A+B+T is simply ct[i+1] = G_(i:0). The carry out of A+B+T
// beyond bit n-1 is c_out = c_scsa | G_(n-1:0): the SCSA carry does not
// enter the tree.
//
// Any prefix structure gives the same carries; the choice of Sklansky
// (log2(N) levels, fan-out grows toward the top) is this design's own.
// Purely combinational. ct[0] is tied to 0 (no carry into bit 0) and ct[1]
// is g[0] itself; both are kept so that ct[i] is always the carry into bit i.
module madd_carry_gen #(
  parameter int unsigned N = rns_pkg::RNS_N
) (
  input  logic [N-1:0] g,
  input  logic [N-1:0] p,
  input  logic         c_scsa,
  output logic [N:0]   ct,
  output logic         cout
);

  localparam int unsigned L = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] gl [L+1];
  logic [N-1:0] pl [L+1];

  assign gl[0] = g;
  assign pl[0] = p;

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar i = 0; i < N; i++) begin : g_bit
      if (((i >> l) & 1) == 1) begin : g_cell
        // combine with the last node of the lower half of this 2^(l+1) block
        localparam int J = ((i >> l) << l) - 1;
        assign gl[l+1][i] = gl[l][i] | (pl[l][i] & gl[l][J]);
        assign pl[l+1][i] = pl[l][i] & pl[l][J];
      end else begin : g_pass
        assign gl[l+1][i] = gl[l][i];
        assign pl[l+1][i] = pl[l][i];
      end
    end
  end

  assign ct   = {gl[L], 1'b0};
  assign cout = c_scsa | gl[L][N-1];

endmodule
