// rns_fir: direct-form FIR filter working in one residue channel mod
// m = 2^n - 2^k - 1.
//
//   y(n) = sum_{i=0}^{TAPS-1} b_i * x(n-i)   (mod m)
//
// The input sample and TAPS-1 delayed samples are each multiplied by their
// coefficient with a modular multiplier, and the products are summed by a
// chain of TAPS-1 modulo 2^n-2^k-1 adders: the first adds b0*x(n) and
// b1*x(n-1), each following one adds the next product, and the last one
// gives y(n). Because every value is a residue there are no carries between
// channels and no growing word width.
//
// Interface: x and coeff[i] are residues in [0, m-1]. The delay line
// advances on the clock when en is 1 and holds otherwise. y is
// combinational from x and the delay line, as in the filter's diagram (no
// output register), so y(n) is valid in the same cycle as x(n). rst_n
// (active low, synchronous) clears the delay line.
//
// Tap count 4 (b0..b3, three delays), delay/multiply/modular-adder chain
// follow the filter's diagram; the enable, the reset and the programmable
// coefficient port are this design's own.
module rns_fir #(
  parameter int unsigned N    = rns_pkg::RNS_N,
  parameter int unsigned K    = rns_pkg::RNS_K,
  parameter int unsigned TAPS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [N-1:0]           x,
  input  logic [TAPS-1:0][N-1:0] coeff,
  output logic [N-1:0]           y
);

  logic [TAPS-1:0][N-1:0] xs;     // xs[i] = x(n-i)
  logic [TAPS-1:1][N-1:0] dly;    // delay elements
  logic [TAPS-1:0][N-1:0] prod;
  logic [TAPS-1:0][N-1:0] acc;

  always_ff @(posedge clk) begin
    if (!rst_n)  dly <= '0;
    else if (en) dly <= {dly[TAPS-2:1], x};
  end

  assign xs = {dly, x};

  for (genvar i = 0; i < TAPS; i++) begin : g_tap
    mod_mult #(.N(N), .K(K)) u_mul (.a(xs[i]), .b(coeff[i]), .r(prod[i]));
  end

  assign acc[0] = prod[0];
  for (genvar i = 1; i < TAPS; i++) begin : g_add
    mod_adder #(.N(N), .K(K)) u_add (.a(acc[i-1]), .b(prod[i]), .s(acc[i]));
  end

  assign y = acc[TAPS-1];

  initial begin
    assert (TAPS >= 3) else $error("rns_fir: need at least three taps");
  end

endmodule
