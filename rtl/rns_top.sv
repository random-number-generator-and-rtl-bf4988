// rns_top: the two applications of the modulo 2^n-2^k-1 adder side by side.
//
//  * rns_rng - random number generator for key material: a four-word shift
//              register with modular-adder feedback. Its output word
//              (rng_out) and feedback word (rng_tap) are brought out for the
//              cipher that would consume them.
//  * rns_fir - four-tap FIR filter in one residue channel: delay line,
//              modular multipliers and a chain of modular adders.
//
// Both run from one clock and one active-low synchronous reset and share the
// channel modulus m = 2^N - 2^K - 1 (default 239) but are otherwise
// independent. RNG: one word per clock, rng_load loads rng_seed. FIR:
// fir_y is combinational from fir_x and the delay line, which advances when
// fir_en is 1. All values are residues in [0, m-1].
//
// Putting both in one top is this design's own packaging; the two blocks
// and the shared adder follow the design description.
module rns_top #(
  parameter int unsigned N    = rns_pkg::RNS_N,
  parameter int unsigned K    = rns_pkg::RNS_K,
  parameter int unsigned TAPS = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // random number generator
  input  logic                   rng_load,
  input  logic [3:0][N-1:0]      rng_seed,
  output logic [N-1:0]           rng_out,
  output logic [N-1:0]           rng_tap,
  // FIR filter
  input  logic                   fir_en,
  input  logic [N-1:0]           fir_x,
  input  logic [TAPS-1:0][N-1:0] fir_coeff,
  output logic [N-1:0]           fir_y
);

  rns_rng #(.N(N), .K(K), .STAGES(4)) u_rng (
    .clk(clk), .rst_n(rst_n), .load(rng_load), .seed(rng_seed),
    .shiftout(rng_out), .tap(rng_tap)
  );

  rns_fir #(.N(N), .K(K), .TAPS(TAPS)) u_fir (
    .clk(clk), .rst_n(rst_n), .en(fir_en), .x(fir_x), .coeff(fir_coeff),
    .y(fir_y)
  );

endmodule
