// rns_rng: random number generator built from a word-wide shift register
// with a modular-adder feedback.
//
// A conventional LFSR feeds the XOR of two register taps back into its first
// stage. Here each stage SR1..SR4 holds an n-bit residue and the XOR is
// replaced by the modulo 2^n-2^k-1 adder: every clock
//   SR1 <= (SR3 + SR4) mod m,  SR2 <= SR1,  SR3 <= SR2,  SR4 <= SR3.
// Whenever the sum reaches the modulus the adder wraps, which scrambles the
// sequence; the modulus itself can be kept secret as part of the key.
//
// Interface: shiftout is the last stage SR4 (the generator's output) and tap
// is the feedback word going into SR1. rst_n (active low, synchronous)
// loads the SEED parameter; load (synchronous) loads the seed input word by
// word (seed[0] -> SR1 ... seed[3] -> SR4). Seed words must be residues,
// i.e. below m. One new word per clock once running.
//
// Four stages with the adder fed from SR3 and SR4 follow the generator's
// block diagram. The reset and seed-load controls and the default seed are
// this design's own: the default seed is the register state visible in the
// generator's published simulation trace (SR1..SR4 = 0x22, 0x99, 0x30, 0x60).
module rns_rng #(
  parameter int unsigned N      = rns_pkg::RNS_N,
  parameter int unsigned K      = rns_pkg::RNS_K,
  parameter int unsigned STAGES = 4,
  parameter logic [STAGES-1:0][N-1:0] SEED = {8'h60, 8'h30, 8'h99, 8'h22}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     load,
  input  logic [STAGES-1:0][N-1:0] seed,
  output logic [N-1:0]             shiftout,
  output logic [N-1:0]             tap
);

  localparam logic [N-1:0] M = N'(rns_pkg::rns_modulus(N, K));

  logic [STAGES-1:0][N-1:0] sr;   // sr[0] = SR1 ... sr[STAGES-1] = last stage

  mod_adder #(.N(N), .K(K)) u_fb (
    .a(sr[STAGES-2]), .b(sr[STAGES-1]), .s(tap)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr <= SEED;
    end else if (load) begin
      sr <= seed;
    end else begin
      sr <= {sr[STAGES-2:0], tap};
    end
  end

  assign shiftout = sr[STAGES-1];

  initial begin
    assert (STAGES >= 2) else $error("rns_rng: need at least two stages");
  end

  // Every stage must hold a residue for the adder to be in range.
  for (genvar i = 0; i < STAGES; i++) begin : g_chk
    a_seed_residue: assert property (@(posedge clk) disable iff (!rst_n)
                                     load |-> seed[i] < M)
      else $error("rns_rng: seed word %0d not below the modulus", i);
  end

endmodule
