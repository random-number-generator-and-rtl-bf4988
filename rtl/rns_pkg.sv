// rns_pkg: shared constants for the residue-number-system (RNS) datapath.
//
// The whole design works in one residue channel whose modulus has the form
// m = 2^n - 2^k - 1 (1 <= k <= n-2). The default channel is n = 8, k = 4,
// i.e. m = 239, which is the configuration the design is presented in. The
// correction constant that turns "A+B >= m" into a carry out of an n-bit
// addition is T = 2^n - m = 2^k + 1.
package rns_pkg;

  // Default channel: modulo 2^8 - 2^4 - 1 = 239.
  localparam int unsigned RNS_N = 8;
  localparam int unsigned RNS_K = 4;

  // Modulus 2^n - 2^k - 1.
  function automatic longint unsigned rns_modulus(int unsigned n, int unsigned k);
    return (longint'(1) << n) - (longint'(1) << k) - 1;
  endfunction

  // Correction factor T = 2^n - m = 2^k + 1.
  function automatic longint unsigned rns_corr(int unsigned k);
    return (longint'(1) << k) + 1;
  endfunction

endpackage
