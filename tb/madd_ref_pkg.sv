// madd_ref_pkg: behavioural reference models for the testbenches of the
// modulo 2^n-2^k-1 adder units. Widths are fixed at 8 bits (n = 8, k = 4
// by default, passed as arguments). Carries are computed with a plain
// ripple loop, independent of the prefix tree and correction formulas.
package madd_ref_pkg;

  typedef logic [7:0] w8_t;

  // Ripple carries c[i] into bit i for generate/propagate pairs, no carry in.
  function automatic logic [8:0] ripple(w8_t g, w8_t p, int n);
    logic [8:0] c;
    c = '0;
    for (int i = 0; i < n; i++) c[i+1] = g[i] | (p[i] & c[i]);
    return c;
  endfunction

  // Pre-processed pairs of A+B+T written from the arithmetic meaning
  // (carry-in 1 at bit 0, carry-save addition of 1 at bit k).
  function automatic void pre(input w8_t a, input w8_t b, input int n, input int k,
                              output w8_t g, output w8_t p, output logic cs);
    w8_t gp, pp;
    gp = a & b; pp = a ^ b;
    for (int i = 0; i < n; i++) begin
      if (i == 0)      begin g[i] = a[0] | b[0];       p[i] = ~pp[0]; end
      else if (i < k)  begin g[i] = gp[i];             p[i] = pp[i];  end
      else if (i == k) begin g[i] = pp[i];             p[i] = ~pp[i]; end
      else             begin g[i] = pp[i] & gp[i-1];   p[i] = pp[i] ^ gp[i-1]; end
    end
    cs = gp[n-1];
  endfunction

  // Carries that the sum stage needs: those of A+B+T when it overflows,
  // otherwise those of A+B in the same carry-save form (no '1' at bit 0 or k).
  function automatic logic [8:0] real_carries(w8_t a, w8_t b, int n, int k);
    w8_t g, p, g0, p0;
    logic cs, cout;
    logic [8:0] ct;
    pre(a, b, n, k, g, p, cs);
    ct   = ripple(g, p, n);
    cout = cs | ct[n];
    if (cout) return ct;
    g0 = g; p0 = p;
    g0[0] = a[0] & b[0]; p0[0] = a[0] ^ b[0];
    g0[k] = 1'b0;        p0[k] = a[k] ^ b[k];
    return ripple(g0, p0, n);
  endfunction

endpackage
