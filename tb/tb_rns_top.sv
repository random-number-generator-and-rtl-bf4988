// tb_rns_top: end-to-end test of rns_top at its default parameters
// (n = 8, k = 4, m = 239, four RNG stages, four FIR taps).
//
// The random number generator and the FIR filter run concurrently. The FIR
// is fed with words taken from the generator itself (a generated sequence
// filtered in the residue domain), and both outputs are compared every clock
// with software models. The test counts how often each mechanism happens and
// fails if one never does:
//   reset to the default seed, seed load, RNG feedback sum wrapping past m,
//   FIR delay line held (en = 0), FIR adder-chain sums wrapping past m,
//   FIR products reduced by the multiplier (a*b >= m).
module tb_rns_top;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic            rst_n, rng_load, fir_en;
  logic [3:0][7:0] rng_seed, fir_coeff;
  logic [7:0]      rng_out, rng_tap, fir_x, fir_y;

  rns_top dut (
    .clk(clk), .rst_n(rst_n),
    .rng_load(rng_load), .rng_seed(rng_seed), .rng_out(rng_out), .rng_tap(rng_tap),
    .fir_en(fir_en), .fir_x(fir_x), .fir_coeff(fir_coeff), .fir_y(fir_y)
  );

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  int n_reset = 0, n_load = 0, n_rng_wrap = 0, n_hold = 0, n_fir_wrap = 0, n_mul_red = 0;

  initial begin
    int r[4];       // RNG model, r[0] = SR1
    int h[4];       // FIR model delay line, h[0] = x(n)
    int acc, pr, nxt;
    rst_n = 1'b0; rng_load = 1'b0; rng_seed = '0; fir_en = 1'b0; fir_x = '0;
    for (int i = 0; i < 4; i++) fir_coeff[i] = 8'($urandom_range(238, 1));
    @(posedge clk); #1; rst_n = 1'b1; n_reset++;
    r = '{8'h22, 8'h99, 8'h30, 8'h60};
    h = '{0, 0, 0, 0};
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // occasional seed load and reset
      rng_load = (cyc % 700 == 350);
      if (rng_load) for (int i = 0; i < 4; i++) rng_seed[i] = 8'($urandom_range(238, 0));
      // FIR input: the generator's output word
      fir_x  = rng_out;
      fir_en = ($urandom_range(4, 0) != 0);
      #1;
      // RNG check
      chk(int'(rng_out), r[3], "rng_out");
      nxt = (r[2] + r[3]) % 239;
      chk(int'(rng_tap), nxt, "rng_tap");
      // FIR check
      h[0] = int'(fir_x);
      acc = 0;
      for (int i = 0; i < 4; i++) begin
        pr = h[i] * int'(fir_coeff[i]);
        if (pr >= 239) n_mul_red++;
        pr = pr % 239;
        if (i > 0 && acc + pr >= 239) n_fir_wrap++;
        acc = (acc + pr) % 239;
      end
      chk(int'(fir_y), acc, "fir_y");
      @(posedge clk); #1;
      // advance models
      if (rng_load) begin
        for (int i = 0; i < 4; i++) r[i] = int'(rng_seed[i]);
        n_load++;
      end else begin
        if (r[2] + r[3] >= 239) n_rng_wrap++;
        r[3] = r[2]; r[2] = r[1]; r[1] = r[0]; r[0] = nxt;
      end
      if (fir_en) begin
        h[3] = h[2]; h[2] = h[1]; h[1] = h[0];
      end else n_hold++;
      // synchronous reset once in the middle
      if (cyc == 1500) begin
        rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1; n_reset++;
        r = '{8'h22, 8'h99, 8'h30, 8'h60};
        h = '{0, 0, 0, 0};
      end
    end
    $display("resets %0d, seed loads %0d, RNG wraps %0d, FIR holds %0d, FIR adder wraps %0d, multiplier reductions %0d",
             n_reset, n_load, n_rng_wrap, n_hold, n_fir_wrap, n_mul_red);
    checks++; if (n_reset    < 2) failures++;
    checks++; if (n_load     == 0) failures++;
    checks++; if (n_rng_wrap == 0) failures++;
    checks++; if (n_hold     == 0) failures++;
    checks++; if (n_fir_wrap == 0) failures++;
    checks++; if (n_mul_red  == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
