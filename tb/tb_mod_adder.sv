// tb_mod_adder: self-checking test of the modulo 2^n-2^k-1 adder.
//
// The default adder (n=8, k=4, m=239) is checked exhaustively over every
// pair of residues against (a+b) % m computed with plain integer arithmetic,
// and against the five operand/sum pairs of the adder's published
// simulation trace. Smaller adders with other (n, k) are checked
// exhaustively too, covering k = 1 and k = n-2. Both the wrapping case
// (a+b >= m) and the non-wrapping case are counted and must both occur.
module tb_mod_adder;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // default instance
  logic [7:0] a8, b8, s8;
  mod_adder dut (.a(a8), .b(b8), .s(s8));

  // other moduli
  logic [5:0] a6, b6, s6k1, s6k2, s6k4;
  mod_adder #(.N(6), .K(1)) dut6k1 (.a(a6), .b(b6), .s(s6k1));
  mod_adder #(.N(6), .K(2)) dut6k2 (.a(a6), .b(b6), .s(s6k2));
  mod_adder #(.N(6), .K(4)) dut6k4 (.a(a6), .b(b6), .s(s6k4));
  logic [9:0] a10, b10, s10;
  mod_adder #(.N(10), .K(3)) dut10 (.a(a10), .b(b10), .s(s10));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int m, wraps, nowraps;
    int fa[5], fb[5], fs[5];
    wraps = 0; nowraps = 0;
    // published trace: a = 11010111, b = 10110001..10110101
    fa = '{8'hD7, 8'hD7, 8'hD7, 8'hD7, 8'hD7};
    fb = '{8'hB1, 8'hB2, 8'hB3, 8'hB4, 8'hB5};
    fs = '{8'h99, 8'h9A, 8'h9B, 8'h9C, 8'h9D};
    for (int i = 0; i < 5; i++) begin
      a8 = 8'(fa[i]); b8 = 8'(fb[i]); #1;
      chk(int'(s8), fs[i], "trace");
    end
    // exhaustive, m = 239
    m = 239;
    for (int a = 0; a < m; a++)
      for (int b = 0; b < m; b++) begin
        a8 = 8'(a); b8 = 8'(b); #1;
        chk(int'(s8), (a + b) % m, $sformatf("m=239 a=%0d b=%0d", a, b));
        if (a + b >= m) wraps++; else nowraps++;
      end
    // exhaustive, n = 6 with k = 1, 2, 4
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        a6 = 6'(a); b6 = 6'(b); #1;
        if (a < 61 && b < 61) chk(int'(s6k1), (a + b) % 61, "m=61");
        if (a < 59 && b < 59) chk(int'(s6k2), (a + b) % 59, "m=59");
        if (a < 47 && b < 47) chk(int'(s6k4), (a + b) % 47, "m=47");
      end
    // exhaustive, n = 10, k = 3 (m = 1015)
    for (int a = 0; a < 1015; a++)
      for (int b = 0; b < 1015; b += 7) begin
        a10 = 10'(a); b10 = 10'(b); #1;
        chk(int'(s10), (a + b) % 1015, "m=1015");
      end
    $display("wrapping sums %0d, non-wrapping sums %0d", wraps, nowraps);
    checks++;
    if (wraps == 0 || nowraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
