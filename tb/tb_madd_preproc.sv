// tb_madd_preproc: self-checking test of the adder's pre-processing unit.
//
// For every residue pair (n=8, k=4, m=239) it checks the arithmetic identity
// that defines the unit: sum p_i 2^i + sum g_i 2^(i+1) + c_scsa 2^n equals
// a + b + 2^k + 1, that x = a ^ b, and that the SCSA carry is a7 & b7. It also
// checks the g and p vectors printed in the adder's published trace.
module tb_madd_preproc;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a, b, g, p, x;
  logic       cs;
  madd_preproc dut (.a(a), .b(b), .g(g), .p(p), .x(x), .c_scsa(cs));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    int tb_[5], tp[5], tg[5];
    // trace: a = D7, b = B1..B5 -> p, g as printed
    tb_ = '{8'hB1, 8'hB2, 8'hB3, 8'hB4, 8'hB5};
    tp  = '{8'h57, 8'h54, 8'h55, 8'h52, 8'h53};
    tg  = '{8'h21, 8'h23, 8'h23, 8'h25, 8'h25};
    for (int i = 0; i < 5; i++) begin
      a = 8'hD7; b = 8'(tb_[i]); #1;
      chk(int'(p), tp[i], "trace p");
      chk(int'(g), tg[i], "trace g");
    end
    for (int ia = 0; ia < 239; ia++)
      for (int ib = 0; ib < 239; ib++) begin
        a = 8'(ia); b = 8'(ib); #1;
        chk(int'(p) + 2 * int'(g) + 256 * int'(cs), ia + ib + 17, "identity");
        chk(int'(x), ia ^ ib, "x");
        chk(int'(cs), int'(a[7] & b[7]), "c_scsa");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
