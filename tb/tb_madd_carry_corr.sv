// tb_madd_carry_corr: self-checking test of the carry correction unit.
//
// For every residue pair (n=8, k=4) the testbench builds the unit's inputs
// from its own behavioural pre-processing and ripple carries, and checks the
// corrected carries against a ripple-carry computation of A+B (when A+B+T
// does not overflow) or of A+B+T (when it does). Both cases are counted.
module tb_madd_carry_corr;
  import madd_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] ct;
  logic       cout;
  logic [7:0] p, x, creal;
  madd_carry_corr dut (.ct(ct), .cout(cout), .p(p), .x(x), .creal(creal));

  initial begin
    w8_t g, pp;
    logic cs;
    logic [8:0] exp;
    int ovf = 0, novf = 0;
    for (int ia = 0; ia < 239; ia++)
      for (int ib = 0; ib < 239; ib++) begin
        pre(8'(ia), 8'(ib), 8, 4, g, pp, cs);
        ct = ripple(g, pp, 8);
        cout = cs | ct[8];
        p = pp; x = 8'(ia ^ ib);
        #1;
        exp = real_carries(8'(ia), 8'(ib), 8, 4);
        checks++;
        // creal[0] is unused; bit n-1 is the last carry the sum needs
        if (creal[7:1] !== exp[7:1]) begin
          failures++;
          if (failures < 20) $display("FAIL a=%0d b=%0d creal=%b exp=%b", ia, ib, creal, exp[7:0]);
        end
        if (cout) ovf++; else novf++;
      end
    checks++;
    if (ovf == 0 || novf == 0) failures++;
    $display("overflow %0d, no overflow %0d", ovf, novf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
