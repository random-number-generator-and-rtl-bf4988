// tb_madd_sum: self-checking test of the sum computation unit.
//
// For every residue pair (n=8, k=4, m=239) the testbench computes the
// pre-processed partial sums, the needed carries and c_out with its own
// behavioural model, drives only the sum unit with them and compares the
// result with (a + b) % 239.
module tb_madd_sum;
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

  logic [7:0] p, creal, s;
  logic       cout;
  madd_sum dut (.p(p), .creal(creal), .cout(cout), .s(s));

  initial begin
    w8_t g, pp;
    logic cs;
    logic [8:0] ct, cr;
    for (int ia = 0; ia < 239; ia++)
      for (int ib = 0; ib < 239; ib++) begin
        pre(8'(ia), 8'(ib), 8, 4, g, pp, cs);
        ct = ripple(g, pp, 8);
        cr = real_carries(8'(ia), 8'(ib), 8, 4);
        p = pp; creal = cr[7:0]; cout = cs | ct[8];
        #1;
        checks++;
        if (int'(s) != (ia + ib) % 239) begin
          failures++;
          if (failures < 20) $display("FAIL a=%0d b=%0d s=%0d", ia, ib, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
