// tb_mod_mult: self-checking test of the modulo 2^n-2^k-1 multiplier.
//
// Exhaustive over every residue pair of the default channel (m = 239) and
// of an n = 6, k = 1 channel (m = 61, the slowest-converging fold), against
// (a * b) % m computed with integer arithmetic.
module tb_mod_mult;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] a, b, r;
  mod_mult dut (.a(a), .b(b), .r(r));
  logic [5:0] a6, b6, r6;
  mod_mult #(.N(6), .K(1)) dut6 (.a(a6), .b(b6), .r(r6));
  logic [5:0] r6k4;
  mod_mult #(.N(6), .K(4)) dut6k4 (.a(a6), .b(b6), .r(r6k4));

  initial begin
    for (int ia = 0; ia < 239; ia++)
      for (int ib = 0; ib < 239; ib++) begin
        a = 8'(ia); b = 8'(ib); #1;
        checks++;
        if (int'(r) != (ia * ib) % 239) begin
          failures++;
          if (failures < 20) $display("FAIL %0d*%0d = %0d", ia, ib, r);
        end
      end
    for (int ia = 0; ia < 61; ia++)
      for (int ib = 0; ib < 61; ib++) begin
        a6 = 6'(ia); b6 = 6'(ib); #1;
        checks++;
        if (int'(r6) != (ia * ib) % 61) failures++;
        if (ia < 47 && ib < 47) begin
          checks++;
          if (int'(r6k4) != (ia * ib) % 47) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
