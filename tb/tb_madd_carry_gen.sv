// tb_madd_carry_gen: self-checking test of the prefix carry generation unit.
//
// Drives random generate/propagate vectors and the SCSA carry, and compares
// the carries with a ripple-carry loop and c_out with c_scsa | carry out.
// Run at n = 8 (the default) and at n = 11 to exercise a tree whose width
// is not a power of two.
module tb_madd_carry_gen;
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

  logic [7:0] g, p;
  logic       cs, cout;
  logic [8:0] ct;
  madd_carry_gen dut (.g(g), .p(p), .c_scsa(cs), .ct(ct), .cout(cout));

  logic [10:0] g11, p11;
  logic        cout11;
  logic [11:0] ct11;
  madd_carry_gen #(.N(11)) dut11 (.g(g11), .p(p11), .c_scsa(cs), .ct(ct11), .cout(cout11));

  initial begin
    logic [8:0]  r;
    logic [11:0] r11;
    for (int t = 0; t < 20000; t++) begin
      g = 8'($urandom); p = 8'($urandom); cs = 1'($urandom);
      g11 = 11'($urandom); p11 = 11'($urandom);
      #1;
      r = ripple(g, p, 8);
      checks++; if (ct !== r) begin failures++; $display("FAIL ct %h vs %h", ct, r); end
      checks++; if (cout !== (cs | r[8])) failures++;
      r11 = '0;
      for (int i = 0; i < 11; i++) r11[i+1] = g11[i] | (p11[i] & r11[i]);
      checks++; if (ct11 !== r11) begin failures++; $display("FAIL ct11 %h vs %h", ct11, r11); end
      checks++; if (cout11 !== (cs | r11[11])) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
