// tb_rns_fir: self-checking test of the four-tap residue FIR filter (m = 239).
//
// Random residue coefficients and samples; y is compared in every cycle with
// sum b_i * x(n-i) mod 239 from a software delay line. The enable is dropped
// at random, and the test checks that the delay line then holds. An impulse
// response check reads the coefficients back in order, one per sample.
// Output latency: y(n) is valid in the cycle x(n) is applied (0 clocks).
module tb_rns_fir;

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

  logic            rst_n, en;
  logic [7:0]      x, y;
  logic [3:0][7:0] coeff;

  rns_fir dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .coeff(coeff), .y(y));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref_y(int xs[4], logic [3:0][7:0] c);
    int acc = 0;
    for (int i = 0; i < 4; i++) acc = (acc + xs[i] * int'(c[i])) % 239;
    return acc;
  endfunction

  initial begin
    int h[4];       // model delay line, h[0] = x(n)
    int holds = 0;
    rst_n = 1'b0; en = 1'b0; x = '0;
    for (int i = 0; i < 4; i++) coeff[i] = 8'($urandom_range(238, 0));
    @(posedge clk); #1; rst_n = 1'b1;
    // impulse response: 1, 0, 0, 0, 0 -> b0, b1, b2, b3, 0
    en = 1'b1;
    for (int n = 0; n < 5; n++) begin
      x = (n == 0) ? 8'd1 : 8'd0; #1;
      chk(int'(y), (n < 4) ? int'(coeff[n]) : 0, "impulse");
      @(posedge clk); #1;
    end
    h = '{0, 0, 0, 0};
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 0; i < 4; i++) coeff[i] = 8'($urandom_range(238, 0));
      for (int n = 0; n < 1000; n++) begin
        x  = 8'($urandom_range(238, 0));
        en = ($urandom_range(3, 0) != 0);
        h[0] = int'(x);
        #1;
        chk(int'(y), ref_y(h, coeff), "y");
        @(posedge clk); #1;
        if (en) begin
          h[3] = h[2]; h[2] = h[1]; h[1] = h[0];
        end else holds++;
      end
    end
    $display("cycles with the delay line held: %0d", holds);
    checks++;
    if (holds == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
