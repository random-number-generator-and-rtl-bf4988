// tb_rns_rng: self-checking test of the modular-feedback random number
// generator (four 8-bit stages, m = 239).
//
// 1. After reset with the default seed the output and feedback words must
//    follow the published simulation trace: shiftout 60 30 99 22 90 and
//    tap 90 C9 BB B2 6A (hex), one word per clock.
// 2. After loading random residue seeds, 2000 clocks are compared against a
//    software model of the register: SR1 <= (SR3+SR4) % 239, others shift.
// 3. Counts feedback sums that wrap past the modulus (must occur) and
//    measures the period from the default seed up to a limit.
module tb_rns_rng;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic             rst_n, load;
  logic [3:0][7:0]  seed;
  logic [7:0]       shiftout, tap;

  rns_rng dut (.clk(clk), .rst_n(rst_n), .load(load), .seed(seed),
               .shiftout(shiftout), .tap(tap));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    int so[5], tp[5];
    int m[4];        // model, m[0] = SR1
    int nxt, wraps;
    logic [31:0] st0;
    int period;
    so = '{8'h60, 8'h30, 8'h99, 8'h22, 8'h90};
    tp = '{8'h90, 8'hC9, 8'hBB, 8'hB2, 8'h6A};
    rst_n = 1'b0; load = 1'b0; seed = '0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    for (int i = 0; i < 5; i++) begin
      chk(int'(shiftout), so[i], "trace shiftout");
      chk(int'(tap), tp[i], "trace tap");
      @(posedge clk); #1;
    end
    // random seeds against the model
    wraps = 0;
    for (int rep = 0; rep < 4; rep++) begin
      for (int i = 0; i < 4; i++) begin
        m[i] = int'($urandom_range(238, 0));
        seed[i] = 8'(m[i]);
      end
      load = 1'b1; @(posedge clk); #1; load = 1'b0;
      for (int c = 0; c < 500; c++) begin
        chk(int'(shiftout), m[3], "model shiftout");
        nxt = (m[2] + m[3]) % 239;
        if (m[2] + m[3] >= 239) wraps++;
        chk(int'(tap), nxt, "model tap");
        m[3] = m[2]; m[2] = m[1]; m[1] = m[0]; m[0] = nxt;
        @(posedge clk); #1;
      end
    end
    $display("feedback wraps: %0d", wraps);
    checks++;
    if (wraps == 0) failures++;
    // period from the default seed (measured, not checked)
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    st0 = {dut.sr};
    period = 0;
    do begin
      @(posedge clk); #1; period++;
    end while ({dut.sr} != st0 && period < 100000);
    $display("period from default seed: %0d%s", period, period >= 100000 ? "+" : "");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
