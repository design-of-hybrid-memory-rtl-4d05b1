// tb_lfsr: self-checking testbench of lfsr.
// Checks a 16-bit instance against a bit-by-bit model for a full period,
// that its period is exactly 65535 (maximal length, no earlier repeat),
// that step=0 holds the state, and that a 4-bit full-cycle instance visits
// all 16 states once per period.
module tb_lfsr;
  logic clk = 1'b0, rst, step, step4;
  logic [15:0] q;
  logic [3:0]  q4;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  lfsr #(.WIDTH(16), .TAPS(16'h002D), .SEED(16'h0001), .FULL_CYCLE(1'b0)) dut
    (.clk, .rst, .step, .q);
  lfsr #(.WIDTH(4), .TAPS(4'h3), .SEED(4'h1), .FULL_CYCLE(1'b1)) dut4
    (.clk, .rst, .step(step4), .q(q4));

  // Reference: X(i) <= X(i+1), X15 <= X0 ^ X2 ^ X3 ^ X5
  function automatic logic [15:0] model16(logic [15:0] s);
    logic b = s[0] ^ s[2] ^ s[3] ^ s[5];
    return {b, s[15:1]};
  endfunction
  // 4-bit x0^x1 with de Bruijn correction when x3..x1 are all zero
  function automatic logic [3:0] model4(logic [3:0] s);
    logic b = s[0] ^ s[1];
    if (s[3:1] == 3'b000) b = ~b;
    return {b, s[3:1]};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", msg);
    end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    logic [3:0]  exp4;
    bit          seen4 [16];
    int          period;
    rst = 1'b1; step = 1'b0; step4 = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(q == 16'h0001, "seed after reset");
    check(q4 == 4'h1, "seed4 after reset");
    // hold
    repeat (3) @(negedge clk);
    check(q == 16'h0001, "hold with step=0");
    // full period against model
    exp = q; period = 0;
    step = 1'b1;
    do begin
      @(negedge clk);
      exp = model16(exp);
      period++;
      if (q != exp) check(1'b0, $sformatf("state %0d: got %h exp %h", period, q, exp));
      if (period % 4096 == 0) check(q == exp, "model match");
    end while (q != 16'h0001 && period < 70000);
    step = 1'b0;
    check(period == 65535, $sformatf("period %0d", period));
    // 4-bit full cycle
    exp4 = q4;
    step4 = 1'b1;
    for (int i = 0; i < 16; i++) begin
      seen4[q4] = 1'b1;
      @(negedge clk);
      exp4 = model4(exp4);
      check(q4 == exp4, $sformatf("4-bit step %0d got %h exp %h", i, q4, exp4));
    end
    step4 = 1'b0;
    check(q4 == 4'h1, "4-bit period 16");
    for (int a = 0; a < 16; a++) check(seen4[a], $sformatf("4-bit state %0d visited", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
