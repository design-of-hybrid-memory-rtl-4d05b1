// tb_misr: self-checking testbench of misr.
// Compresses random words and compares the signature with an independent
// model every cycle; checks that en=0 holds, and that a single flipped bit
// in the input stream changes the final signature.
module tb_misr;
  logic clk = 1'b0, rst, en;
  logic [15:0] din, sig;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  misr #(.WIDTH(16), .TAPS(16'h002D)) dut (.*);

  function automatic logic [15:0] model(logic [15:0] s, logic [15:0] d);
    logic fb = s[0] ^ s[2] ^ s[3] ^ s[5];
    return {fb, s[15:1]} ^ d;
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp, words [100], sig_a;
    rst = 1'b1; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    check(sig == 16'h0, "reset");
    exp = '0;
    for (int i = 0; i < 100; i++) begin
      words[i] = 16'($urandom);
      en = ($urandom % 4) != 0; din = words[i];
      @(negedge clk);
      if (en) exp = model(exp, din);
      check(sig == exp, $sformatf("step %0d sig %h exp %h", i, sig, exp));
    end
    en = 1'b0;
    // same stream twice, the second with one bit flipped
    rst = 1'b1; @(negedge clk); rst = 1'b0; en = 1'b1;
    for (int i = 0; i < 100; i++) begin din = words[i]; @(negedge clk); end
    sig_a = sig;
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 100; i++) begin din = words[i] ^ ((i == 37) ? 16'h0100 : 16'h0); @(negedge clk); end
    check(sig != sig_a, "single-bit error changes signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
