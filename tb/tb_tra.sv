// tb_tra: self-checking testbench of tra.
// Checks the reset value 0, registered pass (equal inputs) and fail
// (different inputs) one clock after en, and holding while en=0.
module tb_tra;
  logic clk = 1'b0, rst, en, out;
  logic [15:0] in1, in2;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tra #(.WIDTH(16)) dut (.*);

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
    logic exp;
    rst = 1'b1; en = 1'b1; in1 = 16'h1; in2 = 16'h1;
    @(negedge clk);
    check(out == 1'b0, "reset clears to 0");
    rst = 1'b0; exp = 1'b0;
    for (int i = 0; i < 300; i++) begin
      en  = ($urandom % 3) != 0;
      in1 = 16'($urandom);
      in2 = (($urandom % 2) == 1) ? in1 : in1 ^ (16'h1 << ($urandom % 16));
      #1 check(out == exp, $sformatf("step %0d before edge", i));
      @(negedge clk);
      if (en) exp = (in1 == in2);
      check(out == exp, $sformatf("step %0d out %0d exp %0d", i, out, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
