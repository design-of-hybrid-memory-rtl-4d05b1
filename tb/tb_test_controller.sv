// tb_test_controller: self-checking testbench of test_controller
// (READ_LAG=3). Checks run = enable AND pc, that rd_ok rises after exactly
// three patterns and step_r follows tick from then on, that sig_valid is
// mem_re one cycle late, and that the fault flags are sticky and only set
// by a compared read.
module tb_test_controller;
  logic clk = 1'b0, rst, enable, pc, tick, mem_re, mismatch, sa0_any, sa1_any;
  logic run, rd_ok, step_r, sig_valid, fault_det, sa0_det, sa1_det;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  test_controller #(.READ_LAG(3)) dut (.*);

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
    int ticks;
    logic prev_re;
    rst = 1'b1; enable = 0; pc = 0; tick = 0; mem_re = 0; mismatch = 0; sa0_any = 0; sa1_any = 0;
    @(negedge clk); rst = 1'b0;
    for (int i = 0; i < 4; i++) begin
      enable = i[0]; pc = i[1];
      #1 check(run == (i == 3), $sformatf("run for enable=%0d pc=%0d", i[0], i[1]));
    end
    ticks = 0;
    for (int i = 0; i < 40; i++) begin
      tick = ($urandom % 2) == 1;
      #1;
      check(rd_ok == (ticks >= 3), $sformatf("rd_ok after %0d patterns", ticks));
      check(step_r == (tick && ticks >= 3), "step_r");
      @(negedge clk);
      if (tick) ticks++;
    end
    tick = 0;
    // sig_valid is mem_re delayed
    prev_re = 1'b0;
    for (int i = 0; i < 20; i++) begin
      mem_re = ($urandom % 2) == 1;
      @(negedge clk);
      check(sig_valid == mem_re, "sig_valid one cycle after mem_re");
    end
    // flags ignore a mismatch without a read
    mem_re = 0; mismatch = 1; sa0_any = 1; sa1_any = 1;
    @(negedge clk);
    check(!fault_det && !sa0_det && !sa1_det, "no flag without a compared read");
    mem_re = 1; mismatch = 1; sa0_any = 1; sa1_any = 0;
    @(negedge clk);
    check(fault_det && sa0_det && !sa1_det, "stuck-at-0 recorded");
    mem_re = 1; mismatch = 0; sa0_any = 0;
    @(negedge clk);
    check(fault_det && sa0_det, "flags sticky");
    mem_re = 1; mismatch = 1; sa1_any = 1;
    @(negedge clk);
    check(sa1_det, "stuck-at-1 recorded");
    rst = 1'b1; @(negedge clk); rst = 1'b0;
    check(!fault_det && !sa0_det && !sa1_det && !rd_ok, "reset clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
