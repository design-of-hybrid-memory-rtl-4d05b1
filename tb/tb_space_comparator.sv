// tb_space_comparator: self-checking testbench of space_comparator.
// Random and directed word pairs: equal words, a stuck-at-0 symptom, a
// stuck-at-1 symptom, mixed differences, and valid=0; each output is
// compared with values computed bit by bit.
module tb_space_comparator;
  logic        valid, mismatch;
  logic [15:0] data_in, ref_in, err_vec, sa0_vec, sa1_vec;
  int checks = 0, failures = 0;

  space_comparator #(.WIDTH(16)) dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic v, logic [15:0] d, logic [15:0] r);
    logic [15:0] e0, e1, ee;
    valid = v; data_in = d; ref_in = r;
    #1;
    for (int i = 0; i < 16; i++) begin
      ee[i] = v && (d[i] != r[i]);
      e0[i] = v && (r[i] == 1'b1) && (d[i] == 1'b0);
      e1[i] = v && (r[i] == 1'b0) && (d[i] == 1'b1);
    end
    check(err_vec == ee, $sformatf("err d=%h r=%h", d, r));
    check(sa0_vec == e0, $sformatf("sa0 d=%h r=%h", d, r));
    check(sa1_vec == e1, $sformatf("sa1 d=%h r=%h", d, r));
    check(mismatch == (ee != 0), $sformatf("mismatch d=%h r=%h", d, r));
  endtask

  initial begin
    apply(1'b1, 16'hA5A5, 16'hA5A5);
    apply(1'b1, 16'h0000, 16'hFFFF);  // all bits read low: stuck-at-0
    apply(1'b1, 16'hFFFF, 16'h0000);  // all bits read high: stuck-at-1
    apply(1'b1, 16'h00F0, 16'h0F00);
    apply(1'b0, 16'h1234, 16'h4321);
    for (int i = 0; i < 500; i++) apply(1'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
