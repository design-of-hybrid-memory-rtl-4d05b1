// tb_phase_shifter: self-checking testbench of phase_shifter.
// Applies all 65536 input words, compares each output with a bit-level
// model (bit i = in[i] ^ in[i+3]) and checks that no two inputs give the
// same output.
module tb_phase_shifter;
  logic [15:0] din, dout;
  int checks = 0, failures = 0;
  bit seen [65536];

  phase_shifter #(.WIDTH(16), .SPREAD(3)) dut (.data_in(din), .data_out(dout));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    int dup = 0;
    for (int v = 0; v < 65536; v++) begin
      din = 16'(v);
      #1;
      for (int i = 0; i < 16; i++) exp[i] = din[i] ^ ((i + 3 < 16) ? din[i+3] : 1'b0);
      check(dout == exp, $sformatf("in %h out %h exp %h", din, dout, exp));
      if (seen[dout]) dup++;
      seen[dout] = 1'b1;
    end
    check(dup == 0, $sformatf("%0d repeated outputs", dup));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
