// tb_ref_data: self-checking testbench of ref_data.
// Writes random words to random addresses and reads every address back
// against a model; checks that a write is visible from the next cycle and
// that we=0 leaves the array untouched.
module tb_ref_data;
  logic clk = 1'b0, we;
  logic [3:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ref_data #(.DATA_W(16), .ADDR_W(4)) dut (.*);

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
    we = 1'b0; waddr = '0; raddr = '0; wdata = '0;
    for (int a = 0; a < 16; a++) begin
      @(negedge clk); we = 1'b1; waddr = 4'(a); wdata = 16'($urandom); model[a] = wdata;
    end
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      raddr = waddr;
      #1 check(rdata == model[waddr], "read after write");
      we = ($urandom % 2) == 1; waddr = 4'($urandom); wdata = 16'($urandom);
      if (we) model[waddr] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int a = 0; a < 16; a++) begin
      raddr = 4'(a);
      #1 check(rdata == model[a], $sformatf("addr %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
