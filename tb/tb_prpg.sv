// tb_prpg: self-checking testbench of prpg.
// Steps the write LFSRs for two address periods while starting the read
// LFSR LAG steps late; checks that the write-address sequence covers all
// 16 addresses once per period, that the read address always equals the
// write address of LAG steps earlier, and that write data follow an
// independent model of the 16-bit LFSR.
module tb_prpg;
  localparam int LAG = 3;
  logic clk = 1'b0, rst, step_w, step_r;
  logic [15:0] wdata;
  logic [3:0]  waddr, raddr;
  int checks = 0, failures = 0;
  logic [3:0]  wa_hist [64];
  logic [15:0] exp_d;

  always #5 clk = ~clk;

  prpg #(.DATA_W(16), .ADDR_W(4)) dut (.clk, .rst, .step_w, .step_r, .wdata, .waddr, .raddr);

  function automatic logic [15:0] model16(logic [15:0] s);
    return {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
  endfunction

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [16];
    rst = 1'b1; step_w = 1'b0; step_r = 1'b0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    @(negedge clk);
    check(wdata == 16'hACE1, "data seed");
    check(waddr == raddr, "address LFSRs start equal");
    exp_d = wdata;
    for (int k = 0; k < 40; k++) begin
      wa_hist[k] = waddr;
      if (k >= LAG) check(raddr == wa_hist[k-LAG], $sformatf("read addr at %0d", k));
      check(wdata == exp_d, $sformatf("write data at %0d", k));
      if (k < 16) seen[waddr] = 1'b1;
      if (k >= 16) check(waddr == wa_hist[k-16], "address period 16");
      step_w = 1'b1;
      step_r = (k >= LAG);
      @(negedge clk);
      exp_d = model16(exp_d);
    end
    step_w = 1'b0; step_r = 1'b0;
    for (int a = 0; a < 16; a++) check(seen[a], $sformatf("address %0d generated", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
