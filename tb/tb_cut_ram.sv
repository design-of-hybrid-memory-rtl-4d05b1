// tb_cut_ram: self-checking testbench of cut_ram.
// Injects a stuck-at-0 fault (address 3, bits 0 and 8) and a stuck-at-1
// fault (address 7, bit 15), writes random words to every address and
// reads them back against a model; also checks that fault-free words
// read back unchanged and that we=0 leaves the array untouched.
module tb_cut_ram;
  import hml_pkg::*;
  localparam fault_list_t F = '{
    '{kind: FAULT_NONE, addr: 16'd0, mask: 32'h0},
    '{kind: FAULT_NONE, addr: 16'd0, mask: 32'h0},
    '{kind: FAULT_SA1,  addr: 16'd7, mask: 32'h8000},
    '{kind: FAULT_SA0,  addr: 16'd3, mask: 32'h0101}};
  logic clk = 1'b0, we;
  logic [3:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cut_ram #(.DATA_W(16), .ADDR_W(4), .FAULTS(F)) dut (.*);

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
    for (int round = 0; round < 4; round++) begin
      for (int a = 0; a < 16; a++) begin
        @(negedge clk);
        we = 1'b1; waddr = 4'(a);
        wdata = (round == 0) ? 16'hFFFF : (round == 1) ? 16'h0000 : 16'($urandom);
        model[a] = wdata;
        if (a == 3) model[a] = model[a] & ~16'h0101;
        if (a == 7) model[a] = model[a] |  16'h8000;
      end
      @(negedge clk); we = 1'b0;
      for (int a = 0; a < 16; a++) begin
        raddr = 4'(a);
        #1 check(rdata == model[a], $sformatf("round %0d addr %0d got %h exp %h", round, a, rdata, model[a]));
      end
    end
    // we=0: no change
    @(negedge clk); we = 1'b0; waddr = 4'd5; wdata = ~model[5];
    @(negedge clk); raddr = 4'd5;
    #1 check(rdata == model[5], "no write with we=0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
