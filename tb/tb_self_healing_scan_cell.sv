// tb_self_healing_scan_cell: self-checking testbench of
// self_healing_scan_cell (4 entries).
// Reads of random words with injected bit errors: checks that the first
// read of a faulty word is already corrected, that later reads stay
// corrected from the table even when the error is not flagged again, that
// new bits of a logged word are added to its mask, that a fifth faulty
// word sets overflow and is passed on uncorrected, and that reset empties
// the table.
module tb_self_healing_scan_cell;
  logic clk = 1'b0, rst, valid, repaired, overflow;
  logic [3:0]  raddr;
  logic [15:0] raw_data, ref_data, err_vec, healed_data;
  logic [2:0]  used;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  self_healing_scan_cell #(.DATA_W(16), .ADDR_W(4), .ENTRIES(4)) dut (.*);

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

  // one read: the memory returns ref ^ flip, err_vec is the comparator output
  task automatic rd(logic [3:0] a, logic [15:0] flip, logic [15:0] exp_fix, bit exp_rep);
    logic [15:0] r;
    r = 16'($urandom);
    @(negedge clk);
    valid = 1'b1; raddr = a; ref_data = r; raw_data = r ^ flip; err_vec = flip;
    #1;
    check(healed_data == ((raw_data & ~exp_fix) | (r & exp_fix)),
          $sformatf("addr %0d healed %h raw %h ref %h", a, healed_data, raw_data, r));
    check(repaired == exp_rep, $sformatf("addr %0d repaired flag", a));
  endtask

  initial begin
    rst = 1'b1; valid = 1'b0; raddr = '0; raw_data = '0; ref_data = '0; err_vec = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    rd(4'd1, 16'h0000, 16'h0000, 1'b0);          // clean word
    rd(4'd2, 16'h0010, 16'h0010, 1'b1);          // first fault, corrected at once
    @(negedge clk); valid = 1'b0;
    #1 check(used == 3'd1, "one entry used");
    rd(4'd2, 16'h0000, 16'h0010, 1'b1);          // logged mask still applied
    rd(4'd2, 16'h8000, 16'h8010, 1'b1);          // new bit added to the mask
    rd(4'd2, 16'h0000, 16'h8010, 1'b1);
    rd(4'd5, 16'h0001, 16'h0001, 1'b1);
    rd(4'd9, 16'h0F00, 16'h0F00, 1'b1);
    rd(4'd12, 16'h4000, 16'h4000, 1'b1);
    @(negedge clk); valid = 1'b0;
    #1 check(used == 3'd4, "four entries used");
    check(overflow == 1'b0, "no overflow with four words");
    rd(4'd13, 16'h0002, 16'h0000, 1'b0);         // table full: not corrected
    @(negedge clk); valid = 1'b0;
    #1 check(overflow == 1'b1, "overflow on fifth faulty word");
    rd(4'd5, 16'h0000, 16'h0001, 1'b1);          // earlier entries still work
    rd(4'd13, 16'h0000, 16'h0000, 1'b0);
    @(negedge clk); valid = 1'b0; rst = 1'b1;
    @(negedge clk); rst = 1'b0;
    #1 check(used == 3'd0 && overflow == 1'b0, "reset empties table");
    rd(4'd2, 16'h0000, 16'h0000, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
