// tb_scan_path: self-checking testbench of scan_path.
// Checks: a pattern every cycle with af_red_inc=1; one every af+1 cycles
// with af_red_inc=0, counting up and counting down; af_amount taken on
// load and load suppressing a pattern; no pattern while run=0; the MUX
// registers capturing the patterns the cycle after a tick, holding them
// otherwise with both strobes low, and the read strobe following rd_ok.
module tb_scan_path;
  import hml_pkg::*;
  logic clk = 1'b0, rst, run, load, af_red_inc, up_down, rd_ok;
  logic [15:0] af_amount, wdata_pat, af_value, af_count;
  logic [3:0]  waddr_pat, raddr_pat;
  logic        tick;
  mem_req_t    mem;
  int checks = 0, failures = 0;
  logic [15:0] last_d;

  always #5 clk = ~clk;

  scan_path #(.DATA_W(16), .ADDR_W(4), .AF_W(16)) dut (.*);

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

  // count ticks over n cycles, record the gaps between them
  task automatic count_ticks(int n, output int cnt, output int gap_min, output int gap_max);
    int last = -1;
    cnt = 0; gap_min = 1 << 30; gap_max = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      if (tick) begin
        if (last >= 0) begin
          if (i - last < gap_min) gap_min = i - last;
          if (i - last > gap_max) gap_max = i - last;
        end
        last = i; cnt++;
      end
    end
  endtask

  initial begin
    int cnt, gmin, gmax;
    rst = 1'b1; run = 1'b0; load = 1'b0; af_red_inc = 1'b1; up_down = 1'b1; rd_ok = 1'b0;
    af_amount = 16'd0; wdata_pat = 16'h1234; waddr_pat = 4'h5; raddr_pat = 4'h6;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    // idle: run=0 gives no pattern
    count_ticks(10, cnt, gmin, gmax);
    check(cnt == 0, "no pattern while run=0");
    check(mem.we == 1'b0 && mem.re == 1'b0, "strobes low when idle");
    // load the activity factor (value used in the document's simulation: 10)
    @(negedge clk); load = 1'b1; af_amount = 16'd10; run = 1'b1;
    #1 check(tick == 1'b0, "load suppresses pattern");
    @(negedge clk); load = 1'b0;
    check(af_value == 16'd10, "af loaded");
    // increased activity: a pattern every cycle
    af_red_inc = 1'b1;
    count_ticks(20, cnt, gmin, gmax);
    check(cnt == 20, $sformatf("increased activity: %0d patterns in 20 cycles", cnt));
    // reduced activity, counting up
    af_red_inc = 1'b0; up_down = 1'b1;
    count_ticks(120, cnt, gmin, gmax);
    check(gmin == 11 && gmax == 11, $sformatf("reduced/up gap %0d..%0d, want 11", gmin, gmax));
    check(cnt >= 10 && cnt <= 11, $sformatf("reduced/up count %0d", cnt));
    // reduced activity, counting down
    up_down = 1'b0;
    count_ticks(120, cnt, gmin, gmax);
    check(gmin == 11 && gmax == 11, $sformatf("reduced/down gap %0d..%0d, want 11", gmin, gmax));
    // down count visible on af_count
    begin
      logic [15:0] c0;
      @(negedge clk);
      if (tick) @(negedge clk);
      c0 = af_count;
      @(negedge clk);
      if (!tick) check(af_count == c0 - 16'd1, "idle counter decrements");
    end
    // run=0 stops patterns
    run = 1'b0;
    count_ticks(30, cnt, gmin, gmax);
    check(cnt == 0, "pc/enable low stops patterns");
    // MUX registers: capture on tick, hold otherwise
    run = 1'b1; af_red_inc = 1'b0; up_down = 1'b1;
    load = 1'b1; af_amount = 16'd2; @(negedge clk); load = 1'b0;
    rd_ok = 1'b1;
    @(negedge clk);
    last_d = mem.wdata[15:0];
    for (int i = 0; i < 12; i++) begin
      logic t;
      logic [15:0] d; logic [3:0] wa, ra;
      d = 16'($urandom); wa = 4'($urandom); ra = 4'($urandom);
      wdata_pat = d; waddr_pat = wa; raddr_pat = ra;
      #1 t = tick;
      @(negedge clk);
      check(mem.we == t && mem.re == t, $sformatf("strobes follow tick (%0d)", i));
      if (t) check(mem.wdata[15:0] == d && mem.waddr[3:0] == wa && mem.raddr[3:0] == ra, "MUX captures pattern");
      else   check(mem.wdata[15:0] == last_d, "MUX holds when no pattern");
      last_d = mem.wdata[15:0];
    end
    // rd_ok low: write without read
    af_red_inc = 1'b1; rd_ok = 1'b0;
    @(negedge clk);
    check(mem.we == 1'b1 && mem.re == 1'b0, "read strobe needs rd_ok");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
