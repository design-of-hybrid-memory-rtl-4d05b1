// tb_bist_controller_full: one complete BIST run of bist_controller with
// every parameter at its default (16-bit data, 16-word memory, fault-free).
//
// Pin sequence: reset, then enable and pc high with load=1 and
// af_amount=10, then increased activity until every one of the 16
// addresses has been written and read back twice, then reduced activity
// (one pattern per 11 cycles) for another address period. Each read on
// data_out is compared with an independent model of the pattern generator
// (the word written one pattern earlier), the read addresses must cover all
// 16 words, and bist_out must be 1 (pass) at the end.
module tb_bist_controller_full;
  logic clk = 1'b0, reset, enable, pc, af_red_inc, up_down, load;
  logic [15:0] af_amount, data_out;
  logic        bist_out, fault_det, sa0_det, sa1_det, repair_ovf;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller dut (.*);

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [15:0] d_next(logic [15:0] s);
    return {s[0] ^ s[2] ^ s[3] ^ s[5], s[15:1]};
  endfunction
  function automatic logic [3:0] a_next(logic [3:0] s);
    logic b = s[0] ^ s[1];
    if (s[3:1] == 3'b000) b = ~b;
    return {b, s[3:1]};
  endfunction
  function automatic logic [15:0] pshift(logic [15:0] x);
    logic [15:0] y;
    for (int i = 0; i < 16; i++) y[i] = x[i] ^ ((i < 13) ? x[i+3] : 1'b0);
    return y;
  endfunction

  logic [15:0] m_d = 16'hACE1;
  logic [3:0]  m_a = 4'h1;
  logic [15:0] prev_data, last_data;  // words of the pattern before last, and of the last
  logic [3:0]  prev_addr, last_addr;
  int          n_pat = 0, n_reads = 0;
  bit          read_seen [16];

  // when a read is in the memory stage, the last pattern issued is the one
  // that carries it and the word read is that of the pattern before
  always @(negedge clk) begin
    if (!reset) begin
      if (dut.mem.re) begin
        check(dut.mem.raddr[3:0] == prev_addr, "read address");
        check(data_out == prev_data, $sformatf("read %0d got %h exp %h", n_reads, data_out, prev_data));
        read_seen[dut.mem.raddr[3:0]] = 1'b1;
        n_reads++;
      end
      if (dut.tick) begin
        prev_data = last_data;
        prev_addr = last_addr;
        last_data = pshift(m_d);
        last_addr = m_a;
        m_d = d_next(m_d);
        m_a = a_next(m_a);
        n_pat++;
      end
    end
  end

  initial begin
    reset = 1'b1; enable = 1'b0; pc = 1'b0; af_red_inc = 1'b1; up_down = 1'b1; load = 1'b0; af_amount = '0;
    repeat (4) @(negedge clk);
    check(bist_out == 1'b0, "bist_out low in reset");
    reset = 1'b0; enable = 1'b1; pc = 1'b1; load = 1'b1; af_amount = 16'd10;
    repeat (3) @(negedge clk);
    load = 1'b0;
    repeat (34) @(negedge clk);
    af_red_inc = 1'b0;
    repeat (16 * 11) @(negedge clk);
    enable = 1'b0;
    repeat (4) @(negedge clk);
    check(n_pat == 34 + 16, $sformatf("patterns issued: %0d, want 50", n_pat));
    check(n_reads == n_pat - 1, "every pattern after the first reads back");
    for (int a = 0; a < 16; a++) check(read_seen[a], $sformatf("address %0d read back", a));
    check(bist_out == 1'b1, "BIST passes");
    check(!fault_det && !sa0_det && !sa1_det && !repair_ovf, "no fault flags");
    $display("patterns=%0d reads=%0d", n_pat, n_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
