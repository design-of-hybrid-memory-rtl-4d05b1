// tb_bist_controller: end-to-end testbench of the memory BIST.
//
// Three copies of bist_controller receive the same pin stimulus:
//   u_clean  fault-free memory, default parameters;
//   u_rep    stuck-at-0 cells (address 3, bits 0 and 8) and a stuck-at-1
//            cell (address 10, bit 15), which the repair table can hold;
//   u_ovf    faulty words at addresses 3 and 10 but a one-entry repair
//            table, so the second faulty word cannot be repaired;
//   u_lag    fault-free memory read back three patterns after writing.
// The stimulus loads af_amount=10, runs with increased activity, then
// reduced activity counting up and counting down, pauses with pc low and
// with enable low, and resumes. An independent model of the LFSRs and the
// phase shifter predicts every word written; every read must return the
// word written one pattern earlier on data_out (for u_clean and, after
// repair, for u_rep), or three patterns earlier for u_lag. Pattern spacing, bist_out latency and the final
// flags are checked, and each mechanism (load, both activity modes, both
// count directions, pause, stuck-at-0 and stuck-at-1 detection, repair,
// repair overflow) must occur at least once.
module tb_bist_controller;
  import hml_pkg::*;

  localparam fault_list_t F_REP = '{
    '{kind: FAULT_NONE, addr: 16'd0,  mask: 32'h0},
    '{kind: FAULT_NONE, addr: 16'd0,  mask: 32'h0},
    '{kind: FAULT_SA1,  addr: 16'd10, mask: 32'h8000},
    '{kind: FAULT_SA0,  addr: 16'd3,  mask: 32'h0101}};

  logic clk = 1'b0, reset, enable, pc, af_red_inc, up_down, load;
  logic [15:0] af_amount;
  logic        bo_c, bo_r, bo_o;
  logic [15:0] do_c, do_r, do_o;
  logic        fd_c, s0_c, s1_c, ov_c;
  logic        fd_r, s0_r, s1_r, ov_r;
  logic        fd_o, s0_o, s1_o, ov_o;
  logic        bo_l, fd_l, s0_l, s1_l, ov_l;
  logic [15:0] do_l;
  int          n_reads_l;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_controller u_clean (.clk, .reset, .enable, .pc, .af_red_inc, .up_down, .load, .af_amount,
    .bist_out(bo_c), .data_out(do_c), .fault_det(fd_c), .sa0_det(s0_c), .sa1_det(s1_c), .repair_ovf(ov_c));
  bist_controller #(.FAULTS(F_REP)) u_rep (.clk, .reset, .enable, .pc, .af_red_inc, .up_down, .load, .af_amount,
    .bist_out(bo_r), .data_out(do_r), .fault_det(fd_r), .sa0_det(s0_r), .sa1_det(s1_r), .repair_ovf(ov_r));
  bist_controller #(.FAULTS(F_REP), .REPAIR_ENTRIES(1)) u_ovf (.clk, .reset, .enable, .pc, .af_red_inc, .up_down, .load, .af_amount,
    .bist_out(bo_o), .data_out(do_o), .fault_det(fd_o), .sa0_det(s0_o), .sa1_det(s1_o), .repair_ovf(ov_o));

  bist_controller #(.READ_LAG(3)) u_lag (.clk, .reset, .enable, .pc, .af_red_inc, .up_down, .load, .af_amount,
    .bist_out(bo_l), .data_out(do_l), .fault_det(fd_l), .sa0_det(s0_l), .sa1_det(s1_l), .repair_ovf(ov_l));

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model of the pattern generator -------------
  logic [15:0] m_d;          // LFSR-1 state
  logic [3:0]  m_a;          // LFSR-2 state
  logic [15:0] wr_data [4096];
  logic [3:0]  wr_addr [4096];
  int          n_pat;        // patterns issued so far
  int          n_reads;

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

  // ---------------- mechanism counters ------------------------------------
  int c_load, c_inc, c_red_up, c_red_down, c_pause, c_sa0, c_sa1, c_repair, c_ovf_fail;
  int last_tick_cycle, cyc, first_read_cycle, bad_o;
  int gap_min_red, gap_max_red;
  bit in_reduced;

  always @(negedge clk) begin
    cyc++;
    if (!reset) begin
      // reads issued by the pattern of the previous cycle
      if (u_clean.mem.re) begin
        logic [15:0] exp;
        exp = wr_data[n_pat - 2];
        check(u_clean.mem.raddr[3:0] == wr_addr[n_pat - 2], "read address is previous write address");
        check(do_c == exp, $sformatf("clean read %0d: got %h exp %h", n_reads, do_c, exp));
        check(do_r == exp, $sformatf("repaired read %0d: got %h exp %h", n_reads, do_r, exp));
        if (do_o != exp) bad_o++;
        if (u_rep.s1.mismatch && |u_rep.s1.sa0_vec) c_sa0++;
        if (u_rep.s1.mismatch && |u_rep.s1.sa1_vec) c_sa1++;
        if (u_rep.s1.mismatch) c_repair++;
        if (first_read_cycle < 0) first_read_cycle = cyc;
        n_reads++;
      end
      if (u_lag.mem.re) begin
        check(u_lag.mem.raddr[3:0] == wr_addr[n_pat - 4], "lag-3 read address");
        check(do_l == wr_data[n_pat - 4], $sformatf("lag-3 read %0d: got %h exp %h", n_reads_l, do_l, wr_data[n_pat - 4]));
        n_reads_l++;
      end
      check(u_rep.tick == u_clean.tick && u_ovf.tick == u_clean.tick && u_lag.tick == u_clean.tick, "copies in step");
      if (load) c_load++;
      if (!(enable && pc)) begin
        c_pause++;
        check(!u_clean.tick, "no pattern while paused");
      end
      if (u_clean.tick) begin
        check(!load && enable && pc, "pattern only while running");
        if (af_red_inc) c_inc++;
        else if (up_down) c_red_up++;
        else c_red_down++;
        if (in_reduced && last_tick_cycle > 0) begin
          if (cyc - last_tick_cycle < gap_min_red) gap_min_red = cyc - last_tick_cycle;
          if (cyc - last_tick_cycle > gap_max_red) gap_max_red = cyc - last_tick_cycle;
        end
        last_tick_cycle = cyc;
        wr_data[n_pat] = pshift(m_d);
        wr_addr[n_pat] = m_a;
        m_d = d_next(m_d);
        m_a = a_next(m_a);
        n_pat++;
      end
      // bist_out latency: 0 until two cycles after the first read
      if (first_read_cycle > 0 && cyc == first_read_cycle + 1) check(bo_c == 1'b0, "bist_out not yet valid");
      if (first_read_cycle > 0 && cyc == first_read_cycle + 2) check(bo_c == 1'b1, "bist_out pass two cycles after first read");
    end
  end

  task automatic cycles(int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    m_d = 16'hACE1; m_a = 4'h1; n_pat = 0; n_reads = 0; n_reads_l = 0; cyc = 0;
    first_read_cycle = -1; last_tick_cycle = 0; bad_o = 0;
    gap_min_red = 1 << 30; gap_max_red = 0; in_reduced = 1'b0;
    reset = 1'b1; enable = 1'b0; pc = 1'b0; af_red_inc = 1'b0; up_down = 1'b0; load = 1'b0; af_amount = '0;
    cycles(4);
    check(bo_c == 1'b0 && bo_r == 1'b0 && !fd_c && !ov_c, "outputs zero in reset");
    reset = 1'b0; enable = 1'b1; pc = 1'b1; af_red_inc = 1'b1; load = 1'b1; af_amount = 16'd10;
    cycles(3);
    check(u_clean.p3.af_value == 16'd10, "af_amount loaded");
    check(n_pat == 0, "no pattern during load");
    load = 1'b0; up_down = 1'b1;
    cycles(80);                                    // increased activity
    check(c_inc == 80, $sformatf("increased activity: %0d patterns in 80 cycles", c_inc));
    af_red_inc = 1'b0; up_down = 1'b1;             // reduced, counting up
    cycles(12); in_reduced = 1'b1; last_tick_cycle = 0;
    cycles(220);
    in_reduced = 1'b0; up_down = 1'b0;             // reduced, counting down
    cycles(12); in_reduced = 1'b1; last_tick_cycle = 0;
    cycles(220);
    in_reduced = 1'b0;
    check(gap_min_red == 11 && gap_max_red == 11, $sformatf("reduced activity period %0d..%0d, want 11", gap_min_red, gap_max_red));
    pc = 1'b0; cycles(25);                         // paused by pc
    pc = 1'b1; enable = 1'b0; cycles(25);          // paused by enable
    enable = 1'b1; af_red_inc = 1'b1; cycles(60);  // resume
    enable = 1'b0; cycles(5);
    // final status
    check(n_reads == n_pat - 1, $sformatf("reads %0d patterns %0d", n_reads, n_pat));
    check(n_pat >= 48, "at least three address periods tested");
    check(bo_c == 1'b1 && !fd_c && !s0_c && !s1_c && !ov_c, "fault-free memory passes");
    check(bo_r == 1'b1 && fd_r && s0_r && s1_r && !ov_r, "repaired memory detected faults and passes");
    check(bo_o == 1'b0 && fd_o && ov_o, "unrepairable memory fails");
    check(n_reads_l == n_pat - 3, $sformatf("lag-3 reads %0d patterns %0d", n_reads_l, n_pat));
    check(bo_l == 1'b1 && !fd_l && !ov_l, "lag-3 memory passes");
    check(bad_o > 0, "unrepaired words reach data_out");
    if (ov_o) c_ovf_fail++;
    $display("patterns=%0d reads=%0d load=%0d inc=%0d red_up=%0d red_down=%0d pause=%0d sa0=%0d sa1=%0d repair=%0d ovf=%0d",
             n_pat, n_reads, c_load, c_inc, c_red_up, c_red_down, c_pause, c_sa0, c_sa1, c_repair, c_ovf_fail);
    check(c_load > 0, "load happened");
    check(c_inc > 0, "increased activity happened");
    check(c_red_up > 0, "reduced activity counting up happened");
    check(c_red_down > 0, "reduced activity counting down happened");
    check(c_pause > 0, "pause happened");
    check(c_sa0 > 0, "stuck-at-0 detected");
    check(c_sa1 > 0, "stuck-at-1 detected");
    check(c_repair > 0, "repair happened");
    check(c_ovf_fail > 0, "repair overflow happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
