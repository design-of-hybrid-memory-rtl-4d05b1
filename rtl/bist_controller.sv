// bist_controller: hybrid-memory-logic built-in self-test of a RAM.
//
// Pseudo-random write data, write addresses and read addresses come from
// three LFSRs (p1). The data pattern passes through a phase shifter (p2).
// The activity-factor stage (p3) decides on which cycles a new pattern
// reaches the memory and registers it through MUX-1..3. Each pattern is
// written both into the RAM under test (c1, which may hold coded stuck-at
// faults) and into a fault-free reference copy; from the READ_LAG-th
// pattern on each pattern also reads back the word written READ_LAG
// patterns earlier from both. The space comparator (s1) flags differing
// bits and their polarity. The self-healing logic (h1) logs faulty bits
// and substitutes them from the reference, giving corrected data_out. Two
// MISRs (m1 on the corrected data, m2 on the reference data) compress the
// read streams and the response analyser (u6) compares the signatures:
// bist_out=1 pass, 0 fail. A memory with stuck-at faults therefore passes
// as long as the repair table can hold all faulty words; a fault that
// cannot be logged makes the signatures differ for good and bist_out falls.
//
// Pins follow the document: clk, reset (active high, synchronous here),
// enable and pc (both high to run), af_red_inc (1: a pattern every cycle,
// 0: one every af+1 cycles), up_down (idle-counter direction), load (take
// af_amount as activity factor), af_amount[15:0], bist_out. data_out and
// the sticky flags fault_det, sa0_det, sa1_det, repair_ovf are extra
// outputs of this implementation that make the detection and the repair
// visible. Block and instance names follow the document's schematic; the
// wiring follows its architecture diagram.
//
// Latency: a pattern issued on cycle t is registered at t+1 (write and
// read happen then), the signatures take the read at the end of t+1 and
// bist_out shows the comparison from t+3.
module bist_controller
  import hml_pkg::*;
#(
  parameter int unsigned DATA_W         = 16,
  parameter int unsigned ADDR_W         = 4,
  parameter int unsigned AF_W           = 16,
  parameter int unsigned READ_LAG       = 1,
  parameter int unsigned REPAIR_ENTRIES = 4,
  parameter fault_list_t FAULTS         = '0
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              enable,
  input  logic              pc,
  input  logic              af_red_inc,
  input  logic              up_down,
  input  logic              load,
  input  logic [AF_W-1:0]   af_amount,
  output logic              bist_out,
  output logic [DATA_W-1:0] data_out,
  output logic              fault_det,
  output logic              sa0_det,
  output logic              sa1_det,
  output logic              repair_ovf
);

  logic              run, rd_ok, step_r, tick, sig_valid;
  logic [DATA_W-1:0] lfsr_wdata, ps_wdata;
  logic [ADDR_W-1:0] lfsr_waddr, lfsr_raddr;
  mem_req_t          mem;
  logic [DATA_W-1:0] ram_rdata, ref_rdata;
  logic [DATA_W-1:0] err_vec, sa0_vec, sa1_vec, healed;
  logic              mismatch;
  logic [DATA_W-1:0] sig_dut, sig_ref;

  test_controller #(.READ_LAG(READ_LAG)) u_ctrl (
    .clk, .rst(reset), .enable, .pc, .tick, .mem_re(mem.re), .mismatch,
    .sa0_any(|sa0_vec), .sa1_any(|sa1_vec),
    .run, .rd_ok, .step_r, .sig_valid, .fault_det, .sa0_det, .sa1_det
  );

  prpg #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) p1 (
    .clk, .rst(reset), .step_w(tick), .step_r,
    .wdata(lfsr_wdata), .waddr(lfsr_waddr), .raddr(lfsr_raddr)
  );

  phase_shifter #(.WIDTH(DATA_W)) p2 (.data_in(lfsr_wdata), .data_out(ps_wdata));

  scan_path #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .AF_W(AF_W)) p3 (
    .clk, .rst(reset), .run, .load, .af_amount, .af_red_inc, .up_down, .rd_ok,
    .wdata_pat(ps_wdata), .waddr_pat(lfsr_waddr), .raddr_pat(lfsr_raddr),
    .tick, .mem, .af_value(), .af_count()
  );

  cut_ram #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .FAULTS(FAULTS)) c1 (
    .clk, .we(mem.we), .waddr(mem.waddr[ADDR_W-1:0]), .wdata(mem.wdata[DATA_W-1:0]),
    .raddr(mem.raddr[ADDR_W-1:0]), .rdata(ram_rdata)
  );

  ref_data #(.DATA_W(DATA_W), .ADDR_W(ADDR_W)) r1 (
    .clk, .we(mem.we), .waddr(mem.waddr[ADDR_W-1:0]), .wdata(mem.wdata[DATA_W-1:0]),
    .raddr(mem.raddr[ADDR_W-1:0]), .rdata(ref_rdata)
  );

  space_comparator #(.WIDTH(DATA_W)) s1 (
    .valid(mem.re), .data_in(ram_rdata), .ref_in(ref_rdata),
    .err_vec, .mismatch, .sa0_vec, .sa1_vec
  );

  self_healing_scan_cell #(.DATA_W(DATA_W), .ADDR_W(ADDR_W), .ENTRIES(REPAIR_ENTRIES)) h1 (
    .clk, .rst(reset), .valid(mem.re), .raddr(mem.raddr[ADDR_W-1:0]),
    .raw_data(ram_rdata), .ref_data(ref_rdata), .err_vec,
    .healed_data(healed), .repaired(), .overflow(repair_ovf), .used()
  );

  misr #(.WIDTH(DATA_W)) m1 (.clk, .rst(reset), .en(mem.re), .din(healed),    .sig(sig_dut));
  misr #(.WIDTH(DATA_W)) m2 (.clk, .rst(reset), .en(mem.re), .din(ref_rdata), .sig(sig_ref));

  tra #(.WIDTH(DATA_W)) u6 (.clk, .rst(reset), .en(sig_valid), .in1(sig_dut), .in2(sig_ref), .out(bist_out));

  assign data_out = healed;

endmodule
