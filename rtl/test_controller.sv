// test_controller: sequencing and status of the memory BIST.
//
//   run       = enable AND pc: the BIST runs only while both are high.
//   rd_ok     rises once READ_LAG patterns have been issued; from then on
//             each pattern also carries a read, and step_r advances the
//             read-address LFSR with it. The read-address sequence is thus
//             the write-address sequence delayed by READ_LAG patterns, so
//             every read checks a word written READ_LAG patterns earlier.
//   sig_valid is mem_re delayed one cycle: the signatures have taken the
//             read and the response analyser may compare them.
//   fault_det, sa0_det, sa1_det are sticky records of a comparator mismatch
//             and of its polarity.
// The document names a test controller that commands the pattern generator
// and the comparator; this particular set of controls is this
// implementation's choice. READ_LAG must be at least 1, because a read in
// the same pattern as the write would see the word before it is written.
// Synchronous active-high reset.
module test_controller #(
  parameter int unsigned READ_LAG = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic pc,
  input  logic tick,
  input  logic mem_re,
  input  logic mismatch,
  input  logic sa0_any,
  input  logic sa1_any,
  output logic run,
  output logic rd_ok,
  output logic step_r,
  output logic sig_valid,
  output logic fault_det,
  output logic sa0_det,
  output logic sa1_det
);

  localparam int unsigned LAG_W = $clog2(READ_LAG + 1);

  logic [LAG_W-1:0] lag_q;

  always_comb begin
    run    = enable && pc;
    rd_ok  = (lag_q >= LAG_W'(READ_LAG));
    step_r = tick && rd_ok;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lag_q     <= '0;
      sig_valid <= 1'b0;
      fault_det <= 1'b0;
      sa0_det   <= 1'b0;
      sa1_det   <= 1'b0;
    end else begin
      if (tick && !rd_ok) lag_q <= lag_q + 1'b1;
      sig_valid <= mem_re;
      if (mem_re && mismatch) fault_det <= 1'b1;
      if (mem_re && sa0_any)  sa0_det   <= 1'b1;
      if (mem_re && sa1_any)  sa1_det   <= 1'b1;
    end
  end

  initial begin
    assert (READ_LAG >= 1) else $error("READ_LAG must be at least 1");
  end

endmodule
