// prpg: pseudo-random pattern generator of the memory BIST (LFSR-1..3).
//
// LFSR-1 (DATA_W bits) produces write data, LFSR-2 (ADDR_W bits) write
// addresses and LFSR-3 (ADDR_W bits) read addresses; the three LFSRs and
// their roles follow the document. LFSR-1 and LFSR-2 advance together on
// step_w, once per pattern issued by the activity-factor stage, so no
// pattern is skipped or repeated within a period. LFSR-3 has the same
// polynomial and seed as LFSR-2 but advances on step_r, which the test
// controller starts a fixed number of patterns later: the read-address
// sequence is the write-address sequence delayed, so every read finds a word
// that has been written. The address LFSRs run in full-cycle (de Bruijn)
// mode and visit all 2^ADDR_W addresses. Polynomials, seeds and the lagged
// read LFSR are choices of this implementation.
//
// Outputs are the LFSR states; they change on the clock edge after a step.
module prpg #(
  parameter int unsigned       DATA_W     = 16,
  parameter int unsigned       ADDR_W     = 4,
  parameter logic [DATA_W-1:0] DATA_TAPS  = DATA_W'(16'h002D),
  parameter logic [DATA_W-1:0] DATA_SEED  = DATA_W'(16'hACE1),
  parameter logic [ADDR_W-1:0] ADDR_TAPS  = ADDR_W'(4'h3),
  parameter logic [ADDR_W-1:0] ADDR_SEED  = ADDR_W'(1)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              step_w,
  input  logic              step_r,
  output logic [DATA_W-1:0] wdata,
  output logic [ADDR_W-1:0] waddr,
  output logic [ADDR_W-1:0] raddr
);

  // LFSR-1: write data
  lfsr #(.WIDTH(DATA_W), .TAPS(DATA_TAPS), .SEED(DATA_SEED), .FULL_CYCLE(1'b0))
    u_lfsr_wdata (.clk, .rst, .step(step_w), .q(wdata));

  // LFSR-2: write address
  lfsr #(.WIDTH(ADDR_W), .TAPS(ADDR_TAPS), .SEED(ADDR_SEED), .FULL_CYCLE(1'b1))
    u_lfsr_waddr (.clk, .rst, .step(step_w), .q(waddr));

  // LFSR-3: read address
  lfsr #(.WIDTH(ADDR_W), .TAPS(ADDR_TAPS), .SEED(ADDR_SEED), .FULL_CYCLE(1'b1))
    u_lfsr_raddr (.clk, .rst, .step(step_r), .q(raddr));

endmodule
