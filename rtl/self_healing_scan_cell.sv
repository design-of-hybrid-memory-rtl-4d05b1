// self_healing_scan_cell: repair logic that corrects data read from the
// faulty memory (the "hybrid memory logic").
//
// A table of ENTRIES records {valid, addr, mask} logs the faulty bits found
// by the space comparator. On a read (valid=1) with a non-zero err_vec:
//   - if raddr is already logged, its mask takes the new bits (OR);
//   - else, if a record is free, it is allocated with mask = err_vec;
//   - else the word cannot be logged and overflow is set (sticky).
// The corrected word takes every logged faulty bit of raddr (including the
// bits logged by the current read) from the reference copy and the other
// bits from the memory: healed = (raw & ~fix) | (ref & fix). A word whose
// fault could not be logged is passed on uncorrected, so it shows up as a
// failure downstream. repaired=1 when the current read had bits replaced.
// The document states that the BIST fixes the stored data but not how; the
// table, its size and the bit-level substitution are this implementation's
// choices.
//
// Timing: healed_data and repaired are combinational; the table and
// overflow update on the clock edge. Synchronous active-high reset empties
// the table.
module self_healing_scan_cell #(
  parameter int unsigned DATA_W  = 16,
  parameter int unsigned ADDR_W  = 4,
  parameter int unsigned ENTRIES = 4
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         valid,
  input  logic [ADDR_W-1:0]            raddr,
  input  logic [DATA_W-1:0]            raw_data,
  input  logic [DATA_W-1:0]            ref_data,
  input  logic [DATA_W-1:0]            err_vec,
  output logic [DATA_W-1:0]            healed_data,
  output logic                         repaired,
  output logic                         overflow,
  output logic [$clog2(ENTRIES+1)-1:0] used
);

  typedef struct packed {
    logic              valid;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] mask;
  } entry_t;

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;

  entry_t tbl [ENTRIES];

  logic                       hit, free_avail, can_log, new_err;
  logic [IDX_W-1:0]          hit_idx, free_idx;
  logic [DATA_W-1:0]          fix;

  always_comb begin
    hit        = 1'b0;
    hit_idx    = '0;
    free_avail = 1'b0;
    free_idx   = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tbl[i].valid && tbl[i].addr == raddr) begin
        hit     = 1'b1;
        hit_idx = IDX_W'(i);
      end
      if (!tbl[i].valid) begin
        free_avail = 1'b1;
        free_idx   = IDX_W'(i);
      end
    end
    new_err     = valid && (err_vec != '0);
    can_log     = hit || free_avail;
    fix         = (hit ? tbl[hit_idx].mask : '0) | ((valid && can_log) ? err_vec : '0);
    healed_data = (raw_data & ~fix) | (ref_data & fix);
    repaired    = valid && (fix != '0);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < ENTRIES; i++) tbl[i] <= '0;
      overflow <= 1'b0;
    end else if (new_err) begin
      if (hit)
        tbl[hit_idx].mask <= tbl[hit_idx].mask | err_vec;
      else if (free_avail)
        tbl[free_idx] <= '{valid: 1'b1, addr: raddr, mask: err_vec};
      else
        overflow <= 1'b1;
    end
  end

  always_comb begin
    used = '0;
    for (int i = 0; i < ENTRIES; i++)
      used = used + ($clog2(ENTRIES+1))'(tbl[i].valid);
  end

endmodule
