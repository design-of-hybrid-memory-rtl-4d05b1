// cut_ram: the memory under test, with coded stuck-at faults.
//
// A 2^ADDR_W x DATA_W array with one synchronous write port and one
// asynchronous read port (separate write and read addresses, as the BIST
// drives them from separate generators). Stuck-at faults are part of the
// model, as in the document where they are created in code: FAULTS is a list
// of up to hml_pkg::FAULT_SLOTS records {kind, addr, mask}. When a word is
// written, the bits of every matching record are forced to 0 (FAULT_SA0) or
// 1 (FAULT_SA1), so they read back stuck whatever was written. The default
// list is empty (fault-free memory). Depth, port structure and the fault
// record format are this implementation's choices.
//
// Timing: write on the rising edge with we=1; rdata follows raddr
// combinationally and shows a write from the following cycle on.
module cut_ram
  import hml_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 4,
  parameter fault_list_t FAULTS = '0
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << ADDR_W;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] stored;

  // value the addressed cells actually hold after a write
  always_comb begin
    stored = wdata;
    for (int f = 0; f < int'(FAULT_SLOTS); f++) begin
      if (FAULTS[f].addr[ADDR_W-1:0] == waddr) begin
        if (FAULTS[f].kind == FAULT_SA0) stored = stored & ~FAULTS[f].mask[DATA_W-1:0];
        if (FAULTS[f].kind == FAULT_SA1) stored = stored |  FAULTS[f].mask[DATA_W-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= stored;
  end

  assign rdata = mem[raddr];

endmodule
