// ref_data: fault-free reference copy of the memory contents.
//
// Written with exactly the same requests as the memory under test and read
// at the same read address, it supplies the expected value of every read
// to the space comparator and the good bits to the self-healing logic.
// 2^ADDR_W x DATA_W, synchronous write, asynchronous read (same timing as
// cut_ram). The document shows a reference-data store feeding the
// comparator; holding it as a full copy is this implementation's choice.
module ref_data #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 4
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [1 << ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
