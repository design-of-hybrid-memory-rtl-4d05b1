// hml_pkg: types and constants shared by the hybrid-memory-logic BIST.
//
// The memory request that the activity-factor stage (scan_path) issues to
// the RAM under test and to the reference copy is bundled in mem_req_t.
// Stuck-at faults are injected into the RAM model by a parameter list of
// fault_t records (a fault-free RAM uses all-zero records). Field widths of
// fault_t are the largest supported (16 address bits, 32 data bits); a RAM
// uses only the low bits.
package hml_pkg;

  localparam int unsigned MAX_ADDR_W  = 16;
  localparam int unsigned MAX_DATA_W  = 32;
  localparam int unsigned FAULT_SLOTS = 4;

  typedef enum logic [1:0] {
    FAULT_NONE = 2'd0,
    FAULT_SA0  = 2'd1,  // cell bits read back as 0
    FAULT_SA1  = 2'd2   // cell bits read back as 1
  } fault_kind_e;

  typedef struct packed {
    fault_kind_e             kind;
    logic [MAX_ADDR_W-1:0]   addr;
    logic [MAX_DATA_W-1:0]   mask;  // which bits of the word are stuck
  } fault_t;

  typedef fault_t [FAULT_SLOTS-1:0] fault_list_t;

  // Memory request driven by the MUX registers of the activity-factor stage.
  typedef struct packed {
    logic                  we;
    logic [MAX_ADDR_W-1:0] waddr;
    logic [MAX_DATA_W-1:0] wdata;
    logic                  re;
    logic [MAX_ADDR_W-1:0] raddr;
  } mem_req_t;

endpackage
