// scan_path: activity-factor control and MUX-1..3 of the memory BIST.
//
// The activity factor sets how often a new test pattern reaches the memory.
// af (AF_W bits) is loaded from af_amount while load=1 and cleared by reset.
// While run=1 (enable AND pc) and load=0:
//   af_red_inc=1  increased activity: a pattern is issued every cycle.
//   af_red_inc=0  reduced activity: a pattern is issued once every af+1
//                 cycles. An idle counter counts up from 0 to af
//                 (up_down=1) or down from af to 0 (up_down=0); a pattern
//                 is issued when it reaches the end and it restarts.
// The cycle a pattern is issued, tick=1 (it also steps the LFSRs) and the
// three MUX registers take the LFSR write data, write address and read
// address; the write strobe is set, and the read strobe if rd_ok. On every
// other cycle the MUX registers keep their value with both strobes low, so
// the memory inputs do not toggle. The pin meanings follow the document's
// pin description; the hold input of the MUXes, the idle counter and the
// register stage are this implementation's reading of it.
//
// Timing: tick is combinational from the current state and inputs; mem is
// registered and valid the cycle after tick.
module scan_path
  import hml_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned ADDR_W = 4,
  parameter int unsigned AF_W   = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              load,
  input  logic [AF_W-1:0]   af_amount,
  input  logic              af_red_inc,
  input  logic              up_down,
  input  logic              rd_ok,
  input  logic [DATA_W-1:0] wdata_pat,
  input  logic [ADDR_W-1:0] waddr_pat,
  input  logic [ADDR_W-1:0] raddr_pat,
  output logic              tick,
  output mem_req_t          mem,
  output logic [AF_W-1:0]   af_value,
  output logic [AF_W-1:0]   af_count
);

  logic [AF_W-1:0] af_q, cnt_q;
  logic            cnt_end;

  assign af_value = af_q;
  assign af_count = cnt_q;

  always_comb begin
    cnt_end = up_down ? (cnt_q >= af_q) : (cnt_q == '0);
    tick    = run && !load && (af_red_inc || cnt_end);
  end

  // activity factor and idle counter
  always_ff @(posedge clk) begin
    if (rst) begin
      af_q  <= '0;
      cnt_q <= '0;
    end else if (load) begin
      af_q  <= af_amount;
      cnt_q <= up_down ? '0 : af_amount;
    end else if (run) begin
      if (tick)
        cnt_q <= up_down ? '0 : af_q;
      else if (up_down)
        cnt_q <= cnt_q + 1'b1;
      else
        cnt_q <= cnt_q - 1'b1;
    end
  end

  // MUX-1 (write data), MUX-2 (write address), MUX-3 (read address)
  always_ff @(posedge clk) begin
    if (rst) begin
      mem <= '0;
    end else begin
      mem.we <= tick;
      mem.re <= tick && rd_ok;
      if (tick) begin
        mem.wdata <= MAX_DATA_W'(wdata_pat);
        mem.waddr <= MAX_ADDR_W'(waddr_pat);
        mem.raddr <= MAX_ADDR_W'(raddr_pat);
      end
    end
  end

endmodule
