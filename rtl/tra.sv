// tra: test response analyser driving the BIST pass/fail output.
//
// When en=1 the flip-flop out takes (in1 == in2); otherwise it holds.
// out=1 means pass and out=0 fail, as the document defines bist_out, and
// reset clears it to 0. The output comes straight from the flip-flop, as the
// document's timing report shows a flip-flop-to-pin path from this block to
// bist_out. Comparing two signatures is this implementation's reading of
// the block's inputs.
module tra #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] in1,
  input  logic [WIDTH-1:0] in2,
  output logic             out
);

  always_ff @(posedge clk) begin
    if (rst)
      out <= 1'b0;
    else if (en)
      out <= (in1 == in2);
  end

endmodule
