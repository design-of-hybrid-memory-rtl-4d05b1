// space_comparator: bitwise comparison of memory read data with the
// reference, classifying each differing bit by fault polarity.
//
//   err_vec  bits where data_in differs from ref_in
//   sa0_vec  bits read 0 where 1 was expected (stuck-at-0 symptom)
//   sa1_vec  bits read 1 where 0 was expected (stuck-at-1 symptom)
//   mismatch any bit differs
// All outputs are zero while valid=0. Separating the two polarities follows
// the document's use of the comparator output to tell a stuck-at-1 fault
// (outputs high) from a stuck-at-0 fault (outputs low). Combinational.
module space_comparator #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             valid,
  input  logic [WIDTH-1:0] data_in,
  input  logic [WIDTH-1:0] ref_in,
  output logic [WIDTH-1:0] err_vec,
  output logic             mismatch,
  output logic [WIDTH-1:0] sa0_vec,
  output logic [WIDTH-1:0] sa1_vec
);

  always_comb begin
    err_vec  = valid ? (data_in ^ ref_in) : '0;
    sa0_vec  = err_vec & ref_in;
    sa1_vec  = err_vec & data_in;
    mismatch = |err_vec;
  end

endmodule
