// phase_shifter: XOR network between the PRPG and the scan path.
//
// Adjacent stages of a Fibonacci LFSR hold the same bit one cycle apart, so
// the raw state is strongly correlated from bit to bit. The phase shifter
// mixes each bit with the bit SPREAD positions above it:
//   data_out = data_in ^ (data_in >> SPREAD)
// This map is invertible (like a Gray code), so distinct LFSR states remain
// distinct patterns and the no-repeat property of the LFSR is kept. The
// document names this block and its place in the chain but not its
// contents; the XOR network and SPREAD are this implementation's choice.
// Purely combinational.
module phase_shifter #(
  parameter int unsigned WIDTH  = 16,
  parameter int unsigned SPREAD = 3
) (
  input  logic [WIDTH-1:0] data_in,
  output logic [WIDTH-1:0] data_out
);

  always_comb data_out = data_in ^ (data_in >> SPREAD);

endmodule
