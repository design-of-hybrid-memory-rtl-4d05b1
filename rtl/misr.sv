// misr: multiple-input signature register (output response compactor).
//
// On each cycle with en=1 the register shifts right with the same XOR
// feedback as the LFSR (bit 0 XOR the bits set in TAPS enters at the top)
// and the input word is XORed in:
//   sig <= {fb, sig[WIDTH-1:1]} ^ din
// Two streams with equal words in equal order give equal signatures. The
// document names the MISR as response analyser without giving its
// structure; this standard form is this implementation's choice.
// Synchronous active-high reset clears the signature.
module misr #(
  parameter int unsigned      WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS  = WIDTH'(16'h002D)
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] sig
);

  logic fb;
  always_comb fb = sig[0] ^ (^(sig & TAPS & ~WIDTH'(1)));

  always_ff @(posedge clk) begin
    if (rst)
      sig <= '0;
    else if (en)
      sig <= {fb, sig[WIDTH-1:1]} ^ din;
  end

endmodule
