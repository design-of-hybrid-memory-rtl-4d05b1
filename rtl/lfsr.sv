// lfsr: n-stage Fibonacci linear feedback shift register.
//
// The stages are X(WIDTH-1)..X0 = q[WIDTH-1:0]. On every cycle with step=1
// each stage takes the value of the stage to its left (X(i) <= X(i+1)) and
// the leftmost stage X(WIDTH-1) takes the feedback: X0 XOR the stages whose
// bit is set in TAPS (TAPS[i] is the connection h_i of stage X(i); TAPS[0]
// is ignored because X0 is always part of the feedback). This is the
// structure of the classic n-stage LFSR drawn as D flip-flops on a common
// clock with an XOR chain back to the first stage.
//
// With FULL_CYCLE=1 the feedback is also XORed with "X(WIDTH-1)..X1 all
// zero" (de Bruijn extension). A maximal-length tap set then visits all
// 2^WIDTH states, zero included, instead of 2^WIDTH-1; the address
// generators use this so that every memory address is exercised. This
// extension is a choice of this implementation.
//
// Timing: synchronous active-high reset loads SEED; q changes on the clock
// edge after step. The default taps (X0^X2^X3^X5 for 16 bits) give the
// maximal period 65535.
module lfsr #(
  parameter int unsigned      WIDTH      = 16,
  parameter logic [WIDTH-1:0] TAPS       = WIDTH'(16'h002D),
  parameter logic [WIDTH-1:0] SEED       = WIDTH'(1),
  parameter bit               FULL_CYCLE = 1'b0
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             step,
  output logic [WIDTH-1:0] q
);

  logic fb;

  always_comb begin
    fb = q[0] ^ (^(q & TAPS & ~WIDTH'(1)));
    if (FULL_CYCLE && (q[WIDTH-1:1] == '0))
      fb = ~fb;
  end

  always_ff @(posedge clk) begin
    if (rst)
      q <= SEED;
    else if (step)
      q <= {fb, q[WIDTH-1:1]};
  end

endmodule
