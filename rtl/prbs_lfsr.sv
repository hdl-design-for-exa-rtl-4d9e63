// prbs_lfsr: the 2^23-1 pseudo-random bit sequence register.
//
// WIDTH D flip-flops F0..F(WIDTH-1) form a Fibonacci (many-to-one) LFSR: the
// outputs of stages TAP_A and TAP_B (counted from 1, so F(TAP_A-1) and
// F(TAP_B-1)) go to one XOR gate, and the XOR output is shifted into F0 while
// every stage passes its bit to the next. With the defaults (32 stages, taps
// 18 and 23, polynomial x^23 + x^18 + 1) the first 23 stages run through all
// 2^23-1 non-zero states; F23..F31 carry delayed copies of the same sequence.
// The register size and the taps follow the design; reading the tap numbers as
// 1-based stage numbers (the reading that gives a 2^23-1 period) and the
// all-ones seed are this design's choices.
//
// Interface: clk; rst (synchronous, loads SEED; a zero seed would lock the
// register); en advances the register by one bit per cycle it is high.
// state[i] is stage Fi; bit_out is F0, the newest bit.
// Timing: state changes at the clock edge that ends a cycle with en high.
module prbs_lfsr #(
  parameter int unsigned     WIDTH = 32,
  parameter int unsigned     TAP_A = 18,
  parameter int unsigned     TAP_B = 23,
  parameter logic [WIDTH-1:0] SEED = '1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] state,
  output logic             bit_out
);

  logic feedback;

  assign feedback = state[TAP_A-1] ^ state[TAP_B-1];

  always_ff @(posedge clk) begin
    if (rst)     state <= SEED;
    else if (en) state <= {state[WIDTH-2:0], feedback};
  end

  assign bit_out = state[0];

  // The feedback stages must never all be zero: that state would never leave.
  a_no_lockup: assert property (@(posedge clk) disable iff (rst) state[TAP_B-1:0] != '0);

  initial begin
    assert (TAP_A >= 1 && TAP_A < TAP_B && TAP_B <= WIDTH)
      else $fatal(1, "prbs_lfsr: taps must satisfy 1 <= TAP_A < TAP_B <= WIDTH");
    assert (SEED[TAP_B-1:0] != '0)
      else $fatal(1, "prbs_lfsr: seed must be non-zero in the first TAP_B stages");
  end

endmodule
