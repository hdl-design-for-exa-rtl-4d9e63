// prbs_mux_gen: multi-pattern PRBS generator.
//
// One WIDTH-stage shift register whose feedback XOR takes its two inputs
// through a multiplexer, so the same register produces any of the ITU patterns
// 2^7-1, 2^10-1, 2^15-1, 2^23-1 and 2^31-1 (taps in prbs_pkg). The design names
// a multiplexer and registers with different tapping points but does not draw
// this part; sharing a single register between the patterns is this design's
// choice. The 2^48-1, 2^52-1 and 2^63-1 patterns of the tap table do not fit a
// 32-stage register and are not offered.
//
// A change of sel reloads the seed (all ones) one cycle later, so a new pattern
// always starts from the same non-zero state and cannot start from the all-zero
// lock-up state of its own stages.
//
// Interface: clk; synchronous active-high rst; en advances one bit; sel picks
// the pattern. state[i] is stage Fi; bit_out is F0, the newest bit, so the
// serial stream obeys s[n] = s[n-A] ^ s[n-B] for taps (A, B).
// Timing: one bit per cycle with en high; the cycle after sel changes is spent
// reloading the seed whatever en is.
module prbs_mux_gen
  import prbs_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  pattern_e         sel,
  output logic [WIDTH-1:0] state,
  output logic             bit_out
);

  pattern_e sel_q;
  localparam int unsigned IW = $clog2(WIDTH);

  taps_t    taps;
  logic [IW-1:0] idx_a, idx_b;
  logic     feedback;

  assign taps     = pattern_taps(sel);
  // Stage numbers are 1-based; register bit i is stage i+1.
  assign idx_a     = IW'(taps.tap_a - 6'd1);
  assign idx_b     = IW'(taps.tap_b - 6'd1);
  assign feedback  = state[idx_a] ^ state[idx_b];

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q <= sel;
      state <= '1;
    end else if (sel != sel_q) begin
      sel_q <= sel;
      state <= '1;
    end else if (en) begin
      state <= {state[WIDTH-2:0], feedback};
    end
  end

  assign bit_out = state[0];

  initial begin
    assert (WIDTH >= 31)
      else $fatal(1, "prbs_mux_gen: WIDTH must hold the 31-stage pattern");
  end

endmodule
