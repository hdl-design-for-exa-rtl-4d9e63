// ExaPRBSSeq: 2^23-1 PRBS generator timed by a 50-bit bit-rate counter, with a
// multi-pattern transmitter and a built-in checker beside it.
//
// Main path (the design's own block): exa_clock_osc divides the input clock
// Exaclock by 2^DIV_BITS; each rising edge of its bit-rate line advances the
// 32-stage LFSR with feedback taps 18 and 23, whose whole register is PRBSout.
// The three ports Exaclock, reset and PRBSout(31:0) are those of the design's
// top-level symbol.
//
// Beside it, and sharing the same bit-rate timing, are the multiplexed
// multi-pattern generator (tx_word, tx_bit) and the receiver-side checker
// (rx_*), which the design mentions as parts of a PRBS transceiver. Their ports
// are this design's additions to the top-level symbol. rx_bit comes from
// outside, so tx_bit can be looped back or sent over a channel.
//
// Timing: reset is synchronous and active high. All registers run on
// Exaclock. One PRBS bit is produced, and one rx_bit sampled, per
// 2^DIV_BITS Exaclock cycles, in the cycle where bit_clk rises.
module ExaPRBSSeq
  import prbs_pkg::*;
#(
  parameter int unsigned DIV_BITS = 50
) (
  input  logic        Exaclock,
  input  logic        reset,
  output logic [31:0] PRBSout,
  // bit-rate clock line (counter MSB) and its rising-edge strobe
  output logic        bit_clk,
  output logic        bit_strobe,
  // multi-pattern transmitter
  input  pattern_e    pattern_sel,
  output logic [31:0] tx_word,
  output logic        tx_bit,
  // built-in checker
  input  logic        rx_bit,
  output logic        rx_locked,
  output logic        rx_error,
  output logic [31:0] rx_bit_count,
  output logic [31:0] rx_error_count
);

  logic [DIV_BITS-1:0] count;
  logic                prbs_serial;

  exa_clock_osc #(.DIV_BITS(DIV_BITS)) u_osc (
    .clk     (Exaclock),
    .rst     (reset),
    .count   (count),
    .bit_clk (bit_clk),
    .bit_en  (bit_strobe)
  );

  prbs_lfsr #(.WIDTH(32), .TAP_A(18), .TAP_B(23)) u_prbs23 (
    .clk     (Exaclock),
    .rst     (reset),
    .en      (bit_strobe),
    .state   (PRBSout),
    .bit_out (prbs_serial)
  );

  prbs_mux_gen #(.WIDTH(32)) u_tx (
    .clk     (Exaclock),
    .rst     (reset),
    .en      (bit_strobe),
    .sel     (pattern_sel),
    .state   (tx_word),
    .bit_out (tx_bit)
  );

  prbs_checker #(.WIDTH(32), .CNT_W(32)) u_rx (
    .clk         (Exaclock),
    .rst         (reset),
    .en          (bit_strobe),
    .sel         (pattern_sel),
    .rx_bit      (rx_bit),
    .locked      (rx_locked),
    .bit_error   (rx_error),
    .bit_count   (rx_bit_count),
    .error_count (rx_error_count)
  );

  // The counter value and the serial tap of the main register are internal.
  logic unused;
  assign unused = ^{count, prbs_serial};

endmodule
