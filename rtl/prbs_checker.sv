// prbs_checker: self-synchronising PRBS receiver and bit-error counter.
//
// The received bits are shifted into a WIDTH-stage history register. Once as
// many bits as the polynomial degree B have arrived, every new bit is compared
// with the XOR of the bits received A and B bits earlier (the same taps as the
// generator, chosen by sel); a mismatch is a bit error. Because the reference
// is built from received bits, the checker needs no seed and no alignment
// with the transmitter. A single corrupted bit is counted three times: once
// when it arrives and once when it passes each tap, so an isolated-error bit
// error rate is error_count / (3 * bit_count). The design names built-in
// linear-polynomial checkers with bit-error-rate detection; how they work is
// this design's choice.
//
// Interface: clk; synchronous active-high rst; en marks a cycle carrying a
// received bit rx_bit; sel picks the pattern. A change of sel restarts the
// checker (history, lock and counters). locked goes high once B bits are in.
// bit_count counts checked bits, error_count mismatches (both saturate).
// Timing: bit_error is registered, high for the one cycle after an enabled
// cycle whose bit mismatched.
module prbs_checker
  import prbs_pkg::*;
#(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  pattern_e         sel,
  input  logic             rx_bit,
  output logic             locked,
  output logic             bit_error,
  output logic [CNT_W-1:0] bit_count,
  output logic [CNT_W-1:0] error_count
);

  pattern_e         sel_q;
  localparam int unsigned IW = $clog2(WIDTH);

  taps_t            taps;
  logic [IW-1:0]    idx_a, idx_b;
  logic [WIDTH-1:0] hist;
  logic [5:0]       fill;
  logic             predicted;
  logic             mismatch;

  assign taps      = pattern_taps(sel);
  // Stage numbers are 1-based; register bit i is stage i+1.
  assign idx_a     = IW'(taps.tap_a - 6'd1);
  assign idx_b     = IW'(taps.tap_b - 6'd1);
  assign predicted = hist[idx_a] ^ hist[idx_b];
  assign mismatch  = predicted ^ rx_bit;
  assign locked    = (fill == taps.tap_b);

  always_ff @(posedge clk) begin
    if (rst || sel != sel_q) begin
      sel_q       <= sel;
      hist        <= '0;
      fill        <= '0;
      bit_error   <= 1'b0;
      bit_count   <= '0;
      error_count <= '0;
    end else begin
      bit_error <= 1'b0;
      if (en) begin
        hist <= {hist[WIDTH-2:0], rx_bit};
        if (!locked) begin
          fill <= fill + 6'd1;
        end else begin
          bit_error <= mismatch;
          if (bit_count != '1) bit_count <= bit_count + 1'b1;
          if (mismatch && error_count != '1) error_count <= error_count + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (WIDTH >= 31)
      else $fatal(1, "prbs_checker: WIDTH must hold the 31-stage pattern");
  end

endmodule
