// exa_clock_osc: bit-rate clock generator ("Exa Hertz clock cycle oscillator").
//
// A free-running DIV_BITS-wide up counter on the input clock. Its most
// significant bit is the bit-rate clock line: one period of it lasts
// 2^DIV_BITS input cycles, the first half low and the second half high. The
// counter width of 50 bits is the design's; an earlier summary of the same
// design speaks of a 2^30-cycle period, the 50-bit figure is the one followed.
//
// Rather than clocking the PRBS register from the counter MSB (a derived
// clock), this block also provides bit_en, a one-input-cycle pulse that is high
// in the cycle at whose end bit_clk rises. Logic that advances on bit_en in the
// input clock domain steps at exactly the instants a flip-flop clocked by
// bit_clk would, without a second clock domain. That choice is this design's.
//
// Interface: clk, synchronous active-high rst (counter to zero).
// Timing: after reset bit_en first pulses in cycle 2^(DIV_BITS-1)-1 (counting
// the first cycle after reset as 0), then every 2^DIV_BITS cycles.
module exa_clock_osc #(
  parameter int unsigned DIV_BITS = 50
) (
  input  logic                clk,
  input  logic                rst,
  output logic [DIV_BITS-1:0] count,
  output logic                bit_clk,
  output logic                bit_en
);

  // The count value one cycle before the MSB rises: 0111...1.
  localparam logic [DIV_BITS-1:0] LAST_LOW = {DIV_BITS{1'b1}} >> 1;

  always_ff @(posedge clk) begin
    if (rst) count <= '0;
    else     count <= count + 1'b1;
  end

  assign bit_clk = count[DIV_BITS-1];
  assign bit_en  = (count == LAST_LOW);

endmodule
