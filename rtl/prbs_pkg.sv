// prbs_pkg: pattern codes and feedback taps shared by the PRBS generators and
// the checker.
//
// Each pattern is a maximal-length Fibonacci LFSR with one two-input XOR in its
// feedback, polynomial x^B + x^A + 1. Taps are numbered from 1 (stage 1 is the
// first flip-flop, F0 in the register), as the ITU tap lists are. The tap pairs
// are those of the pattern tap table the design follows: 2^7-1 (7,6),
// 2^10-1 (10,3), 2^15-1 (15,14), 2^23-1 (23,18) and 2^31-1 (31,28). The
// 3-bit encoding of the pattern select is this design's own choice.
package prbs_pkg;

  typedef enum logic [2:0] {
    PRBS7  = 3'd0,
    PRBS10 = 3'd1,
    PRBS15 = 3'd2,
    PRBS23 = 3'd3,
    PRBS31 = 3'd4
  } pattern_e;

  typedef struct packed {
    logic [5:0] tap_a;   // shorter tap, 1-based stage number
    logic [5:0] tap_b;   // longer tap = polynomial degree
  } taps_t;

  function automatic taps_t pattern_taps(pattern_e p);
    taps_t t;
    case (p)
      PRBS7:   t = '{tap_a: 6'd6,  tap_b: 6'd7};
      PRBS10:  t = '{tap_a: 6'd3,  tap_b: 6'd10};
      PRBS15:  t = '{tap_a: 6'd14, tap_b: 6'd15};
      PRBS23:  t = '{tap_a: 6'd18, tap_b: 6'd23};
      PRBS31:  t = '{tap_a: 6'd28, tap_b: 6'd31};
      default: t = '{tap_a: 6'd18, tap_b: 6'd23};
    endcase
    return t;
  endfunction

endpackage
