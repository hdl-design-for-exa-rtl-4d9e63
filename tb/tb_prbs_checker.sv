// tb_prbs_checker: checks the self-synchronising PRBS checker.
//
// For each pattern the testbench generates a PRBS stream from its own copy of
// the polynomial, starting from a random non-zero state (so the checker has to
// synchronise to an arbitrary phase), and sends it with random idle cycles.
// A few isolated bits are inverted. Worked out by hand, an inverted bit at
// position e is reported at positions e, e+A and e+B (A, B the taps), so the
// testbench expects exactly those bit_error pulses, three counts per error,
// lock after B bits and a bit count of N-B. A pattern change must clear the
// counters.
module tb_prbs_checker;
  import prbs_pkg::*;

  logic        clk;
  logic        rst = 1'b1;
  logic        en  = 1'b0;
  pattern_e    sel = PRBS31;
  logic        rx_bit = 1'b0;
  logic        locked;
  logic        bit_error;
  logic [31:0] bit_count;
  logic [31:0] error_count;
  int          checks = 0;
  int          failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  prbs_checker dut (.clk, .rst, .en, .sel, .rx_bit, .locked, .bit_error, .bit_count, .error_count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic int tap_a_of(pattern_e p);
    case (p)
      PRBS7: return 6;  PRBS10: return 3;  PRBS15: return 14;
      PRBS23: return 18; default: return 28;
    endcase
  endfunction

  function automatic int tap_b_of(pattern_e p);
    case (p)
      PRBS7: return 7;  PRBS10: return 10; PRBS15: return 15;
      PRBS23: return 23; default: return 31;
    endcase
  endfunction

  int total_errors_seen = 0;

  task automatic run_pattern(input pattern_e p, input int nbits, input int nerr);
    int a = tap_a_of(p);
    int b = tap_b_of(p);
    logic [31:0] h;
    logic s;
    int err_pos[$];
    bit expect_err;
    int pulses = 0;
    // random non-zero start state of the transmitter
    h = $urandom();
    h[0] = 1'b1;
    // isolated error positions, at least 40 bits apart, clear of both ends
    for (int k = 0; k < nerr; k++) err_pos.push_back(b + 10 + 40 * k + int'($urandom_range(0, 5)));
    @(negedge clk);
    sel = p;
    en  = 1'b0;
    @(negedge clk);
    check(bit_count == 0 && error_count == 0 && !locked, "checker restarted by pattern change");
    for (int idx = 0; idx < nbits; idx++) begin
      s = h[a-1] ^ h[b-1];
      h = {h[30:0], s};
      rx_bit = s;
      foreach (err_pos[k]) if (err_pos[k] == idx) rx_bit = ~s;
      en = 1'b1;
      @(negedge clk);
      en = 1'b0;
      expect_err = 1'b0;
      if (idx >= b)
        foreach (err_pos[k])
          if (idx == err_pos[k] || idx == err_pos[k] + a || idx == err_pos[k] + b) expect_err = 1'b1;
      check(bit_error == expect_err, "bit_error pulse position");
      check(locked == (idx + 1 >= b), "lock after B bits");
      if (bit_error) pulses++;
      // random idle cycles between bits; bit_error must drop in them
      repeat ($urandom_range(0, 2)) begin
        @(negedge clk);
        check(!bit_error, "no error pulse in idle cycle");
      end
    end
    check(bit_count == 32'(nbits - b), "bits checked");
    check(error_count == 32'(3 * nerr), "three counts per isolated error");
    check(pulses == 3 * nerr, "error pulses");
    total_errors_seen += pulses;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    run_pattern(PRBS7,  400, 3);
    run_pattern(PRBS10, 400, 4);
    run_pattern(PRBS15, 500, 5);
    run_pattern(PRBS23, 800, 6);
    run_pattern(PRBS31, 800, 0);
    run_pattern(PRBS23, 600, 2);
    check(total_errors_seen == 3 * 20, "total error pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
