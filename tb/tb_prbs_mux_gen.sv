// tb_prbs_mux_gen: checks the multiplexed multi-pattern generator.
//
// For every pattern the testbench keeps its own bit history, generated from
// the ITU polynomial written out here (x^7+x^6+1, x^10+x^3+1, x^15+x^14+1,
// x^23+x^18+1, x^31+x^28+1), and compares the register with it every cycle
// under a random enable. It checks that a change of the select reloads the
// all-ones seed, and measures the full period of the 2^7-1, 2^10-1 and
// 2^15-1 patterns.
module tb_prbs_mux_gen;
  import prbs_pkg::*;

  logic     clk;
  logic     rst = 1'b1;
  logic     en  = 1'b0;
  pattern_e sel = PRBS10;
  int       checks = 0;
  int       failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [31:0] state;
  logic        bit_out;

  prbs_mux_gen dut (.clk, .rst, .en, .sel, .state, .bit_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic int degree(pattern_e p);
    case (p)
      PRBS7:   return 7;
      PRBS10:  return 10;
      PRBS15:  return 15;
      PRBS23:  return 23;
      default: return 31;
    endcase
  endfunction

  function automatic logic next_bit(pattern_e p, logic [31:0] h);
    case (p)
      PRBS7:   return h[6]  ^ h[5];
      PRBS10:  return h[9]  ^ h[2];
      PRBS15:  return h[14] ^ h[13];
      PRBS23:  return h[22] ^ h[17];
      default: return h[30] ^ h[27];
    endcase
  endfunction

  logic [31:0] hist;
  int          switches = 0;

  // Select a pattern: the register reloads the seed in the next cycle.
  task automatic select(input pattern_e p);
    @(negedge clk);
    sel = p;
    en  = 1'b1;
    @(negedge clk);
    hist = '1;
    check(state == 32'hFFFF_FFFF, "seed reloaded on pattern change");
    switches++;
  endtask

  task automatic run_random(input pattern_e p, input int cycles);
    bit e;
    repeat (cycles) begin
      e  = ($urandom_range(0, 2) != 0);
      en = e;
      @(negedge clk);
      if (e) hist = {hist[30:0], next_bit(p, hist)};
      check(state == hist && bit_out == hist[0], "register matches polynomial");
    end
  endtask

  task automatic run_period(input pattern_e p);
    int n = degree(p);
    longint expect_p = (longint'(1) << n) - 1;
    longint steps = 0;
    longint first = 0;
    logic [31:0] mask = (n == 32) ? '1 : ((32'd1 << n) - 1);
    en = 1'b1;
    while (steps < expect_p) begin
      @(negedge clk);
      steps++;
      if ((state & mask) == mask && first == 0) first = steps;
    end
    checks++;
    if (first != expect_p) begin
      failures++;
      $display("FAIL pattern %s returned after %0d steps, expected %0d", p.name(), first, expect_p);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst = 1'b0;
    hist = '1;
    run_random(PRBS10, 300);
    for (int k = 0; k < 5; k++) begin
      automatic pattern_e p = pattern_e'(k);
      select(p);
      run_random(p, 1500);
    end
    for (int k = 0; k < 3; k++) begin
      automatic pattern_e p = pattern_e'(k);
      select(p);
      run_period(p);
    end
    // back to 2^23-1 from the middle of another pattern
    select(PRBS31);
    run_random(PRBS31, 77);
    select(PRBS23);
    run_random(PRBS23, 200);
    check(switches == 10, "pattern switches performed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
