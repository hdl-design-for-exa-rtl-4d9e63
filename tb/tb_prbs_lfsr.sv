// tb_prbs_lfsr: checks the 32-stage, taps 18/23 PRBS register.
//
// An independent reference keeps the serial bit history s[] of the sequence,
// generated from the recurrence s[n] = s[n-18] ^ s[n-23] with an all-ones
// start, and expects register bit i to equal s[n-i]. Phase 1 drives the enable
// at random and checks the register every cycle (also that it holds while the
// enable is low). Phase 2 runs with the enable high and checks that the first
// 23 stages come back to the seed after exactly 2^23-1 steps and never
// before, and that the all-zero state never occurs. A 2^7-1 instance (taps
// 6/7) is checked for its 127-step period too.
module tb_prbs_lfsr;

  logic clk;
  logic rst = 1'b1;
  logic en  = 1'b0;
  int   checks = 0;
  int   failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [31:0] state;
  logic        bit_out;
  logic [7:0]  state7;
  logic        bit7;

  prbs_lfsr dut (.clk, .rst, .en, .state, .bit_out);
  prbs_lfsr #(.WIDTH(8), .TAP_A(6), .TAP_B(7)) dut7 (.clk, .rst, .en, .state(state7), .bit_out(bit7));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Reference history, newest bit first: hist[i] = s[n-i].
  logic [31:0] hist;
  logic [7:0]  hist7;
  bit          cur_en;

  localparam int unsigned PERIOD23 = (1 << 23) - 1;

  initial begin
    int steps;
    int first_return;
    bit zero_seen;
    logic [30:0] prev;
    hist  = '1;
    hist7 = '1;
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(negedge clk);
    check(state == 32'hFFFF_FFFF, "seed after reset");
    check(bit_out == 1'b1, "serial bit after reset");
    // Phase 1: random enable, every cycle compared with the reference.
    repeat (3000) begin
      cur_en = ($urandom_range(0, 3) != 0);
      en <= cur_en;
      @(negedge clk);
      if (cur_en) begin
        hist  = {hist[30:0],  hist[17] ^ hist[22]};
        hist7 = {hist7[6:0], hist7[5] ^ hist7[6]};
      end
      check(state == hist, "register matches s[n-i]");
      check(bit_out == hist[0], "serial bit is newest bit");
      check(state7 == hist7 && bit7 == hist7[0], "7-stage register matches reference");
    end
    // Phase 2: restart from the seed and run a whole period.
    en <= 1'b0;
    @(posedge clk) rst <= 1'b1;
    @(posedge clk) rst <= 1'b0;
    en <= 1'b1;
    @(negedge clk);
    check(state == 32'hFFFF_FFFF, "seed after second reset");
    steps = 0;
    first_return = 0;
    zero_seen = 1'b0;
    while (steps < PERIOD23) begin
      prev = state[30:0];
      @(negedge clk);
      steps++;
      check(state[31:1] == prev[30:0], "stages shift by one");
      if (state[22:0] == '0) zero_seen = 1'b1;
      if (state[22:0] == '1 && first_return == 0) first_return = steps;
      if (steps == 127) check(state7[6:0] == 7'h7F, "2^7-1 period");
      if (steps < 127 && state7[6:0] == 7'h7F) check(1'b0, "2^7-1 returned early");
    end
    checks++;
    if (first_return != PERIOD23) begin
      failures++;
      $display("FAIL first return to seed after %0d steps, expected %0d", first_return, PERIOD23);
    end
    check(!zero_seen, "all-zero state never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (9_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
