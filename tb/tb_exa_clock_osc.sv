// tb_exa_clock_osc: checks the bit-rate counter at two small widths and at the
// full 50-bit width.
//
// For DIV_BITS = 1 and 4 it runs many bit periods and checks, every cycle,
// the counter value, the bit-rate line (low for the first half of each
// 2^DIV_BITS-cycle period, high for the second) and the strobe (high only in
// the last cycle of the low half), and it measures the strobe period. The
// 50-bit instance is checked over the first few thousand cycles only: its
// first strobe would come after 2^49 cycles. A mid-run reset is also checked.
module tb_exa_clock_osc;

  logic clk;
  logic rst = 1'b1;
  int   checks = 0;
  int   failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [0:0]  cnt1;  logic clk1, en1;
  logic [3:0]  cnt4;  logic clk4, en4;
  logic [49:0] cnt50; logic clk50, en50;

  exa_clock_osc #(.DIV_BITS(1))  dut1  (.clk, .rst, .count(cnt1),  .bit_clk(clk1),  .bit_en(en1));
  exa_clock_osc #(.DIV_BITS(4))  dut4  (.clk, .rst, .count(cnt4),  .bit_clk(clk4),  .bit_en(en4));
  exa_clock_osc                  dut50 (.clk, .rst, .count(cnt50), .bit_clk(clk50), .bit_en(en50));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  // Reference: n cycles after reset, a period-P counter holds n mod P, the line
  // is high in the second half and the strobe fires at the cycle before that.
  task automatic check_all(input longint n);
    longint p1 = 2, p4 = 16;
    check(cnt1 == 1'(n % p1), "count (1 bit)");
    check(clk1 == ((n % p1) >= p1 / 2), "bit_clk (1 bit)");
    check(en1  == ((n % p1) == p1 / 2 - 1), "bit_en (1 bit)");
    check(cnt4 == 4'(n % p4), "count (4 bits)");
    check(clk4 == ((n % p4) >= p4 / 2), "bit_clk (4 bits)");
    check(en4  == ((n % p4) == p4 / 2 - 1), "bit_en (4 bits)");
    check(cnt50 == 50'(n), "count (50 bits)");
    check(clk50 == 1'b0 && en50 == 1'b0, "50-bit line stays low early");
  endtask

  longint n;
  longint last_en4;
  int     en4_pulses;

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    n = 0;
    last_en4 = -1;
    en4_pulses = 0;
    repeat (4000) begin
      @(negedge clk);
      check_all(n);
      if (en4) begin
        if (last_en4 >= 0) check(n - last_en4 == 16, "strobe period 2^4");
        last_en4 = n;
        en4_pulses++;
      end
      n++;
    end
    check(en4_pulses == 250, "number of 4-bit strobes");
    // reset in the middle of a period restarts the count
    @(posedge clk) rst <= 1'b1;
    @(posedge clk) rst <= 1'b0;
    n = 0;
    repeat (40) begin
      @(negedge clk);
      check_all(n);
      n++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
