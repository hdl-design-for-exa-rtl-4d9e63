// tb_ExaPRBSSeq: end-to-end test of the PRBS top level.
//
// The top is built with a 2-bit bit-rate counter (one bit every 4 input
// cycles) so that many bits fit in a short run. The multi-pattern output is
// looped back into the checker through a channel model that can invert single
// bits. Every cycle the testbench checks, against its own models:
//   - the bit-rate line and strobe (rate: one strobe per 2^DIV_BITS cycles);
//   - PRBSout against the x^23+x^18+1 recurrence, stepping only on strobes;
//   - tx_word against the selected pattern's recurrence, including the seed
//     reload on a pattern switch;
//   - checker lock, error pulses and counters (three counts per bit error).
// It counts each mechanism (strobe, PRBS step, pattern switch, checker lock,
// detected error) and fails if one never happened. A second instance at the
// full 50-bit counter width is checked to hold its seed and raise no strobe
// over the same run.
module tb_ExaPRBSSeq;
  import prbs_pkg::*;

  localparam int unsigned DIV = 2;
  localparam int PER = 1 << DIV;

  logic        clk;
  logic        reset = 1'b1;
  pattern_e    sel = PRBS23;
  logic        rx_bit = 1'b0;
  int          checks = 0;
  int          failures = 0;

  initial begin
    clk = 1'b0;
    forever #5 clk = ~clk;
  end

  logic [31:0] PRBSout, tx_word, rx_bit_count, rx_error_count;
  logic        bit_clk, bit_strobe, tx_bit, rx_locked, rx_error;

  ExaPRBSSeq #(.DIV_BITS(DIV)) dut (
    .Exaclock(clk), .reset, .PRBSout, .bit_clk, .bit_strobe,
    .pattern_sel(sel), .tx_word, .tx_bit,
    .rx_bit, .rx_locked, .rx_error, .rx_bit_count, .rx_error_count
  );

  // Full-size instance: only its first cycles can be observed.
  logic [31:0] big_out, big_tx, big_cnt, big_err;
  logic        big_clk, big_strobe, big_txb, big_lock, big_rxe;

  ExaPRBSSeq big (
    .Exaclock(clk), .reset, .PRBSout(big_out), .bit_clk(big_clk), .bit_strobe(big_strobe),
    .pattern_sel(PRBS23), .tx_word(big_tx), .tx_bit(big_txb),
    .rx_bit(1'b0), .rx_locked(big_lock), .rx_error(big_rxe),
    .rx_bit_count(big_cnt), .rx_error_count(big_err)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at t=%0t", what, $time);
    end
  endtask

  function automatic logic next_bit(pattern_e p, logic [31:0] h);
    case (p)
      PRBS7:   return h[6]  ^ h[5];
      PRBS10:  return h[9]  ^ h[2];
      PRBS15:  return h[14] ^ h[13];
      PRBS23:  return h[22] ^ h[17];
      default: return h[30] ^ h[27];
    endcase
  endfunction

  function automatic int degree(pattern_e p);
    case (p)
      PRBS7: return 7;  PRBS10: return 10; PRBS15: return 15;
      PRBS23: return 23; default: return 31;
    endcase
  endfunction

  // mechanism counters
  int n_strobe = 0, n_step = 0, n_switch = 0, n_lock = 0, n_detect = 0, n_inject = 0;

  logic [31:0] main_ref, tx_ref;
  int          cyc;
  int          rx_bits;        // bits taken by the checker since its restart
  int          exp_err_cnt;
  int          exp_bit_cnt;
  bit          was_locked;
  int          err_at[$];      // checker bit indices expected to mismatch

  // One input cycle, checked at the falling edge before the rising edge.
  task automatic cycle(input bit flip, input bit do_switch, input pattern_e new_sel);
    bit strobe_now;
    bit expect_err;
    int b;
    strobe_now = ((cyc % PER) == PER / 2 - 1);
    check(bit_strobe == strobe_now, "bit strobe position");
    check(bit_clk == ((cyc % PER) >= PER / 2), "bit-rate line");
    check(PRBSout == main_ref, "PRBSout follows x^23+x^18+1");
    check(tx_word == tx_ref && tx_bit == tx_ref[0], "tx_word follows selected pattern");
    check(big_out == 32'hFFFF_FFFF && big_tx == 32'hFFFF_FFFF && big_txb && !big_strobe && !big_clk
          && !big_lock && !big_rxe && big_cnt == 0 && big_err == 0, "50-bit instance holds seed");
    check(rx_error_count == 32'(exp_err_cnt) && rx_bit_count == 32'(exp_bit_cnt), "checker counters");
    if (rx_locked && !was_locked) n_lock++;
    was_locked = rx_locked;
    rx_bit = tx_bit ^ flip;
    if (flip) n_inject++;
    b = degree(sel);
    if (do_switch) begin
      sel = new_sel;
      tx_ref = '1;
      rx_bits = 0;
      exp_err_cnt = 0;
      exp_bit_cnt = 0;
      err_at.delete();
      was_locked = 1'b0;
      n_switch++;
    end else if (strobe_now) begin
      // checker takes rx_bit as bit number rx_bits
      if (flip) begin
        err_at.push_back(rx_bits);
      end
      expect_err = 1'b0;
      if (rx_bits >= b) begin
        exp_bit_cnt++;
        foreach (err_at[k])
          if (rx_bits == err_at[k] || rx_bits == err_at[k] + tap_a(sel) || rx_bits == err_at[k] + b)
            expect_err = 1'b1;
        if (expect_err) exp_err_cnt++;
      end
      rx_bits++;
      tx_ref = {tx_ref[30:0], next_bit(sel, tx_ref)};
    end
    if (strobe_now) begin
      n_strobe++;
      n_step++;
      main_ref = {main_ref[30:0], next_bit(PRBS23, main_ref)};
    end
    @(negedge clk);
    if (rx_error) n_detect++;
    cyc++;
  endtask

  function automatic int tap_a(pattern_e p);
    case (p)
      PRBS7: return 6;  PRBS10: return 3;  PRBS15: return 14;
      PRBS23: return 18; default: return 28;
    endcase
  endfunction

  // Run nbits bit periods, inverting the received bit in the listed periods.
  task automatic run_bits(input int nbits, input int f0 = -1, input int f1 = -1, input int f2 = -1);
    for (int i = 0; i < nbits; i++) begin
      for (int c = 0; c < PER; c++) begin
        automatic bit f = (i == f0 || i == f1 || i == f2);
        cycle(f, 1'b0, sel);
      end
    end
  endtask

  initial begin
    main_ref = '1;
    tx_ref = '1;
    rx_bits = 0;
    exp_err_cnt = 0;
    exp_bit_cnt = 0;
    was_locked = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    cyc = 0;
    // 2^23-1 on both generators from reset: they must agree
    for (int i = 0; i < 20; i++) begin
      check(tx_word == PRBSout, "both generators agree on 2^23-1");
      run_bits(1);
    end
    run_bits(300, 60, 140, 230);
    check(rx_error_count == 9, "2^23-1 loopback: three counts per error");
    cycle(1'b0, 1'b1, PRBS7);
    run_bits(200, 50, 120);
    check(rx_error_count == 6, "2^7-1 loopback: three counts per error");
    cycle(1'b0, 1'b1, PRBS31);
    run_bits(200);
    check(rx_error_count == 0 && rx_bit_count > 100, "2^31-1 loopback error free");
    cycle(1'b0, 1'b1, PRBS10);
    run_bits(150, 70);
    cycle(1'b0, 1'b1, PRBS15);
    run_bits(150, 90);
    check(n_step == cyc / PER || n_step == cyc / PER + 1, "one PRBS bit per 2^DIV_BITS cycles");
    $display("mechanisms: strobes=%0d prbs_steps=%0d switches=%0d locks=%0d injected=%0d detected=%0d",
             n_strobe, n_step, n_switch, n_lock, n_inject, n_detect);
    check(n_strobe > 0, "bit-rate strobe happened");
    check(n_step > 0, "PRBS step happened");
    check(n_switch > 0, "pattern switch happened");
    check(n_lock > 0, "checker lock happened");
    check(n_inject > 0, "bit error injected");
    check(n_detect == 3 * (n_inject / PER) , "bit error detections");
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
