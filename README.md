# 2^23-1 PRBS generator with a 50-bit bit-rate counter

This design generates the ITU-T O.150 2^23-1 pseudo-random bit sequence
(polynomial x^23 + x^18 + 1) in a 32-stage linear feedback shift register. A
50-bit counter on the input clock sets the bit rate: the register moves one bit
every 2^50 input cycles. The whole 32-bit register is the parallel output
`PRBSout`. Next to this main path are a multi-pattern generator that
multiplexes the feedback taps between the 2^7-1, 2^10-1, 2^15-1, 2^23-1 and
2^31-1 patterns, and a self-synchronising checker that counts bit errors in a
received PRBS stream. Together they make a small PRBS transceiver for link
testing.

The design was published as an FPGA project, with a top-level symbol
`ExaPRBSSeq(Exaclock, reset, PRBSout[31:0])`, a 50-bit counter and a 32-flop
LFSR with taps 18 and 23. This RTL rebuilds that. The multiplexer and checker
were only named in the original, so here they are this design's own
construction.

## Block structure

```
                 +--------------------------------------------------+
 Exaclock ------>| exa_clock_osc (50-bit counter)                   |
 reset ----+---->|   bit_clk = count[49]   bit_en = count==0111..1  |---> bit_clk, bit_strobe
           |     +---------------------------+----------------------+
           |                                 | bit_en (one pulse per bit)
           |          +----------------------+----------------------+
           |          v                      v                      v
           |   prbs_lfsr 32 st.       prbs_mux_gen 32 st.     prbs_checker
           +-> taps 18/23        +--> taps by pattern_sel --> taps by pattern_sel <-- rx_bit
               --> PRBSout[31:0] |    --> tx_word, tx_bit     --> rx_locked, rx_error,
                                 |                                rx_bit_count, rx_error_count
 pattern_sel --------------------+------------------------------------^
```

| File | Contents |
|------|----------|
| `rtl/prbs_pkg.sv` | `pattern_e` select codes, `taps_t`, `pattern_taps()` tap table |
| `rtl/exa_clock_osc.sv` | bit-rate counter, bit-rate line and per-bit strobe |
| `rtl/prbs_lfsr.sv` | fixed-tap Fibonacci LFSR (default 32 stages, taps 18/23) |
| `rtl/prbs_mux_gen.sv` | one 32-stage register with multiplexed taps |
| `rtl/prbs_checker.sv` | self-synchronising checker with bit and error counters |
| `rtl/ExaPRBSSeq.sv` | top level |

## The sequence register and its tap numbering

`prbs_lfsr` is a Fibonacci (many-to-one) LFSR. Stages F0..F31 are register
bits 0..31. On each bit step every stage passes its bit to the next stage, and
F0 takes the XOR of two tap stages. The taps are *stage numbers counted from 1*,
as in the ITU tables: "18 and 23" means stages 18 and 23, which are register
bits 17 and 22. This reading is what makes the register run through all
2^23-1 = 8,388,607 non-zero states. Reading the tap numbers as 0-based register
bits (F18 and F23) would give x^24 + x^19 + 1 instead. That polynomial has
period 16,766,977 and is not a maximal-length sequence.

Only the first 23 stages take part in the feedback. F23..F31 hold the same
sequence delayed by 23 to 31 bits. So `PRBSout[22:0]` repeats every 2^23-1
steps, and each bit `PRBSout[i]` is the serial stream delayed by i bits. The
register resets to all ones. An all-zero state would lock it, so a seed whose
low 23 bits are zero is rejected at elaboration.

## Bit timing: the 50-bit counter

`exa_clock_osc` is a free-running counter. Its MSB is the bit-rate line. The
line is low for the first 2^49 counts and high for the next 2^49, so one bit
period is 2^50 input cycles at 50 % duty. In the original drawing this line
clocks all the LFSR flip-flops. Here every flip-flop runs on `Exaclock`
instead. The counter also gives `bit_en`, which is high for one cycle: the
cycle at whose end the MSB rises. The LFSRs and the checker use it as a clock
enable. The register changes at the same instants as with a derived clock, but
there is only one clock domain. This is the main structural departure from the
original.

The bit rate is therefore f(Exaclock) / 2^50. The counter *divides* the clock.
It does not multiply it. With any practical input clock the output rate is
very low. For example, a 50 MHz clock gives about one bit every 260 days.
The "exa" in the original title comes from the 2^50 division ratio. It is not
an achievable data rate. To get a usable rate, set `DIV_BITS` smaller. With
`DIV_BITS = 1`, one bit comes every 2 input cycles. To get a bit on every
input cycle, drive a `prbs_lfsr` with `en = 1`.

Timing after a synchronous reset, counting the first cycle after reset as
cycle 0: `bit_strobe` is high in cycle 2^(DIV_BITS-1) - 1, and then every
2^DIV_BITS cycles after that. The registers step at the end of each strobe
cycle.

## Multi-pattern generator

`prbs_mux_gen` has one 32-stage register. Its two XOR inputs come from
multiplexers that `pattern_sel` drives, using the tap table in `prbs_pkg`:

| `pattern_e` | code | polynomial | period |
|-------------|------|------------|--------|
| `PRBS7`  | 0 | x^7 + x^6 + 1   | 127 |
| `PRBS10` | 1 | x^10 + x^3 + 1  | 1,023 |
| `PRBS15` | 2 | x^15 + x^14 + 1 | 32,767 |
| `PRBS23` | 3 | x^23 + x^18 + 1 | 8,388,607 |
| `PRBS31` | 4 | x^31 + x^28 + 1 | 2,147,483,647 |

When `pattern_sel` changes, the register reloads all ones on the next clock,
whatever the enable is doing. Each new pattern therefore starts from a known
non-zero state. Codes 5-7 behave like `PRBS23`.

The original tap table also lists 2^48-1, 2^52-1 and 2^63-1 patterns. These
need more than 32 stages and are not built. The taps printed for 2^48-1
(48, 42) cannot give a maximal sequence in any case: no trinomial of degree 48
is irreducible.

## Checker: self-synchronisation and triple counting

`prbs_checker` needs no seed and no alignment with the transmitter. It shifts
each received bit into a history register. Once B bits have arrived (B is the
polynomial degree), `rx_locked` goes high. From then on, each new bit is
compared with `hist[A-1] ^ hist[B-1]`, the XOR of the bits received A and B
positions earlier. In an error-free stream the two always agree, at any phase
of the sequence.

Because the prediction is built from *received* bits, one corrupted bit
produces three mismatches: once when it arrives, and once each time it sits at
tap A and at tap B. `rx_error_count` counts mismatches. For sparse errors, the
bit error rate is therefore `rx_error_count / (3 * rx_bit_count)`. Bursts are
counted less predictably. `rx_error` is a registered one-cycle pulse after
each mismatching bit. Both counters are 32 bits wide and saturate. A change of
`pattern_sel` clears the history, the lock and both counters.

The checker takes `rx_bit` in the same strobe cycles in which the generators
step. When `tx_bit` is looped back to `rx_bit`, the checker therefore sees the
transmitted stream one bit late, which does not matter to a self-synchronising
checker.

## Top-level interface (`ExaPRBSSeq`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `Exaclock` | in | 1 | input clock; every register uses it |
| `reset` | in | 1 | synchronous, active high |
| `PRBSout` | out | 32 | 2^23-1 register F0..F31 |
| `bit_clk` | out | 1 | bit-rate line (counter MSB) |
| `bit_strobe` | out | 1 | one-cycle pulse per bit |
| `pattern_sel` | in | `pattern_e` | pattern of the multi-pattern generator and checker |
| `tx_word`, `tx_bit` | out | 32, 1 | multi-pattern register and its serial bit (F0) |
| `rx_bit` | in | 1 | received bit, sampled in strobe cycles |
| `rx_locked`, `rx_error` | out | 1 | checker lock, error pulse |
| `rx_bit_count`, `rx_error_count` | out | 32 | bits checked, mismatches counted |

Parameter: `DIV_BITS` (default 50), the width of the bit-rate counter.

`Exaclock`, `reset` and `PRBSout` are the ports of the original symbol. The
other ports are additions that bring out the bit timing, the multi-pattern
generator and the checker.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

- `tb_exa_clock_osc`: counter value, line and strobe on every cycle, for 1- and
  4-bit counters. Checks the strobe period and a mid-run reset. The 50-bit
  instance is checked for its first cycles.
- `tb_prbs_lfsr`: compares the register with a bit-history model of
  s[n] = s[n-18] ^ s[n-23] under a random enable. Runs one full period and
  checks that the first 23 stages return to the seed after exactly 8,388,607
  steps, never earlier, and never reach zero. Also checks a 2^7-1 instance.
  This test takes about 5 s.
- `tb_prbs_mux_gen`: checks all five patterns against their polynomials, the
  seed reload on a pattern change, and the full periods of 2^7-1, 2^10-1 and
  2^15-1.
- `tb_prbs_checker`: sends streams from random start states with random idle
  cycles and isolated inverted bits. Expects error pulses at exactly positions
  e, e+A and e+B, lock after B bits, and a bit count of N-B.
- `tb_ExaPRBSSeq`: runs end to end with `DIV_BITS = 2`. `tx_bit` is looped back
  to `rx_bit` through single-bit inversions. The test checks the strobe rate,
  `PRBSout` against the 2^23-1 recurrence, and `tx_word` across four pattern
  switches. It also checks the checker's lock and its counts of three per
  error. It counts each of these mechanisms and fails if one never happens. A
  second instance at the default `DIV_BITS = 50` runs alongside. It must hold
  its seed and raise no strobe.

**Limit:** at the default `DIV_BITS = 50`, the first PRBS bit comes after
2^49 input cycles, which cannot be simulated. The largest configuration
simulated end to end is `DIV_BITS = 2`. At 50 bits, only the reset state and
the counter's first cycles have been simulated. The LFSR and the checker do
not depend on `DIV_BITS`, and they were simulated at their full 32-stage size.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/prbs_pkg.sv tb/tb_ExaPRBSSeq.sv \
          --top-module tb_ExaPRBSSeq -Mdir obj_top
./obj_top/Vtb_ExaPRBSSeq
```

For another test, substitute its name. `-Irtl` lets Verilator find each module
in `rtl/<name>.sv`.

## Changing the design

- Bit rate: set `DIV_BITS`. The strobe period is 2^DIV_BITS input cycles.
- Different fixed polynomial: set `TAP_A`/`TAP_B` on `prbs_lfsr` (1-based
  stages, `TAP_A < TAP_B <= WIDTH`).
- More selectable patterns: extend `pattern_e` and `pattern_taps()` in
  `prbs_pkg`. The generator and the checker both pick the new pattern up. A
  pattern of degree above 32 also needs a larger `WIDTH` in both.
