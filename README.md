# Adjustable-sensitivity IoT receiver: digital baseband, channel decoder and configurator

A low-power radio receiver usually runs at its worst-case sensitivity all the
time. On a short or quiet link that spends energy on sensitivity it does not
need. This receiver can trade sensitivity for energy per bit while it runs.
Three parts can be adjusted:

- the analog front end (LNA gain or LNA bypass, mixer switch size);
- the digital baseband: comparators that cut the word width, filter stages
  that can be bypassed, and under-sampling;
- the channel decoder: uncoded, or Hamming (31,26) with a block interleaver.

A configurator holds a table of the Pareto-optimal combinations of the three
settings. Each entry has its sensitivity. Every 30 minutes the configurator
looks at how strong the weakest received packet was and whether packets were
lost, and then picks an entry. It uses the cheapest entry that still leaves a
safety margin below the weakest packet. If a packet may have been lost, it
falls back to the most sensitive entry.

The architecture follows the adjustable receiver of Detterer, Nabi, Jiao and
Basten, "Receiver Design with an Adjustable Energy-Signal-Quality Trade-off
for IoT Networks" (IEEE Internet of Things Journal, 2022). That publication
gives the system structure, the adjustment knobs, the code and the
adjustment algorithm. It does not give the gate-level insides of the
baseband. Every place where this RTL fills in a detail is marked below and
in the opening comment of each file.

## Structure

```
              C_aaf (aaf_cfg_o)                 cfg.adb             cfg.coded
   AAF  <-----------------------+        +---------------+    +-----------------+
  (analog,                      |        |               v    |                 v
  outside)  --> ADC --> adc_i/q -----> adb_demod --sym--> acd_decoder --> dout bit stream
  (outside)                     |      (ADB)      chip_err   (ACD)     corr_cnt
                                |                     (Q_adb)           (Q_acd)
   packet RSSI, pkt_ok -----> cfg_configurator (Pareto table + decision)
```

| file | role |
|---|---|
| `rtl/rx_pkg.sv` | shared constants, the configuration types, the IEEE 802.15.4 chip sequences, the Hamming parity-check columns |
| `rtl/receiver_top.sv` | the digital receiver: configurator, baseband and decoder wired together |
| `rtl/adb_demod.sv` | adjustable baseband: O-QPSK symbol grid, two paths, despreading |
| `rtl/adb_path.sv` | one I or Q path: comparator, two filter stages, chip decision |
| `rtl/dsss_despreader.sv` | 32 chips to a 4-bit symbol |
| `rtl/acd_decoder.sv` | adjustable channel decoder, coded or uncoded |
| `rtl/acd_deinterleaver.sv` | 16 x 31 block deinterleaver |
| `rtl/hamming_31_26_dec.sv` | Hamming (31,26) single-error correction |
| `rtl/cfg_configurator.sv` | Pareto table, RSSI_min and packet tracking, the adjustment decision |

The analog front end and the ADC are not part of the RTL. The front-end
setting leaves on `aaf_cfg_o` as one of 13 codes (`rx_pkg::aaf_cfg_e`,
`LB_LM1` ... `L18_LM1`). Here LB means LNA bypassed and Lg means LNA gain g.
LM or SM is the large or small mixer switch, and 1/2 is the matching
variant. The ADC delivers signed 8-bit I and Q words at 6 MS/s. The packet
RSSI is measured in the radio and arrives with `pkt_ok_i`.

## The configuration word

`rx_pkg::rx_cfg_t` is 12 bits, `{aaf[3:0], adb[6:0], coded}`, where
`adb = {cmp_i, cmp_q, byp_i[1:0], byp_q[1:0], undersample}`:

| field | meaning | usual name |
|---|---|---|
| `cmp_i`, `cmp_q` | 1-bit comparator on the I / Q path | CB (both off), CI, CQ, CIQ |
| `byp_i`, `byp_q` | bit 0 bypasses filter stage 1, bit 1 stage 2 of that path | FA (none), FIx, FQy, FIQz (z stages in all) |
| `undersample` | drop every other sample on both paths | |
| `coded` | Hamming-coded packets (1) or uncoded (0) | |

For example, "CIQ,FIQ3" is `cmp_i=1, cmp_q=1` with three of the four filter
stages bypassed. The settings apply from the next sample on, so they can
change in the middle of a packet. The one exception is `coded`, which must
match what the transmitter sends. Agreeing on it with the transmitter (for
example with a bit in the acknowledgement) is outside this RTL.

## Baseband (adb_demod, adb_path, dsss_despreader)

The hardest part to follow is the timing of the O-QPSK sample grid.

An IEEE 802.15.4 symbol (4 bits) is spread to 32 chips at 2 Mchip/s. The
even chips c0, c2, ... are half-sine pulses on I. The odd chips are on Q,
delayed by half an I pulse. Each path therefore carries 1 Mchip/s, which at
6 MS/s is 6 samples per path chip and 96 samples per symbol. After
`pkt_sync_i` (given with sample 0 of the payload):

- I chip k of a symbol covers samples 6k ... 6k+5;
- Q chip k covers samples 6k+3 ... 6k+8, so the last Q chip reaches into
  the next symbol. The stream must therefore go on for at least two samples
  after the last symbol.

Each path (`adb_path`) handles its samples as follows:

1. Comparator: if enabled, the sample becomes +1 or -1 according to its sign.
2. Filter stage 1: `y = x[n] + x[n-1]`, or `y = x` when bypassed.
3. Filter stage 2: the same two-tap moving sum.
4. Chip decision: once per chip, at sample 4 of the chip (I: sample 6k+4,
   Q: sample 6k+7), the sign of the filter output is the chip decision.

With both stages on, a decision averages three samples of the chip
(x[n] + 2x[n-1] + x[n-2]). With both bypassed it rests on a single sample.
So each bypassed stage saves an adder and costs noise robustness, and the
comparator does the same for word width. With under-sampling, samples of
odd phase are skipped: the filters run on the kept samples, and a decision
that falls on a dropped sample uses the last kept output.

`tb_workload_adb_snr` shows the trade-off with the eight settings CB,FA ...
CIQ,FIQ3. At the highest noise level it tries, CB,FA made no symbol errors in
150 symbols, the intermediate settings made 1 to 6, and CIQ,FIQ3 made 25.
The numbers depend on this RTL's simple filters. They do not reproduce the
sensitivity figures published for the measured baseband.

`dsss_despreader` compares the 32 hard chips with the 16 IEEE 802.15.4
sequences and picks the closest (a tie goes to the lower symbol).
`chip_err_o` is the number of chips that differ from the chosen sequence. It
is the baseband's quality signal.

Timing: `sym_valid_o` comes two clock cycles after the decision sample of
the last Q chip (sample 1 of the next symbol). Symbols come one per 96 samples, which is 250 kbit/s.

What is this design's own choice:

- the comparator as a sign quantiser;
- the filter stage as a two-tap moving sum;
- one decision sample per chip;
- hard-decision despreading.

The source names the knobs and their order, but not what the filters
compute. There is **no preamble search, SFD detection or chip-timing
recovery**: the symbol grid is fixed by `pkt_sync_i`. That part of a real
IEEE 802.15.4 demodulator must come from elsewhere or be added.

## Channel decoder (acd_decoder, acd_deinterleaver, hamming_31_26_dec)

**Uncoded mode.** Every symbol leaves as four bits, bit 0 first, in the four
cycles after it arrives.

**Coded mode.** A packet carries 16 Hamming (31,26) code words: 496 bits, or
62 bytes on air, with 416 payload bits. The transmitter writes the code words
as the rows of a 16 x 31 matrix and sends it column by column. Packet bit j
is therefore bit j div 16 of code word j mod 16. A burst of up to 16 wrong
bits, for example four wrong DSSS symbols in a row, hits each code word at
most once and can still be corrected.

The decoder works as follows:

1. It writes the 124 symbols back into the matrix.
2. It reads the matrix row by row.
3. It corrects each code word.
4. It sends the 26 payload bits of each code word out, bit 0 first. The 416
   bits leave in consecutive cycles. The first is taken by the second clock
   edge after the one that takes the last symbol.
5. It pulses `pkt_done_o`. At that point `corr_cnt_o` holds how many code
   words needed a correction (the decoder's quality signal).

Code-word layout (this design's own): data in bits 0..25, parity in bits
26..30. The parity-check column of parity bit 26+j is 2^j. The data bits
take the 26 numbers from 3 to 31 that are not powers of two, in ascending
order. The syndrome is the XOR of the columns of all set bits. A non-zero
syndrome names the bit to flip. Two errors in one word are miscorrected, as
with any Hamming code.

## Configurator (cfg_configurator)

The table holds up to `N_PARETO` entries `(R_sens in dBm, rx_cfg_t)`. Entry
0 must be the most sensitive (the lowest R_sens, the highest energy per bit).
Further entries must have rising R_sens and falling energy per bit.

For every `pkt_ok_i` the configurator:

- counts the packet (RPC);
- keeps the lowest RSSI (RSSI_min).

After `PERIOD_S` ticks of `sec_tick_i` (1800 s = 30 min) it runs one
decision, in one clock cycle:

1. If the current entry is entry 0, set EPC (the expected packet count) to
   RPC.
2. If `R_sens(c) + 2r < RSSI_min` and `EPC <= RPC`, lower the sensitivity.
3. Otherwise, if `EPC > RPC`, go to entry 0 (a packet may have been lost).
4. Otherwise, if `RSSI_min < R_sens(c) + r`, raise the sensitivity.
5. Restart RPC and RSSI_min.

"Lower" and "raise" both move to the least sensitive entry whose
`R_sens + r < RSSI_min`, or to entry 0 if there is none. The margin r is
`margin_i` in dB. Using 2r in step 2 gives hysteresis, so a small drift does
not cause a reconfiguration every period.

Two readings in these steps are this design's own: the direction of the
comparison in step 4, and the "least sensitive entry still r below RSSI_min"
rule. They follow the prose description of the algorithm; a literal
reading of its pseudo-code compares the other way.

If no packet arrives in a period, RSSI_min stays at +127 dBm. If EPC is then
0 (nothing was received even at the highest sensitivity), the rule in step 2
moves to the cheapest entry.

Reset state: entry 0, EPC = RPC = 0.

## Top-level interface (receiver_top)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 6 MHz sample clock, asynchronous active-low reset |
| `adc_valid_i`, `adc_i_i`, `adc_q_i` | in | 1, 8, 8 | ADC samples (signed) |
| `pkt_sync_i` | in | 1 | first payload sample of a packet |
| `pkt_ok_i`, `pkt_rssi_i` | in | 1, 8 | packet accepted by the MAC, and its RSSI (dBm) |
| `sec_tick_i` | in | 1 | one pulse per second |
| `tbl_we_i`, `tbl_addr_i`, `tbl_rsens_i`, `tbl_cfg_i` | in | 1, 4, 8, 12 | write one table entry |
| `tbl_len_i`, `margin_i` | in | 5, 7 | valid entries, margin r (dB) |
| `aaf_cfg_o` | out | 4 | front-end setting |
| `cfg_o`, `cfg_idx_o`, `cfg_update_o` | out | 12, 4, 1 | current configuration, its entry, update pulse |
| `sym_valid_o`, `sym_o`, `chip_err_o` | out | 1, 4, 6 | symbols and their chip-error count |
| `dout_valid_o`, `dout_o` | out | 1, 1 | payload bit stream |
| `pkt_done_o`, `corr_cnt_o` | out | 1, 5 | end of a coded packet, corrected code words |
| `cfg_rsens_o` | out | 8 | sensitivity of the current entry (dBm) |
| `cfg_epc_o`, `cfg_rpc_o`, `cfg_rssi_min_o` | out | 16, 16, 8 | EPC, and RPC and RSSI_min of the running period |
| `cfg_dec_o`, `cfg_rst_o`, `cfg_inc_o` | out | 1 each | step of the update rule taken, valid with `cfg_update_o` |
| `acd_busy_o` | out | 1 | decoder is collecting or draining a packet |

Parameters (with their defaults): `N_PARETO = 16` (own choice), `RSSI_W = 8`
(own choice), `CNT_W = 16` (own choice), `PERIOD_S = 1800` (the 30-minute
update period). The fixed sizes are in `rx_pkg`: an 8-bit ADC word, 6
samples per path chip, and 16 code words of (31,26).

## Where the RTL departs from the source design, or goes beyond it

- The baseband internals (comparator, filters, chip decision, despreading)
  are the simplest circuits that do what the knobs describe. The energy and
  sensitivity figures published for the architecture come from a measured
  baseband whose circuit is not given, so they do not carry over to this RTL.
- No frame synchronisation or timing recovery (see above).
- The 62 bytes per coded packet are read as the on-air size of the 16 code
  words (16 x 31 bits). The payload is 52 bytes.
- The communication model is not in hardware. It computes each
  configuration's sensitivity and energy per bit from analog measurements,
  and its result is the table that is written through `tbl_*`. The Pareto
  values themselves must be supplied by the user.
- The configurator needs one clock cycle per update and per packet.
  Counting packets and RSSI_min takes only a few gates.
- The quality outputs `chip_err_o` and `corr_cnt_o` are brought out but not
  used by the decision, which uses packet RSSI and packet count only.

## Simulation

Every testbench in `tb/` checks itself. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/tb_util_pkg.sv` holds
the reference models they share: the chip table, a Hamming encoder and the
half-sine O-QPSK generator. For example:

```
verilator --binary --timing --assert -Wno-fatal \
  tb/tb_util_pkg.sv rtl/rx_pkg.sv rtl/*.sv tb/tb_receiver_top.sv \
  --top-module tb_receiver_top -Mdir obj_top
./obj_top/Vtb_receiver_top
```

| testbench | what it shows |
|---|---|
| `tb_hamming_31_26_dec` | clean words and every single-error position, random data |
| `tb_acd_deinterleaver` | bit placement, the full flag, dropped extra writes, clear |
| `tb_acd_decoder` | coded packets with symbol bursts and a 16-bit burst corrected; correction count; latency; uncoded bit order |
| `tb_dsss_despreader` | all 16 symbols with up to 5 chip errors; latency |
| `tb_adb_path` | decision against an integer model in all 16 path settings; noisy half-sine chips |
| `tb_adb_demod` | all 128 baseband settings on noisy O-QPSK; 96 samples per symbol; 2-cycle latency; switching settings mid-packet |
| `tb_cfg_configurator` | 300 update periods against a reference model of the decision |
| `tb_receiver_top` | the whole receiver at default parameters: coded and uncoded packets through O-QPSK samples, burst correction, every baseband knob, and lowering, raising and resetting the sensitivity, with the configurator's counters and reported update steps |
| `tb_workload_adb_snr` | symbol errors of eight baseband settings under the same noise: the full-effort setting is the most robust |
| `tb_workload_rain` | two days of a sensor-network link with a 10-hour rain fade: the receiver drops to cheap settings when the link is dry and returns to high sensitivity during the rain |

`tb_receiver_top` runs at the top's default parameters, including the full
1800-second update period, in well under a minute.
