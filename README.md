# Measuring FPGA-to-FPGA links: an LVDS pair and a transceiver ring

This RTL models two small experiments that measure how much data gets across a cable between two
FPGA boards, and how long a byte takes to go around a chain of boards. The first experiment
uses the general-purpose LVDS I/O. The second uses the multi-gigabit transceivers. Both come from an
evaluation of Cyclone V development boards (Sharatunova, "Evaluation of High-Speed FPGA IO for
Inter-Board Communication", Tampere, 2015). That work described its board designs as diagrams of
vendor IP cores plus a few custom blocks. Here every vendor core that does digital work is written out
as ordinary synthesizable SystemVerilog, so the whole link, serial line included, can be simulated
with Verilator alone.

The two experiments share nothing. `hsio_eval_top` places them side by side with separate ports:

* **LVDS pair.** A master board sends a 4-bit count (0, 1, ..., 15, 0, ...) through a 4:1
  serializer, sending the bits MSB first. It also forwards a clock. The slave board deserializes
  the stream and counts how many 2048-bit packets of that sequence arrive intact inside a fixed
  time window.
* **Transceiver ring.** Three boards form a loop: master -> slave 1 -> slave 2 -> master. Each
  board has one 8b/10b transceiver channel. The master sends K28.5 commas until the loop is
  aligned, then an 8-bit count. Each slave repeats what it receives. Back at the master, the
  measurement block counts 2048-bit packets in the window. It also measures the time from sending
  count value 0 to receiving it again: the ring latency, in fabric clock cycles.

Bandwidth is then packets × 2048 / window time. Latency in seconds is cycles × fabric clock period.

## Clocks and what is not in the RTL

The PLLs, the clock-data recovery and the host that reads the counters have no digital function
to write down. They stay outside the design, and every clock arrives on a port:

| port | meaning | original value |
|---|---|---|
| `lvds_tx_fast_clk`, `lvds_rx_fast_clk` | LVDS bit clock | 500 MHz (125 MHz core × 4) |
| `lvds_ref_clk`, `xcvr_ref_clk` | time-window clock | 50 MHz |
| `xcvr_tx_serial_clk[i]` | transmit serial clock of board i | 1.7 GHz in the main configuration |
| `xcvr_rx_serial_clk[i]` | recovered serial clock of board i | the same frequency as the line feeding it |
| `xcvr_mgmt_clk` | reset controller / calibration clock | not given; 100 MHz in the testbenches |

The serial clocks set the data rate, so the same RTL covers every rate of the original sweeps:
LVDS from 400 to 840 Mbit/s, and transceivers from 800 to 1860 Mbit/s. In simulation all boards of
the ring run on one serial clock, which makes the recovered clock of each receiver exactly the
clock of the board before it.

The counters are outputs. The original design read them with an on-chip logic analyser.

## LVDS link

`lvds_master` = `lvds_data_gen` + `lvds_serializer`. `lvds_slave` = `lvds_deserializer` + output
register + `lvds_measure` + `time_counter`.

**Serializer.** It counts fast-clock cycles modulo the factor (parameter `FACTOR`, default 4; 2..10,
3 excluded as in the vendor core). It loads the parallel word on the last bit of the previous
word and shifts it out MSB first.
* It derives the core clock from the same count: bit rate / `FACTOR`, 125 MHz at 500 Mbit/s. The
  data generator runs on this clock.
* It also derives the forwarded clock: bit rate / `B`, with `B` = 4. That makes the forwarded clock
  equal to the core clock, and it rises together with the MSB.

**Deserializer: how the word boundary is found.** This is the one subtle point of the LVDS side.
The receiver has no alignment pattern. Instead, the first rising edge of the forwarded clock after
reset fixes the word boundary: the bit arriving with that edge is treated as the MSB.
`rx_locked` rises at that moment.
* Because the transmitter makes its clock edge coincide with the MSB, the boundary is right from
  the first word.
* A forwarded clock that is already high when reset ends is not taken as an edge. Otherwise the
  boundary would depend on where in the clock period reset happened to be released.
* The original design relied on exactly this deterministic relationship and left the vendor
  bit-slip input unused. The bit-slip port `rx_data_align` is still built: each rising edge holds
  the word counter for one bit time, which moves the boundary by one bit.
* The received word is registered on the parallel clock `rx_outclock` and appears as `out_rx`.

**Measurement.** A received word is good when it is the previous word + 1 (mod 16). 512 good words
in a row (2048 bits) count one packet in `number_ok` (26 bits, as in the original). A word that
breaks the sequence restarts the packet and increments `number_err`, which is an addition of this
design.

Counting runs while the window is open. `time_counter` counts `TIME_LIMIT` reference cycles, by
default 1.5·10⁹ = 30 s at 50 MHz, and then stops the measurement. Measurement and window are held
in reset until two receiver clocks after lock, because the word in the receiver register at the
moment of lock was still cut on the old boundary.

## Transceiver channel (`xcvr_native_phy`)

This is one channel in the configuration the original boards used:
* basic mode;
* 8-bit fabric interface and 10-bit PMA interface, with no byte serializer;
* 8b/10b on;
* manual word aligner looking for the 10-bit pattern 17C (K28.5 with negative disparity);
* phase compensation FIFOs in low-latency mode;
* no rate-match FIFO.

The data path:

```
TX: fabric byte -> xcvr_phase_fifo -> enc_8b10b -> xcvr_serializer ----> line
RX: line -> xcvr_deserializer -> xcvr_word_aligner -> dec_8b10b -> xcvr_phase_fifo -> fabric
```

* **Code groups** are sent bit `a` first, i.e. code bit 0 first. K28.5 is `17C` in negative running
  disparity and `283` in positive.
* **Encoder.** `enc8b10b_pkg::encode` implements the standard 5b/6b and 3b/4b tables. It includes
  the alternate 3b/4b code that avoids runs of five, and the twelve defined control characters. An
  undefined control byte is sent as data and flagged on `k_err`.
* **Decoder.** Its 1024-entry table is computed at elaboration time as the inverse of that
  function. Each entry also records which running disparity the code is legal in. A code in no
  entry raises `errdetect`. A legal code in the wrong disparity raises `disperr`.
* **Word aligner.** It keeps the previous and the current 10-bit word. While `patternalign` is
  high it searches all ten bit offsets for 17C or 283 (the lowest offset wins) and locks there.
  `syncstatus` rises on the first lock. The offset is kept when `patternalign` drops, and every
  output word equal to a comma raises `patterndetect`.
* **Phase FIFOs.** These are 8-deep dual-clock FIFOs with Gray-coded pointers and two-flop
  synchronizers. The TX FIFO is written every fabric cycle. When it is empty, for example after a
  reset, the encoder sends K28.5, so the line never carries garbage.
* **Status models.** `pll_locked`, `rx_is_lockedtodata` and the calibration busy flags are
  counters: lock after `LOCK_CYCLES` or `LTD_CYCLES` serial clocks, calibration for `CAL_CYCLES`
  management clocks. They exist so that the reset controller has something real to wait for. The
  original gives none of these times.

**Reset controller (`xcvr_reset_ctrl`).** Its sequence follows the usual transceiver reset order,
with synchronized status inputs:
1. `pll_powerdown` for `T_PLL_PD` cycles;
2. wait for PLL lock and end of calibration, then release `tx_analogreset`;
3. release `tx_digitalreset` `T_TX_DIG` cycles later → `tx_ready`.

On the RX side:
1. release `rx_analogreset` once the PLL is up and calibration is done;
2. after lock-to-data has held for `T_LTD` cycles, release `rx_digitalreset` → `rx_ready`.

Loss of PLL lock or of lock-to-data puts the corresponding digital reset back.

## Transceiver ring: getting every board aligned

The hardest part of the ring is start-up. A board can only align on commas, and a slave can only
forward what it receives. The rules that make the loop come up, and come back after any board is
reset, are this design's own. The original describes only "send K28.5 until aligned, then the
count".

* **`xcvr_receive_data`** (every board). It holds `word_align` high (= aligner `patternalign`) until
  it has seen `SYNC_COMMAS` = 4 clean K28.5 in a row; then `aligned` (the original's `out_contr`)
  goes high. `LOSS_ERRS` = 2 code or disparity errors in a row, or loss of `rx_ready`, drop it again.
* **`xcvr_data_from_rx`** (slaves). While aligned it forwards each received byte and control flag,
  one cycle later. While not aligned it sends K28.5, so the boards further along can align even
  while this board is still searching.
* **`xcvr_send_data`** (master). It sends K28.5 for at least `SYNC_HOLD` = 64 cycles, and until the
  master's own receiver is aligned; then it sends the count.
  * The hold matters. Because slaves fill in commas, the master can be aligned before the whole
    ring is, and without a minimum hold a slave that was just reset would see almost no commas.
  * In count mode, `K_TIMEOUT` = 256 received control characters in a row mean that some slave has
    lost alignment and is filling in commas. The master then returns to the sync phase, as it does
    when its own receiver loses alignment. `sync_entries` counts these returns.
  * `tx_mark` pulses with every count value 0.
* **`xcvr_measure`** (master). It counts 256-byte (2048-bit) runs of the count in `detout_s` (28
  bits, as in the original) and wrong bytes in `err_count`. Control characters restart a packet
  without counting an error.
  * Latency: a counter starts on `tx_mark` and stops when byte 0 comes back; the result is
    `latency` in fabric cycles.
  * Only bytes received while aligned are counted. The block is held in reset until `rx_ready`.

**Fabric clocks.**
* The master runs all its logic, including the RX FIFO read side, on its TX parallel clock
  `tx_std_clkout`.
* A slave runs on its recovered clock `rx_std_clkout`. Its TX FIFO crosses into its own TX
  parallel clock.
* There is no rate-match FIFO, so the ring relies on all boards having the same serial rate.

## What the simulations show

`tb_hsio_eval_top` runs both experiments at 1.7 Gbit/s (transceivers) and 500 Mbit/s (LVDS), with
a 3000-cycle (60 µs) window. It resets slave 1 in the middle of the run, and it counts every
mechanism, failing on any that never happened:
* LVDS lock, bit slip, packets, and the end of the window;
* ring alignment, count mode, packets, latency, and resynchronisation after the slave reset.

Typical output:

```
XCVR: ring latency 44 cycles of 5.88 ns = 258 ns
XCVR: 13 packets in 20000 ns -> 1331200000 bit/s (payload rate 1360000000)
LVDS: packets=14 (expected about 14) errors=0
```

`tb_rate_sweep` repeats both experiments at every line rate of the original measurement
campaign. Each rate gets a fresh reset and bring-up:
* LVDS at 400, 500, 600, 700, 760, 800 and 840 Mbit/s, each over a 100 µs window;
* the ring at the 14 rates from 800 to 1860 Mbit/s, each over 40 µs.

Every count lands within one packet of rate × time / 2048. For the ring the rate used is 8/10 of
the line rate. There are no sequence errors. The ring latency stays at 41–44 cycles at every rate.
It moves by a few cycles between runs, depending on where the FIFO pointer synchronizers catch
the clocks.

`tb_hsio_eval_top_defaults` runs the top with no parameter overrides, the 30 s window included,
for the first 2 ms: bring-up, count mode, latency, packet rates, and the window counter advancing
once per 50 MHz cycle.

Each block has its own self-checking testbench in `tb/`, against values worked out in the
testbench:
* the encoder checks known code groups, running disparity, run length and uniqueness of codes;
* the decoder checks round trip, invalid codes and disparity errors;
* the aligner is checked at all ten bit offsets;
* the FIFOs are checked with unrelated clocks and when full;
* the PHY is checked in loopback, including lock timing and a single flipped line bit;
* the reset controller checks sequence order and times;
* the other blocks have their own tests.

Each testbench ends with a `TB_RESULT checks=N failures=M` line and has a watchdog.

## Where this departs from the original, and how far to trust it

* **Latency.** The original reports 80–100 ns around the three-board ring. The model measures
  41–44 fabric cycles: 258 ns at 1.7 Gbit/s, 237 ns at 1860 Mbit/s. Each board here adds two FIFOs with two-flop pointer
  synchronizers and several registered stages (aligner, decoder, status, repeater). The real
  low-latency hard FIFOs are shallower than that. Bandwidth is not affected.
* **Payload rate.** The model carries 8 payload bits per 10 line bits, so at 1.7 Gbit/s it moves
  1.36 Gbit/s of count bytes. The original's tables report measured rates close to the line rate
  itself. Nothing in this RTL can reproduce that.
* **Time counter width.** The original's diagrams show a 12-bit window counter. A 30 s window at
  50 MHz needs 31 bits, so the width is derived from `TIME_LIMIT`.
* **One channel only.** The resource tables of the original also cover 2 and 4 LVDS channels and
  2 transceiver channels; only the single-channel configuration is built.
* **Not modelled:**
  * vendor reconfiguration controller;
  * analog behaviour: jitter, skew, PLL and CDR dynamics, line loss;
  * the 11-bit rollover of the LVDS bit-slip counter;
  * word aligner modes other than manual;
  * the transceiver TX bit slip, byte serializer and rate-match FIFO;
  * polarity inversion and bit reversal.
* **Lock and calibration times.** These and every threshold in the alignment rules are
  placeholders. Their values are parameters.

No simulation covers a full 30 s window at the default `TIME_LIMIT`: that is 1.5·10⁹ reference
cycles, and for the LVDS side 1.5·10¹⁰ bit clocks. The longest complete window simulated is 5000
reference cycles (100 µs). The default-size run covers the first 2 ms of the 30 s window, with
every parameter at its default.

## Files and simulation

`rtl/` holds one module or package per file:
* `hsio_pkg` holds shared constants, the received-byte struct and the state enums;
* `enc8b10b_pkg` holds the code tables;
* `sync_2ff` is the two-flop synchronizer used for every status input.

Every parameter defaults to the original configuration where it gives one. `tb/` holds one
testbench per block plus `tb_check.svh` (check counter, `CHECK`, watchdog).

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_xcvr_native_phy rtl/hsio_pkg.sv rtl/enc8b10b_pkg.sv tb/tb_xcvr_native_phy.sv \
  -Mdir obj -o sim && obj/sim
```

The testbenches raise their resets shortly after time 0, not at it. That is deliberate: flops
with asynchronous reset need an edge, and the generated parallel clocks are stopped while in
reset. Every testbench finishes within seconds; the rate sweep takes about five.
