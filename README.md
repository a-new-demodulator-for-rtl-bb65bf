# I-PPM link with a slot period detector receiver

Inverse pulse position modulation (I-PPM) is a visible-light modulation in which the LED
stays lit for most of each symbol and goes dark for exactly one slot. With two bits per
symbol a symbol has four slots, and the position of the dark ("empty") slot carries the
two bits. The usual receiver correlates the sampled signal against four reference
waveforms, which needs four waveform generators, four multipliers and four integrators.

The slot period detector (SPD) receiver here does without any of those. It only asks, for
each quarter of a symbol, *how long was the light off?* A comparator flags samples below a
threshold, a counter counts pulses while the flag is set, four registers keep one count
per slot, and the slot with the largest count is the empty slot. The cost is a
comparator, one 8-bit counter, four 8-bit registers and a 4-way maximum. The trade-off
is noise performance: a correlator uses the whole waveform, while the SPD only counts dark
time, so at the same Eb/N0 the SPD makes more bit errors.

The RTL contains both ends of the link as they would sit in one FPGA. The modulator drives
the LED. The receiver takes samples from an external ADC. The optical path, the
photodetector and the ADC are not logic and are not included.

## Signal format

| symbol bits | slot 0 | slot 1 | slot 2 | slot 3 |
|-------------|--------|--------|--------|--------|
| `00`        | dark   | on     | on     | on     |
| `01`        | on     | dark   | on     | on     |
| `10`        | on     | on     | dark   | on     |
| `11`        | on     | on     | on     | dark   |

- Symbol value `i` darkens slot `i`. Slot 0 goes out first.
- A slot lasts `SLOT_LEN` clocks, so a symbol lasts `4*SLOT_LEN` clocks and the bit rate is
  `f_clk / (2*SLOT_LEN)`.
- A 16-bit word goes out as eight symbols, least significant pair first. Symbol `p` is
  `data[2p+1:2p]`. For example, `1101100001100011` goes out as `11, 00, 10, 01, 00, 10, 01, 11`.
- Between words the LED stays on.

## How the receiver decides (`spd_demodulator`)

```
 rx_sample ─► spd_comparator ─e─► spd_counter ─q─┬─► spd_slot_reg (C1) ─┐
   th ──────►   e = sample < th    +1 when e&hfp ├─► spd_slot_reg (C2) ─┤
                                  hfp ──►        ├─► spd_slot_reg (C3) ─┼─► spd_decision ─► data[15:0]
                                                 └─► spd_slot_reg (C4) ─┘    (timer, argmax)
```

The threshold should sit at half the "on" level. It is 10 ADC codes by default, which
suits an "on" level of about 20 codes. `hfp` is the high-frequency pulse train, given as a
strobe that is valid for one clock. Tie it to 1 to count every clock. A slower strobe gives
a coarser count of the same dark time.

`spd_decision` owns all the timing. Counting cycles from `c = 0`, the clock after `start`:

| clock (within a symbol of `4L` clocks, `L = SLOT_LEN`) | what happens |
|---|---|
| `0, L, 2L, 3L` (first clock of each slot) | `restart` to the counter. It drops the old count and counts this clock's pulse. |
| `L, 2L, 3L` | `en_reg[0..2]` load the count of the slot that just ended into C1..C3 |
| `4L` (= clock 0 of the next symbol) | `en_reg[3]` loads C4 |
| `4L + 1` | compare C1..C4. The largest wins, and a tie goes to the lower slot. |
| `4L + 2` | `sym`, `sym_valid` and `data[2p+1:2p]` update. `word_valid` is also high after the eighth symbol of a word. |

So a symbol's decision appears **three clocks after its last sample**. After that, one
symbol follows every `4L` clocks. The restart and the register load happen in the same
clock, so the counter never misses a pulse at a slot boundary. C4 is read one clock after
it is loaded, which is why `SLOT_LEN` must be at least 2; an assertion checks this.

**Symbol alignment is external.** The receiver does not search for symbol boundaries.
`start` sets the first slot to begin on the next clock, and the timer then free-runs.
A `start` in mid-symbol drops the partial symbol. The receiver tolerates a small
misalignment, because the empty slot still holds most of the dark samples. The end-to-end
test runs with the receiver `6` clocks ahead of the signal in a 200-clock slot. A
misalignment near half a slot will fail. Once started, the receiver keeps deciding. On a
steadily lit line all counts are 0, so the tie rule reports symbol `00`. Use
`sym_valid`/`word_valid` only while data is actually expected.

`data` is filled in place from bit 0 up, one pair per symbol, and is not cleared between
words. A word is complete when `word_valid` pulses.

## Transmitter (`ippm_modulator`)

A pulse on `start` loads `data`, and the first slot goes out on the next clock. A counter
steps through clock, slot and symbol. The current symbol selects its codeword from a
four-entry table (built by `ippm_pkg::ippm_codeword`), and the slot number selects the
codeword bit that drives `ippm`. `busy` stays high for `32*SLOT_LEN` clocks. A `start` in
the last clock of a word sends the next word with no gap. `sym` and `sym_first` show the
grouped symbol being sent.

## Top level (`ippm_spd_top`)

This level instantiates the modulator and the receiver. They share the clock and reset,
and are otherwise independent. The parts that would sit between them are outside the
logic and appear as ports:

| would connect | ports |
|---|---|
| LED driver | `tx_ippm` |
| photodetector + ADC (7-bit parallel code) | `rx_sample[6:0]` |
| high-frequency pulse source | `rx_hfp` |
| symbol timing / frame alignment | `rx_start` |

The serial interface between the FPGA and an ADC chip is not included, because its
protocol is unspecified. Any ADC that delivers one 7-bit code per clock can drive
`rx_sample`.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| bits per symbol / slots | 2 / 4 (`ippm_pkg`) | the source design |
| `WORD_W` | 16 | the source design (16-bit data word) |
| `CNT_W` | 8 | the source design (8-bit counter and slot registers) |
| `ADC_W` | 7 | the source design (7-bit ADC code) |
| `TH` | 10 | the source design (constant threshold) |
| `SLOT_LEN` | 200 clocks | own choice. It is not specified, and 200 keeps a full slot count below 255. |

`SLOT_LEN` may be anything from 2 up. Above `2^CNT_W - 1` the counter saturates at its
maximum. Two saturated slots then tie, so raise `CNT_W` with it.

## Departures and own choices

These points go beyond, or differ from, the design as it was specified:

- The AND of the comparator output and the pulse train is a synchronous count enable,
  `e & hfp`. It is not a gated clock.
- The counter clears synchronously at each slot start, and saturates instead of wrapping.
- The comparator compares the full 7-bit sample. In the source the compare input was only
  6 bits wide, and the way the two widths were joined is unknown.
- Two aspects are inferred from how the detected word fills up, one pair at a time from
  bit 0: which register each enable drives, and the fact that the decision block generates
  the counter clear.
- Several choices are this design's own: ties go to the lower slot, the `start` input
  aligns the receiver, the modulator uses a start/busy handshake, the line stays lit when
  idle, and every reset is asynchronous and active low.
- The correlator receiver that the SPD replaces is not included.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_spd_comparator` | all 128×128 sample/threshold pairs |
| `tb_spd_counter` | random restart/e/hfp against a reference count, including saturation |
| `tb_spd_slot_reg` | random load/hold |
| `tb_spd_decision` | the enable and restart timing every clock, the argmax with forced ties, word assembly, the 3-clock latency and realignment by a mid-symbol `start` |
| `tb_ippm_modulator` | the waveform every clock against the codeword rule, the grouped symbols, idle level and back-to-back words |
| `tb_spd_demodulator` | synthetic samples, with and without noise and with a random or constant pulse strobe. Slot counts are checked against counts the testbench works out itself, and symbols and words against what was sent. |
| `tb_ippm_spd_top` | a loop-back at default parameters: modulator → 6-clock delay → 20/0-code levels with noise → receiver. It sends 12 words: clean, noisy (±12 codes), back to back, and with the receiver 6 clocks early. It checks every word, the symbol rate (one per 800 clocks) and the 3-clock latency, and requires that each symbol value, comparator flips caused by noise, gaps in the pulse strobe and back-to-back words all occur. |
| `tb_spd_ber_sweep` | bit error rate against Eb/N0 with Gaussian noise, 0–16 dB in 2 dB steps, 4000 bits per point, `SLOT_LEN = 8`. A correlator receiver modelled in the testbench runs on the same noisy samples. It checks every slot count exactly and the shape of the curve, and requires that the correlator make fewer errors. |

The sweep prints, for one seed:

| Eb/N0 (dB) | 0 | 2 | 4 | 6 | 8 | 10 | 12 | 14 | 16 |
|---|---|---|---|---|---|---|---|---|---|
| SPD BER | 0.31 | 0.26 | 0.22 | 0.15 | 0.087 | 0.033 | 0.0088 | 0.0013 | 0 |
| correlator BER | 0.28 | 0.20 | 0.14 | 0.088 | 0.033 | 0.0078 | 0.0015 | 0 | 0 |

The SPD needs roughly 2–3 dB more Eb/N0 for the same error rate. That is the price of
throwing away amplitude information in the comparator. Eb/N0 here is defined per sample
(σ² = Eb / (2·Eb/N0), with Eb the energy of the three lit slots divided by two bits). The
absolute position of the curves depends on that definition and on the number of samples
per slot. Only the gap between the two receivers is meaningful.

Run one with Verilator 5 from the project root, for example:

```
verilator --binary --timing -y rtl -y tb rtl/ippm_pkg.sv tb/tb_ippm_spd_top.sv \
          --top-module tb_ippm_spd_top
./obj_dir/Vtb_ippm_spd_top
```

Swap in any other `tb_*` name. The top-level test runs at the default parameters in well
under a second.

**Not verified:** behaviour on real hardware (timing closure, a real ADC and optics,
interference from ambient light) and error rates at the default `SLOT_LEN = 200`. At that
slot length the sweep would need very large noise per sample to show any errors.
