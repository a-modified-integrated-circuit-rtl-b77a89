# MDPCM interface: several bits per pulse over a slow wire

A band-limited link, such as an RS232 line driven through level shifters and
opto-isolators, can only carry pulses of a certain minimum width. A
conventional UART spends one such pulse width per bit. M-ary digital pulse
cycle modulation (MDPCM) spends one pulse per *word*. The word is carried in
the *period* of the pulse, not in its shape. Every symbol has the same wide
high pulse and the same wide low gap. After them comes an extra low time of
(c + 1) short slots, where c encodes the word. The line never switches faster
than the base symbol allows. The receiver only has to time rising edges to
the resolution of one slot, and a slot can be far shorter than a pulse.

This RTL implements one chip's MDPCM interface: a small control CPU, a PLL
(behavioural model), the modulator and the demodulator. Two instances joined
output-to-input form a full-duplex link. At the reset settings (3 us high,
3 us low, 6 ns slots, 9 bits per symbol) the interface moves 9-bit words at
an average of 1.19 Mbit/s. Yet no high or low level on the line is shorter
than 3 us, the bit time of a 333 kbit/s UART.

## The symbol

```
        t_H0          t_L          (c+1) * t_slot
   |<---------->|<---------->|<------------------->|
    ____________                                    ____________
   |            |                                  |
___|            |__________________________________|     next symbol ...
   ^                                               ^
   rising edge                         next rising edge
   |<---------------------- T ---------------------->|

   t_BS = t_H0 + t_L            T = t_BS + (c + 1) * t_slot
```

* c is the word m itself (**binary mapping**) or its reflected gray code
  m ^ (m >> 1) (**gray mapping**). With gray mapping, words whose periods
  differ by one slot differ in one bit. A one-slot timing error therefore
  costs one bit, not several.
* b, the number of bits per symbol, can be set from 1 to 14. There are
  M = 2^b symbols, and the longest period is t_BS + M * t_slot.
* All durations are register values counted in periods of the high-speed
  PLL clock. The reset values are t_H0 = t_L = 1500 and t_slot = 3, that is
  3 us, 3 us and 6 ns at 500 MHz.

With all M words equally likely, the mean period is
T_mean = t_BS + (M+1)/2 · t_slot. The bandwidth efficiency r compares the
mean bit rate b / T_mean with 2 / t_BS, the rate of a plain binary line
whose bits are as wide as t_H0 and t_L:

    r = b / (a * (M + 1) + 2),      a = t_slot / t_BS

Each extra bit doubles the slot part of the period. So r peaks at a
moderate b: b = 9 for a = 0.001, and b = 8 for a = 0.00167.

## Deciding a symbol

The recognizer (`mdpcm_recognizer`, the "identifier" of the receive chain)
samples the line through two flip-flops and uses **only rising edges**. A slow or distorted falling edge therefore
does no harm. The decision is maximum likelihood: it picks the nominal period
t_BS + (c+1) * t_slot nearest to the measured period T_x. So code c is chosen
when

    t_BS + (c + 1/2) * t_slot  <=  T_x  <  t_BS + (c + 3/2) * t_slot

and anything shorter counts as c = 0. The recognizer does not divide.
After a rising edge it waits until T_x reaches the first boundary,
t_BS + t_slot + ceil(t_slot / 2). From then on it counts one boundary per
t_slot. When the next rising edge comes, the number of boundaries passed is
the code. The code is ready three clk_outR2 edges after that edge reaches
the pins.

**Why a slot is three clocks.** The two chips sample each other
asynchronously, so a measured period can be one clock long or short. With
three clocks per slot, the nearest boundary is always at least 1.5 clocks
away from a nominal period, so a ±1 count error never changes the decision.
Two clocks per slot would leave no margin. For a 6 ns slot this means a
500 MHz counting clock. For the 10 ns slot setting, t_slot = 5.

**Clock tolerance.** Each chip times the line with its own clock. A
frequency error ε between the chips changes a measured period of N clocks by
ε·N. This error must stay below half a slot. At the defaults (longest period
3000 + 512·3 clocks) that gives |ε| < about 300 ppm. A 100 ppm offset is
tested; a 700 ppm offset fails. Longer base times or larger b tighten this
bound.

## Bursts: where a symbol stream begins and ends

A symbol is the time between two rising edges. The first edge of a burst
therefore carries no word, and the last word needs one more edge to close
it. The generator (`mdpcm_generator`) handles both ends as follows:

* Symbols follow back to back as long as words are waiting.
* When no word is waiting at the end of a symbol, the generator sends a
  **closing pulse**: t_H0 high, whose rising edge ends the last period.
  Then it holds the line low for a **guard time** of t_L + (M+2)·t_slot.
  This is longer than any valid period. A word that arrives while the
  closing pulse is still high is sent normally, with that pulse as its
  start.
* A period that reaches t_BS + (M + 1/2)·t_slot without a rising edge is
  not a symbol. The recognizer then declares the **burst ended** and
  counts it. The next rising edge starts a new measurement.

Starting the first burst costs one extra t_H0 + guard on the line compared
with a continuous stream. Inside a burst no time is lost.

## Structure and clocks

```
                 ctrl bus / response
                        |
            clk_in -> [ CPU ] ---- PLL settings ---> [ PLL ] -> clk_outT1, T2, R1, R2
                        |  \
            parameters, |   \ parameters, enable
            enable      v    v
  tx bus (T1) -> [input latch] -> [mapper] -> [generator] -> tx_out
                          \____ modulator controller (T2) ___/
  rx bus (R1) <- [output latch] <- [anti-mapper] <- [recognizer] <- rx_in
                          \____ demodulator controller (R2) __/
```

| clock | default | used by |
|---|---|---|
| clk_in | 50 MHz (external) | CPU, PLL reference |
| clk_outT1 | 5 MHz | transmit bus, write side of the input data latch |
| clk_outT2 | 500 MHz | read side of the input data latch, mapper, generator, modulator controller |
| clk_outR2 | 500 MHz | recognizer, anti-mapper, write side of the output data latch, demodulator controller |
| clk_outR1 | 5 MHz | receive bus, read side of the output data latch |

Every crossing between these clocks is handled in one of three ways:

* **Data words** go through the two latches (`mdpcm_data_latch`). Each is a
  dual-clock FIFO of two words, with gray-coded pointers and a valid/ready
  handshake on both sides. A latch is needed because a symbol's length
  depends on its value, so the word rate on the line is not fixed.
* **Parameters** are quasi-static. The CPU accepts a change to them only
  while both directions are disabled and the generator has finished its
  last burst. A controller copies the parameter set into its own clock
  domain when it sees the synchronized enable rise, after checking it
  (1 <= b <= 14, no zero duration).
* **Status events** (symbol sent, word received, burst ended, word lost)
  travel as toggles through two-flop synchronizers. The CPU turns them into
  counters.

Every domain is reset asynchronously by `rst_n` and leaves reset on its own
clock (`mdpcm_rst_sync`).

## Programming the interface

The CPU (`mdpcm_cpu`) has a simple request/response bus on clk_in. Every
request gets `resp_valid` one clock later, with `resp_err` set if it was
refused.

| addr | name | fields |
|---|---|---|
| 0 | CTRL | [0] tx enable, [1] rx enable |
| 1 | MAP | [3:0] b, [8] gray mapping (reset: b = 9, binary) |
| 2 | T_H0 | [15:0] high time, in high-speed clocks (reset 1500) |
| 3 | T_L | [15:0] low time of the base symbol (reset 1500) |
| 4 | T_SLOT | [7:0] slot, in high-speed clocks (reset 3) |
| 5 | PLL | [7:0] mul, [15:8] div, [23:16] ls_div: f_hs = f_in·mul/div, f_ls = f_in/ls_div (reset 10, 1, 10) |
| 6 | STATUS (ro) | [0] tx active, [1] rx active, [2] PLL locked, [3] tx parameter error, [4] rx parameter error, [15:8] bursts ended, [23:16] words lost |
| 7 | COUNT (ro) | [15:0] symbols sent, [31:16] words received |

A typical sequence:

1. With both directions disabled, write MAP, T_H0, T_L, T_SLOT and, if
   needed, PLL.
2. Wait for STATUS[2] (PLL locked).
3. Set rx enable on the receiving side, then tx enable on the sending side.
4. Push words on the transmit bus (valid/ready on clk_outT1). Read them on
   the far side (valid/ready on clk_outR1).
5. To stop, clear the enables. The generator closes its burst by itself.

Both ends must use the same b, mapping and durations. A received word that
finds the output latch full is dropped and counted in STATUS[23:16]. Writing
the PLL register makes the PLL lock again; its clocks stop until then.

## Measured against the published demonstration

`tb_mdpcm_table2` runs the six demonstration settings end to end between
two interfaces at their default parameters. For each setting, every one of
the M words is sent once. The mean period is measured on the line, and r is
computed from it. The results match the published values to the printed
precision:

| t_slot | b | r measured | r published | r · 320 kbit/s | published R_b | actual mean line rate |
|---|---|---|---|---|---|---|
| 10 ns | 7 | 3.1603 | 3.16 | 1011.3 | 1011.2 | 1053 kbit/s |
| 10 ns | 8 | 3.2944 | 3.294 | 1054.2 | 1054.08 | 1098 kbit/s |
| 10 ns | 9 | 3.1524 | 3.152 | 1008.8 | 1008.64 | 1051 kbit/s |
| 6 ns | 8 | 3.5445 | 3.545 | 1134.2 | 1134.4 | 1182 kbit/s |
| 6 ns | 9 | 3.5814 | 3.581 | 1146.0 | 1145.9 | 1194 kbit/s |
| 6 ns | 10 | 3.3058 | 3.306 | 1057.9 | 1057.9 | 1102 kbit/s |

The published "equivalent rate" is r times 320 kbit/s, the highest rate of a
conventional UART on the same line. The true mean rate, b / T_mean, is about
4 % higher. It equals r times 2 / t_BS, and with t_BS = 6 us that is
333 kbit/s, not 320.

## Choices this implementation makes

The published description gives the waveform, the decision rule, the block
diagrams and the clock roles. It does not give the following, which are
choices made here:

* **Clock plan.** The description names four PLL clocks and their roles but
  no frequencies. Here they are 500 MHz and 5 MHz from a 50 MHz reference.
  The 500 MHz gives three clocks per 6 ns slot (see above).
* **Decision boundaries.** The published region formula for the middle
  symbols is shifted by one slot against the waveform definition and leaves
  a gap after the first symbol. This design follows the nearest-period
  (maximum likelihood) rule that the formula is meant to express.
* **The top decision region.** The maximum likelihood rule lets the
  longest symbol take every period above t_BS + (M - 1/2)·t_slot. Here
  that region stops at t_BS + (M + 1/2)·t_slot, and a longer period ends
  the burst. Without this limit the receiver could not tell the end of a
  transmission from a long symbol.
* **Burst framing.** The closing pulse, the guard time and the
  too-long-period timeout are this design's answer to "demodulate only when
  a valid waveform is present".
* **Control.** The CPU's bus, its register map, the parameter checks, the
  rule that parameters change only while idle, and the status counters are
  all this design's.
* **Latches.** The latches are two-word dual-clock FIFOs.
* **PLL.** The PLL (`mdpcm_pll`) is a behavioural model with delays and is
  not synthesizable. In a chip it is an analog macro. Replace it with the
  target's PLL, keeping its ports.
* **Bus width.** The transmit and receive buses are 14 bits wide. Only
  the low b bits are used: the mapper ignores the bits above b, and the
  receiver returns zeros there.
* **Not built.** Running several channels side by side as a wider bus is
  suggested as an extension but not described, so it is not built. One
  interface is one duplex lane.
* **Not modelled.** The RS232 drivers, the isolation and the cable of the
  demonstration set-up are not modelled. The testbenches model the line as
  a delay. In the end-to-end test, one direction also delivers its falling
  edges 1.5 us late, standing in for the slow, triangular fall of an
  overloaded RS232 line. Only the rising edges carry timing, so the words
  still arrive intact.

## Files

`rtl/` (SystemVerilog 2017, one unit per file):

| file | contents |
|---|---|
| `mdpcm_pkg.sv` | parameter-set and PLL structs, mapping enum, reset values, checks |
| `mdpcm_interface.sv` | top: CPU, PLL, modulator, demodulator, reset synchronizers |
| `mdpcm_cpu.sv` | register file, refusals, status synchronizers and counters |
| `mdpcm_pll.sv` | behavioural PLL |
| `mdpcm_modulator.sv`, `mdpcm_mod_ctrl.sv`, `mdpcm_mapper.sv`, `mdpcm_generator.sv` | transmit side |
| `mdpcm_demodulator.sv`, `mdpcm_demod_ctrl.sv`, `mdpcm_recognizer.sv`, `mdpcm_demapper.sv` | receive side |
| `mdpcm_data_latch.sv` | dual-clock latch used on both sides |
| `mdpcm_sync.sv`, `mdpcm_rst_sync.sv` | synchronizers |

`tb/` holds one self-checking testbench per module, named
`tb_<module>.sv`. It also holds `tb_mdpcm_table2.sv`, the demonstration
settings above. `tb_mdpcm_interface.sv` takes two interfaces at their
default parameters through binary and gray transfers, full duplex, bus
stalls, output-latch overflow, a refused write, a PLL relock, a refused
parameter set and a line with late falling edges. It counts each of these
mechanisms and fails if one never happens. Every testbench ends by printing
`TB_RESULT checks=N failures=F`.

To run one with Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -Irtl -Itb \
    rtl/mdpcm_pkg.sv tb/tb_mdpcm_interface.sv --top-module tb_mdpcm_interface
./obj_dir/Vtb_mdpcm_interface
```

`-Wno-fatal` is needed because the PLL model's delays are computed at run
time, and Verilator warns about that. Adding `--assert` turns on the
assertions in the latches (handshake rules) and the CPU (parameters stay
still while in use).

`tb_mdpcm_interface` simulates about 0.5 ms in under a second, and
`tb_mdpcm_table2` about 22 ms in about half a minute.
