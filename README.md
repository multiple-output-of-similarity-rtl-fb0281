# Nearest-match associative memory with a priority encoder

This memory stores 32 reference words of 8 bits each. Given an input word, it
returns the stored word that is closest to it in Hamming distance, meaning the
fewest differing bits. It returns the word itself on its output lines, not an
address.

In the circuit this RTL models, the search is analog. Each stored word drives
the floating gate of a neuron CMOS inverter through eight equal capacitors,
one per bit. Every mismatching bit pulls that gate down by one unit. A shared
constant current then raises all the gates together. The words with the
fewest mismatches cross the inverter threshold first and fire.

Several words can be equally close. In that case they all fire together, and
connecting all of them to the output lines would short them against each
other. A 32-bit priority encoder keeps only the lowest-numbered of them, so
exactly one word reaches the outputs.

The SystemVerilog here is a cycle-based logic equivalent of that circuit:

- The capacitor and floating-gate arithmetic becomes counting in whole
  units.
- The continuous current ramp becomes one unit per clock.
- Everything else is ordinary digital logic: the decoder, the SRAM, the
  bit compare, the priority encoder and the selection flip-flops.

The transistor-level parts (the inverter, capacitors, current mirror and
transfer gates) are not modelled as voltages.

## Organisation

```
            A ─► addr_decoder ─► WL_j ─┐
            N ─────(SW4)──► bit lines ─┼─► ref_sram ── S_j ─┐
                                       │      ▲             │
                                       │      │ SWS_j=PMA_j │
  per word j (x32):                    │      │             ▼
    match_word (NAND with F) ─► vcmos_neuron ─► MO_j ──────────┐
            ▲ thr                                              │
  search_ramp (SW2, SW3, H, CHG, OR of all MO) ◄───────────────┤
                                                               ▼
                              priority_encoder (PCLK) ─► pma_register (CLK)
                                                               │
                                   O_i ◄── ref_sram read ◄─────┘
```

| File | Block |
|---|---|
| `rtl/am_pkg.sv` | sizes: 32 words, 8 bits, 5-bit address, `MAX_DIST` = 4 |
| `rtl/addr_decoder.sv` | 5-to-32 write decoder, enabled by AD and SW1 |
| `rtl/ref_sram.sv` | 32 x 8 reference store; write through the bit lines, read through the SWS switches |
| `rtl/match_word.sv` | per word: compare gated by F, capacitor input levels, distance D_H |
| `rtl/vcmos_neuron.sv` | per word: the threshold rule of the neuron inverter and its NOR with F-bar |
| `rtl/search_ramp.sv` | floating-gate set-up (SW2, SW3) and the shared current ramp (H), stopped by the OR gate |
| `rtl/priority_encoder.sv` | 32-to-32 one-hot encoder, lowest index wins |
| `rtl/lookahead_pe.sv` | 4-bit lookahead encoder over the four byte groups |
| `rtl/data_pe.sv` | 8-bit data encoder per byte, registered on PCLK |
| `rtl/pma_register.sv` | 32 D flip-flops holding the selection PMA_j, loaded when CLK falls |
| `rtl/assoc_mem_top.sv` | the whole memory |

## How the threshold search works

This is the part that is least obvious from the RTL alone.

Let V_DD be the supply and V_TH = V_DD/2 the inverter threshold. Call one
capacitor's share of the total gate capacitance a unit, u = C/C_T * V_DD.
One compare then goes through three phases:

1. **Reset (SW2).** The floating gate is tied to its inverter's threshold,
   so V_F = V_TH.
2. **Bias (SW3).** An extra capacitor lifts every gate by half a unit. All
   eight bit capacitors are at V_DD, because F is still low.
3. **Compare (F), then search (H).** When F rises, each mismatching bit
   switches its capacitor to 0 V and lowers the gate by one unit. This
   gives V_F - V_TH = u * (1/2 - D) for a word at distance D. Only an exact
   match (D = 0) is above threshold, so exact matches fire immediately.
   With H high, the constant current raises every gate by the same amount.
   After r units, a word fires once D < r + 1/2, that is once D <= r.

So the first words to fire are exactly those at the minimum distance. The
OR of all fired outputs stops the ramp as soon as any word fires, and
nothing further away ever crosses.

`search_ramp` holds r (output `level`) and the bias bit b. It gives every
word the threshold `thr = r + b`. `vcmos_neuron` fires when
(number of low capacitor inputs) < `thr`. An exact tie, where V_F equals
V_TH because the bias was never applied, counts as not firing.

The ramp stops at `MAX_DIST` = 4 steps. With the threshold at half the
supply, the floating gate has room for only about four units below it, so
words at distance 5 to 8 are treated as "no match" and never fire. A search
whose nearest word is that far ends with nothing selected and O = 0.

## Selecting one word: the priority encoder

`priority_encoder` maps the 32 fired outputs MO_j to a one-hot selection of
the lowest index j. With no input set, all outputs are zero.

It is split the way a fast encoder is usually split:

- Each byte of the input is tested for "any bit set" (a group request), and
  the flag NOR_k marks an empty lower nibble.
- `lookahead_pe` grants the lowest byte that has a request.
- One `data_pe` per byte encodes within its byte. It uses NOR_k to choose
  between the lower and the upper nibble.

PCLK works like the phase clock of precharged logic. While PCLK is high,
the data encoders' output registers load on every clock (evaluate). While
PCLK is low, the outputs are held at zero (precharge). The encoder output is
therefore valid one clock after PCLK rises.

Among equally near words, the choice depends only on the storage position.
No other measure of closeness is used.

## Selection and read-out

`pma_register` captures the encoder output when the control CLK goes from
1 to 0, and holds it as PMA_j. PMA_j closes the read switch SWS_j, which
connects word j to the output lines O.

A CLK pulse while PCLK is low loads all zeros. The write procedure uses this
to disconnect every word before new data are written.

`ref_sram` still models the short circuit that the encoder prevents. If more
than one SWS_j were on, O would be the OR of the selected words and
`multi_sel` would rise. An assertion in the top level checks that this never
happens.

## Operating sequence

All controls are levels sampled on the rising edge of `clk`. The
testbench drives them on the falling edge.

| Step | Controls | Result |
|---|---|---|
| Write | SW1 = SW4 = AD = 1, PCLK = 0; pulse CLK; then A = j, N = data for one cycle per word; AD = 0 | PMA cleared, words stored |
| Phase 1 | N = key, SW4 = 1, SW2 = 1 for a cycle | `level` = 0, bias cleared |
| Phase 2 | SW3 = 1 for a cycle | bias set |
| Phase 3 | F = 1 | exact matches fire at once (`stop` = 1) |
| Search | H = 1 | `level` rises one per cycle and freezes at the minimum distance |
| Select | PCLK = 1, wait one cycle, pulse CLK, SW4 = 0 | PMA one-hot on the lowest nearest word |
| Read | — | O = selected word |

The search takes (minimum distance) cycles after F, at most 4 cycles.
Selection adds about 3 cycles.

CHG is a second input of the OR gate that stops the ramp. Holding it high
freezes the ramp without any word having fired.

## Departures and own choices

Where the circuit description is silent, these choices were made:

- **One system clock.** The analog circuit is driven by control waveforms.
  Here every control is sampled on `clk`, and the CLK and PCLK controls are
  treated as signals rather than clocks.
- **Whole-unit ramp.** The continuous constant-current ramp is one unit per
  clock cycle.
- **Roles of SW2 and SW3.** SW2 resets the gate and SW3 applies the bias.
  The circuit description only says that the two together bring the gate
  from V_TH to V_TH + half a unit.
- **The OR gate and CHG.** The OR of all MO_j, together with CHG, is what
  stops the ramp.
- **PCLK.** PCLK is modelled as evaluate/precharge with a one-cycle output
  register. The lookahead encoder is combinational, although the circuit
  gives it a PCLK input too.
- **Reset.** An asynchronous reset (`rst_n`) clears the ramp, the encoder
  registers and PMA. The memory array has no reset.
- **Read path.** Reading goes only through SWS_j to O. The word line is not
  used for reading. Writing uses the decoder's word line and the bit lines
  driven from N through SW4.
- **Observation outputs.** The ports `mo`, `pe_out`, `dh`, `level`,
  `stop` and `multi_sel` exist for testing.

Not modelled: the analog inverter, the capacitors (16 fF each), the current
mirror (40 kOhm), the transistor-level transfer gates, and any voltage or
time constant. No controller is included. The sequence above has to be
driven from outside, as the testbench does. The original circuit without
the priority encoder is not included either. In that circuit the fired
outputs go straight to the flip-flops, which shorts tied words together.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` at the end. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
    rtl/am_pkg.sv tb/tb_assoc_mem_top.sv --top-module tb_assoc_mem_top -o sim
./obj_dir/sim
```

`tb_assoc_mem_top` runs the whole memory at full size (32 x 8, no parameter
overrides). It starts with the evaluation pattern:

- The input is 0000_1010.
- Words 11, 15, 27 and 28 are at distance 1 (0010_1010, 0000_1110,
  0000_1011, 0000_1000).
- Every other word is at distance 2 or more. Word j holds 32 + j, raised
  where needed.

All four nearest words fire, the encoder passes only word 11, PMA_11 is the
only flip-flop set, and O reads 0010_1010.

It then runs 60 random operations, each on fresh memory contents. They cover
exact matches, distances 1 and 2, ties, searches with nothing in range, and
CHG. The testbench counts each of these and fails if one never occurs. It
also checks the ramp's cycle count against the minimum distance.

The block testbenches are exhaustive where the input space is small (the
decoder and the two encoder pieces) and random otherwise.
`tb_vcmos_neuron` compares the firing rule with the floating-gate voltage
computed in real numbers.

## Changing it

The sizes live in `am_pkg`. Widening the words (`BITS`) widens the compare
and the distance counters. `MAX_DIST` sets how far the search reaches.
`priority_encoder` takes any multiple of 8 for `N`, and `lookahead_pe` grows
with it. The top level passes `WORDS` to it.
