# Digital multiplying delay-locked loop (MDLL): 1.4 GHz from 43.75 MHz

A ring oscillator running at 32 times the reference frequency makes the clock. Once every 32 output
cycles a multiplexer at the ring's input swaps the ring's own edge for the clean reference edge.
The ring's accumulated jitter is thrown away at every reference cycle. Oscillator phase noise is
therefore suppressed over a bandwidth close to the reference frequency, much wider than a PLL loop
bandwidth can be.

For the swap to be seamless, the ring's own 32nd edge must arrive at the same moment as the
reference edge. A fully digital loop tunes the ring to make that so:

```
            +-----------+    +-----------+    +------+    +-----------+    +---------+
REF --+---->| saff_pd   |--->| loop_acc  |--->| dsm2 |--->| bin2therm |--->| dac_lpf |--> V_CTRL
      |  +->| bang-bang |S/R | 18b, +-1  |14b | 2nd  | 4b |  4 -> 15  | 15 | DAC+RC  |      |
      |  |  +-----------+    +-----------+    +------+    +-----------+    +---------+      |
      |  |                                                                                  v
      |  |   +---------------------------------- mux_vco ----------------------------------------+
      +--|-->| 2 delay cells -> ref_buf -> [1]                                                    |
         |   |                              MUX -> cell1 -> cell2 -> cell3 -> cell4 -> cell5 --+--> OUT
         +---|------------------------ OUT -> [0]   OUT1            OUT3                        |  |
             +---------------------------- ^ sel ------|-----------------|----------------------+  |
                                           |           |                 v                         |
                                     select_logic <----+   DIV <--- divider (/32, falling OUT3)    |
                                           ^------------------------------+                        |
```

| Module | What it is | Kind |
|---|---|---|
| `dmdll_top` | the whole loop | RTL + the two models below |
| `saff_pd` | 1-bit time-to-digital converter (sense-amplifier flip-flop) | RTL |
| `loop_acc` | 18-bit integrator; its 14 MSBs go on to the modulator | RTL |
| `dsm2` | 2nd-order error-feedback delta-sigma modulator, 14 → 4 bits | RTL |
| `bin2therm` | 4-bit to 15-bit thermometer decoder | RTL |
| `dac_lpf` | 15-element current DAC + 2nd-order RC filter → V_CTRL | behavioural model |
| `mux_vco` | reference buffer, MUX, 5-stage ring | behavioural model |
| `delay_cell` | one ring stage with a controllable delay | behavioural model |
| `ref_mux` | the 2:1 MUX at the ring input | RTL |
| `divider` | ÷32 ripple counter of five flip-flops | RTL |
| `tspc_dff` | the divider's flip-flop | RTL |
| `select_logic` | generates SEL from DIV and OUT1 | RTL |
| `dmdll_pkg` | shared widths and constants | package |

The two analog parts (the DAC with its filter, and the ring) are timing models written in
SystemVerilog with delays. Everything else is synthesizable logic. The models let the whole loop
run in an ordinary event-driven simulation.

## How the reference edge gets in: SEL timing

This is the delicate part of the design. SEL must switch while the ring is between edges, never
while an edge is passing through the MUX. The ring has five inverting stages. Call the MUX output
M, the stage outputs OUT1…OUT5 and OUT = OUT5. One output period is ten stage delays d.

1. An M rising edge makes OUT3 fall 3d later. On the last such edge before the insertion, the
   divider (clocked by the inverted OUT3) makes DIV rise. DIV sets the armed flip-flop in
   `select_logic`.
2. M falls half a period later, and OUT1 rises d after that. SEL = armed ∧ OUT1 now rises. At this
   moment M is low and the reference is low too, so nothing moves.
3. The ring's own rising edge would now reach the MUX. With SEL high the MUX holds the ring at the
   reference instead, and the ring waits. When the reference (after its two-cell buffer) rises, M
   rises.
4. d later OUT1 falls. SEL drops and the MUX returns to OUT, which by then has risen as well. The
   same falling OUT1 edge sets `done`, which holds the armed flip-flop reset for one period. The
   logic is then ready for the next DIV.

With MODE low the armed flip-flop is held reset, SEL stays low and the ring runs freely.

Because the ring waits at step 3, the divider's count lines up with the reference by itself after
start-up. No separate phase alignment is needed.

## The loop

- **Phase detector** (`saff_pd`). At each rising edge of the buffered reference it samples OUT, the
  MUX's other input. OUT already high means the ring was early (the reference lags). The detector
  then gives S, which adds +1. Otherwise it gives R, which adds −1. There is one decision per
  reference cycle.
- **Integrator** (`loop_acc`). The loop is first order, so an accumulator is the whole filter. A
  bang-bang detector with loop latency makes the accumulator limit-cycle by a few counts. Dropping
  the 4 LSBs keeps that dither away from the DAC.
- **Delta-sigma DAC**. `dsm2` computes v = x + 2·e[n−1] − e[n−2]. It outputs v[13:10] and keeps
  e = v[9:0]. This shapes the truncation error by (1 − z⁻¹)², and the coefficients need no
  multiplier. The 4-bit code drives 15 unit current elements through `bin2therm`. A 2nd-order RC
  filter (R = 100 kΩ, C = 3.2 pF, τ = 320 ns) removes the shaped noise.
- **Sign.** S (ring early) must slow the ring. In this model a higher V_CTRL gives a longer stage
  delay.

The accumulator LSB is worth 1/16384 of one DAC element. In the default model that is 0.12 fs of
stage delay, or 39 fs on the 32nd edge. The filter delays the response by about 14 reference
cycles. After lock the loop settles into a limit cycle of about ±10 accumulator counts, and the
ring's 32nd edge stays within ±1.5 ps of the reference edge.

## Capture range: start the ring fast

The loop acquires lock only when the ring starts fast, or at most about one stage delay (~70 ps)
late over 32 cycles. If the ring is slower than that, SEL falls at step 4 before OUT has risen. M
then drops back and rises again when OUT finally rises. That is a split edge, which the divider
counts as an extra cycle, and the loop never locks.

Set the starting point with `coarse` (manual coarse tuning, 250 fs per step per stage) and the
`ACC_INIT` parameter so that the ring starts slightly fast. A fast ring simply waits at the MUX
for the reference edge, and the loop then slows it down. With the defaults and `coarse = -3` the
ring starts 1 % fast and locks in about 6300 reference cycles (0.14 ms).

## Parameters and the numbers behind the models

| Name | Default | Where from |
|---|---|---|
| accumulator width / dropped LSBs | 18 / 4 | published design |
| DSM | 14 in, 4 out, 10-bit error, coefficients 2, −1 | published design |
| DAC elements | 15, thermometer coded | published design |
| RC filter | 100 kΩ, 3.2 pF, 2nd order | published design; two equal sections is this design's reading |
| ring / reference buffer | 5 stages / 2 cells | published design |
| division ratio | 32 (5 flip-flops) | published design |
| `ACC_INIT` | 2¹⁷ (mid-scale) | this design |
| `dac_lpf.V_UNIT_UV` | 80 mV per element (1.2 V full scale) | this design |
| `dac_lpf.ALPHA_Q16` | 4518 = 65536·(1 − e^(−T/RC)), T = 1/43.75 MHz | derived |
| `mux_vco.D_NOM_FS` | 71429 fs, 1/(1.4 GHz)/10 at V_MID | derived |
| `mux_vco.KVD_FS_PER_MV`, `V_MID_UV`, `COARSE_STEP_FS` | 25 fs/mV, 640 mV, 250 fs | this design |

Stage delay = D_NOM + KVD·(V_CTRL − V_MID) + COARSE_STEP·coarse. At coarse 0 this covers
55–85 ps, that is 1.17–1.80 GHz. All times are integer femtoseconds (`timescale 1fs/1fs`).

The digital loop (accumulator, modulator, DAC update) is clocked by the reference. The phase
detector is clocked by the reference as it reaches the MUX. Every register has an asynchronous
active-low reset.

## Where this departs from a silicon implementation

- The phase detector is an ideal flip-flop. The dead zone of a real sense-amplifier flip-flop
  (metastability plus reference jitter) is not modelled, and neither is its setup-time offset.
- The ring, the MUX and the DAC are noiseless. This RTL therefore cannot reproduce random jitter,
  phase noise or reference spurs. The silicon measured 1.57 ps rms integrated jitter and a
  −50 dBc spur. It only shows the deterministic behaviour of the loop.
- The differential Kim-Lee delay cells are single-ended inverters with transport delay. The
  transmission-gate MUX is ideal logic. The path matching between the two MUX inputs is
  represented by the two-cell reference buffer.
- The TSPC flip-flops and the select-logic gates are written as behaviour, not as transistors.
  The reset path of the select logic (the `done` register) is this design's choice: the required
  behaviour is known, but not the exact gates.
- The accumulator saturates at its ends. The modulator's output is clamped to 0..15, which only
  matters within about two codes of either end of the input range.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/dmdll_pkg.sv tb/tb_dmdll_top.sv --top tb_dmdll_top
./obj_dir/Vtb_dmdll_top
```

- `tb_dmdll_top` runs the whole loop at its default parameters, in about 3 s:
  - acquisition from a 1 % fast ring;
  - 1000 locked cycles, each with 32 output edges, one SEL pulse and an edge error within ±5 ps;
  - a limit cycle with both S and R, an accumulator band of about 25 counts that shrinks to at
    most 3 codes once the 4 LSBs are dropped, and a dithering DAC code;
  - hitless switching: at every SEL edge both MUX inputs are equal, so the switch moves no edge;
  - 32000 output periods in exactly 1000 reference periods;
  - MODE low (free-running ring, no SEL), then relock;
  - a coarse-tuning step and re-acquisition.
- `tb_dmdll_1g6` runs the loop at 1.6 GHz from a 50 MHz reference, the ring's design target.
- The block testbenches check the blocks one by one:
  - `saff_pd`: lead and lag decisions;
  - `loop_acc`: counting and saturation;
  - `dsm2`: cycle-exact against an integer model, the running error bound, and the mean;
  - `dac_lpf`: against a floating-point filter;
  - `mux_vco`: periods and tap delays;
  - `divider`: ratio and duty cycle;
  - `select_logic`: pulse placement and MODE.

To change the operating point, change the reference period in the testbench. Then set `coarse` and
`ACC_INIT` so that the ring starts slightly fast (see the capture range above). To change the
multiplication factor, change `DIV_STAGES` in `dmdll_pkg`.
