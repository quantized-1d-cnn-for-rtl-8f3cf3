# PDM-to-PCM conversion with a quantized 1D-CNN

A digital MEMS microphone delivers audio as a 1-bit pulse-density-modulated
(PDM) stream at 2.048 MHz. A keyword-spotting front end wants 8-bit PCM at
16 kHz. Going from one to the other means decimating by 128 with a good
anti-alias low-pass filter. That job is usually done by a CIC filter chain
followed by a compensating FIR. Here it is done by a tiny convolutional
network instead. The network's strides do the decimation, and its trained
kernels do the filtering:

| layer | kernel | stride | padding | activation | output per 1 s |
|-------|--------|--------|---------|------------|----------------|
| CONV1 | 64     | 64     | none needed | tanh, 8 bit | 32,000 |
| CONV2 | 23     | 2      | "same" (10 left, 11 right) | tanh, 8 bit | 16,000 |

Each layer has one channel. In total there are 64 + 23 weights and 2 biases,
which makes 89 bytes of parameters. The hardware computes both layers on a
single multiply-accumulate unit, one tap per clock, and stores only what the
two kernels need. Even so, at an 83.33 MHz clock it is idle about 97 % of the
time.

The RTL is bit-exact to a fixed-point reference model: the same model that
is in `tb/pdm_ref_pkg.sv`. It does **not** come with trained weights. The 89
parameter bytes are loaded after reset, and the filter's quality depends
entirely on them.

## Block structure

```
                         +------------------------- cnn_core ---------------------------+
 pdm_valid,pdm_bit ----->| sipo_in (64 bit) --tap--+                                   |
                         |                          \   op A            +-------+      |
 cfg_valid,cfg_data -----| weight_fifo FIFO1 (65 B) -+--> [ x ] --> [+] -->| acc   |--+   |
                         | weight_fifo FIFO2 (24 B) -+   op W  PE (Q4.11)  +-------+  |   |
                         |                          /                                 v   |
                         | bfifo1 (23 B) <----------+-------------- tanh_act <--------+   |
                         |        |  (head = op A for CONV2)            |                  |
                         |        +-------------------------------------+--> PCM register -+--> pcm_*
                         +----------------------------------------------------------------+
                                          ^ ctrl_t (control word, every cycle)
                                   control_unit (FSM) <-- win_full, cfg_valid
```

* **control_unit**: the FSM. It loads the parameters, starts CONV1 whenever
  64 new PDM bits are in, and starts CONV2 whenever BFIFO1 holds a new
  receptive field. It also handles the padding at both ends of a window.
  Each cycle it drives the whole datapath through a single packed struct,
  `ctrl_t`.
* **cnn_core**: the datapath and all storage, plus the glue multiplexers
  that choose the PE operands.
* **processing_element**: one 8x8 multiplier, one adder and the 15-bit
  accumulator register.
* **tanh_act**: the activation, combinational, between the accumulator and
  the two places a result goes (BFIFO1 and the PCM output register).
* **sipo_in**: the last 64 PDM bits, which is one CONV1 receptive field.
* **weight_fifo**: used twice. FIFO1 holds the CONV1 bias and weights,
  FIFO2 the CONV2 ones. Each is filled once and then rotated.
* **bfifo1**: the last 23 CONV1 outputs, which is one CONV2 receptive field.
* **pdm_cnn_pkg**: number formats, network shape, enums and `ctrl_t`.

## Number formats

| quantity | format | notes |
|----------|--------|-------|
| PDM sample | 1 bit | bit 1 = +1, bit 0 = -1 |
| weights, biases | 8-bit signed Q1.7 | range [-1, 1) |
| activations (CONV1 out, PCM out) | 8-bit signed Q1.7 | -127..127 (tanh is symmetric) |
| accumulator | 15-bit signed Q4.11 | range [-16, 16), saturating |

The PE aligns each product to Q4.11 in one of two ways:

* **CONV1.** Operand A is +1 or -1, so the product is just ±w in Q1.7. It
  is shifted left by 4 bits.
* **CONV2.** Both operands are Q1.7, so the product is Q2.14. It is shifted
  right by 3 bits, an arithmetic shift that truncates towards minus
  infinity.

Biases go through the same multiplier, with A = +1, in the first cycle of
every output.

After every step the sum saturates to [-16, 16). This makes the result
depend on the order of the taps. The order is fixed: bias first, then tap 0
(the oldest sample) up to tap K-1.

**tanh.** The activation is y = sign(x) · min(127, round(128 · tanh(t))),
where t = |x| truncated to 1/256. The magnitude table has 1024 entries of
7 bits and covers 0 ≤ t < 4. Above that, tanh rounds to 127 anyway. The
table is computed at elaboration with `$tanh`, so no data file is needed.
Compared with an exact tanh, the error is below 1.5 LSB. The testbench
checks this for all 32,768 inputs.

## Schedule and timing

Every 64 PDM bits, SIPO_IN raises `win_full` and the CU runs CONV1:

| state | cycles | what happens |
|-------|--------|--------------|
| C1_BIAS | 1 | acc ← bias1; FIFO1 rotates |
| C1_MAC | 64 | acc += w1[k] · (±1 from PDM tap k); FIFO1 rotates |
| C1_WB | 1 | tanh(acc) pushed into BFIFO1 (shift-register mode) |

When BFIFO1 has received enough new values, CONV2 follows at once:

| state | cycles | what happens |
|-------|--------|--------------|
| C2_BIAS | 1 | acc ← bias2; FIFO2 rotates |
| C2_MAC | 23 | acc += w2[k] · BFIFO1 head; FIFO2 and BFIFO1 rotate |
| C2_OUT | 1 | tanh(acc) to the PCM register; pcm_valid one cycle later |

A new receptive field means 13 values at the start of a window and 2 after
that.

After 65, 24 and 23 rotations respectively, FIFO1, FIFO2 and BFIFO1 are
back in their starting state. Nothing is ever addressed: all three are walked in a circle.

**Latency.**

* **Normal samples: 91 cycles.** This is counted from the clock edge that
  captures the PDM bit completing a CONV2 receptive field to the edge that
  raises `pcm_valid`. It is 66 cycles of CONV1 and 25 cycles of CONV2.
* **Right-padded samples at the end of a window: 28 cycles apart.** That is
  one idle cycle, two zero pushes and 25 cycles of CONV2.
* **The first padded sample of a window: 93 cycles after the last PDM
  bit.** It still needs one real CONV1 output and one zero.

**Throughput.** A bit can be accepted on any clock cycle. The work between
two 64-bit windows is at most 91 cycles in steady state. At the end of a
1 s window it is at most 233 cycles (93 + 5 · 28). So input with PDM
samples at least 4 clock cycles apart never overruns. At the reference rate
(2.048 MHz in, 83.33 MHz clock, 40–41 cycles per sample) the margin is more
than tenfold.

### Reading SIPO_IN while it fills

CONV1 reads its 64 taps from SIPO_IN one per cycle, while new PDM bits keep
shifting in. SIPO_IN therefore counts the bits received since its last
complete window, and adds that count to the tap address. Tap j of the
window sits at position 63 − j + count. This lets the window be read in
place, so no second 64-bit copy is needed.

The taps are read oldest-first, one per cycle. A tap falls out only after
j + 1 new bits have arrived. As a result the read stays ahead of the data
being lost, provided CONV1 starts within one input sample period of
`win_full`.

If a window completes while the CU is still busy, the CU remembers it and
runs CONV1 as soon as it is free, and pulses `overrun`. That window's taps
are only intact if the delay was under one sample period.

### Padding and window framing

The input is cut into consecutive 1 s windows of `WIN_BITS` = 2,048,000
bits. Each window is one network inference, padded on its own.

CONV1 has kernel = stride = 64 and covers the window exactly, so it needs no
padding. CONV2 uses TensorFlow-style "same" padding. The total padding is
(N2 − 1) · 2 + 23 − N1 = 21: 10 zeros before the first CONV1 output and 11
after the last. This is how the hardware produces them:

* **Left padding.** BFIFO1 is cleared to zeros at the start of every window
  (with the last output of the previous one). The first PCM sample is
  therefore computed after only 13 real CONV1 outputs.
* **Right padding.** After the last CONV1 output, the CU enters a tail
  phase. It pushes zeros into BFIFO1 (state PAD) instead of CONV1 results
  until all 16,000 outputs are done. `pcm_last` marks the final sample.

Both counts are derived from `WIN_BITS` by the same formula, so shorter
windows work the same way. The testbenches use 40-output windows.

## Interface of `pdm2pcm_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| cfg_valid, cfg_data | in | 1, 8 | parameter bytes after reset: bias1, w1[0..63], bias2, w2[0..22] (89 in all) |
| cfg_done | out | 1 | high once all 89 bytes are in; PDM input is ignored before |
| pdm_valid, pdm_bit | in | 1, 1 | one PDM sample per `pdm_valid` pulse, synchronous to clk |
| pcm_valid, pcm_data | out | 1, 8 | one signed Q1.7 PCM sample per pulse |
| pcm_last | out | 1 | with `pcm_valid`: last sample of the 1 s window |
| overrun | out | 1 | a 64-bit input window completed while the core was busy |

The PDM clock for the microphone, and synchronisation of its data into
`clk`, are outside this design. Parameter: `WIN_BITS` (default 2,048,000,
a multiple of 64).

## Size

Generic coarse synthesis of the whole design gives:

* 287 word-level cells;
* 1039 flip-flop bits: 520 in FIFO1, 192 in FIFO2, 184 in BFIFO1, 64 in
  SIPO_IN, and the rest in the PE, the CU and the output registers;
* one 1024 × 7 ROM for tanh.

The three FIFOs are plain shift registers with a single tap. On an FPGA they
map naturally to shift-register LUTs instead of flip-flops, which is why a
much lower flip-flop count (about 400) is realistic there.

## What follows the reference architecture and what is this design's own

Taken from the reference architecture:

* the network shape: kernels 64/23, strides 64/2, one channel, "same"
  padding, tanh;
* 8-bit weights, biases and activations, and the 15-bit Q4.11 arithmetic;
* the split into control FSM and core;
* a PE of one multiplier, one adder and one register;
* the four memories with their sizes: SIPO_IN 8 B, BFIFO1 23 B,
  FIFO1 65 B, FIFO2 24 B;
* FIFOs that are loaded at start-up and then used as circular buffers;
* BFIFO1 as a shift register for writing and a circular buffer for
  reading;
* the 91-cycle and 28-cycle output latencies.

Chosen here because the reference leaves them open:

* the Q1.7 reading of the 8-bit words and the ±1 meaning of the PDM bit;
* saturation, and truncation of the CONV2 products;
* the tanh table;
* the parameter byte order and the load interface;
* the shift-compensated in-place read of SIPO_IN;
* clearing BFIFO1 and pushing zeros to produce the padding;
* framing into consecutive independent 1 s windows;
* the overrun flag;
* the exact state split.

Known departures:

* **Input spacing.** The reference quotes an input sample "each 27 clock
  cycles" as its limit. This design accepts bits closer together, down to
  about 4 cycles apart, and that figure is not reproduced.
* **tanh.** The reference does not describe how tanh is built. A trained
  network that used a different quantised tanh would give slightly
  different outputs.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| testbench | what it shows |
|-----------|---------------|
| `tb_pdm2pcm_full` | default size: one full 1 s window (2,048,000 bits) at the real 2.048 MHz / 83.33 MHz rate. All 16,000 PCM samples match the model; 91/28/93-cycle latencies; `pcm_last`; no overrun. About 45 s in Verilator. |
| `tb_pdm2pcm_top` | three short windows with random input spacing (4–45 cycles); every sample, every latency, and window changes. Counts each mechanism: parameter load, left pad, right pad, window end, accumulator saturation, tanh saturation, and overrun (forced by back-to-back input). |
| `tb_pdm2pcm_tone` | a 1 kHz tone, second-order sigma-delta encoded, through hand-made low-pass weights (64-tap moving average, 23-tap windowed sinc). 2,000 samples are bit-exact, and the SNR is 29.1 dB against a 25 dB bar. The limit is the moving average, which lets shaped modulator noise alias into the band. Trained weights are what the reference relies on for its 41.56 dB. |
| `tb_control_unit` | exact control-word sequence of every CONV1/CONV2, load counts, pad counts, latencies, overrun |
| `tb_cnn_core` | datapath driven by a hand-written schedule against the model |
| `tb_processing_element` | 20,000 random load/MAC steps, both alignments, saturation both ways |
| `tb_tanh_act` | all 32,768 inputs: table definition, ≤ 1.5 LSB from exact tanh, monotonic, odd |
| `tb_sipo_in` | in-place tap reads while bits keep arriving; `win_full` period; clear |
| `tb_weight_fifo`, `tb_bfifo1` | load, rotation through full circles, padding zeros, clear |

The input signal comes from a first-order sigma-delta modulation of two
tones, generated in the testbench. The random weights are biased positive
for CONV1 so that both the linear and the saturated ranges get exercised.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/pdm_cnn_pkg.sv tb/pdm_ref_pkg.sv tb/tb_pdm2pcm_top.sv \
  --top-module tb_pdm2pcm_top -Mdir obj && ./obj/Vtb_pdm2pcm_top
```

The two packages are named first. Verilator finds every other module in
`rtl/` and `tb/` by its file name. For another testbench, change the last
file and the top-module name.

## Changing it

* **Window length.** Set `WIN_BITS`. Padding, counters and the tail are
  derived from it.
* **Network shape.** `K1`, `K2` and `S2` live in `pdm_cnn_pkg`; the FIFO
  depths and the CU follow them. SIPO_IN needs `K1` to be a power of two.
  The architecture assumes CONV1's stride equals its kernel.
* **Arithmetic.** The formats are set in `pdm_cnn_pkg` and
  `processing_element`. If you change them, change `pdm_ref_pkg` to match:
  the testbenches compare bit-exactly.
