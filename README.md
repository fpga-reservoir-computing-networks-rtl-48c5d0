# Delayed-feedback reservoir hardware for spectrum sensing

A delayed-feedback reservoir (DFR) is a recurrent neural network with a single
nonlinear neuron. The neuron is time-multiplexed. Each input sample is
multiplied by a fixed random mask of N values, giving N *subsamples*. These
are fed one after another through the nonlinearity. The neuron's outputs pass
along a delay line N positions long, whose taps are the N *virtual nodes*.
Each new node value therefore combines the current subsample with the value
the same node had one sample earlier:

    x(k) = f( gamma * J(k) + eta * x(k - N) )        f(v) = v / (1 + v^16)

J is the masked input, gamma is the input gain and eta is the feedback scale.
f is a Mackey-Glass nonlinearity. Only the output layer is trained, offline by
ridge regression. After the N subsamples of a sample, the prediction is the
dot product of the N node values with N trained weights. The target task is
spectrum sensing, which decides from received I/Q samples whether a channel
is occupied. The NARMA10 time-series benchmark is the second workload.

This repository holds two independent hardware versions of that network.
They are instantiated side by side in `dfr_system_top`:

| | hybrid accelerator (`dfr_accel_top`) | software-radio core (`bladerf_dfr_top`) |
|---|---|---|
| nonlinearity | off chip: analog Mackey-Glass circuit, reached through a DAC and an ADC | on chip, in floating point |
| numbers | 16-bit fixed point | 26-bit float (8-bit exponent, 17-bit mantissa) |
| nodes | 100 | 50 |
| host | AXI4-Lite (an ARM processor on a Zynq-7000) | simple word bus (the radio's soft processor) |
| rate | 6100 cycles per sample, about 1640 samples/s at 10 MHz | 409 cycles per sample |

The two share no logic. Each has its own clock, reset and ports. The ports
of the hybrid accelerator are prefixed `z_` in the top, those of the radio
design `b_`.

## 1. Hybrid accelerator: the analog loop

### 1.1 One subsample

The nonlinear neuron is an analog chip. For every subsample, `dfr_reservoir`:

1. Reads the masked input `J` (16-bit, unsigned) from the input memory.
2. Forms the DAC code
   `code = min(65535, J + ((x_last * eta) >> 15))`.
   Here `x_last` is the oldest of the 100 node values and `eta` is an unsigned
   Q1.15 register (0x8000 = 1.0).
3. Sends `code` MSB first over a 3-wire serial link to an external 16-bit DAC
   with a 2.5 V reference (`dfr_dac_spi`). Chip select is low for the
   transfer. Data changes on the falling clock edge.
4. Waits `SETTLE` cycles (a register, default 0), then pulses `adc_convst`.
5. Waits for `adc_eoc` and takes the 12-bit result `adc_data`. This is the
   analog output sampled by the FPGA's 1 V ADC.
6. Shifts `adc_data << 4` into the first node of the delay line. The 12-bit
   value is stored MSB-aligned in 16 bits. This keeps node values on the same
   scale as DAC codes when they are fed back.

The input gain gamma is 1 in this design. Its effect is folded into the
mask, which is applied in software: the host loads *already masked* inputs.

Timing: each subsample costs 39 fixed cycles plus `SETTLE` plus the ADC
conversion time. The serial transfer accounts for 32 of the 39 cycles (one
bit per two clocks). With a 22-cycle conversion, one sample of 100 nodes
takes 100 × 61 = 6100 cycles. At 10 MHz that is 0.61 ms, or about 1640
samples/s. The published figure for this system is about 1625 samples/s.
The conversion time is an input of the design, not a constant of it: any
converter with a convst/eoc handshake fits.

### 1.2 A run

A run has three phases, sequenced by `dfr_controller` and shown in the
STATUS register:

* **initialization**: `NUM_INIT` samples pass through the loop only to bring
  the reservoir out of its all-zero start;
* **emulation**: `NUM_TEST` more samples. Every new node value is also
  written to the reservoir memory. Sample `s`, node `i` goes to address
  `s*100 + i`;
* **evaluation**: `dfr_matmul` computes, for each test sample,
  `y[s] = (sum_i W[i] * x[s*100+i]) >>> 16`. W is signed 16-bit and x is
  unsigned 16-bit. The sum uses a 48-bit accumulator. The result is stored
  as 32 bits in the output memory. The block does one multiply per cycle
  through a four-stage pipeline. That is 100 cycles per test sample plus 6
  cycles of overhead per run.

The `CYCLES` register reports the length of the last run:
`(NUM_INIT+NUM_TEST) * 100 * (39 + SETTLE + t_adc) + 100*NUM_TEST + 6`.
A run with no test samples skips evaluation and adds 4 cycles instead of the
last two terms.

### 1.3 Host view

Byte address = `{region[2:0], word[16:0], 2'b00}`. Every access is one
32-bit word. Narrower memory words are zero-extended on reads.

| region | contents | depth × width |
|---|---|---|
| 0 | registers | 10 × 32 |
| 1 | masked inputs | 131072 × 16 |
| 2 | recorded node values | 131072 × 16 |
| 3 | output weights (signed) | 128 × 16 |
| 4 | predictions (signed) | 2048 × 32 |

Registers:

| # | name | access | meaning |
|---|---|---|---|
| 0 | CTRL | W | bit0 start (pulse), bit1 clear done |
| 1 | STATUS | R | bit0 busy, bit1 done, bits 4:2 state (0 idle, 1 init, 2 emulation, 3 evaluation, 4 done) |
| 2 | NUM_INIT | RW | initialization samples |
| 3 | NUM_TEST | RW | test samples |
| 4 | ETA | RW | feedback scale, Q1.15. Reset 0x0800 (0.0625, the spectrum-sensing value). Use 0x4000 for NARMA10 (0.5) |
| 5 | NODES | R | 100 |
| 6 | SETTLE | RW | extra cycles between DAC update and ADC start |
| 7 | LAST_DAC | R | last DAC code |
| 8 | LAST_ADC | R | last ADC result |
| 9 | CYCLES | R | cycles of the last run |

A run goes like this:

1. Write `(NUM_INIT+NUM_TEST)*100` masked inputs and the 100 weights.
2. Write the sample counts and ETA.
3. Write CTRL = 1.
4. Poll STATUS or wait for `irq_done`.
5. Read the predictions and, if wanted, the node values.
6. Write CTRL = 2 to clear done.

A start written during a run is ignored.

The AXI4-Lite slave handles one transaction at a time. A write is accepted
when address and data are valid together. A read is accepted only when no
write is waiting. The byte strobes only gate the write as a whole: if any
strobe is set, the whole word is written.

### 1.4 Capacity

The input and node memories hold 131072 words each. One run can therefore
cover up to 1310 samples of 100 nodes, and it can return at most 2048
predictions. The NARMA10 set (100 + 5900 + 4000 samples) and the
spectrum-sensing set (20 + 980 + 5082) must be processed in several runs.
By bit count the memories fill about 116 36-kbit block RAMs. Mapped into real 36-kbit tiles, the two deep memories take 64 each, about 131 tiles in all. The published implementation reports 118 tiles, which points to somewhat shallower memories. Lower `Z_IN_AW`/`Z_RES_AW` if the target device is short of block RAM.

## 2. Software-radio core: the float DFR

### 2.1 Number format (`dfr_fp_pkg`)

Each number is 26 bits: sign, 8-bit exponent with bias 127, and a 17-bit
mantissa with a hidden one. Multiply, add, divide and square root round to
nearest even. There are no subnormals: results that small become zero. There
are no infinities or NaNs. Overflow and division by zero give the largest
finite number. The square root of a negative number gives zero. The functions
are plain SystemVerilog functions. Each is written to become one
combinational unit.

### 2.2 What the core computes (`hls_dfr_core`)

For each received I/Q pair (16-bit signed each) the core computes:

    e      = sqrt((i/2047)^2 + (q/2047)^2)             frame energy
    for k = 49 down to 0:
        v      = 0.5 * (mask[k] * e) + 0.4 * res[k]
        res[k] = v / (1 + v^16)
        score += w[k] * res[k]

Every node is fed back from its own value one sample earlier, so the node
array acts as the delay line. `res` is zero after reset. The mask (range
±0.5) and the weights are 50-entry float arrays. They are written through a
load port while the core is idle.

### 2.3 Schedule and latency

The node loop is unrolled by two, as in the original. Two lanes each have
their own multiplier and divider and work on nodes k and k-1 at the same
time. The two products for the score are added one after the other in the
same step. A state machine steps both lanes together, one operation per
cycle. It computes `v^16` by square-and-multiply over the bits of the
exponent and skips the multiply for zero bits (16 = 10000b: 4 squarings, 1
multiply). One node pair takes 11 + 4 + 1 = 16 cycles. A score appears
`6 + 25 × 16 = 406` cycles after the input was taken. `N_NODES` must be even.

Handshake: inputs use `in_valid`/`in_ready`. `out_valid` pulses with the
score; the output cannot stall. The original design was a pipelined and
two-way unrolled high-level-synthesis core. It took 374 cycles at about
194 MHz, using 48 DSP blocks. This version keeps the unrolling but not the
deeper pipelining. See section 4.

### 2.4 Around the core (`bladerf_dfr_top`, `hls_dfr_player`)

The radio's own FPGA logic is not part of this design. It connects through a
host bus and the receive stream. That logic comprises the soft processor,
the transceiver interface, the receive FIFO and the USB bridge. The
receive-stream tap carries the 12-bit signed I/Q values where they enter the
receive FIFO.

Host bus: word address `host_addr[14:0]`. `host_rdata` is valid one cycle
after `host_read`.

| bits 14:13 | target |
|---|---|
| 0 | registers: 0 CTRL (bit0 start playback, bit1 live mode), 1 STATUS (bit0 busy, bit1 done), 2 NUM_SAMPLES, 3 SCORES, 4 DROPPED |
| 1 | sample memory: 8192 words `{Q[15:0], I[15:0]}`, the receive-FIFO word layout |
| 2 | result memory: 8192 scores, float in bits 25:0 |
| 3 | load port, write only: bit 6 = 1 weight / 0 mask, bits 5:0 node |

* **Playback**: writing CTRL bit0 plays `NUM_SAMPLES` stored samples through
  the core. Each sample goes in as soon as the core is ready. Scores go to
  consecutive result addresses and also out on `score_valid`/`score`.
  Consecutive scores are 409 cycles apart: the core's 406 cycles plus
  memory read, feed and result write. The 8192-word memories hold the
  complete 6102-sample spectrum-sensing set.
* **Live mode**: CTRL bit1 connects the receive stream to the core. A sample
  that arrives while the core is busy is dropped and counted in DROPPED. At
  409 cycles per score the core keeps up only with a heavily decimated
  stream.

## 3. Files

`rtl/`, one unit per file:

* `dfr_pkg`: register map, region and state encodings.
* `dfr_dp_ram`: true dual-port RAM, 1-cycle read.
* `dfr_axi_slave`: AXI4-Lite slave to word bus.
* `dfr_regfile`: the ten registers.
* `dfr_controller`: run sequencing.
* `dfr_reservoir`: the analog loop (section 1.1).
* `dfr_dac_spi`: DAC serial link.
* `dfr_matmul`: the readout.
* `mg_asic_model`: behavioural model of the analog chip, `real` ports,
  `v/(1+v^16)`. It is not synthesizable.
* `dfr_accel_top`.
* `dfr_fp_pkg`, `hls_dfr_core`, `hls_dfr_player`, `bladerf_dfr_top`.
* `dfr_system_top`.

`tb/`:

* One self-checking testbench per unit, named `tb_<unit>`.
* Behavioural models of the DAC (`tb_dac_model`) and of the FPGA ADC
  (`tb_xadc_model`).
* Helper packages:
  * `dfr_tb_pkg`: the loop's expected arithmetic.
  * `dfr_fp_tb_pkg`: conversion between float and `real`.
  * `hls_ref_pkg`: double-precision model of the float core.

Every testbench prints `TB_RESULT checks=<n> failures=<m>`.

## 4. Where this design departs from the original, and how far to trust it

* **Feedback scaling**: eta is a Q1.15 multiply of the last node value. The
  ADC result is stored as `adc << 4` before it is fed back. The original
  only says that the input is added to the scaled last node, so both
  scalings are choices of this design. If the trained weights assume another
  node scaling, they must be rescaled.
* **Readout arithmetic**: this design has one 16×16 multiplier and a 48-bit
  accumulator, with the output shifted right by 16. The original used three
  DSP blocks; how it split the products among them is not known here.
* **Memory depths, address map, register layout, SPI mode, ADC handshake and
  the SETTLE wait** are this design's own.
* **Analog chip**: the model is the ideal curve with a = 1 and exponent 16,
  on a 1 V scale. The real chip is noisy and its output passes a voltage
  divider. Neither is modelled. The testbench's converter takes 22 cycles.
* **Float core constants**: the Mackey-Glass constants are set to a = b =
  c = C = 1 and the exponent to 16; the full scale is 2047. The original
  compiles these into the core and the values used here are assumptions.
  They are parameters (`MG_A`, `MG_B`, `MG_C`, `MG_CC`, `MG_P`, `MAX_ADC`),
  as are `GAMMA` and `ETA`.
* **Float core speed**: 406 cycles per sample against the original's 374.
  The results are the same apart from rounding order. The maximum clock rate
  of this datapath has not been measured. The divider and square root are
  single-cycle combinational functions, so expect a low clock rate unless
  they are pipelined.
* **Mask and weights** of the float core are loaded at run time, where the
  original compiled them in.
* **Float format**: there are no subnormals, infinities or NaNs. Ties round
  to even as in the original format.

Checked by simulation:

* the loop arithmetic, bit-exact against an independent model;
* the predictions, bit-exact;
* the cycle counts of runs, of the serial link, of the readout and of the
  float core;
* the float functions, exactly, against `real` arithmetic rounded to 26 bits;
* the float core's scores, within 0.1 % of the summed magnitude of their
  terms, against a double-precision model;
* AXI and host bus protocols, with assertions on handshake rules.

## 5. Simulating

With verilator 5, for example the full-size end-to-end test of both designs:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
      --top-module tb_dfr_system_top -y rtl -y tb +libext+.sv -Irtl -Itb \
      rtl/dfr_pkg.sv rtl/dfr_fp_pkg.sv tb/dfr_tb_pkg.sv tb/dfr_fp_tb_pkg.sv \
      tb/hls_ref_pkg.sv tb/tb_dfr_system_top.sv
    ./obj_dir/Vtb_dfr_system_top

Replace the top module and the last file to run another testbench.
`tb_dfr_system_top` and `tb_dfr_accel_top` run every unit at its default
size: 100 nodes, full memories and a 10 MHz clock. Each finishes in a few
seconds. It drives both designs at once. It covers the initialization,
emulation and evaluation phases, DAC saturation, an ignored start, clearing
done, a run without test samples, playback, the switch to live mode and
dropped live samples. It counts each of these and fails if one never
happens. The unit testbenches of the reservoir and the readout use
5 and 7 nodes to keep them short.

`tb_dfr_workloads` runs the two workloads at the largest size one run holds.
It takes about a minute.

* **NARMA10** on the accelerator: a generated input series, masked and run
  as 100 initialization plus 1210 test samples with eta = 0.5. This fills
  the input and node memories.
* **Spectrum sensing** on the float core: 6102 synthetic I/Q frames, half
  carrying a signal and half noise only. They are played from the sample
  memory.

Every prediction and score is compared with the software models, and the
run times are checked.

To change the size, set the parameters of `dfr_system_top`: `Z_N_NODES`,
`Z_IN_AW`, `Z_RES_AW`, `Z_W_AW`, `Z_OUT_AW`, `Z_DAC_CLK_DIV` for the
accelerator, and `B_SAMP_AW`, `B_N_NODES` for the radio design.
`Z_DAC_CLK_DIV` sets half the serial clock period in system clocks. A value
above 1 slows every subsample by 32 × (DIV − 1) cycles.
