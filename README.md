# Analog-PIM CNN for a 32×32 biosensor

This chip classifies a sample dropped on a 32×32 biosensor plate into one of
ten diseases (classes A to J). The plate is read through an analog front end
into a 32×32 map of current-change codes. A small convolutional network
(two 4×4 convolutions, two 2×2 max-pools and a fully connected layer of 10
outputs) then finds where on the plate the current changed and by how much.

The central idea is that the network has no digital multiplier. Every
multiply-accumulate is done in one **analog processor-in-memory (PIM)
filter**. This is a 16×4 array of SRAM cells that hold four binary 4×4
filters. Sixteen charge-sharing DACs place a 4×4 window of inputs on the
bitlines. Each SRAM row averages the bitlines its weights select, by charge
sharing on equal capacitors. Four single-slope ADCs then count how long a
ramp takes to reach each average. The digital side only sequences this
filter, moves the feature maps and adds up partial results. The same
4-filter array serves every layer.

The RTL follows the architecture of the article "A Low-Power Analog
Processor-in-Memory-Based Convolutional Neural Network for Biosensor
Applications" (Sensors, 2022): a 180 nm chip at 32 MHz and 1.8 V. The
article gives the block structure, the layer sizes, the PIM size, the
control sequence and the frame format of the host link. Most encodings,
widths and timings are not published. They are this design's choices, and
the last sections list them.

## Block map

```
cnn_biosensor_top
├── aissc            AI smart sensing controller
│   ├── comm_slave   108-bit frame serial slave (host GUI link)
│   └── aimc         AI main controller: sensor scan -> input map
├── ainc             AI neuromorphic controller: runs the CNN
│   ├── fm_mem ×4    channel memories FM0 (input map) .. FM3, 1024×10
│   ├── pim_accum    channel/chunk accumulation, bias, ReLU
│   ├── max_pool     2×2 running maximum on 4 channels
│   └── output_ctrl  arg-max over the 10 scores
└── analog_pim       the PIM filter
    ├── pim_main_ctrl    sequences DAC -> SRAM -> ADC -> refresh
    ├── dac_ctrl ×16     input code -> charge steps
    ├── sram_array       16×4 weight bits
    ├── sram_ctrl        row-by-row multiply-and-average
    ├── adc_ctrl ×4      single-slope count and offset calibration
    └── pim_analog_core  behavioural model of DACs, MAV cells, ramps, comparators
```

`pim_pkg` holds the shared sizes and types. Two parts are not in this RTL:
the biosensor plate and the analog front end (transimpedance and
variable-gain amplifiers, 16-bit ADC). Their digital signals are ports of
the top: `sns_en`, `row_sel`, `col_sel`, `sns_soc`, `sns_eoc` and
`sns_data[15:0]`. The host is a PC GUI behind an FPGA board. In this RTL it
is the serial link `ss_n`, `sck`, `sdi` and `sdo`.

## The analog PIM filter

### One operation

The filter computes, for each of its four stored filters k:

```
YOUT[k] = (1/16) · Σ_i W[k][i] · X[i]        i = 0..15,  W ∈ {0,1}
```

This is a multiply-*and-average* (MAV) rather than a multiply-accumulate.
Bit i of filter k's 16-bit word is the weight applied to input X_i.

An operation is started by `sr_soc` and runs in four phases. `pim_main_ctrl`
runs them in order, and each part is enabled only during its own phase and
the phases after it:

| phase | enable | what happens | length (clocks) |
|-------|--------|--------------|-----------------|
| DAC | `pen_dac` | each `dac_ctrl` sends one charge step per clock until its count equals its input code (clipped to 255), then raises EOC_DAC | max input + 1 |
| SRAM (MAV) | `pen_sram` | `sram_ctrl` selects rows 0..3 one after another, SHARE_CYC clocks each; the selected row's MAV node settles to the weighted bitline average | 16 |
| ADC | `pen_adc` | each `adc_ctrl` turns its comparator on (`bias`) and sends ramp steps until the comparator trips; the step count is the result | max result + 3 |
| EOC, refresh | `rst_*` | one-clock `sr_eoc` to the AI controller, then REFRESH_CYC clocks with every analog node discharged | 1 + 4 |

The latency therefore depends on the data. An all-zero window takes about
25 clocks. The worst case, all inputs at 255 and a full-scale result, takes
about 533 clocks, which is 16.6 µs at 32 MHz. `sr_busy` covers the whole
operation including the refresh. A new `sr_soc` is accepted only when
`sr_busy` is low (an assertion checks this).

Loading comes before the start and happens while the filter is idle:

* `sr_wen` copies the 64-bit weight word `w` into the SRAM array.
* `sr_den` latches the 16 input codes `data` into the DAC controllers.

The weights stay stored between operations. A layer that reuses its filters
therefore loads them only once.

### Step units and the 8-bit range

The DAC and the ADC ramp use the same step, about 2.34 mV. 255 steps make
the 600 mV full scale, which gives 8-bit resolution. The data paths are
10 bits wide, the width of the feature-map words, but only codes 0..255
reach the bitlines. The DAC controller clips anything larger to 255. The
conversion result is also at most 255. Because the MAV divides by 16, a
filter with all weights set on inputs of 255 gives 255.

### Offset calibration

In silicon, capacitor and cell mismatch make each row's comparator trip
late by a fraction of a step to a few steps. The model `pim_analog_core`
gives every row its own offset (parameters OFF0..OFF3, in 1/16-step units).
Without correction, the four rows read 1 to 3 codes high.

`adc_ctrl` removes the offset as follows:

1. A *calibration operation* (`sr_cal` with `sr_soc`) is run with all inputs
   at zero.
2. The count it produces is stored as that row's offset.
3. Every later result is the count minus the offset, floored at 0.

The AI controller runs one calibration operation at the start of every run.
What remains is the rounding of the ramp, which keeps results within about
2 codes of the ideal average. That is the same 0 to 2 code offset the
published chip shows after its calibration. The offsets can be read over
the host link (reply register 4).

A standard check from the article works well as a smoke test:

* inputs 63, 0, 63, 0, … on X00..X15
* filters 0x0000, 0x5555, 0xAAAA and 0xFFFF

This design returns 0, 31, 0 and 32, against the ideal 0, 32, 0 and 32.

`tb_analog_pim` also replays the 32 ideal results of the article's offset
measurement (eight cases of four filters, values 0 to 32). Every result
lands within 2 codes of its ideal value.

### What is a model and what is logic

The controllers `pim_main_ctrl`, `dac_ctrl`, `sram_ctrl` and `adc_ctrl`, and
the array `sram_array`, are synthesizable logic. Everything that is a
voltage is in `pim_analog_core`, a behavioural model and not circuitry:

* bitline charge
* the MAV node
* the ramps
* the comparators

It keeps voltages as integers in 1/16 of a step. A chip built from this
RTL replaces `pim_analog_core` with the analog macro. Its ports
(`dac_pulse`, `rwl`, `chg_pulse`, `bias`, `cmp` and the three `rst_*`) are
the boundary between the two.

## Running a CNN on a 16-input filter

`ainc` maps every layer onto operations of 16 inputs × 4 outputs.

| layer | output | one PIM operation covers | operations |
|-------|--------|--------------------------|-----------|
| calibration | – | zero inputs | 1 |
| conv1 4×4, 4 filters, bias, ReLU | 29×29×4 | one 4×4 window of the input, all 4 filters | 841 |
| max-pool 2×2 / 2 | 14×14×4 | – (digital) | – |
| conv2 4×4×4, 4 filters, bias, ReLU | 11×11×4 | one window of **one** input channel; 4 operations are summed | 484 |
| max-pool 2×2 / 2 | 5×5×4 | – (digital) | – |
| FC 100 → 10 | 10 scores | 16 of the 100 inputs × 4 outputs; 7 chunks × 3 output groups, padded with zeros | 21 |
| arg-max | class | – | – |

For every operation the controller does four things:

1. It reads the 16 window words from a channel memory, one per clock.
2. It writes the weight word into the SRAM array, but only if that word is
   not already there.
3. It starts the filter.
4. It adds the four results into `pim_accum`.

When all parts of an output have been added, `pim_accum` adds the bias and
applies ReLU, clipped to 0..1023. The four outputs (one per filter) are
then written to the four channel memories in parallel.

Because the weight word is written only when it changes, each layer reuses
the stored filter as much as it can:

* conv1 writes its weights once for all 841 windows.
* conv2 changes the word with the input channel, 4 writes per output pixel.
* The FC layer writes one word per operation.

A run makes 506 weight writes in 1347 operations.

**Feature maps in place.** There are only four channel memories, FM0..FM3,
of 1024 words each. The input map lives in FM0, at address 32·row + col.
Every layer writes output pixel (r, c) of channel k to address
r·width + c of memory k. This address is always at or below the addresses
that later pixels of the same layer still have to read. So each layer
overwrites its own input safely, and no second set of buffers is needed.
Pooling reads all four memories at once and keeps a running maximum over
the four window values.

**FC flattening.** Input n of the fully connected layer is
channel n / 25, position n mod 25 (channel-major, row-major within the 5×5
map). Inputs 100..111 of the last chunk are zero.

**Memories written by the host:**

* Weight memory, 26 words of 4×16 bits:
  * word 0: conv1
  * words 1..4: conv2, for input channels 0..3
  * words 5 + 7·g + m: FC output group g (classes 4g..4g+3), input chunk m
* Bias memory, 18 signed 12-bit words:
  * 0..3: conv1
  * 4..7: conv2
  * 8..17: FC classes 0..9

**Output.** `output_ctrl` picks the largest of the ten FC scores; a tie goes
to the lower class. Softmax does not change which score is largest, so it
is not computed. The scores themselves can be read over the host link.

**Timing.** With the scan, a complete run takes about 183,000 clocks
(5.7 ms at 32 MHz) on the test data. Almost all of it is spent in the PIM's
DAC and ADC ramps. The published chip needs 15 ms for the same path.

**Filter test mode.** With `mode = 1` the controller skips the network and
runs one operation on the test operands `pim_x`/`pim_w`. The four results
appear as `conv_out`. This is how the filter can be checked from the host.

## Sensor scan

`aimc` visits the 1024 cells in raster order. For each cell it:

1. sets one bit of `row_sel` and one of `col_sel`;
2. waits SETTLE_CYC clocks for the front end;
3. pulses `sns_soc` and waits for `sns_eoc`;
4. clips the 16-bit code to 1023 and writes it to FM0.

`sns_en` powers the front end only while a scan runs.

## Host link and frame map

`comm_slave` is a 4-wire serial slave in mode 0 (sample on the rising edge
of `sck`, MSB first). It is oversampled by `clk`, which must run at least
8× faster than `sck`. Every transfer is a frame of 108 bits: an 8-bit frame
id (FID) and 100 bits of data (FDATA). While a frame comes in, the slave
shifts out a reply frame. The reply carries the read register selected by
the previous READ frame, with that register's number as its FID.

| FID | name | FDATA |
|-----|------|-------|
| 0 | CTRL | [0] start, [1] scan the sensor, [2] mode (1 = filter test), [3] run the CNN when the scan ends |
| 1 | WEIGHT | [68:64] word address, [63:0] filters 4..1 (filter 1 in [15:0]) |
| 2 | BIAS | [84:80] address, [11:0] signed value |
| 3 | IFM | [99:90] first address, [79:0] eight 10-bit input words |
| 4, 5 | PIMX0/1 | filter-test inputs X00..X07 / X08..X15 |
| 6 | PIMW | filter-test weights, as WEIGHT |
| 7 | READ | [3:0] reply register; [29:28] channel and [25:16] address of a feature-map word |

Reply registers:

| register | contents |
|----------|----------|
| 0 | scan busy [48], CNN busy [47], done [46], class [43:40], last four PIM results [39:0] |
| 1 | scores 0..5 |
| 2 | scores 6..9 (16 bits each) |
| 3 | the selected feature-map word |
| 4 | the four ADC offsets |

Writes from frames reach the memories only while the CNN is idle.

## Simulating

Each block has a self-checking testbench `tb/tb_<block>.sv`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops itself if it hangs. The
reference models are in `tb/tb_ref_pkg.sv`:

* the ideal and the offset-affected PIM result
* the bit-exact network
* a test-image generator

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/pim_pkg.sv tb/tb_ref_pkg.sv tb/tb_cnn_biosensor_top.sv \
    --top-module tb_cnn_biosensor_top -Mdir obj_top
./obj_top/Vtb_cnn_biosensor_top
```

Replace the testbench name to run another block.

`tb_cnn_biosensor_top` runs the whole chip at its default sizes through its
pins:

* It sends weights, biases and an input frame over the serial link.
* It scans a synthetic 32×32 plate with one hot region through a model of
  the front end.
* It lets the CNN start automatically and reads back the class and scores.
* It compares them with a bit-exact reference of the network.
* It runs the filter test above.
* It finally loads a second plate word by word through input frames, starts
  the CNN with a host command and checks the class and scores again.

It also counts every mechanism of the design and fails if one never
happened:

* frames
* conversions
* automatic start
* calibration
* weight writes and reuse
* DAC clipping
* ReLU at zero and at saturation
* pooling
* FC padding
* input frames and the command-started run

It takes about a second of simulation. The weights are random: trained weights are
not part of this design.

## What follows the published design and what is this design's own

Taken from the published design:

* the partition into AISSC (with AIMC and the communication slave), AINC
  and the analog PIM
* the layer sizes (32×32 → 29×29×4 → 14×14×4 → 11×11×4 → 5×5×4 → 10)
* ReLU activations and 2×2/2 max-pooling
* the 16×4 SRAM array with 16 DACs and 4 ADCs
* the multiply-and-average with N = 16
* the DAC → SRAM → ADC → refresh sequence with EOC handshakes and
  per-phase enables
* the single-slope ADC with calibration and the 8-bit, 2.34 mV-per-step
  ramp
* four feature memories named IFM/FM1..FM3 with separate read and write
  ports
* the 108-bit frame of FID and 100 data bits

Chosen here, because the article does not give them:

* one ramp step per clock
* 4 clocks per MAV row and 4 refresh clocks
* the calibration method (a zero-input conversion stored and subtracted)
* the offsets of the analog model
* binary weights (one bit per cell)
* clipping of the 10-bit data to the 8-bit DAC range
* summing conv2 over channels, and the FC layer over chunks, outside the
  PIM
* the in-place memory layout
* 12-bit biases and the 16-bit accumulators
* arg-max instead of softmax
* the frame ids, register map and SPI mode of the link
* the raster scan and its handshake

Known differences from the published chip:

* **Operation time.** The published timing shows about 10 µs for a
  worst-case DAC–SRAM–ADC cycle. Here it is up to 16.6 µs at 32 MHz,
  because each ramp step takes a full clock. A whole run is still faster
  than the published 15 ms.
* **PEN_MEN_P[7:0].** The published controller has an 8-bit enable group
  with this name whose function is not described. It is not built.
* **Analog accuracy.** Power, the 19 mW and 5.38 TOPS/W figures, and analog
  nonlinearity and noise are outside what RTL simulation shows. The analog
  core is ideal apart from its fixed offsets.
