# Fully parallel vector-quantization encoder

Vector quantization (VQ) compresses a picture by cutting it into 4x4-pixel
blocks and replacing each block by the number of the most similar pattern in
a fixed codebook. With a 2048-pattern codebook, 16 bytes of luminance become
an 11-bit code. Decoding is trivial (paste the pattern back); encoding is the
expensive part, because every block must be compared with every pattern.

This RTL is an encoder that does the whole comparison in parallel. Each
16-element input vector `X` is compared with all templates `T_j` by the
Manhattan distance

    d_j = sum over i = 1..16 of |t(i,j) - x(i)|

and the code `j` of the smallest `d_j` comes out. A chip holds 256 templates;
eight chips, one master and seven slaves, form a module that searches 2048
templates. A new vector is accepted every 19 clock cycles: at 17 MHz that is
1.1 us per vector, enough for a 640x480 colour frame (4:1:1 sampling, 28 800
vectors) in 32.2 ms.

The interesting part is how the minimum over 2048 distances is found without
ever comparing two numbers with a magnitude comparator. The design sends
every distance through a bit-serial winner-take-all tree, described below.

## Two pipeline segments of 19 cycles

Each chip runs a two-stage pipeline. Both stages take 19 cycles and work on
consecutive vectors at the same time.

**Distance segment.** Every cycle, one element of the input vector is read
from the input FIFO. The same element of all 64 templates of a matching block
is read from that block's SRAM in one access. All 256 distance cells of the
chip work in lock step: in 16 element cycles each one accumulates its
template's distance. Three more cycles cover clearing the accumulators, the
memory read latency and the register between the subtractor and the
accumulator.

**Competition segment.** At the end of the distance segment all distances are
copied into 12-bit parallel-to-serial registers. This frees the accumulators
for the next vector. During the next segment the distances leave those
registers one bit per cycle, MSB first, and the three competition stages find
the winner.

The phase schedule inside a segment (`vq_pkg`, `vq_sequencer`):

| phase | distance segment (vector n+1) | competition segment (vector n) |
|-------|-------------------------------|--------------------------------|
| 0     | clear accumulators, read element 0 | bit 11 through stages 1-2 |
| 1-15  | read elements 1-15; subtract from phase 1 | bits 10..0 through stages 1-2 (to phase 11); stage 3 one phase behind |
| 12    | | stage 3 compares the last bit |
| 13    | | write the code into the output FIFO (master) |
| 15    | release the vector in the input FIFO | |
| 16-17 | last subtract / last accumulate | |
| 18    | load the P/S registers, preset all WTA flags | |

A lone vector on an idle module gives a valid code 34 cycles after its last
input word is written. A steady stream gives one code every 19 cycles.

## The distance cell (`vq_ava_cell`)

The cell forms `t - x` with an 8-bit adder: `x` is inverted and a carry-in
of 1 is added. The carry out tells the sign: 1 means `t >= x`. When the result
is negative, XOR gates invert the sum. The cell registers the XOR output and
the sign, and the sign becomes the carry-in of the 12-bit accumulator adder.
That carry-in supplies the "+1" of the two's complement, so
`|t - x| = (~sum) + 1` is formed without a second 8-bit adder. The largest
distance, 16 x 255 = 4080, fits in 12 bits.

## Bit-serial winner-take-all (`vq_wta`)

Each of the N inputs has a flag register, set to 1 before a competition. In
each cycle the next distance bit of every input arrives, most significant
bit first:

* `passed_i = bit_i OR NOT flag_i`. An input that has already lost always
  shows 1, so it cannot pull the minimum down.
* `min = AND of all passed_i`. This is the bit of the smallest remaining
  distance: it is 0 as soon as any candidate has a 0 here.
* A candidate whose passed bit differs from `min` (it has 1 where the
  minimum has 0) loses its flag: `flag_i <= flag_i AND (passed_i == min)`.

After 12 cycles only the inputs equal to the minimum keep their flag. The
stream of `min` bits over the 12 cycles is the minimum distance itself, MSB
first. That is what makes the hierarchy work: the `min` output of a 64-input
block WTA is a new bit-serial distance and can feed the next WTA stage in the
same cycle.

* Stage 1: 64 inputs in every matching block (64 templates -> block minimum).
* Stage 2: 4 inputs on every chip (4 block minima -> chip minimum).
* Stage 3: 8 inputs in the master chip (8 chip minima -> global minimum).

The chip minimum is registered at the chip boundary (`dist_bit_o`), so stage
3 runs one cycle behind stages 1 and 2. Stages 1 and 2 keep their flags
after the last bit, so the chip can still say which block and template won.

Keeping the old flag in the update (`flag AND ...`) matters. A comparator
alone would set the flag of a losing input back to 1 in any cycle where the
minimum bit is 1. The testbench `tb_vq_wta` catches exactly that.

## Winner observer and ties (`vq_winner_observer`)

After a competition several flags can remain if distances tie. The observer
keeps only the lowest-numbered flag: every position is blocked by any set
flag below it. It then encodes that position. Applied at every stage, this
makes the final code the lowest code among all templates at the minimum
distance. The testbenches use that rule in their reference search.

## Chips, master and module (`vq_chip`, `vq_chip_module`)

Every chip is the same design. The `master` pin enables the third WTA stage
and the output FIFO. Each chip drives:

* `dist_bit_o`: its chip-minimum bit stream;
* `local_code_o`: its 8-bit winner `{block[1:0], template[5:0]}`.

The master takes all eight streams and codes back in (`chip_bits_i`,
`chip_codes_i`). It picks the winning chip with its stage-3 WTA and observer
and stores `{chip[2:0], block, template}` in the output FIFO. Chip 0 is the
master in `vq_chip_module`.

Input vectors are broadcast to all chips. All chips see the same FIFO writes
and the same reset, so their sequencers stay in lock step without any
handshake between them. Back-pressure follows the same idea: the master's
"output FIFO full" (`hold_o`) goes to every chip's `hold_i`, and no chip
starts a segment while it is high. A result already in the P/S registers
waits there until the hold is released.

## Memories

* `vq_input_fifo`: 128 words x 32 bits with one write port and one read
  port, so 64 vectors. A vector is written as four words; element `4k+b` is
  byte `b` of word `k`. The compute side reads the head vector one byte per
  cycle. The sequencer starts by itself once a whole vector is stored.
* `vq_template_sram`: 64 templates x 16 elements x 8 bits per matching block
  (8 Kbit, 32 Kbit per chip). It is organised as 16 words of 64 bytes, so one
  read gives the same element of all templates. It is written one byte at a
  time.
* `vq_output_fifo`: 64 codes of 11 bits (master only), show-ahead.

All three memories are plain synthesizable arrays, not process SRAM macros.

## Interface of the module

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset |
| `tmpl_we`, `tmpl_addr`, `tmpl_data` | in | 1, 15, 8 | codebook download, one element per write; `tmpl_addr = {chip, block, template, element}` |
| `in_wr`, `in_data`, `in_full` | in/in/out | 1, 32, 1 | input vector as four words; do not write while `in_full` |
| `out_valid`, `out_code`, `out_rd` | out/out/in | 1, 11, 1 | winner codes; `out_rd` pops the code shown |

Load the codebook before sending vectors. A download during operation is not
blocked, and the running search would see partly new templates.

## What follows the original chip and what is this design's own

Taken from the original: 16 elements of 8 bits per vector, 12-bit
accumulators, 19-cycle segments in a two-stage pipeline, 64 templates per
matching block, four blocks per chip, eight chips in a master-slave
arrangement with a three-stage bit-serial WTA, the OR/AND structure of the
WTA, the adder-with-inverted-input plus XOR absolute value, a 12-bit
parallel-to-serial register between the segments, lowest-code tie
resolution, a 32-bit x 128-word input FIFO, 32-bit input transfers, and
element-by-element codebook download.

Chosen here because the original does not give it:

* the phase schedule inside the 19 cycles;
* the byte order of input words;
* one-cycle memory latency;
* the flag update `flag AND (passed == min)`;
* local codes sent to the master on dedicated pins, and a register on the
  chip-minimum output;
* the hold/back-pressure scheme and the output FIFO depth (64);
* the codebook address layout;
* synchronous reset.

Not built: the board around the module (host PC on PCI, capture buffers, the
external codebook memory) and the separate motion-detection chip. Electrical
figures (17 MHz at 3.3 V, 33 MHz at 5 V, power, area) belong to the silicon
and are not modelled.

## Verification

Every module has a self-checking testbench in `tb/`. Each one compares
against values computed in the testbench and prints
`TB_RESULT checks=N failures=M`.

* `tb_vq_ava_cell`, `tb_vq_ps_converter`, `tb_vq_wta` (64 and 8 inputs,
  with ties), `tb_vq_winner_observer` (exhaustive for 8 inputs),
  `tb_vq_input_fifo`, `tb_vq_output_fifo` and `tb_vq_template_sram` test
  the building blocks.
* `tb_vq_sequencer` checks the phase of every strobe, pops exactly 19 cycles
  apart, the 17-cycle pop-to-result distance, that no segment starts under
  hold, and one result per vector.
* `tb_vq_matching_block` runs the real sequencer and one block. It checks the
  serial minimum and the code of 60 vectors.
* `tb_vq_chip` runs one chip as its own master with a 4-entry output FIFO,
  so hold occurs. It checks 120 codes, the 34-cycle latency and the 19-cycle
  throughput.
* `tb_vq_chip_module` runs the full-size module with default parameters:
  2048 templates and 160 vectors. It checks every code against a search
  over all templates. It requires each of these to happen at least once:
  a lone vector with a 34-cycle latency, a restart after idle, results 19
  cycles apart, input FIFO full, output FIFO full holding all chips, ties
  inside a block, ties between blocks and ties between chips, and every chip
  winning at least once.
* `tb_vq_frame_encode` is the real-time workload. It builds a synthetic
  640x480 picture in 4:1:1 format (28 800 vectors) and a codebook of blocks
  taken from that picture, then encodes the whole frame with the full-size
  module. It checks every code. The frame takes 547 222 cycles from the
  first input word to the last code: 19 cycles per vector, 32.2 ms at
  17 MHz, inside the 33 ms frame budget. It then reloads the codebook as a
  1024-template and a 512-template book and encodes 2400 vectors with each.
  This run takes about 15 seconds after compilation.

The simulator used is two-state, so the testbenches reset or initialise
everything they read. Random stimulus uses `$urandom`. To run one, for
example the full module:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        --top-module tb_vq_chip_module rtl/vq_pkg.sv tb/tb_vq_chip_module.sv
    ./obj_dir/Vtb_vq_chip_module

The full-size module test builds in a few seconds and runs in under one.

## Changing sizes

`N_TMPL`, `N_BLOCKS` and `N_CHIPS` are parameters of `vq_chip`.
`vq_chip_module` takes `N_CHIPS`; the code width follows from these. For a
smaller codebook, either build fewer chips or fill the spare slots with
copies of real templates at higher codes: a copy then ties with its original
and loses the tie. The timing constants live in `vq_pkg`. A different
element count needs `N_ELEMS`, the `PH_*` phases and `SEG_CYCLES` changed
together, and `DIST_W` must hold `N_ELEMS x 255`.
