# Context-modelling lossless compressor core (data and image modes)

This core compresses a byte stream without loss. It handles two kinds of input:

- **general data**, such as text or binaries;
- **8-bit grey images**, sent in raster order.

Compression has two halves:

- A **modelling stage** turns each input symbol into a pair (symbol, context). The context is a small number that sums up what came just before the symbol.
- A shared **statistical back end** codes each symbol with probabilities learnt separately per context:
  - a binary-tree probability estimator;
  - a multiplication-free binary arithmetic coder.

The modelling stage fits the kind of content:

- **Data mode:** the context is the node reached by the previous 1 to 3 bytes in a context tree, which grows as data arrives.
- **Image mode:** the context sums up the local texture and how active the error is. The symbol is the prediction error of the pixel, not the pixel itself.

The architecture follows a published FPGA compressor in which the modelling stage is swapped by partial reconfiguration of the device. Here both modelling stages are built side by side, and a mode controller selects one. A third, video, stage is described in that work only as future work. It is not built here; the top brings out ports where it would attach.

At one binary decision per clock and 8 decisions per symbol, the core codes one input bit per clock. At 100 MHz that is 100 Mbit/s of uncompressed input.

```
                 +--------------------------+
  in_sym ------->| data_context_modeler     |--+
  (valid/ready)  |  (hashed context tree)   |  |   (symbol, context, last)
                 +--------------------------+  |
                 +--------------------------+  |   +-----------------------+   +----------------+
            ---->| image_modeler            |--+-->| probability_estimator |-->| mz_arith_coder |--> out_byte
                 |  (prediction + contexts) |  |   | 8 decisions / symbol  |   | 1 decision/clk |    out_last
                 +--------------------------+  |   +-----------------------+   +----------------+
  vid_in_* <---- (video mode: external stage) -+<--- vid_mod_*
                 reconfig_controller selects the active stage
```

## Blocks and end of a block

Input is divided into **blocks**; `in_last` marks the last symbol of a block. For an image, the whole image is one block.

Each block comes out as its own byte stream, flushed and padded to a whole byte. `out_last` marks its last byte.

At the end of a block:

- In data mode, the context tree starts again empty, in a single cycle.
- In image mode, the error statistics are cleared over 512 cycles, and the line buffer goes back to the top-left corner.
- The estimator's probabilities carry over from block to block. They are cleared only at reset and at a mode change.

A decoder therefore has to decode the blocks in order and in the same mode.

## Data mode: the hashed context tree

The data modeller is the most unusual part of the design. Its file is `data_context_modeler.sv`, and its parts are `symbol_history`, `context_tree_sram`, `area_free_tracker` and `context_area_buffer`.

### Tree storage

The tree is stored without child pointers. Each node is one word of a 1312-word memory, holding:

- its **context area**: a 10-bit number that names this context for the estimator;
- the **area of its parent**;
- the **byte** that leads from the parent to it.

To find the child of node *P* for byte *b*, the modeller computes an index and reads that word:

    index = ({b, 2'b00} XOR area(P)) + probe          (probe = 0, 1, 2, 3)

The word read can be one of three things:

- **A match:** the slot is busy, and its parent and byte both equal (*P*, *b*). The walk goes down one level, from the matched area.
- **A free slot:** the context was never seen in this block. A node is written there with the next free area number, and the walk for this byte ends. A new node has no children yet.
- **A collision:** the slot is busy with a different node. The next probe index is tried. After 4 collisions the walk ends.

The root is area 0, the empty context. For byte *x*, the walk starts at the root with the byte before *x*, then goes on with the byte before that, up to order 3. The three preceding bytes are held in `symbol_history`.

The modeller hands on the area of the **deepest matched context** (0 if none matched) as the context of *x*.

Timing is one cycle to take the byte, two cycles per level (read, then compare) and one cycle to commit. That is at most 8 cycles per byte without collisions, which matches the coder's 8 cycles per byte.

### Single-cycle reset of the tree

Clearing 1312 words after every block would cost more cycles than a short block takes to code. Instead, each slot has a busy bit in a 41 × 32-bit memory. A 41-bit "line valid" register sits in front of it, with one bit per 32-slot word:

- A slot counts as busy only if its line's valid bit **and** its own bit are set.
- Clearing the 41-bit register empties the whole tree in one cycle.
- The first write to a line after a reset writes a word with only the new bit set, so stale bits never reappear.

A counter hands out area numbers 1 to 1023. Once it runs out, the block goes on with the contexts it already has, and no new nodes are made.

### Double buffer

The matched areas of a byte are collected in one of two small banks. Each bank holds up to 3 areas plus the byte. When the byte is finished, that bank is handed to the estimator side, and the modeller fills the other bank. The tree walk of one byte therefore overlaps with the coding of the one before.

## Image mode: prediction, contexts and error feedback

The image modeller is in `image_modeler.sv`, and its parts are `image_line_buffer`, `gap_predictor` and `error_energy_quantizer`.

### Neighbours

The line buffer keeps three lines of 512 pixels. The roles of the three memories rotate at the end of each line. It supplies the seven causal neighbours:

```
            NN   NNE
       NW   N    NE
  WW   W    X
```

Neighbours outside the image read as 0.

### Prediction

The prediction uses gradients:

- `dh = |W-WW| + |N-NW| + |N-NE|`
- `dv = |W-NW| + |N-NN| + |NE-NNE|`

The predicted value moves from N (for a sharp horizontal edge) through blends to W (for a sharp vertical edge). This is the well-known gradient-adjusted rule, with thresholds 80, 32 and 8 on `dv - dh`, and it needs only adds and shifts.

### Context

The context has 9 bits, giving 512 contexts:

- **Texture, 6 bits:** one bit per neighbour (N, W, NW, NE, NN, WW), set when that neighbour is below the prediction.
- **QE, 3 bits:** the error energy `dh + dv + 2|e_W|` quantized into 8 levels, where `e_W` is the previous pixel's error.

### Error feedback (bias cancellation)

For each context the modeller keeps:

- a 14-bit signed sum of the errors left after correction;
- a 5-bit count of them.

Their mean is added to the prediction, and the result is clamped to 0..255. The error that remains after this correction is what goes into the sum. This follows the original data path. A steady bias is therefore only partly removed: the correction settles at about half of it, in return for a loop that reacts smoothly. When the count reaches 31, both the sum and the count are halved. This keeps the statistics adaptive and the sum within 14 bits.

### Output symbol

The final error is taken modulo 256 and folded to 0..255 in the order 0, -1, 1, -2, 2, and so on. The decoder can undo this because it knows the corrected prediction.

The modeller runs in two pipeline stages and takes one pixel per clock. The feedback memory is read asynchronously, so each pixel sees the update made by the pixel before it.

## Probability estimator

`probability_estimator.sv` codes each 8-bit symbol as the path from the root to a leaf of a 255-node binary tree, most significant bit first. Decision *i* is made at node `2^i + (symbol >> (8-i))`.

Every context (1024 of them) has its own tree. The probability memory therefore holds 2^18 nodes of 7 bits each:

- the MPS, the more probable value of the node's bit;
- a 6-bit adaptation state.

For each decision, the estimator reads the node and sends `{bit, MPS, state}` to the coder. When the coder takes the decision, the estimator writes back the updated state:

- **MPS coded:** the state goes up by 1, saturating at 63.
- **LPS coded:** the state is halved. At state 0, the MPS flips.

Two decisions in a row never use the same node, so the read/write pipeline runs at one decision per clock with no forwarding.

After reset and after a mode change, the memory is cleared over 2^18 cycles, with `busy` high.

## Arithmetic coder

`mz_arith_coder.sv` is a binary arithmetic coder with no multiplier and no renormalisation loop.

### Interval update

- The interval size `A` has 8 bits and is kept in 0x80..0xFF.
- The low end `L` has 8 bits plus a carry bit.
- The probability state selects the LPS size `q` (1..63) from a 64-entry table. The table is built at elaboration from `lossless_pkg::lps_value`, which decays geometrically by 1/16 per state.
- **MPS:** `A <- A - q`.
- **LPS:** `L <- L + A - q`, then `A <- q`.
- A leading-zero count then shifts `A` back into range in the same cycle, and `L` with it. That takes 0 to 7 bits per decision.

### Carry resolution (`mz_code_generator`)

The bits shifted out of `L` can still change when a later addition carries into them. The generator holds:

- one pending bit;
- a counted run of 1s after it, with a 20-bit counter.

A new 0 bit releases the pending bit and its run. A carry turns "x 1 1 ... 1" into "x+1 0 0 ... 0". Each cycle, the generator emits a record made of a head bit, a run (length and bit value) and up to 8 tail bits.

### Byte packing (`mz_code_packer`)

The packer expands these records into a 32-bit accumulator and sends out bytes. Long runs leave at 7 bits per cycle while the packer holds its input.

### End of block

The coder emits all 8 bits of `L`, releases the pending bits and pads the code with zeros to a byte. It then starts again with `A = 0xFF` and `L = 0`.

### Pipeline

The pipeline has six register stages:

1. table read;
2. interval update into the code buffer;
3. code generator;
4. and 5. packer;
6. output byte.

All handshakes are valid/ready, and a stall holds every stage before it. Apart from long zero or one runs, the coder takes one decision per clock: 0.999 over a whole 512 × 512 image.

The matching decoder is in `tb/codec_ref_pkg.sv`. It is a software model that also holds reference models of both modellers and of the estimator. It defines the bit stream format exactly.

## Mode control and the video port

`reconfig_controller` holds the active mode: 0 for data, 1 for image, 2 for video. A new `req_mode` works like this:

- A block that is already open is finished in the old mode.
- After that, input is held off until every byte of every earlier block has left the coder.
- The mode then changes, and the estimator's statistics are restarted.

In video mode, input symbols are sent out on `vid_in_*`. An external modelling stage returns `{symbol, 10-bit context, last}` on `vid_mod_*`, and these are coded like the other modes.

## Top-level interface (`lossless_compressor_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `req_mode` / `active_mode` | in / out | 2 | requested / active mode (0 data, 1 image, 2 video) |
| `in_valid`, `in_ready`, `in_sym`, `in_last` | in/out/in/in | 1/1/8/1 | uncompressed bytes or pixels; `in_last` closes a block |
| `out_valid`, `out_ready`, `out_byte`, `out_last` | out/in/out/out | 1/1/8/1 | compressed bytes; `out_last` on the last byte of a block |
| `vid_in_*` | out/in | 1/1/8/1 | symbols to an external video modelling stage |
| `vid_mod_valid`, `vid_mod_ready`, `vid_mod` | in/out/in | 1/1/19 | modelled symbols coming back: `{sym, ctx[9:0], last}` |

The parameters are `IMG_WIDTH` (default 512, the image line length) and `CTX_W` (default 10, the estimator's context bits). After reset, `in_ready` stays low for 2^18 cycles while the estimator clears its memory.

## Where this design departs from the original architecture

The overall structure is taken from the original architecture:

- one mode-selected modelling stage feeding a static estimator and coder;
- a 3-byte history;
- the 1312-word tree with its three fields;
- hashing by shift and XOR;
- the 41 × 32 busy memory with its 41-bit valid register;
- the double-buffered context areas;
- 7-neighbour gradient prediction with a 6-bit texture pattern and a 3-bit energy level, giving 512 contexts;
- per-context mean-error feedback with a 14-bit sum and a 5-bit count;
- three rotating line buffers;
- a binary-tree estimator with 1024 contexts;
- a 64-entry LPS table;
- a 6-stage coder with one decision per clock and no renormalisation loop.

The following details are this design's own:

- **Estimator.** The original estimator is described only in outline. It codes 9 events per symbol and keeps frequency counts in a "total value" memory beside the node probabilities. This design uses 8 decisions per symbol and a small state machine per node. Its memory is therefore much larger: 1.8 Mbit, against roughly 160 kbit in the original.
- **Coder arithmetic.** The original coder's exact interval rules are published elsewhere and not reproduced. The split, the table values, the state update and the carry handling here are this design's own, so the output is not bit-compatible with it.
- **Hash details.** The shift by 2, the linear probing limited to 4 probes, stopping at a new node, and using the deepest matched context as the coding context are choices made here.
- **Image details.** These choices are also made here:
  - the gradient-adjusted thresholds;
  - the energy formula and its thresholds;
  - the truncating mean;
  - the halving rule;
  - the modulo-256 error mapping;
  - zero borders.
- **Reconfiguration.** Reconfiguration of the device is replaced by a multiplexer, so the time it would take is not modelled.

## Measured on the test sequences

These figures come from synthetic test data. The standard corpora are not included.

| input | result |
|---|---|
| 512 × 512 synthetic grey image | 4.11 bits/pixel |
| 16 KiB synthetic text | 4.96 bits/byte |
| 1500 bytes of repetitive English-like text | 3.8 bits/byte |

In every case the decoded output matched the input exactly.

## Simulating

The RTL is in `rtl/`. It has one module or package per file, and `lossless_pkg.sv` must be compiled first. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/lossless_pkg.sv tb/codec_ref_pkg.sv tb/image_ref_pkg.sv \
    tb/tb_full_image.sv --top-module tb_full_image -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. Each block has its own testbench (`tb/tb_<block>.sv`) that compares it with an independent model:

| testbench | what it checks |
|---|---|
| `tb_lossless_compressor_top` | Several data blocks, an image, a video-mode pass-through and mode changes. Output stalls are random. Every block is decoded. It also counts that each mechanism occurred: tree matches, collisions, area exhaustion, block resets, double-buffer overlap, the feedback overflow guard, carries, long runs, back-pressure and mode switches. |
| `tb_full_image` | The default-size top: a whole 512 × 512 image and a 16 KiB data block, decoded and checked. It also checks the coder rate. It runs in a few seconds. |
| `tb_mz_arith_coder` | Random and skewed decisions, decoded bit by bit, plus the one-decision-per-clock rate. |
| other `tb_*` | Bit-exact comparison of each block against a behavioural model. |
