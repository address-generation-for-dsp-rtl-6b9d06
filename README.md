# Address generators for DSP kernels

DSP kernels spend much of their time computing where the next operand lives.
An FFT walks its data in butterfly pairs and its twiddle table in strides that
change every stage. A convolution slides a window over a circular buffer. A
motion estimator jumps from the end of one macroblock row to the start of the
next. If the arithmetic datapath also has to compute these addresses, the
innermost loop cannot run at one iteration per clock. That loop needs up to
three addresses per clock: two operands and one result.

This RTL moves the addresses into dedicated address generator units (AGUs).
Each one produces **one address per clock**, starting from a `start` pulse,
and needs no help for the rest of the kernel. Every generator follows the same
basic pattern: an **offset register** in a loop with an
**adder/subtractor** and a **modifier**:

```
            modifier ──┐
                       ▼
   offset ──► adder / subtractor ──► offset register ──► address
     ▲                                     │
     └─────────────────────────────────────┘
```

The generators differ only in how they choose the modifier each clock. They
use small counters, comparators and shift registers for that choice. They
never multiply or divide.

The design follows the paper *Address Generation for DSP Kernels*, which
describes these generators and a configurable "comprehensive" AGU that
combines them. Where that paper gives a circuit (streaming convolution,
linear-phase FIR, motion estimation, SAD datapath), this RTL implements that
circuit. Where it gives only the function, the circuit is this design's own.
The section [What is from the paper and what is not](#what-is-from-the-paper-and-what-is-not)
lists which is which.

## The addressing modes

| Mode (`agu_mode_e`) | Module | Sequence produced (k = 0, 1, 2, …) | Strobe (`mark`) |
|---|---|---|---|
| `MODE_INC` / `MODE_DEC` | `agu_incdec` | ±k·STEP | — |
| `MODE_BITREV` | `agu_bitrev` | bit-reverse of k in log2 N bits | last of N |
| `MODE_FFT_DATA` | `agu_fft_data` | butterfly operand pairs for every stage, N·log2 N addresses | last of the FFT |
| `MODE_FFT_TW` | `agu_fft_twiddle` | twiddle exponent of each butterfly, held for both operands | last of the FFT |
| `MODE_CONV_STORED` | `agu_conv_stored` | output j reads padded samples j … j+M−1 | end of each window |
| `MODE_CONV_STREAM` | `agu_conv_stream` | output j reads the N-word circular buffer from j round to j−1 | end of each window |
| `MODE_MODULO` | `agu_modulo` | k·STEP mod M (coefficient fetch) | wrap |
| `MODE_DIVIDE` | `agu_divide` | ⌊k/M⌋, linear or mod LEN (result store) | result complete |
| `MODE_LPFIR` | `agu_lpfir` | j + (0, N−1, 1, N−2, …) mod N | end of each window |
| `MODE_ME` | `agu_me` | row-by-row pixels of a macroblock in a slice | last pixel |
| `MODE_ZIGZAG` | `agu_zigzag` | JPEG zigzag order of an N×N block | last address |

Every generator has the same control interface: `clk`, `rst_n`
(asynchronous, active low), `init` (synchronous restart of the sequence) and
`en`. The current address is on `off` from the clock after `init`. Each clock
edge with `en` high moves to the next address, and with `en` low the address
holds. The finite sequences (bit-reverse, FFT, stored convolution, motion
estimation, zigzag) restart by themselves after their last address.

### FFT operands: two shift registers and a skip-increment

Stage s of an in-place radix-2 FFT pairs every address whose bit s is 0
(the *upper* operand) with the same address plus 2^s (the *lower* one).
`agu_fft_data` holds two shift registers:

* `span = 00..0100..0`: a single one at bit s.
* `himask = 11..1100..0`: ones above bit s.

Both shift left by one at the end of each stage, so only two bits of each
register change per stage. The offset register holds the upper address. Each
butterfly puts out `upper` and then `upper | span`. The next upper address is

```
upper' = ((upper | span) + 1) & ~span
```

This is an increment that skips bit s. Setting bit s first lets a carry out
of the low bits jump over it. A stage ends when every address bit except
bit s is one. The FFT ends when `himask` has no ones left within the N-bit
range. The result is N·log2 N addresses. The order suits a
decimation-in-time FFT whose input was stored in bit-reversed order, which
is what `MODE_BITREV` produces.

`agu_fft_twiddle` runs from the same enable. In stage s the twiddle exponent
of butterfly b is `(b · N/2^(s+1)) mod N/2`. A step register starts at N/2
and halves each stage. An accumulator adds the step once per butterfly and
masks the sum to N/2 − 1, so the sum wraps exactly where the twiddle
sequence repeats. Each exponent is held for two clocks, in step with the two
operand addresses.

### Bit reversal by reverse-carry addition

The shared adder `bf_br_add_sub` has two controls. `add_bar_sub` chooses
between add and subtract. `bf_br_bar` chooses the direction of the carry:
with `bf_br_bar = 0` the carry ripples from the most significant bit down to
bit 0. Adding N/2 with reverse carry steps a log2 N-bit index through
0, N/2, N/4, 3N/4, …, which is the bit-reversed count. `agu_bitrev` is just
the offset register plus this adder.

### Linear-phase FIR: pairing the samples that share a coefficient

With N even and symmetric coefficients (h_k = h_{N−1−k}), each output is
Σ (x_{n−k} + x_{n−N+1+k})·h_k. So the datapath wants the two samples of each
pair back to back. The samples sit in an N-word circular buffer.
`agu_lpfir` updates the offset with one counter and one combinational path:

```
s = (N-1) - counter
t = counter odd ? (offset - s) mod N : offset + s
u = offset >= N/2 ? offset - (N/2 - 1) : offset + (N/2 + 1)
v = (counter == N-1) ? u : t
offset' = v mod N            (one conditional subtraction of N)
```

Starting from offset 0, output j reads `j + 0, j + N−1, j + 1, j + N−2, …`,
that is, the oldest sample, the newest, the second oldest, the second newest,
and so on. The `u` branch moves the window on by one sample between outputs.
For N = 6 the first two windows are `0 5 1 4 2 3` and `1 0 2 5 3 4`. The
counter value in the formulas is the one before the clock edge. That reading
is the one that produces these pairs.

A matching coefficient stream comes from `MODE_DIVIDE` with M = 2 and a
circular length of N/2, since each coefficient serves two samples.

### Convolution

*Stored data:* the input of length N is stored with M−1 zeros at both ends,
and the impulse response is stored reversed. Output j is then the dot
product of padded samples j … j+M−1 with the stored coefficients.
`agu_conv_stored` adds 1 inside a window and subtracts M−2 at its end.
In all it produces (N+M−1)·M addresses.

*Streaming data:* `agu_conv_stream` has two counters. Counter1 counts taps
0 … N−1. Counter2 counts outputs and steps each time Counter1 wraps. The
address is (Counter1 + Counter2) mod N, formed by an adder, a comparator
(sum ≥ N) and a correction of 0 or N that is subtracted.

The coefficients use `MODE_MODULO` and the results use `MODE_DIVIDE`: the
result address advances once per window. It is linear for stored data and
circular (FLAGS bit 0, length LEN) for streaming data.

### Motion estimation

`agu_me` walks a macroblock stored inside a wider slice. X counts
0 … `mb_wd` and Y counts 0 … `mb_ht`. Note that both are *last indices*:
`mb_wd = 3` means a 4-pixel-wide block. Inside a row the offset grows by 1.
At the end of a row it grows by `sl_wd − mb_wd`. For a 4×4 block in a slice
16 pixels wide, the addresses are 0 1 2 3 16 17 18 19 32 … 51.

The pixel pairs go to `sad_datapath`. A comparator (C < R) steers two swap
multiplexers so that the subtractor always computes larger − smaller. An
adder adds this difference to the accumulator. While `clr_acc` is high the
adder sees 0 in place of the accumulator, so a new sum starts with the
current pair.

### Zigzag

`agu_zigzag` tracks row, column and a direction bit. The offset
(row·N + col) changes by one of three modifiers:

* +1: step right, at the top or bottom edge.
* +N: step down, at the left or right edge.
* ∓(N−1): move diagonally inside the block.

The direction flips at every edge step, and no multiplier is needed.

## The comprehensive unit, `cagu`

`cagu` contains one generator of each kind and a bank of configuration
words, and it puts out the address of the mode selected by the MODE word.
The unit is programmed with `cfg_we`, `cfg_sel` and `cfg_wdata` before a
kernel starts:

| `cfg_sel` | Word | Used by |
|---|---|---|
| 0 `REG_MODE` | `agu_mode_e` | all |
| 1 `REG_N` | N | conv (stored, streaming), LPFIR, zigzag |
| 2 `REG_M` | M | conv stored, modulo, divide |
| 3 `REG_LEN` | circular result length | divide |
| 4 `REG_STEP` | modifier | inc/dec, modulo |
| 5 `REG_MBWD` / 6 `REG_MBHT` | macroblock width−1 / height−1 | ME |
| 7 `REG_SLWD` | slice width | ME |
| 8 `REG_LOG2N` | log2 of FFT size | bit-reverse, FFT |
| 9 `REG_BASE` | added to every offset | all |
| 10 `REG_FLAGS` | bit 0: circular result buffer | divide |

The unit has three outputs:

* `addr = BASE + offset`, wrapping modulo 2^ADDR_W.
* `mark`: the mode's strobe (see the table of modes above).
* `seq_end`: the last address of a finite sequence.

`start` restarts all generators, and `en` advances only the selected one.

## The kernel engine, `dsp_agu_top`

The top holds three `cagu` instances, the SAD datapath and a small
sequencer. A kernel needs up to three addresses per clock:

* generator **A** drives read port A (data sample, current pixel);
* generator **B** drives read port B (coefficient, twiddle, reference pixel);
* generator **R** gives the result address. R's strobe closes each result
  window.

The memories are outside the top. They must return read data one clock after
the address (`rd_a_data`, `rd_b_data`).

Timing of a kernel of `count` iterations:

```
clock          0        1        2      ...   count    count+1  count+2
start          1
busy / rd_en            1        1      ...   1
addresses A,B,R         k=0      k=1    ...   k=count-1
read data                        k=0    ...            k=count-1
SAD accumulator                         k=0 ...                  final
done                                                             1
```

* Iteration k's addresses appear in clock k+1 after the `start` clock.
* Its data reaches the accumulator one clock later.
* R's address and strobe are delayed to match, so `res_we`, `res_addr` and
  `res_data` arrive in the same clock as the finished sum. A new sum starts
  on the iteration after each R strobe.
* `done` is high `count + 2` clocks after the clock with `start`. For a SAD
  over an N×M block that is N·M + 2 clocks: one iteration per clock plus two
  clocks of pipeline.

Kernels whose arithmetic is multiply-accumulate (convolution, FIR, FFT) use
the top for their addresses and strobes only. The multiplier is not part of
this RTL. The top brings out every generator's address, `mark` and `seq_end`
for an external datapath to use. The SAD sum is still computed on whatever
data is read. Two rules are checked by assertions in simulation: no
configuration write while `busy` is high, and no `start` while `busy` is
high.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_W` | 8 | address width. The paper implemented 8 bits and also reports 16 and 24; the design lints cleanly at all three. |
| `DATA_W` | 8 | pixel / sample width |
| `ACC_W` | 16 | SAD accumulator width |
| `CNT_W` | 16 | iteration counter of the top (a 256-point FFT needs 2048 iterations) |

Limits on the run-time sizes, with 8-bit addresses:

* FFT: N ≤ 256.
* Zigzag: N ≤ 16.
* Symmetric FIR: N even and at most 254.
* Modulo mode: STEP < M.
* Convolution and motion estimation: every address must fit in ADDR_W bits.

## What is from the paper and what is not

Taken from the paper:

* The addressing modes and their uses.
* The offset-register/modifier scheme.
* For the **streaming convolution**, **linear-phase FIR** and **motion
  estimation** generators, the algorithms and schematics: counters,
  comparators, correction multiplexers and the offset update.
* The **SAD datapath**.
* The two stage shift registers of the FFT generator and its N·log2 N
  address count.
* The zero-padding and reversed-coefficient layout for stored convolution.
* The 8-bit default width and ripple-carry arithmetic.
* The motion-estimation sizes and pixel values used by the tests, taken from
  the paper's simulation trace.

This design's own choices:

* How FFT addresses are formed from the shift registers (the skip-increment).
* The twiddle, zigzag, modulo, divide and stored-convolution circuits. The
  paper gives only their function.
* Reading the adder's `Bf_Br_bar` control as reverse carry.
* Clock enables instead of the paper's gated clocks.
* Synchronous `init` next to the asynchronous reset.
* The offset register loading the value for the counters' *next* state in
  the streaming-convolution generator, so that no address repeats after
  `init`. Its output counter also wraps from N−1 straight to 0.
* Restarting finite sequences after their last address.
* The configuration register bank, the BASE register and the mode encoding.
* The three-generator top with its sequencer and result alignment.

Known differences from the paper:

* The paper builds its comprehensive AGU by sharing counters, shifters and
  comparators across the modes. Its merged schematic is not published, so
  `cagu` keeps one small generator per mode and a multiplexer. The behaviour
  at the ports is the same, but the area is larger than a merged datapath
  would be.
* The paper quotes overheads of 4 clocks (FFT) and 3 clocks (convolution) for
  its kernels with their multiply datapaths. Here every kernel has the same
  2-clock pipeline overhead, because the multiply datapath is not included.
* The paper's cell counts, area and power for its 0.18 µm standard-cell
  layout (8-, 16- and 24-bit) are properties of that implementation. They are
  not reproduced here.

## Verification

Each module has a self-checking testbench in `tb/`. It compares every
address with a closed-form model in `tb/agu_ref_pkg.sv`. That model computes
the k-th address directly (for example bit-reverse(k), or ⌊k/m⌋·sl + k mod m
for a macroblock) rather than step by step as the hardware does. The enable
is dropped at random clocks to check that addresses hold. The checks cover:

* the bit-reverse and both FFT generators for N = 2 … 256, over whole FFTs;
* convolution, FIR, modulo and divide generators for several sizes,
  including the wrap-arounds;
* the motion-estimation generator on the two 4×4-block address sequences
  printed in the paper's trace, and on other block shapes;
* the zigzag generator against the JPEG order;
* the SAD datapath on fifteen published pixel pairs and then on random data.

`tb_cagu` runs every mode through the register interface.

`tb_dsp_agu_top` runs the whole engine at its default parameters against
memory models. It covers SAD on 4×4 and 8×8 blocks, convolution on streaming
and stored data, a 6-tap symmetric FIR, 16- and 256-point FFTs, a zigzag scan and
increment/decrement. It checks:

* every address;
* every result write;
* the `count + 2` latency.

It also counts each addressing mode, both swap directions of the SAD
datapath, result writes and sequence restarts, and fails if any of them
never happened.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_dsp_agu_top \
    rtl/agu_pkg.sv tb/agu_ref_pkg.sv tb/tb_dsp_agu_top.sv -y rtl -y tb +libext+.sv
./obj_dir/Vtb_dsp_agu_top
```

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Files

* `rtl/agu_pkg.sv`: mode and register-map enums.
* `rtl/bf_br_add_sub.sv`: shared adder/subtractor with reverse carry.
* `rtl/offset_addr_reg.sv`: offset register.
* `rtl/agu_*.sv`: the eleven generators.
* `rtl/sad_datapath.sv`: the SAD datapath.
* `rtl/cagu.sv`: the comprehensive unit.
* `rtl/dsp_agu_top.sv`: the three-generator kernel engine.
* `tb/agu_ref_pkg.sv`: reference models.
* `tb/tb_<module>.sv`: one testbench per module.
