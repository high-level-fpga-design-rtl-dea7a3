# Streaming moving-average filter

A synthesizable SystemVerilog moving-average filter for signed sample
streams:

    y[n] = (1/N) * ( x[n] + x[n-1] + ... + x[n-N+1] )

It takes one sample per clock. Each result comes out two cycles after its
sample. The window length `N` (default 8) and the sample width `DATAW`
(default 16) are parameters. The filter is small, but it can form the
window sum in four ways: a chain of adders, an adder tree, a running sum
over a shift register, and a running sum over a RAM circular buffer. All
four give the same output, cycle for cycle. They differ in area, in the
longest combinational path, and in how well they scale to long windows.
That makes the filter a useful reference for comparing RTL structures
(and, for example, high-level-synthesis results) on a design where the
correct answer is never in doubt.

## Interface and timing

```
lab1_avg #(N = 8, DATAW = 16, ARCH = ARCH_RUNNING, ROUND = 0, SAT = 0,
           SUMW = DATAW + $clog2(N))
  (input  clk, rst, in_valid, in_data[DATAW-1:0] (signed),
   output out_valid, out_data[DATAW-1:0] (signed))
```

* `rst` is synchronous and active high. It clears the sample history, the
  sum, the valid pipeline and `out_data`. After a reset the window holds N
  zeros, so the first N-1 results average the new samples with zeros.
* `in_valid` qualifies `in_data`. There is no back-pressure: every cycle
  with `in_valid` high is one sample. `in_valid` is also the clock enable
  of the history and of the running sum, so idle cycles change nothing.
* `out_valid` pulses for one cycle per accepted sample. `out_data` is the
  average of the window that ends at that sample. Between results,
  `out_data` keeps its last value.

**Latency 2, initiation interval 1.** Latency is counted from the cycle in
which a sample is accepted to the cycle in which its result is valid:

| cycle | what happens |
|-------|--------------|
| k     | `in_valid` high; the sample is presented |
| edge at end of k | history shifts (or the RAM is written); the running sum is updated |
| k+1   | the sum (combinational for chain/tree) and the divide-by-N settle |
| edge at end of k+1 | `out_data` and `out_valid` are registered |
| k+2   | `out_valid` high with the result |

A new sample can be accepted in every cycle (II = 1), so a stream with
`in_valid` held high gives a result in every cycle. Streams with gaps give
results with the same gaps, two cycles later. The output register costs
one cycle of latency. In exchange, the divide-by-N and the sum are not in
the same path as the output pins.

The assertion `a_latency` in `lab1_avg` checks this in simulation. Every
accepted sample must be followed by `out_valid` two cycles later.

## The four sum structures (`ARCH`)

The history and the sum are the heart of the filter. `ARCH` (type
`avg_pkg::arch_e`) selects how they are built. The rest of the filter is
the same in every case.

| `ARCH` | history | sum | critical path | registers |
|--------|---------|-----|---------------|-----------|
| `ARCH_CHAIN` | shift register `avg_shift_reg` | `avg_sum_chain`: ((t0+t1)+t2)+... | N-1 adders in series | N·DATAW + output |
| `ARCH_TREE` | shift register | `avg_sum_tree`: pairwise, clog2(N) levels | clog2(N) adders | N·DATAW + output |
| `ARCH_RUNNING` (default) | shift register | `avg_running_sum`: `sum <= sum + new - oldest` | one add/subtract | N·DATAW + SUMW + output |
| `ARCH_RAM` | `avg_circ_buffer`: N-word RAM with a pointer | `avg_running_sum` | one add/subtract plus RAM read | pointer + SUMW + output; history in memory |

**Adder chain.** This is the direct way to write the sum: a loop over the
taps. It is correct, but the adders sit in series, so timing gets worse
linearly with N.

**Adder tree.** This uses the same adders, arranged in pairs. With N = 8
there are three levels: four adders with 17-bit results, two with 18-bit
results, and one with a 19-bit result. The path shrinks to clog2(N)
adders. In the RTL every node is `SUMW` bits wide, and synthesis removes
the upper bits that cannot be reached. A window that is not a power of two
is padded with zero taps.

**Running sum.** The sum is kept in a register. When a sample arrives, the
sample entering the window is added and the sample leaving it is
subtracted. The sample leaving is the last tap of the shift register. The
cost no longer depends on N: one adder/subtractor and one `SUMW`-bit
register, with a short critical path. This is the default. The sum stays
exact because it starts at zero along with the cleared history, and
`SUMW = DATAW + clog2(N)` bits can never overflow.

**RAM circular buffer.** For long windows, moving every sample on every
cycle is wasteful. `avg_circ_buffer` keeps the window in an N-word memory
instead, with a pointer to the oldest word. When a sample arrives:

1. The running sum subtracts `ram[ptr]`.
2. `ram[ptr]` is overwritten with the new sample.
3. `ptr` advances and wraps from N-1 to 0, so N need not be a power of two.

`ram[ptr]` is read combinationally, in the same cycle as the write. That
suits a distributed (LUT) RAM. A block RAM with a registered read would
need the address one cycle earlier and one more pipeline stage, and that
is not implemented here. The memory has no reset. A `full` flag is set the
first time the pointer wraps, and until then `oldest` reads as zero. This
gives the same all-zero start as the cleared shift register, without
having to clear N words.

With a shift register history, synthesis tools usually map the delay line
onto shift-register LUT primitives rather than flip-flops once N is
large. The RAM structure makes the memory explicit.

## Dividing by N (`avg_scale`)

* **N a power of two:** an arithmetic right shift by `$clog2(N)` (3 bits
  for N = 8). No divider is needed, which is why N = 8 is the default.
* **Any other N:** a combinational divider by the constant N. Signed
  division in SystemVerilog truncates towards zero. The scaler corrects a
  negative dividend that leaves a remainder so that it rounds down. Both
  paths therefore give `floor(sum / N)`. A general divider is slow; expect
  it to set the clock rate.
* **`ROUND`:** with 0 (the default) the result is truncated towards minus
  infinity. With 1, `N/2` is added first, which rounds to the nearest
  value, halves rounding up. With the default, a constant input of 5 after
  reset gives the outputs 0, 1, 1, 2, 3, 3, 4, 5, 5, ...
* The quotient is clamped to `DATAW` bits. With the full-width sum the
  clamp never acts. It exists for the saturating option below.

## Saturating narrow sum (`SAT`, `SUMW`)

`SUMW` can be set below `DATAW + clog2(N)` to save sum bits. In the chain
and tree structures, `SAT = 1` then clamps every partial sum to the
`SUMW`-bit range instead of letting it wrap (the helper is
`avg_pkg::sat_add`). The result is then no longer the exact average for
large inputs. It saturates instead of wrapping to the wrong sign. The
chain and the tree can saturate differently for the same input, because
saturating addition is not associative. The running-sum structures ignore
`SAT`: they need an exact sum, because an error in a clamped running sum
would never leave the register.

## Files

| file | contents |
|------|----------|
| `rtl/avg_pkg.sv` | `arch_e`, `is_pow2`, `sat_add` |
| `rtl/lab1_avg.sv` | top level: selects the structure, divide-by-N, output register, valid pipeline |
| `rtl/avg_shift_reg.sv` | N-deep history shift register with enable |
| `rtl/avg_sum_chain.sv` | adder-chain sum |
| `rtl/avg_sum_tree.sv` | adder-tree sum |
| `rtl/avg_running_sum.sv` | running-sum register |
| `rtl/avg_circ_buffer.sv` | RAM circular buffer with pointer |
| `rtl/avg_scale.sv` | divide by N, rounding, clamp |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_lab1_avg_full.sv` | top at default parameters |
| `tb/tb_lab1_avg_n1024.sv` | all four structures with N = 1024 |

In `lab1_avg`, Verilator's lint reports one unused signal. Only one of
`taps` and `oldest` of the shift register is used, depending on `ARCH`.
This is expected.

## Verification

Every testbench computes its expected values on its own, from a plain
integer model of the window. It prints
`TB_RESULT checks=<n> failures=<m>` and stops after a fixed number of
cycles if it hangs.

* `tb_lab1_avg` runs seven filters side by side on one stream:
  * the four structures at N = 8
  * N = 5 with rounding, over the RAM and the tree, which exercises the
    divider path
  * a chain with a 16-bit saturating sum

  Each result is checked in exactly the cycle two after its sample, and
  `out_valid` is checked low in every other cycle. The stimulus covers:
  * a constant-5 sequence with its known outputs
  * an impulse
  * a constant
  * a ramp up and down
  * random data with random idle cycles
  * large alternating values
  * a reset in mid-stream

  The test also counts back-to-back samples, idle gaps, RAM wraps, cases
  where rounding changes the result, and saturation events. Each of these
  must occur at least once.
* `tb_lab1_avg_full` runs the top with no parameter overrides. It holds
  reset with the input at 5, then checks the output staircase
  0, 1, 1, 2, 3, 3, 4, 5. It follows with impulse, constant and ramp at
  half rate, and random data.
* `tb_lab1_avg_n1024` runs all four structures with a 1024-sample window
  for 3000 samples.
* Each block testbench checks its module against a model, including corner
  cases: all-maximum and all-minimum taps, negative sums for the divider,
  and pointer wrap for N = 5.

Running a test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/avg_pkg.sv rtl/lab1_avg.sv tb/tb_lab1_avg.sv --top-module tb_lab1_avg
./obj_dir/Vtb_lab1_avg
```

For a block test, use the block's module and testbench in place of the top
and its testbench. `-Irtl` lets Verilator find the submodules. Verilator
has only two logic states. Every register that is read is reset, and the
RAM contents are never used before they are written.

## Design choices and limits

* The default output is truncated (floor), not rounded. The expected
  outputs for a constant input follow truncation. Rounding is available
  with `ROUND = 1`.
* Reset is synchronous and active high. `out_valid` is one pulse per
  sample. `out_data` holds between results. The filter has no ready
  signal. All four points are this design's choices.
* The RAM structure uses an asynchronous read. A block-RAM version would
  need a registered read and three cycles of latency; it is not provided.
* With N not a power of two, the divider is purely combinational and not
  pipelined.
* `SAT` affects only the chain and tree structures.
* Mapping the arithmetic onto DSP blocks is left to the synthesis tool and
  its attributes. Nothing in the RTL forces it.
