# Symmetric FIR filter in two architectures: adder tree and DSP-slice chain

A finite impulse response (FIR) filter computes each output as a weighted sum
of the most recent inputs:

    y[n] = h[0]·x[n] + h[1]·x[n-1] + ... + h[N-1]·x[n-N+1]

Many filters, for example all linear-phase filters, have mirrored coefficients:
`h[k] = h[N-1-k]`. The two samples that share a coefficient can then be added
first and multiplied once:

    y[n] = Σ_{k=0}^{N/2-1} h[k] · ( x[n-k] + x[n-N+1+k] )

This halves the number of multipliers, the most expensive part of the filter.
The number of adders stays the same (N-1).

This RTL builds a 16-tap filter of this kind in two architectures. Both take
one sample per clock.

* **`sfir_asic`** suits a standard-cell ASIC. A 15-stage delay line is read from
  both ends. Eight pre-adders feed eight multipliers, and a balanced adder tree
  sums the products into one output register. It uses the fewest registers, and
  the result leaves one cycle after the sample enters.
* **`sfir_fpga`** suits an FPGA whose DSP slices have a pre-adder, a multiplier
  and a cascaded accumulator. Each tap is one such slice (`sfir_dsp_slice`). The
  registered partial sums ripple from slice to slice, so no adder tree is
  needed. This maps directly onto a column of chained DSP slices. The cost is
  more registers and a latency of 9 cycles.

`sfir_top` puts both side by side on the same input, so they can be checked
against each other. A real product would keep only the one that suits its
target.

## Sizes and arithmetic

| parameter | default | meaning |
|-----------|---------|---------|
| `TAPS`    | 16 | filter length (even); `TAPS/2` coefficients and multipliers |
| `DATA_W`  | 16 | signed input sample width |
| `COEF_W`  | 13 | signed coefficient width |
| `OUT_W`   | 32 | output and accumulator width |

All values are two's-complement integers. No fixed-point scaling, rounding or
saturation is applied. Widths grow so that nothing overflows until the final
32 bits:

| stage | width at the defaults |
|-------|-----------------------|
| pre-adder `a + b` | 16 + 16 → 17 bits |
| product `h · (a + b)` | 13 × 17 → 30 bits |
| adder tree (ASIC) | 4 adders → 31, 2 adders → 32, 1 adder 32 → 32 bits |
| accumulation chain (FPGA) | 32 + 30 → 32 bits per slice |

The largest possible magnitude is 16 · 32768 · 4096 = 2^31. It is reached only
when every sample is −32768 and every coefficient is −4096. That sum is one past
the largest positive 32-bit value, so it wraps to −2^31. Every other input fits
exactly. Both architectures wrap in the same way, and the testbenches check
this corner case.

The 16/13-bit widths are the narrowest at which the reference flow mapped the
filter onto FPGA DSP slices. The filter is also exercised at 8-bit samples and
5-bit coefficients, the narrow configuration that was compared against it.

## Ports and timing

Both filters have the same ports, except that `sfir_fpga` has one more input,
`cas_in`:

| port | dir | width | |
|------|-----|-------|-|
| `clk` | in | 1 | clock; every register is on its rising edge |
| `rst` | in | 1 | synchronous, active high; clears every register, so history is zero |
| `en`  | in | 1 | clock enable: on an edge with `en` high, `x_in` enters and everything advances; with `en` low all registers hold |
| `x_in` | in | `DATA_W` | the sample x[n] |
| `coef` | in | `TAPS/2 × COEF_W` packed | `coef[k]` = h[k]. h[0] weights the newest and the oldest sample; h[TAPS/2-1] weights the two middle samples |
| `cas_in` | in | `OUT_W` | (`sfir_fpga` only) partial sum added at the head of the chain; tie to 0 |
| `y_out` | out | `OUT_W` | registered result |

Latency is counted in enabled edges, starting with the edge that takes the
sample:

* `sfir_asic`: the result whose newest sample is x[n] is on `y_out` right after
  the edge that takes x[n] (1 edge).
* `sfir_fpga`: the result whose newest sample is x[n] is on `y_out` after
  `TAPS/2 + 1` = 9 edges. A value on `cas_in` is added to the result that
  appears `TAPS/2` = 8 edges later.

The coefficients are a port, not constants. The ASIC architecture uses them
only when a result is formed, so they may change between samples. The FPGA
architecture uses each coefficient at a different time, so change them only
while the filter is idle, or reset it afterwards.

## The ASIC architecture (`sfir_asic`)

```
x_in ─┬─► [d0]─►[d1]─► ... ─►[d14]          delay line, taps[i] = x[n-1-i]
      │                                     samples s0 = x_in, s(i+1) = taps[i]
      ▼
  pre-adder k : s[k] + s[15-k]      k = 0..7  (sfir_preadd_mult)
  multiplier k: h[k] · (...)                   (sfir_preadd_mult)
  adder tree  : 8 → 4 → 2 → 1                  (sfir_adder_tree)
  output register y_out
```

The datapath from the delay line to the output register is purely
combinational. It has no pipeline registers, so the critical path runs
through a pre-adder, a multiplier and three adders. The register count is the
minimum: 15 × 16 bits in the delay line and 32 bits of output.

## The FPGA architecture (`sfir_fpga`): keeping the chain in step

This is the part that needs care. Each `sfir_dsp_slice` does

    m     <= h[k] · (a + b)        product register (30 bits)
    pcout <= pcin + m              accumulation register (32 bits)

Slice 0 takes `cas_in` as `pcin`. Slice k takes slice k−1's `pcout`, and the
last slice drives `y_out`. The chain has one register per slice, so the
product of slice k is added k cycles later than the product of slice 0. If
every slice read the same folded delay line as the ASIC version, each slice
would use samples from a different moment, and the result would not be the
FIR sum.

The fix is to delay each slice's operands by as much as the chain delays its
product. The sample line is split in two:

* A **forward line** with two registers per slice. Slice k reads x delayed by
  2k cycles as its first operand (`fwd[2k]`; slice 0 reads `x_in` directly).
* One **shared operand** (`far_smp`), x delayed by `TAPS−1` cycles. It is one
  register behind the end of the forward line, and every slice reads it as its
  second operand.

Work through the delays and every slice k contributes
h[k] · (x[n−k] + x[n−15+k]) for the same n. One stage of the delay is spent
in the chain and one in the forward line. The line still has exactly
2·7 + 1 = 15 sample registers, the same count as the ASIC version. The other
registers are 8 × 30-bit products and 8 × 32-bit partial sums.

Why this architecture exists: an FPGA DSP slice provides the pre-adder, the
multiplier, the product register and the cascaded accumulator as hard logic,
with dedicated routing between neighbouring slices. A chain like this then
costs almost no general fabric. Timing does not worsen with filter length,
because every adder sits between registers. On an ASIC the same chain only
adds registers (about twice as many) and area.

## Where this differs from the reference implementation

The reference filter was produced by a high-level-synthesis tool. Its structure
and component counts are known, but its generated RTL is not. This design
follows that structure and those counts. It departs from them in these points:

* **Enable and reset.** The reference had one 1-bit input whose role is not
  described. Here it is `en`, a clock enable for the whole filter. The
  synchronous reset is this design's choice.
* **Coefficient port.** The reference takes one 104-bit input. Here that is
  `coef`, 8 × 13 bits.
* **Sample alignment in the FPGA chain.** The reference schematic draws the same
  folded delay line for both architectures. The forward-line/shared-operand
  split described above is this design's way of making the registered chain
  compute the FIR sum. It keeps the reference's register count.
* **`cas_in`.** The reference FPGA version has a 32-bit input and one
  accumulation adder per slice, eight in all, whose purpose is not given. Here
  it is the cascade input of the first slice.
* **Registers not reproduced.** The reference FPGA version has one more 32-bit
  register and two 1-bit registers than `sfir_fpga`. Their roles are not
  described, but they are probably I/O or handshake state.
* **Input registers.** The reference registers its input ports. Here `x_in`
  feeds the first pre-adder directly.
* **FPGA vendor primitive.** `sfir_dsp_slice` is generic RTL with the
  arithmetic of a DSP slice. It does not instantiate a vendor primitive.
  Whether a synthesis tool maps it onto hard DSP slices depends on that tool.
* **Lengths other than 16.** `sfir_adder_tree` pads to a power of two with zero
  leaves, so any even `TAPS` works. The testbenches also run `TAPS = 6`.

## Files

| file | contents |
|------|----------|
| `rtl/sfir_pkg.sv` | default sizes |
| `rtl/sfir_delay_line.sv` | shift register with enable |
| `rtl/sfir_preadd_mult.sv` | pre-adder and multiplier of one symmetric tap |
| `rtl/sfir_adder_tree.sv` | balanced, width-growing adder tree |
| `rtl/sfir_asic.sv` | ASIC architecture |
| `rtl/sfir_dsp_slice.sv` | one DSP-slice tap with product and accumulation registers |
| `rtl/sfir_fpga.sv` | FPGA (systolic) architecture |
| `rtl/sfir_top.sv` | both architectures side by side |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |
| `tb/tb_sfir_small_widths.sv` | both architectures at 8-bit samples and 5-bit coefficients |

## Verification

Each testbench compares the design with a reference computed in 64-bit
integers and prints `TB_RESULT checks=N failures=M`. The checks are:

* the impulse response is h0..h7, h7..h0, at the stated latency;
* random streams with random enables and, for the FPGA chain, random `cas_in`;
* full-scale pre-adder inputs and the 32-bit wrap at −2^31;
* a reset in the middle of a stream;
* the 6-tap length;
* `tb_sfir_top` runs both architectures at their default sizes and checks that
  they agree sample by sample once their latencies are aligned. It counts each
  situation above and fails if one never happened.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sfir_pkg.sv tb/tb_sfir_top.sv --top-module tb_sfir_top
./obj_dir/Vtb_sfir_top
```

Replace `tb_sfir_top` with any other testbench name. The `-Irtl` search path
lets Verilator find the modules that a testbench uses. Every run takes well
under a second.
