# varr: an FPGA kernel for weighted sums of calorimeter pulse samples

The CMS electromagnetic calorimeter (ECAL) measures the energy in each crystal from
a short train of digitised pulse samples. A simple amplitude estimate multiplies
those samples by a fixed set of weights and adds them up. The barrel alone has
more than 60,000 crystals, and every event needs this sum for each of them. Doing
it in one accelerator call per event, not one call per crystal, is what makes
offloading it worthwhile.

`varr` is that kernel as RTL. One call takes N crystals of `size` samples each and
computes, for every crystal `j`:

```
outA[j] = sum over i of  (in0a[i] * float(in1a[j*size+i])) * float(in2a[j*size+i])
outT[j] = sum over i of  (in0t[i] * float(in1a[j*size+i])) * float(in2a[j*size+i])
outG[j] = 1   if some in2a[j*size+i] == 1   (otherwise outG[j] is not written)
```

| array  | type  | length   | meaning                                              |
|--------|-------|----------|------------------------------------------------------|
| `in0a` | float | size     | amplitude weights, the same for every crystal        |
| `in0t` | float | size     | a second weight set (timing), the same for every crystal |
| `in1a` | int   | N*size   | ADC samples, crystal after crystal                   |
| `in2a` | int   | N*size   | per-sample gain word; its value multiplies the sample, and a value of 1 sets the crystal's flag |
| `outA`, `outT` | float | N | the two weighted sums                            |
| `outG` | int   | N        | gain flag (only ever set to 1)                       |

The arithmetic is IEEE-754 single precision. The order of operations is that of a
sequential C loop: each product is rounded, and the sum is built sample by sample
in order. So the results match, bit for bit, a CPU that runs the same loop in
`float`. This is the property the tests check.

## Where the data lives: four AXI bundles

All seven arrays are in the card's DDR memory. The kernel reaches them through
four AXI4 memory-mapped master ports, grouped the way the kernel's arguments are
grouped:

| port | arrays             | channels used |
|------|--------------------|---------------|
| `m0` | `in0a`             | AR, R         |
| `m1` | `in1a`             | AR, R         |
| `m2` | `in2a`, then `in0t`| AR, R         |
| `m3` | `outA`, `outT`, `outG` | AW, W, B  |

Each port carries single-beat, 32-bit transfers (one array element per beat) with
64-bit byte addresses, and has one transaction in flight. Only the channels a
port uses are brought out. The AR/AW fields `len`, `size` and `burst`, and the
W fields `strb` and `last`, are therefore constants (0, 2, INCR, all ones, 1).
Each channel's payload is a packed struct from `varr_pkg`: `axi_ax_t`,
`axi_r_t`, `axi_w_t` and `axi_b_t`. The valid/ready bits run beside them as
plain signals.

`in2a` and `in0t` share a port. Their two reads per sample are therefore serial,
and this sets the pace of the whole kernel (see *Timing*).

## How a call runs

`varr_ctrl` is a small state machine that runs the two loops:

1. **Idle.** `ap_idle` is high. On `ap_start` it latches the seven base addresses,
   `N` and `size`, and clears `axi_err`. If N <= 0 it pulses `ap_done` at once.
2. **Crystal.** It clears the datapath's sums and flag.
3. **Fetch.** It issues the reads of `in0a[i]`, `in1a[j*size+i]` and
   `in2a[j*size+i]` on m0, m1 and m2 together. As soon as the `in2a` word is
   back it reads `in0t[i]` on m2. Once all four words are in, they go to the
   datapath as one sample, and the fetch of sample i+1 starts in the next cycle.
4. **Drain.** After the last sample it waits until the datapath pipeline is empty.
5. **Write.** It writes `outA[j]` and `outT[j]` on m3. It writes `outG[j] = 1` only
   if the flag is set. Then it moves to the next crystal (the row offset grows by
   `size`), or pulses `ap_done` after the last one.

If `size` <= 0, every crystal gets zero sums. A response other than OKAY on any
port sets `axi_err` for the rest of the call. The call then still completes, and
it uses whatever data came back.

## The datapath

`varr_datapath` has a three-stage pipeline that accepts one sample per cycle:

| stage | work |
|-------|------|
| 1 | `int_to_fp32` on the sample and on the gain word; `w_a * f(sample)` and `w_t * f(sample)` |
| 2 | both products times `f(gain)` |
| 3 | `sum_a += …`, `sum_t += …` (two `fp32_add`, each adding into its own register); flag `|= (gain == 1)` |

The accumulating adder is a single combinational stage. So consecutive samples
can be added in back-to-back cycles without reordering, which keeps the
sequential summation order exact. `busy` is high while a sample is in stages 1
and 2. The sums are final three cycles after the last sample enters.

## Floating-point conventions

The three arithmetic units (`fp32_mul`, `fp32_add`, `int_to_fp32`) are
combinational and follow these rules:

- round to nearest, ties to even;
- subnormal inputs count as zero, and a result below 2^-126 after rounding
  becomes a zero of the same sign (flush to zero, as most FPGA float cores do);
- overflow gives ±infinity; every NaN result is the quiet NaN `0x7fc00000`;
  0 × ∞ and ∞ − ∞ are NaN; x + (−x) is +0.

The adder aligns the smaller significand into 27 bits: 24 bits of significand
plus guard, round and sticky. Everything shifted out is ORed into the sticky bit.
A cancellation that needs a left shift of more than one place can only happen
when the exponents differ by at most one, and then no bit has gone to the
sticky bit. So three extra bits give correct rounding. The multiplier rounds
the 48-bit significand product with a guard bit and a sticky bit. The int
conversion rounds the normalised 32-bit magnitude the same way; the most
negative int converts exactly.

ADC samples are at most 12 bits and gain words are small, so the int-to-float
casts are exact for real data. Rounding happens only in the products and the
sums.

## Timing

Every block is clocked on `ap_clk` and reset by the synchronous, active-low
`ap_rst_n`. A read port needs 3 cycles from request to data if the memory
accepts the address at once and returns data in the next cycle. Against
memories that need one extra cycle on each handshake (5 cycles per read), the
kernel takes:

- 13 cycles per sample: two serial 5-cycle reads on m2, plus 3 of bookkeeping;
- 18 cycles per crystal: clear, drain, and the outA/outT writes (16 if size is 0);
- 6 cycles more for each outG write;
- 1 cycle per call.

A whole barrel (61,200 crystals × 10 samples) takes 9,404,036 cycles at this
memory speed. Real DDR latency is far longer than 5 cycles. Since each port has
only one word in flight, the time per sample grows with that latency almost one
for one. Bursts and several outstanding reads would be the first thing to
improve.

## Files

| file | contents |
|------|----------|
| `rtl/varr_pkg.sv` | AXI widths, channel structs, response codes, binary32 constants |
| `rtl/varr.sv` | the kernel: controller, datapath and the four AXI ports |
| `rtl/varr_ctrl.sv` | loop controller |
| `rtl/varr_datapath.sv` | three-stage weighted-sum pipeline |
| `rtl/fp32_mul.sv`, `rtl/fp32_add.sv`, `rtl/int_to_fp32.sv` | binary32 units |
| `rtl/axi_rd_master.sv`, `rtl/axi_wr_master.sv` | single-beat AXI4 master ports |
| `tb/fp_ref_pkg.sv` | reference float arithmetic for the tests |
| `tb/axi_mem_model.sv` | behavioural AXI memory with random stalls and error responses |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_varr_barrel` |

## Verification

Every testbench checks its results against values computed independently, and
ends by printing `TB_RESULT checks=<n> failures=<n>`.

- **Float units.** The reference converts to a 64-bit `real`, does the operation
  there, and rounds back to binary32. That result is correctly rounded, because
  a double holds a product of two floats exactly, and double rounding of a sum
  is harmless when 53 >= 2×24+2. The tests mix directed special values, random
  operands over the whole exponent range, cancellations, and operands with short
  significands, which produce exact ties.
- **AXI ports.** They are tested against the memory model, with and without
  random stalls, for data, error responses and latency. Assertions inside the
  ports check that a raised VALID and its payload hold until READY.
- **Controller.** Word-level responders stand in for the ports, and a
  stand-in datapath keeps order-sensitive checksums of the operands it is
  given. The test compares the exact sequence of writes.
- **`tb_varr`.** Runs end to end over several calls. These cover back-pressure on
  all four ports, N <= 0, size = 0, an AXI error, back-to-back calls, and
  crystals with and without an outG write. It counts each of these and fails if
  one never occurs. With zero-stall memories it also checks the exact cycle
  count.
- **`tb_varr_barrel`.** One call at full size: N = 61,200, size = 10. Every
  output word is checked, and so is the cycle count. It runs in about ten
  seconds.

To simulate with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/varr_pkg.sv tb/fp_ref_pkg.sv tb/tb_varr.sv --top-module tb_varr
./obj_dir/Vtb_varr
```

Use the same command for any other testbench, replacing `tb_varr`. Lint a module
with `verilator --lint-only -Wall -y rtl rtl/varr_pkg.sv rtl/<module>.sv`. The
only warnings are for package constants that a given module does not use.

## Departures and choices

- The original kernel is a C++ loop compiled by high-level synthesis (HLS).
  Everything about its hardware structure here is this design's own: the fetch
  order, the pipeline, the single-beat AXI traffic, and the start/done/idle
  handshake with arguments on plain ports. An HLS build would place the
  arguments in AXI-Lite control registers instead.
- An earlier version of the kernel handled one crystal per call, with float
  samples. It is not built: calling `varr` with N = 1 gives its function.
- `outG[j]` is written only when it is set, never cleared. The host must
  initialise the buffer. This matches the C source, which only ever assigns 1.
- `axi_err` is an addition, and it does not stop the call.
- Floating-point special cases (flush to zero, a single NaN value) are this
  design's choices. The loop itself only says `float`.
