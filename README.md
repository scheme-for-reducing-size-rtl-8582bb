# Quarter-size twiddle-factor memory for radix-2 FFT processors

A radix-2 FFT of length N uses N/2 twiddle factors

    W_m = exp(-j*2*pi*m/N),   m = 0 .. N/2-1

A plain coefficient memory holds all N/2 of them. The usual symmetry trick,
sin(x) = cos(90° - x), halves that to N/4. This design goes one step further.
It stores only the first eighth of the circle, **N/8 + 1 words**. It rebuilds
every other coefficient from those words by swapping the real and imaginary
parts and complementing them. The extra logic is small and nearly fixed: a few
muxes and an (n-1)-bit incrementer, which grows only with log2 N. So the area saved grows with
the FFT length, which is what makes it attractive for long transforms (OFDM,
radar, sonar).

The RTL is parameterised by the FFT length `N` (default 8192) and the
coefficient width `W` (default 16 bits each for the real and imaginary parts).

## The four blocks

The address range m = 0 .. N/2-1 is split into four blocks. Only Block I is
stored. Write (R_g, I_g) for the stored word at Block I index g.

| Block | addresses m            | Block I index read | coefficient    |
|-------|------------------------|--------------------|----------------|
| I     | 0 .. N/8               | g = m              | ( R_g,  I_g)   |
| II    | N/8+1 .. N/4-1         | g = N/4 - m        | (~I_g, ~R_g)   |
| III   | N/4 .. 3N/8            | g = m - N/4        | ( I_g, ~R_g)   |
| IV    | 3N/8+1 .. N/2-1        | g = N/2 - m        | (~R_g,  I_g)   |

`~` is a bitwise complement. Blocks I and III each have N/8+1 addresses.
Blocks II and IV each have N/8-1. Blocks II and IV walk the stored block
backwards, and they never read index 0 or index N/8.

### Finding the block from the address bits

Let the address m have n = log2(N/2) bits. The top two bits almost give the
block. The exceptions are the two addresses whose remaining n-2 bits are all
zero:

| m[n-1:n-2] | rest all zero? | block |
|------------|----------------|-------|
| 00         | –              | I     |
| 01         | yes (m = N/8)  | I     |
| 01         | no             | II    |
| 10         | –              | III   |
| 11         | yes (m = 3N/8) | III   |
| 11         | no             | IV    |

The Block I address is n-1 bits wide:

- Blocks I and III use m[n-2:0] directly.
- Blocks II and IV use the two's complement of m[n-2:0]. Modulo N/4 that is
  N/4 - m[n-2:0], which is the reversed index in the table above.

No subtractor is needed. Worked example, N = 32 (n = 4):

1. m = 5 = 0101. The top bits are 01 and the rest is non-zero, so this is Block II.
2. The two's complement of 101 is 011, so the unit reads g = 3. That word is
   (0x6a6d, 0xb8e3).
3. The Block II rule gives (~0xb8e3, ~0x6a6d) = (0x471c, 0x9592). That is
   (0.556, -0.831) = W_5 of a 32-point FFT.

## Why the complements are exact: the number format

The reconstruction uses bitwise complement (~x = -x - 1), not negation. It is
exact only because the stored words use the matching convention:

- A value v ≥ 0 is stored as round(32767·v). So 1.0 is `0x7fff`.
- A value v < 0 is stored as the complement of the rounded magnitude,
  ~round(32767·|v|). This is one LSB below the true two's-complement value.
  For example, -sin(2π/32) = -0.195 is stored as ~`0x18f9` = `0xe706`.
- A value that rounds to zero is stored as `0x0000`, not `0xffff`.

With this format, the negative of any stored value is exactly its bitwise
complement. So every coefficient the unit produces is identical to the one you
would get by quantising W_m directly with the same rule.

`coeff_rom` computes its contents from that rule at elaboration time, using
`$cos` and `$sin` in a constant function. Changing `N` or `W` needs no data
file. For N = 32 the result reproduces the published 16-entry coefficient table
word for word (`tb/coeff_ref_pkg.sv`, `TABLE32`).

If your datapath needs true two's-complement negatives (-x instead of -x-1),
both the stored format and the reconstruction rules would have to change.
Complements would become negations, with a carry-propagate adder per part, and
that costs part of the saving.

## Structure and timing

```
 m ──► block_addr_mapper ──rom_addr──► coeff_rom (N/8+1 words, sync read) ──R,I──► coeff_transform ──► re, im
            │ blk                                                                   ▲
            └───────────────────────────► blk_q register ───────────────────────────┘
```

| module              | role |
|---------------------|------|
| `fft_coeff_pkg`     | `coeff_block_e` (BLK_I..BLK_IV) |
| `block_addr_mapper` | combinational: block from the top two bits and the all-zero test; Block I address |
| `coeff_rom`         | Block I memory, N/8+1 words of {R, I}, synchronous read with enable |
| `coeff_transform`   | combinational swap and complement, chosen by block |
| `coeff_gen_top`     | the three above, plus the register that carries the block alongside the memory read |

Interface of `coeff_gen_top`:

| port        | dir | width    | meaning |
|-------------|-----|----------|---------|
| `clk`       | in  | 1        | rising-edge clock |
| `rst_n`     | in  | 1        | asynchronous, active-low reset; clears `out_valid` |
| `in_valid`  | in  | 1        | request the coefficient for `m` in this cycle |
| `m`         | in  | log2(N)-1| coefficient address, 0 .. N/2-1 |
| `out_valid` | out | 1        | `re`/`im` hold the coefficient requested one cycle earlier |
| `re`, `im`  | out | W each   | W_m in the format above |

Timing:

- Latency is one clock. The result of a request at clock edge t appears after
  edge t, together with `out_valid`.
- Requests can come every cycle.
- In a cycle without `in_valid` the memory is not read and `re`/`im` keep their
  last value.
- There is no back-pressure.

This unit does not contain the FFT's coefficient address generator. For a
shorter transform of length N' that divides N, W_N'^k = W_N^(k·N/N'). The same
memory therefore serves it if the generator steps m by N/N'. The full-size
testbench reads the 32-point table this way from the 8192-point unit.

## Memory size

Words of 2×W bits:

| N     | all coefficients (N/2) | half-size scheme (N/4) | this design (N/8+1) |
|-------|-----------------------:|-----------------------:|--------------------:|
| 32    | 16   | 8    | 5    |
| 64    | 32   | 16   | 9    |
| 1024  | 512  | 256  | 129  |
| 8192  | 4096 | 2048 | 1025 |

The memory has N/4 address slots. Only N/8+1 of them are used. The addresses
above N/8 are never produced, and the memory returns zero for them. In reported
synthesis results, the fixed cost of the mapper and transform outweighs the few
words saved at small N. The net saving in area and power appears from about
N = 1024 up.

## What is specified and what was chosen here

These parts follow the scheme as specified:

- the four-block split
- the block test on the top two bits plus the all-zero rest
- the two's-complement address reversal
- the four swap/complement rules
- the N/8+1-word memory
- the 16-bit width

These are this design's own choices, because the scheme leaves them open:

- Default N = 8192. This is the longest length for which the scheme's
  area/power figures are given. Any power of two ≥ 16 elaborates; an assertion
  rejects other values.
- The quantisation formula. It is inferred from the 32-point table and extends
  that table to other N.
- One pipeline stage: the synchronous memory read. The mapper and transform are
  combinational.
- The valid handshake, the read enable and the asynchronous reset.

Where the 32-point table and the block equations disagree on which block owns
m = N/8 and m = 3N/8, the equations are followed: Blocks I and III respectively.
Because R = ~I at 45°, both readings give the same coefficient. Only the block
label differs.

The published area and power figures come from a 0.35 µm standard-cell flow.
They are not reproduced here. The RTL contains no technology-specific parts.

## Verification

Every testbench checks itself and prints `TB_RESULT checks=… failures=…`. Each
has a watchdog. The reference values come from `tb/coeff_ref_pkg.sv`, which
evaluates exp(-j2πm/N) with `$cos`/`$sin` for every m. It never uses the block
relations.

- `tb_block_addr_mapper`: all addresses for N = 32 and N = 8192. The expected
  block comes from range comparisons, not bit fields. Also checks the m = 5
  example above.
- `tb_coeff_transform`: rebuilds all 16 entries of the 32-point table from its
  Block I words. Also tests 400 random words and blocks against the four rules.
- `tb_coeff_rom`:
  - N = 32 contents against the table.
  - All 1025 words of N = 8192.
  - No change before the clock edge.
  - Hold with the enable low.
- `tb_coeff_gen_top`: the full-size run, with default parameters. The steps are:
  1. Reset.
  2. All 4096 addresses in order, with random idle cycles.
  3. 3000 random back-to-back requests.
  4. The 32-point table through stride-256 addresses.

  It checks the values, the one-cycle `out_valid` timing and the hold during
  idle cycles. It counts requests in each block, the two all-zero edge
  addresses, idle holds and reset. Any of these that never occurs counts as a
  failure.
- `tb_fft_lengths`: one unit each for N = 32, 64, …, 8192. Each is swept over
  all N/2 addresses; N = 32 is also compared with the table.

All runs take well under a second.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fft_coeff_pkg.sv tb/coeff_ref_pkg.sv -y rtl -y tb \
    tb/tb_coeff_gen_top.sv --top-module tb_coeff_gen_top -o sim
./obj_dir/sim
```

To run another testbench, substitute its name. To build the unit at another
size, override the parameters on the instance, e.g.
`coeff_gen_top #(.N(1024), .W(16))`. The width of `m` follows as log2(N)-1 bits.
