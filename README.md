# Registered two's complement multiplier

`signed_mult` multiplies a signed 16-bit operand `A` by a signed 8-bit operand `B`
and returns the exact signed 24-bit product `Z`. Registers sit on every input and on
the output. The multiply logic therefore has one full clock cycle to itself, and the
buses that bring operands in and take results away see plain flip-flops. The widths
are parameters, so the same RTL builds any `A_width × B_width → A_width + B_width`
multiplier.

The design does not build a multiplier array by hand. It turns the signed problem into an
unsigned one that any synthesis tool can map, using *sign extension*. The next section
explains why that works. Most of what needs understanding in this design is there.

## Why sign extension gives a signed product

A product needs as many bits as both operands together. For 16 × 8 that is 24 bits, and
no product of two in-range operands can overflow it.

Multiplying the raw bit patterns as unsigned numbers is wrong as soon as an operand is
negative. Take 8 × 4 bits. The pattern `1010_0111` is −89 in two's complement, but unsigned
it is 167. The unsigned product 167 × 7 = 1169 is `0100_1001_0001`, while −89 × 7 = −623
should give `1101_1001_0001`.

The fix is to work modulo 2^Z_width, where Z_width is the product width:

1. **Widen both operands to Z_width bits by copying the sign bit into every new upper bit.**
   −89 becomes `1111_1010_0111` and 7 becomes `0000_0000_0111`. A widened operand has the
   same value modulo 2^Z_width as the signed original.
2. **Multiply the two widened patterns as unsigned numbers.** The full result has
   2·Z_width bits.
3. **Keep the low Z_width bits.** Modulo 2^Z_width these equal the product of the signed
   values. The true product fits in Z_width bits, so the low bits *are* the two's complement
   product. For −89 × 7 they are `1101_1001_0001` = −623. For −89 × −7 they are
   `0010_0110_1111` = +623.

The upper Z_width bits of the unsigned product are discarded. Nothing reads them, so
synthesis removes the logic behind them. In `sign_ext_mult` the multiplication is written
directly at width Z_width. That gives the same low bits without ever naming the upper half.
The synthesizer chooses the multiplier's structure.

## Datapath and timing

```
 A ──► [Areg] ──┐
                ├──► sign_ext_mult ──► [Zreg] ──► Z
 B ──► [Breg] ──┘     (one cycle)
```

| module          | role                                                          |
|-----------------|---------------------------------------------------------------|
| `signed_mult`   | top: Areg, Breg, multiplier core, Zreg                        |
| `io_reg`        | one register: asynchronous active-low reset to 0, load enable |
| `sign_ext_mult` | combinational core: sign extension, multiply, truncation      |
| `signed_mult_pkg` | default operand widths shared by RTL and testbenches        |

- **Throughput:** one operand pair per clock.
- **Latency:** two enabled rising edges. The edge that captures `A`/`B` into Areg/Breg is
  the first; the product is on `Z` after the next one.
- **`en`:** while it is low, all three registers hold, so the pipeline pauses. Data already
  inside is kept, and `Z` keeps showing its last product. When `en` goes high again the
  pipeline resumes where it stopped.
- **`rst_an`:** asynchronous and active low. It clears Areg, Breg and Zreg at once, without
  waiting for a clock edge. After reset `Z` reads 0, and it stays 0 until a new pair has
  passed through both stages.
- **Operand encoding:** `A`, `B` and `Z` are plain two's complement vectors.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `A_width` | 16 | width of `A` |
| `B_width` | 8  | width of `B` |
| `Z_width` | `A_width + B_width` | width of `Z` |

Leave `Z_width` at its default to get exact products. A narrower value keeps only the low
bits, so large products wrap. A `Z_width` narrower than either operand is rejected at
elaboration, because the operands could not then be sign-extended. `io_reg` has its own
`WIDTH` parameter, set separately for each of the three registers.

## Where this RTL makes its own choices

- The three registers share one register module. The multiplier as described writes them
  inline. Behaviour is the same.
- The product is formed at Z_width bits, not as a 2·Z_width-bit product truncated
  afterwards. The result bits are the same.
- `en` is described only as pausing the system. Here it pauses all three registers together,
  so a result is never lost or duplicated during a pause.
- Only the sign-extension multiplier is provided. No other multiplier architecture and no
  standard-cell netlist is included. No gate counts or delays are claimed for any process.
- `io_reg` contains an assertion that a register not enabled keeps its value, unless a reset
  clears it. Verilator's lint reports `rst_an` as used both asynchronously and synchronously.
  The synchronous use is only this assertion's disable condition.

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Each also has a watchdog that ends a hung simulation
as a failure.

| testbench | what it checks |
|-----------|----------------|
| `tb/io_reg_tb.sv` | load, hold and asynchronous reset (also between clock edges) against a reference model, with random data and random enables |
| `tb/sign_ext_mult_tb.sv` | the core at 8 × 4, over all 4096 pairs, including the −89 × ±7 examples bit by bit; at 16 × 8, the four extreme corners and 5000 random pairs |
| `tb/signed_mult_tb.sv` | the top at its default size. Phase 1: 100 random pairs; the expected products are searched for in the recorded output stream, and the position where they are found must be a latency of 2 edges. Phase 2: the four extreme pairs, 32767·127 = 4161409, −32768·127 = −4161536, −32768·−128 = 4194304 and 32767·−128 = −4194176. Phase 3: 2000 cycles with random pauses and random asynchronous resets. Throughout, `Z` is compared after every edge with a two-stage integer reference pipeline. Pauses with data in flight, mid-stream resets, negative products and corner products are counted, and each must occur. |
| `tb/signed_mult_8x4_tb.sv` | the top at 8 × 4 → 12, all 4096 pairs streamed back to back, each product checked two edges later |

The reference values come from the simulator's own signed integer arithmetic, not from the
sign-extension method. Each testbench was also run against a deliberately broken copy of
its module, and each caught it:

- `io_reg` loading on every edge whatever `en` is;
- `sign_ext_mult` zero-extending `B` instead of sign-extending it;
- `signed_mult` with Zreg's enable tied high.

## Simulating

The RTL is SystemVerilog 2017. Verilator 5 runs it in two-state mode. The package must be
read first:

```sh
verilator --binary --timing --assert --top-module signed_mult_tb \
    rtl/signed_mult_pkg.sv rtl/io_reg.sv rtl/sign_ext_mult.sv rtl/signed_mult.sv \
    tb/signed_mult_tb.sv
./obj_dir/Vsigned_mult_tb
```

For the other benches, change `--top-module` and the last file. `io_reg_tb` needs
`rtl/signed_mult_pkg.sv` and `rtl/io_reg.sv`. `sign_ext_mult_tb` needs the package and
`rtl/sign_ext_mult.sv`. Every bench finishes in a few seconds.

To build a different size, override `A_width` and `B_width` on `signed_mult`.
`signed_mult_8x4_tb` shows how. The testbenches take their default widths from
`signed_mult_pkg`.
