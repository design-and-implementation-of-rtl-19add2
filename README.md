# A floating point unit whose operators take turns in one reconfigurable region

Single precision floating point adders, multipliers and dividers are large.
In this design they are never present at the same time. The FPGA is split in two:

- a **static base** that is always configured. It is the host's register interface and the control unit.
- one **reconfigurable region**. It holds either the adder-subtractor, the multiplier or the divider.

When the host asks for an operation whose module is not in the region, the base has that module swapped in.
This is partial reconfiguration: only the region's part of the device is rewritten, while the base keeps running and the host can keep using its registers.
The aim is to spend the area of the largest operator rather than the area of all three.

This repository gives that system as synthesizable SystemVerilog, plus self-checking testbenches.
On an FPGA with partial reconfiguration each operator module would go into its own partial bitstream.
In plain RTL, `pr_region` models the swap, so the whole system simulates and synthesizes as ordinary logic.

```
            host bus                       region boundary
   ──────────────────────┐        ┌───────────────────────────────┐
  wr/rd/addr/wdata/rdata │ pci_   │ pr_region                     │
 ───────────────────────►│ inter- │  cfg_req/cfg_id ─► swap timer │
                         │ face   │  loaded/cfg_done ◄─           │
                         │ (base, │  start/sub/a/b ─► fadd_sub │  │
                         │ control│                  fmul     │  │ only the loaded
                         │  unit) │                  fdiv     │  │ one is active
                         │        │  result/ov/done ◄─────────┘  │
   ──────────────────────┘        └───────────────────────────────┘
```

## What a swap means here (read this first)

On the device, a swap rewrites the region with another module's configuration.
Three things follow from that, and `pr_region` reproduces all three:

1. **One module at a time.** A register `loaded` records which module is present: none, add-sub, mul or div.
   Only that module receives `start` and drives `result`, `ov`, `done` and `busy` across the boundary.
2. **The region is empty during a swap.** After `cfg_req`, `loaded` reads "none" and `reconfiguring` is high for `RECONF_CYCLES` clocks.
   The region's outputs are forced to zero. Then `loaded` takes the new value and `cfg_done` pulses.
3. **Nothing survives a swap.** Every module that is not loaded is held in reset.
   A module that is swapped in starts from its reset state, and a result left in the previous module is gone.

What is **not** reproduced is the area saving.
The RTL instantiates all three operators side by side and selects among them.
A synthesis report of `fpau_top` therefore shows the sum of the three operators, not the largest one.
For scale: the original Virtex-II Pro floorplan reserved 1300 slices for the region and 300 for the base.
In that implementation the divider, the largest operator, used about 1100 slices, and the base about 240.
To get the saving on an FPGA, synthesize `fadd_sub`, `fmul` and `fdiv` as separate modules for the region, each with the same ports.
In the vendor's partial-reconfiguration flow, replace `pr_region`'s module instances by one black-box region plus bus macros.
`RECONF_CYCLES` (default 1024) is a placeholder for the real swap time.
The real value depends on the partial bitstream size and the configuration port speed.

A swap request always reloads the region, even for the module already there.
This matches module-based reconfiguration, where the whole module image is replaced.
Avoiding pointless swaps is the base's job.

## How a command runs

The host writes operand registers OPA and OPB, then writes an op code to CTRL.
The base then does the following:

1. It copies OPA/OPB into its operation registers, so the host may overwrite them right away, and clears `done`.
2. It compares the module the op needs with `loaded`:
   - add and sub need the adder-subtractor;
   - mul needs the multiplier;
   - div needs the divider.
   If the module is missing, it pulses `cfg_req` and waits for `cfg_done`.
3. It pulses `start` to the region and waits for the module's `done`.
4. It stores the result and the overflow flag, sets `done` and counts the operation.

Clock edges from the CTRL write to `done` in STATUS:

| operation      | module already loaded | module swapped in        |
|----------------|-----------------------|--------------------------|
| add, sub, mul  | 2                     | RECONF_CYCLES + 4 (1028) |
| div            | 29                    | RECONF_CYCLES + 31 (1055)|

A CTRL or CFG write while the base is busy is refused: it is ignored and sets the error bit.
Reads and operand writes are accepted at any time, including during a swap.

### Host register map (`pci_interface`)

The bus is a simple synchronous one: write strobe, read strobe, 3-bit word address and 32-bit data.
Read data comes back one clock after the read strobe, with `host_rvalid`.

| addr | name   | access | contents |
|------|--------|--------|----------|
| 0    | OPA    | R/W    | first operand (dividend, minuend) |
| 1    | OPB    | R/W    | second operand |
| 2    | CTRL   | W      | `[2:0]` op code: 1 add, 2 sub (a−b), 3 mul, 4 div. Writing starts the operation |
|      |        | R      | `[2:0]` op code of the last operation |
| 3    | STATUS | R      | `[0]` busy, `[1]` done, `[2]` ov, `[3]` reconfiguring, `[5:4]` loaded module (0 none, 1 add-sub, 2 mul, 3 div), `[6]` error, `[7]` divider busy |
| 4    | RESULT | R      | result of the last operation |
| 5    | CFG    | W      | `[1:0]` module to swap in now (preload). Ignored if it is already loaded |
| 6    | COUNT  | R      | `[31:16]` swaps performed, `[15:0]` operations completed |

The error bit is sticky until reset. It is set by a command while busy, an unknown op code, or a start that the region dropped.

The original system connects the base to a host over PCI.
The PCI protocol is not modelled here: this register bus is what a PCI target would sit in front of.

## The arithmetic

Operands and results are IEEE-754 single precision: 1 sign bit, an 8-bit exponent with bias 127, and a 23-bit fraction with a hidden leading one.
The widths are parameters (`EXP_W`, `FRAC_W`) of the three operators.

- **`fadd_sub`** works in five steps:
  1. order the operands by magnitude and take the exponent difference;
  2. shift the smaller significand right to align it, keeping guard, round and sticky bits;
  3. add or subtract;
  4. normalize: one right shift after a carry, otherwise a left shift by the leading-zero count, with the exponent adjusted;
  5. round.
  It has one clock of latency.
- **`fmul`** forms the 24×24-bit significand product, adds the exponents, normalizes by at most one place, and rounds.
  It has one clock of latency.
- **`fdiv`** is a restoring divider. It produces one of 26 quotient bits per clock, then normalizes and rounds.
  `done` comes 28 clocks after `start`, and `busy` covers that time.

The three operators share these conventions:

- **Rounding is truncation** (toward zero). The published multiplication examples for this unit are only matched by truncation.
  One consequence surprises people: adding a much smaller number of the opposite sign removes one unit in the last place from the larger number.
  For example, `98571234 + 02091a04 = 98571233`.
- **Overflow flag.** When the result's exponent leaves the normal range, upward or downward, `ov` is set.
  The exponent field is then all ones, while the sign and the truncated fraction are still computed.
  So an underflowing product such as `98571234 × 02091a04` gives `ffe65d32` with `ov = 1`, exactly as in the published examples.
  Read this as "out of range" and not as IEEE infinity or NaN.
- **Special values.** An exponent field of zero counts as zero: subnormals are flushed.
  An operand with an all-ones exponent (infinity or NaN) sets `ov`, and the result has an all-ones exponent and a zero fraction.
  Division by zero behaves the same way.
  An exact zero sum is +0, or −0 when both operands are negative zeros.

### Reference operand pairs

Three operand pairs are published with the original design:

- `12121231, 31310016`
- `98571234, 02091a04`
- `091a0470, abcdef10`

The tests use them, with these results:

| pair | mul (= published) | div (truncated IEEE) | add (truncated IEEE) |
|------|-------------------|----------------------|----------------------|
| 1    | `03c9fd40`        | `20534426`           | `31310016`           |
| 2    | `ffe65d32` ov     | `d5c8cb1c`           | `98571233`           |
| 3    | `fff7cac2` ov     | `9cbf7630`           | `abcdef0f`           |

The published division results have the same fractions as these, but exponent fields 152 higher.
That fits an exponent bias of 23 in place of 127.
This RTL uses the IEEE bias, so its quotients differ from the published ones in the exponent field.
The published addition results cannot be obtained by adding the listed operands in any IEEE-like way.
This RTL follows the standard algorithm instead.

## Files

| file | what it is |
|------|------------|
| `rtl/fpau_pkg.sv` | format struct `fp32_t`, op codes `op_e`, module identifiers `rm_e`, register addresses |
| `rtl/fadd_sub.sv`, `rtl/fmul.sv`, `rtl/fdiv.sv` | the three operators that can occupy the region |
| `rtl/pr_region.sv` | the reconfigurable region: swap timer, reset of absent modules, boundary multiplexer, handshake assertions |
| `rtl/pci_interface.sv` | the static base: host registers and control unit |
| `rtl/fpau_top.sv` | base plus region. Parameter `RECONF_CYCLES` |
| `tb/tb_fp_ref_pkg.sv` | reference models with the same conventions, computed differently: exact 300-bit integer sums, double-precision products and quotients |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/table1_vectors.hex` | the three operand pairs and their published products, read by `tb_fpau_top` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends by itself.
A watchdog stops a testbench that hangs and counts that as a failure.
Run the commands from the repository root: `tb_fpau_top` reads `tb/table1_vectors.hex` by that relative path.

```
verilator --binary --assert --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/fpau_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_fpau_top.sv --top-module tb_fpau_top
./obj_dir/Vtb_fpau_top
```

Replace `tb_fpau_top` with `tb_fadd_sub`, `tb_fmul`, `tb_fdiv`, `tb_pr_region`, `tb_pci_interface` or `tb_fpau_pkg` to test one module or the package.
`tb_pci_interface` needs no `tb_fp_ref_pkg.sv`, but the extra file does no harm.

What the tests cover:

- The operator tests compare every result, bit for bit, with the reference model. They run over 4000 random pairs (2000 for the divider), biased towards close exponents so that subtraction cancels, plus corner cases.
- They check the latency of every operation. The divider test also checks that a `start` while busy is ignored.
- `tb_pr_region` runs with a 20-clock swap. It checks that the region is empty and isolated during each swap, that the swap lasts exactly as long as set, and that a swapped-in module starts from reset.
- `tb_pci_interface` stands in for the region with a small behavioural model. It checks the register map, swap-on-demand, operand latching while the host keeps writing during a swap, refusal while busy, preload and the counters.
- `tb_fpau_pkg` checks the struct's bit layout, the op-code-to-module mapping and the register addresses.
- `tb_fpau_top` runs the whole unit at its default parameters, through the host bus only. It runs the published pairs through all four operations, then a preload, a refused command, a host access during a swap, and 300 random operations.
  Every swap length and every command's clock count are checked.
  It counts each mechanism (swaps, swaps avoided, preloads, each operation, overflows, host access during a swap, divider busy, refusals) and fails if one never happened.
  It takes well under a second.

## Changing it

- **Swap time.** Set `RECONF_CYCLES` on `fpau_top` or `pr_region`. Any value of 1 or more works.
  If you change it, also change the local constant in `tb_fpau_top`, which checks the swap length against it.
- **Another number format.** `fadd_sub`, `fmul` and `fdiv` take `EXP_W` and `FRAC_W`.
  The package, the region and the base are fixed at single precision, as are the reference models.
- **Round to nearest.** The guard, round and sticky bits are already present in `fadd_sub`.
  The multiplier's discarded product bits and the divider's remainder give the same information.
  Rounding is the last step of each operator, in one `always_comb` block.
- **Another operator.** Add an `rm_e` value, map op codes to it in `rm_for_op`, instantiate it in `pr_region` with the same start/result/ov/done ports, and add a branch to the boundary multiplexer.

## Departures and limits

- The area saving is not obtained in plain RTL: all three operators are instantiated (see "What a swap means here").
- The host side is a plain register bus, not PCI.
- The swap time is a placeholder, not a measured value.
- The divider is iterative (28 clocks). The original design's divider structure is not known.
  A faster array divider could replace it behind the same ports.
- Results follow IEEE-754 single precision arithmetic with truncation.
  The published division and addition examples are not reproduced, for the reasons given above. The published products are.
- IEEE infinities, NaNs and subnormals are not implemented. Out-of-range results are signalled by `ov` instead.
