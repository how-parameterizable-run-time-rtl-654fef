# Dynamic data folding with tunable LUTs

Some inputs of a circuit change only now and then: the coefficients of an
adaptive filter, the patterns in a ternary CAM, the select lines of a
multiplexer that is set up once per mode. In *dynamic data folding* (DDF) these
slow inputs, the **parameters**, are taken out of the datapath. The circuit is
built from **tunable LUTs** (TLUTs): LUTs whose truth tables are Boolean
functions of the parameters. When a parameter changes, a configuration manager
evaluates those functions (the **partial parameterizable configuration**, PPC)
and rewrites the affected truth tables. The datapath never sees the parameters,
so it needs no parameter registers, no generic multiplier and no comparator
against stored patterns. The result is smaller and faster. The price is the
time needed to rewrite the truth tables.

This RTL models such a self-reconfiguring system. The reconfigurable
applications are:

- a 32-tap adaptive FIR filter whose coefficients are folded into TLUTs;
- a 256-entry, 32-bit ternary CAM whose patterns are stored in TLUT truth tables;
- a 6:1 multiplexer and a 4:1 multiplexer whose selects are folded.

A hardware configuration manager specialises all of them over one
configuration write bus.

## Block map

```
             cmd (valid/ready, target, unit, parameter)
                          |
                 +------------------+
                 |  config_manager  |  walks the TLUTs of one unit
                 |   +----------+   |
                 |   | ppc_eval |---+-- fir_ppc / tcam_ppc / mux6_ppc / mux4_ppc
                 |   +----------+   |
                 +--------+---------+
                          | cfg_wr_t: we, target, unit, lut, word (stored = ~truth table)
       +------------------+-----------------+-----------------+
       |                  |                 |                 |
  +----------+      +-----------+      +----------+      +----------+
  | fir_ddf  |      | tcam_ddf  |      | mux6_ddf |      | mux4_ddf |
  | 32 x     |      | 256 x 8   |      | 2 TLUT   |      | 2 TLUT   |
  | kcm_tlut |      | tlut      |      | (K=4)    |      | (K=3)    |
  +----------+      +-----------+      +----------+      +----------+
   x -> y            key -> match/hit/addr   i -> o            i -> o
```

`ddf_platform` is the top level. All shared types and sizes are in `ddf_pkg`.

## Tunable LUT (`tlut`)

A `tlut` is a K-input LUT (K = 4 by default) whose 2^K configuration cells can
be written at run time through `cfg_we`/`cfg_word`. Reading is combinational,
like a LUT. A write takes effect at the clock edge that samples it. The cells
keep the table in the *stored form* of Virtex-II Pro devices, which is the
bitwise inverse of the truth table. The read path undoes the inversion, and
every writer must invert before writing. Reset loads the constant-0 function.
A real device would instead load whatever its initial bitstream contains.

## Specialisation path

A parameter change is one **command** on the `ddf_platform` command port:

| `cmd_target` | unit (`cmd_unit`) | `cmd_param` packing              | TLUTs written |
|--------------|-------------------|----------------------------------|---------------|
| 0 FIR        | tap 0..31         | `[7:0]` coefficient, signed      | 24            |
| 1 TCAM       | entry 0..255      | `[31:0]` data, `[63:32]` mask (1 = don't care), `[64]` valid | 8 |
| 2 mux6       | 0                 | `[2:0]` select                   | 2             |
| 3 mux4       | 0                 | `[1:0]` select                   | 2             |

`config_manager` accepts a command when `cmd_valid && cmd_ready`. An offered
command must stay stable until it is accepted, and an assertion checks this. On
each of the next N clocks the manager:

1. evaluates the PPC for TLUT j of the unit;
2. inverts the result;
3. drives one write on the `cfg_wr_t` bus.

`busy` is high during those N clocks, and `cmd_ready` is low. A command
therefore occupies **N + 1 clocks**:

- 25 clocks per filter tap, or 800 clocks for a full coefficient set;
- 9 clocks per TCAM entry, or 2304 clocks for all 256 entries;
- 3 clocks per multiplexer select.

Each reconfigurable module decodes `target` and `unit` itself. During a rewrite,
the outputs of the unit being rewritten are a mix of old and new tables. The
other units and modules keep working.

The PPC (`ppc_eval`) is pure combinational logic. It is split per application:

- `fir_ppc`: entry n of TLUT (digit d, bit b) is bit b of `v * coeff`. Here `v`
  is n read as an unsigned digit, or as a signed digit for the top digit.
- `tcam_ppc`: entry n is `valid && ((n ^ data_group) & ~mask_group) == 0`.
- `mux6_ppc`, `mux4_ppc`: see below.

## Adaptive FIR filter (`fir_ddf`, `kcm_tlut`)

The filter is a fully pipelined transposed form. The sample `x` goes to all
TAPS multipliers at once. Tap 0's product is registered. Every later tap adds
its product to the previous tap's registered sum and registers the result. The
last register is the output:

    y[n+1] = sum_{i=0}^{TAPS-1} c_i * x[n-(TAPS-1)+i]

The newest sample meets `c_{TAPS-1}`, and its effect shows one clock later.
Sums are `XW+CW+log2(TAPS)` = 21 bits wide, so they cannot overflow. Samples
and coefficients are 8-bit two's complement.

The multiplier is the part that needs the most explanation. A generic 8x8
multiplier is replaced by `kcm_tlut`, a table of coefficient multiples that
works like this:

- The sample is split into two 4-bit digits: the low digit is unsigned, the
  high digit is signed.
- Each digit addresses 12 TLUTs. Together, those 12 TLUTs hold the 12-bit
  product `digit * c` for all 16 digit values.
- The two partial products are sign-extended. The high one is shifted left by
  4, and a static adder sums them.

That makes 2 x 12 = 24 TLUTs per tap, or 768 for 32 taps, which is the TLUT
count reported for this filter size. Changing one coefficient rewrites that
tap's 24 tables and nothing else.

## Ternary CAM (`tcam_ddf`)

An entry matches a key when it is valid and every key bit whose mask bit is 0
equals the entry's data bit. The hardware works like this:

- The key is cut into eight 4-bit groups.
- For each entry there is one TLUT per group. It answers whether these four key
  bits match the entry's four ternary digits.
- The valid bit is folded into every TLUT of the entry.
- An AND of the eight TLUT outputs forms the entry's match line.

The patterns exist only in the truth tables. The only flip-flops are the 256
registered match lines. `hit` and `addr` are decoded from the registered lines,
and the lowest-numbered matching entry wins. Latency is one clock from `key` to
`match`/`hit`/`addr`. Writing one entry takes 9 clocks. Clearing the valid bit
removes an entry.

## Multiplexer examples (`mux6_ddf`, `mux4_ddf`)

**6:1 multiplexer.** The select is folded and two 4-input TLUTs remain.

- L1 reads `{i0, i1, i2, i3}`, with i0 on the most significant address bit.
  Its truth table is entry n = bit `3 - s[1:0]` of n. These are the sixteen
  functions `0, S0&S1, ~S0&S1, S1, ..., 1`, and they do not depend on `s[2]`.
- L0 reads `{0, L1, i5, i4}`. It passes i4 or i5 (chosen by `s[0]`) when `s[2]`
  is set, and L1 otherwise.
- Selects 6 and 7 pass i4 and i5.

**4:1 multiplexer.** It uses 3-input TLUTs. I3 and I2 feed L0. L0, I1 and I0
feed L1, which drives the output. The folded version needs 2 LUTs where a
generic one needs 6.

- L0 is an active-low selector of I3/I2. It is held at 1 when the select points
  to I1/I0.
- L1 computes `~L0 | (selected I1/I0)`.
- L0's third pin is tied low.

## Parameters

| module     | parameter          | default | meaning                          |
|------------|--------------------|---------|----------------------------------|
| `tlut`     | `K`                | 4       | LUT inputs                       |
| `tlut`     | `INV_STORE`        | 1       | cells hold the inverted table    |
| `fir_ddf`  | `TAPS`             | 32      | filter length (up to 256)        |
| `fir_ddf`  | `XW`, `CW`         | 8, 8    | sample / coefficient width       |
| `tcam_ddf` | `W`, `ENTRIES`     | 32, 256 | key width (multiple of 4), entries (up to 256) |

Limits and coupling:

- The unit field of the configuration bus is 8 bits wide (`ddf_pkg::UNIT_W`),
  so a filter or TCAM can have at most 256 units.
- `fir_ppc` and `kcm_tlut` assume `XW` is a multiple of 4.
- The top level uses the package defaults. The PPC is sized by those same
  package constants, so a change of filter or TCAM size at the top level must
  be made in `ddf_pkg`.

## Sizes against the reported experiments

These sizes come from the published experiments.

| application | needed | built at defaults |
|---|---|---|
| 8-bit FIR, 32 taps | 32 taps | 32 taps, 768 TLUTs |
| 8-bit FIR, 64 / 96 / 128 taps | 1536 / 2304 / 3072 TLUTs | the default is 32 taps; `TAPS` can be raised to 256, and `tb_fir_workloads` simulates all four sizes |
| TCAM 32 x 256 | 256 entries, 32 bits | 256 x 32 |
| TCAM 16 x 128 / 16 x 256 / 32 x 128 | fewer entries or bits | fit: unused key bits masked, spare entries left invalid; `tb_tcam_workloads` simulates all four sizes as separate instances |

The LUT counts, clock rates and specialisation times of an FPGA
implementation are not reproduced. This model writes one TLUT per clock. A real
device writes whole configuration frames through its configuration port, and
its rewrite time depends on how many frames the changed LUTs touch.

## How far to trust it, and where it departs

- **Followed closely.** The following come from the published description:
  - the DDF split and the TLUT concept;
  - the inverted stored form;
  - the per-TLUT evaluate-then-write procedure;
  - the transposed pipelined filter;
  - the ternary match rule;
  - the 6:1 multiplexer's L1 truth tables;
  - the 4:1 multiplexer's wiring.
- **Own choices.** The following are choices of this design:
  - the inside of the coefficient multiplier (it is consistent with the
    reported TLUT count);
  - the TCAM's TLUT grouping, output register and priority;
  - L0 of the 6:1 example;
  - the tuning functions of the 4:1 example. They reproduce the fixed-table
    entries of the original example except L0 entry 2, which depends on the
    select here.
- **Different from an FPGA system.** The original system uses an embedded
  processor that runs compiled evaluation code and reaches the configuration
  memory over its buses and the internal configuration port. Here:
  - a hardware sequencer with a combinational PPC replaces that processor;
  - the processor, program memory, buses, bridge and configuration-port core
    are not modelled;
  - the command port is where a processor would connect.
- **Not modelled.**
  - Frame granularity of reconfiguration.
  - The corruption of shift-register LUTs placed in the same column as a
    rewritten LUT.
  - The static (template) part of the configuration.

## Simulating

Every testbench in `tb/` checks itself and prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the reference truth
tables. They are written independently of the RTL: the testbenches use integer
arithmetic, and L1 of the 6:1 example is listed as sixteen expressions.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/ddf_pkg.sv tb/tb_ref_pkg.sv tb/tb_ddf_platform.sv \
    --top-module tb_ddf_platform -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ddf_platform` with any of the other testbenches:

- `tb_tlut`
- `tb_kcm_tlut`
- `tb_fir_ddf`
- `tb_tcam_ddf`
- `tb_mux6_ddf`
- `tb_mux4_ddf`
- `tb_ppc_eval`
- `tb_config_manager`
- `tb_fir_workloads`: filters of 32, 64, 96 and 128 taps side by side
- `tb_tcam_workloads`: TCAMs of 16 x 128, 16 x 256, 32 x 128 and 32 x 256

`tb_ddf_platform` runs the whole platform at its default sizes through the
command port:

- select changes on both multiplexers;
- a full coefficient load, which must take 800 clocks;
- 300 filtered samples;
- a coefficient change;
- a full TCAM load, which must take 2304 clocks;
- TCAM hits and misses;
- a single-entry rewrite.

It fails if any of these mechanisms never happens, including a command that has
to wait while the manager is busy.
