# Symbolic Cache: load value speculation from instruction encoding bits

Deep pipelines read a load's value from the L1 data cache several cycles after
the load is fetched. Instructions that use that value wait. This design predicts
the value in the front end instead, from the load's instruction word alone. No
register read, address generation or translation happens first.

The idea rests on a property of compiled code. A store and a later load of the
same location are often written the same way: same base register, same
displacement. `sw $s0,24($sp)` in a prologue and `lw $s0,24($sp)` in the
epilogue are an example. So are repeated `lw ...,-32756($gp)` accesses to one
global variable, and field accesses through an unchanged pointer register. The
*symbolic cache* (SC) is a small data cache indexed by "base register ID plus
displacement" instead of by memory address. A store writes its data under that
name. A later load with the same name reads it back at fetch time, as a
speculative value. The value is wrong only if the base register changed value
in between, and the base address was not later restored.

The SC also captures spatial locality. Nearby fields differ only in their
displacement, so they fall in the same symbolic line. On a miss the SC therefore
fetches the whole L1 line around the target and lays it out in symbolic order.

The RTL is synthesizable SystemVerilog. It covers:

- the instruction decoder;
- the procedure-colour counter;
- symbolic address formation;
- index randomization;
- the line realignment unit;
- the SC arrays and their control;
- a top level that joins them into a front-end lookup and a back-end update and verification.

The processor pipeline and the L1 cache sit outside. Their signals are the
top's ports.

## Default configuration

| Parameter | Default | Meaning |
|---|---|---|
| `PCOLOR_BITS` | 2 | width of the procedure colour (0 disables it) |
| `LINE_BYTES` | 64 | SC line size; the L1 line is taken to be the same size |
| `WAYS` | 4 | associativity |
| `SETS` | 16 | sets, so 16 × 4 × 64 B = 4 KB of data |
| `UNIT_BYTES` | 4 | alignment unit: 4 = word alignment, 1 = byte alignment (2 and 8 also work) |
| `RANDOMIZE` | 1 | index randomization on |

This is the configuration the design is built around: a 4 KB, 4-way SC with
word alignment, a 2-bit colour and a randomized index. At this size, loads in
SPEC integer programs got a correct speculative value about 70 % of the time.
The other settings are the variants it was compared with. Byte alignment gained
less than one percentage point. Zero or four colour bits were also tried, as
was a plain index.

## The symbolic address

The instruction set is MIPS32. The I-type memory instruction gives
`opcode[31:26] base[25:21] rt[20:16] disp[15:0]`. The symbolic address is

```
 bit:  22 21 | 20 ........ 16 | 15 ................ 0
      P-color| base reg ID    | displacement
```

The P-color field is filled only when the base register is `$sp` (r29) or
`$s8`/`$fp` (r30). Every other access gets zero there. Globals and heap
records are shared by all procedures, so they must keep one name wherever they
are accessed. Stack slots are not shared: every procedure saves `$ra` at a
small `$sp` offset in its own frame. Without a colour, a callee's saves would
overwrite its caller's saved registers in the SC.

**P-color** (`pcolor_counter`) is a global counter:

- `jal` and `jalr` add one.
- `jr $ra` subtracts one.
- It wraps modulo 2^`PCOLOR_BITS`.

Caller and callee frames therefore get different colours, and so do up to
2^`PCOLOR_BITS` levels of nesting. Deep nesting beyond that is rare in the
evaluated programs, which is why two bits were enough.

## Set index and tag

Displacements are mostly 0 or small constants. The displacement bits just above
the line offset (bits 9:6 here) are therefore nearly always zero, and would
crowd everything into set 0. `sc_index_hash` XORs each index bit `6+i` with
symbolic bit `16+i`, which is the base register ID, then the colour:

```
index[i] = sym[6+i] ^ sym[16+i]        (16 sets: bits 9:6 ^ bits 19:16)
tag      = sym[22:10]
```

Accesses through different base registers thus land in different sets. The
tag keeps bits 16 and up, so the original index bits can be recovered, and two
different symbolic lines can never alias. This holds while
`log2(LINE_BYTES) + log2(SETS) <= 16`.

Each register's working set is small: it lasts only until the register is
overwritten. Four ways per set are enough, and the randomized 4-way SC performs
about as well as a fully associative one.

## Line realignment: the subtle part

A symbolic line and a real L1 line cut memory at different places. The load
`lw $t0,8($s0)` with `$s0 = 0x10010024` has symbolic offset 8, which is unit 2
of its symbolic line. Its real address is 0x1001002C, which is unit 11 of its
L1 line. When that access misses, `sc_align_fill` copies the L1 line into the
SC shifted so that the target lands on its symbolic unit:

```
SC unit j  <-  L1 unit (j - su + ru)     su = symbolic unit, ru = real unit
```

The other units keep their distance to the target. This is what makes a later
`lw $t1,12($s0)` hit: it reads symbolic unit 3, which received L1 unit 12, the
word that really lives at `$s0 + 12`.

Whatever shifts out of either end of the line is dropped. SC units with no
source stay invalid: the fill covers only part of the line. Every unit
therefore has its own valid bit: 16 per line with word units, 64 with byte
units. Fetching a second L1 line to complete the SC line was judged not worth
it, and is not built.

A later access to the same symbolic line may touch an invalid unit. That access
counts as a miss for those units. Its own L1 line, aligned by its own offsets,
fills the units that are still invalid. Units that are already valid keep their
data.

With word units, the two low address bits are taken from the symbolic address.
A byte or half-word access whose real low bits differ from its displacement's
low bits reads the wrong bytes. Those are counted as wrong speculations, which
are rare in practice. Byte units (`UNIT_BYTES = 1`) avoid them at four times
the valid bits.

## Operation and timing

`symbolic_cache` has two independent ports. `sc_predictor` drives them as
follows.

**Front end: lookup, one cycle.**

1. Every fetched instruction (`f_valid`, `f_instr`) is decoded.
2. Calls and returns step the P-color at the next clock edge.
3. A load or store gets its symbolic address.
4. A load also reads the SC.
5. One cycle after fetch, the `p_*` outputs give the result:
   - `p_valid`, `p_is_load` and `p_is_store` say what was fetched;
   - `p_sym` and `p_size` give its symbolic address and size;
   - for a load, `p_hit` says whether a value is available;
   - `p_data` holds the raw bytes, little-endian packed and zero above the size;
   - `p_value` holds the sign- or zero-extended register value.

A hit needs three things: a matching tag, every unit the access touches valid,
and no crossing of the symbolic line's end.

**Back end: update, single cycle.**

When the load or store has executed, the pipeline asserts `r_valid` with the
following signals:

- the carried `p_sym` and `p_size` (as `r_sym`, `r_size`);
- the real address `r_addr`;
- the 64-byte L1 line holding that address, `r_l1_line` (byte *b* at bits 8*b*+7:8*b*);
- the data, `r_data`: store data, or the bytes the load really read;
- for a load, the carried prediction (`r_pred_hit`, `r_pred_data`).

In that cycle the SC does three things:

1. It finds the line, or allocates an invalid way, or else the least recently
   used way. It fills the line from the realigned L1 line where needed.
2. It writes the access bytes at their symbolic position. Units the access
   covers completely become valid.
3. It makes the way most recently used.

Loads write too. The next load with the same name then sees the latest value,
which also repairs a wrong speculation. `r_correct` or `r_mispredict` compares
the carried prediction with the real bytes, combinationally, so the pipeline can
keep or squash the dependents. `r_fill` reports that L1 data entered the SC.

A lookup in the same cycle as an update reads the contents before the update.
Reset is asynchronous and active low. It clears all valid bits, the lookup
response and the colour. The data array is not reset and is only read under a
valid bit.

## Files

| File | Contents |
|---|---|
| `rtl/sc_pkg.sv` | widths, register numbers, opcodes, `mem_size_e`, decoded-instruction struct `dec_t` |
| `rtl/sc_inst_decode.sv` | loads/stores (size, sign), calls, returns, base register, displacement, stack flag |
| `rtl/pcolor_counter.sv` | procedure colour counter |
| `rtl/sym_addr_gen.sv` | symbolic address formation |
| `rtl/sc_index_hash.sv` | randomized set index and tag |
| `rtl/sc_align_fill.sv` | L1-to-symbolic line realignment with per-unit valid bits |
| `rtl/symbolic_cache.sv` | tag, valid and data arrays; LRU; lookup and update ports |
| `rtl/sc_predictor.sv` | top level |
| `tb/sc_ref_pkg.sv` | class-based reference model of the SC used by the larger testbenches |
| `tb/sc_cfg_run.sv` | parameterized random-program harness used by `tb_sc_configs` |
| `tb/tb_*.sv` | self-checking testbenches (below) |

At the defaults, synthesis gives 32 768 memory bits for line data, about 2 100
flip-flops for tags, valid bits and LRU state, and about 1 100 word-level cells.

## Testbenches

Every testbench checks its outputs against values computed independently, and
prints `TB_RESULT checks=N failures=M`. Each has a watchdog.

| Testbench | What it exercises |
|---|---|
| `tb_sc_inst_decode` | hand-picked and random MIPS32 words |
| `tb_pcolor_counter` | random call/return sequences, wrap-around, simultaneous call and return |
| `tb_sym_addr_gen` | field placement, colour only on `$sp`/`$s8` |
| `tb_sc_index_hash` | 16-set and 64-set shapes, plain index |
| `tb_sc_align_fill` | an eight-unit example (symbolic unit 2, real unit 5), random word and byte shifts |
| `tb_symbolic_cache` | 20 000 random lookup/update cycles against the reference model; requires hits, misses, evictions, partial refills and shifted fills |
| `tb_sc_predictor` | whole design at default parameters: a 30 000-instruction synthetic program (below) |
| `tb_sc_examples` | two small code sequences at default parameters (below) |
| `tb_sc_configs` | eight variants: colour 0/2/4 bits, plain index, byte/half-word/doubleword alignment, fully associative |

`tb_sc_predictor` generates its program on the fly: calls and returns that move
`$sp`, stack spills and reloads, `$gp` globals, and pointer registers that get
reloaded. The testbench executes the program itself and checks every
prediction, symbolic address, extended value and verdict against the model. It
requires each mechanism to occur: calls, returns, hits, misses, right and wrong
speculations, LRU evictions, partial refills, shifted fills, and two frames
told apart by colour.

`tb_sc_examples` runs two code sequences. One is a bit-stream writer that
updates three `$gp` globals on every call; the callee borrows `$s1` and the
caller restores it. The other is a list-copy routine whose prologue and
epilogue save and restore registers around two nested calls that use the same
stack slots. The test asserts that the loads the syntax argument says are
predictable are predicted correctly:

- the globals from the second call on;
- the reload through the restored `$s1`;
- every epilogue restore.

Each testbench runs with plain Verilator from the repository root, for example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb rtl/sc_pkg.sv tb/sc_ref_pkg.sv \
          tb/tb_sc_predictor.sv --top-module tb_sc_predictor -o sim
./obj_dir/sim
```

All of them finish in seconds. `-Wno-fatal` keeps Verilator's lint warnings,
such as unused package constants, from stopping the build.

The accuracy figures that `tb_sc_predictor` and `tb_sc_configs` print are for
their synthetic programs only. They do not reproduce the SPEC results: those
programs are not simulated here.

## Where this RTL makes its own choices

The design fixes these points:

- the symbolic address layout;
- the colour rule and the `$sp`/`$s8` restriction;
- the XOR index;
- the realigned partial fill that drops unfitted data;
- per-unit valid bits;
- the default sizes.

The following are choices of this implementation:

- **Instruction set.** MIPS32 encodings and opcode numbers. Calls are `jal`
  and `jalr`; a return is `jr $ra` only.
- **Timing.** Lookup registered after one cycle. Update in one cycle.
  Read-before-write when both ports hit the same line.
- **Replacement.** True LRU, with an invalid way chosen first.
- **Stores.** Stores allocate and fill on a miss, like loads.
- **Loads.** Executed loads write their real value into the SC.
- **Partial refills.** A present line whose needed units are invalid is
  refilled into those units only.
- **Line crossing.** Accesses crossing a symbolic line boundary never hit.
- **Geometry.** The L1 line is the same size as the SC line.
- **Byte packing.** Little-endian on the 32-bit ports. Bytes keep their
  positions inside a line, so only the port packing depends on this.
- **Verification.** The top compares the carried prediction with the real
  bytes.

## Limits

- Instructions are assumed to arrive on the correct path. The colour counter is
  not repaired after a mispredicted branch, and the SC is not cleaned of
  wrong-path updates, because the back end only updates for executed
  instructions.
- There is no invalidation port. A line stays valid until it is replaced. Data
  written by DMA or other cores reaches the SC only through later fills and
  accesses.
- `SETS` and `WAYS` must be powers of two. `SETS = 1` with `WAYS = 64` gives
  the fully associative comparison point; the tag is then the whole symbolic
  line address.
- Only byte, half-word and word accesses are decoded. Half-word and
  doubleword alignment units (`UNIT_BYTES` = 2 or 8) work. With doubleword
  units a 4-byte store never covers a whole unit, so it validates nothing on
  its own; only fills do.
