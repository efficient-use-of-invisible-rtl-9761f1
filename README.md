# SetMask: reaching all sixteen registers from 16-bit Thumb code

Thumb instructions name registers with 3-bit fields, so ordinary Thumb code can
use only r0-r7; r8-r15 are reachable only through a few MOV/ADD/CMP forms. A
compiler short of registers therefore parks values in high registers with extra
MOVs, or spills them to memory. This RTL implements the front end of a Thumb
core that removes that limit without changing the 16-bit instruction format:

* The sixteen registers are treated as eight **pairs** (r0,r8), (r1,r9) ...
  (r7,r15). An 8-bit **bitmask** holds one bit per pair; bit *i* = 1 means that a
  Thumb register field with value *i* names r(*i*+8) instead of r(*i*).
* A new 16-bit instruction, **SetMask**, loads the bitmask. It stays in force
  until the next SetMask, so the compiler switches the visible set only where
  the register assignment changes.
* SetMask is an **augmenting instruction** (AX): it never reaches execute. The
  decode stage absorbs it in the same cycle as a neighbouring instruction, so
  it costs code space (one halfword) but no cycles. A second AX instruction,
  **setshift**, carries a shift type and amount that decode merges into the next
  instruction, turning a Thumb pair such as `lsl rtmp, r2, #2 ; sub r1, rtmp`
  into a single ARM `sub r1, r1, r2, lsl #2`.

The idea and its zero-cycle behaviour follow "Efficient Use of Invisible
Registers in Thumb Code" (SetMask on top of the dynamic instruction coalescing
framework). Everything not fixed by that description - encodings, the exact
decode-window rules, port counts, interfaces - is this design's own choice and
is called out below.

A small worked example. With `a` in r0, `c` in r5 and only r10 free, the
statement pair `t = c + 5; a = a + t` compiles to:

| Thumb with SetMask         | issued to execute          |
|----------------------------|----------------------------|
| `setmask 0x04`             | - (absorbed in decode)     |
| `add r2, r5, #5`           | `adds r10, r5, #5`         |
| `add r0, r0, r2`           | `adds r0, r0, r10`         |

Bit 2 of the mask is set, so field value 2 means r10. The sequence issues two
instructions in two cycles, as ARM code would; plain Thumb would need an extra
MOV to move a value through r10.

## Block structure

```
              imem (word per cycle)
                    |
   +----------------v-----------------+
   | fetch_unit  two-halfword buffer  |<---- redirect (taken branch)
   +----------------+-----------------+
                    | buf_count, buf_data, buf_pc / consume
   +----------------v-----------------+
   | ax_decode_stage                  |
   |   SetMask bitmask, pending shift |
   |   thumb_translator (Thumb->ARM)  |
   +---------+-------------+----------+
             | read reqs   | op_mask
   +---------v-------------v----------+
   | paired_regfile                   |<---- wb_we / wb_addr / wb_data
   |   8 rows x {low, high}           |
   |   3 x reg_operand_access         |
   +----------------+-----------------+
                    |
              D/E register  ---> de_instr, de_opnd[3], de_reg[3] ... to execute
```

`axthumb_frontend` is the top. Execute, memory and write-back (the E, M, W
stages of the five-stage pipeline) and the instruction cache are not part of
this RTL; the top exposes the ports where they connect.

| file | what it is |
|------|------------|
| `rtl/axthumb_pkg.sv` | shared types, the AX encodings, `resolve_reg` |
| `rtl/reg_operand_access.sv` | one read port: row index and bitmask bit looked up in parallel, low/high select |
| `rtl/paired_regfile.sv` | 16 x 32-bit register file as 8 pair rows, 3 read ports, 1 write port |
| `rtl/thumb_translator.sv` | combinational Thumb-to-ARM translation with bitmask and merged shift |
| `rtl/ax_decode_stage.sv` | decode window, AX absorption, bitmask register |
| `rtl/fetch_unit.sv` | word fetch into a two-halfword buffer |
| `rtl/axthumb_frontend.sv` | the top: the above plus the D/E pipeline register |

## Register access through the bitmask

Each register-file row holds a low register and its high partner. A read
request carries a 4-bit specifier and a `use_mask` flag:

```
row      = spec[2:0]
high     = use_mask ? bitmask[spec[2:0]] : spec[3]
register = {high, spec[2:0]}
```

The row read and the bitmask lookup use the same three bits and run side by
side, so the bitmask adds only the final 2:1 select to the read path. In Thumb
state, 3-bit fields use the bitmask (`use_mask = 1`). In ARM state, and for
fields that already carry a full register number (the SP of SP-relative forms,
the PC of PC-relative forms, and the H-bit high-register forms), the
specifier's MSB decides. Writes always carry a full register number, because
the destination is resolved in decode and travels down the pipeline with the
instruction; a later SetMask therefore cannot redirect a write that is already
in flight.

One constraint follows for the compiler: a single Thumb instruction cannot use
both members of a pair, since all its fields see the same bitmask.

**Choice of this design:** the high-register forms (`add/cmp/mov Hd, Hs`, `bx`)
ignore the bitmask and name registers by their H bit, exactly as in plain
Thumb, so MOVs between the two halves keep their meaning whatever the mask is.
Register lists (PUSH, POP, LDMIA, STMIA) are not remapped either; the base
register field of LDMIA/STMIA is.

## The augmenting instructions

Both encodings are taken from space that is undefined in the original Thumb
instruction set (this design's choice; any free encoding would do):

| instruction | encoding | effect |
|-------------|----------|--------|
| `setmask m` | `1101 1110 mmmm mmmm` (0xDEmm) | bitmask := m, from the next instruction on |
| `setshift t, a` | `1011 1000 0tta aaaa` (0xB800-0xB87F) | shift type t (00 LSL, 01 LSR, 10 ASR, 11 ROR) and amount a merged into the next non-AX instruction |

The bitmask resets to 0, which is the plain Thumb view (r0-r7). It is kept
across branches and redirects; it is program state that the compiler tracks
along control flow.

A pending setshift is consumed by the next non-AX instruction whether or not
that instruction can use it. It is merged into the register second operand of
ARM forms that allow an immediate shift there:

* three-register `add`/`sub`,
* the two-operand ALU ops `and eor adc sbc tst cmp cmn orr bic mvn`,
* the high-register `add`/`cmp`/`mov`,
* register-offset `ldr/str/ldrb/strb`.

For any other instruction the shift is dropped and `ev_shift_dropped` pulses.
A compiler would not emit such a pair.

## Decode: absorbing AX instructions without a cycle

This is the part that makes SetMask free. Decode sees the two halfwords at the
head of the fetch buffer every cycle and issues at most one ARM instruction:

| head | next | action | halfwords taken |
|------|------|--------|-----------------|
| Thumb | AX | issue the Thumb instruction; absorb the AX (it affects only later instructions) | 2 |
| AX | Thumb | absorb the AX, then issue the Thumb instruction with it applied | 2 |
| AX | AX | absorb both in order | 2 |
| Thumb | Thumb / none | issue the head | 1 |
| AX | none | absorb it | 1 |

In the first case the AX instruction is decoded alongside the instruction
*before* it, which is what hides its cost: a Thumb/AX pair goes through decode
as fast as a single Thumb instruction. In the second case the bitmask is
forwarded inside the cycle. The instruction's reads use the new bitmask
(`op_mask`) before the bitmask register (`mask_q`) has been written.

In ARM state (`thumb_state = 0`) the buffer holds one 32-bit instruction, which
passes through unchanged. Its Rn, Rm and Rs fields are read by full number (Rd
instead of Rs for a single-register store). AX encodings have no meaning there.

## Fetch keeps up with decode

`fetch_unit` fetches one aligned word (two halfwords) into a two-slot buffer.
It issues the fetch in the cycle in which decode takes the last halfword, so
the new word is there the next cycle. This gives the timing of the pipeline
diagram the design follows (cycle numbers relative to the first fetch):

```
six Thumb instructions        fetch 0, 2, 4      decode 1 2 3 4 5 6
Thumb AX Thumb AX Thumb Thumb fetch 0, 1, 2      decode 1 2 3 4   (the AX instructions ride along)
```

With plain Thumb code, fetch idles every other cycle. When pairs are taken, it
fetches every cycle and decode never waits. The memory port is single-cycle
(`imem_ready` high returns `imem_rdata` in the same cycle, as an I-cache hit
would); with `imem_ready` low the same word is requested again. `redirect`
empties the buffer and restarts at `redirect_pc`. A target in the upper half
of a word loads only that half.

## Thumb-to-ARM translation

`thumb_translator` maps each Thumb format to its ARM equivalent with resolved
register numbers. The mapping is the standard one for this ISA pair, not
something the SetMask scheme defines:

| Thumb | ARM produced |
|-------|--------------|
| `lsl/lsr/asr Rd, Rs, #n` | `movs Rd, Rs, <sh> #n` |
| `add/sub Rd, Rs, Rn / #3` | `adds/subs Rd, Rs, Rn{, shift} / #imm` |
| `mov/cmp/add/sub Rd, #8` | `movs/cmp/adds/subs` with immediate |
| ALU `op Rd, Rs` | `ops Rd, Rd, Rs{, shift}`; shifts become register-shifted `movs`; `neg` -> `rsbs Rd, Rs, #0`; `mul` -> `muls Rd, Rs, Rd` |
| `add/cmp/mov Hd, Hs`, `bx` | same ops with full register numbers, `bx` |
| `ldr Rd, [pc, #]`, `[sp, #]`, `add Rd, pc/sp, #` | ARM forms with r15 / r13 and a rotated immediate |
| register-offset and immediate-offset word, byte and halfword loads/stores | ARM single and halfword transfers |
| `add sp, #+-`, `push`, `pop`, `ldmia`, `stmia` | `add/sub sp`, `stmdb sp!`, `ldmia sp!`, block transfers with writeback |
| `b<cond>`, `b`, `swi` | ARM `b<cond>`, `b`, `swi` |

Branch offsets are carried over in halfword units: the executing stage must
scale them by 2 in Thumb state and add the Thumb PC offset (+4). The behavioural
execute model in the top testbench does this.

**Not translated:** the two-halfword `bl` pair. It raises `out_undef`/`de_undef`,
as do undefined encodings.

## Top-level interface (`axthumb_frontend`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `thumb_state` | in | T bit, held by execute |
| `stall` | in | hold decode and the D/E register (execute busy) |
| `imem_req`, `imem_addr`, `imem_ready`, `imem_rdata` | out/out/in/in | single-cycle instruction memory |
| `redirect`, `redirect_pc` | in | taken branch: flush and refetch |
| `wb_we`, `wb_addr[3:0]`, `wb_data` | in | register write-back (full register number) |
| `de_valid`, `de_instr`, `de_undef`, `de_pc` | out | the issued ARM instruction |
| `de_opnd[3]`, `de_reg[3]`, `de_ren` | out | operand values, registers they came from, ports in use (0: Rn/base, 1: Rm/offset, 2: Rs or store data) |
| `mask` | out | current bitmask |
| `ev_setmask`, `ev_setshift`, `ev_coalesced`, `ev_shift_dropped` | out | one-cycle event strobes for counters |

Parameter: `RESET_PC` (default 0).

Timing: a word fetched in cycle *t* is decoded and its registers read in
*t*+1, and the instruction is on `de_*` in *t*+2. Registers are read in decode.
A result written back later is not forwarded by the front end. Execute must
bypass its own recent results, as the testbench model does. A `redirect` takes
precedence over `stall` and clears `de_valid`.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

* `tb_reg_operand_access`: all specifiers, both lookup modes, several bitmasks.
* `tb_paired_regfile`: reset, full-number and random-bitmask reads on all ports, and pair independence.
* `tb_thumb_translator`: about 45 hand-assembled Thumb/ARM pairs covering every format, under bitmasks and with merged shifts.
* `tb_ax_decode_stage`: every pairing case of the decode window, cycle by cycle. It checks that a 21-halfword stream with 10 AX instructions decodes in 12 cycles, plus stall and ARM pass-through.
* `tb_fetch_unit`: the fetch cadence for one and two halfwords per cycle, memory wait, and a redirect into an upper halfword.
* `tb_axthumb_frontend`: end to end at default parameters, with a behavioural execute stage. It runs the example above plus a merged shift, a dropped shift, a branch, a high-register MOV and a SetMask that takes effect in the same cycle, then an ARM-state program. It checks register results and the exact cycle of the final instruction. It repeats the run with random stalls and memory waits, counts each mechanism, and replays both sequences of the pipeline diagram cycle by cycle.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -o sim \
    rtl/axthumb_pkg.sv rtl/reg_operand_access.sv rtl/paired_regfile.sv \
    rtl/thumb_translator.sv rtl/ax_decode_stage.sv rtl/fetch_unit.sv \
    rtl/axthumb_frontend.sv tb/tb_axthumb_frontend.sv \
    --top-module tb_axthumb_frontend -Mdir obj && obj/sim
```

Put the package first. For a unit testbench, list the package, the module and
the modules it instantiates. All testbenches finish in well under a second.

## What is not here, and how far to trust it

* **Execute, memory, write-back, caches.** The design is a front end. Its
  correctness end to end has been shown only against the behavioural execute
  model in the top testbench, which covers data processing, branches and SWI.
  It does not cover loads, stores, flags or conditional execution.
* **`bl`** is not translated (see above).
* **Larger register files.** The scheme extends to more registers per visible
  slot (for example 32 registers as groups of four, two bitmask bits per slot,
  set by two SetMask instructions). Only the 16-register, 1-bit-per-pair form is
  built.
* **The compiler side** (placing as few SetMask instructions as possible) is
  software and not part of this RTL. The hardware places no limit on how often
  SetMask is used.
* Encodings of the two AX instructions, the port counts, reset values, the
  memory handshake and the treatment of high-register forms and register
  lists are this design's choices. Change them in `axthumb_pkg.sv` and
  `thumb_translator.sv`.
