# Monsoon processing element in SystemVerilog

Monsoon is an explicit-token-store dataflow processor. There is no program
counter. The work to do is a set of *tokens*, and each token names an
instruction and the frame slot where its operands meet. A token carries a 64-bit
value and a tag. The tag is a pointer to an instruction (IP), an activation frame
(FP) and a processing element (PE).

The processing element runs a six-stage pipeline. One token enters it every
clock. As a token passes through, the pipeline:

- fetches its instruction;
- computes an operand address;
- checks and updates two *presence bits* on that frame word to see whether the
  partner operand has already arrived;
- reads, writes or exchanges the frame word;
- computes a result and the tags of the next instructions;
- builds zero, one or two new tokens.

A new token is recirculated into the pipeline, pushed on one of two token
stacks, or sent to another PE over the network.

The machine has no fixed instruction set. Four programmable tables hold the
decoding:

- a first-level decode indexed by opcode;
- type maps indexed by the value's type;
- presence maps, which are small state machines on the presence bits;
- a second-level decode of horizontal microinstructions.

Loading different tables gives a different instruction set.

This repository contains RTL for the whole PE (`rtl/monsoon_pe.sv` and the
blocks below), a self-checking testbench for every block, and an
end-to-end testbench. The end-to-end testbench loads a small instruction set
and runs dataflow programs at the PE's default sizes.

## Data formats (`rtl/monsoon_pkg.sv`)

| Item | Layout (MSB first) | Bits |
|---|---|---|
| token | TAG, VALUE | 144 |
| TAG / VALUE word | TYPE 8, immediate 64 | 72 |
| pointer | PORT 1, HASH 2, N 5, IP 24, PE 10, FP 22 | 64 |
| instruction | OPCODE 10, r 10, PORT 1, s 11 | 32 |
| first-level entry | BASE 11, TMAP 5, PMAP 6, EA 2 | 24 |
| presence entry | BRA 2, FZ 1, FOP 2, NEXT 2 | 7 |
| second-level entry | FUCTL 11, NACTL 3, FTCTL 13, TMASK 16, EMASK 10, STATS 4 | 57 |

Local memory words are 72 bits. A word holds one TAG, one VALUE or two
instructions. Word `IP >> 1` holds instruction IP, in its low half when
`IP[0] = 0`.

Each word has two presence bits. State `00` means empty. The other three
states mean whatever the presence maps make them mean.

The MAP field (HASH and N) controls how a pointer increment can change PE.
The increment is done in `rtl/ptr_add.sv`:

- **HASH = 00 (interleaved FP).** The N low PE bits take part in the FP add.
  The words of a structure are therefore spread over 2^N PEs.
- **HASH = 11 (code hashing).** The same applies to IP.
- **HASH = 01 (aliased).** A token for any PE in the subdomain counts as local.
- **HASH = 10 (base FP).** The increment never moves PE.

## The pipeline (`rtl/monsoon_pe.sv`)

| Stage | Work | Blocks |
|---|---|---|
| 1 | fetch instruction at IP | `local_memory` |
| 2 | effective address; opcode decode; type code TC from the type map | `first_level_decode`, `ea_unit`, `type_map` |
| 3 | presence map on {PMAP, PORT, TC, state}; new state written back | `presence_map`, `presence_bits` |
| 4 | read / write / exchange / enqueue of [EA]; second-level decode at BASE OR BRA | `operand_fetch_store`, `second_level_decode` |
| 5 | function units; next address; exception check; statistics | `function_unit` (`crossover`, `falu`, `piu`, `tpu`, `mcu`), `next_address`, `exception_unit`, `stats_counters` |
| 6 | form tokens; stacks; network | `form_token`, `token_stack` |

Every stage does its table reads and any memory read-modify-write within
its own clock, so the six tokens in flight never interfere with each other.
The memories are modelled as arrays with combinational reads, which is what
makes this possible.

A token keeps the pipeline slot it entered in. That slot (0 to 5) is its
*thread*, and the thread selects its exception context.

At reset the pipeline fills with idle tokens (IP = 0 on this PE). The
instruction at IP 0 must therefore be an idle instruction whose microcode
produces no token.

### Effective address (`ea_unit`)

The address is `EA = (FP or IP, masked) + r`. The EA field selects one of four
modes:

| EA | Address | Typical use |
|---|---|---|
| 00 | FP + r | frame operand |
| 10 | IP + r | literal near the code |
| 11 | r | absolute |
| 01 | mask(FP) + r | loop constants in a base frame |

Mode 01 clears the low N bits of FP, but only when HASH = 10 and N > 0.

FP is zero-extended to 24 bits. IP is used as a word index as it stands.

### Matching (`presence_map`, `presence_bits`, `operand_fetch_store`)

A presence map entry gives four things:

- the new state;
- the frame operation FOP (read, write, exchange, or enqueue);
- two branch bits BRA, ORed into the second-level address;
- FZ, which replaces BASE by zero and so reaches the common entries 0 to 3.

For example, a dyadic instruction uses a map with these entries:

- In state 00 it **writes** the operand, moves to state 01 and branches to a
  do-nothing entry.
- In state 01 it **reads** the partner, moves back to 00 and runs the
  instruction.

Some PMAP numbers have fixed behaviour:

- **PMAP 0 to 3** do no memory operation, and temp = VALUE.
- **PMAP 4 to 7** write the new state to all 32 words of the aligned block
  (*bulk*).
- **PMAP 8 to 15** are ordinary maps here. The architecture attaches
  write-through and non-cacheable behaviour to them, but this PE has no cache.

An enqueue stores VALUE with its IP field incremented. Use it to chain
deferred readers.

### Function units (`function_unit` and the blocks it contains)

The crossover sorts VALUE and temp into the operands A and B by the
incoming PORT and the FLIP bit. All four units see A and B, and UNIT selects
whose result becomes Y. B also passes through unchanged as a second result.

**FALU** works on IEEE doubles, 64-bit integers and 64-bit booleans. Its
flags are DIVZ, UF, OF, INX, NAN, DEN, ZERO and NEG.

- Float: add, subtract and multiply (with their absolute-value variants),
  divide, square root, min, max, abs, negate and pass, all with
  round-to-nearest-even. Divide and square root are single-cycle
  combinational logic like every other operation. The square root of a
  negative number returns the quiet NaN without a status bit.
- Integer: add, subtract and multiply (signed, unsigned and mixed), abs, negate,
  min, max and arithmetic shift.
- Boolean: all sixteen two-input functions, logical shift, rotate and bit
  reversal.
- Comparisons, which return all ones or all zeros.
- Conversions, where fix rounds to nearest and trunc rounds toward zero.

The comparison opcodes are the architecture's own (`0x18`-`0x1E` and
`0xB8`-`0xBE`). All other FALU opcode numbers belong to this implementation:

| OP | Operations |
|---|---|
| `0x00`-`0x10` | float ops |
| `0x20`-`0x27` | conversions |
| `0x40`-`0x4F` | booleans; `OP[3:0]` is the truth table indexed by `{A_i, B_i}` |
| `0x50`-`0x52` | shift, rotate, reverse |
| `0x80`-`0x8D` | integer ops |

The named constants are in `monsoon_pkg`.

The other three units:

- **PIU** builds a pointer. It sets the PORT, IP and FP fields independently:
  from A, from A + B, from A + s, or from s. The PE field follows MAP.
- **TPU** makes the Y TYPE bit by bit from the TMASK controls: 0, 1, A's bit or
  B's bit. It also implements SETTYPE and GETTYPE.
- **MCU** reads and writes machine state:
  - the stack registers: BASE, TOS, NOPOP and STACKSWAP;
  - the saved exception A, B and status, plus CLEAR;
  - the activity flag;
  - the statistics counters.

  Its opcodes are those of the architecture.

### Next address (`next_address`)

The next-address unit builds two tags:

- **tag1** has IP + 0, 1, 2 or (IP OR 1) + 3 and always port l.
- **tag2** has either the same IP with port r, or IP + s with the
  instruction's port.

NA1 = 0 and NA2 = 0 therefore name the two inputs of the current instruction.

### Forming tokens (`form_token`, `token_stack`)

This is the most intricate part of the PE. FTCTL chooses the following:

- **EN1 / EN2**: when each token is made (always, Y = 0, never, Y != 0).
- **K1 / K2**: how each token is assembled from tag1, tag2, Y and B. A value can
  become a tag, so pointers computed by the PIU are sent directly.
- **ORD**: which of two tokens has priority.
- **RECIRC**: what happens to the priority token. 00 recirculates it, 01
  recirculates it and holds off the network, 10 / 11 push it on stack0 /
  stack1.
- **STACK**: which stack the other token goes to.
- **ACK**: whether a network token needs an acknowledgement.

Each clock exactly one token enters stage 1. It is chosen as follows:

1. An exception handler token, if the instruction in stage 6 faulted.
2. A local token that recirculates uninterruptibly.
3. A network input token. An interruptible local token is then pushed on
   stack0 instead.
4. A local token that recirculates normally.
5. A popped token. Stack0 is popped before stack1, and only in a cycle with
   no push.
6. The idle token.

Tokens for other PEs have their own rules:

- A token whose PE is not this one goes to the network output.
- If that output is blocked, the token is pushed on stack0.
- A popped token bound for another PE also leaves through the network and
  does not enter the pipeline.

A cycle therefore makes at most two pushes or one pop. The stacks have their
own memories (2^STACK_AW tokens each).

NOPOPk makes physical stack k look empty. STACKSWAP exchanges the roles of the
two stacks.

While any acknowledgement is outstanding, stack1 is not popped. Put the local
half of an acknowledged pair there.

### Exceptions (`exception_unit`)

EMASK selects which status bits can raise an exception. SENSE inverts the
test, and ALWAYS is always set.

When an instruction faults:

1. Its A, B and masked status are saved in its thread's context.
2. The thread's flag is set.
3. Its tokens are replaced by a handler token with IP = thread + 1, FP = 0 and
   VALUE = the faulting TAG, entered uninterruptibly.

The handler reads the context through the MCU and ends with CLEAR. A second
exception in the same thread before that CLEAR is a machine check. The machine
check drops the instruction's tokens and sets the sticky `machine_check`
output.

### Statistics (`stats_counters`)

Every instruction increments the one of 16 counters that its STATS field
names. The counters are 32 bits wide. The MCU can read and set them, and the
host can read and clear them.

## Interfaces of `monsoon_pe`

**Host port.** `host_we`, `host_sel` and `host_addr` / `host_wdata` write
one item per clock. `host_sel` selects the item:

| host_sel | Item |
|---|---|
| 0 | local memory word |
| 1 | presence row of 32 words (2 bits each) |
| 2 | first-level entry |
| 3 | type-map entry `{TMAP, TYPE, PORT}` |
| 4 | presence-map entry `{PMAP, PORT, TC, state}` |
| 5 | second-level entry |

`host_raddr` / `host_rdata` read local memory. `host_cnt_idx` /
`host_cnt_val` read a counter, and `host_cnt_clr` clears all counters. Load the
tables while holding reset.

**Network.** The network ports use a valid/ready handshake:

- `net_in_*` carries tokens into the PE.
- `net_out_*` carries tokens out. `net_out_ack_req` marks a token that must
  be acknowledged.
- `net_ack_in` pulses once for each acknowledgement.

The network itself is outside this design, and so is the lookup from logical
to physical PE. `pe_id` is compared with the logical PE field.

**Observation.** `events[9:0]` gives one-cycle pulses for these mechanisms, from
bit 0 upwards:

| Bit | Event |
|---|---|
| 0 | two tokens formed |
| 1 | recirculation |
| 2 | network input held off by an uninterruptible token |
| 3 | push |
| 4 | pop |
| 5 | idle token inserted |
| 6 | network token entered |
| 7 | token sent |
| 8 | network-bound token stacked |
| 9 | pop held for acknowledgements |

`exception` pulses when a handler token is formed.

## Sizes

| Parameter | Default | Origin |
|---|---|---|
| first-level decode | 1024 x 24 | architecture |
| type maps | 32 x 512 x 2 | architecture |
| presence maps | 64 x 32 x 7 | architecture |
| second-level decode | 2048 x 57 | architecture field tables (see below) |
| `LMEM_AW` | 16 (64 K words) | own choice; the architecture gives no memory size |
| `STACK_AW` | 8 (256 tokens per stack) | own choice |
| exception contexts | 8 | architecture |
| counters | 16 x 32 bits | number from the architecture, width own choice |

## Where this RTL departs from or adds to the architecture

- **Second-level entry width.** The architecture states 56 bits with a 12-bit
  FTCTL. Its own sub-field tables add up to FTCTL = 13 and EMASK = 10, and
  those tables were followed, which gives 57 bits.
- **tag1 and tag2.** The pipeline overview gives the increments of tag1 and
  tag2 the other way round from the next-address control tables. The tables
  were followed.
- **FALU opcode numbers.** These are this implementation's own, except for the
  comparisons. The absolute-value float variants are read as |A|*B, A*|B|,
  |A*B|, |A+B|, |A-B| and |B-A|.
- **Stacks.** They live in separate memories, not in the frame store.
- **Own choices.** These rules are this implementation's own:
  - the push-or-pop rule;
  - the second remote token of a cycle going to stack0;
  - the idle token;
  - the host port;
  - the valid/ready network handshake.
- **Not implemented.** Nothing is implemented for operand caching or main
  memory.
- **No address extension from PE.** The architecture allows a machine with
  fewer than 1024 processors to use low PE bits as extra high FP bits, which
  enlarges each PE's memory. That option is not built. The local memory is
  addressed by FP, IP or r alone.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog. For example:

```
verilator --binary --timing -Irtl -Itb rtl/monsoon_pkg.sv rtl/ptr_add.sv \
  rtl/fp_round.sv rtl/fp_mul.sv rtl/fp_addsub.sv rtl/fp_div.sv rtl/fp_sqrt.sv \
  rtl/crossover.sv rtl/falu.sv \
  rtl/piu.sv rtl/tpu.sv rtl/mcu.sv rtl/function_unit.sv rtl/local_memory.sv \
  rtl/first_level_decode.sv rtl/ea_unit.sv rtl/type_map.sv rtl/presence_map.sv \
  rtl/presence_bits.sv rtl/operand_fetch_store.sv rtl/second_level_decode.sv \
  rtl/next_address.sv rtl/exception_unit.sv rtl/stats_counters.sv \
  rtl/token_stack.sv rtl/form_token.sv rtl/monsoon_pe.sv tb/tb_monsoon_pe.sv \
  --top-module tb_monsoon_pe && obj_dir/Vtb_monsoon_pe
```

`tb/tb_monsoon_pe.sv` runs the PE at its default sizes. It uses the
instruction set and program in `tb/tb_monsoon_pe_prog.svh`, which is a
worked example of programming the four tables:

- a dyadic add;
- a bulk presence clear;
- an I-structure with deferred reads;
- an enqueue;
- type dispatch;
- a fork through the stacks;
- an uninterruptible loop;
- an acknowledged send;
- a blocked output;
- the activity flag;
- overflow exceptions with a handler;
- a machine check.

It counts every event above and fails if any of them never happens.

The block testbenches (`tb/tb_<block>.sv`) compare each block with reference
models written in the testbench. `tb_falu` checks the float operations against
the simulator's `real` arithmetic.
