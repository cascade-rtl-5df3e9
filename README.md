# Cascade: variable-precision integers in hardware

Cascade is a co-processor that holds and computes on integers of any size.
A host never sees the digits. It sends short messages ("add the numbers
behind handles 5 and 9") over a 20-bit request/acknowledge port and gets
back handles to new numbers. All storage, including allocation, reuse and
compacting garbage collection, is managed in hardware. The arithmetic runs
on a wide signed-digit datapath, so additions never ripple a carry, and the
datapath is cascaded from identical 16-digit slices.

This repository holds synthesizable SystemVerilog (IEEE 1800-2017) for the
machine. It has one control module and `2**N` arithmetic modules, with a
self-checking testbench for every block. Create, destroy, assim, save,
restore, neg, add, sub, mul, cmp, sign, digits, setreg, getreg and gc are
sequenced end to end. Division, remainder, square root and gcd are not. See
"What is missing" below.

## The number representation

Everything rests on the digit format, so it comes first.

* **Radix-16 signed digits, values -10..10.** A number is
  `sum d_i * 16^i` with every `d_i` in {-10..10}. This set is redundant:
  most values have several digit strings. That redundancy is what lets an
  adder decide each position's transfer from that position alone.
* **Six wires per digit.** A digit is carried as `{n_hi, p_hi[1:0], n_lo,
  p_lo[1:0]}`. Its value is `-8*n_hi + 4*(p_hi[1]+p_hi[0]) - 2*n_lo +
  (p_lo[1]+p_lo[0])`.
  * The upper three wires form a radix-4 digit in -2..2 of weight 4.
  * The lower three form one of weight 1.
  * So a half-digit (radix-4) shift is a rewiring of components
    (`digit_regfile`).
  * The type is `cascade_pkg::sd_digit_t`. `sd_value` reads a digit;
    `sd_encode` makes the canonical encoding of a value.
* **Five bits per digit in memory.** The XL box stores `value + 10`. The
  LX box reverses this. A 16-digit memory word is therefore 80 bits.
* **Sign and length.** A number's sign is the sign of its most significant
  nonzero digit. An n-digit number has a magnitude between about
  `16^(n-1)/3` and `2*16^n/3`. The control chip keeps sign and digit count
  in each number's descriptor. A comparison whose operands differ in sign,
  or in length by two digits or more, is answered from the descriptors
  alone.

## Digit slice and arithmetic unit

`digit_slice` is one radix-16 position. In order:

1. **Doubling circuit** (square root only). It recodes `2*y` as
   `16*td + wd`. `td` goes up the `dbl` loop, and `wd` plus the incoming
   `td` is the doubled digit. At the root position, the multiplicand
   multiplexor takes the new root digit `q` instead. This is what the
   completing-the-square recursion `p' = r*p - q*(2Q + q*r^-j)` needs.
2. **Elementary multiplier** (`elem_multiplier`). It forms `mcand * q`
   (-100..100) and splits it as `16*t + 4*u + s`, with `t` in -6..6, `u` in
   -1..1 and `s` in -4..4.
3. **m1 adder.** It adds the incoming `t` from the position below to `s`.
4. **Multiplexor and conditional complementer.** It selects product or
   plain operand and negates it for subtraction. So `x - q*y` (the
   division step) is one pass.
5. **a0/a1 adders.** The a0 adder computes `x + path + 4u` (-24..24) and
   splits it as `16*ta + w`. A transfer `ta` of ±1 is taken when the sum
   is ±7 or beyond. The a1 adder computes `w + ta_from_below`, which is
   always in -10..10.

Every transfer crosses exactly one position, so the delay of a slice does
not depend on the word width. `arith_unit` chains 16 slices. It also adds a
zero detector per position and a single-digit-value detector (all
positions above the lowest are zero). The end transfers (`a_t`, `m_t`,
`dbl_t`) are ports, so chips can be cascaded.

## Arithmetic chip and module

`arith_chip` executes one ten-bit instruction word `{op, rx, ry, rz}` per
clock. The opcode table is in `cascade_pkg::au_op_e`:

| Group | Opcodes | Effect |
|---|---|---|
| Memory | `LOAD` | `rz` gets the LX-decoded memory word. The address must be issued a cycle earlier. |
| Memory | `STORE` | XL(`rx`) goes onto the memory bus. |
| Arithmetic | `ADD`, `SUB` | `rz` gets `rx ± ry`. |
| Arithmetic | `MAC`, `MSUB` | `rz` gets `rx ± q*ry`. |
| Arithmetic | `SQRT` | `rz` gets `rx - q*(2*ry + q at the root position)`. `q` is also written into `ry` at the root position. |
| Distribution box | `ADDST`, `SUBST` | The arithmetic unit's output goes straight to memory, with no register write. |
| Shift | `SHL`, `SHR`, `SHLH`, `SHRH` | Whole- and half-digit shifts of `rz`. `sp0` moves digits up and `sp1` moves them down. |
| Root position | `ROOT` | Loads the one-hot root digit position register (`rz=0`) or steps it down one digit (`rz=1`). |
| Other | `CLR`, `NOP` | `NOP` selects the normalization radix through `ry`. |

The sensors look at the arithmetic result for arithmetic ops and at `rx`
otherwise:

* The sign computer / leading-zero counter (0..16).
* The normalization sensor. It reads the top three digits and decides
  whether another radix-16, radix-4 or radix-2 normalization shift is
  needed. The threshold used is `R*|V| >= 4096`.
* The single-digit-value output `sdv`. The board ANDs it over all chips,
  standing in for the open-drain bus.

`arith_module` pairs a chip with its digit memory, an 80-bit ×
`2**DADDR_BITS` synchronous RAM. The control chip supplies address and
write enable, and can drive the data bus itself. An assertion checks that
exactly one source drives the bus on every write.

## Control chip

The control chip has three parts.

**Message port (`message_port`).** It uses a four-phase handshake:
* The host puts a word on `data_i` and raises `req_i`.
* When ready, the port latches the word and hands it to the sequencer.
* The reply word appears on `data_o` with `ack_o`, which stays high until
  `req_i` falls.

Every transfer carries one word each way. A message is:
* a command word: opcode in `[4:0]`, and flags *f* (future), *d* (destroy
  arguments) and *i* (in place) in bits 5, 6 and 7;
* its operand words;
* one transfer per result word.

For example, `add` is `{6}`, `ha`, `hb`, then one transfer returning the
new handle. The opcodes are in `cascade_pkg::msg_op_e`. `gc` is a single
transfer: it returns at once, and the port accepts nothing until
collection ends. Errors come back as handle values `FFFFF` (no free
handle), `FFFFE` (no memory) and `FFFFD` (unsupported or malformed
message).

**Memory manager (`memory_manager`).** Management memory (`mgmt_memory`,
22-bit words) has two parts:

* **Descriptor pointers**, indexed by the 20-bit handle. Each holds
  {free, garbage, descriptor index}.
* **Four-word descriptors**: {garbage, handle}, {sign, digit count},
  most significant word address, least significant word address.

Allocation works as follows:

* It searches handles circularly from the last one allocated.
* A free, clean handle gets a new descriptor and words from the top of
  free digit memory.
* A free handle whose destroyed number still owns a big enough block takes
  that block over in place. No collection is needed.
* If neither exists but some handle is free, the collector runs and the
  allocation is retried.

The collector walks descriptors from the top down:
* It drops garbage and frees those handles.
* It slides live descriptors and their digit words upward over the gaps,
  trimming each block to the words its digit count needs.
* It rewrites the descriptor pointers.

Descriptors and blocks are both allocated top-down, so their orders agree
and a single pass suffices. After reset the handle table is swept free.
This takes `2**HANDLE_BITS` cycles, about 1M at full size, and messages
wait until it is done.

**Sequencer (`control_chip`).** Numbers longer than one datapath word
(`16 * 2**N` digits) are processed word-serially, least significant word
first.
* The transfer digits leaving the top chip, and the digit shifted out on
  `sp0`, are held in the control chip. They enter the bottom chip with the
  next word, so multi-word results are exact.
* add/sub take 4 cycles per word.
* mul takes, for each multiplier digit from the most significant down,
  6 cycles per result word. Each pass accumulates `acc = 16*acc + d*b`.
* After each result word, the sign and leading-zero sensors give the
  result's sign and digit count. These go into its descriptor.
* With *f*, the new handle is returned as soon as storage is allocated. The
  next message then waits for the value.
* *d* destroys the operands afterwards, on neg, add, sub and mul and also
  on the queries cmp, sign and digits. *i* (neg) works in place.
* `create` converts a 32-bit two's complement value into digits.
* `assim` converts back. It returns a chunk count, then 16-bit two's
  complement chunks, least significant first.
* `digits` returns the count as two words, high then low.
* `save` returns the 40-bit pseudo-descriptor as two words. The first is
  `{sign, 18 zeros, count bit 20}`; the second holds count bits 19..0.
  Next comes the number of 4-digit chunks, `ceil(nd/4)`. Then the chunks
  follow, least significant first: four digits in their stored 5-bit form,
  20 bits per transfer.
* `restore` takes those words back, allocates storage, writes the chunks
  unchanged and answers with a new handle. If allocation fails, it still
  reads all the chunks before answering with the error.

`getreg` registers:

| Register | Contents |
|---|---|
| 0 | Installed memory top / 4. Writable with `setreg 0` to install less memory. |
| 1 | Free words / 4 |
| 2 | Live handles |
| 3 | Last handle |
| 4 | Collections |
| 5 | Single-digit results |
| 6 | Comparisons decided without subtraction |
| 7 | Blocks reused without collection |

The model division block (`model_division`) is written and tested on its
own. It holds a three-digit divisor estimate in a register with its odd
multiples, and picks `q = round(16P/D)` in -10..10 from a two-digit
partial remainder estimate. It is not yet connected, because division is
not sequenced.

## Top level

`cascade_top` has four ports besides clock and reset: `req_i`, `data_i`,
`ack_o` and `data_o`. It contains the control module (`control_module` =
control chip + management memory) and `2**N` arithmetic modules:

* The instruction word, `q` and the memory address are broadcast.
* `a`, `m`, `dbl` and `sp0` run upward through the modules and back into
  the control chip.
* `sp1` and the root position run downward.

Parameters and defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 0 | `2**N` arithmetic modules, 16 digits each |
| `HANDLE_BITS` | 20 | About 1M numbers |
| `DADDR_BITS` | 22 | 4M words of digit memory per module |

The block-level modules keep the per-chip figures as their defaults:
16 digits, 80-bit words and 22-bit management words.

## What is missing or differs

* **Not sequenced:** `div`, `rem`, `sqrt` and `gcd`.
  * They are answered with `FFFFD` after their operands.
  * The datapath already has what they need: `MSUB`, `SQRT`, the doubling
    loop, root position, normalization sensor and quotient digit selector.
  * The sequences and the two-stage division algorithm they rely on are
    not specified here.
* **Quotient digit selection rule.** The rule in `model_division` (round to
  nearest, three-digit divisor, two-digit remainder) is this design's own.
  It is not yet usable for full division. A two-digit remainder estimate
  spans at most +-170, so `round(16*P/D)` reaches the largest quotient
  digit, 10, only when the divisor estimate `|D|` is at most about 272.
  A divisor normalized to its top digit can be as large as 2730. A working
  divider needs either a wider remainder estimate or a divisor scaled into
  that range, and then a proof that the recursion stays bounded.
* **Leading-zero counts** go to the control chip on parallel 5-bit buses,
  one per chip. They are not shifted along a shift path.
* **Bus and word layouts are this design's own:** the message bus is split
  into in and out halves, and the instruction and message encodings,
  getreg numbering and result word layouts were chosen here.
* **Small-value optimizations.** Results of a single digit are counted
  (`getreg 5`) but not given special storage treatment.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and has a
watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cascade_pkg.sv tb/tb_util_pkg.sv tb/<name>.sv --top-module <name>
./obj_dir/V<name>
```

| Testbench | What it runs |
|---|---|
| `cascade_top_tb` | End to end at reduced sizes: 2 modules, 32 handles, 64 installed words. It exercises every message that is implemented. It counts each mechanism and fails if any never occurred: multi-word operands, futures, destroy flag, in-place negation, fast and subtracting compares, handle reuse without collection, collection forced by allocation, explicit gc, memory exhaustion, setreg/getreg, rejected messages, save and restore of a multi-word number. |
| `cascade_top_full_tb` | Full default size. After the 1M-cycle reset sweep it runs create, add, two multiplies, save, restore, cmp with d and assim. About 20 s. |
| `control_chip_tb`, `control_module_tb` | A shared message sequence on one arithmetic module (`cascade_basic_seq.svh`). |
| `memory_manager_tb` | Random allocate/update/destroy/collect traffic against a model. It checks block bounds and overlap, and finds again signatures written into every live number after each collection. |
| Datapath blocks | Random operands in random redundant encodings, checked against positional identities. For example, the slice checks `16*ta_out + sum - ta_in = x ± (mcand*q + t_in - 16*t_out)`. |

`cascade_host_tasks.svh` has the host-side message tasks (create, binop,
assim into a 1024-bit value, and so on). It is the quickest way to drive
the design from a new test.
