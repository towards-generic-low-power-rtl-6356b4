# Latch based standard cell memories for a low-power LDPC decoder

Small on-chip memories are usually SRAM macros from a memory compiler. For
memories of a few hundred to a few thousand bits, a macro's fixed overhead
can be large: sense amplifiers, precharge circuits, and its own power rings.
A macro also has to be regenerated for every technology and placed by hand.
This RTL builds such memories from ordinary standard cells only. It uses
latches for storage, a clock gate per word for writing, and AND-OR
multiplexers for reading. The result is plain synthesizable SystemVerilog.
Any number of words and bits per word can be set, and the placer can
spread the memory around the logic that uses it.

The design has two layers:

* `scm_latch` is a generic memory of R words × C bits, with one write port and
  one read port. Writes and reads both have a latency of one cycle.
* `ldpc_scm_memories` is the top level. It holds the three message memories
  (Q, T and R) of an IEEE 802.11n LDPC decoder, built from nine `scm_latch`
  banks. Some banks can be switched off when the decoder's operating mode does
  not need them.

The architecture follows the latch based SCM of P. Meinerzhagen, C. Roth and
A. Burg, *Towards Generic Low-Power Area-Efficient Standard Cell Based Memory
Architectures*. The sizes are the ones published there. What this RTL adds,
and where it departs, is listed at the end.

## Hierarchy

```
ldpc_scm_memories            top: Q-, T-, R-memory, operating mode -> bank power
├── ldpc_scm_bank_group      one memory: 3 banks side by side, bank 0 always on
│   └── scm_latch  (×3)      one bank: R words × C bits
│       ├── scm_wad          write address decoder -> one-hot row select
│       ├── scm_clock_gate   (×R) one clock gate per word
│       ├── scm_latch_array  R × C plain latches, one gated clock per row
│       ├── (always_ff)      read address register, ceil(log2 R) flip-flops
│       ├── scm_rad          read address decoder -> one-hot row select
│       └── scm_onehot_mux   C parallel R-to-1 AND-OR multiplexers
└── ldpc_mem_pkg             sizes, mode_e, bank_mask()
```

## How a write works: half a cycle to select, half a cycle to store

This is the part that needs the most care. The storage cells are latches
with no enable. Nothing but a clock pulse on its own row may open a latch.
The rising clock edge is the active edge. Each cycle is used in two halves:

```
            cycle n                       cycle n+1
clk      ___/‾‾‾‾‾‾‾‾‾‾‾‾\_____________/‾‾‾‾‾‾‾‾‾‾‾‾\____
we/waddr  X==== valid =====================X  next ...
wdata     X==== valid =====================X  next ...
en_l      (clock-gate latch open, follows   | held       )
gclk[w]  ________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_______________
row w     (closed)        transparent       | holds wdata
```

1. **High half (select).** `scm_wad` decodes `waddr` into a one-hot row
   select, which is all zero when `we` is low or the address is out of range.
   Each row's `scm_clock_gate` holds an enable latch that is open while `clk`
   is high, so it follows its select line. The address and enable must settle
   before the falling edge.
2. **Falling edge.** The enable latches close. From here on, changes to the
   address cannot reach the row clocks, so the gated clocks cannot glitch.
3. **Low half (store).** `gclk = en_l & ~clk`. The selected row's clock is
   high for the whole low half, and its latches are transparent to `wdata`.
   All other rows get a clock that stays low and keep their data. Only one row
   sees any clock activity. This is the main power advantage over flip-flops
   with an enable, which clock every bit every cycle.
4. **Next rising edge.** The pulse ends, the row closes, and it keeps the
   `wdata` present at that edge.

Seen from outside, this works like a register-file write with latency one.
Apply `we`, `waddr` and `wdata` in cycle n, and the word holds the new value
from the edge that ends cycle n. `wdata` must be held until that edge. The
price of latches is that the decoder and clock gates get only half a period.
A flip-flop version would give them a full period, which matters where the
address comes from a long path that cannot be pipelined.

In a real implementation, `scm_clock_gate` should be mapped to the library's
integrated clock-gating cell, and the row clocks handled as generated clocks
in timing analysis. The RTL states the function: a latch open while the clock
is high, then an AND with the inverted clock.

## How a read works, and the one rule a user must keep

The read address goes through `ceil(log2 R)` flip-flops on the rising edge.
`scm_rad` turns it into a one-hot select, and `scm_onehot_mux` ANDs each
word with its select line and ORs the results per bit. With a one-hot select,
switching activity on words that are not being read stops at the first gate
level. Read data is therefore valid one multiplexer delay after the edge that
registered the address, which is a read latency of one.

The registers sit on the address rather than on the data because these
memories have fewer words than bits. That costs `ceil(log2 R)` flip-flops
instead of C, at the price of a longer output delay. The paths through the
output multiplexers, and their select nets with a fan-out of C, are the
critical paths of this memory.

**Read/write rule.** `rdata` comes from the latches without registering.
If a word is written in the cycle in which it is also being read, its latches
are transparent from `wdata` to `rdata` during the low half. Logic outside
could then close a combinational loop. The memory therefore forbids this:
in any cycle, `we && waddr` must not equal the read address registered at the
start of that cycle. A concurrent assertion, `a_no_write_to_read_word` in
`scm_latch`, checks it in simulation. Reading a word written in the previous
cycle is fine and returns the new data. If the rule cannot be kept, the usual
fixes are a latch stage at `wdata` or `rdata` that is closed during the low
half, or a register in every path from `rdata` back to `wdata`. This RTL
includes neither.

Other behaviour:
* Addresses R and above select no row. Writes to them are dropped and reads
  return zero.
* There is no reset. The content and the read address register start
  undefined. The write path needs none, because `en_l` is rewritten every
  high half.

## The decoder memories and the operating modes

The decoder keeps three separate memories, with combinational processing
blocks between them (not part of this RTL):

| memory | banks | words per bank | bits per bank | bits |
|--------|-------|----------------|---------------|------|
| Q      | 3     | 24             | 135           | 9,720 |
| T      | 3     | 24             | 135           | 9,720 |
| R      | 3     | 88             | 135           | 35,640 |
| total  | 9     |                |               | 55,080 |

In `ldpc_scm_bank_group` the three banks of a memory sit side by side. They
share the write and read addresses, and together they form one 405-bit word.
Bank b holds bits `[135·b +: 135]`. Bank 0 is always on. Banks 1 and 2 are
switched by the operating mode (`ldpc_mem_pkg::mode_e`):

| mode       | banks on | `bank_pwr_en` |
|------------|----------|---------------|
| `MODE_Z27` | 0        | `3'b001`      |
| `MODE_Z54` | 0, 1     | `3'b011`      |
| `MODE_Z81` | 0, 1, 2  | `3'b111`      |

The mode names come from the IEEE 802.11n lifting factors Z = 27, 54 and 81.
A 135-bit bank holds 27 messages of 5 bits, so the three sizes need one, two
or three banks. A bank that is off takes no writes, so its row clocks never
pulse. Its part of `rdata` is forced to zero, and that isolation value is
registered with the read address so that it lines up with the read latency.
`bank_pwr_en` is brought out of the top for the supply switches, which are
cells of the process and not logic. In simulation a switched-off bank keeps its
content. On silicon it would not, so software must rewrite a bank after
switching it back on.

The port groups `q_*`, `t_*` and `r_*` of the top each follow the `scm_latch`
timing and the read/write rule above. Q and T use 5-bit addresses, and R uses
7-bit addresses.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|---------|---------|
| `scm_latch`, `scm_latch_array`, `scm_onehot_mux` | `R` | 88 | words |
| same | `C` | 135 | bits per word |
| `scm_latch`, `scm_wad`, `scm_rad` | `AW` | `$clog2(R)` | address width |
| `ldpc_scm_bank_group` | `NUM_BANKS`, `R`, `C` | 3, 88, 135 | banks, words, bits per bank |
| `ldpc_scm_memories` | `C`, `R_ROWS`, `QT_ROWS` | 135, 88, 24 | bank width, R-memory and Q/T-memory words |

All defaults are the sizes of the decoder memories. `R` and `C` can be any
positive values. The published comparison ran from 8 to 512 words and from 2
to 128 bits, and the testbenches cover those corners. In that comparison,
latch based memories came out smaller than SRAM macros up to about 1 kbit,
and flip-flop based ones up to about 512 bits. The decoder's banks (3.2 and
11.9 kbit) are larger than that. They are used for their lower power, not
their area. At the default size, the top holds 55,080 storage latches and
408 clock-gate latches. It also has 26 flip-flops: 17 read-address bits and
9 registered bank-power bits. Synthesis merges the duplicated bank-power
bits.

## Simulation

The testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and ends. They need Verilator 5 with timing
support. Example for the whole design at full size:

```
verilator --binary --timing --assert -Irtl -y rtl -Mdir obj_top \
    --top-module tb_ldpc_scm_memories rtl/ldpc_mem_pkg.sv tb/tb_ldpc_scm_memories.sv
./obj_top/Vtb_ldpc_scm_memories
```

The package must come first on the command line. Any other testbench runs
the same way: replace the top module and the file. `tb_scm_evaluated_sizes`
also needs `-y tb`, to find its helper `tb/scm_size_check.sv`.

| testbench | what it shows |
|-----------|---------------|
| `tb_ldpc_scm_memories` | Full default size. All three memories are active each cycle, through modes Z81, Z27, Z54, Z81, Z27. It fills every word, runs random traffic, then reads every word back. It checks every read against a model and checks `bank_pwr_en`. It checks that at most one row clock per bank pulses, exactly one on a write, and none in an off bank. It counts mode switches, writes dropped by off banks, isolated reads, banks switched on again, and out-of-range reads, and fails if any of these never happened. |
| `tb_ldpc_scm_bank_group` | One 3 × 88 × 135 memory with random power patterns, including bit 0, which must be ignored. |
| `tb_scm_latch` | 88 × 135 memory with random traffic. It checks read latency one, that `rdata` does not move before the next edge, dropped out-of-range writes, and zero out-of-range reads. |
| `tb_scm_evaluated_sizes` | Memories of 16×8, 16×128, 32×8, 32×128, 64×8, 64×128, 128×8, 128×128, 8×2, 8×128, 512×2 and 512×128. Each gets 1000 cycles of random writes and reads, all checked. |
| `tb_scm_clock_gate` | The pulse appears only in the low half. Enable changes during the low half do not reach `gclk`. |
| `tb_scm_latch_array` | Transparency while the row clock is high, hold when it is low, other rows untouched. |
| `tb_scm_wad`, `tb_scm_rad` | All addresses, with and without write enable. |
| `tb_scm_onehot_mux` | Every one-hot select and the all-zero select. |

Notes for writing a testbench for this memory:
* Change inputs shortly after the rising edge, for example `@(posedge clk); #1;`.
  The write address must settle in the high half, and `wdata` must stay valid
  until the next rising edge.
* Do not change inputs after a `#0` in the same time step as a rising edge.
  Verilator may then miss re-evaluating the clock-gate latch.
* Verilator is two-state and starts undefined state at random values. Idle
  one cycle with `we` low and an unused read address before the first write.
  Otherwise the random start value of the read register can trip the
  read/write assertion.

## What this RTL adds or leaves out

Built as published: the write logic (a one-hot decoder, a clock gate per
word, plain latches with no enable), flip-flops on the read address, a
one-hot read decoder, AND-OR output multiplexers, and the rule against
reading and writing the same word at once. The decoder's memory organisation
is also as published: Q, T and R memories with 3 banks each, of 24, 24 and
88 words of 135 bits, bank 0 of R always on, and banks 1 and 2 switchable.

Choices of this design:
* A write-enable input. The published schematic shows only a write address.
* Out-of-range addresses: writes are dropped and reads return zero.
* No reset.
* The clock-gate cell: the enable latch is open while the clock is high, and
  the output is that enable ANDed with the inverted clock.
* The three banks of a memory form one 405-bit word with a common address.
* The mode encoding (Z27/Z54/Z81) and its mapping to banks.
* Q and T banks 1 and 2 are switchable like those of R.
* One mode controls all memories.
* Power-off is modelled as write gating plus isolation to zero.

Not included:
* The decoder's message-processing logic. Its ports are the top's memory
  ports.
* The supply switches. Their control is `bank_pwr_en`.
* The comparison baselines: SRAM macros, flip-flop based memories, enable
  flip-flop write logic, and tri-state read logic.
