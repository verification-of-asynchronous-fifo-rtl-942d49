# Asynchronous FIFO with Gray-coded pointers

A FIFO that passes 8-bit words from one clock domain to another when the two
clocks have no fixed relationship. The writer works on `wclk` and the reader on
`rclk`. Neither side ever samples a multi-bit value that is changing in the
other domain, except for Gray-coded pointers, which change one bit at a time.
Each side keeps its own pointer and sees a delayed but consistent copy of the
other side's pointer. From the two it derives its own flag, `wfull` or
`rempty`. Because the copy is delayed, a flag can stay set for a few extra
cycles. It can never clear too early, so the FIFO cannot overflow or underflow.

Default size: 16 words of 8 bits (`ASIZE = 4`, `DSIZE = 8`). Both are
parameters of the top module `fifo1`.

## Block structure

```
            write clock domain (wclk)            |        read clock domain (rclk)
                                                 |
  winc ──► wptr_full ──waddr──► fifomem ──raddr──┼── rptr_empty ◄── rinc
  wfull ◄─┘   │  ▲              (16 x 8)         |      ▲  │  └──► rempty
  wdata ─────────────────────► write port        |      │  │   read port ──► rdata
              │  └── wq2_rptr ◄── sync_r2w ◄─────┼──────┼──┘ rptr
              └── wptr ──────────────────────────┼─► sync_w2r ──► rq2_wptr
```

| Module          | Domain | Role |
|-----------------|--------|------|
| `fifo1`         | both   | top level; wires the five blocks below |
| `fifomem`       | write port on `wclk`, read port combinational | 2^ASIZE x DSIZE register array |
| `wptr_full`     | `wclk` | write pointer (`waddr`, Gray `wptr`) and registered `wfull` |
| `rptr_empty`    | `rclk` | read pointer (`raddr`, Gray `rptr`) and registered `rempty` |
| `sync_w2r`      | `rclk` | two flip-flops: `wptr` → `rq2_wptr` |
| `sync_r2w`      | `wclk` | two flip-flops: `rptr` → `wq2_rptr` |
| `gray_counter`  | either | dual binary/Gray register counter, used by both pointer blocks |
| `fifo_pkg`      | –      | default sizes |

## Pointers: one extra bit, and Gray code

Each pointer is `ASIZE+1` bits wide. The low `ASIZE` bits are the memory
address. The extra top bit flips every time the pointer wraps past the last
word. The write pointer points at the next word to be written and the read
pointer at the next word to be read. Both reset to zero.

- **Empty**: the two pointers are equal, including the top bit. The reader has
  caught up with the writer.
- **Full**: the addresses are equal but the top bits differ. The writer is
  exactly one lap ahead.

The copy that crosses to the other domain is the Gray code of the pointer. An
increment then changes exactly one bit. A synchronizer flop that samples the
pointer mid-change can only resolve to the old value or the new one, never to
an unrelated value.

In Gray code, "one lap apart" does not mean "only the top bit differs". Take a
pointer `p` and the pointer `p + 2^ASIZE`: their Gray codes differ in the top
**two** bits and agree in all the rest. So `wptr_full` takes the synchronized
read pointer, inverts its two MSBs, and compares the result with its own next
Gray pointer. `rptr_empty` compares the Gray pointers directly.

### The dual-register Gray counter

`gray_counter` does not keep a single Gray register, which would need a
Gray-to-binary conversion before each increment. It keeps two registers: one
holds the count in binary, the other in Gray code. The binary value goes
through an ordinary adder. That next binary value is loaded back into the
binary register, and also passes through one XOR per bit
(`g = b ^ (b >> 1)`) into the Gray register. The design spends twice the
flip-flops to get a short, fast increment path. The binary register, without
its top bit, is the memory address. The Gray register is the pointer sent
across. The counter also outputs the *next* binary and Gray values, because
the flags are computed from the next pointer (see below).

## Flags and their timing

Both flags are registered, so every output of the FIFO comes straight from a
flip-flop or, for `rdata`, from the memory.

- `rempty` is loaded at every `rclk` edge with
  `rgraynext == rq2_wptr`. It compares the pointer value after this edge with
  the synchronized write pointer. A read accepted at an edge therefore makes
  `rempty` rise at that same edge if it took the last word. No extra cycle is
  needed.
- `wfull` is loaded at every `wclk` edge with
  `wgraynext == {~wq2_rptr[ASIZE:ASIZE-1], wq2_rptr[ASIZE-2:0]}`.

Latency across the domains, with the clocks not edge-aligned:

| Event | Visible to the other side |
|-------|---------------------------|
| write into an empty FIFO at a `wclk` edge | `rempty` falls at the **3rd** `rclk` edge after it (2 synchronizer flops + flag register). In silicon, one more edge if the first flop misses setup. |
| read from a full FIFO at an `rclk` edge | `wfull` falls at the 3rd `wclk` edge after it, likewise |

Up to that point the flag is stale, which is the safe direction: the writer
briefly sees "full" when one word is free, and the reader sees "empty" when one
word has arrived. Each side can still move one word per clock of its own when
the flags allow it.

`winc` while `wfull` is high, and `rinc` while `rempty` is high, are ignored.
The pointer does not move and the memory is not written. Assertions in
`wptr_full` and `rptr_empty` check that the pointer holds still while its flag
is set. An assertion in `gray_counter` checks that the Gray value never changes
in more than one bit.

## Interface

| Port     | Dir | Width | Domain | Meaning |
|----------|-----|-------|--------|---------|
| `wclk`   | in  | 1     | –      | write clock |
| `wrst_n` | in  | 1     | async  | active-low reset, write side |
| `winc`   | in  | 1     | wclk   | write request; the word is taken at the rising edge if `wfull` is low |
| `wdata`  | in  | DSIZE | wclk   | word to write |
| `wfull`  | out | 1     | wclk   | FIFO full |
| `rclk`   | in  | 1     | –      | read clock |
| `rrst_n` | in  | 1     | async  | active-low reset, read side |
| `rinc`   | in  | 1     | rclk   | read request; removes the word on `rdata` at the rising edge if `rempty` is low |
| `rdata`  | out | DSIZE | rclk   | oldest unread word, valid whenever `rempty` is low |
| `rempty` | out | 1     | rclk   | FIFO empty |

The read side works in *first-word fall-through* style. The memory read port is
combinational and the read pointer already addresses the oldest word, so that
word is on `rdata` as soon as `rempty` falls. The reader takes `rdata` in the
same cycle it raises `rinc`.

Each domain has its own reset, each asynchronous and active low. Assert both
together. A reset of only one side would leave the pointers inconsistent.

## Where this design makes its own choices

The architecture follows a well-known published scheme: the module split, the
dual-register Gray pointers, two-flop synchronizers, flags computed from the
next pointer, and the two-MSB full comparison. The following choices are this
design's own:

- **Depth 16, width 8.** The 8-bit width comes from the described design. The
  depth of 16 matches the 4-bit memory addresses in its reference transaction
  log. That log also lists 4-bit pointer values counting in binary
  (`0001, 0010, 0011`). Here the pointers
  are 5 bits (4 address bits plus the wrap bit) and Gray-coded, so the same
  three writes give `wptr = 00001, 00011, 00010`, with `waddr = 0, 1, 2` as in
  the trace.
- **Two resets, active low, asynchronous**, rather than one `reset` input.
- **Reads of an empty FIFO are ignored** in the pointer logic, just as writes
  to a full FIFO are.
- **The memory is a register array.** It is not reset. A vendor dual-port RAM
  with the same ports (synchronous write, asynchronous read) can replace it.
  With a RAM whose read is synchronous, `rdata` would arrive one `rclk` later
  and the read interface would change.
- **`gray_counter` is a separate module.** The published scheme builds the
  counter inline in each pointer block.

There are no almost-full or almost-empty flags, and no fill-level outputs.

## Verification

Every block has a self-checking testbench in `tb/`. Each compares against a
model written independently of the RTL, and each ends by printing
`TB_RESULT checks=N failures=M`.

| Testbench         | What it checks |
|-------------------|----------------|
| `tb_gray_counter` | binary, Gray and next values against a bit-by-bit Gray model; one-bit steps; one-cycle latency |
| `tb_fifomem`      | every address read back after random writes; writes with `wfull` high are dropped |
| `tb_sync_w2r`, `tb_sync_r2w` | output equals the input as it was two destination edges earlier; reset value |
| `tb_rptr_empty`   | `raddr`, `rptr`, `rempty` after each edge, against binary read/write counts; reads refused while empty; pointer wrap |
| `tb_wptr_full`    | `waddr`, `wptr`, `wfull`, with full judged as "16 ahead" in binary rather than by the MSB trick; writes refused while full; pointer wrap |
| `tb_fifo1`        | the whole FIFO at its default size, see below |

`tb_fifo1` runs the FIFO with `wclk` period 8 and `rclk` period 12, phase
shifted so their edges never coincide. The writer's clock is faster, which is
the usual reason for putting a FIFO between two domains. Later in the run,
`rclk` switches to period 4, so the reader's clock becomes the faster one. Traffic comes from a layered,
class-based environment (`fifo_tb_pkg`):

- a **transaction** carries one write-side cycle: a request bit and a random word;
- the **generator** puts transactions in a mailbox;
- the **driver** applies them to the write interface (`fifo_wr_if`) and
  re-offers a refused word until it is taken;
- the **monitor**, acting as the receiver, raises `rinc` at a chosen rate on the
  read interface (`fifo_rd_if`);
- the **scoreboard** compares the stream of accepted words (mailbox `drv2sb`)
  with the stream read (mailbox `mon2sb`), in order;
- the **environment** builds these parts and runs reset, start, wait-for-end
  and report.

The test has five phases, each 400 write-side cycles long, about 1400 words in
all:

1. a fast writer with a slow reader: the FIFO fills and writes are refused;
2. a slow writer with a fast reader: the FIFO runs dry and reads are refused;
3. balanced traffic;
4. with the faster read clock, a fast writer and a slow reader;
5. with the faster read clock, balanced traffic.

The module also watches the ports and checks five things:

- `wfull` is high whenever 16 words are unread;
- `rempty` is high whenever none is unread;
- every write into an empty FIFO clears `rempty` exactly 3 `rclk` edges later;
- every read from a full FIFO clears `wfull` exactly 3 `wclk` edges later;
- the first three writes and reads use addresses 0, 1, 2 and the Gray pointers
  `00001`, `00011`, `00010`.

The test also fails if any of these events never happens: full, refused write,
empty, refused read, pointer wrap, or either timed latency. The first three
transactions on each side are printed as a log of data, address and pointers.

What simulation cannot show: metastability. The two-state simulator resolves
every flop cleanly, so the extra edge of latency a real synchronizer may add
never appears in these runs. The safety argument for that case rests on the
Gray coding and on the flags being pessimistic, not on the tests.

### Running

With plain Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  -y rtl -y tb rtl/fifo_pkg.sv tb/fifo_tb_pkg.sv tb/tb_fifo1.sv \
  --top-module tb_fifo1
./obj_dir/Vtb_fifo1
```

For a block testbench, replace the last two source files with
`tb/tb_<block>.sv` and set `--top-module` to match. The packages must be listed
explicitly, ahead of the files that use them. Modules and interfaces are found
through `-y`.

To change the size, override `DSIZE` and `ASIZE` on `fifo1`. `ASIZE` must be
at least 2, because the full comparison inverts two pointer bits. `tb_fifo1`
reads its sizes from `fifo_pkg`, so change them there to run it at another
size.
