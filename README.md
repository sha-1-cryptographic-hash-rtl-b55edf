# Word-serial SHA-1 hash unit

This is a small SHA-1 engine built for a pad-limited chip (a 40-pin, 1.5 mm ×
1.5 mm die). It spends time to save area. A fully unrolled SHA-1 round needs
four 32-bit adders and five state registers. This unit has one 32-bit ALU and
one temporary register. Every step of the algorithm is broken into single-word
operations of the form

    T            <=  T  op  rot(operand)          (accumulate)
    state word   <=  T  op  rot(bank word)        (write back)

A microcoded controller sequences these steps at one per clock. The state
words, the constants and the 16-word message live in two small RAMs and a
mask ROM. Hashing one 512-bit block takes 1555 clock cycles.

All data moves over one shared 32-bit bus. Message words go in on it and the
160-bit digest comes out on it, five words at a time.

## Pins and protocol

| Port       | Dir | Width | Function |
|------------|-----|-------|----------|
| `clk`      | in  | 1     | clock, rising edge |
| `rst`      | in  | 1     | synchronous reset; hold for at least one cycle |
| `block`    | in  | 1     | request: load a 16-word block on the next 16 cycles |
| `hash_req` | in  | 1     | request: output the 5-word digest on the next 5 cycles |
| `ready`    | out | 1     | the unit is idle or taking input; the bus is an input while high |
| `io_in`    | in  | 32    | bus, value from the pins |
| `io_out`   | out | 32    | bus, value driven onto the pins |
| `io_oe`    | out | 1     | bus driver enable, always `!ready` |
| `state`    | out | 6     | controller state, for debug |

`io_in`, `io_out` and `io_oe` are the three halves of a bidirectional pad. A
pad ring, or a testbench, joins them into one `inout` bus.

The timing, counted in rising clock edges:

1. **Reset.** While `rst` is high the controller is held in state 0. After
   `rst` is released, five cycles copy the SHA-1 initial values into
   H0..H4. Then `ready` goes high.
2. **Idle (state 5).** `ready` is high. `hash_req` and `block` are sampled on
   each edge. If both are high, `hash_req` wins.
3. **Block load.** On the 16 edges after `block` was sampled, the unit takes
   message words 0..15 from `io_in`. These are the big-endian words of the
   padded block. `ready` stays high during these 16 cycles. It then drops for
   exactly 1539 cycles while the block is hashed, and rises when the unit is
   idle again. The new H0..H4 is then the running hash.
4. **Digest output.** In the five cycles after `hash_req` was sampled,
   `ready` is low, `io_oe` is high, and `io_out` carries H0, H1, H2, H3, H4 in
   that order. Reading the digest does not change it, so more blocks can
   follow to extend the same message.

In every cycle where `ready` is low, `io_out` shows the current ALU result.
Outside the five digest cycles this is an intermediate value. A host must
ignore it.

The host does the SHA-1 padding: the `1` bit, the zeros and the 64-bit length.
The unit only compresses blocks. To hash a new message, reset the unit; that
reloads the initial values.

If `block` is still high when the unit comes back to idle, it starts loading a
second block right away. Lower `block` after it has been sampled if only one
block is meant.

## How a round is executed

This is the part worth understanding before you change anything.

### Storage

| Store | Words | Contents |
|-------|-------|----------|
| temporary register T | 1 | ALU accumulator; it is always operand A of the ALU |
| message memory | 16 | the block, then the message schedule as a circular buffer |
| state RAM | 11 | H0..H4, A..E, and a scratch word T2 |
| mask ROM | 9 + zero | initial values H0..H4, constants K1..K4, and the zero word |

The state RAM and the ROM share one read port with a 5-bit address. Bit 4
selects the ROM. The address map is the `reg_raddr_e` enum in `sha1_pkg`. The
RAM has its own 4-bit write address, `reg_waddr_e`. All reads are
combinational and all writes happen on the clock edge. So one cycle can read a
word and write the updated value back to the same word, as in `H0 <= T + H0`.

### The message schedule in 16 words

SHA-1 expands the 16 message words to 80. Each new word depends only on the
previous 16:

    W[t] = (W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16]) <<< 1

The unit keeps W[t] at address `t mod 16`. Counter C holds `t mod 16`. The
four operands of the next word are at C + {0, 2, 8, 13}, modulo 16. The result
overwrites address C, and then C advances. The 4-bit counter wraps by itself,
so it needs no modulo logic.

### The micro-program

Each of the 80 rounds is 1 dispatch cycle, then the round function f (4 to 7
cycles), then 8 update cycles, then 5 schedule cycles:

| States | Cycles | Operation |
|--------|--------|-----------|
| 12 | 1 | dispatch on counter B, the round class |
| 13-17 | 5 | class 0, Ch: `T=D; T^=C; T&=B; T^=D; T+=K1` |
| 18-21 | 4 | class 1, parity: `T=B; T^=C; T^=D; T+=K2` |
| 22-28 | 7 | class 2, Maj: `T=C; T2=T&D; T=C; T^=D; T&=B; T^=T2; T+=K3` |
| 29-32 | 4 | class 3, parity: `T=B; T^=C; T^=D; T+=K4` |
| 33-35 | 3 | `T+=E; T+=A<<<5; T+=W[C]` |
| 36-40 | 5 | `E=D; D=C; C=B<<<30; B=A; A=T+0` |
| 41-45 | 5 | `T=W[C]; T^=W[C+2]; T^=W[C+8]; T^=W[C+13]; W[C]=T=(T<<<1)+0`; counters A and C advance |

Counter A counts the 20 rounds of a class. After the 20th round, state 46
advances counter B and clears A. After the fourth class, states 47-56 add
A..E into H0..H4, two cycles per word.

Two details are easy to miss. The Maj function is computed as
`((C ^ D) & B) ^ (C & D)`, which is why the scratch word T2 exists. Also, the
five state moves happen in the order E, D, C, B, A, so each word is read
before it is overwritten.

The schedule step also runs in the last rounds of a block. The extra words it
produces are never used. This keeps the controller simple, and by the end of
the block counter C has wrapped back to 0.

Cycle budget per block:

    16 (load) + 5 (A..E <= H) + 20 × (19 + 18 + 21 + 18) + 4 + 10 = 1555

This is 16 cycles with `ready` high and 1539 with it low.

### ALU

Before the function is applied, the ALU rotates one operand. The memory
operand B can be rotated left by 5 (the `A<<<5` term) or by 30 (the `B<<<30`
move). Operand A, the temporary register, can be rotated left by 1 (the
schedule rotation). The function is then pass-B, XOR, ADD or AND.

The circuit mirrors an inverting cell library. It computes NAND, XNOR,
inverted-sum and inverted-pass terms, then selects one through two levels of
inverting multiplexers. The two inversions cancel, so the outputs are the
plain functions.

The encodings are in `sha1_pkg`: `alu_shift_e`, `alu_op_e` and `srcb_e`.

## Module map

    sha1_core                 top: the chip core
    ├── sha1_controller       62-state sequencer, message-address adder
    ├── sha1_counter_bank     counters A (5 bit), B (2 bit), C (4 bit)
    │   └── sha1_counter      (×3)
    └── sha1_datapath
        ├── sha1_temp_reg     temporary register T
        ├── sha1_alu          rotate + pass/xor/add/and
        ├── sha1_sram16       16-word message memory
        ├── sha1_memconst_bank  11-word state RAM + constant ROM
        └── sha1_ioselect     bus direction and write-data select
    sha1_pkg                  control-field enums, dp_ctrl_t struct, ROM contents

The controller sends one packed struct, `dp_ctrl_t`, to the datapath each
cycle. All control outputs are decoded from the current state alone, so the
controller is a Moore machine. Two of its signals come from inputs: the
message address adds counter C, and the next state depends on the requests and
the counters.

## Where this RTL departs from the original design

- **Clocking.** The original used two-phase non-overlapping clocks. Its
  flip-flops were built from a ph2 master latch and a ph1 slave latch, and its
  SRAMs wrote during a clock phase. Here everything runs on one rising-edge
  clock. The state RAM's staging flip-flop existed to allow a read and a write
  of the same word in one cycle. The edge-triggered write port already allows
  that, so the flip-flop is not built. Cycle-level behaviour is unchanged.
- **Pins.** The tristate bus is split into `io_in`/`io_out`/`io_oe`. The pad
  ring and the clock source are not part of this RTL. The `state` debug output
  is not a pin of the original chip.
- **Memories** are written as synthesizable arrays. The original used custom
  SRAM cells, and a mask ROM interleaved with the state SRAM so the two share
  decoders. Reads of unused addresses return zero.
- **Counter widths** are 5, 2 and 4 bits, from the counter cell's pins and the
  logic that uses the counters. One summary of the design calls them three
  five-bit counters. That difference does not change the function.
- **ALU rotation sides.** One description puts the 5/30-bit rotation on the
  temporary-register side and the 1-bit rotation on the memory side. The
  algorithm needs the opposite, and so does the original's behavioural model,
  so the RTL follows the algorithm.
- **Reset** clears only the controller state, as in the original. Counters and
  memories are set up by the state sequence before they are read.
- Layout, floorplan and the reduced-height datapath cells are physical design
  and are outside this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`.

- `tb_sha1_core` drives the pins as a host would. It compares every digest
  with a SHA-1 reference model written independently in the testbench. The
  cases are:
  - the initial value;
  - the single-block vector `8A921FC4 452C45D2 …`, which hashes to
    `FC258E41 DFE90802 64C65A1F DCB36023 9FAEA24E`;
  - the padded messages "abc" and "" (the FIPS 180 results);
  - random three-block messages;
  - `block` and `hash_req` raised together;
  - a reset in the middle of a block.

  It also checks the 5/16/1539/5-cycle timing. It counts how often each
  mechanism ran: the four round classes, the T2 write, schedule write-backs,
  class changes, digest output, request priority, block chaining and
  mid-block reset. A mechanism that never ran fails the test. It runs the
  unit at its only configuration.
- `tb_sha1_controller` runs the controller alone against a behavioural counter
  bank and datapath. It checks the resulting digests against the reference
  model, along with the timing and the number of message writes.
- `tb_sha1_datapath` applies 5000 random control words. It checks the bus
  output against a model of all storage.
- `tb_sha1_pin_test` is the production test: one block from reset, digest
  compared with a known value. The message is chosen so that all 32 bus bits
  are seen both high and low, on the way in and on the way out. Word 0 is all
  ones, word 1 all zeros, and the rest are random until the reference digest
  toggles every bit. A stuck data pin therefore cannot go unnoticed.
- The leaf testbenches check their modules against independent models. The
  ALU is tested over all controls and random data, the memories with random
  traffic and same-word read/write, the ROM against the FIPS constants, and
  the counters and the bus select with random stimulus.

Each testbench has been shown to fail on a deliberately broken copy of its
module.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps \
        -y rtl -y tb rtl/sha1_pkg.sv tb/tb_sha1_core.sv --top-module tb_sha1_core
    ./obj_dir/Vtb_sha1_core

To run another testbench, replace `tb_sha1_core` with its name. The package
must come first on the command line. A full run of `tb_sha1_core` simulates
about 16,000 cycles and finishes in well under a second.

The RTL is plain synthesizable SystemVerilog: `always_ff`/`always_comb`, a
package, enums and one packed struct. There are no latches and no tristates.
The controller has two concurrent assertions: the state stays within 0..61,
and the message memory is written only in the load and schedule states.
