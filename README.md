# AEGIS128 on a small area budget

AEGIS128 is an authenticated-encryption algorithm: one pass over the data
both encrypts the message and produces a 128-bit tag that authenticates the
message and any associated (unencrypted) data. Its core is a 640-bit state,
five 128-bit words S0..S4, updated by `StateUpdate128`. That function applies
five AES rounds in parallel:

```
S0' = AESRound(S4, S0 ^ m)      S1' = AESRound(S0, S1)     S2' = AESRound(S1, S2)
S3' = AESRound(S2, S3)          S4' = AESRound(S3, S4)
AESRound(x, k) = MixColumns(ShiftRows(SubBytes(x))) ^ k
```

A fast implementation builds five AES rounds (80 S-boxes). This core goes
the other way. It has one 128-bit accumulator ALU with **a single S-box**,
and a micro-sequencer steps the ALU through every AES round byte by byte.
The state, two shared I/O registers and the ALU make up most of the logic.
A host drives the core one byte at a time over an 8-bit AMBA APB slave.
An FPGA variant puts a UART in front of the same core.

The design reproduces the published AEGIS128 test vectors. For key = IV = 0,
no associated data and one zero block, it gives ciphertext
`951b050f a72b1a2f c16d2e1f 01b07d7e` and tag `a7d2a997 73249542 f422217e e888d5f1`.

## Block structure

```
            +-------------------------- aegis128_top ---------------------------+
 APB  <---> | aegis_apb_slave --ctrl--> aegis_control_unit --uop--> aegis_datapath |
 (8 bit)    |        ^  byte writes / reads of DATA, TAG         |  S0..S4, DATA,|
            |        +-------------------------------------------+  TAG, TEMP    |
            |                                                       aegis_alu    |
            |                                         aes_sbox, aes_mix_column   |
            +--------------------------------------------------------------------+
```

| file | role |
|---|---|
| `rtl/aegis_pkg.sv` | shared types: host states, ALU ops, operand/destination selects, micro-instruction, bus write record, constants |
| `rtl/aes_sbox.sv` | AES S-box as logic (GF(2^8) inversion as x^254, affine map), registered output |
| `rtl/aes_mix_column.sv` | MixColumns of one column from xtime units and XORs |
| `rtl/aegis_alu.sv` | 128-bit accumulator: LOAD, XOR, AND, ShiftRows, MixColumns (per column), SubBytes (per byte) |
| `rtl/aegis_datapath.sv` | STATE, DATA, TAG, TEMP registers, operand and write-back multiplexers, last-block mask |
| `rtl/aegis_control_unit.sv` | host-level state machine and micro-sequencer |
| `rtl/aegis_apb_slave.sv` | register map and access rules |
| `rtl/aegis128_top.sv` | the core (APB port) |
| `rtl/uart_rx.sv`, `rtl/uart_tx.sv`, `rtl/uart_apb_bridge.sv` | FPGA variant: serial link to APB |
| `rtl/aegis128_fpga_top.sv` | FPGA variant top: UART, bridge and the core; the outermost module |

## The accumulator ALU

Each operation reads and rewrites the accumulator:

| op | effect | clocks |
|---|---|---|
| LOAD | acc = operand | 1 |
| XOR / AND | acc = acc ^ / & operand | 1 |
| SR | AES ShiftRows (fixed wiring) | 1 |
| MC | MixColumns of the column chosen by `idx` | 1 per column, 4 in all |
| SB | step `idx` (0..16) of byte-serial SubBytes | 17 in all |

SubBytes uses one S-box with a register on its output. In step *k*, byte *k*
enters the S-box while the result for byte *k−1* is written back. All 16
bytes therefore take 17 steps, and the last write-back happens in step 16.
MixColumns is a single 32-bit unit that is steered to one column per clock.
No inverse AES functions exist, because AEGIS decryption does not need them.

The operand multiplexer selects from: S0..S4, DATA, TAG, TEMP, the two AEGIS
constants and the last-block mask. The accumulator can be written into any of
S0..S4, DATA, TAG or TEMP. A write-back stores the accumulator value of that
same clock. A micro-instruction can therefore store the previous result
while it loads the next operand.

## Doing StateUpdate128 in place

This is the least obvious part of the core. Every new word S_j' needs the old
S_{j−1} (as round input) and the old S_j (as round key), so the five words
depend on each other in a cycle. Overwriting any word first would destroy a
value that is still needed. The sequencer breaks the cycle with one extra
128-bit register, TEMP:

```
round 0: acc = AESRound(S4) ^ S0 ^ m   -> TEMP     (S0 and S4 still old)
round 1: acc = AESRound(S3) ^ S4       -> S4
round 2: acc = AESRound(S2) ^ S3       -> S3
round 3: acc = AESRound(S1) ^ S2       -> S2
round 4: acc = AESRound(S0) ^ S1       -> S1
move:    S0 = TEMP
```

Each round takes 25 clocks: LOAD, 17 SubBytes steps, ShiftRows, 4 MixColumns
steps, the XOR with the round key, and a store. Round 0 takes one more clock
to XOR in the message word *m*. A whole update is 128 clocks.

The jobs built on top of the update:

| job | micro-program | clocks in BUSY |
|---|---|---|
| initialisation | S = (K^IV, C1, C0, K^C0, K^C1) in 9 clocks; 10 updates with m = K, IV, K, … | 1289 |
| AD block | one update, m = DATA | 128 |
| encrypt block | mask P in DATA (3); round 0 with m = P; C = P ^ S1 ^ S4 ^ (S2 & S3) into DATA (6); rounds 1-4 and move | 137 |
| decrypt block | P = (C ^ S1 ^ S4 ^ (S2 & S3)) & mask into DATA (7); one update with m = P | 135 |
| finalisation | tmp = S3 ^ (adlen ‖ msglen) into DATA (3); 7 updates with m = tmp; T = S0^S1^S2^S3^S4 into TAG (6) | 905 |

During encryption the ciphertext is computed after round 0. At that point
round 0 has used P, and S1..S4 still hold the old state that the keystream
needs. The ciphertext can then replace P in DATA. During decryption the
plaintext must exist before the update, so it is computed first. Past
`msglen`, its bits are forced to zero, as AEGIS requires.

## Register sharing

Besides STATE and TEMP, the core has only two 128-bit registers. Each is used
for different values over the course of one operation:

* **DATA**: holds the key during initialisation, then an AD block, a
  plaintext or ciphertext block, the result block, and finally `tmp`.
* **TAG**: holds the IV during initialisation, then the two 64-bit lengths,
  and finally the tag.

## Host interface

### Register map

| address | register | access |
|---|---|---|
| 0x00 | CONTROL | see below |
| 0x10-0x1F | DATA | write: key (IDLE), AD block (LOAD_AD), message block (LOAD_DATA). Read: result block (READ_CIPHER), 0x00 in every other state |
| 0x20-0x2F | TAG | write: IV (IDLE); adlen at 0x20-0x27 and msglen at 0x28-0x2F (LOAD_LEN). Read: tag (READ_TAG), 0x00 in every other state |

Writes that are not allowed in the current state are ignored. This includes
all DATA and TAG writes while BUSY.

Address bits [3:0] select the byte lane directly. Byte *n* of a register is
byte *n* of the AES state in column-major order, which is the byte order of
the AEGIS specification. Lengths are little-endian 64-bit bit counts. For
example, a 40-byte message has msglen = 320, written as 0x40, 0x01, 0, … at
0x28.

| CONTROL bit | access | meaning |
|---|---|---|
| 0 | R/W | decrypt mode. Every CONTROL write made in IDLE sets it, so send it with the start bit |
| 1 | W | start / continue |
| 2 | R | busy |
| 3 | W | reset: return to IDLE from any state (registers keep their contents) |
| 6:4 | R | state: IDLE 0, LOAD_LEN 1, LOAD_AD 2, LOAD_DATA 3, READ_CIPHER 4, READ_TAG 5, BUSY 7 |
| 7 | R | reserved, reads 0 |

### Flow of one operation

```
IDLE        write key (0x10..), IV (0x20..); write CONTROL = start|mode
BUSY        initialisation                      -> LOAD_LEN
LOAD_LEN    write adlen, msglen; start          -> LOAD_AD, or LOAD_DATA if there is no AD,
                                                   or straight to finalisation if both are empty
LOAD_AD     write one AD block; start           -> BUSY -> LOAD_AD while blocks remain, then as above
LOAD_DATA   write one block; start              -> BUSY -> READ_CIPHER
READ_CIPHER read the result block; start        -> LOAD_DATA while blocks remain, else BUSY (finalisation)
READ_TAG    read the tag; start                 -> IDLE
```

The host polls CONTROL[6:4] to leave BUSY. The core counts blocks by itself,
as ceil(adlen/128) and ceil(msglen/128), so the host never signals "last
block". A short last block must be padded to 16 bytes. For encryption the
padding may hold anything, because the core masks it. Only the first bytes
of the last result block are meaningful. To verify a tag after decryption,
the host compares the tag it reads with the one it received.

## Timing

Each APB transfer takes two clocks, with no wait states. With a host that
polls CONTROL, the testbench measures the following costs, bus traffic
included:

| operation | this core | target of the original design |
|---|---|---|
| initialisation (key, IV, start, wait) | 1360 | 1374 |
| one AD block | 171 | 189 |
| one encrypt / decrypt block (write, process, read back) | 206 / 204 | 197 |
| finalisation (start, wait, read tag) | 942 | 863 |

At 100 MHz, a message costs about 206 clocks per 128-bit block, which is
62 Mbit/s (the target is 65 Mbit/s). The BUSY times come from this core's
own micro-program, so they do not match the targets exactly.

## FPGA variant

`aegis128_fpga_top` connects the unchanged core to a serial line:

* `uart_rx` and `uart_tx` send and receive 8N1 frames at `CLK_HZ/BAUD`
  clocks per bit. The defaults are 100 MHz and 115200 baud.
* `uart_apb_bridge` accepts two commands:
  * write: the bytes `'W'` (0x57), address, data.
  * read: the bytes `'R'` (0x52), address. The bridge then sends the byte
    read back over the serial line.

  Any other byte in the command position is dropped, which lets the host
  resynchronise.

## Where this RTL makes its own choices

The algorithm, the split into APB slave, control unit and datapath, the
register map, the ALU operations and their cycle counts (17 for SubBytes,
4 for MixColumns), and the register sharing all follow the original design.
The following are this implementation's own choices:

* **TEMP register.** The extra 128-bit register makes the in-place state
  update possible (see above). The original design claims to use no storage
  beyond STATE, DATA, TAG and the accumulator, so TEMP costs area it did not
  spend.
* **State order.** The lengths are loaded before the associated data, so
  that the core can count blocks and mask the last block.
* **CONTROL layout.** The positions of reset, start, busy and mode in bits
  3..0, and the state encoding.
* **S-box circuit.** The S-box inverts by an x^254 addition chain. The
  original uses an optimised composite-field circuit, which is smaller. The
  function and the single pipeline register are the same.
* **Read rules.** DATA reads return 0x00 outside READ_CIPHER, so the key
  and plaintext cannot be read back. The lengths cannot be read back either:
  TAG is readable only in READ_TAG.
* **Encryption masking.** Encryption also masks the plaintext to `msglen`.
* **APB signal set.** APB has no PREADY or PSLVERR.
* **Reset.** An asynchronous active-low reset clears all registers.
* **UART.** Frame format, rate and command codes.

Not modelled: the standard-cell implementation, the layout and any area or
power figures.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. `tb/aegis_ref_pkg.sv` is an independent
behavioural AEGIS128 model. Its S-box is found by inverse search, and its
MixColumns uses a generic GF(2^8) multiplier.

* `tb_aegis128_top` drives complete operations over APB:
  * the published known-answer vector
  * an empty message with no AD
  * 20 bytes of AD with 40 bytes of message, then decryption of the result
  * random lengths in both directions

  It also checks the reset bit, zero reads and ignored writes, checks the
  BUSY lengths exactly, and compares the bus-level costs with the targets to
  within 15%. The core has no parameters, so this is a full-size run.
* `tb_aegis128_fpga_top` runs the whole design end to end, from the serial
  line through the bridge to the core. It covers the known-answer vector,
  empty AD and message, AD with a partial message (encrypted, then
  decrypted), a random operation, the reset bit, a zero read, an ignored
  write and a stray command byte. It counts each of these mechanisms and
  fails if one never occurs. The bit period is cut to 10 clocks.
* `tb_aegis128_fpga_full` runs one encryption through the whole design with
  every parameter at its default (100 MHz, 115200 baud).
* The block testbenches cover the S-box (all 256 inputs), MixColumns (FIPS
  examples and random columns), every ALU operation including the partial
  SubBytes state after 16 steps, datapath rounds and masks, the control
  unit's state sequence and micro-instruction stream, the APB access rules,
  and the UART framing.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_aegis128_top -y rtl -y tb +libext+.sv \
  rtl/aegis_pkg.sv tb/aegis_ref_pkg.sv tb/tb_aegis128_top.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run any other testbench. The
RTL is plain synthesizable SystemVerilog. The assertions, which check the
APB setup/access order, the bus/sequencer write exclusion and the ALU
indices, are concurrent properties that synthesis ignores.
