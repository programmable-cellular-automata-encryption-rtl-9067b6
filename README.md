# A byte cipher built from programmable cellular automata

This design encrypts and decrypts a byte stream with a chain of four small
cellular automata. Each automaton is a row of 8 one-bit cells. A plaintext byte
becomes the starting state of the first automaton. The automaton runs for a few
clock cycles under a "rule" chosen per cell, and its final state seeds the next
automaton. The fourth automaton's state is the ciphertext. The rules and cycle
counts, which are stored in a small RAM, are the key.

The cipher can be undone because of the rules it uses. An automaton whose cells
use only rules 51, 60 and 102 is a permutation of the 256 byte values. Its state
graph is made of closed cycles. For suitably chosen rule configurations every
cycle has length 8 (or 1, 2 or 4). Running such an automaton `n` steps encrypts.
Running it `8 − n` more steps brings the seed back. Decryption therefore uses
the same hardware: the four automata apply the rule words in reverse order, each
for `(8 − n) mod 8` steps.

Around the cipher is a small UDP engine. A host sends a datagram with a command
byte and data. The board answers with the processed bytes in a reply datagram.
The RTL is written in SystemVerilog. Every part of it simulates with Verilator.

## The cell and the 8-cell automaton

`pca_cell` is a D flip-flop plus a small logic block that picks its next
state:

| `load_data` | `run` | `s1` | `s0` | next `q`          | rule |
|-------------|-------|------|------|-------------------|------|
| 1           | –     | –    | –    | `data_in`         | load |
| 0           | 0     | –    | –    | `q` (hold)        |      |
| 0           | 1     | 0    | –    | `~q`              | 51   |
| 0           | 1     | 1    | 0    | `q ^ left`        | 60   |
| 0           | 1     | 1    | 1    | `q ^ right`       | 102  |

In the Wolfram numbering, the neighbourhood (left, self, right) = 111…000
gives the bit patterns 00110011 (rule 51), 00111100 (rule 60) and 01100110
(rule 102).

`pca8` chains eight cells. Cell `i` holds bit `i` of the byte. Its left
neighbour is cell `i−1` (bit `i−1`) and its right neighbour is cell `i+1`.
The boundary is null: cell 0 sees a 0 on its left and cell 7 sees a 0 on its
right. Each cell has its own rule line (`rule_cells[i]`, which drives `s1`).
All cells share one more line (`sel102`, which drives `s0`). These 9 bits give
2⁹ = 512 rule combinations per automaton.

A worked example you can check by hand is the configuration
⟨51,51,60,60,60,60,51,51⟩, listed from cell 0 (`rule_cells = 8'b0011_1100`,
`sel102 = 0`). It splits the state space into cycles of length 8, for example:

    0 → 195 → 4 → 207 → 16 → 243 → 20 → 255 → 0
    190 → 65 → 130 → 69 → 142 → 81 → 178 → 85 → 190

With this configuration and a step count of 4, byte 0 encrypts to 16, and
4 more steps bring 16 back to 0. `tb_pca8` checks both cycles.

The `run` input is not part of a textbook PCA cell. It lets each automaton of
the pipeline stop after its own step count while the others keep running.

## Rule words and keys

One rule word (`rule_word_t`, 12 bits) configures one automaton for one
transformation:

    [11:9] steps   evolution cycles when encrypting (1..7)
    [8]    sel102  0: additive cells use rule 60, 1: rule 102
    [7:0]  cells   per-cell: 0 = rule 51, 1 = additive rule

The rule RAM (`rule_mem`) holds 256 words, organised as 64 *rule sets* of four
words. Word `4s+k` is the word of automaton `k` in set `s`. Byte `j` of a
message uses set `j mod (last_set+1)`, so consecutive bytes are enciphered
under different keys. The sequence restarts at set 0 with every message
(datagram), so the receiver can decrypt each datagram independently.

**A key is valid only if every rule configuration in it has all its state
cycles of a length that divides 8**, that is, if applying the configuration
8 times is the identity on all 256 states. The hardware does not check this.
A configuration with 16-long cycles encrypts, but `8 − n` steps do not invert
it. To find valid configurations, iterate over `cells` (256 values) and
`sel102` (2 values). For each one, apply the step function 8 times to every
state and keep the configuration if every state returns to itself. This is the
rule `period_divides_8` in `tb/pca_ref_pkg.sv`. A step count of 0 is allowed.
It makes the transformation the identity, and decryption also uses 0.

## The four-stage pipeline (`pca_cipher`)

This is the most involved part of the design. All four automata advance in
lock-step *rounds* of 8 clocks:

    clock in round:  0      1      2      3      4      5      6      7
                     LOAD   EV1    EV2    EV3    EV4    EV5    EV6    EV7
    automaton k:     seed   runs while EVi <= steps_k, then holds
    rule RAM read:   word   word   word   word
                     for A0 for A1 for A2 for A3  (for the *next* round)

* **Load cycle.** Automaton 0 takes the input byte, and automaton `k` takes the
  final state of automaton `k−1`. The state of automaton 3 moves to the output
  register. Each automaton also latches its rule word and its step count for
  this round. The step count is `steps` when encrypting and `(−steps) mod 8`
  when decrypting.
* **Evolution cycles 1–7.** Automaton `k` runs while the cycle number is
  `≤ steps_k`, then holds. The round always lasts 8 clocks, so the timing does
  not depend on the key.
* **Rule reads.** The RAM has a single read port. During evolution cycles 1–3
  the controller reads the words that automata 1–3 will need next round, for
  the bytes now in automata 0–2, into shadow registers. The word for
  automaton 0 is read in the load cycle itself, because it depends on the
  incoming byte's mode. Reading keys never stalls the pipeline.
* **Per-byte state.** Each stage carries its byte's valid bit, mode
  (encrypt/decrypt) and rule-set number. Encrypt and decrypt bytes may be mixed
  freely in the stream. A decrypt byte in stage `k` uses word `3−k` of its set.
* **Flow control.** A round starts when there is an input byte or a byte in
  flight, and the output register is free. If no input byte arrives, a bubble
  enters, so the pipe drains on its own. `in_ready` is high only in a load
  cycle. `out_valid/out_data` hold until `out_ready`, and an assertion checks
  this.

Throughput is one byte per 8 clocks (50 Mbit/s at 50 MHz). Latency is 33 clocks
from the load cycle that accepts a byte to `out_valid`. `tb_pca_cipher` checks
both numbers cycle by cycle.

The rule RAM may only be written while `busy = 0`. An assertion checks this
both in the cipher and in the top.

## The network side

`pca_crypto_top` connects the blocks in this order:

    MAC rx bytes → udp_rx → main_fsm → byte_fifo → pca_cipher → msg_mem → udp_tx → MAC tx bytes
                                └──────── rule download ────────┘

* **`udp_rx`** filters Ethernet II / IPv4 / UDP frames on the fly. It accepts a
  frame only if the destination MAC is the board's or broadcast, the IPv4 header
  has no options, the protocol is UDP, and the IP and port match. The payload
  streams out one clock behind the input. Ethernet padding is dropped. The
  sender's MAC, IP and port are kept for the reply. Checksums are **not**
  verified.
* **`main_fsm`** reads the first payload byte as a command:
  * `0x01` encrypt or `0x02` decrypt: the data bytes, up to 1024 of them, go
    into the FIFO with their mode bit, and the rule-set sequence restarts. When
    every processed byte has been written to the 1 KB message memory, a reply
    with those bytes goes back to the requester.
  * `0x03` load rules: the data is a list of 2-byte rule words, high byte first
    (bits 11:8 in the low nibble). They are written from address 0. The number
    of complete sets of four words becomes the sequence length (`last_set`).
    No reply is sent.
  * Any other command is ignored.

  A datagram that arrives before the previous one has been answered is dropped
  (`busy_drop`).
* **`byte_fifo`** (1024 × 9 bits) absorbs a whole datagram. Bytes arrive at
  line rate, while the cipher takes one byte per 8 clocks.
* **`udp_tx`** builds the reply frame with the board's addresses. The IPv4
  header has identification 0, the DF flag and TTL 64, plus a computed header
  checksum. The UDP checksum is 0 (none). Frames shorter than 60 bytes are
  padded with zeros.

The defaults are board MAC 00-11-22-33-44-55, IP 192.168.0.6 and UDP port
5000. All three are parameters of `pca_crypto_top`.

The Ethernet PHY and MAC are **not** included. The top's ports are the MAC's
byte streams: a frame runs from the destination address to the end of the UDP
data, with no preamble and no FCS. The receive side has no back-pressure. The
transmit side is valid/ready with `tx_last`.

## Files

| file                 | contents                                                           |
|----------------------|--------------------------------------------------------------------|
| `rtl/pca_pkg.sv`     | rule word type, command codes, board addresses, sizes              |
| `rtl/pca_cell.sv`    | one automaton cell                                                 |
| `rtl/pca8.sv`        | 8-cell automaton, null boundary                                    |
| `rtl/rule_mem.sv`    | rule RAM (256 × 12 bits, asynchronous read)                        |
| `rtl/pca_cipher.sv`  | four automata, rule RAM, round controller                          |
| `rtl/byte_fifo.sv`   | receive FIFO                                                       |
| `rtl/msg_mem.sv`     | 1 KB message memory                                                |
| `rtl/udp_rx.sv`      | frame filter and payload extractor                                 |
| `rtl/udp_tx.sv`      | reply frame builder                                                |
| `rtl/main_fsm.sv`    | command dispatch and sequencing                                    |
| `rtl/pca_crypto_top.sv` | the whole system                                                |
| `tb/tb_*.sv`         | one self-checking testbench per module                             |
| `tb/pca_ref_pkg.sv`  | reference model of the automata and the cipher                     |
| `tb/net_ref_pkg.sv`  | frame builder and IPv4 checksum for the testbenches                |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself, and
each has a watchdog. To build and run one with Verilator, from the folder that
holds `rtl/` and `tb/`:

    verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
        -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/pca_pkg.sv tb/pca_ref_pkg.sv tb/net_ref_pkg.sv tb/tb_pca_crypto_top.sv \
        --top-module tb_pca_crypto_top -o sim
    ./obj_dir/sim

Replace `tb_pca_crypto_top` with any other testbench name. Each run takes a
few seconds.

`tb_pca_crypto_top` runs the complete system at its default parameters, acting
as the host. It:

* downloads keys of 16, 64 and 10 rule sets;
* encrypts messages of 5, 77, 300 and 1024 bytes, and checks each reply against
  the reference model;
* sends each ciphertext back for decryption, and checks that the plaintext
  returns;
* checks that a frame for another IP is dropped and that a request made during
  a reply is dropped;
* applies random transmit back-pressure.

It counts each of these events and fails if one never happens.

`tb_text_workload` runs the text-file use case at the default parameters. It
sends 4000 characters of generated English text as four datagrams of at most
1 KB, encrypts them, decrypts the result and compares. It also checks how the
ciphertext spreads over the byte values. With a 64-set key, the ciphertext of
the printable text takes 254 of the 256 byte values, and 55% of its bytes fall
outside printable ASCII.

The block testbenches go deeper:

* `tb_pca_cell` runs every input combination of the cell.
* `tb_pca8` checks the two 8-cycles above and random rule patterns.
* `tb_pca_cipher` checks the reference model, mixed modes, input gaps, output
  stalls, the rate and the latency.
* `tb_udp_rx` and `tb_udp_tx` check every header field, the filtering and the
  padding.
* `tb_main_fsm` checks command handling, the size cap and busy drops.

## Where this design makes its own choices

The original description fixes:

* the three rules and their equations;
* the cell built as a flip-flop plus rule-selection logic, with a data-load
  multiplexer;
* eight cells per automaton with per-cell rule lines, one shared rule line and
  null boundaries;
* four automata in a pipeline, each running 1–7 cycles;
* rule words read in sequence from a RAM without stalling the cipher;
* the receive → FIFO → cipher → 1 KB memory → transmit data path;
* the board's MAC and IP addresses;
* a 50 MHz clock on a Spartan-3E XC3S500E.

The following are this design's own, and are the first things to revisit when
the design is matched to a particular host program:

* **Rule-line encoding.** Which `s1/s0` value selects which rule, and that the
  shared ninth line chooses between rules 60 and 102.
* **Run enable and round timing.** The per-cell run enable, the fixed 8-clock
  round, and the order of the rule-RAM reads.
* **Key schedule.** The rule-word format with its embedded step count, the
  rule-set sequence, its restart per datagram, and the reverse-order decryption
  schedule. The original states only that the seed reappears after the
  remaining cycles, and that encryption and decryption share one module.
* **Host protocol.** The command byte, the rule-download format, the reply
  format, the UDP port, and the drop-while-busy policy.
* **Sizes and handshakes.** The FIFO depth, the rule-RAM depth, and all stream
  handshakes.
* **Frame handling.** The IPv4/UDP field values, the unchecked receive
  checksums, and the missing support for IPv4 options, fragments and ARP. The
  host needs a static ARP entry for the board.

Known differences and open points:

* **Cycle counts.** The original counts how many of the 512 rule configurations
  give cycles of each length, and says 156 give length-8 cycles. With the
  encoding used here, 172 configurations (86 for each value of `sel102`) have 8
  as their longest cycle. Any of them is a valid key word. The counts do not
  change the hardware.
* **How bytes are combined with the automaton.** One passage of the original
  says incoming bytes are "encrypted using the corresponding bytes of the PCA's
  state". That wording would suggest combining them with the state, as a stream
  cipher does. This design follows the block-cipher procedure instead: the byte
  is the seed and the final state is the ciphertext.
* **System throughput.** The original gives about 5 Mbit/s for the system at
  50 MHz. The cipher core here does 50 Mbit/s. The end-to-end rate depends on
  the MAC, the link and the host, none of which is modelled.
* **Pipeline depth.** The number of automata is fixed at four (`NUM_STAGES`
  in the package). The original notes that more transformations would give
  more security, but the word indexing and the rule-read schedule here assume
  four.
* **Not included.** The example cell with three switches that realises every
  additive rule (a general PCA illustration), the Ethernet PHY/MAC, and the host
  program.
