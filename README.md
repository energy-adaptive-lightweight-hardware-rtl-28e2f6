# Energy-adaptive authenticated encryption with reconfigurable cipher modules

A node that lives on harvested energy does not always have the same power to
spend on security. This design gives such a node an authenticated-encryption
unit (AEAD) whose cipher can be swapped at run time. On an FPGA with
dynamic partial reconfiguration, the unit sits in a reconfigurable
partition. A small controller in the static logic compares the power budget
with the measured power of each cipher module. It then has the
reconfiguration controller load the module that fits.

Five CAESAR-candidate ciphers are foreseen as modules: ACORN, JAMBU, MORUS,
CLOC and Pi-Cipher. ACORN is the low-power choice. It is a bit-serial stream
cipher built from XOR and AND gates. This RTL implements ACORN-128 as the
module in the partition. The other four are only represented by their
measured power in the selection logic (see *What is not here*).

```
  processing system ──AXI──> interconnect ──AXI4-Lite──┬──> PRC ──> configuration port
                                                        │      ^
                                                        v      │ prc_trigger / prc_rm_id / prc_done
                                   ┌──────────────── dpr_system ───────────────────────┐
                                   │ aead_axil_regs ──budget──> dpr_ctrl ──rp_rst_n──┐  │
                                   │   │ PDI/SDI      ^ DO                           v  │
                                   │   └──────────> aead (reconfigurable partition)     │
                                   │                 preprocessor → CMD FIFO →          │
                                   │                 ACORN core → postprocessor         │
                                   └──────────────── ila_probe ────────────────────────┘
```

## Files

| file | what it is |
|---|---|
| `rtl/aead_pkg.sv` | word formats, opcodes, segment types, module ids |
| `rtl/dpr_system.sv` | top: static part plus the partition |
| `rtl/aead_axil_regs.sv` | AXI4-Lite slave: stream registers, power budget |
| `rtl/dpr_ctrl.sv` | picks the module for the budget; runs the reconfiguration handshake |
| `rtl/aead.sv` | the partition: four units below |
| `rtl/aead_preprocessor.sv` | instruction decoding, key loading, block cutting and padding |
| `rtl/cmd_fifo.sv` | 4 x 24-bit first-word-fall-through FIFO |
| `rtl/acorn_core.sv` | ACORN-128, one state step per clock |
| `rtl/aead_postprocessor.sv` | output headers, clearing past the message end, tag serialisation, status |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_aead_latency.sv` | long-message rate measurement of the AEAD |
| `tb/acorn_ref_pkg.sv` | bit-level software model of ACORN-128 used as the reference |
| `tb/aead_stream_pkg.sv` | builds instruction streams and expected outputs |
| `tb/axil_master_tasks.svh` | AXI4-Lite read and write tasks |

## Choosing a module: `dpr_ctrl`

The module powers are parameters in microwatt. Their defaults are the
dynamic powers measured for each module in the reconfigurable system:

| module | id | power (µW) |
|---|---|---|
| ACORN | 0 | 1830 |
| Pi-Cipher | 1 | 10080 |
| JAMBU | 2 | 2243 |
| MORUS | 3 | 5660 |
| CLOC | 4 | 3660 |

The budget is a 16-bit register in microwatt, written by software. The
controller takes the module with the **highest** power that does not exceed
the budget. Higher power is taken as a stand-in for a stronger mode. This
rule is a design choice: the only stated aim is to load "a mode that meets
the budget", and no security ranking is given. If the budget is below
ACORN's 1830 µW, nothing fits. The loaded module then stays and `no_fit` is
raised. After reset, ACORN is taken as loaded.

A reconfiguration starts only when the wanted module differs from the
loaded one **and** the AEAD is idle, so an instruction is never cut in half.
It then runs like this:

1. `reconfiguring` goes high and the partition's reset `rp_rst_n` goes low.
   The register front end stops offering PDI/SDI words. A write to those
   registers simply waits, because its AXI response is held back.
2. `prc_trigger` pulses for one cycle, with the module id on `prc_rm_id`.
3. The controller waits for `prc_done`, with no time limit. The
   configuration time reported for the reconfiguration controller is about
   11.2 ms.
4. The new module id is recorded (register 0x14) and the partition leaves
   reset.

Partial reconfiguration cannot be expressed in RTL. In simulation the
partition always holds ACORN, whatever id was requested. The handshake and
the reset/hold behaviour around it are real.

## The AEAD partition

### Streams and word formats

There are three 32-bit valid/ready streams: PDI (instructions and public
data), SDI (the key) and DO (results). All of the following encodings are
this design's own, modelled on the usual hardware API for authenticated
ciphers:

| word | layout |
|---|---|
| instruction | `[31:28]` opcode: ENC 2, DEC 3, LDKEY 4, ACTKEY 7 |
| segment header | `[31:28]` type: AD 1, PT 4, CT 5, TAG 8, KEY C, NPUB D; `[15:0]` length in bytes |
| status | `0xE0000000` success, `0xF0000000` failure |

Data bytes are packed big-endian: byte 0 is in bits 31:24. The bytes past
the end of a segment in its last word are don't-care on input and zero on
output.

Sequences:

* **Key**: PDI `ACTKEY`; SDI `LDKEY`, `KEY` header (16), 4 key words.
* **Encrypt**: PDI `ENC`, `NPUB` header (16) + 4 words, `AD` header + data,
  `PT` header + data. DO returns `CT` header, ciphertext, `TAG` header (16),
  4 tag words and a success status.
* **Decrypt**: PDI `DEC`, `NPUB`, `AD`, `CT` segments, then a `TAG` header and
  4 words. DO returns a `PT` header, the plaintext and then the status. The
  status is failure if the tag does not match. The plaintext is released
  before the tag is checked, so software must discard it when the status
  says failure.

Each instruction carries exactly one segment of each type, in this order.
AD and message may be empty (length 0).

### Preprocessor, CMD FIFO, postprocessor

* The **preprocessor** executes the instructions. It assembles the key from
  four SDI words (serial in, parallel out) and passes each data word to the
  core as a block. With each block it gives the byte count (`bdi_size`,
  0..4), an end-of-segment flag and the block kind (nonce, AD, message,
  tag). Bytes past the segment end are cleared. An empty segment becomes one
  block of size 0. Data words pass through without an extra cycle.
* The **CMD FIFO** (4 entries x 24 bits, first word fall through) carries the
  instruction and the message header to the output side. Each entry is
  `{code[3:0], flags[3:0], length[15:0]}`. So up to two instructions can be
  queued ahead of the output.
* The **postprocessor** writes the output header, clears the bytes of the
  last message word that are not part of the message, shifts the 128-bit tag
  out as four words, and appends the status.

## The ACORN-128 core

ACORN keeps a 293-bit state `S`. Each step does four things:

1. It updates six LFSR taps: `S289^=S235^S230`, `S230^=S196^S193`,
   `S193^=S160^S154`, `S154^=S111^S107`, `S107^=S66^S61`, `S61^=S23^S0`.
2. From the updated state it forms the keystream bit
   `ks = S12 ^ S154 ^ maj(S235,S61,S193) ^ ch(S230,S111,S66)`.
3. It forms the feedback bit
   `f = S0 ^ ~S107 ^ maj(S244,S23,S160) ^ (ca & S196) ^ (cb & ks)`.
4. It shifts the state down by one. `f ^ m` enters at bit 292, where `m` is
   the input bit of the step.

The control bits `ca` and `cb` and the input `m` depend on the phase:

| phase | steps | m | ca | cb |
|---|---|---|---|---|
| init, key | 128 | key bits | 1 | 1 |
| init, nonce | 128 | nonce bits | 1 | 1 |
| init, key again | 1536 | key bit `i mod 128`, first one inverted | 1 | 1 |
| AD | 8·len | AD bits | 1 | 1 |
| AD padding | 256 | 1 then 0 | 1 for 128, then 0 | 1 |
| message | 8·len | plaintext bit | 1 | 0 |
| message padding | 256 | 1 then 0 | 1 for 128, then 0 | 0 |
| finalisation | 768 | 0 | 1 | 1 |

Ciphertext is `p ^ ks`. When decrypting, the core feeds back the recovered
plaintext bit `c ^ ks`, so both directions leave the same state. The tag is
the keystream of the last 128 finalisation steps. Bits are taken
least-significant first within each byte, and bytes in order.

The datapath is one bit wide, so each step takes one clock. Because each
phase indexes its input word with a counter, no shifter is needed. Cycle
counts at full rate are:

| work | cycles |
|---|---|
| initialisation | 1797 (1792 steps plus one cycle per nonce word and a start cycle) |
| full 32-bit message block | 35 (32 steps, load, end, output) |
| 8-byte message | 70 cycles, i.e. 8.75 cycles per byte |
| padding and finalisation | 1280 |

The 8.75 cycles per byte is below the 10.475 cycles per byte measured for
the ACORN module it stands in for.

## Top-level interface (`dpr_system`)

* `s_axil_*` is an AXI4-Lite slave with a 5-bit address and 32-bit data.
  Its registers:
  * `0x00` PDI (write)
  * `0x04` SDI (write)
  * `0x08` DO (read; reading consumes the word and gives 0 when none is
    waiting)
  * `0x0C` status (read): bit 0 DO word waiting, bit 1 reconfiguring, bit 2
    no module fits, bit 3 AEAD idle
  * `0x10` power budget in µW (read/write; byte strobes honoured; reset 0)
  * `0x14` loaded module id (read)

  Only one write and one read are handled at a time. AW and W are taken
  together. Responses are always OKAY.
* `prc_trigger`, `prc_rm_id[2:0]` and `prc_done` are the handshake with the
  partial reconfiguration controller.
* `ila_probe[63:0]` is a bundle of signals for a logic analyser:
  * `[31:0]` DO word
  * `[32]` do_valid, `[33]` do_ready
  * `[34]` pdi_valid, `[35]` pdi_ready
  * `[36]` AEAD idle, `[37]` reconfiguring
  * `[40:38]` loaded module, `[41]` no_fit
  * `[57:42]` budget

Reset is asynchronous and active low. The partition's reset is that reset
ANDed with "not reconfiguring".

## What is not here, and where this departs from the source design

* **JAMBU, MORUS, CLOC and Pi-Cipher modules.** Only their measured power and
  module ids appear, in `dpr_ctrl`. Their algorithms come from their own
  specifications and are not part of this design. Each would replace
  `acorn_core` inside `aead`, behind the same block interface.
* **Vendor parts.** The processing system, the AXI3-to-AXI4-Lite
  interconnects, the partial reconfiguration controller with its
  configuration port, and the integrated logic analyser are outside the RTL.
  Their connections are the top-level ports.
* **CMD FIFO contents.** It carries the instruction and message header only.
  The tag goes from the core straight to the postprocessor instead of through
  the FIFO.
* **Stream formats, register map and the selection rule** are this design's
  own, as described above.
* **Power and area.** The powers are FPGA measurements, used as constants.
  Nothing in the RTL measures power.

## How far to trust it

* The ACORN core matches an independently written bit-level model
  (`tb/acorn_ref_pkg.sv`) over random keys, nonces and lengths, in both
  directions. It also reproduces the published known-answer tag for an
  all-zero key and nonce with empty AD and message
  (`835e5317896e86b2447143c74f6ffc1e`). It has not been run against the
  full official test-vector file, so other vectors, such as non-empty
  messages, are only checked against the model.
* Each module has a self-checking testbench. Each testbench was also run
  against a deliberately broken copy of its module, and it failed there.
* `tb_aead_latency` encrypts a 1024-byte message through the whole AEAD
  with all streams always ready. It measures 8.75 cycles per byte in steady
  state. The whole instruction, including 1797 cycles of initialisation,
  padding and finalisation, takes 12180 cycles, or 11.9 cycles per byte.
* `tb_dpr_system` runs the whole top at its default parameters through AXI.
  It activates a key, runs encryptions and decryptions (good and bad tags,
  empty and partial messages). It reconfigures through JAMBU, CLOC, Pi-Cipher
  and MORUS and back to ACORN, and checks
  that a PDI write made during a reconfiguration is held. Every output word
  is compared with the model.

## Simulating

With Verilator 5, from the repository root, for example the full system:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
  rtl/aead_pkg.sv tb/acorn_ref_pkg.sv tb/aead_stream_pkg.sv \
  rtl/dpr_system.sv tb/tb_dpr_system.sv --top-module tb_dpr_system
./obj_dir/Vtb_dpr_system
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. For a
single module, list `rtl/aead_pkg.sv`, the packages of `tb/` it imports, the
module and its testbench. `-y rtl` finds the submodules. Each testbench has
a watchdog that ends the run as a failure if it hangs. The cipher
testbenches take under a second.
