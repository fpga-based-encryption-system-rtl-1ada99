# AES-128 encryption/decryption block for a Zynq-style cloud file encryptor

This is the FPGA part of a file encryption front end. A host sends a file over TCP to an
embedded ARM processor. The processor streams the file through an AES-128 hardware block and
sends the result back. The RTL here is that hardware block. It has:

- an iterative AES-128 core that can encrypt and decrypt and applies one round per clock;
- a register interface (AXI4-Lite), where the processor sets the key and the mode;
- a stream interface (32-bit AXI4-Stream), where a DMA engine moves the data through the core
  in 16-byte AES states.

Everything else in the system is vendor hardware or software, and none of it is included:
the ARM cores, the DDR controller, the AXI DMA engine, the Ethernet MAC and PHY, the SD card,
the buttons/LEDs/OLED, the TCP server and its packet framing, and CBC chaining. The same is
true of the multi-tenant key-management scheme the system is meant for. That is a
Key-Aggregate Cryptosystem on elliptic curves, which would recover each tenant's AES key. Only
the AES side of the scheme is hardware here.

## Structure

```
aes_ip_top
├── aes_axil_regs      register interface: KEY0..3, CTRL (mode, key load), STATUS
├── aes_axis_dma_if    stream interface: 4 words -> state -> core -> 4 words, then clear
└── aes_core           AES-128 core, 128-bit d_in/d_out, 32-bit ctrl_in/ctrl_out
    ├── aes_control        control unit (IDLE / EXPAND / RUN / DONE)
    ├── aes_key_expansion  key schedule, one round key per clock
    ├── aes_key_ram        11 x 128-bit round-key RAM, asynchronous read
    ├── aes_encrypt        cipher, one round per clock
    └── aes_decrypt        inverse cipher, one round per clock
aes_pkg                  types, control-word bit map, S-box and round functions
```

Inside `aes_core`, the key expansion and the two round modules share a single round-key RAM.
The RAM has one read port. Its address comes through a multiplexer, and `mux_ctrl` (the mode)
picks which round module drives it. A second multiplexer, also controlled by `mux_ctrl`, picks
the ciphertext or the plaintext result. The result goes into a result register whose clock
enable is the control unit's `y_end`. `d_in` goes to the key-expansion input and to both round
modules. A command on `ctrl_in` decides which of them uses it.

Because there is only one read port, only the module selected by the mode is started. The two
modules cannot run side by side, since each needs a different round key in the same clock.
Decryption uses the plain FIPS-197 inverse cipher, so both modules read the same 11 round keys.
The encryption module reads them in order 0..10 and the decryption module in order 10..0.

## Timing of one state

This is the part that matters most when driving the core directly.

**Key load.** Present the key on `d_in` and pulse `ctrl_in[0]` for one clock.
- In that clock the control unit leaves IDLE, and round key 0 (the key itself) is written to
  RAM address 0.
- In each of the next ten clocks, `aes_key_expansion` computes the next round key from the
  previous one and writes it to the next address. Rcon is a register that is doubled in
  GF(2^8) each clock.
- `x_end_exp` pulses 11 clocks after the start.
- `ctrl_out[1]` (key ready) rises one clock later, 12 clocks after the start.

A key load clears key-ready until the new key has been expanded.

**Block.** Present the block on `d_in` and pulse `ctrl_in[1]`, with `ctrl_in[2]` set to the
mode (0 encrypt, 1 decrypt).

| clock edge | encryption module | decryption module |
|---|---|---|
| 0 (start) | state ← d_in ⊕ rk0 | state ← d_in ⊕ rk10 |
| 1..9 | full round with rk1..rk9 | InvShiftRows, InvSubBytes, ⊕ rk9..rk1, InvMixColumns |
| 10 | last round (no MixColumns) with rk10, end pulse | last step with rk0 (no InvMixColumns), end pulse |
| 11 | result register loaded, control unit enters DONE | same |

The RAM read is combinational. The round counter is also the RAM address, so each round uses
the key it addresses in the same clock. While idle, the encryption address rests at 0 and the
decryption address at 10. In the start clock the multiplexer follows the mode input, so the
module being started sees its first key at once.

**Clear.** After the result register is loaded, the control unit stays in DONE with
`ctrl_out[0]` set and ignores any new start. A pulse on `ctrl_in[3]` returns it to IDLE. The
core therefore has to be reset after every 16-byte state, as the original design required. The
clear leaves the round keys alone, so one key load serves any number of states.

### Control words

| bit | `ctrl_in` | `ctrl_out` |
|---|---|---|
| 0 | key start (pulse) | done: `d_out` holds a result |
| 1 | start block (pulse) | key ready |
| 2 | mode, 0 = encrypt, 1 = decrypt | busy |
| 3 | clear (pulse) | mode of the result in `d_out` |
| 31:4 | ignored | 0 |

If a key start and a block start arrive together, the key start wins. A block start is ignored
when no key has been expanded.

## Register interface (`aes_axil_regs`)

| address | register | access |
|---|---|---|
| 0x00 | CTRL: bit 0 MODE, bit 1 KEY_LOAD (write 1 to expand KEY0..3; reads 0) | R/W |
| 0x04 | STATUS: the core's `ctrl_out` | R |
| 0x10..0x1C | KEY0..KEY3. KEY0 holds key bytes 0..3, byte 0 in bits [31:24] | R/W, byte strobes honoured |

A write is taken in the clock in which AWVALID and WVALID are both high, provided no response
is pending. The OKAY response comes one clock later. A read is answered one clock after the
address. Unmapped addresses read 0. The low two address bits are ignored.

Each interface carries concurrent assertions for the AXI rule that VALID, once raised, stays
high with stable data until READY: the B and R channels here, the master stream port in
`aes_axis_dma_if`.

## Stream interface (`aes_axis_dma_if`)

- Data moves at one 32-bit word per clock in each direction, so reading or sending a state
  takes four clocks.
- The first word of a state is state bytes 0..3, with byte 0 in bits [31:24]. The 128-bit
  block therefore has FIPS-197 byte 0 in bits [127:120].
- The result comes out in the same order. TLAST is set on the fourth word of every state, so
  each state is one DMA transfer.
- Input TLAST is not used.
- `s_axis_tready` drops after the fourth input word. It stays low until the result has been
  sent and the core cleared: one state is finished before the next one is taken.
- The start waits until the core has a key, is not busy, and no key load is being issued in
  the same clock.

With neither side stalling, a state takes 22 clocks, all of them in sequence:

| step | clocks |
|---|---|
| words in | 4 |
| start | 1 |
| core, until done is visible | 12 |
| result capture | 1 |
| words out | 4 |

From the first word in to the last word out is 20 clock edges. At an assumed 100 MHz fabric
clock, the interface alone would handle a 10 MB file in about 0.14 s. The original system's
measured 4 s per 10 MB was set by software and DMA-call overhead, not by the core.

## Using it from software

1. Write KEY0..KEY3.
2. Write CTRL = `2 | mode` to load the key.
3. Poll STATUS bit 1 (key ready).
4. Stream the file as 16-byte states. Pad the last state; the padding is the host's choice.
5. Write CTRL = `mode` to switch between encryption and decryption. The key does not need
   reloading.

CBC chaining, including the XOR with the IV or the previous ciphertext, is done in software.
Under CBC, encryption can only keep one state in flight, because each input depends on the
previous output. Decryption can stream back to back.

In the original system, the host's packets carry a 4-byte little-endian total size, a 4-byte
mode word (zero = encrypt) and the data. The processor handles these packets, and they never
reach this block.

## What follows the source and what was chosen here

Taken from the description of the original system:
- a core with a 128-bit data input and output and 32-bit control input and output;
- a control unit, a key expansion with a RAM, encryption and decryption modules, the address
  and output multiplexers, and a result register with clock enable `y_end`, with the signal
  names used here;
- one AES round per clock;
- a 32-bit stream moving one word per clock, four clocks per 16-byte state;
- ready signals driven by the state machine;
- a reset of the state machine after every state;
- a register interface for the key and the mode;
- CBC left to software.

Chosen here, because the source does not specify them:
- AES-128 only. The source speaks of AES-128 keys.
- The bit fields of the control words.
- The register map and the AXI4-Lite handshake timing.
- Word and byte order on the stream.
- TLAST framing.
- Key expansion one round key per clock.
- An asynchronous-read RAM. A synchronous block RAM would need one more clock per round.
- An asynchronous active-low reset.
- The "clear" command that stands in for the per-state reset. It keeps the key.

One point where the source is not consistent with itself: it says encryption and decryption
run "in parallel", but its block diagram shows a single RAM read port behind a multiplexer.
This design follows the diagram and starts only the selected module. The result is the same;
only the unused module stays idle.

The S-box is not a typed table. `aes_pkg` computes it during elaboration: it walks GF(2^8)
with the generator 3 and its inverse, then applies the affine transform. The inverse S-box is
derived from it.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends with a `TB_RESULT checks=N
failures=M` line and has a watchdog.

- `aes_ref_pkg` is a behavioural AES-128 model, written independently of the RTL. Its S-box
  comes from a brute-force search for the inverse, and its MixColumns from a generic GF(2^8)
  multiply. It is itself checked against the FIPS-197 example vectors.
- `tb_aes_encrypt` and `tb_aes_decrypt` run the FIPS-197 vectors and random keys and blocks,
  and check the 11-clock latency.
- `tb_aes_key_expansion` checks all 11 round keys (FIPS-197 A.1 and random keys), the latency,
  and that a start while busy is ignored.
- `tb_aes_key_ram`, `tb_aes_control`, `tb_aes_axil_regs` and `tb_aes_axis_dma_if` check each
  block's own rules. The stream test replaces the core with a small behavioural stand-in.
- `tb_aes_core` checks key load, encryption and decryption, the 12-clock latencies, that a
  start is ignored before any key and in DONE, and the status bits.
- `tb_aes_ip_top` runs end to end at default parameters:
  - the FIPS-197 block, encrypted and decrypted;
  - a 1 KiB file in CBC, encrypted, then decrypted after a mode switch;
  - a key reload and another file, with random stalls on both stream sides;
  - the exact 4/4/20-clock timing.
  It counts key loads, encryptions, decryptions, mode switches, input stalls, output
  back-pressure, clears and TLASTs, and fails if any of them never happens.
- `tb_aes_file_workload` streams the 11-byte "HELLO WORLD" text, a 2 KiB file and a 64 KiB
  file. It checks every state and the round trip, and reports clocks per state.

The original system's example ciphertext for "HELLO WORLD" is not checked, because its key and
IV are unknown.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_aes_ip_top \
    -Irtl rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/aes_*.sv tb/tb_aes_ip_top.sv
./obj_dir/Vtb_aes_ip_top
```

Put `rtl/aes_pkg.sv` and `tb/aes_ref_pkg.sv` first on the command line. For a single block,
replace `rtl/aes_*.sv` with the files that block uses.

## Known limits

- AES-128 only. AES-192 and AES-256 would need a longer key schedule and a deeper RAM.
- One state in flight. The stream interface does not overlap input, computation and output.
  The original design had the same limit.
- There is no error response on the register bus.
- Bits 31:4 of the control words are unused.
