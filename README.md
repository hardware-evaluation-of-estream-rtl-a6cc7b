# A shared test harness for hardware stream ciphers

This RTL describes a test chip that puts several stream-cipher cores behind one
narrow pin interface, so that all of them can be loaded, run and measured the
same way. The pins are a 16-bit `DataIn` bus, a 16-bit `DataOut` bus, an 8-bit
`Ctrl` bus, a clock and a reset. Many of the ciphers consume and produce far
more than 16 bits per clock: Trivium, for example, makes 64 keystream bits every
cycle. The interface bridges that gap with 64-bit input and output buffers and
two operating modes. Slow mode is bit-exact and stalls the cipher. Fast mode
keeps the cipher running every cycle but shows only part of its output.

Three cores are built:

| slot | core | bits per step | setup after `init` | source of the algorithm |
|---|---|---|---|---|
| 0 | AES-128 in OFB mode (the reference) | 64, from 128-bit blocks made every 41 clocks | 1 + 41 clocks | FIPS-197 |
| 2 | Grain (version 1, 80-bit key, 64-bit IV) | 16 | 1 + 160/16 = 11 clocks | Grain v1 specification |
| 6 | Trivium (80-bit key, 80-bit IV) | 64 | 1 + 1152/64 = 19 clocks | Trivium specification |

The other six slots are Achterbahn (1), MICKEY (3), MOSQUITO (4), SFINKS+ (5),
VEST (7) and ZK-Crypt (8). They are wired to top-level ports, so external cores
or models can be attached. Their bits per step (radix) are 2, 1, 3, 8, 16 and 32
respectively, and the interface already knows those widths.

Every core turns plaintext into ciphertext: it XORs its keystream onto the data
bus. A pure keystream generator would only need the XOR gates added.

## Block structure

```
            DataIn[15:0]             Ctrl[7:0]
                 |                       |
     +-----------+-----------+      iface_control ---- mux selects, init/step per slot
     |           |           |
 kiv_storage  input_buffer   |     (replicate x4 in fast mode)
  256 bit      64 bit        |
     |           +--> input mux --> alg_din[63:0] ---------------+
     | key[127:0], iv[127:0] to every slot                        |
     v                                                            v
  +------------------------- slots 0..8 ---------------------------+
  | aes_ofb_core | grain_core | trivium_core | ext_* ports (x6)    |
  +----------------------------------------------------------------+
                       | alg_dout[slot][63:0], alg_ready[slot]
                       v
               algorithm output mux ---> output_buffer (64 bit, 4 words)
                       |                        |
                       +-- low 16 bits (fast) --+--> DataOut mux --> DataOut[15:0]
```

Files, bottom-up:

- `estream_pkg.sv`: slot numbers, the `Ctrl` encoding, and the radix and
  word count of each slot.
- `kiv_storage.sv`: a 256-bit key/IV register, written 16 bits at a time. The
  key is bits [127:0] and the IV is bits [255:128]. Every slot reads it in
  parallel.
- `input_buffer.sv`: collects 1 to 4 words, lowest word first.
- `output_buffer.sv`: holds one step's output and hands it out word by word.
- `iface_control.sv`: decodes `Ctrl`, holds the selected slot and the mode,
  and decides when the selected core steps.
- `estream_interface.sv`: the four blocks above plus the multiplexers.
- `aes_sbox.sv`, `aes_ofb_core.sv`, `grain_core.sv`, `trivium_core.sv`: the
  cipher cores.
- `estream_asic.sv`: the top level.

## The host protocol

`Ctrl[7:4]` holds the operation and `Ctrl[3:0]` its argument. Every operation
lasts one clock and takes effect at the rising edge that ends it.

| op | name | effect |
|---|---|---|
| 0 | NOP | nothing |
| 1 | KEY_WR | key/IV word `arg` (bits [16·arg+15 : 16·arg]) gets `DataIn` |
| 2 | SELECT | selects slot `arg` and clears both buffers |
| 3 | MODE | `arg[0]` = 0 selects slow mode, 1 selects fast mode; clears both buffers |
| 4 | INIT | the selected core loads key and IV and starts its setup; clears both buffers |
| 5 | DATA_WR | slow mode: appends `DataIn` to the input buffer (dropped when the buffer is full) |
| 6 | DATA_RD | slow mode: `DataOut` shows the current output word during this clock, and the buffer moves past it |
| 7 | RUN | fast mode: the selected core steps in this clock if it is ready |
| 8 | STATUS | `DataOut` = `{7'b0, ready, fast, in_full, out_empty, 1'b0, slot[3:0]}` |

Outside STATUS, `DataOut` shows the current output-buffer word in slow mode. In
fast mode it shows the selected core's output bits [15:0].

**Slow mode.** Each step needs ceil(radix/16) words: 4 for AES and Trivium, 1
for Grain. Write that many words with DATA_WR. In the clock after the buffer
fills, the core steps, provided two things hold. First, the core reports
`ready`. Second, the output buffer has been read empty. That same clock edge
captures the output and empties the input buffer. Until both conditions hold,
the input waits and the core is halted. This is the mechanism that lets a 64-bit
cipher run bit-exactly from a 16-bit pin interface. Then poll STATUS until
`out_empty` drops, and read the words back with DATA_RD, lowest word first.

**Fast mode.** `DataIn` is copied four times onto the 64-bit data bus. While
`Ctrl` carries RUN, the core steps on every clock in which it is ready. The low
16 bits of its output appear on `DataOut` in the same clock, through
combinational logic. The remaining 48 bits are computed but never seen. Use
this mode to measure speed, not to check data.

A typical session looks like this: 16 × KEY_WR, SELECT n, INIT, poll STATUS
until `ready`, then stream data in either mode.

## The cores

All cores share one port set: `key[127:0]`, `iv[127:0]`, `init`, `step`, `din`,
`dout` and `ready`. `dout = din ^ keystream` is combinational. `step` advances
the state at the clock edge, and only while `ready` is high. `init` restarts the
core at any time.

### Trivium, radix 64

The 288-bit state is three shift registers. Each keystream bit costs three
AND gates and a handful of XORs, and no feedback bit is used within 64 updates
of being produced. So 64 updates can be unrolled into one clock without deep
logic. In the RTL, a `for` loop in `always_comb` applies the bit update RADIX
times. The key is placed at s1..s80 (`key[0]` = s1), the IV at s94..s173 and
ones at s286..s288. The 1152 setup rounds then run on their own in 1152/RADIX
clocks. With an all-zero key and IV, the first output bytes are
FB E0 BF 26 58 59 05 1B 51 7A 2E 4E 23 9F C9 7F. Byte k sits in `dout[8k+7:8k]`,
with the first keystream bit of each byte in its LSB. This matches the
published test vector.

`RADIX` is a parameter and must divide 1152. The slot in the top level uses 64.

### Grain, radix 16

Grain has an 80-bit LFSR `s` and an 80-bit NFSR `b`. The highest taps that the
output and feedback functions read are s64 and b63, so 16 updates can run in
parallel while every tap still reads a register bit (64 + 15 = 79). Above radix 16 the
unrolled loop starts to feed newly computed bits back into the same clock, and
the logic gets deeper. The NFSR is loaded with `key[79:0]`, the LFSR with
`iv[63:0]` followed by sixteen ones. Setup takes 160 rounds, with the output
also fed back into both registers. `RADIX` must divide 160.

### AES-128 OFB

OFB turns the block cipher into a stream cipher: block 0 = AES_K(IV) and
block n = AES_K(block n−1). The engine is **column-serial**, which is the part
of this design that takes the most care.

- There are four S-boxes for SubBytes, so a round takes four clocks, one 32-bit
  column per clock.
- ShiftRows is free. Column c of the new state takes row r from old column
  (c + r) mod 4. The old state therefore stays intact for the whole round,
  while new columns 0–2 collect in a 96-bit shadow register. Both are replaced
  together in the fourth clock.
- Round keys are expanded in place, one word per clock, in step with the data
  columns. In clock 0 the engine computes w0 ^= SubWord(RotWord(w3)) ^ Rcon.
  In clock c it computes wc ^= wc−1, where wc−1 has just been updated. Word c
  of the new key is thus ready exactly when data column c needs it. SubWord has
  its own four S-boxes.
- The cipher key is not stored in the core. Each block restarts the expansion
  from the interface's key register, which saves a 128-bit register.
- One clock for the initial AddRoundKey plus 10 × 4 round clocks gives 41
  clocks per 128-bit block, or 128/41 = 3.12 bits per clock. The next block
  starts immediately from the previous output.
- A finished block waits in a 128-bit keystream register. From there it goes
  out in two 64-bit steps, bytes 0–7 first. If that register is still occupied
  when the next block finishes, the engine holds until the register frees.

S-boxes are logic, not ROMs: the GF(2^8) inverse is computed as a^254, followed
by the affine map. Byte j of every 128-bit key, IV or block is bits
[8j+7:8j], which is FIPS-197 byte order placed little-end first.

## Where this design departs from or goes beyond its source

- The interface's block diagram, the 16-bit buses, the 64-bit buffers, the two
  modes and the shared 256-bit key/IV register are taken from the published
  design. The `Ctrl` encoding, the STATUS word, the word order, the key/IV
  split and the reset values are this design's own choices. The original
  encoding was not published.
- Six cores are not included: Achterbahn, MICKEY, MOSQUITO, SFINKS+, VEST and
  ZK-Crypt. Only their slots exist. For SFINKS+ the intended structure is
  known: a 256-FF LFSR loaded with a precomputed initial state, an LSB-only
  pipelined GF(2^16) inverse, a one-FF delay and two XORs. Its LFSR taps and
  field polynomial are not.
- Grain version 1 is used. Of the two Grain versions, either would have served
  equally well for a hardware comparison.
- Key and IV bit order are chosen here (first bit = bit 0). The Trivium output
  matches the published all-zero vector under this order. Grain's output has
  only been checked against an independent model, not against a published
  vector.
- The AES key schedule has its own four S-boxes. The 41-clock count of the
  reference core is met this way. Whether the reference core shared S-boxes
  between data and key is not known.
- The scan chains and the test pins (`Test[1:0]`) are left out. Scan insertion
  belongs to synthesis. Pads and supply pins are left out too.
- Fast-mode `DataOut` is combinational from `DataIn` and `Ctrl`. A chip would
  normally register its pads.

## Simulating

Every testbench in `tb/` is self-checking. It ends with
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5, for
example:

```
verilator --binary --timing -Wno-fatal -Irtl rtl/estream_pkg.sv tb/tb_estream_asic.sv \
  -y rtl -y tb +libext+.sv --top-module tb_estream_asic -o sim && ./obj_dir/sim
```

- `tb_estream_asic` drives the whole chip at its default configuration, through
  its pins only. It checks:
  - Trivium against the published all-zero vector and a bit-serial model, in
    slow and fast mode;
  - Grain against a model, in both modes;
  - AES-OFB against the NIST SP 800-38A example, and its fast-mode rate (40
    steps of 64 bits in 820 clocks);
  - one external slot.

  It also counts the protocol mechanisms and fails if any never happened: key
  writes, init, slow steps, halts with unread output, input waiting for a busy
  core, fast steps, AES blocks held back, and status reads.
- `tb_radix_sweep` runs Trivium at radix 1–64 and Grain at radix 1–16 side by
  side. It checks that all radices produce the same keystream, take the
  expected setup time and deliver RADIX bits per clock.
- The unit testbenches:
  - `tb_trivium_core`, `tb_grain_core` and `tb_aes_ofb_core` compare the cores
    against models written independently in the testbench. They also check
    setup and block timing.
  - `tb_aes_sbox` is exhaustive.
  - `tb_kiv_storage`, `tb_input_buffer`, `tb_output_buffer`,
    `tb_iface_control` and `tb_estream_interface` cover the interface. The
    last of these uses stand-in cores.

To change the radix of the Grain or Trivium slot, change its entry in
`estream_pkg::alg_radix`: the core instance in `estream_asic.sv` takes its
`RADIX` from there, and the buffers move the matching number of words. The
radix must divide the core's setup length (160 for Grain, 1152 for Trivium). The interface bus is 64 bits wide, so a slot can carry
at most 64 bits per step.
