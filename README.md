# PUF-keyed AES encryption device

This design encrypts and decrypts data with AES. It never stores a key and never receives one. Each chip instead derives its key from its own silicon. The key comes from 32 ring oscillators whose frequencies differ slightly from chip to chip, and from place to place on a chip. This is a ring-oscillator physically unclonable function (RO-PUF). A stabilising step turns these small frequency differences into a bit-string. The string repeats on the same chip and differs on any other chip. It is hashed into a 128-bit AES key.

The consequences:

- Data encrypted by one device can be decrypted by that device only.
- Nobody, including the owner, ever sees the key.
- There is no key memory and no error-correction helper data to attack.

A host PC talks to the device over a UART. It picks a mode, sends 128-bit blocks, such as the rows of a bitmap image, and reads the results back.

```
              +------------------------- puf_key_gen --------------------------+
              |  +---------------- ro_puf ----------------+                   |
  rings x32 --+->| counters -> diff_subtractor -> averager|-> stabilizer -> SHA-256 -> key[127:0]
              |  |        ^ puf_sequencer                 |                   |
              |  +----------------------------------------+                   |
              +-------------------------------------------------------------------+
                                                                   |
                                                            aes_key_expand (11 round keys)
                                                             |                 |
  uart_rxd -> uart_rx -> host_ctrl -> aes_encrypt --(loop)--> aes_decrypt
  uart_txd <- uart_tx <-     ^-------------- results -----------'
```

## Ring oscillators and counters

Each ring has a NAND enable gate and 16 inverters. On the FPGA each inverter sits in one LUT. The rings are placed by hand so that their layout is regular. The nominal frequency is about 102.5 MHz. Each ring drives its own 24-bit counter (`ro_counter`). The counter is clocked by the ring and cleared asynchronously.

`puf_sequencer` runs the measurement. For each sample it does the following:

1. Pulses the counter clear.
2. Enables all rings together for a counting window of `GATE_CYCLES` system clocks. The default is 20 ms at 100 MHz.
3. Stops the rings and waits `SETTLE_CYCLES` so the last ring edges have landed.
4. Strobes `sample`.

The counts are read only while the rings are stopped. So no synchroniser is needed between the 32 ring clock domains and the system clock. One count per 20 ms window equals a frequency resolution of 50 Hz.

`ring_oscillator.sv` is a **behavioural model**. A combinational loop with real gate delays cannot be written as synthesizable RTL. On an FPGA it would be a hand-placed instance chain. The model builds the ring's half period from four parts:

- a nominal stage delay of 287 ps × 17 stages, giving 102.5 MHz;
- a die-wide offset chosen by `DIE_SEED`;
- a per-ring offset chosen by `DIE_SEED`, `PLACE_SEED` and `RO_INDEX`, about ±10 % in frequency;
- a drift drawn each time the ring is enabled, up to ±`OP_VAR_PS`. At the default it is about 0.06 %, which matches the measured temperature and voltage noise.

The model is not synthesizable: it uses `$urandom_range` and delays. Lint and simulation accept it.

## Differences, averaging and stabilisation — the key extraction

An absolute ring frequency is dominated by the die-wide process corner. That corner shifts all rings together. So the design works on differences: `diff_subtractor` forms 31 signed values, df[i] = count[i] − count[i+1], from neighbouring rings. Neighbours share the same local environment, so temperature and voltage mostly cancel.

A single df still jitters in its low bits. Two measures remove the jitter:

1. **Averaging (`df_averager`).** It sums 2^M consecutive df vectors in signed accumulators of 24+M bits, then divides by cutting M bits (an arithmetic shift right). The divide costs nothing because the sample count is a power of two. The default M = 10 averages 1024 samples.
2. **Cutting unstable bits (`stabilizer`).** It drops the N_EX least significant bits of every averaged df and keeps the upper CNT_W − N_EX bits. The default N_EX = 15 keeps 9 bits of each value. The 31 values are concatenated, with df[0] as the most significant, into a 279-bit string.

Averaging shrinks the noise by about √(2^M). So with averaging, fewer low bits need to be cut for the string to repeat exactly, and the string gets longer.

This is the part to adjust on real silicon. N_EX and M trade string length against the risk that a value lies close to a multiple of 2^N_EX and flips between extractions. The design has no error correction, so that risk is real.

The most exposed case is a pair of rings with almost equal frequencies. Their average then sits near zero. Between −1 and 0 every kept bit changes, and no amount of averaging helps. A chip with such a pair produces an unstable key. Before deploying a chip, check that repeated extractions give the same key. This is what the stability testbench does.

The defaults follow the values the method was characterised with: N_EX = 15 and M = 10.

`sha256_hash` hashes the bit-string. It handles one 512-bit block, with the padding wired in, so the string may be at most 447 bits. It runs one round per clock, which is 64 cycles. The top 128 bits of the digest are the AES key (`puf_key_gen`). The hash spreads every bit of the string over the whole key.

At the defaults one key extraction takes 1024 × 20 ms ≈ 20.5 s.

## AES engines

Both engines use AES-128 with one round per clock:

- `aes_key_expand` computes the 11 round keys once per new key. It takes 10 cycles and holds the keys in registers.
- `aes_encrypt` and `aes_decrypt` share those round keys. Each takes a block on `start` and returns the result with `done` exactly 10 cycles later.
- Decryption is the straightforward inverse cipher. It uses the round keys in reverse order, with InvShiftRows, InvSubBytes and InvMixColumns.

The S-box is computed, not stored. It is the GF(2^8) inverse (a^254, modulo x^8+x^4+x^3+x+1) followed by the standard affine map. `aes_pkg` documents the formulas.

## Host link and commands

The UART runs 8N1 with `CLKS_PER_BIT` = 868 clocks per bit, which is 115200 baud at 100 MHz. `uart_rx` samples mid-bit after a two-flop synchroniser and flags a bad stop bit. `uart_tx` has a valid/ready input.

`host_ctrl` decodes the commands below. The constants are in `host_cmd_pkg`.

| Host sends | Device does | Device answers |
|---|---|---|
| `'M'` then mode byte | sets mode: 0 encrypt, 1 decrypt, 2 loop (encrypt, then decrypt the ciphertext) | `'A'`, or `'N'` for an unknown mode |
| `'K'` | re-runs the whole PUF extraction and loads the new key | `'A'` once the new key is in use |
| `'B'` then 16 bytes, most significant first | processes the block in the current mode | 16 result bytes |

Before the first key is ready, blocks wait. After reset the device extracts its key on its own. `key_ready` and `keygen_busy` show the key state on pins.

Loop mode follows the encrypted-data path from the encryption engine to the decryption engine. A block returned unchanged shows that both engines agree. Decrypt mode is how data encrypted elsewhere is tested: it comes back as noise unless it was encrypted with this device's key.

To send an image, the host removes the bitmap header, cuts the pixels into 16-byte blocks, sends them one by one and rebuilds the image from the answers. That host software is not part of this RTL. The end-to-end testbench contains a small model of it.

## Where this design departs from or fills in the method

- **Bit-string length.** Published results for this method give 136 stable bits without averaging and 238 with averaging. Neither number is a multiple of 31. This design keeps all 31 × 9 = 279 upper bits, including sign and high bits that may be constant. The hash makes that harmless.
- **Sample count.** The averaging is specified as M = 10, and the method's characterisation also mentions 4,096 samples (M = 12). The default here is M = 10, and M is a parameter.
- **Hash and key size.** The method calls only for "a hash" and "AES". SHA-256 truncated to 128 bits, and AES-128, are this design's choices.
- **Own choices.** The clock rate, the settle time, the UART format, the command protocol and the bit order of the string are this design's own.
- **LUT-RAM.** The reference FPGA build used 256 LUT-RAM cells. This design keeps every accumulator in flip-flops.
- **No raw readout.** Characterising a PUF usually means reading raw ring counts out to a PC. This device has no such path: the raw differences reach no further than the `ro_puf` boundary. Add a debug command in `host_ctrl` only for characterisation builds.
- **Placement.** Manual placement of the rings cannot be expressed in RTL. In simulation a different placement is a different `PLACE_SEED`.

## Simulating

Every module except the small S-box wrapper has a self-checking testbench in `tb/<module>_tb.sv`. Each one prints `TB_RESULT checks=… failures=…` and contains a watchdog. Compile with the packages first:

```
verilator --binary --timing -Wno-fatal --top-module puf_aes_top_tb \
  rtl/aes_pkg.sv rtl/sha256_pkg.sv rtl/host_cmd_pkg.sv -y rtl tb/puf_aes_top_tb.sv
./obj_dir/Vpuf_aes_top_tb
```

What the testbenches check:

- **AES.** FIPS-197 vectors, and five vectors computed independently, in both directions. They also check the 10-cycle latency.
- **SHA-256.** Message lengths of 24, 279 and 447 bits.
- **PUF chain.** The chain is checked at reduced sizes against counts computed from the ring model's own periods.
- **End to end (`puf_aes_top_tb`).** It builds three devices: A (die 1, place 1), B (die 2) and C (die 1, place 2). It checks the following:
  - Device A encrypts reference blocks to the ciphertext expected for its key.
  - A re-derived key on A gives the same results.
  - Device B and device C both fail to recover A's data.
  - Loop mode returns the block unchanged.
  - A bad mode is refused.
  - Blocks sent before the key is ready wait.
- **Stability (`puf_stability_tb`).** One device derives its key 16 times with the ring drift switched on. It uses 20 µs windows, M = 4 and N_EX = 8. The raw differences change in almost every window, yet every key and ciphertext matches the first. The test also checks the extraction time against the number of windows. The die used has every ring-pair difference at least 10 counts from a cut boundary. With a different `DIE_SEED` (7, for example) one pair sits on the sign boundary, and the key flips between two values.

The full parameter set cannot be simulated in reasonable time, because one extraction is 20.5 s of device time. The largest configuration simulated end to end is the one in the stability test:

- the full 32 rings of 16 inverters at their real ~100 MHz;
- the full SHA-256 and AES-128;
- a 2,000-cycle (20 µs) counting window;
- 16-bit counters;
- M = 4 and N_EX = 8;
- 4 clocks per UART bit.

The other end-to-end test uses a 200-cycle window, 12-bit counters, M = 2 and N_EX = 2.

The averager alone was simulated at M = 10 with 31 lanes of 24 bits.

Two lint findings stand and are explained in the module headers:

- The ring model's delay is computed at run time, so lint cannot prove it is never zero.
- Verilator reports the reset and counter-clear nets as used both synchronously and asynchronously. This comes only from the assertions that watch them.
