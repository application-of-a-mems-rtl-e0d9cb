# STM-LFSR chaotic stream cipher with an accelerometer-seeded key

This is synthesizable SystemVerilog for a byte-wide stream cipher whose keystream comes from a
chaotic map, together with the true random number generator that makes its keys. It follows the
2017 article "Application of a MEMS-Based TRNG in a Chaotic Stream Cipher".

- **Keystream.** A Skew Tent Map (STM) is iterated in 64-bit fixed point. The least significant
  bit of every new value is XORed with the output of a 61st-order LFSR. This perturbation stops
  the finite-precision map from falling into short cycles.
- **Output.** Only the 8 lowest bits of each perturbed value leave the generator, so each clock
  gives one keystream byte to XOR with one data byte.
- **Key.** The key is the map parameter `gamma`, the start value `x0` and the LFSR seed `y0`:
  64 + 64 + 61 = 189 bits. It is drawn from the noise of a MEMS accelerometer at rest, whitened
  by SHA-512.

```
 accelerometer X,Y (8-bit samples from an external A/D)
        │
  X − Y ─► DC filter ─► sign ─► raw bits ─► SHA-512 ─► key {gamma, x0, y0}
                                                           │
                        ┌──────────────────────────────────┴──────────────┐
                        ▼                                                 ▼
   plaintext ─► [transmitter: generator ⊕ OUT] ─► ciphertext ─► [receiver: generator ⊕ OUT] ─► plaintext
```

The transmitter and receiver are the same block. XOR with the same keystream undoes itself, so
loading both ends with the same key is all it takes to decrypt.

## The perturbed skew tent map

The map on [0,1) is

    f(x) = x / gamma             for x <= gamma
    f(x) = (1 - x) / (1 - gamma) for x >  gamma

There is no divider in the datapath. `1/gamma` and `1/(1-gamma)` are computed once per key and
held for the whole session. Each iteration then needs one comparison, two multiplexers and one
multiplier (`skew_tent_map.sv`):

- the comparator `x <= gamma` picks the branch;
- one mux passes `x` or `1 - x`;
- the other mux passes `1/gamma` or `1/(1-gamma)`;
- the product is the next value.

**Number formats.** These are choices of this implementation; the article only says "64-bit
fixed point".

| quantity | format | note |
|---|---|---|
| `x`, `gamma` | unsigned Q0.64 | value = integer / 2^64 |
| `1 - x` | Q1.64 (65 bits) | |
| `1/gamma`, `1/(1-gamma)` | Q64.64 (128 bits) | `floor(2^128 / d)`; the integer part is needed because `1/gamma` can be as large as 2^64 |
| product | Q65.128 | truncated to Q0.64 |

A product of 1.0 or more can only come from the end point `x = gamma` (or from the reciprocal's
truncation there). It saturates to `1 - 2^-64`. In every other case the result is within
2^-63 of the exact map value.

**Perturbation** (`chaotic_generator.sv`). Let `s` be the map register and `y0` the LFSR's
current output bit. One iteration is:

    x_next  = f(s)
    x~      = x_next with bit 0 replaced by x_next[0] XOR y0
    ks      = x~[7:0]          -- keystream byte
    s      <= x~ ;  LFSR shifts once

The map register is loaded with `x0`, so `x0` itself is never output. The first keystream byte
is `f(x0)` with its LSB perturbed by the LSB of the LFSR seed. The article does not say how the
indices of `x` and `y` line up; this ordering is this implementation's choice.

**LFSR** (`lfsr61.sv`). It is a Fibonacci LFSR with feedback polynomial
`x^61 + x^5 + x^2 + x + 1`, shifting right and outputting bit 0. The article fixes only the order
(61). The polynomial is this implementation's choice.

- The polynomial is irreducible, and 2^61 − 1 is a Mersenne prime, so it is primitive and the
  period is the prime 2^61 − 1.
- A prime LFSR period is what guarantees that the perturbed map sequence has a period of at
  least 2^61.
- An all-zero seed would lock the register; it is replaced by 1.

**Rate.** The whole iteration (compare, multiply, perturb) is combinational between two
registers, so the generator gives one byte per clock. That is 8 bits/cycle: 1 Gbit/s at
125 MHz, or 1.072 Gbit/s at the 134 MHz the article reports for its FPGA implementation. This
RTL's own clock rate has not been measured. Its critical path is one 65×128-bit multiplication
plus a 64-bit compare and mux. That is wider than the article's implementation, which used
16 DSP blocks.

## Key set-up

`seed_load_i` does three things in the same clock:

- captures `gamma`;
- loads the map register with `x0` and the LFSR with `y0`;
- starts two `reciprocal_unit`s, one dividing by `gamma` and one by `1 - gamma` (the two's
  complement of `gamma`).

Each unit is a bit-serial restoring divider. It computes `floor(2^128/d)` in 129 cycles and
saturates the single case `d = 2^-64`. `ready_o` rises 131 clocks after the load edge and stays
high until the next load. A `gamma` of 0, which lies outside the map's domain, is replaced by
2^-64.

The article says only that the reciprocals are precalculated when the cipher is initialised.
The serial divider is the smallest circuit that does that. A faster key set-up could swap in any
divider with the same start/done interface.

## Transmitter and receiver

`stream_cipher.sv` wraps the generator with the XOR and the registered output stage.

- **Interface.** `in_valid_i` carries one byte per cycle. Each accepted byte consumes one
  keystream byte, and `out_data_o` and `out_valid_o` follow one clock later.
- **Gaps.** An idle cycle does not advance the keystream. Gaps in the stream are therefore
  allowed, as long as both ends see the same sequence of bytes.
- **Before a key.** Bytes must not be offered while `ready_o` is low. An assertion reports it,
  and such bytes are not processed.

## Seed generator

`seed_generator.sv` is the digital half of the random number generator. Its input is one pair
of signed 8-bit samples of the X and Y axes per `sample_valid_i`. The article sampled at
0.1 to 250 kSps; any rate up to one pair per clock works. The stages are:

1. **X − Y** (9 bits, registered). This removes noise common to both axes.
2. **DC filter** (`dc_filter.sv`). A running mean `m`, with 16 fraction bits, is subtracted
   from each sample: `d = s − m`, then `m += d >>> 8`. This is an exponential average with a
   time constant of about 256 samples. The output keeps the fraction bits, so an exact zero is
   rare. The article says only that the DC level is removed. This filter is this
   implementation's choice.
3. **Sign** (`sign_detector.sv`). Computes `(1 + sign(d)) / 2`: 1 for `d >= 0`, 0 for `d < 0`.
   The formula gives ½ for zero; here zero maps to 1.
4. **Conditioning** (`seed_conditioner.sv`, `sha512_core.sv`). On `key_req_i`:
   - 1024 raw bits are gathered, first bit into the most significant bit of the first message
     byte. `MSG_BLOCKS` sets a multiple of 1024.
   - The block is hashed, then the standard SHA-512 padding block for a 1024-bit message.
   - The key is cut from the digest: `gamma = digest[511:448]`, `x0 = digest[447:384]`,
     `y0 = digest[383:323]`.

   Message length and key layout are this implementation's choices. The SHA-512 core follows
   FIPS 180-4 and runs one round per clock: 81 cycles per block, including the final addition.

Raw bits are taken only while the conditioner is gathering. The filter keeps running on every
sample so that its mean is settled when a key is requested. With one sample pair per clock, a
key is ready about 1024 + 170 cycles after the request, and both cipher ends are usable
131 cycles after that.

The accelerometer (an ADXL335) and its A/D converter are analog parts outside this RTL. Their
samples are ports of the top. The article also proposes three ways to keep motion out of the
noise: generating keys only at rest, a high-pass signal path, and the sensor's self-test pin.
None of them is specified, so none is implemented. `key_req_i` is the hook for the first.

## Top level: `stm_lfsr_cryptosystem`

The top holds one seed generator and two cipher ends. A `key_valid_o` pulse loads the new key
into both ends at once, which is how the article tested the link. In a real link the key would
reach the receiver over a separate secure channel, so it is also output on `key_o`. The
ciphertext path between the ends is left to the user: `tx_data_o`/`tx_valid_o` out,
`rx_data_i`/`rx_valid_i` in.

A new `key_req_i` re-keys both ends when its key arrives. Each end's `ready` drops for the
131-cycle reciprocal set-up. Bytes already encrypted under the old key stay valid.

## Files

| file | contents |
|---|---|
| `rtl/stm_cipher_pkg.sv` | widths (64-bit map, 61-bit LFSR, 8-bit bytes), types, key struct `seed_t` |
| `rtl/sha512_pkg.sv` | SHA-512 constants and round functions |
| `rtl/skew_tent_map.sv` | map register, comparator, muxes, multiplier |
| `rtl/reciprocal_unit.sv` | serial divider for `1/gamma`, `1/(1-gamma)` |
| `rtl/lfsr61.sv` | 61-bit LFSR |
| `rtl/chaotic_generator.sv` | map + LFSR + reciprocals + key set-up control |
| `rtl/stream_cipher.sv` | XOR and output register (transmitter or receiver) |
| `rtl/dc_filter.sv`, `rtl/sign_detector.sv` | noise front end |
| `rtl/sha512_core.sv`, `rtl/seed_conditioner.sv` | whitening and key extraction |
| `rtl/seed_generator.sv` | X − Y, filter, sign, conditioner |
| `rtl/stm_lfsr_cryptosystem.sv` | top |

All registers reset asynchronously (`rst_n` low). After reset both cipher ends wait for a key.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. The expected values come from models that are
independent of the RTL:

- **SHA-512:** the published FIPS 180-4 examples.
- **Reciprocals:** wide-integer bounds `q·d <= 2^128 < (q+1)·d`.
- **Map:** exact fixed-point results and a real-number check of the map equation.
- **LFSR:** the polynomial's recurrence, plus an irreducibility test of the polynomial done in
  the testbench.
- **Keystreams and keys:** an arbitrary-precision software model of the whole chain, whose
  results are built into the testbenches as constants.

The top-level testbench runs the design at its default parameters. It covers:

- two keys from pseudo-noise samples;
- about 140 bytes encrypted, with idle gaps and back-to-back bursts;
- the ciphertext looped into the receiver;
- a re-key in mid-stream, with the sender stalled while the new reciprocals are computed.

It counts each of these events and fails if one never occurs. It also checks every ciphertext
and recovered byte.

`tb/tb_image_encryption.sv` runs the kind of evaluation the article reports. It builds the whole
system at default parameters, makes a key from pseudo-noise samples, and encrypts a 128×128
synthetic 8-bit grey image at one pixel per clock. Its checks:

| check | result |
|---|---|
| rate | 16384 pixels in 16384 consecutive clocks |
| decryption | every pixel recovered |
| correlation, original vs. encrypted | −0.011 (article's test image: 0.0020) |
| correlation, adjacent encrypted pixels | −0.009 (original image: 0.9999) |
| histogram chi-square, 255 degrees of freedom | 295 for the encrypted image, 13834 for the original |
| keystream monobit balance | 65370 ones in 131072 bits |
| key sensitivity | keystream bits that change when the LSB of `gamma`, `x0` or `y0` is flipped: 50.1 %, 49.7 %, 50.9 % |

Simulation with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/stm_cipher_pkg.sv rtl/sha512_pkg.sv tb/tb_stm_lfsr_cryptosystem.sv \
    --top-module tb_stm_lfsr_cryptosystem -Mdir obj
./obj/Vtb_stm_lfsr_cryptosystem
```

Replace the testbench name to run another one. Every testbench finishes in seconds.

## How far to trust it, and where it departs from the article

- The keystream is bit-exact only with respect to this implementation's own choices listed above:
  number formats, truncation, index pairing, LFSR polynomial and key layout. Another
  implementation of the same article will produce a different keystream for the same key.
- The article's resource figures (805 LUTs, 16 DSPs, 70 registers in its comparison table,
  40 in its conclusions) describe its FPGA build. This RTL keeps both 128-bit reciprocals and a
  serial divider per end and was not mapped to an FPGA, so those figures do not apply.
- Not implemented: the accelerometer, the A/D converter, the motion-rejection options, and the
  secure channel (e.g. RSA) for carrying the key to a remote receiver.
- Statistical quality (NIST SP 800-22) was not re-tested on this RTL's output.
