# PUF key generator with per-chip PUF placement

A physical unclonable function (PUF) turns the random manufacturing
variation of one chip into bits that no other chip reproduces. That makes it a
source of device-unique secret keys that needs no non-volatile key storage.
PUF bits are noisy, though. Each reading differs from the last in a few
percent of its bits, so an error-correcting code must sit between the PUF and
the key. That code is expensive, and its cost rises steeply with the PUF's
bit error rate (BER).

This design cuts that cost by being selective about *where* the PUF cells go.
On an FPGA the reliable and unreliable PUF sites differ from chip to chip, and
within a chip they show no spatial pattern. So no fixed placement can avoid
the bad sites. Instead, each chip's candidate sites (2080 of them) are measured
once, and the PUF cells are placed only on that chip's most reliable sites.
This brings the BER from about 4 % down to below 1 %. At that BER a
BCH(127, 64, t = 10) code reaches a key failure rate under 10^-6, and each
127-bit PUF block carries 64 key bits. With placement that ignores the chip, a
BCH(127, 29, t = 21) code is needed: more than twice the PUF bits per key bit,
and a larger decoder.

The RTL here implements the key generator in that configuration:

* a bank of Anderson PUF cells placed at per-chip sites;
* toggle flip-flops next to each cell as a switching-noise source;
* a code-offset fuzzy extractor with a BCH(127,64,10) encoder and decoder;
* a helper-data memory.

The default key is 256 bits (4 code blocks, 508 PUF cells). 56-bit and 128-bit
keys are parameter values.

## Binding a key to the PUF: the code-offset construction

The key is cut into 64-bit segments X_i; the last one is padded with zero bits
(a 56-bit key uses one block). Segment i owns 127 PUF bits, W_i.

* **Enrollment** (once, in a trusted setting). The key segment is encoded,
  `C_i = BCH(X_i)`, and the helper word `H_i = C_i xor W_i` is stored. H_i is
  public. As long as W_i is secret it says nothing about C_i, and so nothing
  about the key.
* **Generation** (every power-up in the field). A fresh reading W'_i gives
  `H_i xor W'_i = C_i xor (W_i xor W'_i)`. That is the codeword with the PUF
  bits that flipped since enrollment showing up as bit errors. The BCH decoder
  removes up to 10 of them per block and returns X_i. A block with more than
  10 flips is reported as `fail`.

The PUF is read once per operation, and all 508 bits are used. At the end of
an operation the controller clears its copies of the key and of the PUF
reading. The key stays only in `key_out`.

## The PUF cell, and how far its model can be trusted

`anderson_puf_cell` is a **behavioural model**. It is not synthesizable and
has no timing meaning. In silicon, the cell is two LUTs used as 16-bit shift
registers, loaded with 0101… and 1010…. Their outputs drive two carry-chain
multiplexers five LUT positions apart. Every clock both outputs switch, and
whether a short glitch reaches the capture flip-flop depends on which path is
faster. That is a race between analog delays, so the model replaces it with
arithmetic. The shift registers are kept, and they gate when a race happens:

```
skew   = sum over the 4 carry stages of (hash(DEVICE_SEED, site, stage) mod 1024) - 512
J      = 60 + 8 * (number of aggressor flip-flops that toggled this clock)
jitter = U[-J, J] + U[-J, J]              (fresh every clock, from $urandom)
q      = (skew + jitter >= 0)
```

* `skew` is fixed for a (chip, site) pair. It is uncorrelated between chips
  and between neighbouring sites, which matches how real per-site BERs
  behave.
* A site with |skew| > 200 can never flip, while a site near zero skew flips
  often.
* The noise constants were chosen so that, with all five aggressors toggling,
  the mean BER over all 2080 sites is about 4 %. Readings of two different
  chips differ in roughly half their bits.
* Only these statistics come from measurement, so treat the model as a source
  of realistic test data. It does not predict any real device.

`tb/tb_puf_characterization.sv` measures the model on four chips, reading all
2080 sites 100 times. It gives these figures, next to those reported for
7-series silicon:

| figure | model | silicon |
|--------|-------|---------|
| mean per-site BER | 4.2 % | 4.2 % |
| within-class distance, 128-bit PUF | 7.7 bits | 5.3 bits |
| between-class distance, 128-bit PUF | 63.8 bits | 62.0 bits |
| Pearson correlation of per-site BER between chips | −0.013 … 0.035 | −0.020 … 0.018 |

The within-class distance compares two readings of the same 128-bit PUF on
the same chip; the between-class distance compares the same PUF on two
different chips. Spatial autocorrelation (Moran's I) is not measured, because
the row and column geometry of the sites is not modelled.

`puf_array` instantiates the cells. `loc_map[i]` names the site of cell i.
On an FPGA that choice is made by placement constraints in a per-chip
bitstream, not by logic. Here it is a static input, so that one netlist can be
simulated with any placement. It must not change during an operation.

`toggle_noise` provides five toggle flip-flops per PUF bit, toggling on every
clock while `noise_en` is high. They stand for a busy application that shares
the fabric. In the model, their transitions widen the PUF jitter.

### Choosing the placement

Site selection happens outside the hardware. `tb/tb_puf_keygen_top.sv`
shows the flow:

1. Read a 520-cell bank on each quarter of the 2080 sites, 64 times each, with
   the aggressors running.
2. Count each site's minority bit; that count is its error count.
3. Sort the sites by error count, and put the 508 best into `loc_map`.

On the default chip (seed `32'h1234_5678`), 424 of the 2080 sites flipped
during measurement and none of the chosen sites did. Over 12 key
generations, the chosen sites needed 4 corrected bits in total, while sites
0..507 needed 307, an observed BER of about 5 %.

## BCH(127, 64, 10)

* **Field and code.** The field is GF(2^7) on p(x) = x^7 + x^3 + 1.
  The generator g(x) is the product of the distinct minimal polynomials of
  α^1 … α^20. There are nine of them, because α^9 and α^17 share one, so
  deg g = 63 = n − k. It is stored as `BCH_GEN = 64'hA1AB_815B_C7EC_8025`, where
  bit j is the coefficient of x^j. Codeword bit i is the coefficient of x^i.
  The message sits in bits [126:63] and the parity in bits [62:0].
* **Encoder** (`bch_encoder`). A bit-serial division LFSR, taking one message
  bit per clock, MSB first. It is 63 flip-flops plus XORs at the taps of g(x).
* **Decoder** (`bch_decoder`). Three serial stages:
  1. *Syndromes*, S_j = r(α^j) for j = 1…20, by Horner's rule on one received
     bit per clock, all 20 in parallel (127 clocks).
  2. *Error locator*, by inversionless Berlekamp–Massey, one iteration per
     clock (20 clocks). Λ(x) is updated as γΛ(x) + δ·x·B(x), so no field
     inversion is needed. Scaling Λ does not move its roots.
  3. *Chien search*, over 127 clocks. Register j starts at Λ_j and is
     multiplied by α^−j every clock. Their sum at clock i is Λ(α^−i), and a
     zero flips bit i.

  If the number of roots found differs from deg Λ, the word had more than 10
  errors and `fail` is set.

The decoder is area-lean, not fast. A key generator runs once per power-up,
so latency matters little.

## Operation and timing

Clocks are counted from the edge that samples `start` to the clock on which
`done` is high. PUF evaluation is 4 clocks.

| operation | clocks | 256-bit key | 128-bit | 56-bit |
|-----------|--------|-------------|---------|--------|
| enrollment | 7 + 68 · blocks | 279 | 143 | 75 |
| generation | 7 + 279 · blocks | 1123 | 565 | 286 |

Per block, the encoder takes 66 clocks and the decoder 276. The rest is
controller handshaking.

Top-level interface (`puf_keygen_top`):

* **Key operations.** Pulse `start` with `op` set while `busy` is low:
  * `OP_ENROLL` takes the key from `key_in` and writes the helper data.
  * `OP_GENERATE` returns `key_out`, with `key_valid` high when every block
    decoded and `fail` high when some block had more than 10 errors.
  * `err_count` and `err_max` report the total number of corrected bits and
    the worst block; they are useful for monitoring the PUF's health.
* **Helper data.** `host_en`, `host_we`, `host_addr`, `host_wdata` and
  `host_rdata` read or write the helper memory while the generator is idle.
  This is how helper data is saved to, and restored from, off-chip storage.
  Read data appears one clock after the request.
* **Placement and noise.** `loc_map` holds the per-chip placement and
  `noise_en` enables the aggressors.
* **Reset.** Asynchronous, active low (`rst_n`), throughout. The helper memory
  is not reset.

## Files

| file | contents |
|------|----------|
| `rtl/bch_pkg.sv` | GF(2^7) arithmetic, g(x), code sizes |
| `rtl/keygen_pkg.sv` | operation type `op_e` |
| `rtl/anderson_puf_cell.sv` | PUF cell, behavioural model |
| `rtl/puf_array.sv` | PUF bank with per-cell site selection and evaluation sequencing |
| `rtl/toggle_noise.sv` | aggressor toggle flip-flops |
| `rtl/bch_encoder.sv`, `rtl/bch_decoder.sv` | the code |
| `rtl/helper_mem.sv` | helper data storage |
| `rtl/fuzzy_extractor.sv` | enrollment / generation controller |
| `rtl/puf_keygen_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_keygen_key_sizes` (56- and 128-bit builds) and `tb_puf_characterization` (reliability and uniqueness over four chips) |
| `tb/bch_tb_pkg.sv`, `tb/puf_tb_pkg.sv` | independent reference models used by the testbenches |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Testbenches that take their block's default parameters are named after the
block. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/bch_pkg.sv rtl/keygen_pkg.sv tb/bch_tb_pkg.sv tb/puf_tb_pkg.sv \
  --top-module tb_puf_keygen_top -o sim && ./obj_dir/sim
```

Replace the top module to run another testbench.

* `tb_puf_keygen_top` runs the whole design at its default parameters in
  well under a minute. It covers characterization, variation-aware
  enrollment and generation, helper export and restore, a generation with
  the aggressors off, detection of tampered helper data, and default
  placement. It counts each of these events and fails if one never happens.
* The encoder and decoder testbenches compare against a whole-word
  polynomial division and direct syndrome evaluation.
* The PUF testbenches predict stable sites from the skew formula.

Everything except the PUF cell model is synthesizable. A synthesis run of the
top level needs a black box or a real PUF macro in place of
`anderson_puf_cell`.

## Where this design departs from, or goes beyond, its source

* **PUF cell.** The cell is a statistical model, with noise magnitudes
  chosen to reproduce a ~4 % mean BER. It is not a gate-level carry-chain
  circuit with real delays.
* **Placement.** Placement is a run-time input (`loc_map`) instead of a
  per-chip bitstream. Characterization and site selection are done in the
  testbench, not in hardware.
* **Microarchitecture.** The BCH encoder and decoder structure, the field
  polynomial, the helper memory and its host port, the zero padding of short
  keys and the controller sequencing are choices of this design.
* **Key derivation function.** A function to whiten a biased PUF output is
  not included.
* **Baseline code.** The BCH(127,29,21) code for chip-agnostic placement is
  not included: it is the baseline that this approach replaces.
* **LUT counts.** Published LUT counts (about 1250 LUTs for the BCH logic
  and about 250–1150 LUTs of PUF per key) come from a 7-series FPGA
  implementation. This RTL has not been mapped to an FPGA, so they are not
  reproduced here. A generic synthesis gives about 330 flip-flops for the
  encoder, 770 for the decoder and 2030 for the whole fuzzy extractor. The
  extractor figure includes the 508-bit PUF register and the 256-bit key
  registers.
