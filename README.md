# Ring-oscillator PUF keyed AES-128

A chip that must encrypt with a secret key usually keeps that key in
non-volatile memory, where it can be read out. This design derives a
128-bit secret from the chip itself instead. Pairs of ring oscillators that
are drawn identically still run at slightly different frequencies after
manufacture. Comparing such pairs gives one bit per comparison. The bit is
stable on one chip and unpredictable from one chip to the next. This is a
ring-oscillator physically unclonable function (RO-PUF). Its 128-bit output
is XORed into every round key of an AES-128 key schedule, so one user key
encrypts differently on every chip. The secret exists only in flip-flops,
and only after a key generation has been run.

```
 keygen_start ─► puf_controller ─► challenge_gen ──CI[4:0], pair──┐
                     │  OSC_EN, clear, sample                     ▼
                     │                 ro_array (4 configurable ring oscillators)
                     │                        │ RO_F[3:0]
                     │                 ro_mux ── MUX1 ─► Counter1 ─┐
                     │                        └─ MUX2 ─► Counter2 ─┤
                     │                                     hw_comparator
                     │                                             │ response bit
                     └──────────────────────────────► response_stabilizer
                                                       (3-way vote, 128-bit key)
                                                                   │ puf_key
 aes_key_in ─► aes_key_expansion (Keygen1..10) ─► key_xor ◄────────┘
                                                    │ 11 chip-bound round keys
 pt ─────────────────────────────────────────► aes128_core ─► ct
```

## The configurable ring oscillator

Each oscillator (`hc_ro`) is a loop made of one leading NAND gate and five
*delay configurable units* (DCUs), in the order DCU-3, DCU-2, DCU-1, DCU-4,
DCU-2. The NAND's second input is `RO_EN`. With `RO_EN` low the NAND output
is 1, and the chain settles with `RO_F` high. With `RO_EN` high the loop
oscillates, because it contains an odd number of inverting units: the NAND,
DCU-3 and DCU-1.

A DCU has two gates and one configuration bit `CI`. Logically a DCU either
passes its input on or inverts it, whatever `CI` is. What `CI` changes is
whether the first gate lies on the signal path for one edge direction:

| unit  | first gate        | second gate            | logic  | `CI` adds a gate to          |
|-------|-------------------|------------------------|--------|------------------------------|
| DCU-2 | `AND(RO_I, CI)`   | `OR(first, RO_I)`      | buffer | falling edge (CI = 1)        |
| DCU-1 | `AND(RO_I, CI)`   | `NOR(first, RO_I)`     | invert | falling input edge (CI = 1)  |
| DCU-3 | `OR(RO_I, ~CI)`   | `NAND(first, RO_I)`    | invert | rising input edge (CI = 1)   |
| DCU-4 | `OR(RO_I, ~CI)`   | `AND(first, RO_I)`     | buffer | rising edge (CI = 1)         |

The DCU-2 structure is the published one. The other three are this
design's choice: they are built to be consistent with it and with the
odd-inversion rule. The five bits `CI[4:0]` (C1..C5 = `CI[0]`..`CI[4]`)
select up to 32 loop delays, and so up to 32 frequencies, from the same
gates. Different configurations route the signal through different gates.
That is why one oscillator pair yields many largely independent bits.

Ring oscillators have no synthesizable description, so `dcu`, `hc_ro` and
`ro_array` are **behavioural models** built from timed gates. Each gate's
delay is a nominal 120 ps plus a fixed offset of 0–19 ps. The offset is
drawn from a hash of (`SEED`, oscillator, gate), so one `SEED` value stands
for one manufactured chip. Each transition also gets 0–2 ps of random delay,
which models thermal noise. The loops are combinational loops on purpose,
and synthesis tools report them as such. On silicon or an FPGA these three
files would be replaced by hand-placed gates.

## From oscillator counts to one key bit

There are 128 challenges. A 7-bit challenge is split as `{pair[1:0], CI[4:0]}`:

* `CI` goes to all four oscillators.
* `pair = p` compares oscillator `p` (MUX1 → Counter1) with oscillator
  `(p+1) mod 4` (MUX2 → Counter2). Only these two oscillators are enabled.

Each evaluation of a challenge is sequenced by `puf_controller`:

| phase  | cycles | action                                                   |
|--------|--------|----------------------------------------------------------|
| CLEAR  | 1      | both counters cleared (asynchronously), oscillators off  |
| OSC    | 32     | `OSC_EN` high: the pair runs, the counters count edges   |
| SETTLE | 4      | oscillators off; their outputs return high and stay high |
| SAMPLE | 1      | the comparator result goes to the stabiliser             |
| CHECK  | 1      | the challenge advances once its vote is complete         |

The counters (`ro_counter`, 8 bits) are clocked directly by the selected
oscillator outputs. This is safe for the following reasons:

* The counters are cleared only while the oscillators are stopped.
* The counters are read only after the oscillators have stopped again, so
  their values are static in the system clock domain when they are read.
* A counter saturates at 255 rather than wrapping, so a fast oscillator
  cannot appear slow.

The window and the simulated gate delays keep the largest count near 222.

`hw_comparator` gives `agb`, `alb` and `aeb`. The response bit is `agb`:
1 when Counter1 counted more, 0 when it counted fewer or on a tie. The
comparator is a single MSB-first chain of about three gates per bit. It has
no subtractor.

`response_stabilizer` evaluates every challenge three times (`VOTES`). It
shifts the majority bit into the key register; the first challenge ends up
in bit 127. It also counts the challenges whose three evaluations
disagreed. The top brings that count out as `puf_disagree_count`, which
shows how close the chip's oscillators are to the noise floor. The count
reveals no key bit. Setting `VOTES = 1` turns the filtering off.

A key generation takes 128 × 3 × (1 + 32 + 4 + 2) = **14 976 cycles**,
counted from the clock edge that takes `keygen_start` to `key_ready`.

## Binding the key into AES

`aes_key_expansion` chains ten `aes_keygen_round` stages (Keygen1..Keygen10;
RotWord, SubWord, Rcon, XOR chain). This computes the full AES-128 schedule
of `aes_key_in` combinationally. The schedule is packed as 1408 bits with
round key *r* at `[128*r +: 128]`, so round key 10 is in the top bits.
`key_xor` XORs the 128-bit PUF key into each of the eleven round keys.
`aes128_core` then encrypts with these chip-bound round keys:

* In the cycle that takes `start`, it loads `pt ^ rk0`.
* It then applies rounds 1..10, one per cycle, in a single shared
  `aes_round`. The tenth round skips MixColumns.
* `ct_valid` pulses with `ct` ten cycles after the start cycle.

S-boxes are computed, not tabulated. Each is the GF(2^8) inverse, formed as
a^254 from six multiplications, followed by the affine map (`aes_pkg`).

The result is standard AES-128 under a key schedule that is no longer
derived from one 128-bit key. Only hardware holding both `aes_key_in` and
this chip's PUF key can decrypt. For example, user key
`0x000…0abc` has round key 10 = `b60f0604e259cec56e5e1bc43917cbb6`. With a
PUF key of `0808…08` it becomes `be070e0cea51c6cd665613cc311fc3be`. The
testbenches check exactly these values.

## Top-level interface (`puf_aes_top`)

| port                 | dir | width | meaning                                                |
|----------------------|-----|-------|--------------------------------------------------------|
| `clk`, `rst_n`       | in  | 1     | clock; asynchronous active-low reset                   |
| `keygen_start`       | in  | 1     | pulse: generate (or regenerate) the PUF key            |
| `key_ready`          | out | 1     | PUF key formed; stays high until the next generation   |
| `aes_key_in`         | in  | 128   | user key; hold stable while encrypting                 |
| `pt_valid`, `pt`     | in  | 1,128 | start an encryption; ignored before `key_ready` or while busy |
| `aes_busy`           | out | 1     | encryption in progress                                 |
| `ct_valid`, `ct`     | out | 1,128 | one-cycle pulse with the ciphertext; `ct` holds after  |
| `puf_disagree_count` | out | 8     | noisy challenges in the last key generation            |

Parameters: `N_RO` (4), `CNT_W` (8), `WINDOW_CYCLES` (32), `VOTES` (3) and
`SEED` (1, which simulated chip). The challenge width follows from the
128-bit key.

## What follows the published design and what does not

Taken from the published design:

* the five-stage hybrid configurable oscillator with a leading NAND, the
  DCU order and the odd-inversion rule;
* the DCU-2 gate structure;
* 5-bit `CI`;
* four oscillators per PUF;
* two multiplexers feeding two 8-bit counters and a comparator with
  `agb`/`alb`/`aeb` outputs;
* 128 sequential one-bit challenges concatenated into a 128-bit key;
* ten Keygen stages whose 1408-bit output is XORed with the PUF key
  repeated eleven times;
* a 10-round AES-128 encryption core.

Chosen here, because the source leaves them open:

* the gate structures of DCU-1, DCU-3 and DCU-4;
* the challenge encoding `{pair, CI}` and the pairing `p` vs `p+1`;
* powering only the selected pair;
* the whole controller: window, settle time and sequence;
* counter saturation;
* the tie rule (tie → 0);
* majority voting as the "filtering", with 3 votes;
* MSB-first key order;
* the AES handshake and one round per cycle;
* refusing to encrypt before a key exists;
* all delay numbers of the oscillator model.

Two points to be aware of:

* The published description also says the PUF key is used directly as the
  AES key. Its block diagram and its simulation results instead show the
  key XORed into the expanded round keys. This design does the latter.
* In the published simulation, the 128-bit PUF output is one byte repeated
  sixteen times. Here every one of the 128 bits comes from its own challenge.

No error correction or helper data is included. With noise, a regenerated
key can differ from the first in a few bits. The vote reduces this but does
not remove it. The included test accepts up to 6 differing bits between
generations, and the simulated chip shows 0.

## Simulating

All files are SystemVerilog 2017. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The two
packages in `rtl/` and the AES reference model must come first:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/aes_pkg.sv rtl/puf_pkg.sv tb/aes_ref_pkg.sv tb/tb_puf_aes_top.sv \
  --top-module tb_puf_aes_top -o sim && ./obj_dir/sim
```

`--timing` is needed for the oscillator models. Every module has its own
testbench, `tb/tb_<module>.sv`, built the same way:

* `tb_puf_aes_top`: the complete design at its default sizes. It checks
  that a plaintext is refused before a key exists and checks the 14 976-cycle
  key latency. Each key bit must match the vote over the observed counter
  comparisons. It runs seven encryptions against an independent AES model,
  with a plaintext offered while the core is busy. It regenerates the key
  and checks that disagreements are counted. This takes about a minute.
* `tb_ro_puf`: two chips (`SEED` 1 and 2). It checks uniqueness (about 59
  of 128 bits differ), repeatability and that only the selected pair runs.
* `tb_two_chip_keys`: two complete chips (`SEED` 1 and 2) given the same
  user key `0x000…0abc`. Each chip's 1408 round-key bits must equal the
  schedule XOR its own PUF key. The two chips must differ by exactly their
  PUF-key difference in every round key, and must give different
  ciphertexts for the same plaintext.
* `tb_ro_array`: the oscillator model. It checks enables, output held high,
  frequency range, and the effect of `CI` and of the chip.
* The AES blocks are checked against the FIPS-197 vectors and against
  `tb/aes_ref_pkg.sv`, which builds the S-box from log/antilog tables of
  generator 3.

## Files

`rtl/`:

* packages: `aes_pkg`, `puf_pkg`
* oscillator models: `dcu`, `hc_ro`, `ro_array`
* PUF: `challenge_gen`, `ro_mux`, `ro_counter`, `hw_comparator`,
  `response_stabilizer`, `puf_controller`, `ro_puf`
* AES: `aes_keygen_round`, `aes_key_expansion`, `key_xor`, `aes_round`,
  `aes128_core`
* top: `puf_aes_top`

`tb/` holds one testbench per module, the two-chip test `tb_two_chip_keys` and the reference package
`aes_ref_pkg`.
