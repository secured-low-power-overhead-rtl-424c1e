# AES-128 with a power-balanced, compensated look-up-table S-Box

This is an iterative AES-128 encryption core whose S-Boxes are built to
resist correlation power analysis (CPA). In a CPA attack, the attacker
correlates the measured supply current with a model of the data being
processed. The S-Box is the usual target, because what it dissipates
depends on its input byte. This core uses two measures against that, both
inside the S-Box:

1. **A look-up table read through AND gates and an OR tree.** The S-Box is
   a 256-byte table (ROM). No multiplexer tree reads it. An 8-to-256
   decoder enables the one row of AND gates that holds the wanted entry,
   and a balanced tree of 2-input OR gates, eight levels deep, collects
   that entry. Every input value goes through the same depth of logic. In
   each level exactly one OR gate carries the value and all other gates
   stay at 0.
2. **A compensator.** A second copy of that multiplexing circuit works on
   complemented signals: the inverted table entries, in reverse order, and
   the inverted input byte. Its output is therefore always the bitwise
   complement of the S-Box output. The true circuit and its complement
   together carry the same number of ones and zeros for every input. This
   evens out the switching activity, much as a dual-rail logic style does,
   but only the multiplexing circuit is duplicated. The table itself is a
   constant and only leaks statically, so it is shared.

The hiding works only in the physical implementation. In simulation, the
compensator shows up only as an extra output, `D(x) = ~S(x)`, that nothing
else uses.

## The S-Box in detail (`lut_sbox`)

```
            x ──────────────┬───────────────────────────────┐
                            │                               │ invert
                     ┌──────▼──────┐                  ┌─────▼──────┐
                     │ 8-to-256    │                  │ 8-to-256   │
                     │ decoder     │                  │ decoder    │
                     └──────┬──────┘                  └─────┬──────┘
                            │256 one-hot                    │256 one-hot
 ┌──────────┐ A0..A255 ┌────▼─────┐  8 levels of  ┌───┐     │
 │ 256-byte ├──────────► AND rows ├──2-input OR──►│ S │     │
 │ ROM      │          └──────────┘               └───┘     │
 │          │  entry k inverted, to position 255-k  ┌───────▼──┐  8 OR  ┌───┐
 │          ├──────────────────────────────────────►│ AND rows ├───────►│ D │
 └──────────┘                                       └──────────┘ levels └───┘
```

* **ROM.** It holds `S(x)` for all 256 `x`, and all 256 entries are wired
  side by side into the multiplexing circuits. The contents are not read
  from a file. `aes_pkg::build_sbox_lut()` computes them at elaboration
  from the AES definition: the inverse in GF(2^8) (polynomial 0x11b,
  computed as x^254, with 0 giving 0), then the affine map
  `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. The
  hardware never runs this arithmetic.
* **Decoder (`onehot_decoder`).** Line *i* is high when the input equals *i*.
* **AND/OR circuit (`andor_mux`).** Each table bit has one AND gate, enabled
  by its entry's decoder line. The 256 gated entries feed a binary tree of
  255 2-input OR gates (8 levels). In the code, the tree is a heap-ordered
  array: node *k* is the OR of nodes *2k+1* and *2k+2*, the leaves are the
  AND outputs, and node 0 is the result. An assertion checks that the
  enables are one-hot. If they were not, the output would be the OR of
  several entries.
* **Compensator (`sbox_compensator`).** Input position *k* of the second
  circuit receives `~A(255-k)`. Its select is `~x`. It therefore
  outputs `~A(255-~x) = ~A(x) = ~S(x)`. It has its own decoder, driven by
  the inverted input.
* **Alternative circuit (`mux4_tree`).** With `ARCH = SBOX_MUX4`, both the
  true circuit and the compensator use four levels of 4-to-1 multiplexers
  instead. Level 1 selects with `x[1:0]`, level 4 with `x[7:6]`. This
  form is smaller, but its switching still depends on how the input changes.

`keep` attributes are set on the table bus, the OR tree nodes and the
compensator's inverted signals. Without them, synthesis would simply
fold the balanced structure back into an ordinary multiplexer. Whether the
structure survives depends on the tool and the target. On an FPGA, also
check that the compensator outputs are not optimised away.

### Configurations

`ARCH` and `COMPENSATE` are parameters of `lut_sbox`. They are passed down
from `aes_round`, `aes_key_expand` and the top `aes128_enc`.

| `ARCH`       | `COMPENSATE` | S-Box                                        |
|--------------|--------------|----------------------------------------------|
| `SBOX_ANDOR` | 1 (default)  | AND/OR circuit with compensator (main design) |
| `SBOX_MUX4`  | 1            | 4-to-1 multiplexer tree with compensator      |
| `SBOX_ANDOR` | 0            | AND/OR circuit only; `d` is 0                 |
| `SBOX_MUX4`  | 0            | multiplexer tree only; `d` is 0               |

In a published CPA evaluation of these S-Box styles on an FPGA, the
compensated AND/OR version needed the most traces to break all 16 key bytes
(about 140,000). The compensated multiplexer version needed about 65,000,
the uncompensated versions about 14,000, and a computational (composite
field) S-Box only about 450. The compensated AND/OR version also roughly
doubled the power of the uncompensated one. These are measured results of
that evaluation, not of this RTL.

## The AES-128 core (`aes128_enc`)

The core follows the usual iterative flow. The plaintext is XORed with the
key (the initial AddRoundKey) and passes through a 2-to-1 multiplexer into
the state register. Then one round is computed per clock. The multiplexer
feeds each round's result back until the tenth round, which skips
MixColumn.

* `aes_round` uses 16 `lut_sbox` instances (SubBytes), ShiftRow (wiring,
  `aes_pkg::shift_rows`), `aes_mix_columns` and the round-key XOR. Its input
  `final_round` bypasses MixColumn.
* `aes_key_expand` derives round key *r* from round key *r-1* and the round
  constant. It has four more compensated S-Boxes for SubWord. The core keeps
  only the previous round key and the round constant (1, 2, 4, ... 0x36,
  advanced with `xtime`), so the key schedule is computed on the fly, in
  the same clock as the round that uses it.
* Byte order is the FIPS-197 order. The first byte of a block or key is in
  bits 127:120. The state is column-major: byte *k* is row *k mod 4*,
  column *k/4*.

### Interface and timing

| port           | dir | width | meaning |
|----------------|-----|-------|---------|
| `clk`, `rst_n` | in  | 1     | clock; asynchronous active-low reset |
| `start`        | in  | 1     | take `plaintext` and `key` on this clock edge if not busy |
| `plaintext`    | in  | 128   | block to encrypt |
| `key`          | in  | 128   | cipher key |
| `busy`         | out | 1     | rounds in progress; `start` is ignored |
| `done`         | out | 1     | one-clock pulse, `ciphertext` valid |
| `ciphertext`   | out | 128   | result, held until the next encryption completes |
| `sbox_dummy`   | out | 128   | compensator outputs of the 16 state S-Boxes |
| `key_dummy`    | out | 32    | compensator outputs of the 4 key-schedule S-Boxes |

If `start` is taken at clock edge 0, `busy` is high during the ten round
clocks and `done` rises after edge 10. The encryption therefore takes 10
clocks after the load. Another `start` may be given in the same cycle as
`done`, so blocks can follow each other every 10 clocks. The critical path
is one complete round. It runs through the decoder, one AND gate, eight OR
levels, MixColumn and the key XOR. The key-schedule S-Box path runs
beside it.

The dummy outputs exist only to keep the compensators in the netlist. In
every busy cycle, `sbox_dummy` is the complement of SubBytes applied to the
current state. Leave them unconnected outside the chip, or route them to
pins that nothing uses.

## What is specified and what is chosen here

The architecture fixes these parts: the 256-byte table, the 8-to-256
decoder, the AND gates, the eight levels of 2-input OR gates, the
complementary compensator on the multiplexing circuit only (with inverted
input and reversed, inverted table entries), the alternative four-level
tree of 4-to-1 multiplexers, and the AES flow (initial key addition, 2-to-1
multiplexer, nine full rounds, a final round without MixColumn).

These are choices of this implementation:

* one round per clock, with the key schedule computed on the fly;
* protected S-Boxes in the key schedule as well;
* the start/busy/done handshake and the asynchronous reset;
* the dummy output ports;
* the select-bit order of the multiplexer tree;
* the byte order;
* computing the table at elaboration instead of storing it.

Only encryption with a 128-bit key is built. There is no decryption, and
there are no 192- or 256-bit keys.

What the RTL cannot show is the security property itself. That depends on
placement, routing and glitches, and a two-state logic simulator sees
none of them. Functionally, the design is verified to be standard AES.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`. The testbenches are compared against
`tb/aes_ref_pkg.sv`, a separate AES model. It builds the S-Box by searching
for inverses and applying the affine map bit by bit, and it keeps the state
as an unpacked byte array. Published FIPS-197 values are checked as well.

| testbench | what it checks |
|-----------|----------------|
| `tb_onehot_decoder` | all 256 select values |
| `tb_andor_mux`, `tb_mux4_tree` | every select on random tables |
| `tb_sbox_compensator` | `d = ~lut[x]` for both circuit styles |
| `tb_lut_sbox` | all 256 inputs against the reference; `d = ~s`; S and D always hold eight ones together; all four configurations |
| `tb_aes_mix_columns` | published columns, random states |
| `tb_aes_key_expand` | all ten round keys; FIPS-197 round keys 1 and 10; dummy outputs |
| `tb_aes_round` | FIPS-197 round 1; random full and final rounds |
| `tb_aes128_enc` | FIPS-197 C.1 and B, 20 blocks under a fixed key, 20 random keys; 10-clock latency; dummy outputs every round; start while busy; back-to-back starts; reset in mid-encryption |
| `tb_aes128_enc_variants` | the three other configurations side by side with the default: 200 random blocks and keys, latency, dummy outputs |
| `tb_cpa_trace_workload` | 140,000 encryptions under one key, as in a CPA campaign; every ciphertext; the 128 + 32 ones balance in every round |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes128_enc.sv \
    --top-module tb_aes128_enc -y rtl -y tb +libext+.sv
./obj_dir/Vtb_aes128_enc
```

The 140,000-block workload takes about half a minute. All other tests
finish in well under a second.

## Files

`rtl/aes_pkg.sv` holds the types, the S-Box table function, ShiftRow and
MixColumn. The remaining files in `rtl/` hold one module each:
`onehot_decoder`, `andor_mux`, `mux4_tree`, `sbox_compensator`, `lut_sbox`,
`aes_mix_columns`, `aes_key_expand`, `aes_round`, and the top,
`aes128_enc`.
