# A 4-bit cipher built from reconfigurable reversible gates

This design encrypts and decrypts 4-bit words with a key-selected
permutation built only from reversible logic gates. The building block is the
**reconfigurable reversible gate (RRG)**. It is a 12-line reversible circuit
made of Fredkin and Toffoli gates. Five of its lines carry a configuration
that picks one of the 32 positive-polarity NCT gates on four lines (NOT,
CNOT, Toffoli and 4-input Toffoli) and applies that gate to the four data
lines. A cascade of 16 RRGs, configured by an 80-bit main key, is the
encryption cipher. The same RRGs in reverse order form the decryption cipher.
Every NCT gate is its own inverse, so the reversed cascade undoes the forward
one under the same key.

```
            key_in/key_load
                  |
          +----------------+
          | key_register   |  80 bits = 16 stages x 5 configuration bits
          +----------------+
             |          |
   pt_in -> enc_cipher (RRG 0, 1, ..., 15) -> ct_out
   ct_in -> dec_cipher (RRG 15, 14, ..., 0) -> pt_out
```

## The reconfigurable reversible gate

The RRG's lines are numbered as follows. The SystemVerilog uses this numbering
throughout, and bit *i* of a line word is line *i*.

| lines | meaning |
|-------|---------|
| 0..4  | configuration K0..K4. They pass through unchanged. |
| 5..7  | ancillas. They enter at 1 and leave at 1. |
| 8..11 | data X0..X3 in, Y0..Y3 out |

The RRG has thirteen gates in a mirror-symmetric cascade:

| gate | type | control(s) | acts on |
|------|------|-----------|---------|
| B0 | Fredkin | K0 | swaps X2, X3 |
| B1 | Fredkin | K0 | swaps X0, X1 |
| B2 | Fredkin | K1 | swaps X1, X3 |
| B3 | Toffoli | K2 (positive), X0 (negative) | inverts ancilla 5 |
| B4 | Toffoli | K3 (positive), X1 (negative) | inverts ancilla 6 |
| B5 | Toffoli | K4 (positive), X2 (negative) | inverts ancilla 7 |
| B6 | 4-input Toffoli | ancillas 5, 6, 7 (positive) | inverts X3 |
| B7..B9 | repeat B5, B4, B3 | | restore the ancillas to 1 |
| B10..B12 | repeat B2, B1, B0 | | put the data lines back in order |

The swaps B0 to B2 steer the data line that should be the target onto
position X3. They also place the other three data lines on positions X0 to
X2. After B3 to B5, each ancilla holds `NOT Kj OR data`. A configuration bit
of 0 thus forces its ancilla to 1, which takes that line out of B6's control
set. A configuration bit of 1 passes the data value through. B6 therefore
behaves as a Toffoli gate whose controls are the enabled data lines. The
mirror half puts everything else back. The net effect on the data is one
positive-polarity NCT gate:

| K1 K0 | target | data line enabled by K2 | by K3 | by K4 |
|-------|--------|-----|-----|-----|
| 0 0 | X3 | X0 | X1 | X2 |
| 0 1 | X2 | X1 | X0 | X3 |
| 1 0 | X1 | X0 | X3 | X2 |
| 1 1 | X0 | X1 | X2 | X3 |

The target is inverted when all enabled controls are 1. K2 = K3 = K4 = 0
gives a NOT gate, one bit set gives a CNOT, two give a Toffoli gate and three
give a 4-input Toffoli gate. Together that is 4 + 12 + 12 + 4 = 32 distinct
gates. No configuration is the identity. The table follows from the gate
list, and `rrg_tb` checks it exhaustively.

## The cipher cascades

`enc_cipher` chains 16 RRGs. Stage *i* is configured by key bits
`[5i+4:5i]`, and stage 0 sees the plaintext first. `dec_cipher` uses the same
key word but gives stage *s* the bits of encryption stage 15-*s*. Both
cascades thread the key and ancilla lines through every stage, as a reversible
circuit must. Their ancilla outputs are brought out, and in correct operation
they are all ones. A network of NCT gates on four lines can realise any
permutation of the 16 data values. Optimal circuits need at most 15 gates,
and the cascade has 16 stages. Since no RRG configuration is the identity, a
shorter circuit fits directly only if the stages left over can be filled with
pairs of equal gates, which cancel.

The data paths are purely combinational and 16 RRGs deep. Nothing is
pipelined.

## Main key register

`key_register` holds the 80-bit key. Each bit is a D flip-flop whose
next-state logic is a single Fredkin gate on (load, stored bit, new bit).
With load = 1 the gate swaps the two bit lines, so the flip-flop takes the
new bit. With load = 0 the stored bit goes back to the flip-flop. The key is
loaded in parallel on a rising clock edge while `key_load` is high. An
asynchronous active-low reset clears it to zero. The key changes only when it
is loaded. There is no circuit that modifies the key as data is encrypted,
because its function is not defined for this cipher.

## Top level: `rrg_crypto_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock and asynchronous active-low reset of the key register |
| key_load, key_in | in | 1, 80 | load a main key at the next rising edge |
| key_q | out | 80 | stored main key |
| pt_in / ct_out | in / out | 4 | encryption path |
| ct_in / pt_out | in / out | 4 | decryption path |
| enc_anc_o, dec_anc_o | out | 3 | ancilla outputs of the two cascades (3'b111 when healthy) |

A loaded key takes effect from the clock edge after `key_load`. The outputs
then follow the data inputs combinationally. An immediate assertion in the
top checks that the key lines leave both cascades unchanged.

## Files

- `rtl/rrg_pkg.sv`: sizes, line numbers and types shared by all modules.
- `rtl/fredkin_gate.sv`, `rtl/nct_gate.sv`: the Fredkin gate and the
  mixed-polarity NOT/CNOT/Toffoli gate, placed on an N-line word by
  line-number parameters. In `nct_gate`, a control index equal to N means the
  control is unused. `Ai = 1` makes control *i* negative.
- `rtl/rrg.sv`: the RRG, built from the two gate modules.
- `rtl/enc_cipher.sv`, `rtl/dec_cipher.sv`: the two cascades. The `STAGES`
  parameter defaults to 16.
- `rtl/key_register.sv`: the main key register. `KEY_W` defaults to 80.
- `rtl/rrg_crypto_top.sv`: the top level.
- `tb/rrg_ref_pkg.sv`: a reference model. It computes the RRG from the
  configuration table above rather than from the gate list, and builds both
  cascades on top of it.
- `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

## Simulating

All the testbenches run with the default sizes. For example, the end-to-end
test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/rrg_pkg.sv tb/rrg_ref_pkg.sv rtl/fredkin_gate.sv rtl/nct_gate.sv rtl/rrg.sv \
  rtl/enc_cipher.sv rtl/dec_cipher.sv rtl/key_register.sv rtl/rrg_crypto_top.sv \
  tb/rrg_crypto_top_tb.sv --top-module rrg_crypto_top_tb
./obj_dir/Vrrg_crypto_top_tb
```

`rrg_crypto_top_tb` loads 100 keys and encrypts all 16 plaintexts under each
one. It decrypts each ciphertext through the decryption path and compares
both directions with the reference model. It also changes `key_in` without
`key_load` and checks that nothing changes. Finally, it counts that every
gate kind (NOT, CNOT, Toffoli, 4-input Toffoli) was configured in some stage.
`rrg_tb` covers all 32 configurations × 16 data words. It checks that the 32
configurations are pairwise distinct and that they split 4/12/12/4 between
the gate kinds.

## How far to trust it, and where it departs

- The RRG's gate list, line numbers and polarities are the published ones.
  Nothing in them was guessed.
- The decryption cascade is the encryption cascade with its stage order
  reversed, driven by the same key. That is the whole specification of
  decryption, and the tests show it inverts encryption for every key tried.
- The key register's load interface, reset, and Fredkin-based next-state
  logic are this design's choices. The cipher only requires a register that
  holds the key. A circuit that changes the key during operation is part of
  the cipher's concept but is not defined, so it is not built.
- The original simulation screenshots of a single-RRG block cannot be
  produced by this RRG. They show k = 01111, x = 0110 giving y = 1100, and
  k = 01001, x = 1110 giving y = 0001, with the constant lines leaving as 011
  in decryption. A single RRG changes at most one data bit and always returns
  its constant lines to 1. This design follows the gate list, not those
  waveforms.
- Reversible-logic figures of merit such as quantum cost (79 for the RRG)
  have no meaning in this CMOS description and are not modelled. Synthesis
  maps the cascade to ordinary logic. It does not preserve reversibility
  gate by gate.
