# Image cryptology with reversible logic gates

This design encrypts a stream of 8-bit image pixels, one per clock. It uses a
short chain of reversible logic gates (CNOT, HNG and Peres) and a key from a
small LFSR that can run with XOR or XNOR feedback. It decrypts them again with
the inverse chain. Each gate maps its inputs one-to-one onto its outputs, so
no information is lost on the way and every step can be undone. The only
secret is the key, which changes every clock cycle. The receiver recovers the
pixel if its LFSR was reset in the same cycle as the sender's and is clocked
alongside it.

The design follows a published FPGA design for an Artix-7 (XC7A35T) board. In
that design MATLAB converts the images to pixel values and back, and a VGA
monitor shows the encrypted and decrypted images. This repository has the
cipher hardware only. Image conversion, file I/O and the VGA display are not
included.

Be warned: this is a lightweight scrambler and not a vetted cipher. The key
stream is a 4-bit LFSR with period 15. Anyone who knows the structure can
decrypt the stream by trying the 15 key phases.

## The datapath, nibble by nibble

The pixel is split into an upper nibble, I[7:4], and a lower nibble, I[3:0].
Each nibble goes through four steps. The two halves mirror each other:

```
upper nibble                               lower nibble
I7 I6 ─ CNOT ─┐                            I3 I2 ──────────┐
I5 I4 ────────┴─ HNG ─ XNOR key ─┐         I1 I0 ─ CNOT ─┴─ HNG ─ XNOR key ─┐
              lines 7,6,5 ─ Peres ─ O7 O6 O5       line 3 ─────────────── O3
              line 4 ──────────────  O4            lines 2,1,0 ─ Peres ─ O2 O1 O0
```

In detail:

| step | upper nibble | lower nibble |
|------|--------------|--------------|
| CNOT | (I7, I6) becomes (I7, I7^I6) | (I1, I0) becomes (I1, I1^I0) |
| HNG  | A,B = CNOT outputs; C = I5; D = I4 | A = I3; B = I2; C,D = CNOT outputs |
| key  | XNOR with key[3:0]; key[3] on the top line | the same key, the same way |
| Peres | on lines 7..5; line 4 goes straight to O4 | line 3 goes straight to O3; Peres on lines 2..0 |

Both nibbles use the same 4-bit key in a given cycle.

Decryption runs the same steps in reverse order: inverse Peres, XNOR with the
key, inverse HNG, then CNOT. XNOR with the same key undoes itself, and so does
CNOT. Peres and HNG are not their own inverses, so the decryptor uses separate
inverse gates:

| gate | forward | inverse |
|------|---------|---------|
| CNOT | P=A, Q=A^B | the same gate |
| HNG  | P=A, Q=B, R=A^B^C, S=((A^B)&C)^(A&B)^D | A=P, B=Q, C=R^P^Q, D=S^((P^Q)&C)^(P&Q) |
| Peres | P=A, Q=A^B, Z=(A&B)^C | A=P, B=P^Q, C=Z^(A&B) |

Note that ((A^B)&C)^(A&B) is simply the majority of A, B and C. So the HNG
output S is D XOR majority(A,B,C). That is why D can always be recovered.

### About the HNG gate

The original description states the fourth HNG output as (A^B)&(C^A)&(B^D).
That function is not reversible: whenever A equals B it is 0, whatever D is,
so the decryptor could not get D back. This RTL uses the standard HNG gate
from the reversible-logic literature, S = ((A^B)&C)^(A&B)^D, instead. Two
facts support the choice. It makes the cipher invertible. And it reproduces,
bit for bit, every cipher value of the published simulation (pixel 00110111
under keys 1110, 1111, 1101 and 1001 gives 00100110, 00110111, 00010100 and
010100xx). With the formula as written, the upper nibble of none of those
values comes out right. The testbenches check these published values.

## The key generator (runtime LFSR)

`rlfsrl` is a Fibonacci shift register with a cascade of two-input gates over
the tapped stages. Each gate in the cascade is an XNOR followed by an inverter
that can be switched in or out. The `xor_sel` input does the switching:

- `xor_sel = 1`: every gate acts as XOR.
- `xor_sel = 0`: every gate acts as XNOR.

The mode can change in any cycle, hence "runtime". The original describes the
switch as two tri-state buffers and an inverter, a cheaper substitute for a
multiplexer. Here it is a plain 2:1 choice per gate, which synthesis turns into
the same logic.

The module's defaults are the original's 8-bit example:

- taps on stages 4, 5, 6 and 8 (x^8+x^6+x^5+x^4+1);
- start state 8'hEC;
- period 255 in both modes.

The cipher itself uses a 4-bit instance, because the original's encryption
diagrams, simulation and register count all show a 4-bit key. Its setup:

- taps on stages 3 and 4 (x^4+x^3+1);
- start state 4'b1110;
- stage s[3] (stage 1) through s[0] (stage 4) read out as the key
  {s[1], s[2], s[3], s[0]}.

With these choices the key after reset runs 1110, 1111, 1101, 1001, 0001, ...
(period 15), which matches the published key trace. The original does not
state the taps, the start state or the readout order. Any other maximal-length
4-bit LFSR would work just as well, as long as both ends agree. The three
constants sit in `icrlg_pkg`.

Each mode has a lock state, where the register stays for ever:

- In XOR mode the lock state is all zeros.
- In XNOR mode with an even number of taps it is all ones. That state is on
  the XOR-mode cycle (key 1111).

If `xor_sel` drops to 0 while the 4-bit register holds 1111, the key stays
stuck at 1111 until reset. Nothing in the hardware prevents this.

## Timing and interface

Only the LFSR is registered. Cipher and plaintext are combinational in the
pixel and the current key, so there is no latency: a pixel applied in a cycle
is encrypted with that cycle's key. The key advances on every rising clock
edge while `rst` is low.

`icrlg_top` puts the encryptor and the decryptor back to back, as in the
original's top level. They share `clk`, `rst` and `xor_sel`, so their two LFSRs
stay in step. An assertion checks that the two keys are equal every cycle.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock |
| rst | in | 1 | synchronous, active high; both keys restart at 1110 |
| xor_sel | in | 1 | LFSR feedback: 1 = XOR (matches the published trace), 0 = XNOR |
| pixel_in | in | 8 | plain pixel |
| cipher_out | out | 8 | encrypted pixel |
| pixel_out | out | 8 | decrypted pixel, equal to pixel_in |
| enc_key, dec_key | out | 4 | key of the current cycle on each side |

The original brings out 18 pins: 8 in, 8 out, clock and reset. The cipher,
key and mode ports here were added for observation and control.

To split the design across two devices, use `icrlg_encrypt` on one and
`icrlg_decrypt` on the other. Drive both with the same `xor_sel` and release
their resets on the same clock edge. Any delay on the cipher link has to be
matched by delaying the decryptor's reset and clock enable (not provided).

## Files

| file | content |
|------|---------|
| rtl/icrlg_pkg.sv | widths, pixel/nibble/key types, the key LFSR constants and readout |
| rtl/cnot_gate.sv, hing_gate.sv, peres_gate.sv | forward reversible gates |
| rtl/hing_gate_inv.sv, peres_gate_inv.sv | their inverses, for decryption |
| rtl/xnor_key.sv | 4-bit XNOR with the key |
| rtl/rlfsrl.sv | runtime LFSR (WIDTH, TAPS, SEED parameters) |
| rtl/icrlg_encrypt.sv, icrlg_decrypt.sv | the two nibble datapaths plus their own key LFSR |
| rtl/icrlg_top.sv | encryptor and decryptor back to back |
| tb/icrlg_ref_pkg.sv | reference model: bit equations, a Galois form of the key sequence, and decryption by search |
| tb/tb_*.sv | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. Each one has
a cycle watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/icrlg_pkg.sv tb/icrlg_ref_pkg.sv tb/tb_icrlg_top.sv --top-module tb_icrlg_top
./obj_dir/Vtb_icrlg_top
```

To run a different testbench, replace `tb_icrlg_top` with its name. Lint with
`verilator --lint-only -Wall -Irtl rtl/icrlg_pkg.sv rtl/icrlg_top.sv`. The
package's unused-parameter warnings on the gate modules are harmless.

What the testbenches cover:

- Gates: every input pattern, checked against independently written equations
  and checked for being one-to-one. Each inverse is checked against the forward
  reference equations.
- `tb_rlfsrl`: the 8-bit default (start state EC, every step, period 255 in
  both modes, random run-time mode switches). The 4-bit key instance: the
  published key trace and period 15.
- `tb_icrlg_encrypt` and `tb_icrlg_decrypt`: the published plaintext/cipher
  pair, and all 256 pixels under all 15 keys, in both modes for decryption.
- `tb_icrlg_top`: the published example, then three 64x48 synthetic frames:
  - one in XOR mode;
  - one in XNOR mode;
  - one with random run-time mode switches and a mid-frame reset.

  Every cycle it checks cipher, keys and recovered pixel. It also counts that
  each mechanism occurred: both modes, mode switches, resets, all 15 keys, and
  ciphers that differ from the pixel. The top has no parameters, so this is
  also the full-size run. It takes well under a second.

## Where this RTL departs from the original

- The HNG output S is the standard reversible form, not the formula as printed
  (see above).
- The decryption side uses inverse Peres and inverse HNG gates. The original
  draws the same gate blocks on both sides, but only the inverses undo the
  encryption.
- The 4-bit key LFSR's taps, start state and readout order, and the
  synchronous active-high reset, are this design's choices. They reproduce the
  published key trace.
- The gate port order is chosen so that the published cipher values come out.
  That order is: CNOT control on the upper line, HNG inputs A to D from top to
  bottom, key bit 3 on the top line of each nibble.
- Extra observation and control ports on the top (cipher, both keys, xor_sel).
- Not included:
  - MATLAB image conversion and text-file I/O;
  - the VGA display of encrypted and decrypted images. Its resolution, timing
    and image memory are not specified.

For size: the original reports 4 slice registers and 7 LUTs on the
XC7A35T. This RTL has two 4-bit LFSRs (8 flip-flops; a synthesis tool may
merge the identical pair) and roughly 30 two-input XOR/AND cells per direction.
