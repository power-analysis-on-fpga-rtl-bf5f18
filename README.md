# Classic McEliece decryption target for power analysis

This design decrypts Classic McEliece ciphertexts of the `mceliece348864`
parameter set (field GF(2^12), code length n = 3488, t = 64 correctable errors)
on an FPGA, with a register interface to a host on a USB bus and a trigger
output for an oscilloscope or capture board. Its purpose is power-analysis
research: the host loads a secret key and a ciphertext, starts one decryption,
records the power drawn while the hardware works, and reads back the plaintext.
The decryption runs in a clock domain of its own, separate from the bus clock,
so that the capture can be clocked in step with the computation.

A ciphertext is the 768-bit syndrome `c = H_pub * e` of a 3488-bit plaintext `e`
of weight 64. The decryption turns it back into `e` using the secret key, which
is made of a Goppa polynomial `g(x)` of degree 64 and a support: a list of 3488
distinct field elements `alpha_0 .. alpha_3487`.

## Decryption core: five steps

`decryption_core` runs the steps one after the other. A shared `step` output
says which step is active:

| step | unit | what it computes | cycles (defaults) |
|---|---|---|---|
| 1 `STEP_EVAL_G` | `poly_evaluator` | `g(a)` for all 4096 field elements `a`, written into `fft_memory` | 1050 |
| 2 `STEP_SYNDROME` | `double_syndrome` | `S_j = sum over c_i = 1 of alpha_i^j / g(alpha_i)^2` for j < 128 | 4 + 130 * ceil(ones / 20) + A |
| 3 `STEP_BM` | `bm_decoder` | the error locator polynomial sigma (degree <= 64) from the 128 syndromes | 1921 |
| 4 `STEP_EVAL_ELP` | `poly_evaluator` again | `sigma(a)` for all field elements, overwriting `fft_memory` | 1050 |
| 5 `STEP_LOCATE` | `error_locator` | `e_i = 1` where `sigma(alpha_i) = 0` | 3498 |

Each step hand-over adds one cycle. A whole decryption takes about 10,200 cycles.
An assertion in the core checks that no two units are ever busy at once. The
syndrome and locator steps rely on that to share the support-memory and table
read ports.
Step 2 depends on the data: for a typical ciphertext with about 380 ones it takes
about 2,500 cycles.

### Why the syndrome is "double"

The ciphertext is only 768 bits long. It is treated as a received word
`(c | 0)` of length 3488 whose first 768 positions are `c`. This works because
the public key is systematic: its first 768 columns form the identity.
Syndromes of this word, taken with respect to `g(x)^2` (2t = 128 of them, not
t = 64), let a plain Berlekamp-Massey decoder correct all 64 errors of a binary
Goppa code. `error_recovered` is the error vector of that word, which is the
plaintext.

### Field and support encoding

The field is GF(2)[z]/(z^12 + z^3 + 1). All arithmetic is in `mce_pkg`
(`gf_mul`, `gf_sq`, `gf_inv`). A 12-bit support entry `k` stands for the field
element whose coefficient bits are the bits of `k` in reverse order
(`support_to_gf`). For example, the integer 1 is z^11. The FFT memory is indexed
by the integer `k`, not by the field element:

* element `k` of the table sits in row `k[11:5]` (128 rows),
* at bits `[12*k[4:0] +: 12]` of that 384-bit row.

Software that builds keys for this hardware must use the same bit-reversed
convention.

### Polynomial evaluator

`poly_evaluator` runs 256 Horner evaluators side by side, one per element of a
group of 8 memory rows. A group takes 65 cycles: one to load the leading
coefficient and 64 multiply-accumulate steps. The finished group is copied into
an output buffer and written to the table one row per cycle while the next
group is being computed. With 16 groups an evaluation takes 1050 cycles. The
core switches the coefficient input between `g(x)` (step 1) and the error
locator polynomial (step 4). This is a direct evaluator, not an additive FFT
(see "Differences" below). `GROUP` trades its size against its speed: with
`GROUP = 1` it has 32 evaluators and takes 8322 cycles.

### Double syndrome: scan, block buffer and engine

This is the part whose timing leaks the most about the input, so its structure
matters for the power traces.

* **Scan.** A scanner walks the ciphertext from bit 767 down to bit 0, one bit
  per cycle. For every bit that is 1 it issues a read of support point `i` and
  of the table row holding `g(alpha_i)`. Bits that are 0 cost one cycle and
  cause no memory access.
* **Block buffer.** A three-stage read pipeline turns each issued read into the
  pair `(alpha_i, 1/g(alpha_i)^2)` and puts it into a buffer of 20 entries.
* **Engine.** When the buffer is full, or the scan has ended, an engine of 20
  lanes takes the whole block. Over 128 cycles it accumulates
  `w * alpha^j` into a rotating register of the 128 syndromes. With the two
  hand-over cycles that makes 130 cycles per block.
* **Stall.** While the engine works, the scanner stalls as soon as the buffer
  fills again.

So the step lasts one block time per 20 ones. On top of that comes `A`, the
number of bits the scan needs to find the first 20 ones.

### Berlekamp-Massey decoder

`bm_decoder` is the inversion-based Berlekamp-Massey algorithm. It runs exactly
2t = 128 iterations, whatever the data, and every iteration takes 15 cycles:

* 4 cycles to compute the discrepancy, with 20 multipliers;
* 6 cycles for the quotient `d/b`, computed with a single multiplier. It
  builds `b^-1 = b^4094` from the chain `b^3, b^15, b^255, b^1023, b^2047`,
  where each link squares the previous value a few times and multiplies once.
  The last cycle squares once more and multiplies by `d`;
* 4 cycles for the polynomial update, with 20 multipliers;
* 1 cycle to step on.

Whether the length and auxiliary polynomial are updated is a multiplexer
choice made in every iteration, so the schedule never depends on the data. The result is returned reversed: `elp[i]` is the
coefficient of `x^(64-i)` of the connection polynomial. Its roots are then the
error positions themselves, which include the field element 0. The locator
therefore handles a zero support point like any other.

### Error locator pipeline

For each support index `i = 0 .. 3487` one point is read per cycle:

1. read `P_OUT = k_i`;
2. read table row `k_i[11:5]`;
3. register the 384-bit row;
4. halve it five times: bit `k_i[4]` picks 192 of the 384 bits, then `k_i[3]`
   picks 96, and so on down to 12 bits. A set bit selects the upper half.
5. test the remaining 12 bits for zero;
6. shift the result in at the least-significant end of a 3488-bit register.

After all points have passed, `error_recovered[3487 - i] = e_i`. The step takes
3498 cycles: 3488 points plus the pipeline depth.

## Memories

All three key and ciphertext memories are true dual-port RAMs (`dual_port_ram`).
Their write port is 8 bits wide on the bus clock. Their read port is on the
decryption clock.

* `poly_g_memory` uses four RAMs. Address bits `[6:5]` pick the RAM and `[4:0]`
  the byte. Each read port reads row 0 (256 bits) all the time, giving the
  780-bit `poly_g`: g_i in bits `[12i +: 12]`, with g_64 = 1.
* `ciphertext_memory` uses three RAMs in the same way, giving the 768 bits.
* `support_memory` uses two 4096 x 8 RAMs. A write with byte-address bit 0 clear
  goes to the low RAM (bits 7:0 of the point); with bit 0 set it goes to the high
  RAM (bits 11:8). The row is `addr[12:1]`, so a point is written as two
  consecutive bytes, low first. A read returns `P_out` one cycle after
  `P_rd_en`.
* `output_multiplexer` returns byte `k` of the plaintext as bits `[8k+7 : 8k]`
  of `error_recovered`, or 0 past the last byte (436 bytes).
* `fft_memory` is the 128 x 384-bit table written by the evaluator and read by
  steps 2 and 5.

## Register interface

`usb_interface` takes a 21-bit bus address:

* `[20:13]` is the register number;
* `[12:5]` is a bank of 32 bytes;
* `[4:0]` is the byte within the bank.

Each register can thus hold up to 8192 bytes. Reads return data two `usb_clk`
cycles after the strobe. `decryption_register` implements this map:

| reg | name | access | contents |
|---|---|---|---|
| 0x00 | CLKSETTINGS | r/w | 8 bits, brought out as `clk_settings` |
| 0x01 | USER_LED | r/w | 8 bits, brought out as `user_led` |
| 0x02 | CRYPT_TYPE | r | constant (parameter) |
| 0x03 | CRYPT_REV | r | constant (parameter) |
| 0x04 | IDENTIFY | r | constant (parameter) |
| 0x05 | CRYPT_GO | r/w | write bit 0 = 1 to start; bit 1 = trigger mode; reads `{mode, busy}` |
| 0x0B | BUILDTIME | r | 4 bytes (parameter) |
| 0x0C | P_MATRIX_IN | w | support, 2 bytes per point, low byte first (6976 bytes) |
| 0x0D | POLY_G_IN | w | Goppa polynomial, byte address = bit offset / 8 (98 bytes) |
| 0x0E | CIPHER_IN | w | ciphertext, byte k = bits 8k+7..8k (96 bytes) |
| 0x0F | REC_ERR_OUT | r | plaintext, byte k = bits 8k+7..8k (436 bytes) |

Registers 0x06 to 0x0A are not used and read as 0.

### Clock crossing and trigger

* **Start.** A write to CRYPT_GO toggles a flag in the bus domain. The flag
  crosses through two flip-flops, and an edge detector makes the one-cycle
  `start` in the decryption domain.
* **Status.** `busy` and the trigger mode cross back and forth through two
  flip-flop synchronisers.
* **Trigger**, in the decryption domain:
  * mode 0: high from `start` until the decryption ends, covering the whole
    decryption;
  * mode 1: high only during step 5, 3499 cycles. A capture of the last step at
    six samples per clock then needs about 21,000 samples.

## Differences from the published design

The architecture above follows the published design in these points: the block
structure, the memory organisation, the register map, the five steps with a
shared evaluator, the data-dependent double-syndrome schedule with blocks of 20,
and the error-locator pipeline. The following departs from it:

* **Evaluator.** The published evaluator is an additive FFT taking 1095 cycles
  per polynomial. Its insides are not described. Here a 256-lane Horner
  evaluator stands in and takes 1050 cycles. It is larger than an FFT would
  be, and its power profile differs. The published design parameters for the additive FFT
  (a section count of 4 and a factor of 0) have no counterpart here.
* **Berlekamp-Massey.** The published decoder's insides are not described.
  The schedule here (4 + 6 + 4 + 1 cycles per iteration) reproduces its
  published 1921 cycles. Its two multiplier-count parameters (20 and 20) are
  used for the discrepancy and update phases.
* **Double syndrome.** The fixed overhead is 4 cycles here, against 14 in the
  published timing formula. The rest of the formula (130 cycles per block of
  20 ones, plus the scan time to the first block) is the same.
* **Total time.** A decryption takes about 10,150 cycles for a ciphertext of
  typical weight (about 380 ones), close to the published figure of about
  10,200. A whole-decryption capture at two samples per clock then fits in a
  24,400-sample buffer for any ciphertext of up to about 700 ones. Step 5 takes exactly the published 3498 cycles, so a
  last-step capture at six samples per clock needs 20,988 samples, as
  published.
* **Additions.** A synchronous reset and the `step` output of the core are
  additions, and so is the mode-1 trigger. In the published setup the trigger
  always follows the start of decryption. A last-step capture there is placed
  by delaying the capture board by the summed cycle counts of steps 1 to 4.
  Mode 1 gives the same window without that arithmetic.
* **Unspecified details.** The bus strobe timing and the register constants
  (CRYPT_TYPE, CRYPT_REV, IDENTIFY, BUILDTIME) are choices of this design.

Nothing here protects against the power analysis it is built to study. The
scan, in particular, reads memory only for ciphertext ones by design.

## Files

| file | role |
|---|---|
| `rtl/mce_pkg.sv` | field arithmetic, step enum, register numbers |
| `rtl/mce_top.sv` | top: USB interface, register block, decryption module |
| `rtl/usb_interface.sv`, `rtl/decryption_register.sv` | bus decode, register map, CDC, trigger |
| `rtl/decryption_module.sv` | memories, core and output multiplexer |
| `rtl/poly_g_memory.sv`, `rtl/ciphertext_memory.sv`, `rtl/support_memory.sv`, `rtl/dual_port_ram.sv`, `rtl/output_multiplexer.sv` | memories |
| `rtl/decryption_core.sv` | step sequencer and sharing |
| `rtl/poly_evaluator.sv`, `rtl/fft_memory.sv`, `rtl/double_syndrome.sv`, `rtl/bm_decoder.sv`, `rtl/error_locator.sv` | the five steps |
| `tb/tb_mce_pkg.sv` | reference field arithmetic, random key generation and encryption for the testbenches |
| `tb/tb_<unit>.sv` | one self-checking testbench per unit |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops. It has a
watchdog. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
  rtl/mce_pkg.sv tb/tb_mce_pkg.sv tb/tb_mce_top.sv --top-module tb_mce_top
./obj_dir/Vtb_mce_top
```

### Test keys

The testbenches make their own keys, since no key files are shipped:

* A random permutation of the 4096 field elements gives the support: its first
  3488 entries.
* `g(x)` is the product of `(x - a)` over 64 of the remaining elements. It is
  square-free and has no root on the support. This is a valid Goppa polynomial
  for decoding, though not the irreducible polynomial a real key would use.
* The testbench builds the parity-check matrix from the key. It then solves for
  a ciphertext that matches a random weight-64 plaintext, using Gauss-Jordan
  elimination on the first 768 columns.

### What is tested

* `tb_mce_top` drives the whole design through the bus, at the full parameter
  set. It loads a key and ciphertext, starts a decryption, polls busy, reads
  back all 436 plaintext bytes and compares them. It does this in both trigger
  modes. It counts each mechanism and fails if one never happened: busy while
  polling, both trigger modes, scan stalls on a full block buffer, a partial
  last block, and an error at the zero field element. It runs in about a second.
* `tb_decryption_core` checks each step's cycle count.
* The unit testbenches check against the reference arithmetic in
  `tb_mce_pkg.sv`.
