# Self-Immunity: a 64-bit register that stores its own ECC in bits it does not need

Soft errors, bits flipped by particle strikes, are a growing problem for
register files. Register files are accessed constantly, and a corrupted value
spreads quickly through the rest of a processor. The usual fix is a full ECC
on every register. That costs extra storage bits, plus an encode on every
write and a check on every read.

Self-Immunity uses a simple observation: most values held in a 64-bit register
are small. If the top 12 bits of a value are zero, the value fits in 52 bits,
and the 12 idle bits can hold an error-correcting code for it. A one-bit flag
per register, **self-pi**, records whether the word currently carries its own
ECC:

| value written          | self-pi | stored word                                  | protected |
|------------------------|---------|----------------------------------------------|-----------|
| fits in 52 bits        | 1       | `{6'b0, check[5:0], value[51:0]}`            | yes       |
| needs more than 52 bits| 0       | the value unchanged                          | no        |

The encoder runs only for values that fit. The decoder runs only for words with
self-pi = 1. Wide values bypass both and are stored and read unprotected. This
is the design's trade-off: no extra storage except one flag bit, and less
encoder/decoder activity, in exchange for leaving wide values unprotected.

This RTL implements one such register, with its write path and read path, as
a synthesizable SystemVerilog design.

## Structure

```
                 +---------------- encoder_stage ----------------+   +------- decoder_stage -------+
 input_data ---->| upper_zero_check --> self-pi ----+             |   |                             |
   [63:0]        |        |                         v             |   |  ecc_decoder --+            |
                 |        +--enable--> ecc_encoder --> write_mux -+-->| (enable=self-pi)  read_mux-->|--> output_data
                 |  (raw value) ------------------->  (sel=self-pi)|   |  (raw word) ----^  (sel=pi)  |     [63:0]
                 |                  protected_register (word+pi)  |   |   output register           |
                 +------------------------------------------------+   +-----------------------------+
```

| module               | role |
|----------------------|------|
| `selfimm_pkg`        | widths (64 / 52 / 12), Hamming check-bit count, shared types |
| `upper_zero_check`   | self-pi = 1 when `data[63:52]` is all zero |
| `ecc_encoder`        | Hamming check bits of `data[51:0]`; forms `{6'b0, check, data[51:0]}` |
| `write_mux`          | picks encoded word (self-pi = 1) or raw value (self-pi = 0) |
| `protected_register` | the 64-bit word and its self-pi flip-flop, with a soft-error model |
| `ecc_decoder`        | syndrome, single-bit correction, status flags |
| `read_mux`           | picks decoded value (self-pi = 1) or stored word (self-pi = 0) |
| `encoder_stage`      | write path: checker, encoder, write mux, register |
| `decoder_stage`      | read path: decoder, read mux, output register |
| `selfimm_top`        | encoder stage followed by decoder stage |

## The code in the upper bits

The code is a single-error-correcting Hamming code over the 52 payload bits.
Correcting one error among k data bits needs r check bits with
2^r >= k + r + 1. For k = 52 that gives r = 6, so only 6 of the 12 free bits are
used. Bits [63:58] of a protected word stay zero.

Think of the 58 code bits as positions 1 to 58:

* Positions 1, 2, 4, 8, 16 and 32, the powers of two, hold check bits c0 to c5.
  In the stored word these are bits [57:52].
* The other 52 positions (3, 5, 6, 7, 9, 10, ...) hold payload bits 0 to 51, in
  order. In the stored word these are bits [51:0].
* Check bit j is the XOR of every payload bit whose position has bit j set.
  Put another way, the XOR of the positions of all 1 bits in a valid codeword
  is zero.

On a read, the decoder recomputes the check bits and XORs them with the stored
ones. The result is the **syndrome**:

* `0`: no error.
* The position of a payload bit: that bit is flipped back, and `corrected`
  is raised.
* A power of two: a check bit was hit. The payload is already right, and
  `corrected` is raised.
* Greater than 58: this can only come from several upsets. `uncorrectable` is
  raised and the payload is passed on as stored.

Two upsets whose syndrome lands inside 1 to 58 are indistinguishable from a
single upset. They are miscorrected without warning. A plain Hamming code has
this limit.

An upset in bits [63:58] of a protected word changes nothing: the decoder
never looks at them, and the value it returns always has zero upper bits.

## Timing and interface of `selfimm_top`

| port            | dir | width | meaning |
|-----------------|-----|-------|---------|
| `clock`         | in  | 1     | rising-edge clock |
| `reset`         | in  | 1     | asynchronous, active high; clears the register, self-pi, output and flags |
| `load`          | in  | 1     | write `input_data` on this edge |
| `input_data`    | in  | 64    | value to write |
| `seu_mask`      | in  | 64    | soft-error model: stored bits to flip on an edge with `load` = 0 |
| `seu_pi`        | in  | 1     | soft-error model: flip the stored self-pi |
| `output_data`   | out | 64    | value read back (registered) |
| `self_pi`       | out | 1     | the stored word carries its ECC |
| `corrected`     | out | 1     | the read in `output_data` had a single error repaired |
| `uncorrectable` | out | 1     | the read in `output_data` had an error the code could not repair |

* **Write.** A value presented with `load` = 1 is stored on the next rising
  edge, with its self-pi.
* **Read.** The decoder stage reads the register continuously and updates
  `output_data` and the flags on every edge. The written value therefore shows
  on `output_data` after the second edge. Any upset between those two edges
  shows in the same read.
* **Soft-error model.** `seu_mask` and `seu_pi` are a simulation hook: they
  XOR into the stored bits on edges without a load. Tie them to zero in
  normal use.
* **Size.** After coarse synthesis the design has 131 flip-flops:
  * 64 + 1 for the register and self-pi,
  * 64 + 2 for the output register and flags.

  It has about 500 word-level cells.

Parameters `WORD_W` (64) and `PAYLOAD_W` (52) are carried through all
modules. The check-bit count follows from `PAYLOAD_W` through
`selfimm_pkg::hamming_r`. The testbenches use the defaults only.

## What was specified and what was chosen here

These parts follow the design description:

* the 64-bit register;
* the 52-bit protectable value and the 12-bit test of the upper bits;
* the self-pi flag and its meaning;
* an encoder used only for protected values, and a write multiplexer;
* a decoder used only when self-pi is 1, and a read multiplexer;
* a top level of an encoder block followed by a clocked, resettable decoder
  block, with 64-bit data ports and `clock`/`reset`;
* a `load` signal on the encoder side.

These are this implementation's own choices:

* **The ECC.** The description says only "ECC". The choices here are Hamming
  SEC with 6 check bits and its bit layout in the upper field.
* **How the encoder and decoder are switched off.** When self-pi is 0, their
  inputs are forced to zero (operand isolation), so the parity trees do not
  switch.
* **Reset.** It is asynchronous and active high.
* **The output register.** The decoder stage registers its result on every
  edge.
* **Extra ports.** `self_pi` is brought out between the stages and at the top.
* **Flags.** `corrected` and `uncorrectable` are additions.
* **Soft-error inputs.** `seu_mask` and `seu_pi` are additions.
* **Register count.** The design is one register, not a multi-entry register
  file with addresses. The described hardware is a single register.
* **Flip-flop count.** The original implementation is stated to use 104
  flip-flops. This design uses 131, and it does not try to match that figure.

## Known limits

* Values wider than 52 bits are not protected at all. That is by design.
* The self-pi flag is a plain flip-flop. If an upset clears it, a protected
  word is read back raw, with its check bits visible in bits [57:52]. If an
  upset sets it, a wide value is "decoded" and returned with a wrong result.
* Double errors are only partly detected (see above).

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The expected values
come from `tb/tb_ref_pkg.sv`. It computes the check bits differently from the
RTL: as the XOR of the codeword positions of the payload's 1 bits.

* `tb_ecc_encoder`: single-bit, corner and random payloads. It also checks
  that upper input bits are ignored and that a disabled encoder outputs zero.
* `tb_ecc_decoder`: for 60 values, it tests all 58 single-bit upsets, the 6
  unused-bit upsets and a clean read. It also tests double upsets with
  out-of-range syndromes, and a disabled decoder.
* `tb_protected_register`, `tb_encoder_stage`, `tb_decoder_stage`: each is
  checked cycle by cycle against a model.
* `tb_selfimm_top`: runs end to end at the default size. It performs 600
  write/upset/read operations. It counts each mechanism and fails if one never
  happens. The mechanisms are:
  * protected and unprotected writes;
  * correction of payload and check-bit upsets;
  * harmless upsets of unused bits;
  * unprotected upsets passed through;
  * uncorrectable detection;
  * hold;
  * the two-edge latency;
  * reset.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/selfimm_pkg.sv tb/tb_ref_pkg.sv tb/tb_selfimm_top.sv \
    --top-module tb_selfimm_top -o sim
./obj_dir/sim
```

Replace `tb_selfimm_top` with any other testbench name. Every testbench takes
well under a second.
