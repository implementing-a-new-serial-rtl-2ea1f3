# Serial-control keystream generator

A bit-serial pseudo-random keystream generator for a binary additive stream
cipher (`C_n = P_n xor K_n`). It combines two ideas:

* a **traditional part**: eight maximal-length LFSRs of coprime lengths whose
  outputs address two small nonlinear lookup tables (16 x 1-bit "EPROMs");
* a **serial part**: eight shift registers *without* feedback (LSRs), chained
  one after another. Each LSR's input bit is chosen by a **controller**, and the
  choice is made by the LFSR outputs. The keystream is the bit that leaves the
  last LSR.

The nonlinearity has two sources. One is the table lookup. The other is that
the LFSR outputs decide, bit by bit, which path through the chain of delay
lines a value takes. The state is 1242 bits: 504 in the LFSRs and 738 in the
LSRs. It is loaded from a 250-byte secret key. The design produces one
keystream bit per clock.

## Data flow of one step

```
 LFSR1..LFSR4 --4--> bar1 --+--> EPROM E1 --e1--+
                            |                    v
                            |  ctrl1   +--------------+     +------+
                            +--------->| controller 1 |---->| LSR1 |--out1--+
                            |          +--------------+     +------+       |
 LFSR5..LFSR8 --4--> bar2 --+--> EPROM E2 --e2--^  | sel1                   |
                            |                      v                        v
                            |  ctrl2..8  controller 2: sel1 (0) or out1 (1) -> LSR2 ...
                            +----------> ...
                                         controller 8: sel7 (0) or out7 (1) -> LSR8 --> K_n
```

Within one clock, in this order, and entirely combinationally:

1. Each LFSR outputs its **feedback bit**: the XOR of its tapped stages.
   LFSRs 1-4 form *Bits control bar 1*. LFSRs 5-8 form *Bits control bar 2*.
   Bit `i` of a bar is the output of LFSR `i+1` of that set.
2. Bar 1 is the address of E1 and bar 2 the address of E2. Each table gives
   one bit.
3. **Controller 1** takes E1's bit when control bit 1 is 0 and E2's bit when it
   is 1. That bit becomes LSR1's input.
4. **Controller k** (k = 2..8) takes one of two bits. When control bit k is 0,
   it takes the bit controller k-1 just chose, which is LSR k-1's input. When
   control bit k is 1, it takes the bit now leaving LSR k-1. The chosen bit
   becomes LSR k's input and is passed on to controller k+1. Control bits 1-4
   come from bar 1 and control bits 5-8 from bar 2.
5. The bit now leaving LSR8 is the keystream bit `K_n`.
6. On the clock edge every LFSR and every LSR shifts by one place.

The two candidate bits of a controller are called its *wait-box*. Here a
wait-box is only the two mux inputs, not a register, so all eight choices
settle in the same clock. The worst path is an LFSR XOR, then a table
lookup, then eight 2:1 muxes.

### What the serial part does to the bits

This is the least obvious part of the design. The controllers only *select*.
They never combine bits. So every keystream bit is some earlier E1/E2 output
(or a key bit), delayed by 91 plus the lengths of the LSRs it went through.
Which LSRs those are depends on the control bits. Two properties follow.

**Copies.** A control bit of 0 passes a bit on to the next LSR in the same
step. A bit can therefore enter several LSRs at once. It can then appear
several times in the keystream, at delays that differ by sums and
differences of the LSR lengths (for example 100 - 98 = 2 and 88 - 84 = 4).
The keystream is therefore autocorrelated at small lags. This holds even
when the table bits and control bits are ideal random bits.

**Address bits are control bits.** The four bits that address E1 are also
the control bits of controllers 1-4. The four that address E2 are the
control bits of controllers 5-8. A bit that travels down the chain of
controllers set to 0 is therefore the table entry selected by those zeros.
For example, with bar 1 = 0000, the bit entering LSR 4 is always E1(0000).
The value of a bit and whether it propagates are coupled, and the share of
ones drifts away from one half. The size of this effect hardly depends on
the table contents. Other balanced tables were tried, including plain
parity, and none removed it.

A third consequence is that the first 91 keystream bits after loading are
simply LSR8's loaded key bits.

## Sizes

| Unit | Values |
|------|--------|
| LFSR lengths 1-8 | 39, 61, 47, 25, 70, 100, 35, 127 (sum 504, pairwise coprime) |
| LFSR taps (stage numbers, stage 1 = input end) | {31,39}, {56,59,60,61}, {42,47}, {3,25}, {1,3,5,70}, {2,7,8,100}, {33,35}, {112,120,124,127} |
| LSR lengths 1-8 | 100, 87, 94, 98, 84, 96, 88, 91 (sum 738) |
| EPROMs | 16 x 1 bit each, 8 ones and 8 zeros |
| Key | 250 bytes = 2000 bits, of which 1242 fill the state |

Stage `t` of an LFSR holds the output of `t` steps earlier. Its output
therefore obeys `a(k) = XOR over taps t of a(k-t)`. Its characteristic
polynomial is the reciprocal of `1 + sum x^t`. All eight tap sets give
primitive polynomials, so each LFSR has period `2^n - 1`. This was checked
by showing that `x` has multiplicative order exactly `2^n - 1`.

EPROM contents are a parameter. Bit `a` of the 16-bit constant is the value
stored at address `a`. The defaults were chosen for this design. They are
balanced functions with nonlinearity 4:

* E1(x) = x0x1 ^ x1x2 ^ x2 ^ x3 (`16'h47B8`)
* E2(x) = x3 ^ maj(x0, x1, x2) (`16'h17E8`)

`eprom` refuses, at elaboration, any table that is not balanced.

## Key loading

Key bytes arrive on a `key_valid`/`key_ready` handshake. `key_loader`
shifts each byte, least significant bit first, into a scan chain that runs
through every register:

```
LFSR1 stage 1..39 -> LFSR2 ... -> LFSR8 -> LSR1 stage 1..100 -> ... -> LSR8 stage 1..91
```

The first 1242 key bits enter the chain. Bits 1242..1999 are accepted and
dropped. Number the key bits `i = 8*byte + bit`. After loading, chain
position `p` (0 = stage 1 of LFSR1) holds key bit `1241 - p`.

A new byte is accepted while the serialiser is empty or sending its last
bit. With back-to-back bytes, `key_loaded` rises 2000 clocks after the
first byte is taken. `rekey` starts a new load. A key that leaves an LFSR
all-zero locks that LFSR at zero. Nothing guards against this, so key
material should be random.

## Interface of `sckg_top`

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (clears all state) |
| `rekey` | in | 1 | restart key loading |
| `key_valid`, `key_byte`, `key_ready` | in/in/out | 1/8/1 | key byte handshake |
| `key_loaded` | out | 1 | whole key consumed; generator may run |
| `step` | in | 1 | request a keystream bit this clock |
| `ks_valid` | out | 1 | `step & key_loaded`: a bit is produced and the state advances at the next edge |
| `ks_bit` | out | 1 | keystream bit `K_n` (combinational from the state) |
| `pt_bit` | in | 1 | plaintext (or ciphertext) bit |
| `ct_bit` | out | 1 | `pt_bit ^ ks_bit` |

When `step` is low, the state holds. `step` has no effect while the key is
loading. Decryption uses the same circuit with the same key.

Parameters (all defaulting to the values above from `sckg_pkg`):
`LFSR_LEN[8]`, `LFSR_TAPS[8]` (128-bit masks, bit `t-1` = stage `t`),
`LSR_LEN[8]`, `E1_CONTENTS`, `E2_CONTENTS`, `KEY_BYTES`. The key loader
checks that `KEY_BYTES*8` is at least the state size.

Synthesised size at the defaults: 1274 flip-flops (1242 state bits plus 32
in the loader) and two 16-bit tables.

## Modules

| File | Block |
|------|-------|
| `rtl/sckg_pkg.sv` | shared sizes, tap masks, table contents |
| `rtl/lfsr.sv` | one LFSR (feedback-bit output, scan load) |
| `rtl/driving_set.sv` | four LFSRs; their outputs are one Bits control bar |
| `rtl/eprom.sv` | 16 x 1 nonlinear table |
| `rtl/traditional_part.sv` | two driving sets + E1, E2 |
| `rtl/controller.sv` | controller with its wait-box (2:1 selection) |
| `rtl/lsr.sv` | feedback-free serial shift register |
| `rtl/serial_part.sv` | eight controllers + eight LSRs |
| `rtl/key_loader.sv` | key byte handshake and scan-chain serialiser |
| `rtl/sckg_top.sv` | complete generator and XOR combiner |

## Design choices and departures

These points follow the original proposal:

* the LFSR lengths and tap sets;
* the feedback bit as each LFSR's output;
* the 16-bit tables addressed by four LFSR outputs;
* the eight controllers and their selection rules;
* the LSR lengths;
* the 250-byte key;
* the XOR combiner.

These are this implementation's choices:

* **Tap table reading.** Each tap entry is read as "number of taps, then the
  tap positions". This reading gives primitive polynomials throughout.
* **LSR lengths.** The individual lengths add up to 738. The proposal also
  quotes a total of 734 in places. The individual lengths are used.
* **Set membership and bit order.** LFSRs 1-4 form set 1 and LFSRs 5-8 form
  set 2. Bar bit `i` is LFSR `i+1` of the set.
* **EPROM contents.** The proposal only asks for equal numbers of 0s and 1s.
* **Timing.** Bars and wait-boxes are combinational, so one step is one
  clock.
* **Key handling.** The byte handshake, LSB-first scan chain and chain
  order are this design's own, as is dropping the 758 surplus key bits.
* **Reset and enables.** Reset to zero, the `step` enable and `rekey` are
  additions.

## Measured behaviour

All figures below are at default sizes, each for one random key. They come
from `tb_stat_tests` and `tb_linear_complexity`.

| Measure | Result | Random-sequence expectation |
|---------|--------|-----------------------------|
| ones in 100000 bits | about 46 900 | 50 000 +/- 160 |
| frequency chi-square (1 dof) | about 380 | <= 3.84 at 5 % |
| serial, poker, runs | all far above their 5 % points | |
| autocorrelation, shifts 1-10 | chi-square 10 to 570 | <= 3.84 |
| agreement of each LFSR with the keystream, 6 keys x 8 LFSRs | 0.496 to 0.504 | 0.5 |
| linear complexity of 20000 bits | 10000, with 5011 jumps | 10000, about 5000 jumps |

The linear complexity and the LFSR-to-output correlations match the
proposal's claims. The frequency, serial, poker, runs and autocorrelation
tests do not: the proposal reports that all five pass.

An independent software model of the same algorithm gives the same
figures. It also separates the two causes described in "What the serial
part does to the bits":

* with ideal random control bits and fresh random input bits, the share of
  ones is balanced, but the autocorrelation remains;
* with the tables and the address/control coupling in place, the share of
  ones is biased.

So the deviations come from the algorithm's structure, not from the RTL.
Anyone who relies on the statistical properties should keep this in mind.
Changing the structure, for example by mixing bits with XOR instead of
selecting them, would be a different algorithm, and it is not done here.

## Verification

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`:

| Testbench | Checks |
|-----------|--------|
| `tb_lfsr` | 39-stage LFSR against its recurrence after a scan load; hold when `step` is low; a 5-stage LFSR has period 31 |
| `tb_lsr` | delay-line behaviour, scan load, holds |
| `tb_eprom` | both tables at all addresses against their Boolean formulas; balance |
| `tb_controller` | all 8 input combinations |
| `tb_driving_set` | bar of set 1 against the model for 3000 steps |
| `tb_traditional_part` | e1, e2, both bars against the model for 3000 steps |
| `tb_serial_part` | keystream for random e1/e2/control inputs; every controller uses both inputs |
| `tb_key_loader` | bit order, surplus bits dropped, load time, rekey |
| `tb_sckg_top` | full design at default sizes: key load with `step` held high, 6000 bits against the model with random stalls, decryption round trip after rekey, a different key gives a different stream |
| `tb_stat_tests` | 100000 bits against the model; prints the five statistics; LFSR/keystream agreement for six keys |
| `tb_linear_complexity` | Berlekamp-Massey on 20000 bits |

`tb/sckg_ref_pkg.sv` is the reference model. It stores every register as
an array indexed by stage number and writes the tables as Boolean
expressions. This keeps it independent of the RTL's encoding.

To run a testbench with Verilator 5 (about a second each):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sckg_pkg.sv tb/sckg_ref_pkg.sv tb/tb_sckg_top.sv --top-module tb_sckg_top
./obj_dir/Vtb_sckg_top
```

Replace `tb_sckg_top` with any other testbench name. `tb_linear_complexity`
does not need `sckg_ref_pkg.sv`, but listing it does no harm.

The RTL lints with `verilator --lint-only -Wall`, with two warnings left:

* the unused final scan-chain output of the serial part is left unconnected;
* `rst_n` serves both as the asynchronous reset and in the `disable iff`
  of two assertions in `key_loader`, which Verilator reports as a mixed
  synchronous and asynchronous use.
