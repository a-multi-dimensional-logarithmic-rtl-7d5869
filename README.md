# A 24-bit CPU with two-dimensional logarithmic arithmetic

Digital filters spend most of their hardware on multipliers. This processor
keeps signal samples and filter coefficients in a **two-dimensional
logarithmic number system (2DLNS)**, where a number is a short sum of terms
`±2^a · D^b`. Multiplying two such terms costs two small exponent additions
and a sign XOR instead of a multiplier array. Products are turned back into
binary only to be added. Around this arithmetic sits a small, DLX-like RISC
CPU with a 24-bit word. It has ordinary integer instructions and a few 2DLNS
instructions. The biggest of these is `filter`, which runs a whole FIR filter
of up to order 127, plus its frequency-mirrored "dual", as one instruction. It
takes one tap per clock.

The example application is an 8-band filterbank. It splits a 16-bit signal
into bands using four symmetric 75th-order filters, each computed together
with its dual. It runs end to end in `tb/tb_tlns_system.sv` on random samples,
and in `tb/tb_tlns_chirp.sv` on a frequency sweep.

## The number format

A datum is a 24-bit word holding two 12-bit digits:

```
 23   22..17   16..12 | 11   10..5    4..0
 s1   a1 (6b)  b1 (5b)| s2   a2 (6b)  b2 (5b)
 value = (-1)^s1 · 2^a1 · D^b1  +  (-1)^s2 · 2^a2 · D^b2
```

* `a` is a 6-bit and `b` a 5-bit two's-complement exponent. `s` = 1 means
  negative.
* The second base is `D = 0.92024380912663017`. It was chosen for the
  filterbank coefficients. The 6/5-bit exponent split and this D come from
  the original design.
* **Zero** is coded as `a = -32` (`12'h400` per digit, `24'h400400` for a
  zero word). A one-bit sign alone cannot express a zero digit, so this design
  reserves that exponent.
* The 2DLNS value 1.0 is `{0, 0, 0}` in digit 1 and zero in digit 2
  (`TLNS_ONE` in `rtl/tlns_pkg.sv`).

Inside the MAC, binary values are unsigned magnitudes with 8 fraction bits.
Register results (`mult`, `mac`, `tbc`, `filter`) are two's-complement
integers: the accumulator shifted right by 8 and truncated toward minus
infinity.

`D^b` is stored as a 64-entry table (`dpow` in `rtl/tlns_pkg.sv`). Each entry
is a mantissa `m` in [1,2) (1.15 format) and a power of two `k`, with
`k = floor(log2 D^b)` and `m = round(D^b / 2^k · 2^15)`. One digit product
converts as `m << (a + k)` (`rtl/tlns_tbc.sv`). The result saturates at
2^32 − 1 and is accurate to about 3·10⁻⁵ relative, plus one LSB.

### Binary to 2DLNS (`btc`)

The original design converts with range-addressable lookup tables but does not
give their contents. `rtl/tlns_btc.sv` computes the same kind of
nearest-value mapping directly, in two steps:

1. **Digit 1** is the single digit nearest to |x|. For each of the 32 values
   of `b`, the normalised mantissa of |x| is compared with the mantissa of
   `D^b`. This yields the two exponents `a` whose values bracket |x|, and the
   error of each. The error is a 25-bit mantissa difference, so the 64
   candidates need no shifters.
2. **Digit 2** approximates the remaining error in the same way. If digit 1
   overshoots, digit 2 takes the opposite sign.

Over random 16- and 24-bit inputs the worst relative error is 1.8·10⁻⁴. The
converter has one register stage between the two digits.

## Instructions

All instructions are 24 bits with a 6-bit opcode and 4-bit register fields:

```
R:      op[23:18] rs1[17:14] rs2[13:10] rd[9:6]  func[5:0]      rd  = rs1 op rs2
I:      op[23:18] rs [17:14] rt [13:10] imm10[9:0]              rt  = rs op ext(imm)
J:      op[23:18] imm18[17:0]
filter: op[23:18] rs1[17:14] rs2[13:10] fsym[9:8] csym[7] order[6:0]
```

The opcode and function numbers follow DLX. That numbering decodes every
instruction word of the original example program.

| opcode | instruction | | opcode | instruction |
|---|---|---|---|---|
| 00 | R-type (func below) | | 10 | `inpt rt` (rt = input register) |
| 02 / 03 | `j` / `jal` (r15 = link) | | 11 | `oupt rt` (output register = rt) |
| 04 / 05 | `beqz` / `bnez rs` | | 12 / 13 | `jr rs` / `jalr rs` |
| 06 | `btc rs, rt` (binary → 2DLNS) | | 14, 16, 17 | `slli`, `srli`, `srai` |
| 07 | `tbc rs, rt` (2DLNS → binary) | | 15 | `filter` |
| 08–0B | `addi addui subi subui` | | 18–1D | `seqi snei slti sgti slei sgei` |
| 0C–0E | `andi ori xori` (zero-ext.) | | 23 / 2B | `lw` / `sw rt, imm(rs)` |
| 0F | `lhi rt` (imm10 → bits 23:14) | | 30–35 | unsigned set-immediate |
| 3F | `halt` | | | |

R-type functions: `sll 04, srl 06, sra 07, mult 0E, mac 0F, add 20, addu 21,
sub 22, subu 23, and 24, or 25, xor 26, seq..sge 28–2D, sequ..sgeu 38–3D`.
The all-zero word is `nop`.

Details of the semantics:

* Branches and jumps go to `PC + 1 + offset`.
* `r0` always reads zero.
* Signed and unsigned add and subtract differ only in how the immediate is
  extended. There is no overflow trap.
* `mult rd, rs1, rs2` writes the binary value of the 2DLNS product. Two
  2-digit numbers give a 4-digit product, which does not fit in a 24-bit
  2DLNS word.
* `mac` adds the product to the MAC's running sum and writes the new sum.
* `tbc` multiplies by 2DLNS 1.0 in the MAC.

The numbers of `tbc`, `mult`, `mac`, `halt`, `jal`/`jr`/`jalr`, the unsigned
set instructions and the link register are this design's choices.

## The `filter` instruction

`filter rs1, rs2, fsym, csym, order` computes, for the newest sample
`x[p]` in a circular buffer:

```
y    = Σ_{i=0..order}  c(i) · x[p-i]              -> r12
dual = Σ_{i=0..order}  ±c(i) · x[p-i]             -> r13  (if fsym[0])
```

The operands are packed into the two source registers:

* `rs1 = (p << 14) | cbase`: the newest data address and the coefficient
  start address in instruction memory.
* `rs2 = (dend << 14) | dstart`: the inclusive bounds of the circular buffer
  in data memory. The tap address steps down from `p` and wraps from `dstart`
  to `dend`.

The flag fields work as follows:

* `csym = 1` reads coefficient `cbase + min(i, order−i)`. A symmetric filter
  of order 75 therefore stores 38 coefficients.
* `fsym[0] = 1` also accumulates the dual filter. `fsym[1]` selects which taps
  the dual negates: 0 negates odd taps, 1 negates even taps.

Negating every other tap mirrors the frequency response. That is how a
filterbank gets bands *k* and *7−k* from one set of coefficients.

Coefficients come from instruction memory and data from data memory. Both are
read in the same cycle, so the filter processes one tap per clock. For order
*N* the instruction takes *N* + 7 cycles, or *N* + 6 without a dual:

| cycles | action |
|---|---|
| 1 | decode: latch rs1 and rs2 into A and B |
| 1 | set up the address counters and clear both accumulators |
| N+1 | issue one coefficient/data read pair per cycle |
| 2 | memory read, product register, last accumulate |
| 1 (+1) | write r12 (and r13) |

For order 75 this is **82 cycles**, the figure given for the original design.

## MAC unit (`rtl/tlns_mac.sv`)

The four digit products `x.di · y.dj` are formed in the log domain: a sign
XOR and two exponent adds each. Four `tlns_tbc` converters turn them into
binary magnitudes. A two-level add/subtract tree, one bit wider per level,
adds them with their signs, and the sum is registered. Two 42-bit
accumulators follow:

* **Low-Acc** adds every product.
* **High-Acc** adds the product, or subtracts it when `neg_high` is set. The
  controller drives `neg_high` from the tap number's parity and `fsym[1]`.

`sel` chooses Low-Acc (0) or High-Reg (1). High-Reg is a copy of High-Acc.
From `in_valid` to the accumulator takes two clock edges. The accumulators
can absorb 129 saturated products without overflow.

## Datapath and controller

`rtl/tlns_cpu.sv` connects three buses:

* **S1** carries A, PC, the input register or the data-memory word.
* **S2** carries B, the extended immediate (X2), a word straight from
  instruction memory (X1, the coefficients) or a controller constant `const2`
  (0, or 2DLNS 1.0 for `tbc`).
* **Dest** carries the ALU, MAC or BTC result to the register file, PC or
  MAR. It also carries the data-memory write data.

Instruction memory is addressed by PC or by the controller, data memory by
MAR or by the controller.

`rtl/tlns_controller.sv` is a multi-cycle state machine. The fetch of the
next instruction overlaps the last cycle of the current one, so cycle counts
start at decode:

| instructions | cycles |
|---|---|
| ALU, set, `lhi`, `inpt`, `oupt`, branches, `j`, `jr`, `nop` | 2 |
| `sw`, `btc`, `jal`, `jalr` | 3 |
| `lw`, `tbc`, `mult`, `mac` | 4 |
| `filter` of order N | N+7 (N+6 without dual) |

A taken branch fetches its target in its own execute cycle, so it costs no
extra cycle.

## Ports and memories

`tlns_cpu` has the port list of the original design:

* `clk`, `reset`, `Input_data`, `halt`, `ifetch`, `Output_data`,
  `Output_enable`;
* `Ir_mem_read_data/address/en`;
* `Data_mem_read_data/address/write_data/en/write_en`.

Data is 24 bits wide. Addresses are `IMEM_AW` and `DMEM_AW` bits (default
10).

`tlns_system` is the top level. It adds 1024-word instruction and data
memories with one-cycle synchronous reads. It also adds a `prog_we`,
`prog_addr`, `prog_data` port for loading the program and coefficients while
`reset` is high. Reset is synchronous and active high, and execution starts
at address 0.

Timing of the I/O ports:

* `Input_data` is sampled into the input register every cycle.
* `Output_enable` is high for one cycle after `oupt` loads the output
  register.
* `halt` stays high after `halt` until reset.

## Simulation

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M`. The testbenches use
`tb/tlns_tb_pkg.sv`, which provides two things:

* a real-arithmetic model of 2DLNS words, independent of the RTL tables;
* an instruction encoder.

To run one:

```
verilator --binary --timing -y rtl -y tb rtl/tlns_pkg.sv tb/tlns_tb_pkg.sv \
    tb/tb_tlns_system.sv --top-module tb_tlns_system
./obj_dir/Vtb_tlns_system
```

`tb_tlns_system` runs the filterbank with the default sizes:

* a 508-word circular buffer at data words 4–511;
* four coefficient sets of 38 words from instruction word 64;
* 520 random 16-bit samples, so the write pointer wraps around the whole buffer twice;
* 8 outputs per sample, each tagged with its band number in the low 4 bits.

It checks the following:

* every conversion is within 0.1 %;
* every output matches a real-arithmetic filter over the stored words;
* every `filter` takes 82 cycles;
* the buffer-clearing loop, pointer wrap, tap wrap, duals, taken and untaken
  branches and `halt` all occur.

`tb_tlns_chirp` runs the same program on a real filterbank. The input is a
1000-sample chirp that sweeps from 0 to half the sample rate. The
coefficients are Hamming-windowed band-pass filters, one per sixteenth of
the sample rate, rounded to the nearest 2DLNS words. Negating every odd tap
mirrors a response about a quarter of the sample rate. So the dual of band k
(k = 0–3) is band 7−k, and the eight outputs tile the whole spectrum. The
test requires two things:

* outputs match the reference, as in `tb_tlns_system`;
* while the sweep crosses the centre of a band, that band carries at least
  100 times the energy of every other band. The margin seen is about 900×
  for the neighbouring bands and more than 10^5× for the rest.

These coefficients are a stand-in. The original filters (0.01 dB pass-band
ripple, 60 dB stop band) were not published as values.

The rest of one sample loop takes 94 cycles here. The original design
reports 95 for its program. Its per-instruction cycle counts are not known,
so this design does not try to match that figure.

`tb_tlns_cpu` runs a program that uses every instruction class.
`tb_tlns_controller` checks the control sequence and cycle count of each
instruction class, including full filter address traces.

## How far to trust it, and what is this design's own

These parts come from the original design and are reproduced:

* the number format (B = 6, R = 5, two digits, D);
* the 24-bit word and the 16 registers with 2 read ports and 1 write port;
* the three instruction formats, the instruction list and the DLX-compatible
  encoding;
* the filter field list and the 82-cycle filter;
* the MAC structure: four digit products, 2DLNS-to-binary converters, a
  widening add/sub tree, and Low and High accumulators with a select;
* the bus organisation and the external ports.

These are this design's own reading where the original leaves them open:

* the zero code and the field order inside a digit;
* the fixed-point format and the converter table;
* the BTC algorithm;
* the meaning of the `fsym` bits and the result registers r12/r13;
* the register in the MAC;
* the memory sizes, latencies and load port;
* the numbering of the special instructions;
* the cycle count of each non-filter instruction;
* the bus routing of the extenders.

2DLNS addition and subtraction through Φ/Ψ tables is not implemented. The
original CPU does not implement it either and adds in binary instead.
Synthesis figures (cell area at 14 and 50 MHz) were reported for the
original; this RTL has not been taken through a standard-cell flow.
