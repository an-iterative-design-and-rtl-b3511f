# xinterval: an interval-arithmetic coprocessor for a RISC-V host

Interval arithmetic computes with sets `[lo, hi]` instead of single numbers:
every result is an interval guaranteed to contain all the values the exact
operation could produce. Robotics problems such as localisation or robust
control, written as constraint-satisfaction problems and solved with interval
contractors and paving (SIVIA), spend most of their time in such operations.
The xinterval extension gives a RISC-V processor native interval
instructions. An interval is stored in one 64-bit floating-point register of
the RISC-V D extension.

This repository holds the hardware side of that extension, as it is used
while the extension is still being designed. A RISC-V instruction-set
simulator runs the application and sends each xinterval instruction to a
small coprocessor core, which returns the result. The core has two host
links:

* an **AXI4-Lite slave**, for a Zynq device where the simulator runs on the
  ARM processing system and the core sits in the programmable logic;
* a **UART**, the cheap first FPGA integration (one request frame and one
  answer frame per instruction).

`xiv_top` instantiates both links side by side, each with its own core.

## The interval format

```
 63   62 ............ 32   31   30 ............ 0
+----+------------------+------+------------------+
| E  |   lower bound    | iota |   upper bound    |
+----+------------------+------+------------------+
        sign|exp|frac             sign|exp|frac
          1   7   23                1   7   23
```

* `E` (bit 63) set means the interval is the empty set.
* Each bound is a 31-bit float: 1 sign bit, a 7-bit exponent with bias 63, and
  a 23-bit fraction with a hidden leading one. This is IEEE-754 single
  precision with one exponent bit removed, so that two bounds and two flags
  fit in one 64-bit register. Exponent 0 encodes zero and subnormals.
  Exponent 127 encodes infinity (fraction 0) or NaN. The largest finite bound
  is about 1.8e19.
* `iota` (bit 31) marks an invalid interval. It is set when a bound of an
  operand is NaN, and every operation propagates it.

The field layout is fixed by the extension. The bias, the special encodings
and the meaning of `iota` are choices of this implementation (see
"Departures and open points").

## Outward rounding, the core of the arithmetic

A correct interval result must enclose the exact set. So each lower bound is
rounded toward −∞ and each upper bound toward +∞. There is no
round-to-nearest anywhere in the datapath.

* `xiv_fp31_add` is a conventional IEEE-style adder. It orders the operands by
  magnitude and aligns the smaller one with guard, round and sticky bits. It
  then adds or subtracts and normalises, keeping gradual underflow to
  subnormals. Finally it rounds in the direction given by `up`. For directed
  rounding only the *inexact* condition matters: the magnitude is incremented
  when the result is inexact and the rounding direction points away from zero
  for its sign. On overflow the result is ±∞ when rounding away from zero,
  and the largest finite value otherwise. An exact zero from cancellation is
  −0 when rounding down and +0 otherwise.
* `xiv_fp31_mul` forms one 24×24-bit significand product and normalises it
  with a leading-zero count. When the exponent underflows, it shifts the
  product into the subnormal range, folding the lost bits into a sticky bit.
  It then rounds the product **both ways** at once (`y_dn`, `y_up`), because
  interval multiplication needs each endpoint product in both directions. A
  zero bound times an infinite bound gives 0, not NaN. This is the usual
  interval convention: an infinite bound stands for an unbounded end, not
  for a number.
* Both units share `fp_round_pack` in `xiv_pkg`, which does the increment,
  the carry-out renormalisation, the overflow saturation and the packing of
  subnormals.

`xiv_execute` builds the interval operations from these units:

| funct7 | operation | result |
|---|---|---|
| 0 | load  | rd ← 64-bit data word (copies a host register into the core) |
| 1 | read  | result ← rs1 (nothing written) |
| 2 | add   | [a.lo + b.lo ↓, a.hi + b.hi ↑] |
| 3 | sub   | [a.lo − b.hi ↓, a.hi − b.lo ↑] |
| 4 | mul   | [min of the 4 endpoint products ↓, max of the 4 ↑] |
| 5 | neg   | [−a.hi, −a.lo] |
| 6 | sqr   | by sign of a: [lo², hi²], [hi², lo²] or [0, max(lo², hi²)] |
| 7 | intersection | [max lo, min hi], empty if they cross |
| 8 | hull  | [min lo, max hi]; an empty operand yields the other |

If any operand of an arithmetic operation is empty, the result is empty. An
empty result is encoded as `E = 1` with bounds [+∞, −∞]. The multiplier
array (four multipliers, each giving both roundings) also serves `sqr`: it is
fed the operand twice. Because rounding is monotone, taking the minimum of
the rounded-down products equals rounding down the exact minimum. So the
result is the tightest enclosure the format can hold.

## The core pipeline

`xiv_core` is a simplified RISC pipeline with one instruction in flight:

```
enable, instr ──> xiv_decode ──> xiv_regfile (32 x 64, 2R/1W) ──> xiv_execute ──> result, done
                  (fetch/decode)                                   │
                                                                   └──> write-back to rd
```

* **Instruction.** Each instruction is a RISC-V R-type word on the custom-0
  major opcode (`0001011`), with funct3 = 0. funct7 selects the operation from
  the table above. Bits 11:7 are rd, 19:15 are rs1 and 24:20 are rs2. With
  the word comes a 64-bit data field, which only `load` uses. The host passes
  both together as `xiv_instr_t` (96 bits).
* **Register file.** It is the core's copy of the 32 RISC-V floating-point
  registers. The host keeps it in step with `load` and reads values back
  with `read`.
* **Timing.** `enable` is sampled at edge 0. The operands are read and
  execution starts at edge 1. `done` is high for one cycle, LAT + 2 cycles
  after `enable` (3 cycles with the default latency of 1). rd is written at
  the edge that ends the `done` cycle. A new instruction may be presented in
  the `done` cycle.
* **Busy and illegal instructions.** While `busy` is high, `enable` is
  ignored. An instruction with a wrong opcode, a wrong funct3 or an unknown
  funct7 writes nothing. It answers after 2 cycles with `done`, `illegal = 1`
  and a zero result.
* **Latencies.** `LAT_ADD`, `LAT_MUL` and `LAT_MISC` set the cycles the
  execute stage takes per operator class. The arithmetic itself is
  combinational. A real FPGA implementation would pipeline the operators
  deeply; these parameters let the core present such latencies to the host.

## Host links

### UART (`xiv_uart_wrapper`)

The line format is 8N1. `CLKS_PER_BIT` is the clock frequency divided by the
baud rate; the default of 868 gives 115200 baud from 100 MHz.

* **Request.** 12 bytes: the instruction word, then the data word, each
  least significant byte first.
* **Answer.** 9 bytes: the 64-bit result, least significant byte first, then
  a status byte whose bit 0 is the illegal flag.
* Bytes that arrive while an answer is pending are dropped. The host must
  therefore wait for each answer.
* A framing error (missing stop bit) discards the partly received request.

Each instruction costs 210 bit times on the line, about 1.8 ms at 115200
baud. This link is for functional bring-up, not speed.

### AXI4-Lite (`xiv_axil_wrapper`)

The slave has a 32-bit data bus and byte addresses:

| offset | name | access | meaning |
|---|---|---|---|
| 0x00 | INSTR | R/W | instruction word; a write issues it |
| 0x04 | DATA_LO | R/W | data word bits 31:0 (for `load`) |
| 0x08 | DATA_HI | R/W | data word bits 63:32 |
| 0x10 | RESULT_LO | R | result bits 31:0 |
| 0x14 | RESULT_HI | R | result bits 63:32 |
| 0x18 | STATUS | R | bit 0 done, bit 1 busy, bit 2 illegal |

A driver does the following:

1. For a `load`, write DATA_LO and DATA_HI.
2. Write INSTR. This clears `done`.
3. Poll STATUS until `done` is set.
4. Read RESULT_LO and RESULT_HI.

An INSTR write while the core is busy updates the register but is not issued.
Unmapped addresses read 0 and ignore writes. Every response is OKAY. Write
strobes apply to the writable registers.

The write address and write data channels are accepted independently. The
write takes effect once both have been seen, and BVALID rises on the next
cycle. A read returns RVALID on the cycle after the address is accepted. Each
direction has at most one transaction outstanding. Assertions check that
BVALID and RVALID, with RDATA, hold until they are taken.

## Files

| file | content |
|---|---|
| `rtl/xiv_pkg.sv` | format constants, `interval_t`, opcodes, `xiv_instr_t`/`xiv_dec_t`, float helpers, `fp_round_pack` |
| `rtl/xiv_fp31_add.sv`, `rtl/xiv_fp31_mul.sv` | directed-rounding bound adder and multiplier |
| `rtl/xiv_regfile.sv`, `rtl/xiv_decode.sv`, `rtl/xiv_execute.sv`, `rtl/xiv_core.sv` | the core |
| `rtl/xiv_uart_rx.sv`, `rtl/xiv_uart_tx.sv`, `rtl/xiv_uart_wrapper.sv` | serial link |
| `rtl/xiv_axil_wrapper.sv` | AXI4-Lite link |
| `rtl/xiv_top.sv` | both links side by side |
| `tb/xiv_tb_pkg.sv` | reference model shared by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

The reference model needs no rounding logic of its own. It converts bounds to
IEEE double. In a double, every product of two bounds is exact, and so is
every sum of two bounds whose exponents are at most 28 apart. A result `r` of
rounding the exact value `x` down is correct exactly when `r ≤ x` and the next
representable bound above `r` is greater than `x`; rounding up is the mirror
case. `check_interval` applies this to both bounds of each interval result,
and checks the empty and iota flags. Cases with infinite or NaN bounds, and
sums whose exponents are far apart, are checked against fixed expected
values instead.

* `tb_xiv_fp31_add`, `tb_xiv_fp31_mul`: about 50,000 random operations in
  both rounding directions. They cover the subnormal, cancellation,
  sticky-bit and overflow regions, plus the special values.
* `tb_xiv_execute`: all nine operations on random intervals. Two instances
  run side by side, one with the default latencies and one with 2, 4 and 3
  cycles; the cycle count is checked on both.
* `tb_xiv_core`: as a host would drive the core. It checks results, register
  read-back, the 3-cycle latency, illegal instructions and the
  busy-ignores-enable rule.
* `tb_xiv_uart_wrapper` (with `CLKS_PER_BIT = 8`) and `tb_xiv_axil_wrapper`
  (with `LAT_MUL = 8`): bit-level and bus-level host models. They exercise
  back-pressure, write strobes, a framing error with resynchronisation, and
  an INSTR write dropped while the core is busy.
* `tb_xiv_top`: the whole design at its default parameters, about 2.6 s of
  wall time. It evaluates `(x−4)² + y²` and `x² + y²` over the box
  [−1.5, 2.25] × [−6, 0.75] through both links. The two links must agree, and
  the results must equal the exact enclosures [3.0625, 66.25] and
  [0, 41.0625]. These are the radius terms of the test constraint
  `(y−5)·cos(4·√((x−4)² + y²)) − x·sin(2·√(x² + y²)) ≥ 0`. The testbench then
  counts each mechanism and fails if any never occurred: every operation, an
  empty result, iota propagation, an illegal instruction on each link, a
  dropped INSTR write, response back-pressure, and a framing error.

Simulating a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/xiv_pkg.sv tb/xiv_tb_pkg.sv rtl/*.sv tb/tb_xiv_top.sv --top-module tb_xiv_top
./obj_dir/Vtb_xiv_top
```

Replace the last file and the top-module name to run another testbench.
Verilator simulates with two states. Everything the design reads is reset;
the reset is asynchronous and active low.

## Departures and open points

* **Instruction set.** The extension is defined as the interval counterparts
  of the common floating-point operators and of transcendental functions. The
  exact list and the toolchain's instruction encoding are not available here.
  The operation set and encoding above are this implementation's choice.
  **No transcendental operators are implemented** (sin, cos, exp, log,
  sqrt). Consequently the SIVIA benchmark constraint above cannot run
  entirely on this hardware; only its polynomial parts can.
* **Bound format details.** The bias of 63, the special encodings, subnormal
  support, the quiet-NaN pattern `0x3FC00000`, the empty-interval encoding
  and the meaning of the iota flag are assumptions. The bit layout itself is
  not an assumption.
* **Register replication.** The core's registers mirror the host's
  floating-point registers. Here this is done with an explicit `load`
  instruction that carries a 64-bit data word, and a `read` instruction. The
  64-bit data field alongside the instruction word, and the `illegal` and
  `busy` outputs, go beyond the plain instr/enable/result/done interface of
  the original block diagram.
* **Latencies and protocols.** Operator latencies (default 1 cycle), the
  UART frame format and baud rate, and the AXI register map are this
  implementation's choices. The Zynq deployment only names an instruction
  register and a result register on an AXI-Lite slave. Tune the `LAT_*`
  parameters to match a pipelined operator library.
* **Not hardware, not included.** The RISC-V instruction-set simulator and
  its latency database, the compiler toolchain, the GHDL co-simulation
  harness, the Linux driver and the Zynq processing system are all outside
  this RTL. In the testbenches, host models take their place.
