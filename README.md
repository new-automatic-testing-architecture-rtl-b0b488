# Self-testing boundary scan around a 16-bit pipelined multiplier

This design makes a chip test itself through its five JTAG pins (TCK, TMS,
TDI, TDO and the optional TRST*). A PC with a parallel port is then enough as
test equipment. The circuit under test is a 16 x 16 bit pipelined multiplier.
It sits inside an IEEE 1149.1 boundary scan ring, and the ring has a second
job:

* the 32 **input cells** (on operands A and B) can step as a 32-bit LFSR and
  act as a **test pattern generator (TPG)**;
* the 32 **output cells** (on product P) can fold the core's response into a
  32-bit **multiple-input signature register (MISR)**;
* a small **programmable control unit (PCU)** does two things:
  * it makes the TPG and the MISR act only once every *d* TCK cycles, where
    *d* is the pipeline depth of the core;
  * during the test it feeds TCK to the core instead of the chip clock.

The PCU is the central idea. Each pattern is held at the core's inputs for a
full pipeline depth before the response is taken. So a sequential pipeline is
tested as if it were a single combinational block. The core's own registers
need no scan flip-flops or BILBO conversion, and no extra delay flip-flops.

```
 TDI ──► [32 input cells] ──► [32 output cells] ──► TDO
              │ A,B (held d cycles)      ▲ P
              ▼                          │
        pipelined_multiplier ────────────┘
              ▲ CUT_CK = chip_ck (normal) | TCK (after SYNC)
             PCU ◄── TAP controller (FSM, IR, BYPASS)
```

## The core: pipelined multiplier

`pipelined_multiplier` is an array multiplier for unsigned numbers. It has one
row, `m16x1`, per multiplier bit B[i]:

* Row i ANDs the multiplicand with B[i].
* It adds the result to the partial sum passed on by row i-1. The low bit of
  the sum is product bit P[i].
* It registers the multiplicand and the upper 16 bits of the sum for row i+1.
* The last row's adder gives P[31:15].

The B bits go to their rows without registers, so **the operands must be held
constant**. After the operands change, the full product is valid once 15
rising clock edges have passed: in the 16th clock cycle, counting the cycle in
which the operands were applied. There is no output register and no reset, so
the output depends only on the held operands once the pipeline has filled.
Examples: `0002 x 000C = 00000018`, `1D1C x 009C = 0011BD10`.

## Test access port

`tapc` contains:

* the standard 16-state TAP state machine (`tap_fsm`);
* an 8-bit instruction register (`tap_ir`);
* the 1-bit BYPASS register (`bypass_reg`);
* the instruction decoder and the TDO multiplexer.

The IR holds the opcode in bits [3:0]. Bits [7:4] are an address field that
carries P3..P0 for SYNC.

| opcode | instruction | register on TDI→TDO | effect |
|---|---|---|---|
| `0` | EXTEST | BSR | output cells drive the product pins from their update stage |
| `1` | PRELOAD (SAMPLE/PRELOAD) | BSR | pins and core stay connected; load a seed |
| `2` | SYNC | BYPASS | `Enable_Sync`: switch the core to TCK; in Run-Test/Idle, load d into the PCU |
| `3` | BIST-BSR | BSR | `BIST_mode`: TPG/MISR run in Run-Test/Idle; Capture-DR does not capture, so the signature can be shifted out at once |
| `F`, others | BYPASS | BYPASS | |

Test-Logic-Reset (or TRST*) selects BYPASS with P3..P0 = 0000. The capture
value of the IR is `00000001`.

**TDO timing.** The TDO data comes straight from the last stage of the
selected register. Its output enable (`tdo_oe`) switches on the falling TCK
edge for the Capture-IR/DR and Shift-IR/DR states. With this rule, an IR scan
started from reset gives TDO = Z, Z, … until the falling edge in Capture-IR.
TDO then reads 0, and reads 1 (the captured IR bit) after the rising edge into
Shift-IR. This matches the vector example the design was characterised with.
It differs from IEEE 1149.1, which retimes TDO on the falling edge. Add a
falling-edge flop on `tdo` if standard timing is needed.

## Boundary cells as pattern generator and signature register

Every cell has three parts:

* a **capture/shift flop**, clocked by TCK and enabled by `DR_CapShf`. It
  shifts when `DR_Shf` is high and captures otherwise;
* an **update flop**, loaded on the falling edge of TCK;
* a **mode multiplexer**.

The chain is TDI → input cells 0..31 (A[0..15], then B[0..15]) → output cells
0..31 (P[0..31]) → TDO.

* **Input cells (`bsr_in_chain`).** In Run-Test/Idle under BIST-BSR
  (`tpg_en`), cell 0 takes its input from the feedback
  `x^32 + x^22 + x^2 + x + 1` instead of TDI, so each shift pulse steps the
  LFSR. The update flops load on Update-DR and also on `BIST_mode_I`. Under
  SYNC and BIST-BSR (`mode_in`), the update flops drive the core. A pattern
  therefore reaches the core one cycle after the LFSR step and stays there
  until the next `BIST_mode_I`.
* **Output cells (`bsr_out_chain`).** When `BIST_mode_O` is high, every cell
  XORs its core output into the bit it shifts in, and cell 0 takes the same
  polynomial's feedback. This is a MISR. The two registers have separate
  feedback: the generator and the signature are not cascaded.

## Programmable control unit and the timing of one BIST period

`pcu` uses the names of the original schematic.

**Setting d.** d is given as P3..P0 = NOT(d−1): d = 16 is `0000` and d = 3 is
`1101`. The programmable counter `prog_counter` loads P3..P0 when
`Prog_Enable = Run_Test_Idle AND Enable_Sync`. In practice that means passing
through Run-Test/Idle with SYNC in the IR. The counter keeps the value in a
reload register, because SYNC is later replaced by BIST-BSR. While `BIST_mode`
is high it counts up. At `1111` it raises `cary` for one cycle and reloads,
so `cary` is high once every d TCK cycles (d = 1…16).

**BIST pulses.** In Run-Test/Idle three things happen:

* `DR_Shf` and `DR_CapShf` follow `cary` instead of the TAP's `BSR_Shf` and
  `BSR_CapShf`;
* `BIST_mode_O = Run_Test_Idle AND cary`;
* `HOLD_BILBO_in = NOT cary`; outside Run-Test/Idle it passes `Hold_BILBO`
  through.

`BIST_mode_I` is `BIST_mode_O` delayed by one TCK cycle. For d = 16, one
period runs like this (edges are rising TCK edges):

| when | what happens |
|---|---|
| cycle before edge *E* | `cary` = 1: `BIST_mode_O`, `DR_Shf` and `DR_CapShf` are high |
| edge *E* | output cells compact the core's response into the MISR; input cells step the LFSR |
| cycle *E*..*E*+1 | `BIST_mode_I` = 1; on the falling edge the new LFSR state goes to the update flops, which drive the core |
| edges *E*+1 … *E*+15 | the core (clocked by TCK) fills its 15 pipeline stages with the new pattern |
| edge *E*+16 | next compaction: it sees the exact product of the held pattern |

So with d = 16 every compacted response is a true product, and the signature
can also be computed from a plain model: `MISR(sig, A*B)` per period (see the
end-to-end testbench).

**Clock switch (multiplexer M1).** The clock switches in three steps:

1. SYNC reaches the IR on a falling TCK edge, which raises `Enable_Sync`.
2. The next rising edge sets the `SyEnable` flag.
3. The next falling edge sets `DivRun`, which selects TCK onto `CUT_CK`.

The flags stay set after SYNC is replaced. Test-Logic-Reset clears them, and
the core returns to the chip clock. M1 is a plain multiplexer. It can glitch
when it switches, which does no harm here because the core's inputs are held
at that moment.

## Running a self-test

From the pins, with TCK free-running as needed:

1. Reset the TAP (TRST* low, or five TCK cycles with TMS high), then load
   PRELOAD.
2. Scan 64 bits into the BSR. Bits end up with the first bit shifted in at
   output cell 31 and the last at input cell 0. The 32 input cells give the
   LFSR seed, which must not be zero. The 32 output cells give the initial
   signature. Update-DR also applies the seed to the core.
3. Load SYNC with P3..P0 and return to Run-Test/Idle for at least one cycle.
   d is loaded there, and the core now runs on TCK.
4. Load BIST-BSR and stay in Run-Test/Idle. Taking the edge into
   Run-Test/Idle as number 1, compactions happen on edges d, 2d, 3d, …
   Leave on a compaction edge so that the count is whole.
5. Go to Shift-DR through Capture-DR (no capture under BIST-BSR). Shift out
   64 bits: first the 32-bit signature, MSB first, then the generator state.
6. Go to Test-Logic-Reset. The core runs on the chip clock again.

Expected signature for d = 16 and N periods, starting from seed S and initial
signature M:

```
for k in 0..N-1:  M = {M[30:0], M[31]^M[21]^M[1]^M[0]} ^ (S[15:0] * S[31:16])
                  S = {S[30:0], S[31]^S[21]^S[1]^S[0]}
```

## Driving it from a PC parallel port

The intended test equipment is a PC that writes one 5-bit vector per step to
data-port bits D0–D4 and reads TDO on status bit 5 (connector pin 12). Each
vector is a decimal number:

```
value = TRST* + 2*TMS + 4*TCK + 8*TDI + 16*Chip_CLK
```

The PC produces a clock edge by writing two vectors that differ only in the
TCK bit. The program compares every TDO it reads with values from simulation
and prints PASS or FAIL. The sequence 2, 3, 7, 1, 5, 3, 7, 3, 7, 1, 5, 1, 5
resets the TAP and enters Shift-IR. TDO reads Z eleven times, then 0, then 1.
`tb_tapc`, the end-to-end testbench and `tb_pc_port_ate` all replay it.

## How far to trust it, and where it departs

Taken from the original description:

* the multiplier's structure and width;
* the instruction names PRELOAD, SYNC and BIST-BSR;
* the PCU's signals and flags, the d encoding and the clock-switch sequence;
* 32 + 32 boundary cells used as TPG and MISR;
* the TDO behaviour of the vector example.

This implementation's own choices:

* opcodes, IR width and decode table;
* the insides of the boundary cells and the LFSR/MISR polynomial;
* the chain and pin order;
* the reload register in the counter;
* suppressing capture under BIST-BSR;
* resets on every TAP-side flop, including `DivRun`;
* reading the PCU schematic's multiplexers as selected by `Run_Test_Idle`,
  with the counter carry as their BIST input.

The published "valid after sixteen clocks" is read as 15 rising edges. That
reading is what makes d = 16 capture exact products.

Deliberately absent:

* BILBO registers and segmentation cells. The PCU still brings out
  `HOLD_BILBO_in` and takes `Hold_BILBO` for them.
* The PC software and the parallel-port wiring.
* The FPGA itself.

Generic synthesis gives 652 flip-flop bits for the whole testable multiplier.
The reported FPGA implementation of the testable design had 654. The reported
flip-flop count of the multiplier alone (79) cannot come from the 15 × 2 × 16
pipeline registers of this structure, so treat that figure with care.

## Files and simulation

`rtl/`:

| file | contents |
|---|---|
| `tap_pkg.sv` | TAP states, opcodes, control-signal struct |
| `tap_fsm.sv`, `tap_ir.sv`, `bypass_reg.sv`, `tapc.sv` | TAP controller |
| `prog_counter.sv`, `pcu.sv` | programmable control unit |
| `bist_bsr_in_cell.sv`, `bist_bsr_out_cell.sv` | one boundary cell each |
| `bsr_in_chain.sv`, `bsr_out_chain.sv` | 32-cell chains with TPG/MISR feedback |
| `m16x1.sv`, `pipelined_multiplier.sv` | the core |
| `testable_multiplier_top.sv` | everything wired together |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. The two
boundary cells are the exception: they are tested through their chains. Each
prints `TB_RESULT checks=N failures=M`. `tb_testable_multiplier_top` runs the
whole design at full size and counts every mechanism: normal multiply,
BYPASS, SAMPLE, EXTEST, the clock switch both ways, TPG steps, MISR
compactions, the BILBO hold release, the signature compared with the model
above, and a second self-test with d = 3. `tb_pc_port_ate` plays a complete
test as decimal port vectors, the way the PC program does. Its operand pins are
tied to constants. It reads TDO as status bit 5 and counts PASS and FAIL per
vector.

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_testable_multiplier_top \
          rtl/tap_pkg.sv tb/tb_testable_multiplier_top.sv
./obj_dir/Vtb_testable_multiplier_top
```

Use the same command with another `tb_<module>` for a single block. The
testbenches pulse asynchronous resets rather than holding them from time 0,
because a reset held from time 0 gives two-state simulators no edge.
`tb_testable_multiplier_top` sets `NPER`, the number of BIST periods. The
polynomial is the `TAPS` parameter of both chains, and the multiplier width is
the `WIDTH` parameter of the top.
