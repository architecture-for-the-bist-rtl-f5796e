# BIST boundary scan: an IEEE 1149.1 chip that tests itself

An IEEE 1149.1 boundary scan already puts a pair of flip-flops next to
every pin. It also has a controller, the TAP state machine, that a tester
sequences through four wires. This design reuses that hardware for
built-in self test (BIST):

* The **update (UPD) flip-flops of the input cells** become a test
  pattern generator (TPG). They shift through a linear feedback shift
  register (LFSR) sequence and drive the core inputs.
* The **capture (CAP) flip-flops of all cells** become a multiple-input
  signature register (MISR). It compacts the core outputs.
* Internal **BILBO registers** in the core switch between four jobs:
  pipeline register, TPG, MISR and scan chain. BILBO stands for built-in
  logic block observer.
* The **TAP controller** switches all of this for three new instructions.

Meanwhile the output pins hold known safe values. The tester sets seeds,
runs a session, and reads the signatures, all through TDI and TDO.

The example chip is an 8x8 unsigned multiplier, split into three
combinational blocks C1, C2 and C3. The blocks are separated by two BILBO
registers, G2 and G1:

```
 a,b pins -> [BSR input cells] -> C1 -> G2 -> C2 -> G1 -> C3 -> [BSR output cells] -> p pins
               TPG in BIST              (25b)        (18b)        MISR in BIST
```

Two test sessions cover all three blocks:

| session | instruction | C1 tested by                   | C2 tested by        | C3 tested by                    |
|---------|-------------|--------------------------------|---------------------|---------------------------------|
| 1       | BFT         | BSR input TPG -> G2 (MISR)     | -                   | G1 (TPG) -> BSR output MISR     |
| 2       | BST         | -                              | G2 (TPG) -> G1 (MISR) | -                             |

## Blocks

| module | what it is |
|---|---|
| `bist_bs_chip` | top: pins, TAP, all blocks below |
| `tap_controller` | TAP controller: `tap_fsm` + two `tapc_decoder`s + the latch register |
| `tap_fsm` | 16-state TAP state machine, standard 4-bit state codes |
| `tapc_decoder` | state x operation field -> 19 control signals |
| `instruction_register` | 7-bit shift stage + shadow; fields `op` (bits 6:4) and address (bits 3:0) |
| `bypass_register` | 1-bit bypass |
| `boundary_scan_register` | chain of `bsr_input_cell`s and `bsr_output_cell`s plus the BIST feedback |
| `bsr_input_cell`, `bsr_output_cell` | boundary cells with the BIST additions |
| `mult_core` | C1 (`core_c1`), G2, C2 (`core_c2`), G1, C3 (`core_c3`) |
| `bilbo_register` | W `bilbo_cell1` flip-flops + `bilbo_decoder` + LFSR feedback |
| `segmentation_cell` | pseudo-exhaustive cut multiplexer inside C1, C2, C3 |
| `tdo_stage` | data-register mux, IR/DR mux, falling-edge TDO flip-flop, output enable |
| `clock_select` | core clock = chip clock or TCK, under `Enable_Sync` |
| `bist_pkg` | state enum, op-codes, the 19-signal control struct |

## Instructions

The instruction is 7 bits wide, `ooo xx aa`. The 3-bit operation field
`ooo` drives the decoder. The address bits `aa` choose the data register
between TDI and TDO: `00` selects the BSR, `01` the BILBO chain, and `11`
the bypass register.

| instruction | code | register | effect |
|---|---|---|---|
| SAMPLE/PRELOAD | `000xx00` | BSR | capture pins, shift, update UPD; pins transparent |
| EXTEST | `001xx00` | BSR | pins driven from UPD |
| BIST-BSR | `010xx00` | BSR | pin permission. In Run-Test/Idle the BSR runs as TPG and MISR. Shift-DR reads the BSR signature. Capture-DR does nothing, so the signature survives |
| BFT | `011xx01` | G1+G2 | session 1: in Run-Test/Idle G1 is the TPG and G2 the MISR; the BSR runs too |
| BST | `100xx01` | G1+G2 | session 2: in Run-Test/Idle G2 is the TPG and G1 the MISR |
| INTEST | `110xx00` | BSR | core inputs and pins from UPD; core clocked by TCK in Run-Test/Idle |
| BYPASS | `111xx11` | bypass | also the reset instruction; unused code `101` acts as BYPASS |

For BFT and BST, the BILBO registers are controlled as follows:

* In Shift-DR they form one scan chain, TDI -> G1 -> G2 -> TDO. This is
  where seeds go in and signatures come out.
* In Run-Test/Idle they run as TPG or MISR.
* In every other state they hold, so Capture-DR and Update-DR do not
  disturb them.

## Control timing

This is the part most easily got wrong when the design is changed.

* The FSM changes state on the **rising** edge of TCK.
* The decoder outputs are latched on the **falling** edge. Each control is
  therefore stable across the rising edge that ends its state. The
  capture/shift flip-flops (IR, bypass, BSR CAP, BILBO) all act on that
  rising edge.
* `IR_Update` and `BSR_Update` are latched on the **rising** edge, from
  the decoder driven by the FSM's *next* state. They are high during
  exactly the Update state. The IR shadow and the BSR UPD flip-flops load
  on the falling edge inside that state.
* The controls `BIST_mode`, `BSR_CapShf` and `BSR_Shf` are latched high at
  the first falling edge in Run-Test/Idle.
  * The output cells see `BIST_mode` directly (`BIST_mode_O`). Their CAP
    flip-flops take one MISR step per rising edge.
  * The input cells see it half a TCK period later (`BIST_mode_I`, a
    rising-edge flip-flop). Their UPD flip-flops take one TPG step per
    falling edge.
  * So the core always sees a pattern that changed half a cycle earlier,
    and the output MISR samples the settled response.
* If the FSM spends K cycles in Run-Test/Idle, every register makes
  exactly K steps: the BSR TPG, the BSR MISR and the BILBOs. The step
  taken at the i-th rising edge uses the input pattern after i-1 TPG
  steps.

Two consequences for a test program:

* After Update-IR or Update-DR of a BIST instruction, go to
  Select-DR-Scan (TMS=1), not to Run-Test/Idle, unless a session is meant
  to start. Every cycle in Run-Test/Idle advances the generators.
* The core registers run on the **chip clock** during BFT and BST, because
  `Enable_Sync` is low there. A self test therefore needs the chip clock
  to be TCK, or a clock in step with it. The testbench ties `sys_clk` to
  `tck`.

## Self-test program

These are the steps that `tb/tb_bist_bs_chip.sv` performs:

1. TRST* or five TMS=1 clocks: Test-Logic-Reset.
2. Load SAMPLE/PRELOAD. Shift the seed into the BSR and update. The input
   cells' UPD flip-flops now hold the TPG seed, and the output cells' UPD
   flip-flops hold the safe pin values.
3. Load BFT, which grants pin permission. The output pins now show the
   safe values.
4. Shift the G1 and G2 seeds. Stay K cycles in Run-Test/Idle.
5. Shift out G2's signature, along with G1's final TPG state.
6. Load BIST-BSR. Shift out the BSR signature, which the output cells
   gathered from C3. A new value can be shifted in at the same time.
7. Load BST. Shift the G1 and G2 seeds again: the BILBOs worked as normal
   registers under BIST-BSR, so their old contents are lost. Stay K cycles
   in Run-Test/Idle.
8. Shift out G1's signature. Return to Test-Logic-Reset.

## Pseudo-exhaustive cuts

Each of C1, C2 and C3 holds one `segmentation_cell`. The cell cuts one
internal carry while `BIST_Inst_enable` is high, which is the case for
BIST-BSR, BFT and BST outside Test-Logic-Reset. The gate downstream of the
cut then receives a generator bit instead of the carry. The true carry
goes to the register that compacts that block:

| block | carry that is cut | pattern comes from | true value goes to |
|---|---|---|---|
| C1 | bit 5 -> 6 of `a*b[3:0]` | an extra BSR input cell with no pin | bit 24 of G2 |
| C2 | nibble carry of the middle adder | G2 bit 24 | bit 17 of G1 |
| C3 | carry into the top nibble | G1 bit 17 | an extra BSR output cell with no pin |

This is why the BSR has 17 input and 17 output cells for 16 + 16 pins. In
normal mode the cut is closed and the extra bits are unused.

## BILBO cell

Each BILBO flip-flop takes

    D = (Pin & C1) ^ ((Sin & C2) | (Q & C3))
    C1 = ~(B1 | HOLD)    C2 = (B1 | B2) & ~HOLD    C3 = HOLD

The mode codes are:

| mode | B1 B2 | HOLD |
|---|---|---|
| normal | 00 | 0 |
| TPG | 10 | 0 |
| MISR | 01 | 0 |
| scan | 11 | 0 |
| hold | don't care | 1 |

The register feeds `x_n ^ XOR(c_i & x_i)` back into its first cell, as in
an external-XOR LFSR. In MISR mode each cell also adds its parallel input.

G2 receives B1 and B2 swapped. One code therefore makes G1 the TPG and G2
the MISR, and the other code does the reverse.

## What follows the source architecture, and what is this design's own

The source architecture specifies these parts, and the RTL implements
them as given:

* the cell structures: the BIST multiplexer on the input cell's UPD; the
  XOR and multiplexer on the output cell's CAP
* the BILBO cell1 equations and mode codes
* the TAP state diagram and state codes
* the 7-bit op-codes
* every decoder output for BIST-BSR, BFT and BST, in every state
* the half-cycle shift of `BIST_mode`
* the latch edges
* the swapped B1/B2 of the second BILBO group
* the segmentation-cell multiplexer

The following are choices made here because the source is silent:

* **Polynomials.** TPG x^17+x^14+1 for the BSR inputs, MISR
  x^34+x^27+x^2+x+1 for the BSR CAP chain, G1 x^18+x^11+1,
  G2 x^25+x^22+1. All are primitive.
* **BSR feedback.** In BIST mode the first input cell's `Cin_p` gets the
  TPG feedback, and the chain's serial input gets the MISR feedback
  instead of TDI.
* **UPD enable.** The input cell's UPD loads on `BSR_Update | BIST_mode_I`.
  The decoder keeps `BSR_Update` low in Run-Test/Idle, yet the UPD
  flip-flops must step there.
* **Public instructions.** The decoder outputs for SAMPLE/PRELOAD, EXTEST,
  INTEST and BYPASS follow usual IEEE 1149.1 practice. There is one
  `Mode_Test` for input and output cells, so EXTEST also feeds the core
  from UPD.
* **`Enable_Sync`.** It is high only for INTEST in Run-Test/Idle. It
  selects TCK when high.
* **Don't-care `Hold_BILBO`.** Taken as 0, so under BIST-BSR the BILBOs
  work as normal pipeline registers.
* **IR details.** Capture value `0000001`; reset instruction BYPASS; LSB
  shifted first.
* **Multiplier structure.** How the multiplier is cut into C1, C2, C3, the
  register widths (G2 25 bits, G1 18 bits) and the cut positions.
* **Scan order.** TDI -> input cells -> output cells -> TDO, and
  TDI -> G1 -> G2 -> TDO.
* **Resets.** BSR cells and the IR shadow clear on the TAP controller's
  RESET (low in Test-Logic-Reset). The BILBOs clear on the chip reset.
* **No device identification register.** No instruction selects one.
* **Cell counts.** The gate counts quoted for the original chip would fit
  28 input cells and 16 output cells. Only the 16 + 16 multiplier pins
  (plus the two internal cells) are built here.

Not built:

* the second BILBO cell variant, which the source only compares with the
  first
* the physical pad cells and the full-custom layout

The TDO pin is two-state: `tdo` plus an active-low enable `tdo_oe_n`,
which the pad turns into a tri-state output. The core clock switch is a
plain multiplexer. Change `Enable_Sync` only while the chip clock is
stopped or equal to TCK.

## Simulation

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/bist_pkg.sv tb/tb_bist_bs_chip.sv --top-module tb_bist_bs_chip
./obj_dir/Vtb_bist_bs_chip
```

Use the same command for any `tb/tb_<module>.sv`.

`tb_bist_bs_chip` runs the chip at its default sizes through its pins and
TAP, in this order:

1. normal multiplication with its two-clock latency
2. the IR capture value
3. BYPASS
4. SAMPLE and PRELOAD
5. EXTEST
6. INTEST
7. the full two-session self test with K = 60 cycles per session
8. a BIST-BSR run on its own: seed applied at Update-DR, 60 cycles in
   Run-Test/Idle with the core pipeline running between the BSR TPG and
   MISR, then the signature is read out

It compares:

* the G2 signature of session 1
* the BSR signature of session 1
* the G1 signature of session 2
* the signature of the BIST-BSR run
* the final TPG states

against a model of the LFSRs, MISRs and multiplier slices kept in the
testbench. It also checks that the output pins keep their safe values
throughout. It takes well under a second.

The block testbenches compare each block with a reference model of its
own. Among the checks:

* the TAP transition table, and every row of the decoder truth table
* the latch edges of the controller
* LFSR periods
* MISR steps
* scan round trips
* all cell modes
* all 65536 operand pairs of the multiplier through the two-stage core
