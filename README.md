# A masked 8-bit ALU and microcontroller core (three-share threshold implementation)

An attacker who can measure a chip's power draw or put a probe needle on a
wire can read out whatever data passes through a processor's arithmetic logic
unit. This design protects the ALU of a small 8-bit microcontroller against
such first-order attacks by never handling a data value directly. Every byte
is split into three random *shares* `A ^ B ^ C = x`. Every gate that combines
shares sees at most two of the three shares of any value, so no single wire
or glitch depends on the secret. This is a *threshold implementation* (TI).

The RTL contains:

* the shared ALU (`ti_alu`) with its sub-units: an inverter, a shift/rotate
  unit, a bit-select mask generator, a functions array (iterative adder,
  AND, OR, XOR), a reshare unit and gated comparison units;
* a small Harvard microcontroller around it (`ti_mcu`, the top). It has a
  register file tripled for the shares, a writable program memory that stores
  literal constants in shared form, a program counter and a control FSM.

All shared data stays shared from the program memory and the I/O registers,
through the ALU, and back into the register file. The ALU needs **one fresh
random bit per clock cycle**, and nothing else.

## Conventions

* A shared W-bit value is a packed `logic [2:0][W-1:0]`. Index 0 is share A,
  1 is share B and 2 is share C. A shared bit is `logic [2:0]`. The types,
  the ALU control word and the instruction encoding are in `rtl/ti_pkg.sv`.
* For a *uniform* sharing of `x`, the shares are uniformly random apart from
  their XOR being `x`. Every block expects uniform inputs and keeps its outputs
  uniform; this is what stops leakage from building up over a computation.
* Unshared signals: the ALU control word, the instruction opcodes, register
  addresses, jump targets and the three comparison flags. These are control
  information, not protected data.

## The shared Boolean gates (`ti_gate`)

XOR and NOT are linear, so they work share by share. To invert a value, only
share A is inverted (`ti_inverter`). AND and OR are built from three
*component functions*, one per output share:

```
share A = F1(Bx, By, Cx, Cy)   share B = F2(Ax, Ay, Cx, Cy)   share C = F3(Ax, Ay, Bx, By)
```

Each function is a 16-entry truth table, held as a 16-bit parameter. The table
entry for the inputs `(p, q, r, s)`, in the order listed above, is bit
`{s, r, q, p}`, so the first listed input is the least significant index bit.
The tables used are:

| gate | F1 | F2 | F3 |
|------|----|----|----|
| AND  | `0000001101010110` | `1001010100110000` | `0001110110111000` |
| OR   | `0000001101010110` | `1001101011000000` | `0111010000101110` |

An exhaustive search found these as the cheapest sharings. In both, F3 is
already uniform but F1 and F2 are not. No three-share AND or OR sharing is
uniform without extra randomness, so each result needs a repair step (below).

## One random bit per cycle: the reshare unit (`ti_reshare`)

Only one function of the functions array is in use at a time, so one reshare
unit serves both AND and OR. It adds the same *virtual variable* `v[i]` to
shares A and B of result bit `i`. This leaves the XOR of the shares unchanged
and makes the sharing uniform again:

* bit 0 takes the fresh random bit `rnd`;
* bit `i > 0` takes share C of operand 2 at bit `i-1`. That bit is
  statistically independent of everything at position `i`.

For a 2-bit slice, `tb_ti_uniformity` enumerates every input sharing and
random bit. It confirms that the refreshed AND and OR outputs are uniform. XOR, shift, mask and adder results are already
uniform, so the unit passes them through unchanged.

## The shared adder (`ti_full_adder`, `ti_iter_adder`)

The full adder needs no randomness. The sum is the share-wise XOR of the
three inputs. The carry `xy | xc | yc` is shared directly, with nine AND terms
per output share: share A uses only shares B and C, share B only C and A, and
share C only A and B. The carry sharing is uniform. Each pair (sum share k,
carry share k) is also uniform, and the testbench checks both properties
exhaustively. The joint sharing of all six output bits together is **not**
uniform. The design relies on the pairwise property only.

Full adders cannot be chained combinationally: a ripple path would mix all
three shares of earlier bits, and glitches would leak. The adder is
therefore **iterative**, adding one bit per clock:

* In the start cycle, bit 0 of X, bit 0 of the Y input and the carry-in shares
  go into the full adder.
* The Y register loads `{S, Y[7:1]}` and the carry register loads the carry out.
* In each of the next 7 cycles, a multiplexer selects `X[n]`, the adder adds it
  to `Y[0]`, and the Y register shifts right and takes the new sum bit at the top.

After **8 clock edges** the Y register holds the sum, and `done` is high in the
following cycle. X must stay stable until then; Y is sampled at the start.

**Increment and decrement** use the adder with operand 1 set to zero. This
still gives a uniform result:

| operation | operand 1 | inverter | carry-in shares (A, B, C) |
|-----------|-----------|----------|---------------------------|
| increment | 0         | off      | (1, 1, 1)                 |
| decrement | 0         | on (share A becomes all ones, value FF) | (0, 1, 1) |
| subtract `f - ACC` | ACC | on     | (1, 1, 1)                 |

## Bit set and bit clear (`ti_mask_gen`)

An AND or OR with an unshared one-hot mask would need resharing. Instead, the
mask generator builds a three-share mask from the shares `(A, B, C)` of the
selected bit of the operand, and the ALU XORs the operand with it:

```
M_A = B,  M_B = C ^ set,  M_C = A        (all other bit positions zero)
```

The selected bit becomes `(A^B, B^C^set, C^A)`. These shares XOR to `set`,
each depends on only two input shares, and they are uniform if the input was.
All other bits pass unchanged. The constant enters a single share only when
the bit is set; this set/clear input plays the role of a mask inverter. With
the generator disabled the mask is a shared zero, which the ALU uses to move
operand 1 unchanged (`MOVLW`). This mask formula is this design's own
construction.

## Comparisons and operand isolation (`alu_compare`)

Conditional execution needs unshared flags: `is_zero` (ALU result == 0), and
`is_one` and `is_ff` (register operand == 01 / FF). Computing a flag
recombines the shares, so both comparator inputs are ANDed with an enable. The
control FSM raises this enable only while a skip-test instruction executes.
During any other instruction the comparators see all-zero inputs and the flags
stay low. Branching on secret data still leaks through timing. Software must
avoid it: the hardware only guarantees that no flag is formed when no branch
asks for one.

## The ALU (`ti_alu`)

```
reg_1 / const / 0 --> [inverter] ------------------------> op_1 --+
reg_2 --> [shift/rotate] --+                                      +--> functions array --> reshare --> alu_out
reg_1 --> [mask gen] ------+--> op_2 -----------------------------+    (+, OR, XOR, AND)      ^ rnd
                                                                                carry_out <-- adder carry / shifted-out bit
alu_out, reg_2 --> [gated =0, =1, =FF] --> is_zero, is_one, is_ff
```

Assertions in `ti_alu` and `ti_iter_adder` check the one handshake rule:
the control word and operand 1 must stay unchanged while an addition runs.

Timing: AND, OR and XOR results appear in the `start` cycle (`done == start`).
The register file stores them at the next edge. An addition raises `done`
8 cycles after `start`; the control word and operand 1 must be held until
then. The shift unit shifts or rotates by one position, optionally through
the shared carry. For those operations `carry_out` is the shifted-out bit.

## The microcontroller (`ti_mcu`)

| block | summary |
|-------|---------|
| `program_memory` | 4096 x 16-bit instructions plus two 8-bit side arrays with shares B and C of each literal (share A is the instruction's low byte). Synchronous read, write port for loading or updating the program. |
| `program_counter` | 12 bits: +1, +2 when a skip test succeeds, load for `GOTO`. |
| `regfile_shared` | 64 registers x 8 bits x 3 shares. Address 0 = ACC, 1 = STATUS (bit 0 = shared carry), 2 = PAGE, GPRs, and the top 8 = I/O registers. The I/O registers have an external shared write port, and their shares are visible on `io_q`. Two read ports, one write port. |
| `control_fsm` | FETCH, EXEC, WAIT. Two cycles per instruction, 10 for adder instructions (2 + 8). |

Ports of `ti_mcu`: `clk`, `rst_n` (asynchronous, active low, clears every
share), `run` (hold low while loading a program), `rnd` (one random bit per
cycle from an external source), the program write port `prog_*`, the I/O port
`io_we/io_waddr/io_wdata/io_q`, and `pc`.

### Instruction set (this design's own encoding)

| `[15:14]` | fields | instructions |
|-----------|--------|--------------|
| `00` register | `[13:10]` func, `[9]` d (0: ACC, 1: f), `[8:6]` bit, `[5:0]` f | MOVF, MOVWF, ADDWF, SUBWF (f - ACC), ANDWF, IORWF, XORWF, COMF, INCF, DECF, RLF/RRF (through carry), CLRF, BSF, BCF, ADDCWF (with carry) |
| `01` literal | `[11:8]` func, `[7:0]` share A of k | MOVLW, ADDLW, ANDLW, IORLW, XORLW (other codes: no operation); the result goes to ACC |
| `10` skip | `[13:12]` cond, `[5:0]` f | skip the next instruction if f == 0, f == 1, f == FF, f != 0 |
| `11` goto | `[7:0]` k | pc = {PAGE[3:0], k} |

The carry is written by ADDWF, SUBWF, ADDCWF, ADDLW, RLF and RRF. Carry-in
shares for each instruction are listed in the adder section. Each instruction
is built only from ALU operations. MOVWF XORs ACC with a zero operand 1. CLRF
ANDs the register with zero, so the cleared value gets a fresh sharing from
the reshare unit. BSF and BCF XOR the register with the shared mask.

## Sizes

| parameter | default | where |
|-----------|---------|-------|
| data width `W` | 8 | all ALU blocks |
| `N_REG` | 64 | register file |
| `PC_W` | 12 (4096 words) | program memory, PC |
| `N_IO` | 8 (own choice) | I/O registers |

After coarse synthesis, the whole core has about 1580 flip-flops (mostly the
1536 register-file share bits) and 128 kbit of program memory.

## Where this RTL is its own

* **Instruction set, encoding, FSM timing, register-map details**
  (carry in STATUS bit 0, PAGE supplying the upper jump bits, 8 I/O
  registers): own choices. Only the ALU functions they use come from the design.
* **Constant storage:** only literal constants are stored shared. Opcodes,
  register addresses and jump targets stay unshared.
* **Bit set/clear mask:** the formula `(B, C^set, A)` above is own.
* **Virtual variables:** the resharing takes share C of operand 2 at the
  neighbouring bit position. Another independent share would also work.
* **Shift/rotate:** one position per instruction only.
* **Not modelled:** the random bit source, the non-volatile memory technology
  of the program memory, and the peripherals on the I/O bus (for example, a
  cryptographic coprocessor that would itself be masked). They connect through
  `rnd`, `prog_*` and the I/O ports.
* **Not evaluated:** no side-channel evaluation or gate-level glitch analysis
  is part of this RTL. Non-completeness holds at the RTL structure level. A
  synthesis tool may restructure logic across shares unless the shared gates
  are kept as separate cells.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches compute expected values on
the unshared data, re-sharing inputs at random. For example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module tb_ti_mcu rtl/ti_pkg.sv tb/tb_ti_mcu.sv
./obj_dir/Vtb_ti_mcu
```

`tb_ti_mcu` runs the whole core at its default sizes. It loads a program
through the program port with randomly shared literals and writes a shared
value into an I/O register. It then checks the results in the I/O and
general-purpose registers, and the duration of every instruction (2 or 10
cycles). It also confirms that each mechanism happened: iterative adds,
resharing, bit set/clear, rotate through carry, taken and untaken skips,
gated comparisons, paged jumps, and the external I/O write.

Other testbenches:

* `tb_ti_full_adder` checks correctness and uniformity over all 512 input
  share combinations.
* `tb_ti_gate` checks both gates exhaustively on one bit and at random on bytes.
* `tb_ti_iter_adder` checks the 8-cycle latency.
* `tb_ti_uniformity` covers every sharing on a 2-bit slice of AND/OR plus
  the reshare unit. It shows that each result sharing occurs equally often,
  and that without the reshare step it does not.
