# Super Sixteen dual-processor fault-tolerant system

This is the RTL of a small real-time system built from two identical
microprogrammed 16-bit computers, the *Super Sixteen*. The system survives
the failure of one machine. Each processor is made of separate functional
units: a sequencer, two arithmetic units, a data pipeline and a timer. Each
unit is steered directly by a wide microinstruction. While the sequencer
still works, a processor can therefore test its own units one at a time. It
reports each result to its partner over an 8-bit parallel link. The partner
decides which unit has failed and takes over the work.

Each processor runs stack-machine code (P-code, the intermediate code of
Concurrent Pascal) through an interpreter written in microcode. The design's
central trick is a two-stage instruction pipeline. A program-address unit,
separate from the data ALU, keeps memory reads two microcycles ahead of their
use. A typical stack instruction therefore takes about half the microcycles
of a plain fetch-decode-execute machine.

The RTL models the hardware. The microcode, the op-code map and the P-code
programs are firmware, loaded through ports. A small but complete firmware
set lives in the testbenches. It shows the machine running: interpreting
instructions, taking timer interrupts, detecting an illegal op-code,
reporting itself faulty to its partner and being restarted.

## The processor

```
                   +-------------------- CCU -----------------------+
                   | control_store (4096 x 96) -> pipeline register |
  ZIREG --op-code->| map_prom --+                                   |
                   |            v                                   |
                   | am2910 sequencer <- test_tree <- ALU cond,     |
                   |                                  PCU zero,     |
                   |                                  timer flag    |
                   +--------+---------------------------------------+
                            | every field below comes from the pipeline register
        DA bus (immediate | ZOREG | TREG)
          +-----------------+----------------------+
          v                 v                      |
   +-------------+   +-------------+               |
   | alu16       |   | pcu         |-- Y -->  MAR -+--> memory address
   | 4 x Am2903  |   | 4 x Am2901  |               |
   | + am2904    |   | R0..R7      |-- PCUTRAN --+ |
   +------+------+   +-------------+             | |
          | Y (or input when not driving)        v |
          +------------------ YBUS <-------------+ |
                               |   +-> DREG --> memory write data
                               |   +-> TREG --> DA bus
                               +-----> MAR (ALU-made addresses)
   memory read data -> ZREG -+-> ZOREG -> DA bus
                             +-> ZIREG -> op-code to map_prom
   tiu: 16-bit down counter, interrupt at zero, reloaded from the immediate field
```

| Unit | Module(s) | Job |
|---|---|---|
| Computer control unit (CCU) | `am2910`, `control_store`, `map_prom`, `test_tree` | Chooses the next microinstruction. It can continue, branch on one selected condition, call or return, loop on an internal counter, or jump to the address the op-code maps to. |
| ALU | `alu16` (four `am2903_slice`), `am2904` | Does the arithmetic of the program: 16 registers plus Q, add/subtract/logic/shift, flags Z N C O. The Am2904 turns the flags into one signed or unsigned comparison result. It also supplies the carry-in and the shift-end bits. |
| Program control unit (PCU) | `pcu` (four `am2901_slice`) | Does address arithmetic only. R0 = PC, R1 = SP, R2 = 1, R3 = current process, R4 = 2, R5 = 4, R6/R7 scratch. Registers 8-15 are wired out, and it can only add, subtract and OR. Its zero output reaches the sequencer through the test tree. |
| Datapath | `datapath` | Holds ZREG, ZOREG, ZIREG, DREG, TREG and MAR, plus the PCU transceiver (PCUTRAN) onto the YBUS. |
| Timer interrupt unit (TIU) | `tiu` | A 16-bit down counter. Reaching zero raises the interrupt flag, and a reload clears it. |
| Memory | `mem_select`, two `mem_board` | Two 8-bit boards make up a 16-bit memory with byte and word access. Together they hold 8K bytes of RAM and 16K bytes of EPROM. |
| I/O | `pia` (N_PIA of them), ACIA bus | All I/O is 8 bits wide and memory mapped on the low board. A PIA links the processor to its partner, and the terminal ACIA is brought out as a bus. |

`super_sixteen` joins these units into one processor. `ft_dual_system`, the
top, places two of them side by side with their first PIAs cross-connected.

### How the hardware reacts to a dead part

A failed part is assumed to have its outputs stuck at 1. Several polarity
choices make that case safe:

* **Conditions.** The sequencer's condition input means "true" when low. The
  test tree inverts the PCU zero output and the timer flag. A dead condition
  source therefore makes every test fail and no branch is taken.
* **Mapping PROM.** A dead PROM gives FF. The upper four address bits come
  from a zero-filling buffer, so the jump-to-map lands on microcode address
  0FF. The firmware keeps a jump into its fault routine there, and every
  unused op-code maps to the same address.
* **Interrupts.** The timer flag switches the PROM off, and a wired interrupt
  address (100) is used instead. An interrupt is therefore taken only at a
  jump-to-map, which is always between two P-code instructions.

## The microinstruction

The control store is 96 bits wide. This is the width of the original twelve
8-bit EPROMs. The original field map is not published. The layout below
(`ss_pkg::uinstr_t`, most significant field first) is this implementation's
own. An all-zero word means "jump to 0 with nothing written", which is what
reset loads into the pipeline register.

| Field | Bits | Meaning |
|---|---|---|
| `spare` | 2 | unused |
| `seq_i`, `ccen`, `tt_sel`, `br` | 4+1+2+12 | Am2910 instruction; use the condition; condition source (ALU, PCU zero, timer, none); branch address or counter value |
| `alu_a`, `alu_b`, `alu_i` | 4+4+9 | Am2903 register selects and I8..I0 (destination I8-5, function I4-1, source I0) |
| `alu_ea`, `alu_oeb`, `alu_we`, `alu_oey` | 4 | R from the DA bus; S from DB (unused); register write enable; ALU drives the YBUS (when low, a register write takes the YBUS) |
| `st_cond`, `st_live`, `st_ce`, `st_cin`, `st_shift` | 4+1+1+2+2 | Am2904: condition; test this cycle's flags or the status register; load the status register; carry-in source; shift linkage |
| `pcu_a`, `pcu_b`, `pcu_i`, `pcu_cin` | 3+3+8+1 | Am2901 register selects (bit 3 wired low); {I8-6, I4-3, I2-0} with I5 wired low; carry-in |
| `da_sel`, `imm` | 2+16 | DA bus source (none, ZOREG, immediate, TREG); immediate value, also the timer reload value |
| `mar_sel`, `pcutran_py` | 2+1 | MAR source (hold, PCU, YBUS); PCU result drives the YBUS |
| `dreg_ld`, `treg_ld` | 2 | YBUS into DREG or TREG |
| `mem_op`, `mem_byte` | 2+1 | none, read or write; byte access |
| `zi_ld`, `zo_ld`, `tiu_ld` | 3 | ZREG into ZIREG or ZOREG; reload the timer |

## Timing and the instruction pipeline

The machine executes one microinstruction per clock, and every register
loads at the rising edge. The sequencer works out the next address while the
current microinstruction sits in the pipeline register.

Memory is read in three steps:

1. In cycle *t* an address is put in the MAR.
2. In cycle *t+1* a read puts the word into ZREG at the end of the cycle.
3. In cycle *t+2* the word is used. It goes through ZOREG onto the DA bus (to
   the ALU or PCU) or through ZIREG to the mapping PROM.

ZOREG and ZIREG pass ZREG straight through in the cycle they are loaded, and
hold the value afterwards. This lets a freshly read word be used in the very
next cycle while ZREG is already reading the next one.

Between P-code instructions the interpreter keeps one rule. After the
jump-to-map for the instruction at address p:

* ZREG holds the word at p+2.
* PC and MAR hold p+4.

Every instruction must leave this rule true again when it ends. For a stack
ADD (pop two, push the sum), the microcode in the testbenches does this:

| Cycle | Address side (PCU, MAR) | Data side | Memory |
|---|---|---|---|
| 1 | SP to MAR | next op-code ZREG to ZIREG | |
| 2 | SP + 2 to SP and MAR | | read operand 1 |
| 3 | PC to MAR | operand 1 to ALU register | read operand 2 |
| 4 | SP to MAR | operand 2 + register to DREG | read the word after the next op-code |
| 5 | PC + 2 to PC and MAR, jump to map | | write the sum |

That is 5 microcycles. A machine without the overlap needs 11: it forms the
address, fetches and decodes before every execute. Filling the pipeline from
scratch takes three cycles:

1. PC to MAR.
2. Read, and PC + 2.
3. Read, PC + 2, ZREG to ZIREG and jump to map.

The fill is needed at start-up, after a jump and after an interrupt.

## Moving data between the two arithmetic units

Normally the PCU makes addresses and the ALU makes data. The roles can be
swapped, which the self-tests rely on:

* **ALU to MAR.** The ALU result goes onto the YBUS and the MAR loads it
  (`mar_sel = MAR_Y`). The PCU is not needed.
* **PCU to DREG or the ALU.** `pcutran_py` puts the PCU result on the YBUS.
  There it can load DREG, TREG or, with `alu_oey` low, an ALU register.
* **ALU to PCU.** The ALU result goes into TREG, and TREG drives the DA bus,
  which the PCU reads as its D operand.

Only one unit may drive the YBUS at a time. `datapath` asserts this.

## Memory and I/O map

All addresses are byte addresses. A word sits at an even address with its low
byte on the low board. The map values are this implementation's choice. The
sizes are the original's.

| Range | Contents |
|---|---|
| 0000-1FFF | RAM, 8K bytes |
| 2000-20FF | I/O window. Only even addresses reach devices; odd addresses read 0 |
| 2000-2007 | ACIA (terminal), register r at 2000 + 2r, brought out as `acia_*` |
| 2010-2017 | PIA 0: ORA/DDRA 2010, CRA 2012, ORB/DDRB 2014, CRB 2016 |
| 2018 + 8k | further PIAs when `N_PIA` > 1 |
| 4000-7FFF | EPROM, 16K bytes |
| other | reads FF |

A byte read returns the byte in bits 7-0 with the upper byte 0. A byte
write stores the low byte of DREG at the addressed byte.

### The processor-to-processor link

Each processor's PIA 0 is cross-wired to its partner's:

* port A and CA2 go to the partner's port B and CB1;
* the partner's CB2 comes back on CA1.

A message is one byte and goes through these steps:

1. The sender writes ORA. CA2 pulses for one cycle.
2. The receiver's CRB bit 7 sets. The receiver polls it.
3. The receiver reads ORB. This clears its flag and pulses CB2.
4. The sender's CRA bit 7 (the acknowledge) sets. The sender's next ORA
   write clears it.

A control register must have bit 2 set before register 0 or 2 reaches the
data register rather than the direction register. Reset clears bit 2, as on
the Motorola 6821 this models. Only the two top bits of a control register
are read-only flags.

## The dual system

`ft_dual_system` has one clock. Each processor has its own reset, its own
loading ports and its own ACIA bus, all brought out as `[1:0]` arrays.

One processor works as the main machine and the other as a backup. A faulty
processor can still run microcode tests as long as its sequencer works.
However, it cannot be trusted to judge the results. It therefore sends each
result to the operational processor, which evaluates it in software.

The firmware must also allow for any unit of the faulty processor being dead,
so it holds three ways of sending a message:

* with the ALU only;
* with the PCU only;
* with both units but without the PCUTRAN.

A delay that cannot rely on either arithmetic unit uses the sequencer's
12-bit counter alone. The message routines of the diagnosis wait 30
microcycles this way after each report. This gives the receiver time to
take the byte without any handshake.

## Diagnosing a faulty processor

A processor that has been found faulty runs a fixed set of microcode tests.
Each test routes data through a different subset of units. The operational
processor then reads the pattern of passes and failures like a truth table
and names the failed unit. Only passes are reported. The report of a test is
sent by a message routine that uses only units the test has just shown to
work, so a broken unit cannot fake a pass. A missing message counts as a
failure.

| Test | Route exercised | Reported through |
|---|---|---|
| A | write and read a RAM word: ALU makes the data and checks it with the Am2904; PCU makes the address; no PCUTRAN | ALU data, PCU address |
| B | the same, but the ALU also makes the address, which reaches the MAR through the PCUTRAN; no PCU | ALU only |
| C | PCU makes the data (through the PCUTRAN into DREG) and the address; it checks the read-back with its zero output through the test tree; no ALU | PCU only |
| D | ALU -> TREG -> PCU -> PCUTRAN -> ALU register, compared by the Am2904 | ALU data, PCU address |
| E | the ALU sends the value E7; the operational processor checks it | both ALU-data routes |
| F | byte write and read at an even address (low halves only), low byte compared | ALU data, PCU address |
| G | the operational processor sends an op-code; it is read from the PIA, goes ZREG -> ZIREG -> mapping PROM, and its routine answers 61 | all three routes |

Reading the outcome (1 = pass, in the order A B C D E F G):

| Failed part | Outcome |
|---|---|
| none | 1111111 |
| PCU (Am2901s) | 0100100 |
| ALU (Am2903s) | 0010001 |
| PCUTRAN | 1000111 |
| TREG | 1110111 |
| test tree | 1101111 |
| Am2904 | 0010101 |
| ZOREG high byte, or ZREG or DREG high byte | 0001111 |
| ZOREG low byte, or memory, MAR, ZREG or DREG low byte | 0001101 |
| ZIREG or mapping PROM | 1111110 |
| most significant Am2903 only | 0010101 |

The three message routines are:

* **PCU only.** PCU data goes through the PCUTRAN into DREG, and the PCU
  supplies the address.
* **ALU only.** ALU data goes into DREG, and the address goes through the
  PCUTRAN into the MAR.
* **ALU data with a PCU address.** No PCUTRAN is used.

The test microcode assumes that a dead part drives all 1s. It follows three
rules so that such a part cannot turn a failure into a pass:

* **Exit unless the test passes.** A failed condition never branches, so a
  test branches to its report on success and falls through to "failed".
* **Check the PCU before a PCU zero test.** The test tree inverts the PCU
  zero output, so a dead PCU would make every zero test pass. Test C first
  tests a register known to be non-zero, and gives up if it reads as zero.
* **Repeat every ALU equal-compare and check the sign.** A dead top slice
  pulls the wired Z line to "zero" and also sets N. No real result is both
  zero and negative, so a negative result on the repeated compare counts as
  a failure. Without this, tests A, D and F would pass with that fault.

Two further rules protect the messages themselves:

* **ALU constants.** Each is stored as value - 1 and loaded with carry-in 1,
  so a carry-in stuck at 1 cannot change it.
* **Copying out.** The senders copy the code out of the ALU as R OR R, which
  ignores the carry-in.

Each routine first rewrites the PIA's control register with its own units,
then writes the code to the data register. All of them avoid the Am2904 and
the test tree, so they take no branches. The routine is called with the code
already loaded into PCU R7 and ALU R10.

`build_diag_code()` in `tb/ss_fw_pkg.sv` adds these tests (about 70 words). They
start at microcode address 1C0. The senders are at 060 (PCU only), 070
(ALU only) and 080 (ALU data, PCU address). Test G's op-code 06 maps to 090.

## Test firmware (in `tb/ss_fw_pkg.sv`)

The firmware is assembled by SystemVerilog functions that set
microinstruction fields.

Processor 0 runs a P-code interpreter with five instructions:

| Op-code | Instruction | Cycles |
|---|---|---|
| 01 | JUMP t | 1, plus a 2-cycle refill |
| 02 | ADD | 5 |
| 03 | NOT | 4 |
| 04 | PUSHC c | 3 |
| 05 | SEND | send the popped low byte over the link and wait for the acknowledge |

Every other op-code maps to the fault entry.

* **Start-up.** The firmware loads the PCU constants and sets up the PIA. It
  then does a PCU self-test through the test tree and a 4-pass delay on the
  sequencer counter.
* **Timer interrupt.** The routine reloads the timer. It then checks that the
  fifth program word is the JUMP op-code, and passes a PCU constant through
  the transceiver into the ALU and compares it. Finally it backs PC up by 4
  and refills the pipeline.
* **Fault routine.** It uses the ALU alone, with addresses going onto the
  YBUS and into the MAR. It sends EE ("I am faulty"), waits on the counter
  and runs the diagnosis tests. It then halts. ALU R8 records that the
  diagnosis has run; start-up clears it. A failed decode in test G lands on
  the fault entry again, and R8 then sends it straight to the halt.

Processor 1 copies each byte it receives to its ACIA. When the byte is EE, it
also sends the op-code 06 back for test G.

The program computes `NOT(1234 + 0101) = ECCA` and sends CA, 42 and 55. It
then meets an illegal op-code. With no fault present, the partner's terminal
then shows:

`CA 42 55 EE A1 B1 C1 D1 E7 E7 F1 61 61 61`

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_alu16` | random operations against a 16-bit model, including flags, shifts and writes from the YBUS |
| `tb_am2904` | every condition on real operand pairs |
| `tb_pcu` | 2000 random operations |
| `tb_am2910` | a microprogram run through a pipeline register against a hand-traced address sequence. This includes a counter loop of x = 3 running 4 times and a full stack |
| `tb_tiu` | interrupt period measured in cycles |
| `tb_datapath` | flow-through timing of ZOREG and ZIREG |
| `tb_mem_select` | byte and word lanes against a flat byte model |
| `tb_pia` | two linked PIAs passing messages both ways |
| `tb_super_sixteen` | the firmware on one processor, with the testbench acting as the partner. It checks instruction cycle counts (ADD 5, NOT 4, PUSHC 3) and the stack in RAM |
| `tb_diagnosis` | the tests A-G on one processor, with the testbench acting as the operational processor. It runs once with no fault and once each with 13 faults forced in, in random order. The faults are:<br>- stuck outputs of the PCU, ALU, PCUTRAN, TREG, Am2904 and ZIREG<br>- a broken test-tree path<br>- stuck ZOREG halves<br>- stuck memory data lanes<br>- a dead top ALU slice<br>- a carry-in stuck at 1, under which every test must still pass<br>Each outcome must match the table above |
| `tb_ft_dual_system` | both processors at full size. The faulty one is restarted and runs the program twice |

`tb_ft_dual_system` counts each mechanism and fails if any never happens. The
mechanisms are:

* dispatch;
* interrupts and the interrupt self-test;
* transceiver transfers and ALU-made addresses;
* byte accesses;
* PCU and ALU condition branches;
* the counter loop;
* messages and acknowledges, including the sender waiting;
* the fault entry;
* terminal writes;
* the restart.

Simulate with plain verilator from the project root, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ss_pkg.sv tb/ss_fw_pkg.sv tb/tb_ft_dual_system.sv \
    --top-module tb_ft_dual_system -Mdir obj && ./obj/Vtb_ft_dual_system
```

Unit testbenches need only `rtl/ss_pkg.sv` and the testbench file. All of
them finish in well under a second.

## Where this departs from the original machine, and what is missing

* **Vendor parts from their data sheets.** The Am2901, Am2903 and Am2910 are
  modelled from the parts' data sheets as their roles require.
  * Am2903: the multiply, divide and normalise special functions and parity
    are not modelled (those codes give 0).
  * Am2904: reduced to what the machine uses: a condition select, a 4-bit
    status register, carry-in and shift-linkage selects. Its own 13-bit
    instruction coding is not reproduced.
* **Microinstruction layout, memory map and interrupt address.** These are
  unpublished and chosen here.
* **Bidirectional buses.** The YBUS and the Am2903's bidirectional Y pins are
  modelled as multiplexers with a separate input port.
* **PIA.** Only the handshake used by the link is built. Edge-polarity
  options and CA2/CB2 as inputs or levels are not.
* **ACIA.** Not modelled, only its bus is brought out.
* **Memory boards.** The board-level logic is not reproduced; each is a RAM
  plus an EPROM with a programming port.
* **Diagnosis firmware.** The tests A-G follow the routes described above.
  The expected outcome for each fault is derived from which units each test
  uses. In the dual system, the fault routine starts the tests after an
  illegal op-code. In `tb_diagnosis`, the processor starts the tests
  straight from reset. The testbench evaluates the outcome there; the
  processor-1 firmware only prints the reports. The rules that stop a dead
  part from faking a pass (exit unless passed, PCU non-zero pre-check,
  repeated compare with a sign check, constants stored one less) are
  applied as described above. The PIAs are set up once at
  the start of the tests and again inside each message routine. The routines
  do not wait for a reply.
* **Not built.** The P-code interpreter of the original, the system software
  that evaluates test results and switches main and backup roles, and the
  transfer switch box are software or off-board equipment. They are not
  built. The testbench firmware is a small stand-in written for this RTL.

The `control_store` depth is the full 12-bit sequencer space (4096 words);
the original depth is not stated.

Known lint warnings that stand:

* Some outputs are unused at the top (the sequencer's `full`/`upc_q`, PIA
  interrupt requests, TREG and status observation).
* The Y-bus assertion reads the reset as a synchronous disable.
