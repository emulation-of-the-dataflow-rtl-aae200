# A dataflow computer whose memory does the dataflow work

In a dataflow computer an instruction runs as soon as its operands exist.
There is no program counter. The hard part is finding the instructions that
have just become ready. This machine gives that job to the memory. Every word
of the program memory is an "intelligent cell" that holds one instruction
and its operand slots. Each cell also records where its operands and its
enabling condition come from. Every result the processors produce is
broadcast to all cells together with the address of the instruction that
produced it. A cell that needs that result takes it. Once a cell has both
operands and a true condition, it sends itself to a queue as a ready
"executable". Simple execution units take executables from the queue,
compute, and broadcast the result. Those results close the loop.

This SystemVerilog model is synchronous and cycle-accurate. It follows a
prototype design that was originally built from Altera FPGA parts. The
default parameters are the original design's numbers. All RTL is in `rtl/`
and all testbenches are in `tb/`.

```
            +------------------------- result bus (broadcast) -----------------------+
            |                                                                         |
   +--------v--------------------------------------------+                            |
   | Dataflow Memory (DFM): 8 blocks x 256 cells          |   seed source (7FF, 1) ---+
   |  per block: LU5+queue -> LU2/LU3/LU4 -> LU1+CS1 -----+--> LU1 SP/LK packets ------+
   +------------------------------+-----------------------+                            |
                                  | instruction bus (executables)                      |
                          +-------v--------+                                           |
                          | Instruction    |  bank arbitrator, one bank per processor  |
                          | Queue (IQ)     |                                           |
                          +-------+--------+                                           |
                                  |                                                    |
                          +-------v--------+                                           |
                          | processor pool |-------------- result packets -------------+
                          +----------------+
```

## The cell

The DFM has 2K cells with 11-bit addresses. The upper three address bits
select one of 8 blocks of 256 cells. Data values are 7 bits. A cell is one
61-bit word, split into four *cell sections*:

| bits  | field | section | meaning |
|-------|-------|---------|---------|
| 60:50 | D2A   | CS4 | address of the instruction that produces operand 2 |
| 49    | D2R   | CS4 | operand 2 must be fetched from D2A |
| 48:38 | D1A   | CS3 | address of the instruction that produces operand 1 |
| 37    | D1R   | CS3 | operand 1 must be fetched from D1A |
| 36:26 | CAD   | CS2 | address of the instruction that produces the clause |
| 25    | CR    | CS2 | the clause must be fetched from CAD |
| 24:18 | OPD2  | CS1 | operand 2 value |
| 17:11 | OPD1  | CS1 | operand 1 value |
| 10:7  | OP    | CS1 | opcode |
| 6:5   | LP    | CS1 | loop field: 0 ordinary, 1 SP, 2 loop conditional, 3 LK |
| 4     | D2U   | CS1 | operand 2 is reused (kept after firing) |
| 3     | D1U   | CS1 | operand 1 is reused |
| 2     | D2O   | CS1 | operand 2 is present |
| 1     | D1O   | CS1 | operand 1 is present |
| 0     | CAN   | CS1 | clause answer (instruction enabled) |

An immediate operand is written into OPD1 or OPD2 with its "present" flag
already set. An instruction with no condition has CR=0 and CAN=1.

Opcodes (`dfc_pkg::opcode_e`):

| code | op  | | code | op  |
|------|-----|-|------|-----|
| 0000 | SP/LK (LP decides) | | 1000 | CEQ |
| 0001 | ADD | | 1001 | CNE |
| 0010 | SUB | | 1010 | CGT |
| 0011 | MUL | | 1011 | CLT |
| 0100 | DIV | | 1100 | CGE |
|      |     | | 1101 | CLE |

Every operation is `OPD1 op OPD2`. The hardware is deliberately narrow:

- ADD is a 6-bit adder, and its carry becomes result bit 6.
- SUB is 7 bits, modulo 128.
- MUL multiplies OPD1[3:0] by OPD2[2:0].
- DIV is 7-bit unsigned; dividing by zero gives 7F.
- Compares are unsigned and return 0 or 1.

## Packets on the buses

- **Result packet**, 18 bits: `{OA[10:0], value[6:0]}`. OA is the address of
  the cell that produced the value.
- **Token**, 20 bits: `{cell address, value, type}`. It goes from a matching
  unit to LU1. Type 01 means operand 1, 10 means operand 2, 11 means clause.
- **Executable**, 29 bits: `{OA, OPD2, OPD1, OP}`. It goes from LU1 through
  the instruction queue to a processor.

## How a result finds its consumers (one DFM block)

Each block has five logic units (LU), one per cell section. They work on all
256 cells of the block in turn.

1. **LU5 and the queue buffer** (`lu5_queue_buffer`) take every packet from
   the result bus.
   - If LU2-LU4 are idle and nothing is queued, the packet passes straight
     through.
   - Otherwise the packet joins a 256-entry circular FIFO, and queued
     packets are handed on oldest first.
   - When the FIFO is full, the block raises `busy`. The result bus then
     grants nobody until every block has room again.
2. **LU2, LU3 and LU4** (`cs_match`, three instances) walk cells 1..254
   (cells 0 and 255 are not used). Each compares the packet's OA with its
   own section's address: CAD, D1A or D2A. For every cell whose
   "required" bit is set and whose address matches, the unit puts a token
   on the block's operand bus. A single packet can feed any number of
   cells. Each cell compare takes 5 cycles. A new packet is accepted only
   when all three units have finished.
3. **The LU234 bus controller** gives the operand bus to LU2, then LU3,
   then LU4.
4. **LU1** (`lu1_cs1`) writes the token into CS1. Then it applies the
   firing rules:
   - **LP=1 (SP, loop entry):** if CAN is set and either operand is
     present, send that operand back onto the result bus as this cell's
     own result. Then clear D1O and D2O. CAN stays as it is.
   - **LP=3 (LK, lock):** if CAN and both operands are present, send OPD1
     as this cell's result. Then clear D1O and D2O. An LK cell both holds
     a value and gates it.
   - **Otherwise:** if CAN and both operands are present, send the
     executable to the instruction queue. Then:
     - clear D1O unless D1U is set, and D2O unless D2U is set;
     - clear CAN if LP=0; an LP=2 loop conditional keeps its clause.

   Handling a token takes 8 cycles, plus any wait for the instruction bus
   or the result bus.

SP and LK cells never go to a processor. Loops are built from them. For
example, `tb_dataflow_computer_stress` runs
"`i = 1; do i = i + 1 while i < 5`":

- an SP cell forwards the loop variable;
- an ADD and a CLT with LP=2 keep their clause and reuse their immediate
  operands;
- an LK cell passes the new value back to the SP cell only when the
  compare says "continue". It keeps the final value when the loop ends.

## Instruction queue and processors

- The **bank arbitrator** (`bank_arbitrator`) deals executables out
  round-robin with a pointer MP. If the bank at MP is busy or full, it moves
  on to the next bank.
- Each processor has its own **bank** (`iq_bank`): a 16-word circular queue
  with pointers NILP (load) and NIEP (execute).
  - The bank is empty when NILP = NIEP and full when NILP = NIEP-1, so 15
    words are usable.
  - `instr_rd` tells the processor that work is waiting.
  - The processor answers with `instr_done` after its result has been put
    on the result bus.
- A **processor** (`processor`) takes 8 cycles to execute. It then asks the
  result bus controller for the bus.

The **result bus controller** is the same `bus_controller` module as the
LU234 one.

- Priority order: the LU1s of the blocks first (block 0 first), then the
  processors, then the seed source.
- Grants come at least 7 cycles apart, after 6 cycles of service.
- The **seed source** (`seed_init`) places `{7FF, 1}` on the bus on a
  rising edge of `init`. Programs start from this "clause from address 7FF".

## Timing, in clock cycles

| step | this RTL | original prototype, best case |
|------|----------|-------------------------------|
| result-bus grant after a request | 2 | 2 |
| result-bus service / next grant | 6 / 7th cycle | 6 / 7th cycle |
| operand-bus service / next grant | 7 / 8th cycle | 7 / 8th cycle |
| compare one cell, no match | 5 | 5 |
| LU1 deposit of a token | 8 | 8 |
| LU1 executable or SP/LK packet | 8 + bus wait | 8 |
| LU5 pass-through / queue | 1 / 1 | 3 / 6 |
| IQ store of an executable | about 3 | 4 |
| processor execution | 8 | 8 |

A packet that matches nothing still costs a full scan of about
254 x 5 = 1270 cycles per block. Performance therefore depends on how many
cells each result feeds. The test programs show this:

- Array program, 12 elements, 48 cells, one consumer per result
  (`tb_dataflow_computer`):
  - 46,175 cycles from the seed to the last result deposited;
  - about 460 us at 100 MHz; the prototype was measured at about 314 us.
- Fan-out program, 27 cells, where two results each feed 13 cells
  (`tb_program3`):
  - 2,856 cycles, about 29 us; the prototype was measured at about 31 us.
- The array program on 16- and 32-processor pools (`tb_scale_proc`) takes
  the same 46,175 cycles as on two: the machine is limited by the cell scan in the
  DFM blocks, not by the processors.
- Loop program, 16 cells, a FOR loop (F1 = 36) and a WHILE loop (F2 = 6)
  running side by side (`tb_program1`):
  - 38 result packets, 47,358 cycles, about 474 us; the prototype was
    measured at about 485 us including the program load.
  - Its cell table is rebuilt from the worked example of the same program.
    The constant 9 is placed in the 4-bit multiplicand so that 9 x 2 fits
    the 4 x 3 multiplier. The two accumulator cells take their second
    operand from their own result.

The array program's gap to the prototype has not been traced to a single
cause. The LU5, IQ and bus steps in this RTL are no slower than the
prototype's best cases (see the table). Time lost to waiting for a bus or
to queueing was not measured separately, so the gap remains unexplained.

## Back-pressure, and a deadlock to know about

The result bus stops while any block's queue buffer is full. An LU1 stops
while the instruction queue is busy. A processor stops until it gets the
result bus. Suppose all of these happen together:

- a block's LU1 waits for a full instruction queue;
- the processors wait for the result bus;
- the result bus waits for that block's full queue buffer.

Then the machine locks up. With 256-entry queue buffers this needs hundreds
of results in flight, and none of the test programs comes near it. The
stress test reproduced the lockup with 2-word banks and 4-entry queue
buffers, so it uses 4-word banks and 8-entry queues. Keep `QB_AW` large when
shrinking the machine.

## Parameters of `dataflow_computer`

| parameter | default | meaning |
|-----------|---------|---------|
| NBLOCKS | 8 | DFM blocks of 256 cells (address bits 10:8 select the block) |
| NPROC | 2 | processors, and so IQ banks |
| BANK_AW | 4 | log2 of words per IQ bank (16) |
| QB_AW | 8 | log2 of queue-buffer entries per block (256) |
| CYCLES_PER_CELL | 5 | cycles per cell compare in LU2-LU4 |
| TOKEN_CYCLES | 8 | cycles LU1 spends per token |
| EXEC_CYCLES | 8 | processor execution cycles |
| RBUS_SERVICE | 6 | result bus service cycles |
| OBUS_SERVICE | 7 | operand bus service cycles |

Top-level ports:

- **Program load:** `load`, `load_addr[10:0]` and `load_data[60:0]` write
  one cell per cycle.
- **Start:** `init` starts execution.
- **Result bus:** `rb_valid` and `rb_msg` show it.
- **Observation:** `peek_addr` and `peek_data` read any cell's CS1 (values
  and flags).
- **Event pulses**, for counting:
  - one bit per block: executables fired, SP/LK packets, packets queued;
  - matches: three bits per block, one per matching section;
  - `qb_busy` and `iq_skip_event`;
  - one bit per processor: `bank_full` and `proc_exec_event`.

**Loading a program.** Cells that are never written hold undefined contents
after power-up. Write every cell, using zero for unused cells, before
raising `init`.

## Where this model departs from the original design

- **Clocking.** The prototype sequenced its units with pulse generators,
  delay timers and divided clocks. Here everything is a synchronous state
  machine on one clock with an asynchronous active-low reset. Some steps
  are faster as a result: the LU5 and IQ steps take 1 to 3 cycles instead
  of 3 to 12.
- **Size.** The prototype had one DFM block. The design, and this RTL by
  default, has 8. Results of every block share one result bus.
- **Instruction bus.** How several blocks share the instruction bus was
  left open. Here it is a fixed-priority arbiter, block 0 first, that grants
  only while the IQ is not busy.
- **Seed priority.** The priority of the seed on the result bus was not
  specified. It is lowest here.
- **Division.** The prototype left out division. DIV is implemented here,
  and dividing by zero returns 7F.
- **LP=2.** For LP=2 the only rule given was that it marks loop
  conditionals. Here it means "keep CAN after firing".
- **Full bank.** What the bank arbitrator does with a full bank was not
  given. Here it skips to the next bank.
- **Token encoding.** The two-bit token type encoding is this model's own.
- **Not built:**
  - a crossbar letting a processor use another processor's bank, which was
    mentioned only as an ideal;
  - the proposed later enhancements: smaller blocks, and several sets of
    logic units per block.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| tb_circ_queue | FIFO order, empty/full, random push/pop against a model |
| tb_bus_controller | priority, 2-cycle grant, 7/8-cycle spacing, busy hold-off |
| tb_seed_init | one seed per init edge, held until granted |
| tb_lu5_queue_buffer | bypass, queueing, order, hold register, busy |
| tb_cs_match | matches only with the required bit, 5 cycles per cell, full scan |
| tb_lu1_cs1 | firing rules (ordinary, reuse, LP=2, SP, LK, false clause), 8-cycle token |
| tb_dfm_block | four-cell program through one block with simultaneous packets |
| tb_dfm | result bus priority and spacing, cross-block program, instruction bus hold |
| tb_iq_bank | circular queue order, ack, busy/full, NILP/NIEP |
| tb_bank_arbitrator | round robin and skipping of busy banks |
| tb_instruction_queue | every executable delivered once, per-bank order, full and skip |
| tb_processor | all opcodes against a reference ALU, 8-cycle execution |
| tb_processor_pool | three processors in parallel, results and done handshake |
| tb_dataflow_computer | full-size machine running the 12-element array program |
| tb_program3 | full-size machine running the high fan-out program |
| tb_program1 | full-size machine running the FOR/WHILE loop program (F1 = 36, F2 = 6) |
| tb_scale_proc | the array program on 16- and 32-processor pools side by side |
| tb_dataflow_computer_stress | small machine: counting loop plus flooding work; bank skips, full banks and full queue buffers |

To run one with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dataflow_computer \
  -y rtl -y tb +libext+.sv -Irtl rtl/dfc_pkg.sv tb/tb_dataflow_computer.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`+verilator+rand+reset+2` starts all state at random values. This checks
that nothing depends on power-up contents.
