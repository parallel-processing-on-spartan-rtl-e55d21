# A two-thread calculator processor with one shared control unit

This is a small multiprocessor for unsigned 8-bit arithmetic (add, subtract,
multiply), built for a Spartan-3E board with a four-digit seven-segment
display. Its main idea is that **one control unit feeds two execution
threads**. A single program counter, instruction register and decoder fetch
one instruction stream from a shared 20-byte memory. Each instruction goes to
the thread that owns the accumulator it names:

* thread 0 owns accumulator **A1**;
* thread 1 owns accumulator **A2**.

A thread needs several cycles for an instruction. The control unit can fetch
and issue the next one in fewer cycles, so the two threads end up working at
the same time. A *single* mode turns that overlap off, which gives a
one-processor baseline that computes the same results more slowly.

The RTL follows the design of the paper "Parallel Processing on Spartan-3"
(Rif'an, Manan, Ponco; University of Brawijaya). That design fixes the block
structure, the two threads with one control unit, the 8-bit bus, the 20-byte
shared memory, the instruction set and the steps of an instruction. The binary
encoding, all cycle timing, the handshakes, the flags and the display format
were chosen for this RTL. Each is listed in the file that implements it and
summarised under "Departures and own choices" below.

## Block structure

```
 in_data/in_push ──► input_buffer ──(transfer)──► main_memory (20 B)
                          │                          │ read port
                          ▼                          ▼
                    seg7_display ◄── A1:A2 ──   control_unit  (PC, IR, instr_decoder)
                                                 │ start/dec/imm      ▲ busy
                                   ┌─────────────┴─────────────┐      │
                                   ▼                           ▼      │
                             thread_core 0               thread_core 1
                           (A1, TREG, ALU, OUTREG)     (A2, TREG, ALU, OUTREG)
```

| File | Role |
|---|---|
| `rtl/pp_pkg.sv` | widths, memory size, opcode and ALU enums, the decoded-instruction struct, `encode()` helper |
| `rtl/pp_top.sv` | the whole design |
| `rtl/input_buffer.sv` | 20-byte FIFO for entered bytes; copies them into memory on request |
| `rtl/main_memory.sv` | 20 × 8 shared memory, one synchronous write port and one synchronous read port |
| `rtl/control_unit.sv` | fetches, decodes and issues instructions; single/dual mode; cycle and stall counters |
| `rtl/instr_decoder.sv` | first instruction byte → control word |
| `rtl/thread_core.sv` | one thread: accumulator, input temp register TREG, ALU, output temp register, flag |
| `rtl/alu.sv` | 8-bit pass / add / subtract / multiply with carry, borrow or overflow flag |
| `rtl/seg7_display.sv` | four-digit multiplexed hex display driver |

## Instruction set and encoding

| Mnemonic | Byte 0 | Byte 1 | Effect on the named accumulator A | Flag |
|---|---|---|---|---|
| NOP  | `000 r 0000` | – | nothing (fetched and decoded only) | – |
| MVI  | `001 r 0000` | imm | A ← imm | 0 |
| INC  | `010 r 0000` | – | A ← A + 1 | carry |
| ADI  | `011 r 0000` | imm | A ← A + imm | carry |
| SUI  | `100 r 0000` | imm | A ← A − imm | borrow |
| MULI | `101 r 0000` | imm | A ← low byte of A × imm | product > 255 |

`r` selects the accumulator: 0 is A1 (thread 0) and 1 is A2 (thread 1).
Opcodes 6 and 7 are unused and act as NOP. Bits [3:0] are ignored. Because
NOP is `8'h00`, a cleared memory holds only NOPs. The function
`pp_pkg::encode(op, r)` builds the first byte of an instruction.

There is no halt instruction. A program is simply the bytes that were
loaded, and a run ends when the program counter reaches that length and both
threads are idle. Each run starts from A1 = A2 = 0 with both flags cleared.

## How a calculation runs

1. **Entry.** Each `in_push` pulse stores `in_data` in the input buffer.
   During entry the display shows the byte count (left two digits) and the
   last byte entered (right two digits). The buffer holds 20 bytes. A push
   into a full buffer is dropped and sets the sticky `buf_overflow`.
2. **Load.** An `in_load` pulse copies the buffer into memory addresses
   0, 1, 2, … at one byte per cycle. When the copy is finished, `load_done`
   pulses and `prog_len` holds the number of bytes copied. Memory bytes above
   `prog_len` keep their old contents and are never executed.
3. **Run.** A `run` pulse samples `dual_mode`, clears the accumulators and
   runs the program. `done` goes high at the end and stays high until the
   next run. `run_cycles` then holds the execution time in clock cycles, and
   `stall_cycles` holds how long issue waited for a busy thread. From the run
   onward the display shows A1 (left) and A2 (right) in hex.

## Issue timing: where the parallelism comes from

This section covers the part of the design that takes the most care to read.

**Thread.** When a thread gets a `start` pulse, it takes four cycles from
that pulse to the accumulator write:

| cycle | state | action |
|---|---|---|
| 0 | IDLE + `start` | latch the ALU operation and the immediate |
| 1 | LOAD | TREG ← 1 (for INC) or the immediate |
| 2 | EXEC | OUTREG ← ALU(A, TREG); the flag is computed |
| 3 | WB | A ← OUTREG; the flag register is updated; `done` pulses |

`busy` is high in LOAD, EXEC and WB. A thread can therefore accept a new
instruction at most every fourth cycle.

**Control unit.** The memory read is synchronous, so the unit always puts out
the address of the byte it will need next, one cycle ahead. Each instruction
goes through these states:

* DECODE latches the instruction register and the decoded control word, and
  adds 1 to the PC.
* IMM (only for an instruction with an immediate) latches the immediate and
  adds 1 to the PC.
* ISSUE pulses `start` to the target thread. If that thread is busy, ISSUE
  holds and counts a stall cycle.

In **dual mode**, the ISSUE cycle also fetches the next instruction, so the
next cycle is already that instruction's DECODE. An INC then takes 2 cycles
of the control unit, and an instruction with an immediate takes 3. A thread
takes 4. Two consequences follow:

* Instructions that alternate between A1 and A2 keep both threads busy at
  the same time.
* Instructions that name the same accumulator in quick succession stall the
  issue. For example, two INC A1 in a row stall for 2 cycles.

A NOP only passes through DECODE, so in either mode it costs one cycle plus
any fetch.

In **single mode**, every ISSUE is followed by a WAIT state that lasts until
both threads are idle, and then by a fresh FETCH. No two instructions ever
overlap, and there are never stalls. An assertion in `control_unit` checks
this.

For the 16-byte program in `tb/tb_control_unit.sv` (MVI, MVI, INC, INC, NOP,
ADI, SUI, MULI, INC, INC, unused opcode), single mode takes 72 cycles and dual
mode takes 33 cycles, with 4 stall cycles. The testbench checks these numbers
exactly. The results are identical in the two modes; only the time differs.

## Departures and own choices

Chosen for this RTL and not fixed by the design it follows:

* The instruction encoding, the absence of a halt instruction, and the end
  of a run at the loaded length.
* The cycle split of the thread steps and of the control unit states, given
  above.
* The flag register in each thread (carry, borrow, product overflow). A
  product keeps only its low 8 bits.
* The input buffer as a FIFO of the memory's size, and its one-byte-per-cycle
  copy to memory.
* The memory as a point-to-point, two-port array (one write port, one read
  port) rather than a shared bus. It is cleared to zero on reset.
* Clearing both accumulators when a run starts.
* The display's content, hex format, active-low polarity and refresh rate.
  `REFRESH_BITS` = 18 gives about 1.3 ms per digit at 50 MHz; the board
  clock frequency is an assumption.
* Synchronous active-high reset. `in_push`, `in_load` and `run` are taken as
  clean one-cycle pulses, so button debouncing must be added outside
  `pp_top`.

What is not implemented:

* The original work compares two ways of coordinating the threads: an SMP
  style, in which the front processor moves tasks between threads, and a
  barrel style, in which results are passed from thread to thread to balance
  the load. It reports different run times for them. It does not say what
  separates them in hardware. This RTL has one overlapped mode (`dual_mode`
  = 1) and the single-processor mode. It does not model the two schemes
  separately.
* The run times in the original work are in seconds, measured with a
  stopwatch on the board, and the program used is not given. They cannot be
  compared with the cycle counts here.

## Interface of `pp_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset, active high |
| `in_data` | in | 8 | byte to enter |
| `in_push` | in | 1 | store `in_data` in the input buffer |
| `in_load` | in | 1 | copy the buffer to memory |
| `run` | in | 1 | start the program (ignored while loading or running) |
| `dual_mode` | in | 1 | 1 = threads overlap, 0 = single processor |
| `an`, `seg`, `dp` | out | 4, 7, 1 | display: digit enables, segments {g..a}, decimal point (all active low; `dp` is always off) |
| `acc1`, `acc2` | out | 8 | accumulators A1, A2 |
| `flag1`, `flag2` | out | 1 | carry/borrow/overflow of each thread's last instruction |
| `running`, `done` | out | 1 | run status |
| `loading`, `load_done` | out | 1 | copy in progress; copy finished (pulse) |
| `buf_full`, `buf_empty`, `buf_overflow` | out | 1 | input buffer status |
| `prog_len` | out | 5 | loaded program length in bytes |
| `run_cycles`, `stall_cycles` | out | 16 | execution time and issue stalls of the last run |
| `instr_count`, `ir` | out | 8 | instructions decoded; instruction register |
| `thread_busy`, `thread_done` | out | 2 | per-thread busy and write-back pulse |

The only parameter of the top is `REFRESH_BITS`. `pp_pkg` sets the data width
(8), the memory size (20) and the thread count (2).

## Simulating

Every testbench checks its own results, and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/pp_pkg.sv rtl/*.sv tb/tb_pp_top.sv --top-module tb_pp_top -o sim
./obj_dir/sim
```

Replace `tb_pp_top` with any other testbench name. Each testbench has a
watchdog that counts a failure and stops the run if it hangs.

| Testbench | What it checks |
|---|---|
| `tb_alu` | all 65,536 operand pairs for each of the four operations |
| `tb_instr_decoder` | all 256 first bytes |
| `tb_thread_core` | 1,000 random instructions against a model; busy for exactly 3 cycles; one `done` pulse; clear |
| `tb_main_memory` | reset to zero; write and read of every byte; out-of-range addresses |
| `tb_input_buffer` | count, full, overflow; copy order, timing (n+1 cycles), `prog_len`; pointer wrap |
| `tb_control_unit` | issue order, target thread and immediates with model memory and threads; exact cycle and stall counts in both modes; no overlap in single mode; 200 random programs |
| `tb_seg7_display` | scan order, one digit at a time, font |
| `tb_pp_top` | end to end at default parameters (see below) |

`tb_pp_top` enters, loads and runs a fixed program and 60 random programs,
each in both modes. It compares A1, A2 and the flags with an
instruction-level model, and reads the display back from `an` and `seg`. It
also counts how often each mechanism occurred: every opcode, carry, borrow,
product overflow, issue stalls, both threads busy in the same cycle, dual
mode running faster than single mode, an input-buffer overflow, and both
display views. It fails if any of these never occurred. It runs in a few
seconds.
