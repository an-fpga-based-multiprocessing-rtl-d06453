# BST master: a multitasking timing processor for SPS and LHC

The Beam Synchronous Timing (BST) master broadcasts one short message every
revolution of the beam: a few dozen bytes of machine status, triggers, turn
number and UTC time. The message leaves on a serial line at one bit per bunch
clock (40.079 MHz). A TTC transmitter encodes it and sends it over optical fibre
to receivers around the ring. The revolution period is 23 µs in the SPS and
89 µs in the LHC. The next message must be complete when a turn starts, every
turn, without exception.

The design puts a small processor inside the FPGA. Up to eight tasks build the
message, and the crate CPU only sets things up. The processor switches task after
every instruction, in round-robin order, so switching costs nothing and no task
can block another. Its instructions are aimed at the job: wait for a turn
number, a trigger, the PPS or a Sync pulse, and put a byte into the next
message. Two message buffers hide the turn boundary. The serializer sends the
present message while the tasks and the crate CPU fill the next one.

This repository holds that main FPGA logic as synthesizable SystemVerilog, with
a self-checking testbench for every block.

## Block structure

```
            VME bus                     external SRAM (task code, 512 kByte)
               |                                   |
        vme_interface --- address_decoder --- sram_manager
               |           |   |   |   |           |
          ctrl_reg  std_regs   |   |  enabled_tasks|
                               |   |       |       |
        msg_enable_regs   msg_dpram   task_regs_dpram
               |           |   |           |       |
           serializer -----+   +------- bst_cpu ---+
               |                    (task_scheduler, fetch_unit,
          BST message line           decode_unit, exec_unit,
                                     task_status_reg)
   frev, Sync, 16 events --> global_regs (turn number, triggers)
   PPS, 40 MHz GMT       --> utc_block
```

`bst_master_top` wires these together. Everything runs on the bunch clock
`clk`, except the counting half of `utc_block`, which runs on the 40.000 MHz
GMT clock `clk40`. All timing inputs and the VME strobes are asynchronous and
are synchronised inside. Each clock domain has its own asynchronous,
active-low reset.

`bst_pkg` holds the shared sizes, the instruction encoding, the task state
codes and the register map.

## One revolution period

1. A rising edge of `frev` gives a one-clock `turn_pulse` after two
   synchroniser flip-flops. The turn number increments.
2. In that same clock, `msg_dpram` copies the next message into the present
   one. `msg_enable_regs` copies the next-turn enable bits to the present-turn
   set, and then clears every next-turn enable bit whose auto-clear bit is set.
3. The serializer walks bytes 0 to `msg_len`-1 of the present message. Each
   enabled byte goes out as one 42-bit TTC frame, and a disabled byte is
   skipped.
4. Meanwhile the tasks write the next message with `SEND`/`SENDI`. Each write
   sets that byte's next-turn enable bit. The crate CPU may also write bytes
   and enable bits over VME.

A byte with auto-clear set is sent only in the turn after it was written. A
byte with auto-clear clear is sent every turn and keeps its last value. The
next buffer keeps its contents across the copy, so a byte sent every turn does
not need to be rewritten. The original design keeps both buffers in one
dual-port RAM and does not say how they change places. This implementation
copies the next buffer into the present one, so that a continuously sent byte
holds its value without effort from the tasks.

### Frame format and timing

Each frame is a TTC individually-addressed long frame, sent most significant
bit first:

```
0 | 1 | TTCrx address (14) | E | 1 | sub-address (8) | data (8) | check (7) | 1
```

The sub-address is the byte's index in the message. The TTCrx address and the
E bit are parameters of `serializer` (defaults 0 and 1). The check field is a
Hamming code over the 32 bits between the format bit and the check field.
Number the positions of a 38-bit codeword from 1, put check bit j at position
2^j and the data bits, lowest first, at the other positions. Check bit j
(j = 0..5) is then the parity of the data bits whose position has bit j set.
Bit 6 is the parity of all 38 bits. This layout follows the TTC system's long
frame. Check the check-bit assignment against your receivers before you rely
on it.

A sent byte costs 44 bunch clocks: 2 to read it and 42 for the frame. A
skipped byte costs 1 clock. The line idles at 1. Suppose `frev` arrives while
a frame is still on the line. The frame is finished, the new message starts
straight after it, and `overrun` pulses. The output enable (control register
bit 0) is looked at only when a frame starts, so switching it never cuts a
frame in half.

When UTC insertion is on (control bit 1), bytes `utc_pos`..`utc_pos`+3 carry
the 32-bit UTC seconds, most significant byte first. The serializer latches
the seconds at the start of the turn. At each new second, the top level sets
the enable bits of those four bytes. Set their auto-clear bits to send the UTC
once per second, or clear them to send it every turn.

## The processor

### Task switching

`bst_cpu` holds one program counter per task. Its control unit repeats five
steps:

| step  | what happens                                                     |
|-------|------------------------------------------------------------------|
| SCHED | `task_scheduler` grants the next ready task after the last one    |
| FETCH | `fetch_unit` reads the two 16-bit SRAM words of the instruction   |
| RDA   | register rd of that task is addressed in `task_regs_dpram`        |
| RDB   | rd's value is latched; rs and the message byte are addressed      |
| EXEC  | `exec_unit` result applied: register, PC, task state, message, triggers, IRQ |

The following SCHED step may pick any other task. A task is ready when it is
enabled and in the running state. With an idle SRAM and `SRAM_WAIT` wait states
(default 2), an instruction takes 2·(WAIT+3)+5 = 15 bunch clocks, or 374 ns.
That is about 61 instructions per SPS turn, shared by all tasks. The original
processor needed 500 ns per instruction. VME accesses to the SRAM compete with
instruction fetches, and `sram_manager` serves the two in turn when both are
waiting.

### Registers

Each task sees registers 0 to 7 as its own. Register r of task t sits at
address 8·t + r of the task register RAM, which VME can also read and write.
Registers 8 to 10 are shared by all tasks:

| number | register          | access                                  |
|--------|-------------------|-----------------------------------------|
| 8      | turn number       | read only                               |
| 9      | external triggers | read only; synchronised level of the 16 event inputs |
| 10     | internal triggers | read/write; also `SETT`/`CLRT`          |

Numbers 11 to 15 are illegal. So is writing register 8 or 9.

### Instruction set

Instructions are 32 bits wide: `[31:26]` opcode, `[25:22]` rd, `[21:18]` rs,
`[15:0]` imm. Task t's code starts at the instruction address given in
register `RA_TASK_START+t`. Instruction n occupies SRAM words 2n (high half)
and 2n+1. Program counters are 16 bits wide, so code must lie in the lower
256 kByte of the SRAM.

| group | instructions |
|-------|--------------|
| arithmetic/logic | `LDI rd,imm`  `MOV rd,rs`  `ADD/SUB/AND/OR/XOR rd,rs`  `ADDI/SUBI/ANDI/ORI/XORI rd,imm`  `INC/DEC rd`  `SHL/SHR rd,imm` |
| program counter | `JMP imm`  `BEQ/BNE rd,rs,imm`  `BZ/BNZ rd,imm` |
| interrupt | `IRQ imm` raises a VME interrupt with status/ID imm[7:0] |
| message | `SEND rd,idx` sends rd[7:0]  `SENDI idx:data` sends a constant  `RDMSG rd,idx` reads the present message |
| wait | `WEXT mask`  `WINT mask`  `WTREL n` (turn+n)  `WTABS n`  `WTREG rd`  `WPPS`  `WSYNC` |
| triggers/control | `SETT mask`  `CLRT mask`  `STOP`  `NOP` |

`bst_pkg::mk_instr` builds an instruction word. The opcode values are listed
in `bst_pkg`.

### Waiting, status and errors

A wait instruction moves its task to the waiting state. `task_status_reg`
checks every waiting task each clock:

- `WEXT` and `WINT` wake when a bit of the mask is set in the trigger register.
- The turn waits wake when the turn number equals the target.
- `WPPS` and `WSYNC` wake on the next pulse.

A woken task becomes ready one clock later. Waking does not consume an internal
trigger; a task clears it with `CLRT`.

A task stops itself with `STOP`. The processor also stops a task that hits an
error:

- an undefined opcode: illegal command;
- a message index above 31 or a shift count above 15: illegal value;
- a bad register number: illegal register.

A stopped task keeps its program counter on the instruction that stopped it.

An `IRQ` issued while the previous interrupt is still pending is retried at
the task's next turn.

The status word gives 4 bits per task, task 0 in bits 3:0. The top bit is the
enable bit. The low three bits are the state: 0 stopped, 1 running,
2 waiting, 3 illegal command, 4 illegal value, 5 illegal register.

Enabling a task (its bit going from 0 to 1) starts it at its start address.
Disabling a task freezes it where it is.

## UTC

`utc_block` counts seconds on the synchronised PPS in the 40 MHz domain and
restarts a 26-bit sub-second counter at each PPS. To set the time, the crate
CPU writes `RA_UTC_LD_LO/HI` and then writes `RA_UTC_ARM`. The value is taken
at the next PPS. After each PPS, a toggle crosses to the bunch clock, and the
seconds are copied into `utc_sec` with a one-clock `new_sec` pulse. That pulse
is also the PPS event for `WPPS`.

## VME access

The board is an A24/D16 slave. A cycle is accepted when A23..A21 equal
`VME_BASE` (default 1, a 2 MByte window). Word addresses inside the window
(A20..A1):

| word address      | contents |
|-------------------|----------|
| 0x00000-0x3FFFF   | task code SRAM |
| 0x40000 + n       | register n (below) |
| 0x40100-0x4011F   | next message, byte n in data bits 7:0 |
| 0x40120-0x4013F   | present message |
| 0x40200-0x4023F   | task registers, 8·task + register |

| n | register | n | register |
|---|----------|---|----------|
| 0 | control: bit0 output enable, bit1 UTC in message, bit2 processor run, bit3 clear turn (write 1) | 9 | status tasks 4-7 |
| 1 | task enable bits | 10 | turn number (read only) |
| 2 | message length 0-32 (reset 32) | 11 | external triggers (read only) |
| 3 | UTC byte position | 12 | internal triggers (read only) |
| 4, 5 | next-turn enable bits 15:0, 31:16 | 13, 14 | UTC load value low, high |
| 6, 7 | auto-clear bits 15:0, 31:16 | 15 | arm UTC load (any write) |
| 8 | status tasks 0-3 | 16, 17 | UTC seconds low, high (read only) |
| 24-31 | start address of task 0-7 | | |

DTACK* stays low until DS* rises. An IRQ instruction pulls IRQ* low. The
interrupt acknowledge cycle returns the 8-bit status/ID and releases IRQ*. The
interrupter level, the address modifiers and block transfers are not decoded.

## How far to trust it

Taken from the original design:

- eight tasks, switched round-robin after every instruction;
- eight 16-bit registers per task in a dual-port RAM, plus the three global
  registers;
- the five instruction groups and the wait conditions;
- the task situations the status register reports;
- two message buffers, and who may read or write which;
- 32 enable bits and 32 auto-clear bits, with the enable bit set
  automatically on a transmission;
- programmable message length and UTC position;
- one byte per addressed TTC frame at one bit per bunch clock;
- the UTC block on the GMT 40 MHz clock and PPS;
- the SRAM shared between the processor and VME;
- the blocks and connections of the main FPGA.

Choices made in this implementation, where the original gives no detail:

- the instruction encoding and the exact instruction list;
- the frame check bits;
- the register and memory maps;
- the VME cycle handling;
- the SRAM timing and arbitration;
- the wake-up rules;
- the UTC format (32-bit seconds, four bytes);
- the start-address registers;
- copying the next buffer into the present one at each turn;
- the instruction timing.

The original processor took 500 ns per instruction. This one takes 374 ns.

Other differences to keep in mind:

- The number of external trigger inputs is not given in the original design.
  Here there are 16, read as levels from the backplane connector.
- In the original, the decoder fetches the operands. Here the control unit's
  RDA and RDB steps read them, and `decode_unit` only says which registers an
  instruction uses.
- The original design sent at most 18 continuous bytes per SPS turn. This
  serializer needs 44 clocks per byte, so up to 20 bytes fit in a 921-clock
  SPS turn.
- The original authors planned further improvements: a pipelined processor
  reaching 100 ns per instruction, and task code in on-chip RAM instead of the
  external SRAM. Neither is part of this design.

Not included:

- the small FPGA that downloads new configurations, and the configuration
  memories;
- the SRAM chip itself;
- the ECL/TTL line interfaces;
- the TTC transmitter and the receivers.

The top level brings out the SRAM, VME and message-line signals for these
parts.

## Simulating

Each block `X` has a testbench `tb/tb_X.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself. The testbenches use
behavioural models from `tb/`:

- `sram_model`: the asynchronous SRAM;
- `vme_master`: VME cycles of the crate CPU;
- `ttc_rx_model`: a frame decoder that checks the start, format and stop bits
  and the Hamming syndrome.

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_bst_master_top rtl/bst_pkg.sv tb/tb_bst_master_top.sv
./obj_dir/Vtb_bst_master_top
```

Replace the top module and its file to run another testbench.

`tb_bst_master_top` runs the whole design at its default parameters with SPS
timing (924 bunch clocks per turn). Its five tasks do the following:

- send the turn number every turn;
- react to an external trigger and raise an interrupt;
- synchronise with another task through an internal trigger, then wait for
  Sync and for the PPS;
- execute an illegal instruction;
- run an endless counting loop, started late so that its instruction
  fetches compete with VME accesses to the SRAM.

The crate CPU side writes one byte itself and has the UTC inserted. The
testbench decodes every frame and checks what is sent in each turn:

- continuous bytes every turn;
- auto-clear bytes exactly once;
- the UTC value;
- the interrupt and its status/ID;
- the task status;
- VME read-back of the SRAM while the processor fetches;
- an overrun when the turn is too short;
- the disabled output.

`tb_workloads` sends the two message sizes of the original design: an 18-byte
message every SPS turn and a 32-byte message every LHC turn (3564 bunch
clocks). It checks that every byte arrives in every turn.

`tb_bst_cpu` measures the clocks per instruction and runs every wait
condition.

To change the design, start with `bst_pkg`. It holds the sizes, the opcode
values and the register map. The instruction set lives in `decode_unit`, which
says what each opcode reads and writes, and `exec_unit`, which says what each
opcode does.
