# Two-processor 8008 control system with a shared memory

This is a small multiprocessor for local control work. It is built from two identical Intel
8008 boards. Each board keeps its own program and working data in private memory, and the two
boards exchange results through one small memory that both can address. The private memories
carry most of the traffic, so the shared memory sees few accesses, and those seldom collide.
When they do collide, one processor is served and the other is simply stretched: its READY line
is held low and the 8008 sits in its WAIT state until the memory is free. There are no
interrupts and no priority logic beyond a fixed order for exact ties.

One board also talks to a TMS 9900 computer over the 9900's bit-serial CRU (Communications
Register Unit). In the demonstration task the 9900 plays the operator terminal. It sends a
target distance. Processor 0 turns the distance into a gun RANGE and processor 1 turns the
RANGE into an ELEVATION. The two results pass through the shared memory and go back to the 9900.

The RTL covers the logic around the processors: timing, state and cycle decoding, address
latches, memory decoding, PROM, RAM, I/O ports, the shared-memory board with its access control,
and the 9900 link. The 8008 chips are not included. Their pins are ports of the top level, and
the testbenches drive them with a bus-cycle model.

## The 8008 bus and what each board does with it

The 8008 has one 8-bit bus for addresses and data. It reports its internal state on three lines
S2..S0. A machine cycle runs like this:

| state | the CPU puts on the bus | the board does |
|---|---|---|
| T1 | low address byte A7..A0 (the accumulator, in an I/O cycle) | low address latch follows the bus and holds it |
| T2 | cycle type on D7..D6, high address A13..A8 on D5..D0 | high address latch follows the bus; decoders see the full address |
| WAIT | nothing new | entered after T2, and repeated, while READY is low |
| T3 | write data (PCW) or nothing (it reads) | RAM write, port latch, or data driven back (DBIN) |
| T4, T5 | internal execution | nothing |

The cycle types are PCI (instruction fetch), PCR (memory read), PCW (memory write) and PCC
(I/O command). The encodings of S2..S0 and D7..D6 are those of the 8008 data sheet. They are
collected in `mpcs_pkg`.

The two address latches behave like Intel 8212 latches in strobed mode: transparent while
strobed, holding afterwards. Because of this the memory decoder sees the new address during T2
itself. That matters: the shared-memory request must exist before the end of T2, when the 8008
samples READY.

### Timing

A 3 MHz crystal is divided down to the two non-overlapping 500 kHz phases φ1 and φ2. One 8008
state lasts two phase periods, so 12 crystal cycles or 4 µs. `timing_generator` produces φ1,
φ2, SYNCA, and a one-cycle strobe `state_en` in the last crystal cycle of each state. Every
register in the design runs on the crystal clock and changes only on `state_en`. Nothing is
clocked by a derived signal.

A fetch is T1, T2, T3: 36 crystal cycles, or one byte every 12 µs. The top-level testbench
checks this figure.

### Memory map (per board, 14-bit address)

| address | octal page | device |
|---|---|---|
| 0x0000–0x07FF | 00–07 | PROM, eight 256-byte EPROMs; chip = A10..A8 |
| 0x0800–0x0BFF | 10–13 | private RAM, 1K |
| 0x0C00–0x0FFF | 14–17 | shared memory board, 1K (decoder output O3, line PO3) |
| anything else | — | nothing; reads return 0 |

A one-of-eight decoder on A12..A10 splits the address into 1K blocks. It is enabled only in
memory cycles and only while A13 is low. The choice of A13 as the enable is this design's own.

### I/O

An I/O instruction names one of 32 ports. Ports 0–7 are inputs and ports 8–31 are outputs. The
port number is carried in bits 5..1 of the T2 byte. Each board has two output latches and one
input port:

- port 8: `OUT 10B` in octal 8008 notation
- port 9: `OUT 11B`
- port 3: `INP 3B`

An output latch loads the accumulator byte that the CPU sent in T1. It loads in T3 of the I/O
cycle.

## Shared memory access control

This part needs the most care. Each board requests the shared memory (`sh_req`) when both of
these hold:

- the decoded address falls in the shared block;
- the CPU is in T2, WAIT or T3 of that cycle.

`shared_arbiter` then applies these rules in every state:

1. If a processor holds the memory and is still requesting, it keeps it.
2. Otherwise, a lone requester is granted at once.
3. If both request and the memory is free, a processor that is already in WAIT wins.
   Otherwise processor 0 wins. Only this tie rule is a fixed order.
4. The holder gives the memory up at the end of its T3. A waiting processor is served in the
   next state.
5. READY is low for a processor that requests and is not granted. All other READY lines are
   high.

In practice:

- An access to a free shared memory costs no extra time.
- If the other processor got there first, the access is stretched by one or two WAIT states.
- Private memory never causes a WAIT. Its access time is far below one 4 µs state.

The granted processor's address, write data and write strobe (PCW·T3) reach the 1K array
through a multiplexer. On the original board this was done with per-processor 8212 latches and
74125 three-state buffers. The read data goes to the granted processor only. An assertion in
`shared_arbiter` checks that at most one grant is ever active.

The original board does the same job asynchronously: two cross-coupled D flip-flops drive each
other's WAIT lines and are preset at T1. This RTL keeps the rule but makes the circuit
synchronous. Both boards are also paced by one timing generator. The original boards had a
crystal each, and so had to cross clock domains at the shared board. Keep this in mind if the
boards are to run from independent clocks: the arbiter would then need synchronisers.

## The 9900 link

The 9900 moves CRU data one bit at a time. Each bit has its own bit address on address lines
A3..A14; the software base held in R12 is twice that bit address. `cru_interface` contains:

- latch 0 (base `>1000`): an 8-bit addressable latch, LS259 type. It stores CRUOUT into the bit
  selected by the low three address lines on each CRUCLK pulse. It drives processor 0's input
  port 3 (the DISTANCE).
- latch 1 (base `>1010`): a second latch of the same kind, brought out as `cru_latch1`.
- an 8-to-1 selector (LS251 type) at base `>1000`. It returns one bit of processor 0's output
  port 8 on CRUIN (the RANGE, then the ELEVATION).

The 9900's RESET clears both latches. `cru_clk` is taken to be a one-cycle pulse synchronous to
the crystal clock.

## Files

All RTL is in `rtl/`, one module or package per file. Testbenches are in `tb/`.

| module | role |
|---|---|
| `mpcs_pkg` | state and cycle encodings, decoded-state struct, memory map and port numbers |
| `timing_generator` | φ1/φ2, SYNCA, end-of-state strobe |
| `state_decoder` | S2..S0 → T1, T1I, T2, WAIT, T3, STOP, T4, T5; T2L and T3A |
| `cycle_decoder` | D7..D6 → PCI, PCR, PCC, PCW |
| `address_latch` | 8212-style strobed latch (low and high address bytes) |
| `rw_control` | R/W̄ (low in T3 of PCW) and DBIN |
| `mem_decoder` | PROM chip selects, private RAM select, shared select (PO3) |
| `prom` | 2K × 8 PROM with a programming port |
| `local_ram` | 1K × 8 private RAM |
| `io_ports` | port decoding, output latches 8 and 9, input port 3 |
| `bus_logic` | returns the selected source to the CPU while DBIN is high |
| `cpu_module` | one complete CPU board built from the blocks above |
| `shared_arbiter` | first-come access control with WAIT generation |
| `shared_memory` | 1K shared board: arbiter, data paths, array |
| `cru_interface` | 9900 CRU latches and selector |
| `mpcs_top` | two CPU boards, the shared board, the 9900 link and one timing generator |

`mpcs_top` has no parameters; its sizes are the ones above. Its ports:

- the 8008 pins of each processor (`cpu_s`, `cpu_dout`, `cpu_din`, `cpu_ready`, with φ1/φ2
  shared);
- a PROM programming port (`prog_we` has one bit per board);
- the 9900 CRU lines;
- processor 1's input port;
- the output latches of both boards;
- observation outputs: addresses, R/W̄, DBIN, T3A, grant, tie, denied.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/mpcs_pkg.sv tb/tb_mpcs_top.sv --top-module tb_mpcs_top -o sim
./obj_dir/sim
```

`tb/cpu8008_bus_model.sv` is the 8008 stand-in. It does not execute 8008 code. It performs
fetch, memory read and write, and I/O cycles state by state, follows READY into WAIT, and
counts the WAIT states it takes.

`tb_mpcs_top` runs the whole system at its real sizes, in three phases:

1. **Gun laying, 8 distances.** Processor 0 keeps a RANGE table (50, 100, …, 250) in private
   RAM. Processor 1 keeps an ELEVATION table (70, 50, 40, 20, 20). The handshakes are:
   - the 9900 to processor 0 through the CRU and ports 3 and 8;
   - between the processors through the shared words 0x0C40 (RANGE) and 0x0C80 (ELEVATION).

   The lookup rule is the testbench's own: RANGE is the largest table entry not above the
   distance, with a minimum of 50. The 9900 model checks both results.
2. **Fast count.** The processors pass a flag back and forth through 0x0C80.
3. **Slow count.** Processor 0 writes a count to 0x0C40 and processor 1 copies it to its ports.

All instruction fetches come from programmed PROM contents and are checked. The test counts
each mechanism and fails if any of them never happened:

- PROM fetches
- private RAM reads and writes
- shared reads and writes
- WAIT states on a busy shared memory
- simultaneous requests
- I/O in and out
- CRU writes and reads

It finishes in well under a second.

`tb_mpcs_decode` runs the memory decoding walk on both processors at once. Each processor steps
H:L through 0x0000–0x0FFF, reads every byte and shows it on port 8. Beforehand, each private RAM
and the shared block are filled with known patterns. The test then checks every PROM chip
select, the RAM select and the shared select, and confirms that a few reads above 0x0FFF
return 0. Both testbenches run the top at its real sizes, with no parameter overrides.

## Where this departs from the original boards

- **Synchronous logic.** Everything runs on one clock with a state strobe. The originals used
  level-sensitive latches and asynchronous flip-flops, and each board had its own crystal.
- **State duration.** The original description quotes 2.8 µs per 8008 state. Its own 500 kHz
  phases, its four-microsecond WAIT periods and its 12 µs per fetched byte all imply 4 µs, and
  this design uses 4 µs.
- **Arbitration circuit.** Shared-memory arbitration is an owner register, not the
  cross-coupled WAIT flip-flops. The request window (T2 to T3) and the tie order are this
  design's choices.
- **9900 link directions.** The directions are the ones the 9900 and 8008 programs need:
  9900 → 8008 input port 3, and 8008 output port 8 → 9900. The use of the second latch
  (`>1010`) is unknown, so it is brought out.
- **Idle data lines.** Idle sources read 0 rather than floating. A PROM programming port was
  added.
- **Processor count.** The original summary speaks of five 8008s. The boards, shared memory
  and programs that are described in detail are for two processors, and that is what this RTL
  implements. More boards would need an arbiter with more request inputs.
