# BlueIO: hardware I/O virtualization with cycle-exact timed I/O

On a many-core chip where every core runs its own guest operating system, I/O
is usually virtualized in software. A hypervisor or a driver domain stands
between each guest and each device. That costs time, and the time varies: how
long a request waits depends on what the other guests are doing, and a pin
change cannot be placed in a given clock cycle at all.

This design moves the whole I/O path into hardware. A CPU sends one request
packet over the network-on-chip. Hardware does the rest:

- it queues the request per guest;
- it arbitrates among guests under a real-time policy chosen at run time;
- it translates the guest's view of the device into the physical device;
- it drives the device and returns the answer.

For pins that must change or be sampled at an exact time, each CPU has its own
small GPIO processor. It runs a stored command in the clock cycle the CPU
named. How busy the rest of the system is does not move that cycle.

The design is written in synthesizable SystemVerilog. It is built around four
parts:

| Part | Role | Module |
|---|---|---|
| BlueGrass | hub between the network, memory and the I/O controllers | `bluegrass` |
| VCDC | virtualized controller for complex devices (here a UART and an SPI NOR flash) | `vcdc` |
| GPIOCP | GPIO command processor: timed pin I/O | `gpiocp` |
| BlueTree | tree interconnect from I/O and CPUs to one memory port | `bluetree` |

A global timer (`global_timer`) holds the common sense of time. `blueio_top`
wires everything together.

## The packet

Every transfer is one `pkt_t`, defined in `blueio_pkg`. It is 72 bits, from
MSB to LSB:

| Field | Bits | Meaning |
|---|---|---|
| `mem` | 1 | memory traffic: a memory request upward, memory data downward |
| `to_vcdc` | 1 | request for a VCDC device |
| `io_idx` | 4 | which device: the VCDC's device (1 = UART, 2 = SPI flash), or the BlueGrass I/O port (0 = GPIOCP, 1 = external controller) |
| `cpu_id` | 6 | requesting CPU, which is also the guest VM; up to 64 |
| `op` | 4 | operation |
| `addr` | 24 | address or command argument |
| `data` | 32 | data |

Operation codes:

| Code | Name | Meaning |
|---|---|---|
| 1 | `OP_WRITE` | device write |
| 2 | `OP_READ` | device read |
| 3 | `OP_ERASE` | device erase |
| 4 | `GP_LOAD` | store a word of a GPIO command |
| 5 | `GP_RUN` | run a stored GPIO command |
| A | `OP_ACK` | answer: acknowledgement |
| B | `OP_DATA` | answer: data |

An answer keeps the request's `cpu_id`, so BlueGrass can return it to the
right CPU.

The network this attaches to carries 32-bit flits. Splitting a `pkt_t` into
flits, and putting it back together, belongs to the network interface. That
is outside this design.

All ports are valid/ready. A packet moves in the cycle where both are high.
Every queue is a `sync_fifo`: a register array, one cycle from write to read,
with no fall-through.

## BlueGrass: routing and the two arbiters

Downward, toward the devices:

- A 2-into-1 multiplexer takes CPU requests from the network (`tile_in`) and
  memory data from the BlueTree. When both wait, it alternates between them.
- It puts them into the downward FIFO.
- The FIFO head goes to the VCDC if `to_vcdc` is set. Otherwise it goes to the
  I/O port named by `io_idx`.
- A packet for a port that does not exist is dropped, so it cannot block the
  queue.

Upward, toward the CPUs:

- Arbiter_0 picks one of the directly attached I/O controllers.
- Arbiter_1 picks between that winner and the VCDC.
- The winner goes into the upward FIFO.
- From the FIFO head, packets with `mem` set go up the BlueTree as memory
  requests. The rest go back to the network (`tile_out`).

A device controller that needs memory (a DMA-style controller on the `dio_*`
port) sends a `mem` packet upward. The memory's answer comes back down
through the same multiplexer, addressed to that controller by `io_idx`.

`rt_arbiter` is the one arbitration element used everywhere. Its `policy`
input chooses among:

- **round robin**: start the search just past the last input served;
- **fixed priority**: input 0 first;
- **FIFO**: the oldest request first. A new request takes a ticket from an
  arrival counter, and the oldest ticket wins. Requests that arrived in the
  same cycle go lowest index first.

The policy can change on any cycle. The round-robin pointer moves only when
the granted input was actually served (`advance`).

## VCDC and the I/O VMM: how a device is shared

The VCDC's input FIFO steers each request by `io_idx` to a device module. The
modules run in parallel: a long flash program does not hold up a UART byte.
A scheduler merges their answers into the output FIFO.

Each device module is an `io_vmm` in front of a low-level driver. Inside the
VMM:

1. **Queueing.** The input FIFO sorts requests by `cpu_id` into per-CPU
   buffer pools (`buffer_pool`), each with a request queue and a response
   queue. A CPU that floods a device fills only its own pool.
2. **Scheduler_1** picks whose request goes to the driver next. The driver
   has one request outstanding at a time.
3. **Virtualization.** The physical address is `{cpu_id, addr[PART_BITS-1:0]}`.
   Each guest sees a private `2**PART_BITS`-byte device starting at address 0,
   and no guest can reach another's bytes.
   - The flash uses `PART_BITS = 16`, giving 64 KB per guest.
   - The UART uses `PART_BITS = 0`: it is time-shared and addresses pass
     unchanged.
4. **Return.** The driver's answer goes into the owner's response queue, with
   the guest's own address put back. **Scheduler_2** picks which pool answers
   next.

The drivers:

- **`uart_driver`**: 8N1, 868 clocks per bit (115200 baud at 100 MHz).
  - `OP_WRITE` is acknowledged after the stop bit.
  - `OP_READ` returns the oldest received byte in `data[7:0]`, with `data[8]`
    set when there was one.
  - The receiver keeps `RX_DEPTH` bytes. A byte that finds the receive queue
    full is lost and counted in `rx_overrun`.
- **`spi_flash_driver`**: SPI mode 0, one byte per request, using the command
  codes of an S25FL128S-class NOR flash.
  - `OP_READ`: `03h` plus a 24-bit address.
  - `OP_WRITE`: `06h` (write enable), then `02h` (page program), then `05h`
    (read status) polled until the busy bit clears.
  - `OP_ERASE`: `06h`, then `20h` (4 KB erase), then polling.
  - SCK runs at clk/4 by default.

## GPIOCP: the timed I/O path

Most of the design's subtlety is here.

**Storing a command.** A CPU first stores a command in the 64 × 32-bit
`command_memory`:

- word *k*: the identifier;
- word *k*+1: the length *L*;
- words *k*+2 … *k*+1+*L*: the sub-commands.

Each word is one `GP_LOAD` (`addr` = word address, `data` = value), and each
is acknowledged. Commands are stored from word 0 upward, back to back.

Sub-command encoding, on bits `[31:30]`:

| Bits | Kind | Effect |
|---|---|---|
| `00` | SET | drive pin `[12:8]` to level `[0]` |
| `01` | WAIT | the next sub-command runs `n+1` cycles later, with `n` in `[23:0]` |
| `10` | READ | sample all pins; the CPU gets `OP_DATA`, `addr` = command id, `data` = pins |
| `11` | END | stop |

Sub-commands without a WAIT between them run one per cycle.

**Running a command.** `GP_RUN` has three fields:

- `addr[7:0]`: command id;
- `addr[23:8]`: period, where 0 means run once;
- `data`: start time on the global timer.

Handling a run request takes four steps:

1. The `hardware_manager` passes it to the `command_queue`.
2. The `command_queue` walks the command memory through its second port,
   finds the command, and pushes its sub-commands into the requesting CPU's
   own `gpiocpu`, followed by an arm word holding the start time and period.
3. The `command_queue` answers the CPU with `OP_ACK`: data 0 if the command
   started, 1 if it was not found.
4. The `gpiocpu` waits and executes.

Run requests are handled one at a time. The walk costs 3 cycles per skipped
command and 3 per sub-command. The request must therefore arrive before the
start time by at least the walk, plus the time it queues behind other CPUs'
run requests. The 16-CPU test allows 600 cycles.

**Why the time is exact.** A pin action passes through three registers:

- the GPIO CPU's action register;
- the per-CPU register in `sync_processor`;
- the pin register.

The GPIO CPU therefore starts executing `LEAD` = 4 cycles before the start
time. The first SET lands on `gpio_out` in the cycle where `time_now` equals
the start time. A READ samples `gpio_in` in that same cycle. Every later
sub-command lands a fixed, program-defined number of cycles after it.

None of this depends on the other CPUs. Each CPU has its own GPIO CPU, and the
pin merge takes every CPU's action in the same cycle. When two CPUs set the
same pin in the same cycle, the lower CPU number wins.

**Queueing and repetition.**

- A GPIO CPU queues further commands (up to `DEPTH` = 8 words) behind the one
  running.
- A periodic command repeats at start + *k*·period until another command is
  queued behind it. That command then takes over after the current run.
- A start time that has already passed runs at once.
- A sub-command beyond the 8-word program buffer is dropped.
- A read result that finds the response queue full is dropped.

## BlueTree: bounded-latency memory access

`bluetree` is a binary tree of `bluetree_mux` nodes. The leaves are
requesters; the root is the memory port.

Going up, each node merges its two children into one register. The left child
has priority. A blocking counter counts how often a waiting right packet was
passed over. When it reaches `BLOCK_M` (4), the right packet gets the next
slot and the counter restarts. A right packet therefore waits at most 4 left
packets per node, and every leaf has a worst-case latency.

Each request is stamped at its leaf with the leaf index (`bt_t.src`). A node
*h* levels above the leaves sends a response left or right by bit *h*-1 of
that index.

In the top:

- leaf 0 is BlueGrass;
- leaves 1–31 are brought out as `cpu_mem_*` for the CPUs' own memory traffic;
- the root is `mem_*`.

## The top level

`blueio_top` has these defaults:

| Parameter | Default |
|---|---|
| `N_CPU` | 16 |
| `BT_LEAVES` | 32 |
| `N_PINS` | 32 |
| `UART_CLKS_PER_BIT` | 868 |
| `SPI_SCK_HALF` | 2 |

It connects:

- BlueGrass I/O port 0 to the GPIOCP;
- BlueGrass I/O port 1 to `dio_*`, for one more directly attached controller;
- the VCDC to BlueGrass's VCDC port.

The top's ports:

| Ports | Purpose |
|---|---|
| `tile_*` | the network's home port |
| `uart_*` | UART lines |
| `spi_*` | SPI flash lines |
| `gpio_out`, `gpio_in` | GPIO pins |
| `timer_*`, `time_now` | global timer |
| arbitration policy inputs | BlueGrass's two arbiters, the VCDC scheduler, all I/O VMM schedulers |

## What differs from the published BlueIO

- **VGA and Ethernet.** The published system also virtualizes a VGA output
  and an Ethernet controller. Their insides were never described, so they
  are absent. The VCDC drops requests for their indices.
- **Other VMMs.** The published list of per-device VMMs also names DMA. It is
  not built either. The `dio_*` port gives such a controller a place on
  BlueGrass, but it is not virtualized.
- **Pin sharing.** In the published design the synchronization processor also
  merges pin values written by other I/O devices. Here it merges only the
  GPIO CPUs.
- **Placement of the GPIOCP.** The GPIOCP hangs directly off BlueGrass. The
  published design allows this, or placing it behind the VCDC.
- **Not part of this RTL.** The mesh network, the CPUs and the DDR
  controller. They appear as ports.
- **This design's choices.** The published design fixes the structure (the
  blocks, their queues and arbiters, how they connect) and the command
  memory's 64 × 32 size. Everything below was chosen here:
  - the packet layout and operation codes;
  - the sub-command encoding;
  - the flash partitioning rule;
  - all FIFO and buffer-pool depths;
  - the value of the BlueTree blocking limit;
  - `LEAD`;
  - the periodic-command rule;
  - the conflict rule between CPUs on one pin;
  - the internal workings of the arbiter policies.
- **No custom extensions.** The published system lets users add their own
  scheduling policy and their own device VMMs through an interface. That
  interface is not described, so it is not provided.
- **Packet width.** Packets are 72 bits wide here, where the published network
  uses 32-bit packets. A flash byte read is one request and one answer: six
  32-bit words if serialized, where the published figure is four.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run.

`tb_blueio_top` runs the full default configuration end to end, in about
3 seconds of wall time. Its actors and helper models are:

- the network and the CPUs;
- `mem_model`: memory at the tree root;
- `spi_flash_model`: the flash;
- a UART line monitor;
- an external controller that serves reads by fetching from memory through
  BlueGrass and the tree.

It checks these scenarios:

- all 16 CPUs read the pins (wired to the timer) at the same time *t*, and
  each gets exactly *t*;
- a pin rises exactly at its start time;
- a periodic read runs three times, exactly one period apart;
- 16 guests write and read back their own flash byte at one virtual address,
  under round robin and then fixed priority;
- a UART byte completes while the flash is busy;
- memory reads through the external controller while eight CPU leaves load
  the tree, driving the blocking counters to their limit;
- the network stalls answers for 2000 cycles, and nothing is lost;
- a request for a missing device is dropped;
- one guest erases its flash sector, and another guest's byte at the same
  virtual address survives;
- a byte sent on the UART receive line is read by a CPU.

Each of these is counted, and one that never happens is a failure.

`tb_flash_workload` runs the shared-flash workloads on the VCDC at its
default size. In the response-time workload, 1, 4, 8 or 16 CPUs each read one
byte, then send the next read as soon as the answer arrives. This runs under
both FIFO and round-robin scheduling. Worst-case response times:

| CPUs | Worst case (cycles) | Variation (cycles) |
|---|---|---|
| 1 | 172 | 0 |
| 4 | 673 | 501 |
| 8 | 1341 | 1169 |
| 16 | 2677 | 2505 |

The figures are the same under both policies. Each is n times a lone read
plus a few cycles: a CPU waits for at most one read of every other CPU. With
4 CPUs writing continuously under round robin, each CPU gets an equal share,
to within one byte.

Compile and run a testbench with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/blueio_pkg.sv tb/tb_blueio_top.sv --top-module tb_blueio_top -o sim
./obj_dir/sim
```

Use the same command for any `tb_<block>`. The RTL has a few immediate
assertions, such as FIFO overflow and the blocking-counter bound. They are
active under `--assert`.

## Trust and limits

- **Verification.** The testbenches are directed, not random. Each one was
  also run against a deliberately broken copy of its block and caught the
  fault.
- **Lint and synthesis.** The RTL lints clean of structural problems under
  Verilator `-Wall`, and synthesizes with Yosys: about 9,200 cells and 11,500
  flip-flop bits for the top at default size.
- **Not verified.**
  - Nothing was timed against a real FPGA or run against real flash or UART
    hardware.
  - The flash model covers only the commands the driver uses.
  - Configurations other than the defaults (more CPUs, more leaves) were
    simulated only at block level.
