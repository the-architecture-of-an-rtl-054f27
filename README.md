# Arithmetics module for a multi-microprocessor graphics terminal

A stroke-refresh graphics terminal needs fast transformations of its display
files: displacement, scaling, rotation, and window-to-viewport mapping with
clipping. An 8-bit microprocessor is too slow to do that alone. The
arithmetics module solves this as one board of a multi-microprocessor
terminal. An 8080 CPU runs the transformation software. It passes the
arithmetic to two Am9511 arithmetic processors (APUs), one for the x
coordinates and one for the y coordinates, which work in parallel.

Any other board of the terminal may call the module, so the module is a
shared resource. Two things are built in hardware for that:

* a **TAS (test-and-set) flag**, which decides which caller owns the module;
* a **BUSY flag**, which tells the owner when its task has finished.

Tasks arrive through a small **dual-port control memory**. The module reads
its operands from, and writes its results to, the terminal's **common
memory** over the shared system bus.

This repository holds synthesizable SystemVerilog for all of the board's own
logic. The CPU and the APUs are bought-in parts, so they stay outside: their
pins are ports of the top module `arith_module`. The transformation software
is not part of the RTL either.

## Structure

```
arith_module                      top: CPU bus in, APU pins, system bus as master and as slave
 ├─ addr_decoder                  CPU address -> selected device (amm_pkg::dev_e)
 ├─ prom            8 KB          program store, with a programming port
 ├─ ram             2 KB          working store
 ├─ apu_port  x2                  memory-mapped port to one Am9511 (C/D, strobes, PAUSE, END)
 ├─ interrupt_ctrl  8 channels    priority interrupt system, RST vectors
 ├─ bus_interface_unit            system-bus slave: window decode, acknowledge
 │   ├─ tas_busy_flags            TAS and BUSY flags
 │   └─ control_memory  16 B      dual-port mailbox; writing the command starts a task
 └─ bus_master_logic              lets the CPU load and store in common memory
```

`amm_pkg` holds the memory map, the device enum, the slave register offsets
and the interrupt channel numbers that these modules share.

## Sharing the module: TAS and BUSY

This is the part a user of the module must get right. It is also what makes
the board more than a CPU with coprocessors.

Other boards see the module through a window of the system bus. The window
starts at `SLAVE_BASE`, which defaults to `0xFF00`:

| offset      | read                                | write                        |
|-------------|-------------------------------------|------------------------------|
| `0x00` TAS  | `{7'b0, TAS}`, then TAS := 1        | TAS := 0 (release)           |
| `0x01` STATUS | `{6'b0, TAS, BUSY}`               | ignored                      |
| `0x10`      | control memory byte 0 (command)     | store; **starts the task**   |
| `0x11-0x1F` | control memory bytes 1-15           | store parameters             |

A master uses the module like this:

1. **Allocate.** Read TAS. If it returns 1, another master owns the module:
   try again later. If it returns 0, the module is now yours. The same bus
   access that returned the 0 has set TAS to 1. Only one master can drive
   the system bus at a time, so the read and the set cannot be split, and
   exactly one master can see the 0.
2. **Start a task.** Write the parameters into bytes 1-15 of the control
   memory, then write the command into byte 0. On the edge where the command
   is stored, the hardware sets BUSY and sends an interrupt request to the
   CPU. Writing parameters alone does neither.
3. **Wait.** Poll STATUS until BUSY reads 0. The module's software clears
   BUSY when the task is done. Results may be left in the control memory or
   in common memory.
4. **Repeat or release.** The owner may start further tasks straight away.
   To release the module it writes the TAS register, which clears TAS.

Bus timing as a slave: the master holds address, data and `syss_rd` or
`syss_wr` until it sees `syss_ack`. The acknowledge comes one cycle after the
strobe and is high for one cycle. Read data (`syss_dout`, with `syss_drv_en`
high) are valid in that cycle. Every side effect (setting or clearing TAS,
writing the memory, starting a task) happens on that clock edge, once per
access. Addresses outside the window are not answered, so another board's
slave can own them.

## The CPU's side

The CPU sees everything through one 64 KB address space:

| address         | device                                              |
|-----------------|-----------------------------------------------------|
| `0x0000-0x1FFF` | PROM                                                |
| `0x2000-0x27FF` | RAM                                                 |
| `0x3000/0x3001` | APU0: data stack / command and status               |
| `0x3002/0x3003` | APU1: data stack / command and status               |
| `0x3010`        | flags: read `{6'b0, TAS, BUSY}`, write clears BUSY  |
| `0x3020`        | interrupt system: read pending requests, write status `{sgs, level[2:0]}` |
| `0x3100-0x310F` | control memory, internal port                       |
| `0x4000-0xFFFF` | common memory over the system bus (same address on the bus) |

Anything else reads as `0xFF`.

The CPU bus is modelled as a synchronous interface. The CPU sets `cpu_addr`
and raises one of `cpu_rd`, `cpu_wr` or `cpu_inta`, and holds them until a
rising clock edge where `cpu_ready` is high. That edge completes the access:
a write takes effect, and `cpu_din` is valid during that cycle. This is the
8080's READY wait-state mechanism reduced to clock cycles. Access times:

* **PROM, RAM, flags, interrupt system, control memory:** two cycles. The
  memories have synchronous reads, and the first cycle is a fixed wait state.
* **APU:** two cycles, plus as long as the APU holds PAUSE.
* **System bus:** until the arbiter grants the bus and the slave acknowledges.

A side effect happens only on the completing edge, so a held strobe can never
act twice.

## APUs and their END interrupts

An `apu_port` turns a CPU access into a single Am9511 access. Address bit 0
drives C/D: data stack, or command and status. During the first cycle the
strobes stay low. From the second cycle on, `apu_cs` and `apu_rd` or
`apu_wr` are high. The access completes on the first edge where
`apu_pause` is low. While an APU executes a command, it holds PAUSE for any
access except a status read. A CPU that reads a result too early is
therefore simply stalled until the result is ready.

When an APU finishes a command it raises END. The rising edge of END becomes
an interrupt request. When the interrupt system acknowledges that channel,
the port pulses `apu_eack` for one cycle, which clears END in the APU. The
software can thus keep a queue of commands for each APU and issue the next
one from the END interrupt. For one transformation step, x goes to APU0 and
y to APU1, and the two compute at the same time.

## Interrupt system

The 8080 has a single interrupt input. `interrupt_ctrl` widens it to eight
channels, in the style of an Intel 8214 priority controller:

* A rising edge on a channel latches a request for it.
* The highest pending channel wins. Channel 7 is the highest.
* If the status-group-select bit `sgs` is set, only a channel strictly above
  the stored `level` may interrupt.
* While the controller is enabled and a request qualifies, `cpu_int` is high.
* In the acknowledge fetch (`cpu_inta`), `cpu_din` carries `RST n`
  (`0xC7 | n<<3`) for the winning channel.
* On the completing edge the controller clears that request and disables
  itself. Writing the status register (`0x3020`) enables it again.

Channel use:

| channel | source                                    |
|---------|-------------------------------------------|
| 6       | APU0 END                                  |
| 5       | APU1 END                                  |
| 4       | a new task in the control memory          |
| all     | `ext_irq[n]`, ORed in for other sources   |

## Reaching common memory

The software loads display-file data from common memory and stores results
back. When the CPU addresses `0x4000` or above, `bus_master_logic` takes
over:

1. It raises `bus_req` and holds `cpu_ready` low.
2. On `bus_grant`, it raises `sysm_drv_en` and drives the address, the data
   and the strobe onto the bus.
3. When the slave raises `sysm_ack`, `cpu_ready` goes high in the same cycle,
   and read data pass straight through.
4. The request drops and the bus is released.

The request is released after every transfer. Under contention the module
therefore has to win the bus again for each byte.

## What is outside the RTL

| part                         | why                                              | what stands in |
|------------------------------|--------------------------------------------------|----------------|
| 8080 CPU                     | bought-in processor                              | `cpu_*` ports; a bus model in `tb_arith_module` runs the software |
| Am9511 APUs (2)              | bought-in processors                             | `apu_*` ports; `tb/am9511_model.sv` models only the 16-bit fixed-point add, subtract and multiply |
| bus drivers                  | tri-state transceivers, no logic                 | enables `sysm_drv_en`, `syss_drv_en`; the buses are split into in and out ports |
| system-bus arbiter           | belongs to the terminal, not to this board       | modelled in `tb_arith_module` |
| common memory                | another board                                    | modelled in `tb_arith_module` |
| transformation software      | program, not hardware                            | the `cpu_software` task in `tb_arith_module` does displacement and scaling |

## Choices made here

The overall structure follows the original design: the 8080, an 8 KB PROM,
a 2 KB RAM, two APUs, an 8-channel interrupt system, a bus interface with
TAS, BUSY and a dual-port control memory, and bus master logic. So do the
flag protocol and the bus-master sequence.

The following were not fixed by the original design and were chosen for
this implementation:

* all addresses, and the layout of the slave window;
* the control-memory size (16 bytes) and its command location (byte 0);
* the rule that only the command write raises the task interrupt. The
  original design ties the interrupt to control-memory access in general.
  Here, writing parameters alone raises nothing, so a task costs the CPU one
  interrupt.
* the wait cycles and the synchronous bus timing;
* edge-triggered interrupt requests, the priority order and the channel
  numbers, and the re-enable by a status write;
* active-high APU pins, and C/D on address bit 0;
* reset values: TAS = BUSY = 0, and the interrupt system enabled;
* the PROM programming port. The PROM contents, meaning the software, are
  not available.

Rotation, window/viewport mapping and clipping are software running on the
CPU and the APUs. Nothing in the RTL is specific to them.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog if
it hangs. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_arith_module rtl/amm_pkg.sv tb/tb_arith_module.sv
./obj_dir/Vtb_arith_module
```

Replace the name to run another testbench. `rtl/amm_pkg.sv` must come first
on the command line.

`tb_arith_module` runs the top at its default sizes, end to end:

* Master A allocates the module, and master B is refused.
* Master A starts a displacement task and then a scaling task on a
  12-point display file.
* For each point, the CPU model loads x and y over the system bus, parks
  them in RAM, and has the two APUs compute in parallel.
* The CPU model serves both END interrupts in priority order, then stores
  the results.
* Meanwhile, master A polls BUSY over the same bus, so the module has to
  wait for the bus.
* The final display file is checked against values the testbench computes
  itself.
* The testbench counts every mechanism and fails if any never happened: TAS
  refusal, BUSY polling, task interrupt, END interrupts, priority, PAUSE
  stretch, bus wait, PROM, RAM, external interrupt, unmapped read.

It runs in well under a second.

The block testbenches check:

* **prom, ram:** all contents against a reference.
* **control_memory:** both ports at random, including write collisions.
* **tas_busy_flags:** the allocation protocol and random strobes.
* **interrupt_ctrl:** priority, the status comparison, the re-enable and
  edge sensitivity.
* **addr_decoder:** all 65536 addresses.
* **apu_port:** the stall and END handling against the APU model.
* **bus_interface_unit:** the whole slave protocol, including one-cycle
  acknowledge timing.
* **bus_master_logic:** exact cycle counts against random arbiter and slave
  delays.

## Lint notes

Verilator reports two kinds of non-circuit warning on `arith_module`:

* The interrupt system's `enabled` output is left open in the top. It is
  used by the block test.
* `rst_n` appears both in the asynchronous resets and in the `disable iff`
  of the handshake assertions in `bus_master_logic`, `bus_interface_unit`,
  `apu_port` and `interrupt_ctrl`.

Both are intentional.
