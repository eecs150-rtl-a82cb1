# UART/CPU adaptor with a polling echo CPU

A CPU talks to a serial port through ordinary loads and stores. The UART
that drives the serial line uses ready/valid byte handshakes. This design
sits between the two. It is a memory-mapped device with four registers,
which looks to the CPU like a small region of data memory. In each
direction it holds one byte and a Ready bit. The hardware, not the
software, keeps the Ready bits up to date, so a program that checks Ready
before every access can never lose or duplicate a byte.

A CPU emulator is included to exercise the adaptor. It is a small state
machine that issues the same sequence of memory accesses as a polling echo
program on a MIPS CPU. It sends every received character back. When the
characters `c s 1 5 0` arrive in that order, it also sends the 15-character
line `Dusk till Dawn\n`. Many bytes then go out for one byte in, so the
transmit side must hold the CPU back.

```
 serial  +------+  ready/valid  +------------------+  Address/Data  +--------------+
 <-----> | UART | <-----------> | uart_cpu_adaptor | <------------> | cpu_emulator |
         +------+   (ports of   +------------------+   cpu_req /    +--------------+
       (external)  uart_cpu_top)                       cpu_rdata
```

## Register map

| Address       | Register      | Width | CPU access | Meaning |
|---------------|---------------|-------|------------|---------|
| `0xffff_0000` | ControlInReg  | 1     | read       | Ready: a received byte waits in DataInReg |
| `0xffff_0004` | DataInReg     | 8     | read       | last byte received by the UART |
| `0xffff_0008` | ControlOutReg | 1     | read       | Ready: DataOutReg is free, the CPU may write |
| `0xffff_000c` | DataOutReg    | 8     | write      | byte to transmit |

Reads return the register zero-extended to 32 bits. The Ready bit is in
bit 0 and a data byte is in bits 7:0. Writes to anything other than
DataOutReg are ignored, and an assertion reports them. The base address is
the `BASE_ADDR` parameter. The decode compares address bits 31:4 and
selects the register with bits 3:2.

## How the Ready bits move

The Ready bits are the whole protocol. They mean "ready" from the CPU's
point of view only. Nothing writes them explicitly. They change as a side
effect of data transfers.

**Receive (UART to CPU).**

| Event | ControlInReg | UART side |
|-------|--------------|-----------|
| reset | 0 | `uart_dout_ready` = 1 |
| UART handshake (`uart_dout_valid` and `uart_dout_ready`) | set to 1, byte loaded into DataInReg | `uart_dout_ready` drops in the next cycle |
| CPU reads DataInReg | cleared to 0 | `uart_dout_ready` = 1 again |

So `uart_dout_ready` is simply `!ControlInReg`. The UART is held off while
the CPU has not collected the previous byte.

**Transmit (CPU to UART).**

| Event | ControlOutReg | UART side |
|-------|---------------|-----------|
| reset | 1 | `uart_din_valid` = 0 |
| CPU writes DataOutReg | cleared to 0 | `uart_din_valid` = 1, `uart_din` = the byte |
| UART handshake (`uart_din_valid` and `uart_din_ready`) | set to 1 | `uart_din_valid` drops |

So `uart_din_valid` is `!ControlOutReg`. This is the back pressure: after a
write, the CPU has to see Ready again before it writes the next byte. If it
writes too early, the pending byte is overwritten. The adaptor does not
prevent this. An assertion (`a_no_overrun`) reports it in simulation. A
write in the same cycle in which the UART takes the old byte is legal: the
new byte becomes pending.

Neither direction can lose data when both sides follow the rules. Each
register holds at most one byte, the producer waits for Ready before it
refills the register, and the consumer's access is what restores Ready.

## Timing

- Everything runs on one clock, `clk`. Reset (`rst`) is synchronous and
  active high.
- **Reads are synchronous.** A read requested in cycle *t* returns its data
  on `cpu_rdata` in cycle *t+1*. This is the same timing as a block-RAM
  data memory. In a cycle after anything other than a read of the adaptor,
  `cpu_rdata` is 0, so several devices can share one read bus through an
  OR.
- The Ready bits update at the clock edge that ends the access or the
  handshake. A poll issued in the cycle after a handshake sees the new
  value.
- The adaptor adds no latency on the UART side. `uart_dout_ready` and
  `uart_din_valid` come straight from the Ready flip-flops.
- The emulator spends two cycles on every read: one to issue it and one to
  look at the data. It spends one cycle on a write. Its polling loops
  therefore repeat every 2 cycles. Echoing one byte takes at least 7
  cycles. At 115200 baud a byte takes about 8680 cycles of a 100 MHz clock,
  so the emulator almost always waits on the UART.

## The CPU emulator

`cpu_emulator` carries out this program, one memory access per state:

```
loop:   do  r = lw ControlInReg   while (r[0] == 0)
        b = lw DataInReg                     ; clears ControlInReg
        update the "cs150" matcher with b
        send(b)
        if the matcher just completed:
            for each c in "Dusk till Dawn\n": send(c)
        goto loop

send(x): do  r = lw ControlOutReg  while (r[0] == 0)
         sw x, DataOutReg                    ; clears ControlOutReg
```

- The echoed character goes out before the reply.
- The matcher counts how many characters of `cs150` it has seen in a row.
  On a mismatch it restarts at 1 if the byte is `c`, otherwise at 0. This
  is exact for `cs150`, because no proper prefix of it is also a suffix.
  The counter is cleared after each match. `ccs150` and `cs1cs150` both
  trigger.
- The trigger and the reply are constants in `uart_cpu_pkg`. They are
  stored as packed strings and read with `trigger_char()` and
  `reply_char()`. The reply length is `REPLY_LEN`.
- `reply_active` is high while reply characters remain to be sent.

## Files

| File | Contents |
|------|----------|
| `rtl/uart_cpu_pkg.sv` | bus widths, register offsets, base address, `cpu_req_t` (address, write data, MemRead, MemWrite), trigger and reply strings |
| `rtl/uart_cpu_adaptor.sv` | the four registers, address decode, Ready-bit logic, handshake assertions |
| `rtl/cpu_emulator.sv` | the echo / "cs150" state machine |
| `rtl/uart_cpu_top.sv` | emulator plus adaptor; the UART byte ports become the top's ports |
| `tb/tb_uart_cpu_adaptor.sv` | directed and random test of the adaptor against a register-level reference model |
| `tb/tb_cpu_emulator.sv` | emulator against a device model with random delays; checks polling discipline and output |
| `tb/tb_uart_cpu_top.sv` | end-to-end test with UART byte-port models, fast and at serial line rate |

### Top-level ports (`uart_cpu_top`)

| Port | Dir | Width | Connects to |
|------|-----|-------|-------------|
| `clk`, `rst` | in | 1 | clock, synchronous reset |
| `uart_dout`, `uart_dout_valid` | in | 8, 1 | UART DataOut, DataOutValid |
| `uart_dout_ready` | out | 1 | UART DataOutReady |
| `uart_din`, `uart_din_valid` | out | 8, 1 | UART DataIn, DataInValid |
| `uart_din_ready` | in | 1 | UART DataInReady |
| `cpu_req`, `cpu_rdata` | out | 66, 32 | emulator memory bus, for observation |
| `reply_active` | out | 1 | reply being sent |

The serial UART is not part of this RTL. It should be an 8-data-bit,
no-parity, 1-stop-bit UART at 115200 baud, with the byte-side ready/valid
ports listed above. Its serial pins go to the board's RS-232 transceiver.
For on-board debugging, a useful logic-analyzer trigger is
`{uart_dout_valid, uart_dout_ready} == 2'b11`. It fires once for each
received character. `uart_dout_ready` must then be low in the next cycle.

To use the adaptor with a real CPU, remove `cpu_emulator`. Then drive
`cpu_req` from the CPU's data-memory address, store data and
MemRead/MemWrite strobes, and OR `cpu_rdata` into the load data. Because of
the one-cycle read latency, the CPU should expect load data like that of a
synchronous RAM.

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` at the end. The
example below runs the end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/uart_cpu_pkg.sv rtl/uart_cpu_adaptor.sv rtl/cpu_emulator.sv \
    rtl/uart_cpu_top.sv tb/tb_uart_cpu_top.sv --top-module tb_uart_cpu_top
./obj_dir/Vtb_uart_cpu_top
```

For the block tests, use `tb_uart_cpu_adaptor` (package and adaptor) or
`tb_cpu_emulator` (package and emulator) in the same way. All tests finish
in seconds.

What the tests cover:

- **`tb_uart_cpu_adaptor`**
  - Directed checks of the reset values.
  - Ready set and cleared by each side.
  - `uart_dout_ready` low right after a receive handshake.
  - The one-cycle read latency.
  - 20,000 random cycles with random reads, writes that respect back
    pressure, and random UART valid/ready. Each cycle is compared with an
    independent register model.
  - A final check that every byte crossed exactly once, in order, in both
    directions.
- **`tb_cpu_emulator`**
  - About 4,000 input bytes rich in `c s 1 5 0`, giving more than 300
    replies.
  - DataInReg is read only after a Ready poll.
  - DataOutReg is written only after a Ready poll and never while busy.
  - The output is exactly the expected echo and reply stream.
  - The poll loop repeats every 2 cycles.
- **`tb_uart_cpu_top`**
  - About 3,100 bytes with random gaps and random transmit times.
  - Then `cs150` at serial line rate: 8680 cycles per byte, which is
    115200 baud at an assumed 100 MHz clock.
  - The test counts echoes, replies, busy transmit polls, empty receive
    polls and receive stalls, and fails if any of them never happened.

The design has no size parameters, so every test runs the design in its
only configuration.

## Design choices and limits

These points are decided here rather than given by the behaviour described
above. Change them if the surrounding system differs:

- **Addresses.** The full address is `0xffff_0000` to `0xffff_000c`.
  Address bits 1:0 are ignored, so only word accesses are assumed.
- **CPU bus.** There is a single request bundle (`cpu_req_t`) with
  separate MemRead and MemWrite strobes, and 32-bit read data with one
  cycle of latency. A CPU with combinational data-memory reads would need
  the read register in `uart_cpu_adaptor` removed.
- **Reset values.** ControlInReg resets to 0 (nothing received) and
  ControlOutReg to 1 (free to write).
- **Illegal accesses.** Overwriting a pending transmit byte, and writes to
  the control registers or DataInReg, are caught by assertions. They are
  not blocked in hardware.
- **Emulator program.** The emulator stands for one specific polling
  program. Its order of operations (echo before the reply) and its cycle
  timing are this design's own. It does not execute instructions.
- **Buffering.** There is no FIFO: each direction buffers one byte. This
  is enough for lossless transfer, but the sender stalls for a full byte
  time of the UART whenever the CPU sends bursts.
