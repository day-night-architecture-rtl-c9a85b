# Day–Night: an always-on RISC-V sub-processor for wearable anomaly detection

A wearable health monitor spends nearly all its life reading sensors and finding
nothing wrong. Running that loop on the application processor keeps its large core
and on-chip network clocked for no reason. The Day–Night organisation splits the chip
into two parts:

* **Day segment.** The Main-CPU (a Rocket-class RISC-V core) and the system
  interconnect (a micro network-on-chip). They are clock-gated while nothing
  interesting happens.
* **Night segment.** A very small RISC-V core, the **All-Night core**, keeps polling
  the sensors and checking the readings. It reaches main memory and the sensor
  interfaces *without* going through the interconnect. It wakes the Day segment with
  an interrupt only when it finds an anomaly.

This repository holds synthesizable SystemVerilog for the Night segment and for the
Day–Night glue. That covers:

* the All-Night core;
* a dual-port SRAM controller;
* the two bus multiplexers;
* the Night Support Register;
* a clock-gate controller for the Day segment;
* UART, SPI and I2C masters and a GPIO port.

The Main-CPU and the interconnect are not included. Where they would attach, the top
level brings out their bus ports and interrupt lines.

## Block diagram

```
            Day segment (not in this RTL)                       Night segment
   +-----------------------------------------+
   |  Main-CPU ---- micro-NoC ---------------+--- day_apb_* ----------------+
   |     |  AXI            ^ irq, irq_clear  |                              |
   +-----+-----------------+-----------------+                              |
         | day_axi_*       |                                                v
         v                 |        +-----------+   m1   +--------------------+
   +-----------+   APB     |        |           |------->|  u_io_mux          |
   | dp_mem_ctrl|<---------+--------| night_mux |        |  (apb_rr_arbiter,  |
   |  + sram_sp |  (SRAM window)    | (decoder, |        |   round robin)     |
   +-----------+                    |  irq reg) |        +---------+----------+
                                    +-----^-----+                  | APB
                                          | APB                    v
                               +----------+---------+   +-----------------------+
                               | u_core_port        |   | u_io_bus (apb_decoder) |
                               | (data first)       |   | NSR UART SPI I2C GPIO  |
                               +---^------------^---+   +--+--------------------+
                                   | dmem       | imem     | Night_addr,
                               +---+------------+---+      | enable_Night
                               |      an_core       |<-----+
                               +--------------------+
   power_manager: pm_apb_* from the Day side, irq in, day_clk_en out
```

The top module is `day_night_soc`. Everything runs in one clock domain, with an
active-low asynchronous reset.

## Memory map

The All-Night core sees this map:

| Address | Block | Registers (word offsets) |
|---|---|---|
| `0x0000_0000` | SRAM, 64 KiB (`MEM_WORDS` = 16384) | shared with the Main-CPU's AXI port |
| `0x1000_0000` | NSR | +0 Night_addr, +4 enable_Night (bit 0) |
| `0x1000_0100` | UART | +0 TX, +4 RX, +8 STATUS {overrun, rx_valid, tx_busy}, +C DIV |
| `0x1000_0200` | SPI | +0 DATA, +4 STATUS (busy), +8 DIV, +C CS |
| `0x1000_0300` | I2C | +0 CMD, +4 STATUS {sda, scl, nack, busy}, +8 RXDATA, +C DIV |
| `0x1000_0400` | GPIO, 8 pins | +0 OUT, +4 DIR (1 = drive), +8 IN (two-flop synchronized) |
| `0x2000_0000` | interrupt register | bit 0 drives `irq` |

* The Day side reaches the same peripherals at the same addresses through `day_apb_*`.
  It reaches the SRAM through `day_axi_*`.
* The power manager has its own APB port, `pm_apb_*`. STANDBY is at +0 and the 16-bit
  WAKES counter is at +4.
* An address outside the map answers at once with PSLVERR.

## The All-Night core (`an_core`)

### Instruction set and registers

The core executes only 16 instructions:

* from RV32I: LUI, JAL, JALR, BEQ, LW, SW, ADD, ADDI, SUB, SLL, SLT, SRA, XOR, OR, AND;
* from RV32M: MUL.

It has eight registers, x0..x7. Register fields keep their RV32I 5-bit encoding, but
only the low three bits select a register: x9 is x1.

Anything else is executed as a no-operation. This includes BNE, the other loads and
stores, and the immediate shifts. Programs for it are written in assembly, or
compiled with a restricted instruction set and checked.

The core has no interrupts, no CSRs and no privilege levels.

### Pipeline

There are three stages:

* **FETCH.** An APB read at PC into the instruction register. Only one fetch is in
  flight, and a new one starts only when the instruction register is empty.
* **DECODE.**
  * The ALU control (`an_alu_control`) turns opcode, funct3 and funct7 into an ALU
    operation.
  * The register file (`an_regfile`) is read.
  * Two sign extensions (`an_sign_ext`) build the 12-bit and 20-bit immediates. The
    12-bit one covers I, S and B formats; the 20-bit one covers U and J formats.
  * The results are registered.
* **EXECUTE.** This stage does the following:
  * the ALU operation;
  * the `=` comparison for BEQ;
  * the link address PC+4;
  * the data APB access of LW and SW;
  * the register write-back.

Hazards are handled by the following rules:

* **Data dependences.** The register file passes a value being written straight to a
  read in the same cycle. DECODE hands an instruction on only when EXECUTE finishes,
  so back-to-back dependent instructions need no stall logic.
* **Jumps and taken branches.** They resolve at the end of EXECUTE, and the younger
  instructions are dropped (`flush`). A fetch already on the bus finishes and its
  result is thrown away.
* **Multi-cycle ALU work.** Shifts and MUL hold EXECUTE until they finish.

The core's instruction and data ports are separate APB masters. In the SoC,
`u_core_port` merges them onto the single bus port of the core, giving data accesses
priority.

Throughput:

* A simple instruction takes about four clocks. Fetch and data access each need an
  APB transfer to the SRAM, and the two share one port.
* In the end-to-end test, the core retired 96,188 instructions in 385,172 cycles. Most
  of them were status-polling loops.

### Starting and stopping: Night_addr and enable_Night

Two registers in the **NSR** (Night Support Register) control the core.

The Main-CPU starts the Night function like this:

1. It writes the start address to Night_addr.
2. It sets enable_Night.
3. When the core sees enable_Night high and has nothing in flight, it loads PC from
   Night_addr and starts fetching.

If enable_Night is cleared:

* the core stops issuing fetches;
* work not yet in EXECUTE is dropped;
* the instruction already in EXECUTE completes, so a store is never cut in half.

Setting enable_Night again restarts the core from Night_addr. The core watches the
enable in FETCH, so a stop or restart costs no more than the instruction in flight.

The Main-CPU uses this mechanism to hand the core a new program. It can also pause
the core while it rewrites shared data.

### ALU, shifter and multiplier

The ALU (`an_alu`) is built around two small datapath elements:

* **`an_adder32`.** A 32-bit adder. It subtracts by inverting b and setting the carry
  in. ADD, SUB, SLT, the address sums and the multiplier accumulation all use it. SLT
  is the sign of a−b corrected by the overflow.
* **`an_shifter1`.** A one-bit shifter: left, or arithmetic right.

The ALU has no barrel shifter:

* A shift by n applies the one-bit shifter n times, once per clock.
* `ready` comes n+1 cycles after `valid`.
* The shift amount is taken modulo 32, as in RV32I.
* AND, OR, XOR, ADD, SUB, SLT and the LUI pass-through are ready in the same cycle.

MUL uses `an_multiplier`, a shift-and-add multiplier:

```
acc = 0; m = rs1
for i in 0..31:  acc = acc + (m AND {32{rs2[i]}});  m = m << 1
```

* Each iteration takes one clock, using the one-bit shifter and the adder.
* `done` comes 33 cycles after `start`: 32 iterations and one cycle to begin.
* The result is the low 32 bits of the product, as RV32M MUL defines it.
* Trading a multiplier array for 33 cycles is the point. The anomaly-detection code
  needs only a few multiplications per sample, and the core is idle-waiting on
  sensors most of the time anyway.

## Sharing memory: `dp_mem_ctrl` and `sram_sp`

The SRAM controller has two ports:

* an AXI port for the Main-CPU (`day_axi_*`);
* an APB port wired straight to the Night side.

Either side can reach memory while the other is asleep. Only one access reaches the
single-port array (`sram_sp`: synchronous read, byte write enables) in any cycle.

* **Arbitration.** When both ports ask in the same cycle, the port that was served
  less recently wins, so priority alternates. `mem_conflict` reports such cycles.
* **AXI side.** This is a single-beat AXI4-Lite subset:
  * a write needs AWVALID and WVALID together and is answered on B;
  * a read is answered on R one cycle after the array access;
  * a pending write is served before a pending read.
* **APB side.** An uncontended APB transfer takes the minimum two cycles; a losing
  port waits.

## Reaching the sensors without the interconnect

Two multiplexers carry the Day–Night idea on the bus side:

* **`night_mux`.** It decodes the core's APB transfers into three windows:
  * the SRAM controller;
  * the external I/O multiplexer;
  * a one-bit interrupt register.

  A store of 1 to `0x2000_0000` raises `irq` towards the Main-CPU. The Main-CPU clears
  it with `irq_clear` (a store of 0 clears it too).
* **`u_io_mux`.** An `apb_rr_arbiter` in round-robin mode. It lets the interconnect's
  APB (`day_apb_*`) and the core share one external I/O bus. A transfer keeps the
  grant until PREADY, and `io_conflict` reports simultaneous requests.

Behind the external I/O multiplexer, `apb_decoder` selects between five devices:

* the NSR;
* `apb_uart`: 8N1, 115200 baud at 50 MHz by default, with a one-byte receive buffer;
* `apb_spi`: mode 0, MSB first, 8-bit transfers, with a chip select;
* `apb_i2c`: a byte-level single master;
* `apb_gpio`: eight pins with output enables and synchronized inputs.

The I2C command register works as follows:

* One write can hold START, a byte WRITE or READ, and STOP. It can also ask for a
  NACK after the read byte.
* The master runs the sequence and clears `busy` when done. An unacknowledged byte
  sets `nack`.
* SCL and SDA are open-drain: the `*_oe` outputs pull the line low, and the `*_i`
  inputs read the wire.
* START and STOP never move SDA and SCL in the same clock. The default divider gives
  a 100 kHz SCL.

## Standby and wake-up: `power_manager`

The Day segment is put to sleep by clock gating, not power gating. Gating is enabled
and released within a cycle, and needs no power switches.

* When the Day side writes 1 to STANDBY, `day_clk_en` drops in the next cycle. A clock
  gate outside this RTL uses it for the Main-CPU and the interconnect.
* A rising `irq` from the Night side sets `day_clk_en` again. If the Day segment was
  asleep, WAKES counts the wake-up.
* The power manager and the Night segment themselves are never gated.

## The anomaly-detection loop, end to end

`tb/tb_day_night_soc.sv` runs the whole SoC at its default parameters through a
simplified version of the target application. The test takes about 5 seconds with
Verilator.

**Boot.**

1. A Main-CPU model writes the Night program over AXI.
2. It writes the per-user limits (temperature 34–38, heart rate 50–120, acceleration
   100–300) into SRAM.
3. It sets Night_addr and enable_Night.
4. It enters standby.

**The Night loop**, 138 instructions, assembled by the testbench:

1. Read a heart-rate frame 254, HR, 255 from a PPG sensor model on the UART.
2. Read the temperature and the accelerometer axes ix, iy, iz over I2C from a sensor
   model.
3. Compute `acc = ix*(ix>>>7) + iy*(iy>>>7) + iz*(iz>>>7)` with SRA and MUL.
4. Check each value against its limits with SLT.
5. Store the values, the anomaly flags and a sample counter.
6. Keep running sums. After every fourth sample (the averaging period), store the
   averages of the three values as sum >>> 2, and set the acceleration limits to
   0.5 and 1.5 times the average acceleration.
7. On an anomaly, raise the interrupt.

One sample takes about 96,000 cycles, or 1.9 ms at 50 MHz. Nearly all of that is
spent waiting on the serial buses.

**The Main-CPU's reaction on an anomaly.** The Main-CPU model:

1. wakes;
2. reads the flags over AXI while the core keeps using the SRAM (port contention);
3. sends an alarm byte to an OLED over SPI through the shared I/O bus (I/O contention),
   and lights an alarm LED on a GPIO pin;
4. raises a limit (feedback);
5. clears the interrupt;
6. returns to standby.

At the end, the model stops the core with enable_Night = 0 and restarts it.

The test checks:

* every stored value and flag, the running sums, the averages and the updated limits;
* the interrupt, the SPI byte, the GPIO pins, the wake count and the restart address.

It also counts the following mechanisms, and fails if any of them never happened:

* jump/branch flushes;
* MUL and SRA;
* interrupts and wake-ups;
* SRAM and I/O contention;
* stop and restart;
* SPI and I2C traffic.

The full application also keeps heart-rate averages over longer windows (minutes up
to a day), and requires an anomaly to persist for a number of samples before it
interrupts. That is software, and it runs on the same instructions. The test leaves
it out to keep simulation short.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/an_pkg.sv tb/tb_day_night_soc.sv --top-module tb_day_night_soc -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace the testbench name to run any other block's test.

The helper files in `tb/` are:

* `apb_master_bfm`: APB master tasks;
* `apb_mem_model`: an APB memory with wait states;
* `i2c_sensor_model`: an I2C slave with four registers;
* `rv_asm_pkg`: instruction encoders.

Variables that are not reset start random (`+verilator+rand+reset+2`), and the tests
pass that way.

Useful parameters:

* The top has `MEM_WORDS` (SRAM size), `CLKS_PER_BIT` (UART), `SPI_DIV` and `I2C_DIV`.
* The core has `NREGS`.
* The arbiter has `ROUND_ROBIN`.
* The decoder has `N`, `BASE` and `MASK`.

Everything is synthesizable. The assertions check bus rules, and they sit outside
synthesis: exclusive SRAM grants, stable APB requests during a transfer, and APB
access phases.

## What follows the original design, and what is this implementation's own

**Taken from the Day–Night description:**

* the split into Day and Night segments;
* the three-stage core, its 16 instructions and eight registers;
* the six-operation ALU built on a 32-bit adder and a one-bit shifter;
* the 32-step shift-and-add multiplier;
* starting from Night_addr under enable_Night;
* the NSR with those two registers;
* the dual-port AXI/APB memory controller with mutually exclusive ports and
  alternating priority;
* the multiplexer that gives the core the external I/O without the interconnect;
* the second multiplexer through which the core interrupts the Main-CPU;
* APB for all Night-side traffic;
* clock gating for standby;
* the sensor set (UART PPG sensor, I2C accelerometer and temperature sensor, SPI OLED
  and camera);
* the 50 MHz clock.

**This implementation's own choices:**

* The memory map and all register layouts.
* The SRAM size: 64 KiB.
* The AXI4-Lite subset and all bus timings.
* One fetch in flight, and resolving branches in EXECUTE.
* Forwarding in the register file.
* Executing unknown instructions as no-operations.
* The shift and multiply latencies (n+1 and 33 cycles).
* Round-robin as the way to alternate priority.
* The interrupt register and `irq_clear`.
* The power manager's register interface. It sits on its own APB port rather than the
  shared I/O bus, so a Main-CPU in standby cannot be starved by the Night side.
* The baud rate, the SCL and SCLK rates, and the peripherals' internals.

**Where this departs from the description:**

* The core is described as avoiding pipelines in one place and as having a
  three-stage pipeline in another. The three stages are built.
* The ALU is described with "32-bit multipliers" in one place and with the iterative
  algorithm in another. The iterative multiplier is built.

**Not built:**

* the Main-CPU;
* the micro-NoC and its network interfaces;
* IROM, JTAG and FLASH;
* the clock-gate cell itself (only its enable is produced);
* Bluetooth.

These are existing IP or parts that are only named. Their connections are ports of
`day_night_soc`.

## How far to trust it

* Every module has a testbench that compares it with an independent reference. Each
  testbench has also been shown to fail on a deliberately broken copy of its module.
* The core is also run on 25 random programs of all sixteen instructions, and its
  registers and data memory are compared with a reference instruction-level model in
  the testbench.
* The bus multiplexer and the I2C master are also driven with random transfers: the
  former over all of its address windows, the latter reading random registers from a
  sensor model at random clock dividers, with the SCL period checked each time.
* The top-level test runs at full size with the default parameters.
* The RTL has been linted and elaborated with Verilator and with Yosys/slang. The
  whole SoC synthesizes to 1,018 flip-flop bits plus the 512 Kibit memory. The
  All-Night core accounts for 683 of those bits, 256 of them in the register file.
* It has not been run on an FPGA or through timing analysis.
* The UART, SPI, I2C and GPIO blocks were checked only against the bus models in `tb/`,
  not against real parts.
