# JM8BC013A-style Java system-on-chip: bus, memory, FPU and peripheral RTL

This is the system around a bytecode-executing Java processor core: a 32-bit SoC that
puts a stack-based Java core, a floating-point unit, a DMA controller and a set of
peripheral controllers on a single chip. The core runs Java bytecodes directly as
sequences of microcode. The SoC is organised so that the core and its fast bus partners run
at full speed while the slower controllers sit on a second bus whose clock can be divided
down at run time to save power.

The RTL here covers everything around the core:

* two AMBA 2 AHB layers (high-speed and low-speed) joined by an asynchronous AHB-to-AHB
  bridge, plus an AHB-to-APB bridge;
* the fixed-priority arbiter (debug module > Java core > DMA);
* the debug module, which copies the boot image (microcode, jump table, variables) from
  external flash into the core's inner RAMs before the core leaves reset;
* the DMA controller;
* the single-precision FPU and its microcode link to the core (`stfadd`, `stfsub`,
  `stfmul`, `stfdiv`, `ldfpu`);
* the memory system (external flash + SRAM);
* UART, timer, interrupt controller, GPIO, I2C master, PS/2 host port, SPI master;
* the I2S audio controller on the low-speed AHB;
* clock configuration and generation (`clk_manager`, `clk_gen`), with a run-time bus
  clock ratio and clock shut-down;
* IO reuse, which shares pads between two controllers under the register `io_reg`.

Not included are the Java core itself and the LCD, VGA, USB and Ethernet controllers.
Their bus ports, clocks and interrupt lines come out of the top module `jsoc_top`, so they
can be attached later.

## Block diagram and address map

```
                 hclk domain                                   lclk domain
   +-----------+                                   +-----------------------------------+
   | debug (0) |--+                                |  low-speed AHB  (ahb_ls_bus)      |
   +-----------+  |   high-speed AHB (ahb_hs_bus)  |   0x0-0x7  mem_ctrl -> flash/SRAM |
   | core  (1) |--+-- arbiter 0>1>2 --+-- 0x0-0xD -+-> 0x8      ahb2apb_bridge --+     |
   +-----------+  |                   |  ahb2ahb   |   0x9-0xB,0xD LCD VGA USB ETH|     |
   | DMA   (2) |--+                   |  bridge    |   0xC ahb_i2s; rest top ports|     |
   +-----------+                      +-- 0xE  DMA registers                     |     |
   | FPU via fpu_ext, next to the core+-- 0xF  default slave (ERROR)             |     |
   +---------------------------------                                            v     |
                                   APB 0x8n000000: 0 UART 1 Timer 2 IRQ 3 GPIO 4 I2C   |
                                   5 PS2 6 SPI 7 clk_manager                           |
```

The top nibble of HADDR selects the slave (`jsoc_pkg::REGION_*`):

| HADDR[31:28] | slave | layer |
|---|---|---|
| 0x0-0x7 | memory system (HADDR[30]=0 flash on CS0, 1 SRAM on CS1) | low-speed |
| 0x8 | AHB-to-APB bridge; APB slot = HADDR[27:24] | low-speed |
| 0x9 / 0xA / 0xB / 0xD | LCD / VGA / USB / Ethernet (external ports) | low-speed |
| 0xC | I2S controller (`ahb_i2s`) | low-speed |
| 0xE | DMA controller registers | high-speed |
| 0xF | default slave: every transfer gets ERROR | high-speed |

Regions 0x0-0xD are all forwarded by the AHB-to-AHB bridge. APB slots 8-15 select
nothing and read as zero. If a transfer to 0xE/0xF ever reached the low-speed layer, it
would get ERROR from that layer's own internal default slave.

## Bus protocol conventions

All AHB ports are packed structs from `jsoc_pkg`:

* `ahb_m2s_t` carries HADDR, HTRANS, HWRITE, HSIZE, HBURST, HPROT and HWDATA;
* `ahb_s2m_t` carries HRDATA, HREADY and HRESP;
* `apb_m2s_t` carries PADDR, PENABLE, PWRITE and PWDATA.

PSEL and PRDATA are separate per-slave arrays. The APB is the AMBA 2 one, without PREADY
or PSLVERR. HWDATA travels in the same struct as the address. A master drives the write
data of the previous address phase in that field, which is why the high-speed layer
multiplexes HWDATA by the data-phase owner (`hmaster_d`) and everything else by the
address-phase owner (`hmaster`).

Every master in the design issues single NONSEQ transfers. `ahb_mport` is the shared
engine that the debug module, the DMA and the bridge's low-speed side all use:

1. request the bus;
2. on HGRANT with HREADY high, drive one address phase, dropping HBUSREQ at the same time;
3. wait out the data phase;
4. pulse `done` with the read data and an error flag.

Because the request drops during the address phase, the arbiter decides again after
every transfer. A DMA block copy therefore gives way to the core at every word, which is
the point of giving the DMA the lowest priority. Bursts, HLOCK, SPLIT and RETRY are not
used.

Slaves that answer an error use the two-cycle AMBA ERROR response:

1. HREADY low with ERROR;
2. HREADY high with ERROR.

## Crossing between the two bus clocks (`ahb2ahb_bridge`)

This is the part that takes the most care. The low-speed clock's ratio can change while
traffic is running, so the bridge treats the two clocks as unrelated.

**High-speed side.** The bridge accepts a transfer and latches its address and control.
In the first data-phase cycle it also latches the write data. It holds HREADY low and
flips a request toggle.

**Low-speed side.** A two-flop synchroniser detects the change of the toggle. The
`ahb_mport` engine then runs the same transfer on the low-speed layer. The read data and
error flag are stored, and an acknowledge toggle goes back through another two-flop
synchroniser.

**Completion.** The high-speed side then ends the data phase with OKAY and the read
data, or with the two-cycle ERROR.

Only the toggles cross the clock boundary. The request and the response registers are
written before their toggle flips and are not changed until the other side has answered.
An access through the bridge therefore costs roughly:

* 2 high-speed cycles;
* 2 synchroniser cycles in each direction;
* 3 low-speed cycles for the transfer itself, plus the slave's wait states.

The same scheme would serve the asynchronous interfaces of controllers that run on their
own clocks (LCD, USB, Ethernet). Those interfaces would sit in the external controllers.

## Clocks, gating and the bus ratio

`clk_gen` derives every clock from `clk_in`:

* **`hclk`** is `clk_in` itself. It drives the high-speed layer, DMA, FPU link and
  debug module.
* **`lclk`** (the low-speed layer, APB and peripherals) is `clk_in` passed through a
  clock gate. The gate opens for one cycle in every `ratio` cycles. Rising edges of
  `lclk` therefore coincide with rising edges of `hclk`. A ratio change cannot make a
  short pulse; it takes effect at the end of the current period. The duty cycle is
  1/(2·ratio), and ratio 0 or 1 gives the full clock.
* **`gclk[0]`** (debug module) and **`gclk[1]`** (FPU extension) are `hclk` through
  gates controlled by clk_manager's GATE register. Once the image is loaded, software
  can stop the debug module's clock.

`clk_gate` is the usual latch-plus-AND cell. Latch bits after synthesis are those gates
and nothing else. The settings come from the low-speed domain and are synchronised into
the clock generator. Each domain leaves reset through its own `rst_sync`.

`clk_manager` (APB slot 7) registers:

| offset | name | meaning |
|---|---|---|
| 0x0 | RATIO[3:0] | hclk/lclk ratio, reset `RATIO_RESET` = 2 |
| 0x4 | GATE[NG-1:0] | clock enables, bit 0 debug module, bit 1 FPU; reset all 1 |
| 0x8 | IO_REG[NIO-1:0] | pad owner select for IO reuse; reset 0 (GPIO owns all pads) |

## Boot: the debug module (`debug_loader`)

After reset the debug module is the highest-priority master. It reads the boot image
word by word from flash at `FLASH_BASE` (default 0x00000000), and `core_rst_n` holds the
core in reset meanwhile. The image is a sequence of records:

```
header  = {target[31:30], ram_addr[29:16], count[15:0]}
          followed by `count` data words
target  0 microcode RAM, 1 jump table, 2 variables/constants, 3 end of image
```

Each data word comes out on the `ram_we/ram_sel/ram_addr/ram_wdata` port at consecutive
addresses. When the end record is read:

* `done` rises;
* the debug module stops requesting the bus;
* `core_rst_n` is released.

A bus error during the load stops the loader with `boot_error` set. Every word costs
one read through both bus layers and the memory controller.

## DMA controller (`dma_ctrl`, 0xE0000000)

| offset | register | meaning |
|---|---|---|
| 0x00 | SRC | source byte address (word aligned) |
| 0x04 | DST | destination byte address |
| 0x08 | COUNT | words left to move |
| 0x0C | CTRL | bit0 start, bit1 fixed source, bit2 fixed destination, bit3 interrupt enable |
| 0x10 | STATUS | bit0 busy, bit1 done, bit2 bus error; write 1 to clear bits 1-2 |

Each word is one read and one write (at least 8 hclk cycles). The fixed-address modes are
for a peripheral data register. The interrupt goes high when done and enable are both
set.

## FPU and its microcode link (`fpu`, `fpu_ext`)

The FPU is not a bus slave. It sits in the core's extension module and is controlled by
microcodes:

| microcode | code | action |
|---|---|---|
| stfadd | 0x0E | start NOS + TOS |
| stfsub | 0x06 | start NOS − TOS |
| stfmul | 0x07 | start NOS × TOS |
| stfdiv | 0x1A | start NOS ÷ TOS |
| ldfpu | 0xE6 | write the result to the top of stack (`fpu_tos_we`, `fpu_tos_wdata`) |

The bytecodes `fadd`, `fsub`, `fmul` and `fdiv` thus become two-microcode sequences: pop
the operands with a start microcode, then fetch the result with `ldfpu`. The operand
order (NOS op TOS) follows the JVM's value1 op value2.

The interlock is `fpu_stall`. It rises in the same cycle as a start or `ldfpu` microcode
issued while the FPU is busy, and the core must hold that microcode until `fpu_stall`
drops.

Numerics:

* IEEE 754 single precision, round to nearest even;
* NaN results are the quiet NaN 0x7FC00000;
* invalid operations give NaN, and overflow and x/0 give signed infinities;
* subnormals are flushed to zero, both on input and on output.

Latency:

* add, subtract and multiply are single-cycle combinational datapaths on latched
  operands, so the result is ready one cycle after start;
* divide is restoring radix-2, one quotient bit per cycle, ready 28 cycles after start.

The single-cycle multiplier and adder are the FPU's main cost: about 3400 of roughly
4600 generic cells in the whole top.

## Memory system (`mem_ctrl`)

This is the low-speed AHB slave for 0x00000000-0x7FFFFFFF. It drives an asynchronous
external bus shared by the flash and the SRAM. The signals are:

* `ext_addr`: word address, `MEM_ADDR_W` = 22 bits, i.e. 16 MiB per chip;
* `ext_wdata` and `ext_rdata`, with `ext_data_oe` for the data direction;
* two chip selects, `ext_cs_n`;
* `ext_oe_n`, `ext_we_n` and `ext_be_n`.

The strobe lasts `WAIT_STATES`+1 cycles (default 2+1). A read costs `WAIT_STATES`+3
lclk cycles and a write `WAIT_STATES`+4. Address and data stay valid one cycle past the
strobe. Byte and halfword writes use the byte enables.

## APB peripherals

| slot | block | registers |
|---|---|---|
| 0 | `apb_uart` | DATA, STATUS (tx busy, rx valid, overrun), DIV (cycles per bit), CTRL (rx irq enable). 8N1. |
| 1 | `apb_timer` | LOAD, VALUE, CTRL (enable, periodic, irq enable), STATUS (expired, W1C). Expires LOAD+1 cycles after enabling. |
| 2 | `apb_irq` | RAW, ENABLE, PENDING, ID (bit31 valid, lowest pending source). Sources: 0 timer, 1 DMA, 2 UART, 3 I2C, 4 PS2, 5 SPI, 6 I2S, 7-10 `ext_irq` (LCD, VGA, USB, Ethernet). |
| 3 | `apb_gpio` | DOUT, DIR, DIN (synchronised). |
| 4 | `apb_i2c` | DATA, CMD/STATUS, DIV (cycles per quarter SCL period), CTRL (irq enable). Single master. |
| 5 | `apb_ps2` | DATA, STATUS (rx valid, parity error, send busy, no acknowledge), CTRL (irq enable), HOLD (request time). |
| 6 | `apb_spi` | DATA, STATUS (busy, done), DIV (cycles per SCLK half period), CTRL (slave select, irq enable). Mode 0, 8 bits, MSB first. |
| 7 | `clk_manager` | see above |

The three serial controllers are deliberately small:

* **I2C** is driven one byte at a time. A write to CMD chains an optional START (or
  repeated START), an optional byte and an optional STOP. The byte is either a WRITE,
  which sends DATA and records the slave's ACK/NACK, or a READ, which receives into DATA
  and sends the acknowledge bit given in the command. Each bus step is four quarters of
  DIV cycles, and a byte is 36 quarters. A quarter in which SCL is released waits until
  the line is actually high, which is how slaves can stretch the clock.
* **PS/2** receives 11-bit device frames (start, 8 data bits LSB first, odd parity,
  stop), sampled on falling clock edges. A frame that stalls is dropped after `TIMEOUT`
  cycles. Writing DATA sends a byte to the device: the controller holds the clock low for
  HOLD cycles, presents the bits on the device's falling edges and checks the device's
  acknowledge.
* **SPI** makes 16 SCLK edges `DIV` cycles apart per byte. MISO passes through a
  synchroniser, which is why DIV is at least 3. Slave select stays under software
  control, so multi-byte transactions are possible.

The interrupt controller synchronises its inputs because the DMA interrupt comes from the
hclk domain. Its single output, `core_irq`, goes to the core.

## I2S controller (`ahb_i2s`)

The I2S controller is a register slave on the low-speed AHB at 0xC0000000. It is the
master of the link and makes the bit clock SCK and the word select WS from the
low-speed clock. It sends and receives 16-bit stereo samples in the standard I2S format:

* a frame is 32 SCK periods, left channel first, WS low for the left channel;
* WS changes one SCK period before each channel's MSB;
* data change on the falling SCK edge and are sampled on the rising edge.

| offset | register |
|---|---|
| 0x00 | TXDATA: {left, right} into the one-sample transmit buffer |
| 0x04 | RXDATA: last received frame; reading it clears rx_valid |
| 0x08 | STATUS: tx buffer full, rx_valid, underrun, overrun (the last two write-1-to-clear) |
| 0x0C | CTRL: enable, interrupt on empty transmit buffer, interrupt on received frame |
| 0x10 | DIV: cycles per SCK half period (minimum 3) |

The transmit buffer moves into the shift register at the start of each frame. If it is
empty, a silent frame goes out and underrun is set. A frame received while the previous
one is still unread sets overrun. SD in passes through a two-flop synchroniser.

## IO reuse (`io_reuse`)

Each of the `NIO` pads (default 8) belongs either to controller 1 or to controller 2,
chosen by one bit of `io_reg`:

* sel=0 gives controller 1, sel=1 gives controller 2;
* the pad output and output enable come from the selected controller;
* the pad input goes to the selected controller, and the other controller sees its idle
  level (1 on the UART receive line).

In `jsoc_top` there are 16 pads. Controller 1 is the GPIO and controller 2 is the
alternate function:

| pad | alternate function |
|---|---|
| 0 / 1 | UART TXD / RXD |
| 2 / 3 | I2C SCL / SDA (open drain) |
| 4 / 5 | PS/2 clock / data (open drain) |
| 6 / 7 / 8 / 9 | SPI SCLK / MOSI / MISO / SS_n |
| 10 / 11 / 12 / 13 | I2S SCK / WS / SD out / SD in |
| 14-15 | `alt_out_hi`, `alt_oe_hi`, `alt_in_hi` ports for the external controllers |

An open-drain line drives 0 with its output enable and is otherwise released to the
board's pull-up. While an input pad is given to the GPIO, the serial receivers see the
line's idle level (1).

## Top-level ports (`jsoc_top`)

| group | ports |
|---|---|
| Java core | `core_clk`, `core_rst_n`; AHB master `core_m`/`core_busreq`/`core_grant`/`core_s`; `core_irq` |
| Core inner-RAM load | `ram_we`, `ram_sel`, `ram_addr`, `ram_wdata`, `boot_error` |
| FPU microcodes | `uc_valid`, `uc`, `tos`, `nos` in; `fpu_stall`, `fpu_tos_we`, `fpu_tos_wdata` out |
| Low-speed AHB controllers | `ls_clk`, `ls_rst_n`, `ls_m`, `ls_hsel[3:0]` (LCD, VGA, USB, Ethernet), `ls_hready`, `ls_ext_s[4]` |
| Interrupts of the external controllers | `ext_irq[3:0]` (LCD, VGA, USB, Ethernet) |
| Memory bus | `ext_*` |
| Pads | `pad_out`, `pad_oe`, `pad_in`, and the alternate-function ports `alt_out_hi`, `alt_oe_hi`, `alt_in_hi` |

Parameters: `NIO` = 16 (at least 15), `MEM_ADDR_W` = 22, `MEM_WAIT` = 2.

## Simulation

Every block has a self-checking testbench in `tb/<module>_tb.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and contains a watchdog. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    rtl/jsoc_pkg.sv tb/jsoc_top_tb.sv --top-module jsoc_top_tb
./obj_dir/Vjsoc_top_tb
```

Replace `jsoc_top_tb` with any other testbench name.

The testbenches compute their expected values independently of the RTL:

* a shadow memory for the bus tests;
* the fixed-priority rule for the arbiter;
* double-precision arithmetic with explicit single-precision rounding for the FPU.

Cycle counts are checked where the design fixes them (FPU latency, APB access, memory
wait states, timer period, UART bit time).

`tb/jsoc_top_tb.sv` runs the whole SoC at its default parameters. Behavioural stand-ins
replace the missing parts:

* an AHB master and microcode stimulus for the Java core;
* the flash/SRAM model `tb/ext_mem_model.sv`;
* memory slaves for the external AHB controllers (`tb/ahb_tb_slave.sv`);
* a board model for the reused pads: loopback wires, pull-ups, and a PS/2 device
  sending one byte.

It counts each mechanism and fails if one never happens. A typical run reports:

* 32 boot words loaded;
* 3 bus-ratio changes;
* a 16-word DMA copy;
* 8 cycles of core/DMA contention;
* 1 default-slave error;
* 1 debug-clock shut-down;
* 1 IO reuse switch, with UART and SPI bytes looped back through the pads;
* an I2C address byte that no device acknowledges, with 11 SCL falling edges;
* a received PS/2 byte;
* an I2S frame sent and received again through the pads;
* all four FPU operations, with stall cycles;
* timer and DMA interrupts.

It takes well under a second.

## How far the RTL follows the reference design, and where it departs

Taken from the reference design:

* the two AHB layers plus APB, and which masters and slaves sit on which bus;
* the priority order debug > core > DMA;
* the AHB address map and the APB window 0x8xxxxxxx, with the eight APB slaves in the
  order listed above;
* the FPU outside the bus, with the five microcodes and their numbers;
* the IO reuse rule and `io_reg`;
* clock configuration held in `clk_manager` and clocks made by `clk_gen`, with a
  run-time bus ratio and debug-clock shut-down;
* the debug module loading microcode, jump table and variables from flash.

Choices of this implementation:

* **Boot image.** The record format of the boot image.
* **Register maps.** All register maps (DMA, UART, timer, IRQ, GPIO, I2C, PS/2, SPI,
  I2S, clk_manager), and the interrupt source numbering.
* **Peripheral features.** The reference design only names its peripherals. The
  feature sets of the UART, timer, IRQ controller, GPIO, I2C, PS/2, SPI and I2S controllers
  are kept to the common core of each function. Examples: no FIFOs, no I2C multi-master
  arbitration, SPI mode 0 only, I2S with 16-bit samples from the bus clock.
* **FPU numerics.** Latencies, flush-to-zero and the canonical NaN. The real FPU may
  support subnormals or other rounding modes.
* **Bridge.** The toggle-handshake bridge and single-transfer forwarding. The bridge
  does not pipeline or forward bursts, so low-speed throughput is about one transfer per
  handshake.
* **Clocking.** The clock-gating divider. `lclk` is an integer submultiple of `hclk`
  with edges aligned to it. The separate LCD (100 MHz), USB (48 MHz) and Ethernet
  (25 MHz) clocks belong to those external controllers.
* **DMA port on the high-speed layer.** The DMA configuration port is a third slave on
  the high-speed layer, because the address map gives DMA its own region 0xE. The bus
  description names only the bridge and the default slave as high-speed slaves.
* **Pads and memory.** Pad count (16 reusable pads, with the assignment above), the
  memory-bus timing and the 22-bit word address per chip.
* **Protocol limits.** No HLOCK, SPLIT/RETRY or bursts. Masters only issue single
  transfers.

The reference chip was built in a 130 nm process (59.3k gates, 330 MHz, 147 mW, 297 pins
of which 216 functional). None of these figures can be checked against this RTL without
the core and the missing controllers. Yosys generic synthesis of `jsoc_top` gives about
4600 cells and 1620 flip-flops.

## Extending

* **Adding the Java core.** Connect its AHB master to `core_m/core_busreq/core_grant/core_s`.
  Its inner RAMs take the `ram_*` writes, and its extension stage drives
  `uc_valid/uc/tos/nos` and honours `fpu_stall`.
* **Adding a low-speed AHB controller.** Use `ls_m` with its `ls_hsel` bit, and return
  its response in `ls_ext_s`. A controller on its own clock needs its own synchronising
  interface.
* **Adding an APB controller.** Use one of the free slots 8-15 in `ahb2apb_bridge` by
  raising its `NSLV` and the `APB_NSLV` constant.
* **Changing the address map.** Edit the `MAP` parameters of `ahb_hs_bus`/`ahb_ls_bus`
  and the constants in `jsoc_pkg`.
