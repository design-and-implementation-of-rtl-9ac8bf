# AXI4-Lite to APB bus system: four masters, four bridges, a peripheral cluster

This is a small AMBA system-on-chip fabric. High-bandwidth devices sit on AXI; low-bandwidth
peripherals sit on APB. Four AXI masters share four AXI slaves through a crossbar (the
"interconnect"). Every AXI slave is an AXI-to-APB bridge: it replays each AXI read or write
as one APB transfer. The first bridge serves three simple peripherals:

- a 3x3 keypad scanner;
- a seven-segment display decoder;
- a UART.

The APB buses of the other three bridges are brought out to the top level, where more
peripherals can be attached.

```
 master 0..3 ──AXI4-Lite──► axi_interconnect ──► axi_apb_bridge 0 ──APB──► apb_periph_subsystem
 (m_req/m_resp ports)       (2:4 decoders,   ──► axi_apb_bridge 1 ──APB──► ext_apb_req/resp[0]
                             4:1 muxes,      ──► axi_apb_bridge 2 ──APB──► ext_apb_req/resp[1]
                             fixed priority) ──► axi_apb_bridge 3 ──APB──► ext_apb_req/resp[2]

 apb_periph_subsystem: apb_controller + apb_addr_decoder ─PSEL1─► keypad_decoder (+ clock_divider)
                                                         ─PSEL2─► seven_seg_decoder
                                                         ─PSEL3─► uart (uart_baud_gen, uart_tx, uart_rx)
```

The RTL is synthesizable SystemVerilog. It uses one clock (ACLK, which also serves as PCLK)
and one asynchronous active-low reset (ARESETn, which also serves as PRESETn). Addresses and
data are 32 bits wide.

## Address map

| AXI address             | Target                                              |
|-------------------------|-----------------------------------------------------|
| `0x0000_0004`           | keypad: read `{new, 000, key[3:0]}`                 |
| `0x0000_0008`           | display: write a value, its low nibble is shown; read it back |
| `0x0000_000C`           | UART data: write = send byte, read = last byte received |
| `0x0000_000D`           | UART status: read `{000000, rx_valid, tx_busy}`     |
| `0x4000_0000`–`0x7FFF_FFFF` | APB bus of AXI slave 1 (`ext_apb_*[0]`)          |
| `0x8000_0000`–`0xBFFF_FFFF` | APB bus of AXI slave 2 (`ext_apb_*[1]`)          |
| `0xC000_0000`–`0xFFFF_FFFF` | APB bus of AXI slave 3 (`ext_apb_*[2]`)          |

The two most significant address bits pick the AXI slave. Behind slave 0, `PADDR[3:2]`
picks the peripheral and `PADDR[1:0]` the register inside the UART. Bits `[29:4]` are ignored
there, so the peripheral block repeats through the first quarter of the address space. Offset
`0x0` reads 0 and ignores writes.

## The interconnect: who gets a slave, and for how long

This is the part that needs the most care when you use or change the design.

- **Decoding.** Each master has two 2:4 decoders, one for its read address and one for its
  write address (`axi_addr_decoder`). Each turns `ADDR[31:30]` into a one-hot slave request.
- **Two multiplexers per slave.** Each slave has a *read* multiplexer, carrying AR and R. It
  also has a *write* multiplexer, carrying AW, W and B. The two work independently, so a
  read from one master and a write from another can reach the same bridge in the same
  cycle. The bridge then puts them in order (reads first, see below).
- **Fixed priority, no preemption.** A free multiplexer grants the lowest-numbered
  requesting master: master 0 beats master 1, and so on. The grant is a register, so a
  request reaches the slave one cycle after the master presents it. The grant holds until
  that transaction's response handshake (R for a read, B for a write). Then the multiplexer
  arbitrates again. A low-priority master can therefore wait indefinitely while
  higher-priority masters keep a slave busy; nothing ages requests.
- **Routing back.** The slave's READY and response signals go only to the master that owns
  the grant.
- **Rule for masters.** W carries no address, so each master must keep **at most one read
  and one write outstanding**. With two writes to different slaves in flight, the write data
  could not be matched to the right slave. Every master in the testbenches follows this rule.

## The bridge: AXI in, APB out

`axi_apb_bridge` is the same module in all four slave positions.

**AXI side.** AR, AW and W each land in a one-entry holding register. A channel's READY is
the flip-flop "holding register empty". READY is therefore a register output and may be high
before VALID arrives; a transfer happens in any cycle where both are high. The bridge
asserts that the master keeps VALID and the payload stable until READY. R and B are driven
from registers until the master accepts them. The response is always OKAY, because the APB
side has no error signal.

**APB side.** The three-state machine in `amba_pkg::apb_state_e` works as follows:

- **IDLE.** Nothing is selected.
- **SETUP.** The bridge loads PADDR, PWRITE, PWDATA, PSTRB and PPROT and raises PSEL. This
  state lasts exactly one cycle.
- **ENABLE.** PENABLE is high. The bridge stays in ENABLE while PREADY is low, which lets a
  slave add wait states. The transfer completes in the cycle where PREADY is high.
- **After ENABLE.** If another transfer is already waiting and its response slot is free, the
  bridge goes straight back to SETUP with PSEL still high. Otherwise it goes to IDLE.

A read starts once its address is held. A write starts once both its address and its data
are held. When a read and a write are both ready, **the read goes first**. A new read does not
start while the previous read's R response is still waiting for the master, and likewise for
writes and B.

**Timing.** With a zero-wait APB slave, RVALID rises 3 cycles after the AR handshake: one
cycle in the holding register, then SETUP and ENABLE. Seen from a master, one access to a
peripheral costs about 6 cycles when nothing else is happening:

1. the interconnect grant;
2. the capture in the holding register;
3. SETUP;
4. ENABLE;
5. the response, plus the master's own handshake cycles.

Assertions in the bridge check these APB rules:

- SETUP is always followed by ENABLE;
- PADDR, PWRITE and PSEL stay stable from SETUP into ENABLE;
- PADDR stays stable during wait states.

## The peripheral cluster behind slave 0

The cluster uses an 8-bit peripheral bus. `apb_controller` takes the bridge's 32-bit APB
transfer and narrows it to `PADDR[7:0]` and `PWDATA[7:0]`. It raises the one select line that
`apb_addr_decoder` chooses and broadcasts PENABLE and PWRITE to all three peripherals. It then
returns the selected peripheral's PRDATA, zero-extended, and its PREADY. The controller is
purely combinational, so the peripherals see the bridge's SETUP and ENABLE cycles unchanged.

- **Keypad decoder (PSEL1).** It drives the three column lines `kp_col` one at a time, active
  high, and reads the three row lines `kp_row` through a two-flop synchroniser. A pressed key
  joins its column to its row. The column moves on at every tick of `clock_divider`: 100000
  cycles by default, which is 1 kHz at 100 MHz. If a row is high for the driven column, the
  decoder stores the value (row−1)·3 + column, giving 1…9 (the lowest row wins if several are
  high), and sets the "new" flag. A read returns `{new, 000, value}` and clears "new". A key
  appears within three scan ticks of being pressed. Add a debouncer in front of `kp_row` if
  real switches bounce longer than a scan period.
- **Seven-segment decoder (PSEL2).** A write stores a byte; `seg` shows its low nibble as a hex
  digit. The bit order is `seg = {a,b,c,d,e,f,g}`, with a 1 lighting the segment, so "0" is
  `1111110`. A read returns the stored byte. The intended use is to show the value read from
  the keypad.
- **UART (PSEL3).** It sends and receives 8N1 frames (8 data bits, LSB first, no parity, one
  stop bit) at `BAUD`. `uart_baud_gen` makes a one-cycle enable 16 times per bit, using a
  divisor of ⌊CLK_HZ / (16·BAUD)⌋, which is 54 at the defaults (0.5 % fast).
  - `uart_tx` holds each bit for 16 such ticks.
  - `uart_rx` waits for a low level after the line has been idle high. It confirms the start
    bit in its middle, then samples each following bit in its middle. It drops a frame whose
    stop bit is low.
  - A write to the data register while the transmitter is busy is **held with PREADY low**
    until the transmitter is free. That stretches the bridge's ENABLE state for up to one
    frame time, about 8700 cycles at the defaults. The master and that bridge wait meanwhile;
    other slaves carry on.
  - Reading the data register clears `rx_valid`. A byte that arrives before the previous one
    was read overwrites it.

## Parameters

| Parameter | Where | Default | Meaning |
|-----------|-------|---------|---------|
| `ADDR_W`, `DATA_W` | `amba_pkg` | 32, 32 | AXI/APB address and data width |
| `N_MASTER`, `N_SLAVE` | `amba_pkg` | 4, 4 | ports of the interconnect (the 2:4 decoder fixes 4 slaves) |
| `PADDR_W`, `PDATA_W` | `amba_pkg` | 8, 8 | peripheral bus behind slave 0 |
| `CLK_HZ` | top, subsystem, `uart`, `uart_baud_gen` | 100 000 000 | clock frequency, used only for the baud divisor |
| `BAUD` | same | 115 200 | UART bit rate |
| `SCAN_DIV` / `DIV` | top, subsystem / `clock_divider` | 100 000 | keypad scan period in clock cycles (≥ 3) |

## How this relates to the original description

The system follows a published description of an AXI/APB bus architecture on an FPGA. The
following parts come from that description:

- four masters and four slaves;
- every slave being an AXI-to-APB bridge;
- the interconnect made of a 2:4 address decoder and 4:1 multiplexers;
- master 0 having the highest priority;
- reads going before writes;
- the IDLE/SETUP/ENABLE transfer sequence;
- the AXI and APB signal set (AXI4-Lite and APB4, with PPROT and PSTRB but no PSLVERR);
- the three peripherals, their select lines PSEL1–PSEL3, the 8-bit peripheral bus, the 3x3
  keypad with lines Cn1–3 and Rw1–3, and the UART's split into transmitter, receiver and
  baud generator.

Choices this design makes where the description is silent or inconsistent:

- **Select line of the display.** The description's text puts the display on PSEL3, but its
  block diagram puts it on PSEL2 and the UART on PSEL3. The block diagram is followed.
- **VALID and READY.** The prose asks for VALID before READY, while the handshake diagrams
  also allow READY first. The bridge raises READY before VALID, which every AXI master must
  accept anyway.
- **Address maps.** Both the slave decode on `ADDR[31:30]` and the peripheral map are
  choices of this design.
- **Clock divider.** It is only named in the description. Here it paces the keypad scan, as
  a clock enable rather than a second clock.
- **Own choices.** These are all this design's own:
  - the separate read and write multiplexers per slave;
  - the registered grants and the bridge's holding registers;
  - the keypad value formula and register layout;
  - the A–F display shapes;
  - the UART frame, baud rate, registers and wait states;
  - the 100 MHz clock assumption.
- **Not built.**
  - AXI bursts: the channel set has no length, burst or last signals, so every access is a
    single beat.
  - Error responses.
  - The masters themselves. They are the top's AXI ports, and nothing is said about their
    insides.
  - Peripherals on slaves 1–3, which are left as ports.
- **Reported FPGA figures.** The description reports 325 slice registers, 514 LUTs and a
  2.8 ns achievable clock period on its FPGA. Generic synthesis of this RTL gives about
  940 flip-flop bits. Most of them are the bridges' holding and response registers (four
  bridges × about 200 bits), which this design adds. No FPGA timing was measured here.

## Simulating

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
          rtl/amba_pkg.sv tb/tb_amba_soc_top.sv --top-module tb_amba_soc_top
./obj_dir/Vtb_amba_soc_top
```

Replace the testbench name to run another one.

- **`tb_amba_soc_top`** runs the whole system at small sizes: a scan divider of 6 and a UART
  divisor of 4. It covers:
  - a keypad → display → UART round trip from master 0;
  - a read and a write meeting at one bridge;
  - four masters hitting one slave in the same cycle, checked for priority order;
  - random parallel traffic checked against a memory model.

  It also counts arbitration conflicts, read-before-write decisions, back-to-back APB
  transfers, APB and UART wait states, keypad reads, display writes and received UART
  frames, and fails if any of them never happened.
- **`tb_amba_soc_full`** runs the same kind of operation with every parameter at its default,
  in about 2 ms of simulated time.
- **Per-module testbenches:** `tb_axi_interconnect`, `tb_axi_apb_bridge`, `tb_apb_controller`,
  `tb_apb_periph_subsystem`, `tb_keypad_decoder`, `tb_seven_seg_decoder`, `tb_uart`,
  `tb_uart_tx`, `tb_uart_rx`, `tb_uart_baud_gen`, `tb_clock_divider`, `tb_axi_addr_decoder` and
  `tb_apb_addr_decoder`.

Models used only by testbenches:

- `tb/axi_mem_slave.sv` is an AXI memory with random READY and response delays.
- `tb/apb_mem_slave.sv` is an APB memory with optional random wait states.
- `tb/axi_master_tasks.svh` holds the `axi_read` and `axi_write` bus-functional tasks.

The simulator has no X state, so the testbenches reset everything the design reads.
