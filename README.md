# Expansion ports for the MC9S12 external bus

A microcontroller with no free pins can still gain I/O if its external
address/data bus is brought out. This design hangs two byte-wide ports on the
MC9S12 (HCS12) bus in wide expanded mode, so that the CPU can reach them with
ordinary loads and stores:

| Address | Port   | Direction                     | Byte lane | On the board           |
|---------|--------|-------------------------------|-----------|------------------------|
| 0x4000  | input  | read only                     | AD15-8    | switches on bits 3-0   |
| 0x4001  | output | write, and read back          | AD7-0     | eight LEDs             |

It is meant for a small programmable logic device (an FPGA or CPLD) wired
straight to the CPU's 16 multiplexed address/data lines and its three bus
control lines, E, R/W and LSTRB.

## The bus it sits on

The MC9S12 multiplexes the address and data over the same 16 lines, AD15-0.
One bus cycle takes one period of the E clock:

```
        address phase        data phase
E     ______________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\____
AD    ==< address >==<  write data / read data >==
R/W, LSTRB valid for the whole cycle
```

* **E low: address phase.** The CPU drives the address on AD15-0, and
  R/W and LSTRB for the cycle.
* **E high: data phase.** The CPU drives write data, or releases the bus
  and samples read data at the falling edge of E.

The bus is 16 bits wide. The even byte of an aligned word travels on AD15-8
and the odd byte on AD7-0. LSTRB (active low) tells which bytes are
accessed:

| A0 | LSTRB | access                       | touches 0x4000 | touches 0x4001 |
|----|-------|------------------------------|----------------|----------------|
| 0  | 0     | 16-bit word (0x4000/0x4001)  | yes            | yes            |
| 0  | 1     | 8-bit even byte (0x4000)     | yes            | no             |
| 1  | 0     | 8-bit odd byte (0x4001)      | no             | yes            |

So a single `ldx $4000` reads both ports at once: switches in the high
byte, LED value in the low byte.

## How it works

```
            ┌───────────┐ addr  ┌──────────────┐ we_n   ┌──────────────┐
AD15-0 ────►│addr_latch │──────►│ port_decoder │───────►│ out_port_reg │──► out_pins (LEDs)
   ▲        └───────────┘   │   └──────────────┘        │  8 FF, E↓    │
   │              ▲ E       │          │ cs_r_n          └──────┬───────┘
   │              │         │          ▼                        │
   │ AD7-0 ◄──────┼─────────┼──── bus_buffer ◄──────────────────┘
   │              │         ▼
   └ AD15-8 ◄─────┴──── in_port (decode 0x4000 + bus_buffer) ◄── in_pins (switches)
```

1. **Address latch** (`addr_latch`). Transparent while E is low, closed
   while E is high. The address present when E rises stays in place for the
   whole data phase.
2. **Decoder** (`port_decoder`). It produces two active-low strobes for
   the output port from the latched address, E, R/W and LSTRB:
   * `cs_r_n` = 0 when the address is 0x4000 or 0x4001, LSTRB = 0,
     R/W = 1 and E = 1. This is a read that involves the odd byte.
   * `we_n` = 0 when the address is 0x4000 or 0x4001, LSTRB = 0 and
     R/W = 0. This is a write that involves the odd byte. E is not part
     of this term.
3. **Output register** (`out_port_reg`). Eight flip-flops clocked by the
   falling edge of E. They load AD7-0 when the write is enabled. The CPU
   keeps write data on the bus slightly past the falling edge, so the byte
   is stable when it is captured.
4. **Read-back buffer** (`bus_buffer`). A tri-state driver. While
   `cs_r_n` is low it puts the register's contents on AD7-0, so
   `inc $4001` (read, add one, write back) works.
5. **Input port** (`in_port`). It drives `in_pins` onto AD15-8 during
   E high of any read whose latched address is exactly 0x4000 (A0 = 0).
   LSTRB is ignored, because both the byte read and the word read of 0x4000
   carry the even byte. The port has no storage: the CPU samples the pins
   at the falling edge of E.

The top module, `port_expander`, wires these together. It has a single
bidirectional `ad[15:0]` port. An immediate assertion in the top checks
the bus rule that the expander never drives AD while E is low.

## Timing subtleties

The circuit is driven entirely by E. Two edges do the work, and both
involve a race that gate delays resolve in the board circuit but a
zero-delay description has to handle explicitly.

* **Rising edge of E.** The latch closes, and the read selects (gated by
  E) may turn the drivers on. The latch captures the CPU's address, not
  the value the expander is about to drive, because a closed latch ignores
  later changes on AD. Lint tools report this path (AD → latch → selects
  → AD drivers) as a combinational loop. It cannot oscillate: the latch is
  open only while E is low, and the drivers are on only while E is high.
* **Falling edge of E.** The output flip-flops load, and at the same
  instant the latch reopens and starts passing the next address. An enable
  decoded from the live latch output would then race the load. The enable
  is therefore sampled into a one-bit flip-flop at the rising edge of E,
  and that copy qualifies the falling-edge load. `we_n` depends only on
  the latched address, R/W and LSTRB, which are all settled when E rises,
  so the write decision is the same.

Expect a short overlap at the start of a read data phase: the drivers turn
on as soon as E rises, while the CPU may still be holding the address for
its address-hold time. This follows directly from gating the read select
with E, as in the original circuit.

## Where this RTL makes its own choices

* **Write enable sampled at E rise.** See above. The original circuit
  applies WE directly to the flip-flop enable.
* **Reset.** `rst_n` (asynchronous, active low) clears the output port to
  0x00 and the sampled write enable to "off". The original circuit has no
  reset.
* **Input port decode and lane.** The input port's address (0x4000), width
  (8 bits) and use (switches on bits 3-0) are given. Its decode and the
  use of AD15-8 follow the CPU's byte-lane rules and mirror the output
  port's read select.
* **Which lines the read-back buffer drives.** AD7-0, the lane of the odd
  address 0x4001, which is also where the flip-flops get their data.
* **Bidirectional bus.** `ad` is a real `inout` with tri-state drivers.
  If your flow prefers separate in/out/enable signals at the pins, split
  `bus_buffer` at the pad. Note that the yosys-slang front end cannot yet
  flatten a submodule `inout`, so yosys synthesis of `in_port` and
  `port_expander` fails there. Verilator and slang elaborate them without
  errors.

Not covered by the RTL:

* **Pin placement.** E must go to a global clock input of the FPGA.
* **External bus timing.** Cycle time, E pulse widths, hold and delay
  times are properties of the CPU. No timing numbers are modelled.
* **E-clock stretching.** It is not used, so a port access is always one
  plain E cycle.

## Files

| File | Contents |
|------|----------|
| `rtl/port_exp_pkg.sv` | bus width, port width, the two port addresses, R/W encoding |
| `rtl/addr_latch.sv` | address latch |
| `rtl/port_decoder.sv` | output-port read select and write enable |
| `rtl/out_port_reg.sv` | 8-bit output register |
| `rtl/bus_buffer.sv` | tri-state byte driver |
| `rtl/in_port.sv` | input port decode and driver |
| `rtl/port_expander.sv` | top level |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

Parameters: `AW` (latch width, 16), `W` (register and buffer width, 8) and
`PORT_ADDR` on the decoder (0x4001) and the input port (0x4000). The top
has no parameters; the package holds the shared values.

## Verification

Each testbench compares the block's outputs with values it computes
itself, and ends with a line `TB_RESULT checks=N failures=M`. Each has a
watchdog.

* `tb_addr_latch`: transparency while E is low, hold while E is high,
  with random bus traffic.
* `tb_port_decoder`: every combination of E, R/W and LSTRB over the port
  addresses, their neighbours, instruction-fetch addresses and random
  addresses.
* `tb_out_port_reg`: reset, load only on a falling edge whose cycle
  started with the write enabled, and no effect from late enable or data
  changes.
* `tb_bus_buffer`: drive and release against a second driver.
* `tb_in_port`: read selection and the driven lane against a CPU driver,
  with random addresses.
* `tb_port_expander`: the whole design at its only configuration, with
  the testbench acting as the CPU. It runs these sequences:
  * reset;
  * a slow hand-toggled write of 0x4001, as a monitor program in
    single-chip mode would do it;
  * 300 rounds of "read 0x4001, write it back plus one, read the switches
    at 0x4000", including the wrap from 0xFF to 0x00;
  * 50 rounds of the loop `ldx $4000; inc $4001; ldaa $4000; bra`, with
    instruction fetches from 0x0480 onward;
  * 2000 random cycles of every kind.

  On every cycle it checks that the expander is off the bus except during
  E high of a read it owns. It also checks that each write reaches the
  pins at the falling edge of E ending that same cycle, and not before,
  since there are no wait states. It counts each mechanism (reset, hand-toggled
  write, odd-byte write, word write, ignored even-byte write, read-back,
  byte and word reads of the input port, ignored foreign address,
  wrap-around) and fails if any of them never occurred.

Run one with Verilator (the package first):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/port_exp_pkg.sv rtl/addr_latch.sv rtl/port_decoder.sv rtl/out_port_reg.sv \
  rtl/bus_buffer.sv rtl/in_port.sv rtl/port_expander.sv \
  tb/tb_port_expander.sv --top-module tb_port_expander
./obj_dir/Vtb_port_expander
```

Two lint warnings remain, both expected:

* `addr[0]` is unused in the decoder, because 0x4000 and 0x4001 are
  decoded as one word.
* The combinational loop described under *Timing subtleties*.
