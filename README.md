# PCAP: self-reconfiguration of a Spartan-3 through its own SelectMAP port

The original Spartan-3 family has no internal configuration access port
(ICAP). A running design therefore cannot normally rewrite part of its own
configuration without an external processor or CPLD. This design gets around
that with a small controller, the **PCAP core** (parallel configuration access
port). The core takes partial bitstreams from the FPGA's own block RAM and
drives them out through eleven user pins: eight data bits, chip select, write
and the configuration clock. On the board these pins are wired back into the
device's dedicated SelectMAP pins, with the mode pins strapped for slave
parallel mode. The FPGA is then both the configuration master and the slave
being configured. No processor, bus or external memory is involved.

The partial bitstreams are stored on chip, so the core streams one byte per
clock. At a 50 MHz configuration clock that is 50 MB/s. A 5 KB partial
bitstream takes about 0.1 ms.

The example system shows the idea. A 4-bit up/down counter runs from a clock
manager (DCM) whose output frequency is changed at run time, between 50 MHz
and 5 MHz, by sending one of two stored partial bitstreams. Everything else
keeps running while this happens.

```
                +-------------------- FPGA ----------------------+
                |  bitstream_bram        pcap_ctrl               |
   clk (DCM) -->|  6 x 2 KB  --byte/clk--> FSM + address counter |--- smap_d[0:7] --+
                |  (2 slots)               |                     |--- smap_cs_b ----+  board
                |                          +---------------------|--- smap_rdwr_b --+  loop-back
                |  clk ------------------------------------------|--- smap_cclk ----+
                |                                                |                  |
                |  updown_counter <-- cnt_clk (reconfigured DCM) |   SelectMAP pins <+
                +------------------------------------------------+   (M2 M1 M0 = 1 1 0)
```

## The write sequence

All of the subtle behaviour is in `pcap_ctrl`. It is a five-state machine
(`pcap_pkg::pcap_state_t`) that follows the SelectMAP slave write protocol.
Here is one reconfiguration of an N-byte bitstream. Clock 0 is the clock in
which `start` is seen.

| clock       | state   | RDWR_B | CSI_B | D[0:7]                          |
|-------------|---------|--------|-------|---------------------------------|
| 0           | idle    | 1      | 1     | 0                               |
| 1           | setup   | 0      | 1     | 0                               |
| 2 … N+1     | send    | 0      | 0     | bitstream bytes 0 … N-1         |
| N+2 … N+9   | null    | 0      | 0     | 20 00 00 00 20 00 00 00 (NOOPs) |
| N+10        | release | 0      | 1     | 0                               |
| N+11        | idle    | 1      | 1     | 0 (`done` pulses)               |

These are the points that matter:

- **Write before select, deselect before read.** RDWR_B goes low one clock
  before CSI_B falls. It rises one clock after CSI_B has risen. So the write
  direction never changes while the port is selected. Assertions in
  `pcap_ctrl` check both rules.
- **One byte per clock.** The block RAM read is synchronous, with one clock of
  latency. The read address counter (`rd_addr`) is therefore advanced during
  the setup clock and always runs one address ahead of the byte on the bus.
  The "final address" test is made on the address of the byte being sent
  (`out_addr`), not on the read address.
- **Flushing.** After the last byte, the port stays selected for eight more
  clocks carrying no-operation packets. These let the configuration logic
  finish writing the last frame. The NOOP value is the type-1 NOOP header
  `0x2000_0000` of the Virtex-II/Spartan-3 packet format, sent most
  significant byte first.
- **Clocking.** CCLK is the controller's own clock, forwarded unchanged
  (`smap_cclk = clk`). All outputs change just after a rising edge, and the
  port samples them on the next rising edge, a full period later. CSI_B and
  RDWR_B come straight from flip-flops.
- **No BUSY.** The SelectMAP BUSY output is not monitored. This is safe only up
  to the rate at which the port accepts a byte on every clock, which is 50 MHz
  for the reference device. To go faster, the send state would have to stall
  on BUSY. PROG, INIT and DONE are used only for full configuration and are
  not touched either.
- **Bit order.** `smap_d` is declared `[0:7]`, like the pins. Bit 0 carries the
  most significant bit of the stored byte, as the SelectMAP convention for
  this family requires. Any further bit swapping belongs in the tool that
  converts the bitstream into memory contents.

From start to `done`, a sequence takes `1 + SETUP_CYCLES + BITSTREAM_BYTES +
NULL_CYCLES + HOLD_CYCLES` clocks. At the defaults that is 5131 clocks, or
102.6 µs at 50 MHz. A `start` that arrives while `busy` is high is ignored.

## Bitstream storage

`bitstream_bram` has 6 block RAMs of 2048 bytes each. Only the 16 Kbit data
part of each RAM is used; the parity bits are not. Together they form a
12288-byte memory. A stored bitstream occupies a **slot** of three RAMs
(6144 bytes): slot *n* starts at address *n* × 6144. Each of the two partial
bitstreams in the reference system is 5120 bytes, so each fits in one slot.

On the device, the memory contents are part of the initial configuration:

1. Build the static design with the RAM left empty.
2. Generate the partial bitstreams.
3. Convert them into RAM initialisation files.
4. Merge those files into the full bitstream.

In this RTL, the `INIT_FILE` parameter (a `$readmemh` image) stands in for
that step. A write-only second port (`ld_we/ld_addr/ld_data`) is also
provided, so user logic or a testbench can fill the RAM. The write port is
read-first: reading an address in the same clock it is written returns the
old byte.

With all 12 block RAMs of the reference device, four slots fit. For that, use
`NUM_BRAMS=12, NUM_SLOTS=4, ADDR_W=15`. The default build uses six RAMs and
two slots. `tb_pcap_system_4slot` runs the four-slot build.

## Parameters (top level `pcap_system`)

| parameter         | default | meaning                                         |
|-------------------|---------|-------------------------------------------------|
| `NUM_BRAMS`       | 6       | block RAMs for bitstream storage                |
| `BRAM_BYTES`      | 2048    | bytes per block RAM (data bits only)            |
| `ADDR_W`          | 14      | address width; must cover `NUM_BRAMS*BRAM_BYTES` |
| `NUM_SLOTS`       | 2       | number of stored bitstreams                     |
| `SLOT_BYTES`      | 6144    | spacing of slots (3 block RAMs)                 |
| `BITSTREAM_BYTES` | 5120    | length of every stored bitstream                |
| `NULL_CYCLES`     | 8       | NOOP clocks after the last byte                 |
| `CNT_WIDTH`       | 4       | width of the example counter                    |
| `INIT_FILE`       | ""      | optional memory image                           |

`pcap_ctrl` also has `SETUP_CYCLES` and `HOLD_CYCLES`, both 1. These are the
gaps around CSI_B. Elaboration-time `$error`s reject inconsistent sizes.

## Files

- `rtl/pcap_pkg.sv`: state type, NOOP constant and NOOP byte function.
- `rtl/pcap_ctrl.sv`: the PCAP core (sequence FSM, address counter, SelectMAP outputs).
- `rtl/bitstream_bram.sv`: the partial bitstream store.
- `rtl/updown_counter.sv`: the example counter.
- `rtl/pcap_system.sv`: top level.
- `tb/selectmap_model.sv`: behavioural model of the SelectMAP slave port. It
  records the written bytes and counts protocol errors.
- `tb/tb_*.sv`: self-checking testbenches, one per module. Each prints
  `TB_RESULT checks=N failures=M`.

## What is outside the RTL, and what is this design's own

Outside the RTL:

- **Both DCMs.** These are device clock primitives. `clk` is assumed to be
  CLK0 of the PCAP's DCM. `cnt_clk` is assumed to be the output of the DCM
  being reconfigured.
- **The SelectMAP port and configuration logic.** These are fixed silicon. The
  testbench has a behavioural model of the write side.
- **The board loop-back wiring** and the mode-pin straps.
- **The bitstream-to-memory-file converter.** This is a software tool.

Choices made here, not fixed by the reference system:

- The `start`/`slot`/`busy`/`done` request interface.
- Uniform slot length and placement.
- The NOOP value and bit order, both taken from the device family's
  configuration format.
- Synchronous active-high resets.
- The block RAM write port and its read-first behaviour.
- The counter's direction input, wrap-around and reset.

## Verification

Each testbench compares against values it computes itself and includes a
watchdog.

- `tb_pcap_ctrl` uses reduced sizes: 3 slots of 70 bytes, with 61-byte
  bitstreams. It checks:
  - every byte, then the NOOP tail;
  - that the bytes go out on consecutive clocks;
  - the exact setup and hold clocks;
  - `busy` and `done`;
  - the exact latency;
  - that a start during a sequence is ignored.
- `tb_bitstream_bram` runs at full size. It fills the RAM, reads every byte
  back, then runs random reads and writes, including same-address collisions.
- `tb_updown_counter` checks wrap-around both ways and random direction and
  reset.
- `tb_pcap_system` runs the whole system **at the default parameters**:
  1. It loads two 5120-byte images.
  2. It switches the counter clock to 5 MHz and back to 50 MHz.
  3. It checks every byte received by the port model, the 50 MB/s rate (5120
     bytes in 5120 consecutive clocks), the ≈0.1 ms duration and the counter
     rate before and after each switch. It also checks that the count
     survives each switch.

  The images here are a test format of their own: a sync word, then a
  divider byte the testbench's DCM stand-in applies, then filler. They are not
  real Spartan-3 frames. The test counts each mechanism (both slots, both
  frequency switches, an ignored start, NOOPs, counting up and down) and fails
  if any never happens.
- `tb_pcap_system_4slot` runs the system with twelve block RAMs and four
  slots. It sends each of the four 5120-byte images and checks every byte,
  the consecutive-clock rate and the latency.

What this does not show: timing on real silicon, and whether a real partial
bitstream reconfigures a real DCM without disturbing the rest of the device.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_pcap_system -y rtl -y tb rtl/pcap_pkg.sv tb/tb_pcap_system.sv
./obj_dir/Vtb_pcap_system
```

Replace `tb_pcap_system` with another testbench name to run that one. The
full-size system test simulates about 0.4 ms and finishes in well under a
second. Verilator warns about the ascending `[0:7]` range of the SelectMAP
data bus. The range is intentional.
