# A 2x2 buffered switching element for a self-routing ATM switch fabric

A delta network switches fixed-size packets with no central control. It is
built from stages of small 2x2 switching elements. Each element reads one bit
of a routing tag carried in the packet header and sends the packet to its
upper output (bit 0) or lower output (bit 1). Then it rotates the tag, so the
next stage again finds its bit in the same place.

This repository holds synthesizable SystemVerilog for one such element. It is
meant for a Broadband ISDN switch that carries ATM cells at the SONET STS-3c
rate (155.52 Mbit/s per port). The key points:

- **Buffers inside the switch.** Between the two input multiplexers and the
  two output multiplexers are four FIFOs, one per (input, output) pair. Each
  FIFO has four packet slots. A packet waiting for a busy output does not
  block a packet behind it that is going to the other output.
- **Byte-wide, parity-protected links.** Each link is 9 bits wide (a byte
  plus odd parity) and uses a two-wire REQ/ACK handshake between neighbouring
  elements.
- **Virtual cut-through.** An incoming packet can start leaving as soon as
  its first byte is stored. The first header byte then leaves **three clock
  cycles** after it was put on the input link. Cut-through can be switched
  off with a pin; every packet is then stored completely before it is sent.
- **Fault detection everywhere.** Every state machine flags inputs that make
  no sense in its state. Header parity errors cause the packet to be dropped,
  so it is not misrouted. Data parity errors are corrected and counted. All
  faults are collected in a sticky error register with a single error pin.

The design is fully synchronous, with one clock of at least about 25 MHz. A
single clock drives everything, and neighbouring state machines use opposite
edges of it. Most of the timing in this design follows from that rule.

## Packets and the routing tag

A packet is 57 bytes. It has a 2-byte routing header, the 53-byte ATM cell
and 2 CRC bytes (null bytes if no CRC is used). The whole header is treated
as a 16-bit tag. The first header byte (H1) holds tag bits 7..0 and the
second (H2) holds bits 15..8.

Each element works as follows:

- Bit 0 of the tag picks the output.
- The tag is rotated right by one bit.
- The number of the input port the packet arrived on is written into bit 15.

So every stage uses bit 0, and no element needs to know its position in the
network. After *n* stages, the top *n* bits of the header record the path
the packet took. The bits that were not used for routing move down to the
low end, where the destination can read them. A 16-bit header is enough for
a 16-stage network. For example, a 4096 x 4096 fabric with two extra
fault-tolerance stages needs 14 stages.

The rotation happens in the input datapath (`ips_datapath`), which has two
register stages:

- **Stage 1** loads each arriving header byte shifted right by one bit, with
  the port number in bit 7.
- **Stage 2** loads stage 1 with its bit 7 replaced by bit 0 of the byte
  arriving in the same cycle.

After both header bytes have passed, the memory has received
`{port, tag[15:1]}`, split across the two bytes as it was before. Each
shifted byte has its parity adjusted rather than regenerated. The parity bit
is flipped when the bit shifted out differs from the bit shifted in. A header
parity error is therefore still visible downstream. Data bytes pass straight
through with freshly generated parity, which corrects them. The error is
counted at the port.

## One clock, two edges

The design calls the rising edge φlh and the falling edge φhl.

| rising edge (φlh)                          | falling edge (φhl)                     |
|--------------------------------------------|----------------------------------------|
| input port controller, input datapath      | FIFO controllers, memory writes        |
| write and read address counters            | output port controller, output latch   |
| arbiters                                   | link data and REQ out                  |
| ACK out, link data sampled                 |                                        |
| error register, counter self-test          |                                        |

A state machine on one edge sees the outputs of the machines on the other
edge half a cycle after they change. Handshakes such as START/DONE between an
arbiter and its output controller therefore complete within one clock cycle,
with no extra synchronising stage. The cost is that every path between the
two groups has only half a clock period.

## The element-to-element link

Each link carries `data[8:0]` and `REQ` forward, and `ACK` backward.

```
           falling    rising     falling    rising     falling
clk    ___/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾‾\_____/‾‾‾‾
data   ==X  H1                   X  H2      X  byte 2   X ...
REQ    __/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
ACK    ______________________/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾
```

The link works like this:

- The transmitter puts H1 on the bus and raises REQ on a falling edge. It
  holds H1 until it sees ACK.
- The receiver raises ACK on a rising edge when it can take the packet. If
  it cannot, it leaves ACK low and the transmitter waits.
- After ACK, the transmitter sends one byte on every falling edge. It lowers
  REQ together with the last byte.
- The receiver lowers ACK on the next rising edge. The transmitter checks
  that ACK has fallen before it starts another packet.

There is no length field. The end of a packet is marked only by REQ falling.
The byte counters check that exactly 57 bytes went by.

## Input port server

`input_port_server` holds three parts:

- the controller (`input_port_controller`);
- the two-stage datapath (`ips_datapath`);
- a 6-bit write address counter (`write_address_counter`).

The counter is cleared while no write enable is active and counts one per
cycle during a write. Its LAST output is true at count 55, one address
before the last byte of a 57-byte packet.

The controller is a Mealy machine with latched outputs:

- **IDLE.** When REQ comes, the controller checks the first header byte. On a
  parity error it acknowledges the packet but stores nothing (**DROP**, PERR
  pulse). If the FIFO chosen by the tag bit is full, it waits without
  acknowledging, which stalls the predecessor. Otherwise it acknowledges and
  goes to **BYTEx**, where x is the tag bit.
- **BYTEx.** The second header byte arrives here. A parity error sends the
  packet to DROP. Otherwise the controller raises the write enable WEx and
  goes to **KEEPx**.
- **KEEPx.** The packet is stored. Data parity errors give PERR pulses. If
  LAST comes while REQ is still high, the packet is too long for a slot:
  **ERROR**, ERR pulse, and then the controller waits for REQ to fall. When
  REQ falls, ACK is dropped and the machine goes to **LASTx**.
- **LASTx.** The last byte is written. LAST must be true here; if not, the
  packet was too short (ERR).

SHIFT (rotate the header) is the only unlatched output. It is true in IDLE
and BYTEx. Because the outputs are registered, WEx stays on for the cycle
after LASTx. That is the cycle in which the last byte leaves stage 2 for the
memory.

## Buffer memory and FIFOs

`buffer_memory` holds four `fifo_memory` instances. FIFO `2*o + i` holds
packets from input `i` to output `o`:

- input port `i` writes FIFO `i` (tag 0) or FIFO `2 + i` (tag 1);
- output port `o` reads FIFOs `2o` and `2o + 1`.

Each FIFO is a `fifo_controller` plus a 256 x 9 `dual_port_memory`. The
memory address is `{slot pointer, byte address}`: 2 bits select one of four
slots and 6 bits select the byte within the slot (64 bytes per slot, 57
used). Writes happen on the falling edge. The read port is combinational;
the output latch samples it on the falling edge.

The controller has two small state machines, both on the falling edge.
**Write side:** when WE rises on a FIFO that is not full, the machine:

- computes the next rear pointer;
- raises BF (buffer full) if the next rear pointer equals the front pointer;
- with cut-through on, clears BE (buffer empty) at once, so the output side
  may start reading the slot while it is still being written.

When WE falls, the rear pointer moves and BE is cleared if it was not
already.

**Read side:** when RE falls, the front pointer moves, BF is cleared, and BE
is set if the next front pointer equals the rear pointer.

The full and empty flags are set/reset flip-flops. If a set and a reset
arrive together, the reset wins. A write to a full FIFO (RERR) or a read from
an empty one (FERR) is reported and changes nothing. The machine then waits
until the enable falls. A FIFO offers a packet to its output (PR) whenever
BE is false.

Cut-through is safe without further checks. The writer stores byte k on
a falling edge, and the reader latches byte 0 one falling edge after byte 0
was stored. After that the reader moves at most one byte per cycle, while
the writer moves exactly one byte per cycle. The transmitter upstream sends
without gaps once it has started. So the reader can never reach a byte that
has not been written.

## Output port server

`output_port_server` holds four parts:

- an `arbiter` (rising edge);
- an `output_port_controller` (falling edge);
- a `read_address_counter` (rising edge; LAST at count 56);
- the output latch.

**Arbiter.** The arbiter is a Moore machine, and its idle state records
which FIFO has priority. In IDLEx it grants FIFO x if that FIFO has a packet,
and otherwise FIFO y. It then raises START and the FIFO's read enable in
GOPx. It waits in Px until the controller reports DONE, and then goes to
IDLEy, so the two FIFOs take turns when both are loaded. DONE is checked in
every state: DONE must be high when the arbiter is idle and must fall in
answer to START. A violation leads to ERROR.

**Output controller.** The controller is a Moore machine with these states:

- **IDLE** shows DONE.
- **START** moves it to **BYTE0**. There it raises REQ and HOLD, lets the
  read counter run (CNT), and lowers DONE. The latch captures H1 on this
  edge.
- Without ACK, it goes to **WAIT**: the counter stops and the latch holds
  H1.
- With ACK, it goes to **XFR**, and one byte leaves per falling edge.
- When the counter reaches the last address, it goes to **LAST**, where REQ
  falls and DONE rises.

START must stay high and ACK must not fall early; otherwise the controller
goes to ERROR.

**Output latch.** The latch loads on every falling edge unless HOLD is true
and ACK is still false. The latch therefore presents H2 on the falling edge
right after ACK rises, as the link protocol requires.

The read counter is cleared by DONE, so it restarts at zero for every packet.
When a successor acknowledges at once, a busy output sends one 57-byte
packet every **58 cycles**. The extra cycle is the LAST/IDLE step in which
DONE is returned and the next packet is granted.

## Latency through the element

The path of a packet with cut-through on and a free output. Cycle 0 is the
falling edge on which the predecessor puts H1 on the link:

| edge       | what happens                                                               |
|------------|-----------------------------------------------------------------------------|
| rising 0   | input controller sees REQ, good parity, FIFO not full: ACK, stage 1 takes H1 |
| falling 1  | predecessor sees ACK and puts H2 on the link                                 |
| rising 1   | input controller raises WE; stage 2 now holds the rotated H1                 |
| falling 2  | FIFO sees WE: stores byte 0, clears BE (cut-through), so PR rises            |
| rising 2   | arbiter sees PR: START and RE                                               |
| falling 3  | output controller sees START: H1 latched onto the output link, REQ high     |

The first header byte therefore reaches the next link 3 cycles after it
reached this element's input. With cut-through off, PR waits until WE falls
after the last byte. The latency is then 60 cycles (57 + 3). The end-to-end
testbench measures both figures.

## Fault detection and test

`error_register` samples every fault signal on the rising edge into a sticky
14-bit register. `error` is the OR of all its bits. Only reset or `err_clr`
clears the register. The bit order is:

| bits   | source                                                          |
|--------|-----------------------------------------------------------------|
| 1:0    | input port 0/1: packet too long or too short, REQ fell too early |
| 5:2    | FIFO 0..3 overflow: write to a full FIFO                         |
| 9:6    | FIFO 0..3 underflow: read from an empty FIFO                     |
| 11:10  | arbiter 0/1 fault                                               |
| 13:12  | output controller 0/1 fault                                     |

A large count in `perr_count[i]` points to a bad link from the predecessor
on port i. Each count is an 8-bit saturating number of parity errors
(header and data) seen on that port.

`cnt_test` runs a self-test of the four identical 6-bit byte counters. All
four are released from zero together and count every cycle, and
`counter_self_test` compares them. Any disagreement sets `cnt_err`, which
stays set until test mode ends. 64 cycles cover the whole counting range.
While `cnt_test` is high, LAST is hidden from the controllers so that the
test does not trip their checks. Use this mode only while no traffic is
offered.

`mem_test` gives the test pins direct access to the four buffer memories.
While it is high:

- `mem_addr` drives both the write address and the read address of all four
  memories, and `mem_wdata` drives their write data.
- `mem_we` writes the memory selected by `mem_sel` (the FIFO number) on the
  falling edge.
- `mem_rdata` shows the word at `mem_addr` in the selected memory.
- The FIFO controllers see neither write nor read enables, so no pointer or
  flag moves.

Any memory test pattern can therefore be applied from outside. Like the
counter test, this mode is meant for an idle element. It overwrites the
stored packets, but not the FIFO bookkeeping.

## Top-level interface (`switching_element`)

| port                     | dir | width  | meaning                                            |
|--------------------------|-----|--------|----------------------------------------------------|
| `clk`                    | in  | 1      | the single clock, both edges used                  |
| `rst`                    | in  | 1      | synchronous reset, active high                     |
| `vct`                    | in  | 1      | virtual cut-through enable                         |
| `err_clr`                | in  | 1      | clear the error register and parity counters       |
| `cnt_test`               | in  | 1      | counter self-test mode                             |
| `in_data[1:0]`           | in  | 2 x 9  | input links: `{parity, byte}`                      |
| `in_req` / `in_ack`      | in / out | 2 | input handshakes                                |
| `out_data[1:0]`          | out | 2 x 9  | output links                                       |
| `out_req` / `out_ack`    | out / in | 2 | output handshakes                               |
| `error`                  | out | 1      | any bit of the error register set                  |
| `cnt_err`                | out | 1      | counter self-test mismatch                         |
| `err_hold`               | out | 14     | error register (see above)                         |
| `perr_count[1:0]`        | out | 2 x 8  | parity error counts per input port                 |
| `mem_test`               | in  | 1      | memory test mode                                   |
| `mem_sel`                | in  | 2      | memory (FIFO number) for test write/read           |
| `mem_we`                 | in  | 1      | write the selected memory                          |
| `mem_addr`               | in  | 8      | test address, both memory ports                    |
| `mem_wdata` / `mem_rdata`| in / out | 9 | test write data / read data of the selected memory |

There are two parameters:

- `PKT_BYTES_P` (default 57) sets the packet length. It must fit a 64-byte
  slot.
- `PERR_W` (default 8) sets the width of the parity counters.

The slot count (4) and the word width (9) are constants in `se_pkg`.

## How far it follows the original description, and where it departs

**Taken from the description:**

- the architecture;
- the packet format and tag rotation;
- the link protocol and its edges;
- the state names and transitions of every controller;
- the FIFO pointer algorithms, including "reset wins";
- the counter LAST values;
- the memory size;
- the fault-detection rules;
- the error register;
- the counter self-test;
- test-mode pin access to the buffer memories.

**Choices made here, where the description says nothing:**

- Reset is synchronous and active high. Each machine samples it on its own
  edge.
- Bit ordering of the header: H1 holds tag bits 7..0.
- The parity-adjust formula for shifted header bytes.
- WE is held for one cycle after LASTx.
- REQ falling during BYTEx is treated as a fault.
- A write to a full FIFO or a read from an empty one waits without moving a
  pointer.
- The output controller shows DONE in its ERROR state, so that the arbiter
  can recover.
- The output latch loads when HOLD is false or ACK is true.
- The error register layout and the parity counter width.
- The counter test's handling of LAST.
- The memory test pin set, and masking of the FIFO controllers during the
  memory test.
- The memory is written as a register array, not as a full-custom macro.

**Link rate.** The target of 80 % load at a 25.08 MHz clock assumes a link
moves a byte on every clock. The handshake described spends one more cycle
per packet (58 cycles per 57-byte packet). At 25.08 MHz a link therefore
carries 24.65 MB/s. An STS-3c input needs 20.064 MB/s, so the load is
81.4 % rather than 80 %. A 25.52 MHz clock restores the 80 % figure.

**Not included:**

- The scan paths.
- The IEEE 1149.1 test access port. The test inputs `err_clr`, `cnt_test`
  and the `mem_*` pins are plain pins here, not shared with normal-mode pins.
- A built-in self-test of the buffer memory. Memory tests run from outside
  through the test pins instead.
- The ratioed output drivers that make shorted link wires read as single-bit
  errors.
- The trunk controllers and the fault-tolerant network around the element.
  The testbenches model them.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench                     | what it shows                                                                 |
|-------------------------------|-------------------------------------------------------------------------------|
| `tb_switching_element`        | The whole element at default size. Checks: 3-cycle cut-through and 60-cycle store-and-forward latency; header parity drops and data parity correction; a full FIFO stalling its link; rotating priority between two loaded FIFOs; 58-cycle packet period; random traffic with random back-pressure in both modes; long and short packets in the error register; the counter self-test; the memory test mode over all 1024 words. Every mechanism is counted and must occur. |
| `tb_delta_network_8x8`        | Twelve elements wired as an 8x8 omega network, random traffic at offered loads 0.8 and 1.0, cut-through on and off. Checks: delivery, order, payload and path bits; throughput and delay reported. |
| `tb_input_port_server`, `tb_input_port_controller`, `tb_ips_datapath`, `tb_write_address_counter` | Input side: handshake, routing, drop, stall, length errors, tag rotation and parity, against a reference model. |
| `tb_buffer_memory`, `tb_fifo_memory`, `tb_fifo_controller`, `tb_dual_port_memory` | FIFO routing, pointers, full/empty, cut-through vs store-and-forward, overflow/underflow. |
| `tb_output_port_server`, `tb_arbiter`, `tb_output_port_controller`, `tb_read_address_counter` | Output side: arbitration order, DONE/START faults, HOLD/WAIT, REQ timing, whole packets. |
| `tb_error_register`, `tb_counter_self_test`, `tb_memory_test_port` | Sticky bits, clearing, saturating counts; counter mismatch detection; test-port write decode and read selection. |

In the network test, at offered load 0.8 the network carries about 0.79
packets per stage cycle per output. A stage cycle is 58 clocks. Mean delay
from source queue to output is about 3–5 stage cycles with cut-through and
6–7 without. At offered load 1.0 it carries about 0.85, and cut-through
gains little there, because packets mostly wait in queues.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/se_pkg.sv tb/tb_switching_element.sv --top-module tb_switching_element
./obj_dir/Vtb_switching_element
```

The testbenches reset or initialise everything they read. They also pass
with random initial register values (`+verilator+rand+reset+2`).

## Files

- `rtl/se_pkg.sv`: word type, constants, parity helpers.
- `rtl/switching_element.sv`: the top level.
- `rtl/input_port_server.sv`, `rtl/input_port_controller.sv`,
  `rtl/ips_datapath.sv`, `rtl/write_address_counter.sv`: the input side.
- `rtl/buffer_memory.sv`, `rtl/fifo_memory.sv`, `rtl/fifo_controller.sv`,
  `rtl/dual_port_memory.sv`, `rtl/memory_test_port.sv`: the buffers and
  their test access.
- `rtl/output_port_server.sv`, `rtl/arbiter.sv`,
  `rtl/output_port_controller.sv`, `rtl/read_address_counter.sv`: the output
  side.
- `rtl/error_register.sv`, `rtl/counter_self_test.sv`: fault logging and
  self-test.
- `tb/`: one testbench per module, plus the network test.
