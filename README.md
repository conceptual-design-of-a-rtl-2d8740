# Arithmetic Sequence Generator (ASG)

A hardware generator for unsigned arithmetic sequences

    a(i) = a1 + (i - 1) * d,    i = 1 .. n

Each term depends only on its index i and the two constants a1 and d, so all
terms can be computed at once. The generator has M identical *arithmetic units*
(lanes), and each lane is a pipeline that finishes one term per clock. A
single *control unit* hands the lanes a new block of M indices on every clock,
so the design produces M terms per cycle for as long as the sequence lasts.

The RTL follows a published conceptual design and its FPGA prototype. Both
builds are included and can be used separately:

* **Ethernet build** (`eth_*` ports of `asg_top`). It has five lanes. Five
  64-bit terms fill the 320-bit client bus of a 100 Gb/s Ethernet MAC, and at
  312.5 MHz they saturate the link, so nothing needs to be buffered. The MAC
  itself is vendor IP and is not included.
* **UART prototype** (`proto_*` ports). It has twenty lanes at 100 MHz. A 1 Kb
  buffer sits behind each lane. Once the sequence is complete, the terms are
  sent to the host over a 115200 bps UART.

Operands a1, d and the length n are 32-bit. Terms are 64-bit. Only unsigned
integers are supported.

## How indices reach the lanes

Lane number N (1..M) is a constant inside its lane; it is a parameter, not an
input. The control unit broadcasts one number to all lanes, the *group
offset*, which takes the values 0, M, 2M, ... on successive clocks. Each lane
forms its own index:

    i = N + groupOffset

Group k (offset kM) therefore covers terms kM+1 .. kM+M. Lane 1 always holds
the lowest index of its group. If n is not a multiple of M, the last group is
only partly inside the sequence. Each lane compares its i with n and drops its
valid bit when i > n, so `lane_valid` / `eth_lane_valid_o` shows which lanes
of the last word carry terms.

## The lane pipeline

One lane (`arithmetic_unit`) has six register stages:

| edge after groupOffset is issued | block | what is registered |
|---|---|---|
| 1 | offset block | groupOffset, valid, n |
| 2 | offset block | i = N + groupOffset, valid (masked by i <= n) |
| 3 | between blocks | i, valid, a1, d |
| 4 | sequence block | i - 1, a1, d |
| 5 | sequence block | (i - 1) * d (64 bits), a1 |
| 6 | sequence block | a1 + (i - 1) * d, valid |

A group offset issued on one clock edge leaves all lanes as a complete group
six edges later. A new group enters on every edge. a1 and d pass through only
one register on their way to the sequence block, so they must stay constant
while a sequence is being generated.

The widths are those of the original block diagrams: a 32-bit subtractor, a
32 x 32 -> 64-bit multiplier (one cycle; an FPGA DSP multiplier is intended)
and a 64-bit adder.

## Control unit: start, count, done

`control_unit` does the following:

* A **rising edge** of `activate` starts a run. The 32-bit counter goes to 0,
  `done` falls and n is latched.
* On each following clock the counter steps by M. This counter is the group
  offset.
* `valid` is high while `activate` is high, `done` is low and the offset is
  below n.
* Once the counter **exceeds n + 6M**, `done` rises on the next edge and the
  counter returns to 0. The 6M margin is the six pipeline stages expressed in
  counter steps, so `done` always comes after the last term has left the lanes.
* `done` stays high until the next start.
* If `activate` falls before `done`, the run is aborted. The counter stops and
  `done` stays low.

Counting the starting edge as edge 0:

* the first group appears on edge 6;
* group k appears on edge 6 + k;
* `done` is high after edge floor((n + 6M) / M) + 2.

For example, n = 4 with M = 2 gives 0, 2 on edge 6 and 4, 6 on edge 7, and
`done` after edge 10. With M = 20 and n = 10^6 a run takes 50,008 clocks, or
500 us at 100 MHz.

The counter and the threshold comparison are wide enough for any 32-bit n.
However, n must stay below 2^32 - 7M, or the 32-bit counter wraps before it
passes the threshold.

The control unit also keeps the buffer address used by the prototype. It is 0
at start and rises by one per group. This address travels down a six-stage
delay line in `asg_core` beside the lanes, so it arrives together with the
group it belongs to.

## Overflow

Each lane has a sticky overflow flag. The flag is set when a valid term
overflows. That can happen in three ways:

* the subtractor borrows (i = 0);
* the product does not fit in the term width;
* the adder carries out.

The flag is set on the edge after such a term leaves the lane. It stays set
until reset or until the next start. `asg_core` ORs the flags of all lanes.

With the default widths no valid term can overflow:

* i >= 1 always, because the offset block drops indices that wrap.
* (2^32 - 1)^2 + 2^32 - 1 < 2^64.

The logic is still there and works. To see it act, build with a narrower
`ELEM_W` (the top-level test uses 40 bits).

## Prototype: buffers and UART readout

In `asg_proto`, lane u writes its term into its own `output_buffer` at the
group's address. All twenty buffers are written in the same cycle.

Each buffer is 1 Kb, which is 16 words of 64 bits, so the buffers together
hold **320 terms**. A longer sequence is still computed in full, and `done` is
still correct. However, writes past address 15 are dropped, so only terms 1..320
are kept.

When `done` rises, `uart_readout` walks through the buffers in sequence order.
Term k (0-based) is in buffer k mod 20 at address k div 20. For each term it
does the following:

1. It presents the address and buffer number.
2. It waits one cycle for the registered read.
3. It passes the eight bytes of the term to `uart_tx`, least significant
   byte first.

Each byte goes out as an 8N1 frame: a start bit, eight data bits (LSB first)
and a stop bit. At 868 clocks per bit (100 MHz / 115200), one term takes about
69,000 clocks.

## Ethernet build

`eth_data_o` is the five lanes side by side, with lane 1 in bits 63:0. It is
qualified by `eth_valid_o` and `eth_lane_valid_o`. It is meant to feed the
MAC's transmit client bus directly. a1, d, n and `activate` are expected from
the MAC's receive side.

Packet framing, flow control and the host protocol are outside this RTL. The
design has no back-pressure input: if the MAC stalls, terms are lost.

## Top-level ports (`asg_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `eth_clk`, `eth_rst_n` | in | 1 | Ethernet build clock (312.5 MHz intended), async active-low reset |
| `eth_activate_i` | in | 1 | rising edge starts a sequence; low aborts |
| `eth_a1_i`, `eth_d_i`, `eth_n_i` | in | 32 | first term, difference, length |
| `eth_data_o` | out | 320 | five terms, lane 1 in bits 63:0 |
| `eth_lane_valid_o` | out | 5 | lanes carrying terms |
| `eth_valid_o` | out | 1 | any lane valid |
| `eth_done_o`, `eth_busy_o`, `eth_overflow_o` | out | 1 | done, running, sticky overflow |
| `proto_clk`, `proto_rst_n` | in | 1 | prototype clock (100 MHz), reset |
| `proto_activate_i`, `proto_a1_i`, `proto_d_i`, `proto_n_i` | in | 1/32 | as above |
| `proto_done_o`, `proto_busy_o`, `proto_overflow_o` | out | 1 | as above |
| `proto_readout_busy_o` | out | 1 | UART still sending |
| `proto_uart_txd_o` | out | 1 | UART line, idles high |

The top-level parameters are the following:

* `M_ETH` = 5
* `M_PROTO` = 20
* `ELEM_W` = 64
* `PROTO_BUF_DEPTH` = 16
* `PROTO_CLKS_PER_BIT` = 868

The operand widths are set in `rtl/asg_pkg.sv`.

## Files

RTL (`rtl/`), bottom-up:

* `asg_pkg.sv`: shared widths and constants.
* `offset_block.sv`: i = N + groupOffset, with the last-group mask.
* `sequence_block.sv`: the subtract / multiply / add pipeline and the overflow
  flag.
* `arithmetic_unit.sv`: offset block, inter-block registers and sequence block.
* `control_unit.sv`: start, group-offset counter, done, valid and buffer
  address.
* `asg_core.sv`: the control unit and M lanes, plus the address delay line.
* `output_buffer.sv`: 16 x 64 memory with a registered read.
* `uart_tx.sv`: 8N1 transmitter.
* `uart_readout.sv`: drains the buffers into the UART after done.
* `asg_proto.sv`: the 20-lane UART build.
* `asg_top.sv`: both builds side by side.

Testbenches (`tb/`):

* Each block has its own self-checking testbench, `tb_<block>.sv`.
* `uart_rx_model.sv` is a host-side UART receiver used by the system tests.
* `tb_asg_top.sv` runs both builds end to end with 40-bit terms and a 4-clock
  bit time. This lets it provoke overflow and run past the buffer limit
  quickly.
* `tb_asg_top_full.sv` runs the top with every parameter at its default. On
  the Ethernet side it uses a1 = 255, d = 10 with n = 10, 1000 and 100003,
  plus an abort. On the prototype side it uses n = 10 and 100 through the real
  115200 bps UART. It takes about 20 s.
* `tb_asg_workloads.sv` runs the 20-lane prototype with a1 = 255, d = 10 for
  n = 10, 100, ..., 10^8. It checks every term leaving the lanes and the clock
  count to `done`, and it checks the terms returned over the UART (with a
  4-clock bit time). It takes about 5 s.

Every testbench compares against values computed in the testbench itself. Each
one ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -y rtl -y tb rtl/asg_pkg.sv \
        tb/tb_asg_top.sv --top-module tb_asg_top -Mdir obj_top
    ./obj_top/Vtb_asg_top

Replace `tb_asg_top` with any other testbench name. To lint a module, run:

    verilator --lint-only -Wall -y rtl rtl/asg_pkg.sv rtl/asg_top.sv

The lint leaves warnings, which are expected:

* unused package constants;
* the `valid_o` output of the core, which is left open in the prototype;
* the reset used both asynchronously and in the `disable iff` of the two
  protocol assertions (in `control_unit` and `uart_readout`).

## What is this design's own

The following follow the published description:

* the lane structure and its register stages;
* the widths;
* the group-offset scheme;
* the n + 6M done rule;
* the five-lane 320-bit Ethernet arrangement;
* the prototype's 20 lanes, 1 Kb buffers and 115200 bps little-endian UART
  output.

The following are choices made here, where the description is silent or
loose:

* **Start on the rising edge** of `activate`. Aborting when `activate` falls
  before `done`.
* **Valid also requires offset < n**, and the per-lane i <= n mask. Without
  them, the drain cycles before `done`, and the unused lanes of a short last
  group, would emit terms beyond the n-th.
* **A 32-bit group offset.** One diagram shows 16 bits at the offset block's
  input. That could not index the sequence lengths the design was evaluated
  with (up to 10^8), so the 32 bits of the control unit's counter are used
  throughout.
* **The sequence block has three register stages.** One passage speaks of four
  stages. Three stages, as drawn, add up to the six stages that the done rule
  relies on.
* **Overflow tracking and clearing.** Overflow is tracked per term and cleared
  at the next start as well as at reset.
* **Buffer behaviour.** The buffer read is registered. Writes past the buffer
  are dropped, and the readout covers only the first 320 terms, in sequence
  order.
* **UART handshake and framing.** The byte handshake is valid/ready and frames
  are 8N1.
* **The Ethernet bus lane order** (lane 1 lowest) and the absence of any
  packet framing.
* **Reset** is asynchronous and active-low.

The following are not included:

* the Ethernet MAC;
* the host (CPU, DMA controller, RAM and its API);
* the clocking (PLL);
* the board's USB-UART bridge.

Run time is exact in the RTL: floor((n + 6M) / M) + 2 clocks from the
starting edge to `done`, e.g. 50,008 clocks (500 us at 100 MHz) for 10^6
terms on the 20-lane prototype, plus about 69,000 clocks per term for the UART
readout of up to 320 buffered terms.
