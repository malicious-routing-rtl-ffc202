# Routing Trojan with a configuration-time switch

A hardware Trojan in an FPGA design usually has to survive several checks: simulation of the
RTL and the netlist, and, more recently, verification of the bitstream itself. This design
shows a Trojan that passes all of them because, until the moment the device is configured, it is
simply not connected.

The Trojan is a small payload: a bank of 2:1 multiplexers, the *barrier gates*, placed in front
of the primary outputs. Their select line can reach the outside world through exactly one
programmable interconnect point (PIP) of the FPGA routing, the *Trojan PIP* (TPIP). A
compromised place-and-route tool adds the barrier gates to the netlist, routes their select line
through the TPIP, and then writes the TPIP's configuration bit as 0. The bitstream that leaves
the design house therefore describes a circuit whose select line is cut. It is functionally equal
to the original design, and any equivalence check on the bitstream finds nothing. A compromised
programming tool, run at the customer's site, flips that one bit back to 1 while it loads the
device. From then on, driving a spare input pin high makes the outputs carry a secret instead of
the normal result. There is no trigger logic to find, and the payload is a handful of cells.

This RTL models the parts of that circuit that exist inside the configured device: the barrier
gates, the TPIP with its configuration cell, and the two infected designs in which the attack
was demonstrated. The tools that insert the Trojan and flip the bit are software and are not
part of it.

## The Trojan PIP and its configuration cell (`tpip`)

The TPIP is where the trick happens, so it is modelled as two parts: a configuration memory cell
and the routing switch the cell controls.

* **The cell** is written through a bit-addressed configuration port (`cfg_we_i`,
  `cfg_addr_i`, `cfg_data_i`). It is updated on the rising edge of `clk` when the strobe is high
  and the address equals the parameter `BIT_ADDR`. Writes to any other address leave it
  unchanged. The active-low asynchronous `rst_n` clears it, which stands for an unconfigured
  device.
* **The switch** connects `src_i` to `sink_o` while the cell holds 1. While the cell holds 0
  the sink net is disconnected. The model reads a disconnected net as 0, the level at which the
  barrier gates pass the original output. `sink_o = cell & src_i`.

The whole attack is the life of that cell:

| stage                                  | TPIP cell | pin low      | pin high        |
|----------------------------------------|-----------|--------------|-----------------|
| device unconfigured (reset)            | 0         | original     | original        |
| loaded with the bitstream as shipped   | 0         | original     | original        |
| loaded by the compromised programmer   | 1         | original     | **secret**      |
| reloaded with a clean bitstream        | 0         | original     | original        |

With the enable tied to a constant 1 instead of a pin (see `ENABLE_SRC` below), the last
column applies as soon as the cell is 1.

The default `BIT_ADDR` is 0x4743. That is the bitstream bit that held the TPIP in the published
AES example, in the I/O tile at (10, 17) of an iCE40HX-1k. The configuration space is modelled
as a flat bit address, 18 bits wide (`trojan_pkg::CFG_ADDR_BITS`). That is enough for an HX1K
image of 32,220 bytes (257,760 bits). The real device loads frames and checks a CRC. Neither
is modelled: the port only places one bit into one cell.

## Barrier gates (`barrier_gates`)

`WIDTH` independent 2:1 multiplexers:

* input I0 (`orig_i`) is the original output, taken after the last register of the design;
* input I1 (`leak_i`) is the secret;
* select S (`sel_i`) chooses I1 when high.

The block is combinational and adds no cycle of latency. Its default width is 8, matching an
AES core with an 8-bit data interface.

## The two infected designs

### AES key leak (`aes_key_leak`)

This is the main case. The cipher-text byte `ct_i` from the AES core's output register goes to
I0 of the barrier gates. The key byte `key_i` given to the core goes to I1. The barrier-gate
select comes through a `tpip` from the enable source chosen by the `ENABLE_SRC` parameter
(`trojan_pkg::enable_src_e`):

* `EN_IO_PIN` (default): an otherwise unused input pin, `trig_pin_i`. The attacker needs
  physical access, but can switch between normal output and leaked key at will. This makes the
  Trojan hard to notice in the field.
* `EN_CONST_ONE`: a constant 1. The key replaces the cipher text from the moment the device is
  programmed.

The output `trojan_active_o` shows the select line. It is an observation port only.

The module has an immediate assertion that states the dormant rule: while the TPIP cell is 0,
`out_o` must equal `ct_i`.

### AND-gate demonstration (`and_gate_demo`)

This is a minimal infected design. The original circuit is `y = a & b`. One barrier gate
selects between that result (I0) and input `b` (I1), with its select routed from a spare pin
through a `tpip`. Once the TPIP is closed and the pin is high, the output shows `b` itself. Its
TPIP address was not published, so it defaults to the AES example's address.

### Top (`malicious_routing_top`)

The top holds both designs side by side. Each has its own configuration port, because each is
loaded from its own bitstream. They share only `clk` and `rst_n`. The top passes `WIDTH`,
`ENABLE_SRC`, `CFG_ADDR_W` and `TPIP_ADDR` down, and its defaults are those above. All data
paths are combinational: an output follows its inputs in the same cycle, and a configuration
write takes effect at the next rising clock edge.

## What is not in the RTL

* **The AES-128 core.** It is an existing design that is only used here. Its interface and
  timing were not given, so the top takes its cipher-text register and key byte as ports. The
  workload testbench has its own AES-128 reference model to drive them with real ciphertext.
* **The FPGA's I/O tiles and pads, and the rest of its routing.** Only the single PIP that
  matters is modelled. The spare pin is a plain input port.
* **The configuration engine** (bitstream framing and the CRC that the programming tool
  recomputes after flipping the bit).
* **The generic functional-Trojan example** (an original gate, a trigger gate, the TPIP and a
  payload gate on the output). The logic functions of its gates were never stated.
* **The place-and-route and programming tools** that insert the barrier gates and write and
  flip the TPIP bit. They are software. The testbenches play the programmer's part.

## Choices made here

These are this design's own choices, made where no detail was available:

* the flat, bit-addressed configuration port and its 18-bit width;
* a disconnected TPIP sink reads as 0;
* reset clears the TPIP cell;
* the AND demo's TPIP address;
* the `trojan_active_o` observation port;
* the AES case leaks the key byte present at the core's key input, not a round key.

## Files

| file                              | contents                                                    |
|-----------------------------------|-------------------------------------------------------------|
| `rtl/trojan_pkg.sv`               | address width, default TPIP address, `enable_src_e`         |
| `rtl/barrier_gates.sv`            | multiplexer bank                                            |
| `rtl/tpip.sv`                     | configuration cell and routing switch                       |
| `rtl/aes_key_leak.sv`             | AES key-leak Trojan                                         |
| `rtl/and_gate_demo.sv`            | AND-gate demonstration                                      |
| `rtl/malicious_routing_top.sv`    | both designs side by side                                   |
| `tb/<module>_tb.sv`               | one self-checking testbench per module                      |
| `tb/aes_key_leak_workload_tb.sv`  | AES-128 encryption streamed through the top, key recovery   |

## Simulating

Every testbench checks itself. At the end it prints `TB_RESULT checks=<n> failures=<n>` and
calls `$finish`. A watchdog ends a run that hangs and counts it as a failure. Example with
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/trojan_pkg.sv rtl/tpip.sv rtl/barrier_gates.sv rtl/aes_key_leak.sv \
  rtl/and_gate_demo.sv rtl/malicious_routing_top.sv \
  tb/malicious_routing_top_tb.sv --top-module malicious_routing_top_tb
./obj_dir/Vmalicious_routing_top_tb
```

For another bench, swap the last file and the top-module name. Lower-level benches need only the
package and the modules below them.

* `barrier_gates_tb`: an 8-bit bank with directed and random values, and a 1-bit bank
  exhaustively.
* `tpip_tb`: reset value, writes to neighbouring and random addresses, a write with the strobe
  low, one-edge write latency, reopening the switch, and asynchronous clear.
* `aes_key_leak_tb`: both enable sources, through reset, the bitstream as shipped, the flipped
  bit, deliberate pin switching, and a clean reload.
* `and_gate_demo_tb`: the full truth table in each configuration state.
* `malicious_routing_top_tb`: runs at default parameters. It shifts a full 257,760-bit image
  into each design, one bit per clock, first with the TPIP bit 0, then flipped, then clean
  again. It checks the outputs under random stimulus in each state and counts each mechanism
  (dormant with pin high, clean output with TPIP closed, key leak, `b` leak, pin switching,
  return to dormant). A mechanism that never happened is a failure. It runs in about a second.
* `aes_key_leak_workload_tb`: first checks its AES-128 reference against the FIPS-197 vectors.
  It then streams the Appendix B block and 20 random blocks through the top, byte by byte. It
  shows the ciphertext while the Trojan is dormant, and shows that every key can be read back
  from the eight outputs once the TPIP bit is set and the pin is high.

## Changing it

* To leak a different value, connect it to `leak_i` of `barrier_gates`. The Trojan needs
  nothing else.
* To move the Trojan to another routing point, set `TPIP_ADDR` (and `CFG_ADDR_W` for a larger
  device).
* To make the leak unconditional, set `ENABLE_SRC = EN_CONST_ONE`.
* To use another original design, put its last-register output on I0 and follow the AND-gate
  demo.

For defenders: nothing in the shipped bitstream shows this Trojan. Reading the configuration back
from the running device, and checking that readback against the design, does reveal the closed
TPIP.
