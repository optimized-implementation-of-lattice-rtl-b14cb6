# Lattice Boltzmann (D2Q9) on a matrix of FPGAs: overlapped halo exchange

This RTL computes a two-dimensional lattice Boltzmann fluid simulation (D2Q9
lattice, BGK collision) on a grid of FPGAs. It follows the DSlave organisation
of the ARUZ machine: each FPGA has a small square block of lattice sites and
talks only to its four axis neighbours over serial links. The main idea is to
hide communication behind computation:

* one FPGA holds a **5 x 5** block of sites but has only **16** collision units
  ("physical nodes");
* each unit owns one of the 16 **border** sites, and 9 of the units also own
  one of the 9 **interior** sites;
* in each time step the units collide the border sites first. The values that
  leave the block are then sent to the neighbours, and *while they are on the
  wire* the units collide the interior.

The diagonal neighbours are not wired. Values going diagonally across a corner
are forwarded by an axis neighbour in a short second transfer sub-phase.

The RTL is written from a published description of the design. Where that
description leaves something open (packet format, number format, collision
formula, boundary conditions), this implementation makes its own choice. The
choices are listed in [Departures and open points](#departures-and-open-points).

## Lattice and coordinates

The D2Q9 directions are numbered 0 (rest), 1 E, 2 N, 3 W, 4 S, 5 NE, 6 NW, 7 SW and
8 SE. Inside a block, sites are addressed `(row, col)` with row 0 at the top,
so "North" is `row - 1`. `lbm_pkg::DR/DC` hold the row and column steps of each
direction. A DSlave's four links are numbered `LINK_E = 0`, `LINK_N = 1`,
`LINK_W = 2`, `LINK_S = 3`.

Distribution values are 32-bit words. In this RTL they are signed fixed point
numbers with 24 fractional bits (`lbm_pkg::FRAC`); the original design uses
single-precision floats of the same width.

## One time step

```
 cycles:  0          53                                   ~138   ~140
          |-- border collision --|
                                  |-- interior collision (52) --|
                                  |== sub-phase 1: 14 words/link ==|ack|== sub-phase 2: 1 word ==|
                                                                               stream (1 cycle)
```

`cycle_ctrl` sequences the step:

1. **Border collision.** All 16 units collide their border site (52 cycles).
2. **Sub-phase 1 and interior collision.** Each link sends one packet of
   3N-1 = 14 words. At the same moment, 9 units start on the interior sites.
3. **Sub-phase 2.** A DSlave forwards one word on each link once two things
   are true: the sub-phase 1 packet that carried the word has arrived on the
   link clockwise before it, and its own sub-phase 1 packet on this link has
   been acknowledged.
4. **Streaming.** Streaming starts once four conditions hold: both packets
   from every neighbour are in, all sub-phase 2 packets are sent, and the
   interior collision is done. All 25 sites then stream in a single cycle.
   The next step starts at once.

The step never waits for acknowledgements. Only a *new* packet on a link waits
until the previous packet on that link has been acknowledged. This wait is
reported on `stall`. After a transmission error it suspends the DSlave before
its next sub-phase 1, until the retransmission goes through.

At 125 MHz, an error-free step of the default configuration takes 140 cycles
(1120 ns). The original implementation needs 1712 ns per step, because its
floating-point collision takes about 85 cycles and its links are slower.

## Halo exchange and corner forwarding

This is the part that needs the most care. Each DSlave keeps two arrays:

* `f_q[25]`: the distributions of its sites after streaming (the state);
* `ext_q[7 x 7]`: post-collision values. The inner 5 x 5 cells are written by
  the collision units. The ring of ghost cells around them (rows and columns
  -1 and 5) is written by packets from the neighbours.

Streaming is then a plain copy for every site and direction:
`f(r,c,i) <= ext(r - DR[i], c - DC[i], i)`.

There are 12N - 4 = 56 values that leave a block in one step: N per axis
direction and 2N - 1 per diagonal. They are split evenly over the four links,
3N - 1 = 14 each. A link carries the axis value and both diagonals of its
border row or column, except one corner diagonal. That corner value goes on
the next link counter-clockwise (`lbm_pkg::tx_word`):

| link | words 0..N-1      | words N..2N-1     | words 2N..3N-2             | corner handed on |
|------|-------------------|-------------------|----------------------------|------------------|
| E    | f1 of column N-1  | f5 of column N-1  | f8 of rows 0..N-2          | f8 of (N-1,N-1) goes S |
| N    | f2 of row 0       | f6 of row 0       | f5 of columns 0..N-2       | f5 of (0,N-1) goes E   |
| W    | f3 of column 0    | f7 of column 0    | f6 of rows 1..N-1          | f6 of (0,0) goes N     |
| S    | f4 of row N-1     | f8 of row N-1     | f7 of columns 1..N-1       | f7 of (N-1,0) goes W   |

Take the North-East value of the top-right site, `f5(0, N-1)`. It belongs to
the FPGA up and to the right, which has no link to this one. It travels East
in sub-phase 1 and lands in the East neighbour's ghost cell `(0, -1)`. That
cell is not streamed from by anything there. In sub-phase 2 the East neighbour
forwards the word North, where it lands in ghost cell `(N, -1)`. From that cell
it streams into site `(N-1, 0)`, its correct destination. `lbm_pkg::fwd_word`
lists the four forwarded ghost cells and `lbm_pkg::rx_place` maps a word's
sender coordinates to the receiver's ghost ring. Both ends of a link use the
same functions, so the packets carry no addresses.

## Physical nodes and lattice sites

Node numbers below are 1-based, as in the original description. In the RTL,
unit `p` is node `p+1`.

```
  1  2  3  4  5        border sites: node k owns the k-th site
 16  1  2  3  6        clockwise from the top-left corner
 15  4  5  6  7
 14  7  8 11  8        interior sites: nodes 1..8 and 11
 13 12 11 10  9
```

A unit with two sites reads its input through a multiplexer. The input is the
border site in the first collision of the step and the interior site in the
second. Units 9, 10 and 12 to 16 (1-based) idle during the interior collision.
The mapping functions are in `dslave.sv` (`periph_site`, `int_node`).

## Links: packets, CRC, acknowledgement, retransmission

Each DSlave has four `link_transceiver`s. Each one pairs a `link_tx` with a
`link_rx` on a full-duplex line. The line is modelled as one byte plus a
valid bit per 125 MHz cycle. That byte rate equals the 1 Gbit/s serial line
of the original. The serializer and LVDS drivers are not modelled.

```
DATA: {2'b10, tag, seq, 4'h5}  len  payload (len x 4 bytes, MSB first)  CRC-32 (4 bytes, LSB first)
ACK : {2'b01, 1'b0, seq, 4'h5}                                          CRC-32
```

* The CRC is the Ethernet CRC-32: reflected, initial value all ones, result
  inverted. It covers every byte before it.
* `tag` is 0 for a sub-phase 1 packet and 1 for sub-phase 2. `seq` is a
  one-bit stop-and-wait sequence number.
* Packets are sent back to back with one idle cycle between them. A receiver
  drops a packet that ends early, has a bad header or length, or fails the CRC.
* The sender keeps the packet and sends it again if no matching ACK arrives
  within `TIMEOUT` cycles (1024 by default).
* The receiver has one packet buffer. It acknowledges a packet when the core
  *takes* it, so the buffer cannot be overrun. A copy of a packet already
  taken (its ACK was lost) is acknowledged again and not delivered twice.
* ACK requests take priority over data between packets.

A clean sub-phase 1 packet takes 62 bytes on the line, 14 data words plus 6
bytes of header and CRC.

## Collision unit

`collision_unit` computes the standard BGK operator for one site:

```
rho = sum f_i        u = (sum f_i c_i) / rho
feq_i = w_i rho (1 + 3 c_i.u + 4.5 (c_i.u)^2 - 1.5 u.u)      w = 4/9, 1/9 (axis), 1/36 (diagonal)
f_i'  = f_i - omega (f_i - feq_i)
```

The unit works in three parts. A radix-2 restoring divider produces `1/rho`
in 2*FRAC+1 = 49 steps. One cycle then forms `u`, and one more forms all nine
outputs. The latency from `start` to `done` is 52 cycles. The relaxation rate
`omega` is an input in the same fixed point format.

## Modules

| file | role |
|------|------|
| `rtl/lbm_pkg.sv` | types (`fx_t`, `fvec_t`, `line_t`), D2Q9 constants, packet word order, CRC-32 byte update |
| `rtl/collision_unit.sv` | bulk BGK collision of one site, start/done, 52 cycles |
| `rtl/link_tx.sv` | packet framing, CRC, ACK wait, timeout and retransmission, ACK sending |
| `rtl/link_rx.sv` | packet parsing, CRC check, one-packet buffer, ACK requests |
| `rtl/link_transceiver.sv` | one link: `link_tx` + `link_rx` |
| `rtl/cycle_ctrl.sv` | per-step sequencing (the control circuit) |
| `rtl/dslave.sv` | one FPGA: 16 collision units, `f_q`/`ext_q`, 4 transceivers, controller, host port |
| `rtl/dslave_grid.sv` | top: GX x GY DSlaves on a torus (default 2 x 2, a 10 x 10 domain) |

Top-level ports of `dslave_grid` (parameters `GX`, `GY`, `N`, `TIMEOUT`):

* `omega`: the BGK relaxation rate, fixed point, shared by all sites.
* `go`, `nsteps`: start that many steps on every DSlave. `done` pulses when
  all have finished; `busy` is high while any DSlave runs.
* `host_sel`, `host_we`, `host_site`, `host_dir`, `host_wdata`, `host_rdata`:
  read or write one distribution word of DSlave `x + GX*y`, site
  `row*N + col`. Use this port only while the grid is idle. It stands in for
  the board controller that loads and reads the FPGAs.
* `err_mask[d][l]`: bits flipped in every valid byte that arrives at DSlave
  `d` on link `l`. Tie it to zero in normal use; tests use it to inject line
  errors.
* `stall`, `int_busy`, `retx`, `crc_err`: status ORed over the grid.

Reset is active-low and asynchronous, and it clears all state. All logic runs
on one clock.

## Departures and open points

* **Number format.** This RTL uses fixed point (Q7.24 in 32 bits) instead of
  IEEE single precision. The link word width is the same, so the exchange is
  unaffected. Values must stay within ±128, which is ample for densities
  near 1.
* **Collision formula.** The original description does not state its
  collision operator. The standard BGK form is used here.
* **Boundaries.** The original machine has six more collision variants, for
  the four corners and the left and right edges of the global domain. Only
  their names and costs are known, so they are not included. All sites use
  the bulk operator, and `dslave_grid` wraps around into a periodic domain.
* **Links.** The packet format, sequence numbering, timeout and the ACK-on-take
  rule are this implementation's own. The 1 GHz source-synchronous LVDS
  physical layer is replaced by the byte-wide `line_t` connection.
* **Unused transceivers.** A real DSlave has 11 transceivers: up, down, left,
  right, front, rear, four on-board links and one to the board controller.
  Only the four used by a 2D grid are built. The board-controller link is
  replaced by the parallel host port.
* **Block size.** `N` may be 5 (the reference configuration) or 6. Larger
  blocks would need several sites per unit per phase and are rejected at
  elaboration. For `N = 5` the ninth interior site is computed by node 11, as
  in the original mapping. For other `N`, interior site `k` goes to unit `k`.
* **Machine size.** The full machine is 216 x 96 DSlaves (1080 x 480 sites).
  It corresponds to `GX = 216, GY = 96`, but it is far too large to simulate
  here and would need the missing boundary operators.

## Simulating

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. The
floating point reference model used by the DSlave tests is in
`tb/lbm_ref_pkg.sv`. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_dslave_grid rtl/lbm_pkg.sv tb/tb_dslave_grid.sv -o sim
./obj_dir/sim
```

| testbench | what it shows |
|-----------|---------------|
| `tb_collision_unit` | 60 random sites against a real-valued BGK, latency 52 |
| `tb_link_tx` | packet bytes and CRC (reference CRC checked on "123456789"), ACK wait, retransmission after the timeout |
| `tb_link_rx` | delivery, ACK on take, CRC and truncation drops, duplicate handling |
| `tb_link_transceiver` | two transceivers exchanging 40 packets each way under random bit errors, exactly-once in-order delivery |
| `tb_cycle_ctrl` | ordering rules of a step with modelled units, transmitters and neighbours, stall |
| `tb_dslave` | one DSlave looped onto itself (periodic 5 x 5), 4 steps against the reference, 140 cycles/step, overlap and forwarding |
| `tb_dslave_grid` | default 2 x 2 grid, 10 x 10 domain, 13 steps against the reference: clean, with random line errors, and with a lost ACK. Counts overlap, forwarding, CRC errors, retransmissions and stalls |

The grid test runs at the top's default parameters in well under a second.
