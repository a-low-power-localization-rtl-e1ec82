# Low-power least-squares localization engine for sensor nodes

A node in an ad-hoc wireless sensor network usually does not know where it is.
A few *anchor* nodes do. Each anchor floods the network with its position and
a hop count that starts at 0 and grows by one at every relay. From the hop
counts at which the floods reach it, a node estimates its distance to each
anchor. It then finds its own position by least-squares triangulation. This
scheme is known as Hop-TERRAIN.

This RTL is a dedicated, serial, fixed-point hardware engine for that job. The
computation is rare: at most 16 solves per minute, with 4 s allowed for each.
So everything runs through one small datapath, one matrix element at a time.
A whole solve takes about 840 clock cycles, which is 52 µs at 16 MHz. The
arithmetic is:

* Givens rotations computed by four shift-and-add CORDICs, with no multiplier
  in the QR decomposition;
* a 10-bit serial divider for the final back substitution.

## Block structure

```
 link layer ──rx_pkt──► loc_rx ──write──► anchor_list ──read──► ls_solver
                          │                                      │ x,y,z
                          └──relay──► loc_tx ◄───── position ────┘
 link layer ◄──tx_pkt─────────────────┘
```

`ls_solver` is built from `ls_setup`, `matrix_mem`, `cordic_block` (four
`cordic` units) and `back_sub` (which uses `serial_divider`). The top is
`loc_system`. Shared types and word widths are in `loc_pkg`.

| Module | Role |
|---|---|
| `loc_system` | Top. Wires the blocks together and starts a solve after every anchor-list update. |
| `loc_rx` | Decodes flood packets, updates the anchor list, hands new floods to TX for relaying. |
| `anchor_list` | 16 × {x, y, z: 8-bit signed; hop count r: 5-bit unsigned}. One write port, one combinational read port. |
| `loc_tx` | Relays floods with hop + 1, originates floods (hop 0) on anchor nodes, sends the computed position. |
| `ls_solver` | Sequencer: setup → QR by Givens rotations → back substitution. |
| `ls_setup` | Builds one row of the linear system per cycle from the anchor list. |
| `matrix_mem` | 15 rows × [three 16-bit A entries, one 26-bit b entry]. |
| `cordic_block` | One Givens rotation of two rows in 20 cycles, using the x, y, z and r CORDICs. |
| `cordic` | Time-sequential CORDIC, 10 micro-rotations, one per cycle, gain-corrected output. |
| `back_sub` | Solves the final 3×3 triangle. |
| `serial_divider` | Restoring divider, one quotient bit per cycle, 10-bit quotient. |

## From hop counts to a linear system

Anchor *i* is at (x_i, y_i, z_i) with hop count r_i. The node at u = (u_x,
u_y, u_z) satisfies (x_i − u_x)² + (y_i − u_y)² + (z_i − u_z)² = r_i². If the
equation of a reference anchor 1 is subtracted from each of the others, the
squares of u cancel. What remains is one linear equation per remaining anchor:

```
A_i = [x1 − xi,  y1 − yi,  z1 − zi]
b_i = ½ · ((x1² + y1² + z1² − r1²) − (xi² + yi² + zi² − ri²))
A u = b
```

With n anchors this gives n − 1 equations in 3 unknowns. At least 4 anchors are
needed; with more, the system is over-determined and solved in the
least-squares sense. `ls_setup` scans all 16 slots of the list, one per cycle.
The lowest-numbered valid slot becomes anchor 1. Each later valid slot produces
one row: A entries take 9 bits and b entries at most 19 bits. The factor ½ is an
arithmetic shift right. The hop count is used directly as a distance in
coordinate units.

## The QR decomposition: Givens rotations on CORDICs

The least-squares solution comes from reducing [A | b] to upper-triangular form
with orthogonal rotations. Each rotation is applied to b too, so the solution
does not change. Afterwards the first three rows hold a 3×3 triangle R and its
right-hand side b′, and the other rows hold only residuals.

**Order of elimination.** The controller works column by column, c = 0, 1, 2.
In each column it starts at the bottom row and moves up. It zeroes entry
(q, c) by rotating row q against row q − 1. With m = 15 rows (16 anchors) there
are 14 + 13 + 12 = 39 such entries.

**One rotation, 20 cycles** (`cordic_block`). There is one CORDIC for each
column of A (x, y, z; 16 bits) and one for b (r; 26 bits).

1. Cycles 0–9: the pivot column's CORDIC runs in *vectoring* mode on the pair
   (p[c], q[c]). At each step it chooses the direction that drives q[c] towards
   0. The 10 direction bits it records encode the rotation angle.
2. Cycles 10–19: the other three CORDICs run in *rotation* mode on their pairs
   (p[k], q[k]), applying the same 10 directions. The pivot's results become
   p′[c] = |(p[c], q[c])| and q′[c] = 0 (written as exact zero).

The vectoring range of a 10-step CORDIC is about ±100°. So if p[c] is negative,
both rows are negated first. That is a rotation by 180°, which is still
orthogonal. The controller gives the next start in the same cycle the previous
rotation finishes. Rows written in that cycle are forwarded from the rotator,
so exactly 20 cycles are spent per element: 780 cycles for 16 anchors.

**One CORDIC** (`cordic`). Step i (i = 0…9) computes
x ← x ± (y >>> i), y ← y ∓ (x >>> i). The datapath is 8 bits wider than the
stored word:

* 4 guard bits above, for the growth of the additions;
* 4 fractional bits below, so that the shifted terms are not cut to integers.

After the last step the result is multiplied by 1/K = 9949/2¹⁴ ≈ 0.60725. This
removes the CORDIC gain K ≈ 1.6468, so the gain does not pile up over the up
to 6 rotations an entry goes through. The result is then rounded and saturated
back to the stored width.

**Word sizes.** A entries need 9 bits. Six rotations can scale an entry by at
most (√2)⁶ = 8, which is 3 more bits. The additions inside one CORDIC need 4
more. Hence 16-bit A words and 26-bit b words.

## Back substitution

`back_sub` solves R u = b′ from the bottom up:
u_k = (b′_k − Σ_{j>k} R_kj u_j) / R_kk, for k = 2, 1, 0.

For each unknown it does three things:

1. loads b′_k into a 29-bit accumulator;
2. subtracts one product R_kj · u_j per cycle (a single 16 × 11 multiplier);
3. divides by R_kk.

The divider produces a 10-bit quotient magnitude in 10 cycles, rounded to the
nearest integer. The signed quotients (±1023) feed the later products. Only at
the end is each one saturated to an 8-bit coordinate:

* `sat` reports that the node lies off the 8-bit grid;
* `singular` reports a zero diagonal entry, meaning the anchors do not span 3-D
  space, for example when all anchors are coplanar.

## Cycle budget (16 anchors, default parameters)

| Phase | Cycles |
|---|---|
| Setup (16 slots) | 16 |
| Hand-over | 1 |
| QR: 39 rotations × 20 | 780 |
| Back substitution (3 × (load + MACs + 10-cycle divide + hand-over)) | 42 |
| **Total** | **839** (52.4 µs at 16 MHz) |

The original design counts about 825 cycles: 780 for the QR decomposition,
15 for the setup and 30 for the three divides. The 14 extra cycles here come
from scanning all 16 list slots rather than 15, from hand-over cycles between
the phases, and from the load and multiply-accumulate cycles of the back
substitution, which are counted here.

## Packets, flooding and when a solve runs

These rules are this implementation's own. The link-layer format was not
specified.

* **Packet** (`loc_pkt_t`, 35 bits): type (FLOOD or POSITION), 4-bit anchor id,
  x, y, z, 5-bit hop count. Both link-layer ports use valid/ready handshakes,
  and assertions check that a packet stays stable while it waits.
* **RX acceptance.** The anchor id is the anchor's address in the list. A flood
  is accepted when one of these holds:
  * its slot is empty;
  * it arrived over fewer hops than the stored entry;
  * the anchor's position changed.

  An accepted flood is written to the list and passed on for relaying. Anything
  else is dropped, and dropping floods that bring nothing new is what ends a
  flood. RX keeps a private copy of the stored hop counts and positions, so the
  list's single read port stays free for the solver.
* **TX.** A relay gets hop + 1, held at 31. An anchor node relays nobody else's
  floods. On `flood_start` it sends its own flood with hop 0. A non-singular
  computed position goes out as a POSITION packet. Priority is own flood, then
  relay, then position.
* **Solving.** On a non-anchor node with `solve_en` set, each list update that
  leaves at least 4 anchors known requests a solve. From the request until the
  solve ends, `rx_ready` is held low, so the list cannot change under the
  solver.

## Accuracy

The engine is bit-true fixed point. `tb_ls_accuracy` compares it with a
floating-point least-squares solution of the same equations. It uses 400 random
networks, each with 4–16 anchors within 31 units of the node. The mean position
error is about 10 % of the mean anchor distance, and about 8 % with 8 or more
anchors. The original design reports 6 % mean and 14 % maximum, but its test
networks and its error measure are not known, so the figures are not directly
comparable. Two effects dominate the error:

* **Integer quotients.** The rounding of u_2 is carried into u_1 and u_0.
* **CORDIC angle resolution.** After 10 steps the angle is known to about
  2⁻⁹ rad. The b entries grow with the square of the network's distance from
  the coordinate origin, so networks far from the origin lose more accuracy.

With only 4–7 anchors, single cases can be far off, because the system is then
often badly conditioned. The original design avoids saturated results by
placing anchors around the edge of the network. The same advice holds here.

## Departures and own choices

Taken from the original design:

* the block structure;
* the equations;
* Givens QR on four 10-step CORDICs, 20 cycles per element;
* 16/26-bit matrix words, 8-bit coordinates, 5-bit hop counts, 16 anchors;
* 10-bit quotients saturated to 8 bits.

This implementation's own choices:

* 4 fractional guard bits in the CORDIC. Without them, results on small
  geometries were off by tens of units.
* Gain correction by the constant 9949/2¹⁴, with rounding.
* Pre-negation for negative pivots.
* Row forwarding between rotations.
* Round-to-nearest division.
* A multiplier in the back substitution.
* Floor rounding of the ½ in b.
* The packet format, acceptance rule, handshakes, solve trigger, and stalling
  RX during a solve.
* Singular and saturation flags.

Not included:

* **The data link layer.** Its packet ports are brought out of `loc_system`.
* **The rest of the sensor-node chip** (microcontroller, memories, DLL, network
  queues and so on).

## Simulating

Every testbench in `tb/` checks itself and ends with a
`TB_RESULT checks=N failures=M` line. With Verilator 5, run from the directory
that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/loc_pkg.sv rtl/*.sv \
          tb/tb_loc_system.sv --top-module tb_loc_system -Mdir obj -o sim
obj/sim
```

Replace `tb_loc_system` with any other testbench:

| Testbench | What it checks |
|---|---|
| `tb_loc_system` | End to end at full size. Floods from 16 anchors, relays, drops, stalls, repeated solves, the final position against the true one for three node positions, and the 16-anchor cycle count. Also saturation, a singular (coplanar) anchor set, hop-count saturation and anchor-node mode. |
| `tb_ls_solver` | Exact-geometry networks, random networks against floating point, fewer than 4 anchors, coplanar anchors, saturation, cycle count. |
| `tb_ls_accuracy` | The accuracy study above. |
| `tb_cordic`, `tb_cordic_block` | Against ideal floating-point rotations, and the 10- and 20-cycle latencies. |
| `tb_serial_divider`, `tb_back_sub` | Bit-exact against integer models, and latency. |
| `tb_ls_setup`, `tb_anchor_list`, `tb_matrix_mem`, `tb_loc_rx`, `tb_loc_tx` | Bit-exact against reference models. |

The simulator is two-state, and memories that are not reset start at random
values, so every testbench resets or writes what it reads.

## Changing it

* **Anchor count.** `N_ANCHORS` (a power of two) on `loc_system`, `ls_solver`
  and the other blocks sets the list size, and the matrix memory gets
  `N_ANCHORS − 1` rows. The packet's anchor id has `ID_W` = log2(`MAX_ANCH`)
  bits; raise `MAX_ANCH` in `loc_pkg` together with `N_ANCHORS`.
* **CORDIC steps.** `ITERS` / `CORDIC_ITERS`. The gain-correction constant in
  `cordic` is computed for 10 steps and must be changed with it.
* **Word widths.** `A_W`, `B_W`, `COORD_W`, `HOP_W`, `QUOT_W` in `loc_pkg`.
