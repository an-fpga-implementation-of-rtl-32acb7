# Partly parallel decoder for a 9216-bit (3,6)-regular LDPC code

This is synthesizable SystemVerilog for an iterative decoder of a rate-1/2, (3,6)-regular
low-density parity-check code of length 9216. A fully parallel decoder needs one processor
per node of the code's graph, which is far too large at this length. This design instead
shares 36 variable node units and 18 check node units over all the nodes. The code itself
is built to suit that hardware: its parity-check matrix is fixed by the way the memories are
addressed and the way the messages are shuffled. So the decoder needs no table describing
the code, and the random-looking part of the matrix costs only a few small shuffle stages.

The architecture follows a published FPGA decoder, the "joint code and decoder design" for
(3,k)-regular codes. The message word formats, the pipeline depths, the shuffle structure,
the address generators and the frame-buffer scheme come from that design. The quantisation
table, all the random configuration constants, the handshakes and a few cycles of pipeline
drain are this implementation's own choices. They are listed under
"Where this design departs from the original architecture" below.

## The code and how the hardware defines it

Take k = 6 and L = 256. The code has N = L·k² = 9216 bits and 3·L·k = 4608 parity checks.
The parity-check matrix H is three stacked bands H1, H2, H3, each with L·k rows. The bits
form k² groups of L bits, one group per PE block PE(x,y) (processing element block). Within
each group, bit d is stored at memory location d.

* **H1** uses identity blocks. Check r of row-group x covers bit r of every group PE(x,·).
* **H2** uses identity blocks cyclically shifted by u = ((x−1)·y) mod L (1-based x, y). Check
  r of column-group y covers bit (r+u) mod L of every group PE(·,y).
* **H3** is random-like. Each PE(x,y) contributes bit (t(x,y)+r) mod L to a check in cycle r.
  Which check receives it is decided by the shuffle network π3 (below). Its control words
  change every cycle.

The values t(x,y) were drawn at random under two constraints that keep the code's graph free
of 4-cycles:

1. For a fixed x, all t(x,y) differ.
2. For a fixed y, t(x1,y) − t(x2,y) ≢ (x1−x2)·y (mod L).

Every check is visited exactly once per check node phase. Check r of group i is processed in
cycle r by CNU(i, j). The testbench rebuilds H from these rules on its own and confirms that
each bit is in exactly one check of each band, so every column has weight 3 and every row
has weight 6. It also confirms that no two bits share two checks, so the graph has no
4-cycles.

## Message formats

| quantity | format |
|---|---|
| channel LLR γ (intrinsic) | 5-bit sign-magnitude: sign bit, 4-bit magnitude |
| check→variable message β | 5-bit sign-magnitude |
| variable→check message α | 5-bit sign-magnitude, held in the "f domain" |
| hybrid word | 6 bits: `{hard decision, sign, magnitude[3:0]}` |

One LSB stands for 0.25 in the log-likelihood domain, so the LLR range is ±3.75. The decoder
runs Log-BP using f(x) = ln((1+e^−x)/(1−e^−x)). Note that f is its own inverse.

* **Variable node:** α = sign(γ_mn)·f(|γ_mn|), where γ_mn = γ_n + (sum of the other two β).
* **Check node:** β = f(sum of the other five |α|), with sign = XOR of the other five signs.

f is a 64-entry table with a 6-bit input and a 4-bit output:
LUT[m] = min(15, round(4·f(m/4))), and LUT[0] = 15.
The hard decision is 1 when λ = γ + Σβ ≤ 0. A positive LLR means bit value 0.

## One iteration: two phases

Each PE block holds every message of its L nodes in five memories:

* EXT_RAM_1, EXT_RAM_2, EXT_RAM_3 (L×6 bits each). Location d holds the message between
  node d and its neighbour in band i.
* INT_RAM: two banks of L×5 bits for the channel LLRs.
* DEC_RAM: two banks of L×1 bits for the hard decisions.

Because every message of node d sits at address d, addressing needs only counters.

**Check node phase (L cycles plus 5 drain cycles).** Each cycle, every EXT_RAM in all 36 PEs
is read. That is 108 hybrid words per cycle. The words go through the shuffle networks to
the 18 CNUs and come back as β. Each β is written to the location its α came from. The loop
has five pipeline registers:

```
Read (RAM) | Shuffle | CNU 1st half | CNU 2nd half | Unshuffle | Write
```

so the write address is the read address delayed by 5 clocks. The three address generators
of a PE are counters modulo L. They are loaded with 0, ((x−1)·y) mod L and t(x,y) just
before the phase starts. The CNUs also XOR the hard-decision bits of their inputs. The
controller ORs these parity results over the whole phase. If every check holds, the frame
stops here.

**Variable node phase (L cycles plus 3 drain cycles).** Each PE reads the three β and γ at
one shared address. Its VNU forms the three new hybrid words and the decision, and writes
them back 3 clocks later:

```
Read | VNU 1st half | VNU 2nd half | Write
```

**Initialisation (L cycles plus 3).** This is a variable node pass with the β inputs forced
to zero. It writes sign(γ)·f(|γ|) into the EXT_RAMs and the channel decision into DEC_RAM.

**Stop rules.** A frame stops when a check node phase finds every parity check satisfied
(`done_converged = 1`). It also stops after `MAX_ITER` = 18 check/variable phase pairs
(`done_converged = 0`). The check in a phase tests the decisions made by the previous
variable node phase. A frame that arrives without errors therefore stops at the first
check, with 0 iterations.

Decode time in cycles, for s iterations:

```
(L+3) + s·(2L+8) [+ (L+5) if stopped by the parity check] + 1
```

With L = 256 and s = 18 this is 9620 cycles. At 56 MHz that gives 9216/9620 × 56 ≈ 53.7
Mbit/s of decoded symbols.

## The shuffle networks

* **π1 and π2** are fixed wiring. CNU(1,x) input n gets PE(x,n). CNU(2,y) input n gets
  PE(n,y).
* **π3** works in two stages, for the 6×6 block of words a[x][y]:
  * Intra-row stage: row x is permuted by a fixed random permutation R_x when control bit
    s_r[x] is 1, and left unchanged otherwise.
  * Intra-column stage: column y is permuted by C_y when s_c[y] is 1.

  Row x of the result feeds CNU(3,x). The words s_r and s_c come from two L-entry ROMs
  (ROM R and ROM C), one entry per cycle of the phase. So the connection pattern changes
  every cycle while the wiring stays confined to one row or one column.

Each network has separate forward wires (6 bits) and backward wires (5 bits). The backward
path retraces the forward route. It uses the control words delayed by 3 clocks, which is
how long the data takes to reach the backward path (CNU 1st half, CNU 2nd half, Unshuffle).

The permutations R_x and C_y and the values t(x,y) are constants in `ldpc_pkg`. The ROM
words come from `ldpc_pkg::rom_word(seed, r)`, three rounds of a 32-bit xorshift on
seed ^ (r·0x9E3779B9). The ROMs are built from this function when the design elaborates.
These constants fix the code. Changing any of them gives a different code from the same
ensemble, and the 4-cycle-free property holds only while the t(x,y) constraints above hold.

## Frames, loading and readout

The decoder works on three frames at once. While frame n is decoded:

* frame n+1 loads into the free INT_RAM bank;
* the decisions of frame n−1 are read out of the other DEC_RAM bank.

**Load.** Send one LLR per clock with `ld_valid`. `ld_addr = {PE index x·6+y (6 bits),
location d (8 bits)}`. Raise `ld_last` with the final word of a frame, and load only while
`ld_ready` is high. A binary decoder turns the PE index into a one-hot select. Data, address
and select enter the top row of PEs and move down one row per clock. Loading a frame takes
9216 clocks, which is less than a full decode, so loading hides behind decoding. A decode
starts as soon as the controller is idle and a loaded frame is waiting. At that point the
INT banks swap and `ld_ready` rises again.

**Status.** `frame_done` pulses when a frame ends, together with `done_iters` and
`done_converged`. At that moment the DEC banks swap.

**Readout.** Put a location d on `rd_addr`. k+1 = 7 clocks later, `dec_out[x·6+y]` holds the
decision for node d of PE(x,y). The address travels along each PE row, and each PE adds its
bit to the row's bus. Read the L locations before the next `frame_done`. Any decode takes at
least 2L+9 cycles, which is long enough.

## Files

| file | block |
|---|---|
| `rtl/ldpc_pkg.sv` | constants, types, configuration tables, f() table |
| `rtl/ldpc_decoder_top.sv` | the decoder: PE array, shuffle, CNUs, controller, I/O chains |
| `rtl/ldpc_pe.sv` | PE block: EXT/INT/DEC RAMs, VNU, address generators, chain stages |
| `rtl/ldpc_cnu.sv` | degree-6 check node unit (prefix/suffix sums, LUT, parity), 2 clocks |
| `rtl/ldpc_vnu.sv` | degree-3 variable node unit, 2 clocks |
| `rtl/ldpc_flut.sv` | f() look-up table |
| `rtl/ldpc_shuffle.sv` | π1, π2, π3 and the Shuffle/Unshuffle registers |
| `rtl/ldpc_pi3.sv` | configurable two-stage shuffle with ROM R / ROM C |
| `rtl/ldpc_addr_gen.sv` | modulo-L address counter with load value |
| `rtl/ldpc_ram.sv` | synchronous RAM, one read and one write port |
| `rtl/ldpc_bin_decoder.sv` | PE-select decoder for the load address |
| `rtl/ldpc_ctrl.sv` | phase sequencer, early stop, iteration limit, frame-buffer banks |

All parameters default to the full-size design: `L = 256`, `MAX_ITER = 18`, and k = 6 in
the package. The top can be built with a smaller `L`, but the t(x,y) table was chosen for
L = 256. At other sizes the values are only reduced modulo L, and the 4-cycle-free property
is no longer guaranteed. k is fixed at 6 by the sizes of the tables.

## Simulating

Every testbench checks itself. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ldpc_pkg.sv tb/ldpc_ref_pkg.sv tb/tb_ldpc_decoder_top.sv \
  --top-module tb_ldpc_decoder_top -o sim && obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_ldpc_decoder_top` | Full size. Five frames: 3.0, 2.0 and 2.5 dB, one noiseless, one of random LLRs. Loaded back to back and compared with a bit-exact model that builds H from the rules above. Checks column and row weights and the absence of 4-cycles in H, then the iteration count, stop cause, all 9216 decisions and the cycle count of every frame. Also requires early stop at the first check, early stop after iterating, stop at the limit, loading during a decode and readout during a decode. |
| `tb_ldpc_awgn_sweep` | Full size. The error-correction workload: Eb/N0 1.0, 1.5 and 1.75 to 3.5 dB in 0.25 dB steps, 40 frames per point. Prints converged frames, average iterations, FER and BER. Checks the iteration curve against the published one (±3), that it does not rise, and that every frame converges from 3 dB. |
| `tb_ldpc_pe` | One PE block (L = 16): load, initialisation, check node pass with a stand-in CNU loop, variable node pass, second check node pass and readout, against the reference arithmetic. |
| `tb_ldpc_cnu`, `tb_ldpc_vnu`, `tb_ldpc_flut` | Node arithmetic against real-valued f() and integer sums, including latency. |
| `tb_ldpc_pi3`, `tb_ldpc_shuffle` | Routing of all three networks, and that the backward path inverts the forward path at the right delay. |
| `tb_ldpc_ctrl`, `tb_ldpc_addr_gen`, `tb_ldpc_ram`, `tb_ldpc_bin_decoder` | Phase cycle budget, stop rules and handshakes; counters; RAM behaviour; decoder. |

`tb/ldpc_ref_pkg.sv` holds the reference arithmetic, written from the decoding equations.

Sweep result with 40 frames per point, next to the average iteration counts read from the
published curves of the original design:

| Eb/N0 (dB) | 1.0 | 1.5 | 1.75 | 2.0 | 2.25 | 2.5 | 2.75 | 3.0 | 3.25 | 3.5 |
|---|---|---|---|---|---|---|---|---|---|---|
| average iterations | 18 | 18 | 17.4 | 14.0 | 11.5 | 9.6 | 8.4 | 7.6 | 6.9 | 6.1 |
| published iterations | 18 | 18 | 16.2 | 12.8 | 11.1 | 9.3 | 8.0 | 7.0 | 6.2 | 5.6 |
| FER | 1 | 1 | 0.58 | 0.05 | 0 | 0 | 0 | 0 | 0 | 0 |
| BER | 9.3e-2 | 4.0e-2 | 9.8e-3 | 1.2e-4 | 0 | 0 | 0 | 0 | 0 | 0 |

This decoder needs about half an iteration more than the original and reaches a given error
rate roughly 0.1–0.2 dB later. The original reports BER near 10⁻³ at 1.75 dB and 3·10⁻⁶ at
2 dB. The likely causes are this design's quantisation table (LLR range ±3.75) and its own
random configuration constants. 400 frames cannot measure error rates near 10⁻⁶. A frame can
count as "not converged" and still have no bit errors: the last variable node phase may
correct it, and no check follows that phase.

## Where this design departs from the original architecture

* **Drain cycles.** The original architecture states 2L cycles per iteration and 2sL+L per
  frame. Here each phase waits for its pipeline to empty: 5 cycles after a check node phase
  and 3 after a variable node phase. Without the wait, a phase could read a location that
  the previous phase has not yet written back, because the three address generators of a PE
  start at different offsets. The cost is 8 cycles per iteration, about 1.6 % at L = 256.
* **RAM ports.** The FPGA build used single-port block RAMs clocked at twice the decoder
  clock, from an on-chip delay-locked loop. Here each RAM has a separate read port and write
  port at the decoder clock. The behaviour is the same and there is no second clock.
* **Quantisation and f() table.** Only the 5-bit sign-magnitude formats are given by the
  original. The 0.25 LSB, the table contents and the saturation of CNU sums at 63 are choices
  made here.
* **Configuration constants.** t(x,y), R_x, C_y and the ROM contents are random draws that
  satisfy the stated rules. They are not the original's selected set, which was chosen for
  cycle length and simulated performance and was never published. Performance may differ
  from the original by a small amount.
* **Initialisation.** The initialisation pass reuses the VNU with zero inputs and also writes
  the channel decisions to DEC_RAM. The original states only that initialisation takes L
  cycles.
* **Interfaces.** The load/readout handshakes, the PE numbering in addresses and in
  `dec_out`, and the order of bits in the hybrid word are choices made here. So are the
  arrangement of adders inside the CNU and VNU: the CNU uses prefix and suffix sums, and the
  VNU uses pairwise sums. These follow the block diagrams of the original but are not
  copied from it as netlists.
* **Not modelled.** FPGA placement and floor planning, vendor IP cores and the clock DLL.
  No timing is claimed for this RTL.
