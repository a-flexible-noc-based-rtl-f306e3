# NoC-based flexible LDPC decoder with message stopping and early stopping

A code-independent LDPC decoder. Nine processing elements (PEs) sit on a 3 × 3
torus network-on-chip. Each PE runs layered, normalized min-sum decoding on the
parity-check constraints (PCCs) mapped to it. After updating a PCC, it sends
each new extrinsic as a one-flit packet to the PE that holds the next PCC of
the same code bit.

The hardware knows nothing about the code. The schedule is loaded through a
configuration port: which PCCs each PE holds, their degrees, and where every
updated extrinsic goes. So any code fits whose PCCs fit the memories. With the
defaults that includes every IEEE 802.16e (WiMAX) code and the 802.11n (WiFi)
codes, with one exception: the 2304-bit rate-1/2 code with early stopping
needs two memories enlarged (see the early stopping section).

A NoC decoder pays for its flexibility in network traffic. Two mechanisms cut
that traffic, and with it the size of the network needed for a given
throughput:

* **Message stopping (MS).** Once an extrinsic's magnitude exceeds a threshold
  THR, it is treated as final. It is delivered one last time with a flag F set,
  and it is never sent again in that frame. The receiver freezes the value.
* **Early stopping (ES).** Each PE produces one syndrome bit per PCC. An early
  stopping block (ESB) regroups these bits and computes the parity of each
  element of the syndrome accumulation vector (SAV) of the quasi-cyclic code.
  When every element is even, the remaining errors can only be of the
  "parity-bit" kind, and decoding stops.

The default build is the small configuration: 3 × 3 PEs, 8-bit messages, both
mechanisms, up to 10 iterations.

## Decoding algorithm as implemented

Each PCC `m` with edges `j` is processed in one pass. `L(q_j)` is the value
received from the previous layer, and `R_mj` is stored from the last
iteration.

1. `L(q_mj) = L(q_j) − R_mj(old)`. In the first iteration of a frame, `R(old)`
   is taken as 0, so the R memory never needs clearing.
2. The minimum extraction keeps the smallest and second-smallest `|L(q_mj)|`
   (A1, A2) and the XOR of all signs.
3. The compare unit picks A2 for the edge that holds the minimum and A1 for the
   others. It then scales by 0.75 (`x/2 + x/4`). The sign is the XOR of the
   other edges' signs. This gives `R_mj(new)`.
4. `L(q_j)(new) = L(q_mj) + R_mj(new)`, saturated to ±127. This value goes into
   the packet.

**Fixed point.** Messages are 8-bit two's complement, saturated to ±127.
`L(q_mj)` is kept at 9 bits and used at full width in step 4. Only the copy
that feeds steps 2 and 3 is clipped to ±63.

That split matters. If `L(q_mj)` itself were clipped, the posterior would lose
the clipped part while the later subtraction of `R_mj` stays whole. Values
then drift toward zero over the iterations, and a correct codeword falls
apart after about ten iterations. With `|R| ≤ 47`, a posterior saturated at
127 still gives `|L(q_mj)| ≥ 80 > 63`. Saturating the posterior therefore
never changes what the check-node computation sees.

## The processing element (`pe`)

The PE follows the memory-based pipeline that is usual for layered decoders:

```
cfg / NoC writes ─► L(q) MEMORY ─┐
CNT/CMP ─► read address ─────────┼─► subtract R(old) ─► MINIMUM EXTRACTION ─┐
                      R MEMORY ──┘          │                               │
                                            └──► short FIFO ──► COMPARE, ×0.75 ─► + ─► CHECK BLOCK ─► output buffer ─► NoC
                                                                    │                  │
                                                                R MEMORY (new)   TRANSMISSION BLOCK ─► ESB
```

* **L(q) and R memories** have `NPC × ND` words. PCC `k` owns words
  `k·ND … k·ND+deg−1`. A DEST memory of the same shape holds the destination
  of every edge's update: the node coordinates (DNI) and the write address
  there (RO). A DEG memory holds each PCC's degree.
* **CNT/CMP** counts through a PCC's addresses from its offset. It flags the
  first and last read and takes the next PCC on the last read, so one edge is
  read per cycle with no gap between PCCs.
* Up to four PCCs are in flight between the read stage and the write-back. The
  short FIFO holds their `L(q_mj)` until the minima of their PCC are known.
* **Input readiness.** Messages arrive in an order that depends on NoC
  contention. Each L(q) location therefore has a *fresh* flag, set when a
  value arrives and cleared when it is read. A PCC is started only when all its
  inputs are fresh, or frozen by message stopping. This keeps the layered order
  exact: every PCC sees the value produced by the previous PCC on each of its
  bits, whatever the timing.
  * At frame load, configuration bit `cfg_data[8]` marks the first layer of
    each bit as fresh.
  * The other copies wait for their predecessor. The first iteration is
    therefore a clean layered pass in the order the schedule defines.
* **Check block (CB)** computes `THR − |L|`. The sign of that difference is the
  F flag, and it is forced to 0 when MS is off. The CB assembles the packet
  `{F, RO, DNI, PAYLOAD}`.
  * A per-edge *sent-final* flag suppresses every later message of an edge
    whose final value has gone out. Those are the stopped messages.
  * At the receiver, an F packet sets a *frozen* flag. Later writes to that
    location are ignored.
  * Both flag sets clear when a new frame starts.
* **Transmission block (TB)** XORs the signs of a PCC's new extrinsics. It
  hands one syndrome bit per PCC to the ESB on a dedicated wire.

## The network (`noc_torus`, `routing_element`, `re_route`)

The network is a 2-D torus. Each routing element has five ports: local, N, E,
S and W.

* Each input has a FIFO, and every output has its own register fed by a
  crossbar. Each output arbiter grants one requesting FIFO head per cycle in
  round-robin order.
* A hop costs two cycles: the FIFO write, then the output register.
* Back-pressure is valid/ready, with `ready = FIFO not full`. Nothing is lost.
* Routing is O1Turn. Each packet travels either X first or Y first, and it goes
  the shorter way round each ring; ties go East or South. The X/Y order is taken
  from bit 0 of the packet's RO address. That fixes it per message and spreads
  the traffic evenly over both orders without extra header bits.
* The packet has a 1-bit F flag, a 12-bit RO and a 6-bit DNI (3 bits per
  coordinate, so tori up to 8 × 8 work), plus the 8-bit payload: 27 bits.

`blocked` counts FIFO heads that wanted to move and could not. The top
accumulates it into `noc_wait_cnt` as a contention statistic.

## Early stopping block (`esb`, `shuffle_network`, `sav_block`)

For a quasi-cyclic code with expansion factor `z` and `c = M/z` block rows, SAV
element `a_i` is the sum of the syndromes `s_i, s_{i+z}, …, s_{i+(c−1)z}`.
Only its parity matters. The ESB works in three steps:

1. **Collect.** Each PE's syndrome bits are written in arrival order into that
   PE's SMin memory.
2. **Shuffle.** On `start`, SMin entry `t` of every PE is read in cycle `t`.
   * A configured SNM word tells each output `j` of the P × P shuffle network
     which SMin to take.
   * A configured SWA word `{we, addr}` gives the write into SMout `j`.
   * The tables regroup the syndromes so that SMout `j` holds SAV elements
     `j, j+P, …`, each as `c` consecutive bits.
3. **Accumulate.** One counter reads all SMouts in parallel into P SAV blocks.
   Each block XORs `c` bits per element and sets a sticky *odd* flag.
   `stop = NOR(odd)`.

The latency is the shuffle length plus the longest SMout fill plus about two
cycles. That is roughly `2M/P`: 256 cycles for M = 1152 on nine PEs. The ESB
runs concurrently with the next iteration. `start` rewinds the SMin write
pointers, and entry `t` is read before any PE can produce its `(t+1)`-th new
syndrome. A stop decision about iteration `i` therefore ends decoding at the
end of iteration `i+1`. An error-free frame takes two iterations with ES on.

SMout is sized `ceil(z/P)·c` = 132, not `M/P` = 128, because each SMout holds
whole SAV elements. For z = 96 and P = 9, some SMouts get 11 elements of 12
bits.

The regrouping has a limit. In each shuffle cycle the nine syndromes must go
to nine different SMouts. When P divides z, the natural schedule already does
that in `M/P` cycles: row `r` runs on PE `r mod P`. Otherwise the busiest
SMout receives `ceil(z/P)·c` syndromes, so the shuffle, and the PCC count of
the busiest PEs, grows to that number.

* For the 2304-bit rate-1/2 WiMAX code (z = 96, c = 12) on nine PEs, that is
  132, beyond the default `NPC` = `SMI_DEPTH` = 128. Running that code with
  early stopping needs both raised to 132.
* Without early stopping it fits as is.
* All other WiMAX and WiFi sizes fit.
* The testbench package generates ESB tables only for the P-divides-z case.

## Iteration control (`decoder_ctrl`) and the top (`ldpc_noc_decoder`)

1. `go` clears the per-frame flags.
2. The controller starts an iteration on all PEs. It waits until every PE is
   idle and the NoC is empty, then starts the next one.
3. From the second iteration on, with ES enabled, it also starts the ESB on the
   syndromes just collected.
4. Decoding ends when the ESB has said stop (`es_stopped = 1`) or after
   `it_max` iterations.
5. `done` pulses and `iterations` holds the count.

Hard decisions are read back through `rd_pe`/`rd_addr` → `rd_data`, with one
cycle of latency, from any copy of a bit.

### Configuration

The schedule is computed off line. Writes go through `cfg_we`, with
`cfg_mem`, `cfg_idx`, `cfg_addr` and `cfg_data`. `cfg_idx` is the PE for PE
tables and the port for ESB tables.

| `cfg_mem` | target | address | data |
|---|---|---|---|
| `CFG_LLR`  | L(q) memory of PE `cfg_idx` | edge address `k·ND+pos` | LLR in [7:0], bit 8 = available in iteration 1 |
| `CFG_DEG`  | degree of PCC `k` | `k` | degree |
| `CFG_DEST` | destination of the edge's update | edge address | `{DNI y, DNI x, RO}` |
| `CFG_NPC`  | number of PCCs on the PE | – | count |
| `CFG_SNM`  | shuffle control, cycle `t`, output `cfg_idx` | `t` | input index |
| `CFG_SWA`  | SMout `cfg_idx` write in cycle `t` | `t` | `{we, address}` |
| `CFG_ESB`  | 0: shuffle cycles (max PCCs per PE), 1: `c` | 0/1 | value |

The destinations form, for every code bit, a ring through the PCCs that contain
it, in layer order. The first PCC of each ring gets the "available" mark when
LLRs are loaded. The testbench package `tb/ldpc_tb_pkg.sv` builds all of these
tables for a quasi-cyclic code; it is a working example of the mapping.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NX`, `NY` | 3, 3 | torus size (P = NX·NY PEs, up to 8 × 8) |
| `NPC` | 128 | PCCs per PE (1152 / 9 for the largest WiMAX code) |
| `ND` | 20 | largest PCC degree (WiMAX rate 5/6) |
| `FIFO_DEPTH`, `OB_DEPTH` | 8, 8 | router input FIFOs, PE output buffer |
| `SMI_DEPTH`, `SMO_DEPTH` | 128, 132 | ESB memories |
| `QW` (package) | 8 | message width |

The 5 × 5, 6 × 3 and 4 × 4 decoders are the same RTL with other `NX`, `NY`,
and `NPC` reduced as needed.

## Where this design departs from the published architecture, and its limits

* **Dynamic routing only.** The static-routing decoder has a routing memory per
  router and a write-address generator per PE. Neither is built. That decoder
  works only without message stopping; here every packet carries its
  destination (DNI) and write address (RO).
* **Input readiness flags** (see the PE section) are this design's own means of
  keeping the layered order correct under variable NoC timing.
* **Message stopping:** a value above THR is sent once, flagged, and then
  suppressed. It is not dropped immediately, so the receiver learns the value
  is final.
* **The normalization factor** is fixed at 0.75, the clip for the check-node
  inputs at ±63, and FIFO and buffer depths at 8. These are this design's
  choices.
* **The iteration barrier** waits for all PEs and an empty NoC before the next
  iteration starts.
* **The ESB decision lags by one iteration**, as in the original scheme, and
  SMout is 132 words instead of 128 (see above).
* **Not built:** stopping on a zero syndrome (the usual stopping rule of a
  decoder without ES), and any channel front end.
* **Throughput.** The full-size testbench decodes a rate-1/2 code on the
  default 3 × 3 build. The code is quasi-cyclic with z = 90, N = 2160 and 5490
  edges. One iteration takes 704 cycles with MS and 830 without, against an
  injection bound of 610 cycles (edges / 9). A 2304-bit WiMAX rate-1/2 code
  has 7296 edges. At 300 MHz and six iterations that scales to roughly 50–60
  Mb/s. This is an estimate; no WiMAX matrix was simulated.

## Files

`rtl/`:

* `ldpc_pkg` holds the types, widths and configuration codes.
* The top is `ldpc_noc_decoder`. It instantiates `noc_torus` (made of
  `routing_element` and `re_route`), nine `pe` blocks (using `cnt_cmp`,
  `min_extract`, `nms_compare`, `check_block`, `transmission_block` and
  `sync_fifo`), `esb` (using `shuffle_network` and `sav_block`), and
  `decoder_ctrl`.

`tb/`:

* There is one self-checking testbench per module, `tb_<module>.sv`.
* `ldpc_tb_pkg` generates quasi-cyclic codes and their schedules.
* `tb_ldpc_noc_decoder` is the end-to-end test on a 2 × 2 torus with a small
  code. It covers every MS/ES mode, and it checks that early stop, the it_max
  limit, stopped messages, router contention and error correction all occur.
* `tb_ldpc_full` runs the default-size decoder on a 2160-bit code with z = 90.
  It checks decoding, message accounting, the stop reason and cycles per
  iteration (at most 1.5 × edges / P).

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/ldpc_pkg.sv tb/ldpc_tb_pkg.sv tb/tb_ldpc_noc_decoder.sv \
  --top-module tb_ldpc_noc_decoder -o sim
./obj_dir/sim
```

Replace the testbench file and top module for any other test. For example,
`tb/tb_ldpc_full.sv` with `tb_ldpc_full` runs in well under a minute. The
package files must come first on the command line.
