# Hough-transform track finder for an FPGA event filter

This RTL finds charged-particle track candidates ("roads") in one region of a silicon
tracker. It uses the Hough transform (HT). Each hit cluster is given in polar coordinates
(radius `r`, azimuth `phi`). A track from the beam line is described by two numbers: its
curvature `qA/pt` and its azimuth at the origin `phi0`. For small curvature these are related
by

    phi0 = phi + r * qA/pt

So a single cluster fixes a straight line in the (`qA/pt`, `phi0`) plane. Clusters from one
track draw lines that cross in a single cell. The design keeps a binned copy of that plane,
the *accumulator*, with 168 `qA/pt` rows and 48 `phi0` columns. It draws the line of every
cluster into it, one bit plane per detector layer (8 layers). Any cell crossed by lines from
at least 7 different layers becomes a road. The HT formula is then applied a second time to
the stored clusters, to collect the clusters that belong to each road.

The intended target is a large FPGA at a few hundred MHz. Every cluster is processed against
all 168 rows in the same cycle, and road clusters are tested 32 at a time.

## Dataflow

```
 clk_in            clk_core                                             clk_out
 ------            --------                                             -------
 event framing --> cdc_fifo --> ht_event_ctrl (bank ping-pong)
                                 |-- ht_fill (168 rows x 8 layers) --> ht_accumulator [2 banks]
                                 |-- cluster_store [2 banks]                  |
                                 |                                            v
                                 |                          ht_road_finder (>= 7 layers)
                                 |                                            |
                                 `-- end-of-event word    ht_cluster_extractor (32 clusters/cycle)
                                               \______________/
                                                      |
                                                  cdc_fifo --> output words, counters
```

* **Input (clk_in).** `event_start_in` opens an event. Each cycle with `event_valid` carries
  at most one cluster per layer: `layer_valid[l]`, `phi[l]` (16 bit), `r[l]` (12 bit) and
  `clu[l]` (an 18-bit cluster word passed through to the output). `event_end_in` closes the
  event and may come with or without data. While `in_ready` is low the source must hold its
  inputs.
* **Core (clk_core).** One input word per cycle is accepted. Its clusters are appended to the
  cluster store, and their lines are ORed into the accumulator in the same cycle.
* **Output (clk_out).** Words move when `out_valid && out_ready`. A road is one or more
  words. All words of a road carry its cell (`qapt_out`, `phi0_out`), and `road_first` /
  `road_last` mark where the road starts and ends. Each word holds up to 32 clusters
  (`cl_valid`, `cl_data_out`). After the roads of an event comes one `eoe` word. Its
  `overflow` bit is set if some layer had more than 256 clusters. When nothing is shown the
  outputs sit at their idle values: `8'hff`, `6'h3f` and `18'h3ffff`.
  `cnt_roads_tot` and `cnt_clusters_tot` count the roads and clusters delivered since reset.

The three clock domains have the same period but are independent. They are joined by
asynchronous FIFOs (`cdc_fifo`), which lets each part be placed and timed separately. Each
domain has its own synchronous, active-low reset. Release all three resets together.

## Two events in flight

The accumulator and the cluster store each have two banks. `ht_event_ctrl` keeps a "full"
flag for each bank and runs two independent sides:

* **Fill side.** It writes the incoming event into its current bank. The word carrying
  end-of-event marks that bank full, and the fill side moves to the other bank. If the other
  bank is still full, the fill side stops taking words. The core FIFO then fills up and
  `in_ready` falls.
* **Readout side.** It waits until its bank is full, then starts the road finder. Once the
  road finder and the extractor are both idle, it sends the end-of-event word. It then clears
  the bank (accumulator and counts, in one cycle), marks it empty and moves to the other
  bank.

So event *n+1* is filled while event *n* is read out, and events always leave in arrival
order. `en_prev` / `en_succ` show which bank is being filled, and `mem_rd` shows that a bank
is being read out.

## The arithmetic (ht_pkg)

All bins use fixed point:

* `phi0` column `j` covers phi codes `[8192 + 1024 j, 8192 + 1024 (j+1))`, so the 48 columns
  span the middle three quarters of the 16-bit phi range.
* `qA/pt` row `k` has slope `s_k = 2k - 167`, in units of 1/64 phi code per r code. The rows
  are therefore symmetric about zero curvature.
* For each row and layer, `ht_fill` computes `phi + ((r * s_k) >>> 6)`, an arithmetic shift,
  so it rounds toward minus infinity. It keeps the result only if it falls inside the 48
  columns, and sets that column's bit. Each row multiplies by a different constant.
* `ht_cluster_extractor` uses the same expression (`ht_pkg::phi0_bin`) to test whether a
  stored cluster lies in the road's cell.

To map physical units onto this, choose the phi LSB so that 1024 codes make one `phi0` bin.
Then choose the `r` LSB and the constants `RQ_SHIFT` / `QPT_HALFSTEP` so that the rows cover
the wanted curvature range. The reference configuration covers `qA/pt` in ±1.0572 with
A = 0.0003 GeV/mm. This code does not fix that mapping.

## Roads and cluster extraction

* **`ht_road_finder`** reads one accumulator row per cycle and counts, in parallel, the
  layers set in each of the 48 cells. It hands out the cells that reach the threshold one per
  cycle, ordered by row and then by column. A scan takes 168 + (number of roads) cycles when
  nothing downstream stalls. Every cell at or above the threshold is reported, including
  neighbouring cells of the same track. The design does not merge them.
* **`ht_cluster_extractor`** takes one road at a time. It reads 4 clusters of every layer per
  cycle (32 in all) from the cluster store and tests all of them against the road's cell. It
  sends the ones that match. A road costs ceil(max clusters in a layer / 4) cycles, so the
  readout time grows with the busiest layer and with the number of roads.
* **`cluster_store`** holds up to 256 clusters per layer and bank. Clusters beyond that still
  reach the accumulator but cannot be extracted, and the event's end-of-event word reports
  the overflow.

## Files

| file | content |
|---|---|
| `rtl/ht_pkg.sv` | sizes, word types, bin formula |
| `rtl/cdc_fifo.sv` | dual-clock FIFO (Gray-code pointers) |
| `rtl/ht_fill.sv` | HT line of 8 clusters over all 168 rows |
| `rtl/ht_accumulator.sv` | 2 banks x 8 layers x 168 x 48 bits |
| `rtl/cluster_store.sv` | 2 banks x 8 layers x 256 clusters |
| `rtl/ht_road_finder.sv` | threshold scan |
| `rtl/ht_cluster_extractor.sv` | second HT pass on stored clusters |
| `rtl/ht_event_ctrl.sv` | bank ping-pong control |
| `rtl/ht_track_top.sv` | top level |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_ht_ref_pkg.sv` is an independent reference of the binning |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/ht_pkg.sv tb/tb_ht_ref_pkg.sv tb/tb_ht_track_top.sv --top-module tb_ht_track_top
./obj_dir/Vtb_ht_track_top
```

`tb_ht_track_top` runs the whole design at its default size. It sends six events: tracks on
random cells (8 layers, or 7 with one layer missing), random noise clusters, one event that
overflows layer 0 and one empty event. It throttles the output so that the input stalls, and
checks every road and every cluster against its own model. It also checks that an input
stall, output back-pressure, filling while reading out, an overflow and an empty event each
happen at least once. Building it takes about a minute and running it a few seconds.

## Where this departs from the original design, and what is own choice

* The original architecture can also fill the accumulator the other way round, computing
  `qA/pt = (phi0 - phi) / r` for each `phi0` column. Only `phi0 = phi + r*qA/pt` is built
  here.
* The following are choices made for this implementation, not taken from the reference
  design:
  * the fixed-point scaling;
  * storing per-layer bits in the accumulator (rather than counters);
  * the row-by-row scan;
  * 4 clusters per layer per cycle in extraction;
  * the 256-cluster depth;
  * the event framing and output word format;
  * the use of exactly three clock domains.

  Port widths (16-bit phi, 12-bit r, 18-bit cluster, 8-bit and 6-bit bin indices, 32
  output clusters) and idle values follow the reference design's simulation.
* No FPGA-specific parts are included (clocking, transceivers, readout links). The reference
  implementation runs at 400 MHz on an Alveo U250. This RTL has not been timed on a device.
* Combinational reads of the accumulator and the cluster store keep the control simple. A
  400 MHz implementation would need pipeline registers on the row read, the cluster read and
  the 168-row multiplier array. None are inserted here.
